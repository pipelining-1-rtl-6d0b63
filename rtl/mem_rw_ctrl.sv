// mem_rw_ctrl: the "is read?" and "is write?" boxes in front of the data
// memory. From the icode of the instruction in the memory stage it decides
// whether the data memory is read (mrmovq, popq, ret) or written (rmmovq,
// pushq, call). The published logic lists mrmovq as a reader and leaves the
// rest of both lists out; the remaining entries follow the Y86-64
// instruction set. Purely combinational.
module mem_rw_ctrl
  import y86_pkg::*;
(
  input  logic [3:0] icode,
  output logic       mem_read,
  output logic       mem_write
);
  always_comb begin
    mem_read  = (icode == I_MRMOVQ) || (icode == I_POPQ) || (icode == I_RET);
    mem_write = (icode == I_RMMOVQ) || (icode == I_PUSHQ) || (icode == I_CALL);
  end
endmodule
