// regfile: the Y86-64 register file, 15 registers of 64 bits numbered 0-14.
// Register number 0xF (REG_NONE) means "none": reading it gives 0 and
// writing it does nothing. Two read ports (srcA -> valA, srcB -> valB) are
// combinational. Two write ports, E (dstE, valE) and M (dstM, valM), write at
// the rising clock edge, so a register written in a cycle reads with its new
// value only from the next cycle. If both write ports name the same register
// the M port wins. The registers have no reset; they are loaded through the
// M port. A third read port (dbg_src -> dbg_val) is for observation. Port
// priority, no reset and the debug port are this design's choices.
module regfile
  import y86_pkg::*;
#(
  parameter int unsigned NREGS = 15
) (
  input  logic   clk,
  input  regid_t srcA,
  input  regid_t srcB,
  output word_t  valA,
  output word_t  valB,
  input  regid_t dstE,
  input  word_t  valE,
  input  regid_t dstM,
  input  word_t  valM,
  input  regid_t dbg_src,
  output word_t  dbg_val
);
  word_t regs [NREGS];

  function automatic word_t rd(regid_t r);
    return (32'(r) < NREGS) ? regs[r] : '0;
  endfunction

  always_comb begin
    valA    = rd(srcA);
    valB    = rd(srcB);
    dbg_val = rd(dbg_src);
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < NREGS; i++) begin
      if (32'(dstM) == i)      regs[i] <= valM;
      else if (32'(dstE) == i) regs[i] <= valE;
    end
  end
endmodule
