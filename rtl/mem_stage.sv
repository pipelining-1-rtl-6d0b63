// mem_stage: the memory stage of a pipelined Y86-64 processor. The
// execute/memory pipeline register eM takes the execute stage's icode,
// address (valE) and store data (valA) at each rising edge; its icode
// (M_icode, reset NOP) drives the "is read?"/"is write?" logic, which
// enables the data memory. A load's value appears on m_valM in the same
// cycle (combinational read) and a store is written at the end of the cycle.
// That icode travels in the pipeline register and the read/write decision is
// taken from M_icode follow the published pipelined logic; the eM fields
// beyond icode follow Y86-64 convention.
module mem_stage
  import y86_pkg::*;
#(
  parameter int unsigned BYTES = 1024
) (
  input  logic   clk,
  input  logic   rst,
  input  icode_e e_icode,
  input  word_t  e_valE,
  input  word_t  e_valA,
  output icode_e M_icode,
  output word_t  m_valM,
  output logic   m_read,
  output logic   m_write
);
  eM_t e, M;

  always_comb begin
    e.icode = e_icode;
    e.valE  = e_valE;
    e.valA  = e_valA;
  end

  pipe_reg #(.T(eM_t), .RESET_VAL(EM_RESET)) u_eM (.clk(clk), .rst(rst), .d(e), .q(M));

  mem_rw_ctrl u_ctrl (.icode(M.icode), .mem_read(m_read), .mem_write(m_write));

  data_mem #(.BYTES(BYTES)) u_dmem (
    .clk(clk), .read(m_read), .write(m_write), .addr(M.valE),
    .wdata(M.valA), .rdata(m_valM)
  );

  assign M_icode = M.icode;
endmodule
