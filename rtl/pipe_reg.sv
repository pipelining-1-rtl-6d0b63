// pipe_reg: a pipeline register. It holds the values one stage sends (d, the
// lower-case side such as f_rA) for the next stage to read (q, the upper-case
// side such as D_rA). It loads on every rising clock edge; the value on q
// changes just after the edge and d must be stable before it. The field
// layout is given by the type parameter T and the value after reset by
// RESET_VAL (REG_NONE for register numbers, 0 for data, NOP for icode, as
// the processor's register listing gives). Reset is synchronous and active
// high, a choice of this design.
module pipe_reg #(
  parameter type T         = logic [7:0],
  parameter T    RESET_VAL = '0
) (
  input  logic clk,
  input  logic rst,
  input  T     d,
  output T     q
);
  always_ff @(posedge clk) begin
    if (rst) q <= RESET_VAL;
    else     q <= d;
  end
endmodule
