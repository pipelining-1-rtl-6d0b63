// times3_comb: the unpipelined times-three circuit, 3 x A = (A + A) + A
// built from two adders in series. It has no registers: y follows a after
// two adder delays, so a new operand can only be applied once the previous
// result has settled and been used. The pipelined versions (times3_pipe,
// times3_deep) cut this path with registers. Operand width (64) is this
// design's choice.
module times3_comb #(
  parameter int unsigned WIDTH = 64
) (
  input  logic [WIDTH-1:0] a,
  output logic [WIDTH-1:0] y
);
  logic [WIDTH-1:0] two_a;

  adder #(.WIDTH(WIDTH)) u_add1 (.a(a),     .b(a), .sum(two_a));
  adder #(.WIDTH(WIDTH)) u_add2 (.a(two_a), .b(a), .sum(y));
endmodule
