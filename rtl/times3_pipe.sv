// times3_pipe: the pipelined times-three circuit. 3 x A is formed as
// (A + A) + A with two adders, and pipeline registers cut the path so each
// cycle holds one adder delay:
//   edge 1: A is registered                         (holds A of item t+2)
//   edge 2: A + A and a copy of A are registered    (2A, A of item t+1)
//   edge 3: 2A + A is registered                    (3A of item t)
// Three items are in flight at once; one result leaves per cycle, three
// clock edges after its operand was presented. The register placement
// follows the published pipeline; the operand width and the valid bit that
// travels with each item are this design's choices. Reset (synchronous,
// active high) clears only the valid bits.
module times3_pipe #(
  parameter int unsigned WIDTH = 64
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             in_valid,
  input  logic [WIDTH-1:0] a_in,
  output logic             out_valid,
  output logic [WIDTH-1:0] y
);
  logic [WIDTH-1:0] a_q, a1_q, two_a_q, two_a, three_a;
  logic             v0_q, v1_q;

  adder #(.WIDTH(WIDTH)) u_add1 (.a(a_q),     .b(a_q),  .sum(two_a));
  adder #(.WIDTH(WIDTH)) u_add2 (.a(two_a_q), .b(a1_q), .sum(three_a));

  always_ff @(posedge clk) begin
    a_q     <= a_in;
    a1_q    <= a_q;
    two_a_q <= two_a;
    y       <= three_a;
    if (rst) begin
      v0_q      <= 1'b0;
      v1_q      <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v0_q      <= in_valid;
      v1_q      <= v0_q;
      out_valid <= v1_q;
    end
  end
endmodule
