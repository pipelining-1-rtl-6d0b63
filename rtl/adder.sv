// adder: two-input binary adder, the "ADD" box used by the times-three
// circuits, the execute stage of the addq processor and the PC's "add 2".
// Purely combinational; the sum wraps modulo 2^WIDTH and the carry out is
// dropped, as Y86-64 addq does. WIDTH defaults to the 64-bit processor word.
module adder #(
  parameter int unsigned WIDTH = 64
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum
);
  always_comb sum = a + b;
endmodule
