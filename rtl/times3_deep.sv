// times3_deep: a deeper times-three pipeline. Each of the two additions of
// 3 x A = (A + A) + A is split over two stages: the low SPLIT bits are added
// first and their carry is registered, then the high bits are added with
// that carry. With the input register this gives five register levels:
//   edge 1: A registered
//   edge 2: low half of A + A, carry, copy of A
//   edge 3: high half of A + A  -> 2A complete
//   edge 4: low half of 2A + A, carry
//   edge 5: high half of 2A + A -> 3A
// One result per cycle, five clock edges after its operand. How the adders
// are split (a low/high carry split at SPLIT, WIDTH/2 by default) is this
// design's choice; SPLIT may be set unevenly. Reset clears the valid bits.
module times3_deep #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned SPLIT = WIDTH / 2
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             in_valid,
  input  logic [WIDTH-1:0] a_in,
  output logic             out_valid,
  output logic [WIDTH-1:0] y
);
  localparam int unsigned HI = WIDTH - SPLIT;

  // stage registers
  logic [WIDTH-1:0] a0, a1, a2;           // copies of A travelling along
  logic [HI-1:0]    a3;                   // high half of A for edge 5
  logic [SPLIT-1:0] lo1;                  // low half of 2A
  logic             c1;                   // its carry
  logic [WIDTH-1:0] two_a2;               // 2A complete
  logic [SPLIT-1:0] lo4;                  // low half of 3A
  logic             c4;
  logic [HI-1:0]    hi4;                  // high half of 2A
  logic [4:0]       v;

  // combinational halves
  logic [SPLIT:0]   s_lo1, s_lo4;
  logic [HI-1:0]    s_hi2, s_hi5;

  always_comb begin
    s_lo1 = {1'b0, a0[SPLIT-1:0]} + {1'b0, a0[SPLIT-1:0]};
    s_hi2 = a1[WIDTH-1:SPLIT] + a1[WIDTH-1:SPLIT] + HI'(c1);
    s_lo4 = {1'b0, two_a2[SPLIT-1:0]} + {1'b0, a2[SPLIT-1:0]};
    s_hi5 = hi4 + a3 + HI'(c4);
  end

  always_ff @(posedge clk) begin
    // edge 1
    a0     <= a_in;
    // edge 2
    a1     <= a0;
    lo1    <= s_lo1[SPLIT-1:0];
    c1     <= s_lo1[SPLIT];
    // edge 3
    a2     <= a1;
    two_a2 <= {s_hi2, lo1};
    // edge 4
    a3     <= a2[WIDTH-1:SPLIT];
    lo4    <= s_lo4[SPLIT-1:0];
    c4     <= s_lo4[SPLIT];
    hi4    <= two_a2[WIDTH-1:SPLIT];
    // edge 5
    y      <= {s_hi5, lo4};
    if (rst) v <= '0;
    else     v <= {v[3:0], in_valid};
  end

  assign out_valid = v[4];
endmodule
