// pc_update: the fetch stage's PC register (pipeline register pP) and its
// "add 2" incrementer. Every addq instruction is two bytes long, so the
// next PC is always PC + PC_INC and a new instruction starts every cycle.
// The PC resets to 0 (synchronous, active-high reset) and changes just after
// each rising clock edge. There is no stall or branch input: the addq
// processor has none.
module pc_update #(
  parameter int unsigned PC_INC = 2
) (
  input  logic        clk,
  input  logic        rst,
  output logic [63:0] pc
);
  logic [63:0] p_pc;

  adder #(.WIDTH(64)) u_add2 (.a(pc), .b(64'(PC_INC)), .sum(p_pc));

  pipe_reg #(.T(logic [63:0]), .RESET_VAL(64'd0)) u_pP (
    .clk(clk), .rst(rst), .d(p_pc), .q(pc)
  );
endmodule
