// tb_pipe_reg: checks a pipeline register holding the fetch/decode fields:
// after reset it shows the reset value (icode NOP, rA = rB = REG_NONE); then
// each value presented before a rising edge appears on q after that edge and
// stays until the next edge; reset in mid-stream restores the reset value.
module tb_pipe_reg;
  import y86_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst;
  fD_t  d, q;
  fD_t  hist [$];

  pipe_reg #(.T(fD_t), .RESET_VAL(FD_RESET)) dut (.clk(clk), .rst(rst), .d(d), .q(q));

  always #5 clk = ~clk;

  task automatic expect_q(fD_t exp, string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%h expected %h", what, q, exp);
    end
  endtask

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fD_t v;
    rst = 1; d = '{icode: I_OPQ, rA: 4'h3, rB: 4'h4};
    @(posedge clk); #1;
    expect_q('{icode: I_NOP, rA: 4'hF, rB: 4'hF}, "reset value");
    rst = 0;
    for (int i = 0; i < 50; i++) begin
      v = '{icode: icode_e'($urandom_range(0, 11)), rA: 4'($urandom), rB: 4'($urandom)};
      d = v;
      #3;
      if (i > 0) expect_q(hist[$], "holds between edges");
      @(posedge clk); #1;
      hist.push_back(v);
      expect_q(v, "loads at edge");
    end
    rst = 1;
    @(posedge clk); #1;
    expect_q(FD_RESET, "reset mid-stream");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
