// tb_pc_update: checks that the PC is 0 after reset and advances by 2 on
// every rising edge (0x0, 0x2, 0x4, 0x6, ... as in the addq timing example),
// and returns to 0 on a new reset.
module tb_pc_update;
  int checks = 0, failures = 0;
  logic clk = 0, rst;
  logic [63:0] pc;

  pc_update dut (.clk(clk), .rst(rst), .pc(pc));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1;
    @(posedge clk); #1;
    rst = 0;
    for (int c = 0; c < 100; c++) begin
      checks++;
      if (pc !== 64'(2 * c)) begin
        failures++;
        $display("FAIL cycle %0d pc=%h expected %h", c, pc, 2 * c);
      end
      @(posedge clk); #1;
    end
    rst = 1;
    @(posedge clk); #1;
    checks++;
    if (pc !== 64'd0) begin failures++; $display("FAIL reset pc=%h", pc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
