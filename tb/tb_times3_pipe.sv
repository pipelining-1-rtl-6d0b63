// tb_times3_pipe: feeds the operand sequence 7, 17, 4, 1, 23 (results 21,
// 51, 12, 3, 69) followed by random operands back to back, one per cycle,
// and checks every result against 3*A worked out here, its latency of three
// clock edges, and that results leave at one per cycle. A gap in the input
// must give a gap in the output.
module tb_times3_pipe;
  localparam int W = 64;
  localparam int LAT = 3;
  int checks = 0, failures = 0;
  logic clk = 0, rst, in_valid, out_valid;
  logic [W-1:0] a_in, y;
  logic [W-1:0] exp_q [$];
  int           t_in [$];
  int           cycle = 0, outs = 0, last_out = -1, back_to_back = 0;

  times3_pipe dut (.clk(clk), .rst(rst), .in_valid(in_valid), .a_in(a_in),
                   .out_valid(out_valid), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker
  always @(posedge clk) begin
    #1;
    cycle++;
    if (!rst && out_valid) begin
      logic [W-1:0] e;
      int t0;
      e = exp_q.pop_front();
      t0 = t_in.pop_front();
      checks++;
      if (y !== e) begin failures++; $display("FAIL y=%0d expected %0d", y, e); end
      checks++;
      if (cycle - t0 != LAT) begin failures++; $display("FAIL latency %0d", cycle - t0); end
      if (last_out == cycle - 1) back_to_back++;
      last_out = cycle;
      outs++;
    end
  end

  task automatic push(logic [W-1:0] a);
    @(negedge clk);
    in_valid = 1; a_in = a;
    exp_q.push_back(a + a + a);
    t_in.push_back(cycle);
  endtask

  initial begin
    logic [W-1:0] seq [5] = '{64'd7, 64'd17, 64'd4, 64'd1, 64'd23};
    rst = 1; in_valid = 0; a_in = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    foreach (seq[i]) push(seq[i]);
    for (int i = 0; i < 50; i++) push({$urandom, $urandom});
    @(negedge clk) in_valid = 0;
    @(negedge clk);
    for (int i = 0; i < 20; i++) push(64'($urandom_range(0, 1000)));
    @(negedge clk) in_valid = 0;
    repeat (6) @(posedge clk);
    #2;
    checks++;
    if (outs != 75 || exp_q.size() != 0) begin failures++; $display("FAIL %0d results", outs); end
    checks++;
    if (back_to_back < 70) begin failures++; $display("FAIL only %0d back-to-back results", back_to_back); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
