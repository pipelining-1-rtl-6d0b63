// tb_times3_comb: checks the unpipelined times-three circuit for the
// operands 7, 17, 4, 1, 23 (results 21, 51, 12, 3, 69), the largest
// operands (where 3A wraps modulo 2^64) and random operands, against 3*A
// formed here by multiplication.
module tb_times3_comb;
  int checks = 0, failures = 0;
  logic [63:0] a, y;

  times3_comb dut (.a(a), .y(y));

  task automatic try(logic [63:0] v);
    a = v; #1;
    checks++;
    if (y !== v * 64'd3) begin failures++; $display("FAIL 3*%0d = %0d", v, y); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    try(64'd7); try(64'd17); try(64'd4); try(64'd1); try(64'd23);
    try('1); try(64'h5555_5555_5555_5556); try(64'h8000_0000_0000_0000);
    for (int i = 0; i < 300; i++) try({$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
