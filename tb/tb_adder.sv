// tb_adder: checks the adder against sums formed one bit wider and cut back
// to WIDTH bits, for fixed corner cases (carry out dropped, wrap-around) and
// random operands, at WIDTH = 64 and WIDTH = 8.
module tb_adder;
  int checks = 0, failures = 0;

  logic [63:0] a, b, s;
  logic [7:0]  a8, b8, s8;

  adder #(.WIDTH(64)) dut   (.a(a),  .b(b),  .sum(s));
  adder #(.WIDTH(8))  dut8  (.a(a8), .b(b8), .sum(s8));

  task automatic check64(input logic [63:0] x, input logic [63:0] y);
    logic [64:0] wide;
    a = x; b = y; #1;
    wide = {1'b0, x} + {1'b0, y};
    checks++;
    if (s !== wide[63:0]) begin
      failures++;
      $display("FAIL %h + %h = %h, expected %h", x, y, s, wide[63:0]);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check64(64'd800, 64'd900);
    check64(64'd7, 64'd7);
    check64('1, 64'd1);
    check64(64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000);
    check64(64'h0000_0000_FFFF_FFFF, 64'd1);
    for (int i = 0; i < 200; i++) check64({$urandom, $urandom}, {$urandom, $urandom});
    for (int i = 0; i < 256; i += 17) begin
      for (int j = 0; j < 256; j += 13) begin
        a8 = 8'(i); b8 = 8'(j); #1;
        checks++;
        if (s8 !== 8'((i + j) % 256)) begin
          failures++;
          $display("FAIL8 %0d + %0d = %0d", i, j, s8);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
