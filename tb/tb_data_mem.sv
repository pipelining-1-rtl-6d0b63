// tb_data_mem: checks the data memory against a byte-array reference:
// 8-byte little-endian writes land at the clock edge (not before), reads
// are combinational, the output is 0 when not reading, unaligned and
// overlapping accesses work, and bytes past the end read 0.
module tb_data_mem;
  localparam int BYTES = 128;
  int checks = 0, failures = 0;
  logic clk = 0, rd, wr;
  logic [63:0] addr, wdata, rdata;
  logic [7:0] ref_m [BYTES];
  bit         cleared = 0;   // contents unknown until cleared

  data_mem #(.BYTES(BYTES)) dut (.clk(clk), .read(rd), .write(wr), .addr(addr),
                                 .wdata(wdata), .rdata(rdata));

  always #5 clk = ~clk;

  function automatic logic [63:0] ref_word(int a);
    logic [63:0] w;
    for (int i = 0; i < 8; i++) w[8*i +: 8] = (a + i < BYTES) ? ref_m[a + i] : 8'h00;
    return w;
  endfunction

  task automatic do_write(int a, logic [63:0] v);
    @(negedge clk);
    wr = 1; rd = 1; addr = 64'(a); wdata = v; #1;
    if (cleared) begin
      checks++;
      if (rdata !== ref_word(a)) begin failures++; $display("FAIL write visible early at %0d", a); end
    end
    @(posedge clk);
    for (int i = 0; i < 8; i++) if (a + i < BYTES) ref_m[a + i] = v[8*i +: 8];
    #1 wr = 0;
  endtask

  task automatic do_read(int a);
    @(negedge clk);
    rd = 1; wr = 0; addr = 64'(a); #1;
    checks++;
    if (rdata !== ref_word(a)) begin
      failures++;
      $display("FAIL read %0d = %h expected %h", a, rdata, ref_word(a));
    end
    rd = 0; #1;
    checks++;
    if (rdata !== '0) begin failures++; $display("FAIL output not 0 when idle"); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd = 0; wr = 0; addr = 0; wdata = 0;
    for (int a = 0; a < BYTES; a += 8) begin
      for (int i = 0; i < 8; i++) ref_m[a + i] = 8'h00;
      do_write(a, '0);
    end
    cleared = 1;
    do_write(0, 64'h0807_0605_0403_0201);
    do_read(0); do_read(3);
    do_write(5, 64'hDEAD_BEEF_CAFE_F00D);
    do_read(0); do_read(5); do_read(8);
    do_write(BYTES - 4, 64'h1122_3344_5566_7788);
    do_read(BYTES - 4); do_read(BYTES - 8);
    for (int i = 0; i < 200; i++) begin
      if ($urandom_range(0, 1)) do_write($urandom_range(0, BYTES - 1), {$urandom, $urandom});
      else do_read($urandom_range(0, BYTES + 8));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
