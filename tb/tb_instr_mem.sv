// tb_instr_mem: loads every byte of a 64-byte instruction memory with the
// value (7*addr + 3) mod 256, then checks the ten-byte fetch window at
// every address, including windows that run past the end (those bytes must
// read 0), and that a load does not show before its clock edge.
module tb_instr_mem;
  localparam int BYTES = 64;
  int checks = 0, failures = 0;
  logic clk = 0, we;
  logic [63:0] waddr, addr;
  logic [7:0]  wdata;
  logic [79:0] i10;

  instr_mem #(.BYTES(BYTES)) dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata),
                                  .addr(addr), .i10bytes(i10));

  always #5 clk = ~clk;

  function automatic logic [7:0] pat(int a);
    return (a < BYTES) ? 8'((7 * a + 3) % 256) : 8'h00;
  endfunction

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; addr = 0; waddr = 0; wdata = 0;
    @(negedge clk);
    for (int a = 0; a < BYTES; a++) begin
      we = 1; waddr = 64'(a); wdata = pat(a);
      @(negedge clk);
    end
    we = 0;
    for (int a = 0; a < BYTES + 4; a++) begin
      addr = 64'(a); #1;
      for (int i = 0; i < 10; i++) begin
        checks++;
        if (i10[8*i +: 8] !== pat(a + i)) begin
          failures++;
          $display("FAIL addr %0d byte %0d = %h expected %h", a, i, i10[8*i +: 8], pat(a + i));
        end
      end
    end
    // far out of range
    addr = 64'hFFFF_0000; #1;
    checks++;
    if (i10 !== '0) begin failures++; $display("FAIL out of range %h", i10); end
    // load timing: new byte not visible before the edge
    addr = 64'd5;
    @(negedge clk);
    we = 1; waddr = 64'd5; wdata = 8'hA5; #1;
    checks++;
    if (i10[7:0] !== pat(5)) begin failures++; $display("FAIL write visible early"); end
    @(posedge clk); #1;
    we = 0;
    checks++;
    if (i10[7:0] !== 8'hA5) begin failures++; $display("FAIL write not stored"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
