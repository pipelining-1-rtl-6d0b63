// tb_regfile: checks the register file against a reference array: writes
// through the E and M ports land at the clock edge (not before), register
// 0xF reads 0 and ignores writes, the M port wins when both ports name the
// same register, and random traffic on all ports matches the reference.
module tb_regfile;
  import y86_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  regid_t srcA, srcB, dstE, dstM, dbg_src;
  word_t  valA, valB, valE, valM, dbg_val;
  word_t  ref_r [16];
  bit     loaded = 0;   // before loading, register contents are unknown

  regfile dut (.clk(clk), .srcA(srcA), .srcB(srcB), .valA(valA), .valB(valB),
               .dstE(dstE), .valE(valE), .dstM(dstM), .valM(valM),
               .dbg_src(dbg_src), .dbg_val(dbg_val));

  always #5 clk = ~clk;

  task automatic check_reads(string what);
    checks++;
    if (valA !== ref_r[srcA] || valB !== ref_r[srcB] || dbg_val !== ref_r[dbg_src]) begin
      failures++;
      $display("FAIL %s: R[%h]=%h/%h R[%h]=%h/%h dbg R[%h]=%h/%h", what, srcA, valA, ref_r[srcA],
               srcB, valB, ref_r[srcB], dbg_src, dbg_val, ref_r[dbg_src]);
    end
  endtask

  task automatic write_cycle(regid_t de, word_t ve, regid_t dm, word_t vm);
    @(negedge clk);
    dstE = de; valE = ve; dstM = dm; valM = vm;
    #1 if (loaded) check_reads("before edge");
    @(posedge clk);
    if (de != 4'hF) ref_r[de] = ve;
    if (dm != 4'hF) ref_r[dm] = vm;
    #1;
    dstE = 4'hF; dstM = 4'hF;
    if (loaded || 32'(dm) == 32'(srcA)) check_reads("after edge");
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dstE = 4'hF; dstM = 4'hF; valE = 0; valM = 0;
    srcA = 0; srcB = 0; dbg_src = 0;
    for (int i = 0; i < 16; i++) ref_r[i] = '0;
    // initialise through M (as a program loader would), checking each
    for (int i = 0; i < 15; i++) begin
      srcA = regid_t'(i); srcB = 4'hF; dbg_src = regid_t'(i);
      write_cycle(4'hF, 0, regid_t'(i), word_t'(100 * i));
    end
    loaded = 1;
    // E port
    srcA = 4'd9; srcB = 4'd8;
    write_cycle(4'd9, 64'd1700, 4'hF, 0);
    // 0xF ignored, reads zero
    srcA = 4'hF; srcB = 4'hF; dbg_src = 4'hF;
    write_cycle(4'hF, 64'd123, 4'hF, 64'd456);
    // same register on both ports: M wins
    srcA = 4'd3; srcB = 4'd3; dbg_src = 4'd3;
    write_cycle(4'd3, 64'd1111, 4'd3, 64'd2222);
    checks++;
    if (valA !== 64'd2222) begin failures++; $display("FAIL M priority %0d", valA); end
    // random traffic
    for (int i = 0; i < 300; i++) begin
      srcA = regid_t'($urandom); srcB = regid_t'($urandom); dbg_src = regid_t'($urandom);
      write_cycle(regid_t'($urandom), {$urandom, $urandom}, regid_t'($urandom), {$urandom, $urandom});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
