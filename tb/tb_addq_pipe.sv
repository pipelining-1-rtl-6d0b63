// tb_addq_pipe: runs the pipelined addq processor on two programs.
//
// 1. The four-instruction example with %rN = 100*N initially:
//      addq %r8,%r9 ; addq %r10,%r11 ; addq %r12,%r13 ; addq %r9,%r8
//    Every filled cell of the published cycle-by-cycle table is checked:
//    PC, fD (rA, rB), dE (valA, valB, dstE) and eW (valE, dstE) in cycles
//    0-6, then the final registers (%r9 = 1700, %r11 = 2100, %r13 = 2500,
//    %r8 = 2500). Instruction k is fetched in cycle k and written at the end
//    of cycle k+3: four cycles of latency, one instruction per cycle.
// 2. A random program of addq and other encodings (which must act as NOPs)
//    checked cycle by cycle against a reference model written here. The
//    model lets instruction k see the results of instructions up to k-3
//    only, because the processor has no forwarding.
module tb_addq_pipe;
  import y86_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst;
  logic imem_we;
  logic [63:0] imem_waddr;
  logic [7:0] imem_wdata;
  regid_t load_dst, dbg_src, W_dstE;
  word_t load_val, pc, W_valE, dbg_val;
  icode_e W_icode;

  addq_pipe dut (.clk(clk), .rst(rst), .imem_we(imem_we), .imem_waddr(imem_waddr),
                 .imem_wdata(imem_wdata), .load_dst(load_dst), .load_val(load_val),
                 .pc(pc), .W_icode(W_icode), .W_dstE(W_dstE), .W_valE(W_valE),
                 .dbg_src(dbg_src), .dbg_val(dbg_val));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Hold reset, fill memory with NOP bytes (0x10), load a program and set
  // %rN = init(N) through the M port.
  task automatic setup(logic [7:0] prog [], word_t init [15]);
    rst = 1;
    @(negedge clk);
    for (int a = 0; a < 1024; a++) begin
      imem_we = 1; imem_waddr = 64'(a);
      imem_wdata = (a < prog.size()) ? prog[a] : 8'h10;
      @(negedge clk);
    end
    imem_we = 0;
    for (int r = 0; r < 15; r++) begin
      load_dst = regid_t'(r); load_val = init[r];
      @(negedge clk);
    end
    load_dst = REG_NONE;
    @(posedge clk); #1;   // last reset edge: this is cycle 0, PC = 0
    rst = 0;
  endtask

  task automatic check_reg(int r, word_t v);
    dbg_src = regid_t'(r); #1;
    chk(dbg_val === v, $sformatf("R[%0d]=%0d expected %0d", r, dbg_val, v));
  endtask

  initial begin
    logic [7:0] prog1 [] = '{8'h60, 8'h89, 8'h60, 8'hAB, 8'h60, 8'hCD, 8'h60, 8'h98};
    word_t init [15];
    imem_we = 0; imem_waddr = 0; imem_wdata = 0; load_dst = REG_NONE; load_val = 0; dbg_src = 0;
    for (int r = 0; r < 15; r++) init[r] = word_t'(100 * r);

    // ---------------- program 1: the published timing table ----------------
    setup(prog1, init);   // returns in cycle 0
    chk(pc == 64'h0 && dut.D == FD_RESET && dut.E == DE_RESET && dut.W == EW_RESET, "cycle 0");
    @(posedge clk); #1;   // cycle 1
    chk(pc == 64'h2 && dut.D.rA == 8 && dut.D.rB == 9, "cycle 1");
    @(posedge clk); #1;   // cycle 2
    chk(pc == 64'h4 && dut.D.rA == 10 && dut.D.rB == 11, "cycle 2 fD");
    chk(dut.E.valA == 800 && dut.E.valB == 900 && dut.E.dstE == 9, "cycle 2 dE");
    @(posedge clk); #1;   // cycle 3
    chk(pc == 64'h6 && dut.D.rA == 12 && dut.D.rB == 13, "cycle 3 fD");
    chk(dut.E.valA == 1000 && dut.E.valB == 1100 && dut.E.dstE == 11, "cycle 3 dE");
    chk(W_valE == 1700 && W_dstE == 9, "cycle 3 eW");
    @(posedge clk); #1;   // cycle 4
    chk(dut.D.rA == 9 && dut.D.rB == 8, "cycle 4 fD");
    chk(dut.E.valA == 1200 && dut.E.valB == 1300 && dut.E.dstE == 13, "cycle 4 dE");
    chk(W_valE == 2100 && W_dstE == 11, "cycle 4 eW");
    @(posedge clk); #1;   // cycle 5
    chk(dut.E.valA == 1700 && dut.E.valB == 800 && dut.E.dstE == 8, "cycle 5 dE");
    chk(W_valE == 2500 && W_dstE == 13, "cycle 5 eW");
    @(posedge clk); #1;   // cycle 6
    chk(W_valE == 2500 && W_dstE == 8, "cycle 6 eW");
    @(posedge clk); #1;
    chk(W_dstE == REG_NONE && W_icode == I_NOP, "pipeline drained");
    check_reg(9, 1700); check_reg(11, 2100); check_reg(13, 2500); check_reg(8, 2500);
    check_reg(10, 1000); check_reg(12, 1200);

    // ---------------- program 2: random, against a reference model ----------------
    begin
      localparam int N = 200;
      logic [7:0] prog2 [];
      word_t   rf [15];
      bit      is_add [N];
      regid_t  dst [N];
      word_t   res [N];
      prog2 = new[2 * N];
      for (int r = 0; r < 15; r++) begin
        init[r] = {$urandom, $urandom};
        rf[r] = init[r];
      end
      for (int k = 0; k < N; k++) begin
        logic [3:0] ra, rb;
        ra = 4'($urandom_range(0, 14)); rb = 4'($urandom_range(0, 14));
        is_add[k] = ($urandom_range(0, 9) != 0);
        prog2[2*k]   = is_add[k] ? 8'h60 : 8'($urandom_range(0, 255)) | 8'h01;  // never 0x60
        prog2[2*k+1] = {ra, rb};
        // reference: commit instruction k-3, then read
        if (k >= 3 && is_add[k-3]) rf[dst[k-3]] = res[k-3];
        dst[k] = is_add[k] ? regid_t'(rb) : REG_NONE;
        res[k] = is_add[k] ? rf[ra] + rf[rb] : '0;
      end
      for (int k = N - 3; k < N; k++) if (is_add[k]) rf[dst[k]] = res[k];
      setup(prog2, init);   // returns in cycle 0
      for (int c = 1; c <= N + 3; c++) begin
        @(posedge clk); #1;
        chk(pc == 64'(2 * c), $sformatf("pc at cycle %0d", c));
        if (c >= 3) begin
          int k;
          k = c - 3;
          if (is_add[k])
            chk(W_icode == I_OPQ && W_dstE == dst[k] && W_valE == res[k],
                $sformatf("instr %0d writeback %h=%0d expected %h=%0d", k, W_dstE, W_valE, dst[k], res[k]));
          else
            chk(W_icode == I_NOP && W_dstE == REG_NONE, $sformatf("instr %0d should be a NOP", k));
        end
      end
      for (int r = 0; r < 15; r++) check_reg(r, rf[r]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
