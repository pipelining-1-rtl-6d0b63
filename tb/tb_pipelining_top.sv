// tb_pipelining_top: end-to-end test of the top level at its default sizes
// (1 KiB instruction and data memories, 64-bit times-three datapaths). The
// examples run side by side, each checked against a model written here:
//   * processors: the published four-instruction timing example, then a
//     random program of 300 instructions mixing addq with other encodings,
//     run on both the pipelined and the single-cycle processor and compared
//     writeback by writeback and in the final registers;
//   * times three (unpipelined and both pipelines): 400 operands, back to
//     back and with gaps, compared with 3*A and with the expected latency;
//   * memory stage: 400 random instructions, loads compared with a
//     reference memory.
// Each mechanism must have happened at least once: a full processor
// pipeline, an instruction turned into a NOP, a read of a register that an
// instruction still in the pipeline is about to change (it must see the old
// value, so the two processors end with different registers), results
// leaving the times-three pipelines on consecutive cycles, and data-memory
// reads and writes.
module tb_pipelining_top;
  import y86_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst;

  logic cpu_imem_we; logic [63:0] cpu_imem_waddr; logic [7:0] cpu_imem_wdata;
  regid_t cpu_load_dst, cpu_W_dstE, cpu_dbg_src;
  word_t cpu_load_val, cpu_pc, cpu_W_valE, cpu_dbg_val;
  icode_e cpu_W_icode;
  logic seq_imem_we; logic [63:0] seq_imem_waddr; logic [7:0] seq_imem_wdata;
  regid_t seq_load_dst, seq_dstE, seq_dbg_src;
  word_t seq_load_val, seq_pc, seq_valE, seq_dbg_val;
  icode_e seq_icode;
  logic [63:0] t3c_a, t3c_y;
  logic t3_in_valid, t3_out_valid, t3d_in_valid, t3d_out_valid;
  logic [63:0] t3_a, t3_y, t3d_a, t3d_y;
  icode_e mem_e_icode, mem_M_icode;
  word_t mem_e_valE, mem_e_valA, mem_m_valM;
  logic mem_m_read, mem_m_write;

  pipelining_top dut (.*);

  always #5 clk = ~clk;

  int cyc = 0;
  always @(posedge clk) cyc++;

  // mechanism counters
  int n_full_pipe = 0, n_nop = 0, n_stale = 0, n_retired = 0;
  int n_t3 = 0, n_t3_b2b = 0, n_t3d = 0, n_t3d_b2b = 0;
  int n_mrd = 0, n_mwr = 0, n_differ = 0;

  // The single-cycle processor gets the same program and registers.
  always_comb begin
    seq_imem_we = cpu_imem_we; seq_imem_waddr = cpu_imem_waddr; seq_imem_wdata = cpu_imem_wdata;
    seq_load_dst = cpu_load_dst; seq_load_val = cpu_load_val; seq_dbg_src = cpu_dbg_src;
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #1;
    if (!rst && dut.u_cpu.D.icode == I_OPQ && dut.u_cpu.E.icode == I_OPQ && dut.u_cpu.W.icode == I_OPQ)
      n_full_pipe++;
  end

  // ---------------- processor ----------------
  task automatic cpu_setup(logic [7:0] prog [], word_t init [15]);
    rst = 1;
    @(negedge clk);
    for (int a = 0; a < 1024; a++) begin
      cpu_imem_we = 1; cpu_imem_waddr = 64'(a);
      cpu_imem_wdata = (a < prog.size()) ? prog[a] : 8'h10;
      @(negedge clk);
    end
    cpu_imem_we = 0;
    for (int r = 0; r < 15; r++) begin
      cpu_load_dst = regid_t'(r); cpu_load_val = init[r];
      @(negedge clk);
    end
    cpu_load_dst = REG_NONE;
    @(posedge clk); #1;   // reset edge: cycle 0
    rst = 0;
  endtask

  task automatic cpu_reg(int r, word_t v, word_t vs);
    cpu_dbg_src = regid_t'(r); #1;
    chk(cpu_dbg_val === v, $sformatf("R[%0d]=%0d expected %0d", r, cpu_dbg_val, v));
    chk(seq_dbg_val === vs, $sformatf("single-cycle R[%0d]=%0d expected %0d", r, seq_dbg_val, vs));
    if (v != vs) n_differ++;
  endtask

  // single-cycle processor: instruction k runs in cycle k and sees all
  // earlier results
  task automatic seq_check(int k, logic [7:0] prog [], inout word_t sf [15]);
    logic [3:0] ra, rb;
    ra = prog[2*k+1][7:4]; rb = prog[2*k+1][3:0];
    chk(seq_pc == 64'(2 * k), $sformatf("single-cycle pc at cycle %0d", k));
    if (prog[2*k] == 8'h60) begin
      chk(seq_icode == I_OPQ && seq_dstE == rb && seq_valE == sf[ra] + sf[rb],
          $sformatf("single-cycle instr %0d", k));
      sf[rb] = sf[ra] + sf[rb];
    end else
      chk(seq_icode == I_NOP && seq_dstE == REG_NONE, $sformatf("single-cycle instr %0d not a NOP", k));
  endtask

  // Run a program; the model gives instruction k the register values left
  // by instructions 0..k-3 and counts reads that miss a pending result.
  task automatic cpu_run(logic [7:0] prog [], word_t init [15], int n);
    word_t  rf [15], sf [15];
    bit     is_add [];
    regid_t dst [];
    word_t  res [];
    is_add = new[n]; dst = new[n]; res = new[n];
    for (int r = 0; r < 15; r++) begin rf[r] = init[r]; sf[r] = init[r]; end
    for (int k = 0; k < n; k++) begin
      logic [3:0] ra, rb;
      ra = prog[2*k+1][7:4]; rb = prog[2*k+1][3:0];
      is_add[k] = (prog[2*k] == 8'h60);
      if (k >= 3 && is_add[k-3]) rf[dst[k-3]] = res[k-3];
      if (is_add[k]) begin
        for (int j = k - 2; j < k; j++)
          if (j >= 0 && is_add[j] && (dst[j] == ra || dst[j] == rb)) begin
            n_stale++;
            break;
          end
      end else n_nop++;
      dst[k] = is_add[k] ? regid_t'(rb) : REG_NONE;
      res[k] = is_add[k] ? rf[ra] + rf[rb] : '0;
    end
    for (int k = (n > 3 ? n - 3 : 0); k < n; k++) if (is_add[k]) rf[dst[k]] = res[k];
    cpu_setup(prog, init);
    #1 seq_check(0, prog, sf);
    for (int c = 1; c <= n + 3; c++) begin
      @(posedge clk); #1;
      if (c < n) seq_check(c, prog, sf);
      chk(cpu_pc == 64'(2 * c), $sformatf("pc at cycle %0d", c));
      if (c >= 3) begin
        int k;
        k = c - 3;
        if (is_add[k]) begin
          chk(cpu_W_icode == I_OPQ && cpu_W_dstE == dst[k] && cpu_W_valE == res[k],
              $sformatf("instr %0d writeback %h=%0d expected %h=%0d", k, cpu_W_dstE, cpu_W_valE, dst[k], res[k]));
          n_retired++;
        end else
          chk(cpu_W_icode == I_NOP && cpu_W_dstE == REG_NONE, $sformatf("instr %0d not a NOP", k));
      end
    end
    @(posedge clk); #1;
    for (int r = 0; r < 15; r++) cpu_reg(r, rf[r], sf[r]);
  endtask

  task automatic cpu_test();
    logic [7:0] prog [];
    word_t init [15];
    // published example
    prog = '{8'h60, 8'h89, 8'h60, 8'hAB, 8'h60, 8'hCD, 8'h60, 8'h98};
    for (int r = 0; r < 15; r++) init[r] = word_t'(100 * r);
    cpu_run(prog, init, 4);
    chk(rf_ok(), "published example final registers");
    // random program
    prog = new[600];
    for (int k = 0; k < 300; k++) begin
      prog[2*k]   = ($urandom_range(0, 7) != 0) ? 8'h60 : (8'($urandom_range(0, 255)) | 8'h01);
      prog[2*k+1] = {4'($urandom_range(0, 14)), 4'($urandom_range(0, 14))};
      init[k % 15] = {$urandom, $urandom};
    end
    cpu_run(prog, init, 300);
  endtask

  function automatic bit rf_ok();
    return dut.u_cpu.u_rf.regs[9] == 1700 && dut.u_cpu.u_rf.regs[11] == 2100 &&
           dut.u_cpu.u_rf.regs[13] == 2500 && dut.u_cpu.u_rf.regs[8] == 2500;
  endfunction

  // ---------------- times three ----------------
  logic [63:0] q3 [$], q3d [$];
  int t3_in [$], t3d_in [$];
  int last3 = -5, last3d = -5;

  always @(posedge clk) begin
    #1;
    if (!rst && t3_out_valid) begin
      chk(q3.size() > 0 && t3_y == q3[0] && cyc - t3_in[0] == 3,
          $sformatf("times3 y=%0d latency %0d", t3_y, cyc - t3_in[0]));
      void'(q3.pop_front()); void'(t3_in.pop_front());
      n_t3++;
      if (last3 == cyc - 1) n_t3_b2b++;
      last3 = cyc;
    end
    if (!rst && t3d_out_valid) begin
      chk(q3d.size() > 0 && t3d_y == q3d[0] && cyc - t3d_in[0] == 5,
          $sformatf("deep times3 y=%0d latency %0d", t3d_y, cyc - t3d_in[0]));
      void'(q3d.pop_front()); void'(t3d_in.pop_front());
      n_t3d++;
      if (last3d == cyc - 1) n_t3d_b2b++;
      last3d = cyc;
    end
  end

  task automatic t3_test();
    logic [63:0] seq [5] = '{64'd7, 64'd17, 64'd4, 64'd1, 64'd23};
    for (int i = 0; i < 400; i++) begin
      logic [63:0] a;
      @(negedge clk);
      a = (i < 5) ? seq[i] : {$urandom, $urandom};
      t3_in_valid = ($urandom_range(0, 4) != 0) || i < 5;
      t3d_in_valid = t3_in_valid;
      t3_a = a; t3d_a = a; t3c_a = a;
      #1 chk(t3c_y == a * 3, $sformatf("unpipelined 3*%0d = %0d", a, t3c_y));
      if (t3_in_valid) begin
        q3.push_back(a * 3);  q3d.push_back(a * 3);
        t3_in.push_back(cyc); t3d_in.push_back(cyc);
      end
    end
    @(negedge clk);
    t3_in_valid = 0; t3d_in_valid = 0;
    repeat (8) @(posedge clk);
  endtask

  // ---------------- memory stage ----------------
  task automatic mem_test();
    word_t ref_w [128];
    bit    known [128];
    icode_e ics [12] = '{I_HALT, I_NOP, I_RRMOVQ, I_IRMOVQ, I_RMMOVQ, I_MRMOVQ,
                         I_OPQ, I_JXX, I_CALL, I_RET, I_PUSHQ, I_POPQ};
    for (int w = 0; w < 128; w++) known[w] = 0;
    for (int i = 0; i < 400; i++) begin
      icode_e ic;
      int w;
      ic = (i < 128) ? I_RMMOVQ : ics[$urandom_range(0, 11)];
      w = (i < 128) ? i : $urandom_range(0, 127);
      @(negedge clk);
      mem_e_icode = ic; mem_e_valE = word_t'(8 * w); mem_e_valA = {$urandom, $urandom};
      @(posedge clk); #1;
      chk(mem_M_icode == ic, "memory stage icode");
      chk(mem_m_read == (ic inside {I_MRMOVQ, I_POPQ, I_RET}) &&
          mem_m_write == (ic inside {I_RMMOVQ, I_PUSHQ, I_CALL}), "memory read/write decision");
      if (mem_m_read) begin
        n_mrd++;
        chk(known[w] && mem_m_valM == ref_w[w], $sformatf("load word %0d", w));
      end
      if (mem_m_write) begin
        n_mwr++;
        ref_w[w] = mem_e_valA; known[w] = 1;
      end
    end
  endtask

  initial begin
    rst = 1;
    cpu_imem_we = 0; cpu_imem_waddr = 0; cpu_imem_wdata = 0;
    cpu_load_dst = REG_NONE; cpu_load_val = 0; cpu_dbg_src = 0;
    t3_in_valid = 0; t3_a = 0; t3c_a = 0; t3d_in_valid = 0; t3d_a = 0;
    mem_e_icode = I_NOP; mem_e_valE = 0; mem_e_valA = 0;
    cpu_test();   // leaves reset low
    fork
      t3_test();
      mem_test();
    join
    chk(q3.size() == 0 && q3d.size() == 0, "all times-three results arrived");
    $display("mechanisms: full pipeline %0d, non-addq NOP %0d, stale read %0d, retired %0d",
             n_full_pipe, n_nop, n_stale, n_retired);
    $display("            times3 results %0d (back to back %0d), deep %0d (back to back %0d)",
             n_t3, n_t3_b2b, n_t3d, n_t3d_b2b);
    $display("            memory reads %0d, writes %0d", n_mrd, n_mwr);
    $display("            registers where pipelined and single-cycle results differ %0d", n_differ);
    chk(n_full_pipe > 0, "full processor pipeline happened");
    chk(n_nop > 0, "non-addq NOP happened");
    chk(n_stale > 0, "read of a pending register happened");
    chk(n_differ > 0, "pipelined and single-cycle results differed through a stale read");
    chk(n_t3_b2b > 0 && n_t3d_b2b > 0, "back-to-back times-three results happened");
    chk(n_mrd > 0 && n_mwr > 0, "memory reads and writes happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
