// tb_addq_seq: runs the single-cycle addq processor on the published
// four-instruction example (%rN = 100*N initially; final %r9 = 1700,
// %r11 = 2100, %r13 = 2500, %r8 = 2500) and on a random program of addq and
// other encodings. Each cycle it checks the PC (advancing by 2), the
// instruction's destination and sum against a sequential reference model in
// which every instruction sees all earlier results, and at the end every
// register. One instruction completes per cycle.
module tb_addq_seq;
  import y86_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst;
  logic imem_we;
  logic [63:0] imem_waddr;
  logic [7:0] imem_wdata;
  regid_t load_dst, dbg_src, dstE;
  word_t load_val, pc, valE, dbg_val;
  icode_e icode;

  addq_seq dut (.clk(clk), .rst(rst), .imem_we(imem_we), .imem_waddr(imem_waddr),
                .imem_wdata(imem_wdata), .load_dst(load_dst), .load_val(load_val),
                .pc(pc), .icode(icode), .dstE(dstE), .valE(valE),
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

  task automatic run(logic [7:0] prog [], word_t init [15], int n);
    word_t rf [15];
    rst = 1;
    @(negedge clk);
    for (int a = 0; a < 1024; a++) begin
      imem_we = 1; imem_waddr = 64'(a);
      imem_wdata = (a < prog.size()) ? prog[a] : 8'h10;
      @(negedge clk);
    end
    imem_we = 0;
    for (int r = 0; r < 15; r++) begin
      load_dst = regid_t'(r); load_val = init[r]; rf[r] = init[r];
      @(negedge clk);
    end
    load_dst = REG_NONE;
    @(posedge clk); #1;   // cycle 0
    rst = 0;
    #1;
    for (int k = 0; k < n; k++) begin
      logic [3:0] ra, rb;
      bit add;
      ra = prog[2*k+1][7:4]; rb = prog[2*k+1][3:0];
      add = (prog[2*k] == 8'h60);
      chk(pc == 64'(2 * k), $sformatf("pc at cycle %0d", k));
      if (add) begin
        chk(icode == I_OPQ && dstE == rb && valE == rf[ra] + rf[rb],
            $sformatf("instr %0d: %h=%0d expected %h=%0d", k, dstE, valE, rb, rf[ra] + rf[rb]));
        rf[rb] = rf[ra] + rf[rb];
      end else
        chk(icode == I_NOP && dstE == REG_NONE, $sformatf("instr %0d not a NOP", k));
      @(posedge clk); #1;
    end
    for (int r = 0; r < 15; r++) begin
      dbg_src = regid_t'(r); #1;
      chk(dbg_val === rf[r], $sformatf("R[%0d]=%0d expected %0d", r, dbg_val, rf[r]));
    end
  endtask

  initial begin
    logic [7:0] prog [];
    word_t init [15];
    imem_we = 0; imem_waddr = 0; imem_wdata = 0; load_dst = REG_NONE; load_val = 0; dbg_src = 0;
    prog = '{8'h60, 8'h89, 8'h60, 8'hAB, 8'h60, 8'hCD, 8'h60, 8'h98};
    for (int r = 0; r < 15; r++) init[r] = word_t'(100 * r);
    run(prog, init, 4);
    chk(dut.u_rf.regs[9] == 1700 && dut.u_rf.regs[11] == 2100 &&
        dut.u_rf.regs[13] == 2500 && dut.u_rf.regs[8] == 2500, "published example");
    prog = new[400];
    for (int k = 0; k < 200; k++) begin
      prog[2*k]   = ($urandom_range(0, 7) != 0) ? 8'h60 : (8'($urandom_range(0, 255)) | 8'h01);
      prog[2*k+1] = {4'($urandom_range(0, 14)), 4'($urandom_range(0, 14))};
      init[k % 15] = {$urandom, $urandom};
    end
    run(prog, init, 200);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
