// tb_mem_stage: drives execute-stage outputs (icode, address, data) into the
// memory stage one instruction per cycle and checks, one cycle later, the
// stage's icode, its read/write decision, and loaded values against a
// reference memory kept here: stores (rmmovq, pushq, call) write, loads
// (mrmovq, popq, ret) read back what was stored, other instructions touch
// nothing, and reset leaves a NOP in the stage.
module tb_mem_stage;
  import y86_pkg::*;
  localparam int BYTES = 256;
  int checks = 0, failures = 0;
  logic clk = 0, rst;
  icode_e e_icode, M_icode;
  word_t  e_valE, e_valA, m_valM;
  logic   m_read, m_write;
  word_t  ref_w [BYTES / 8];
  int     n_rd = 0, n_wr = 0;

  mem_stage #(.BYTES(BYTES)) dut (.clk(clk), .rst(rst), .e_icode(e_icode), .e_valE(e_valE),
                                  .e_valA(e_valA), .M_icode(M_icode), .m_valM(m_valM),
                                  .m_read(m_read), .m_write(m_write));

  always #5 clk = ~clk;

  function automatic bit is_rd(icode_e i); return i inside {I_MRMOVQ, I_POPQ, I_RET}; endfunction
  function automatic bit is_wr(icode_e i); return i inside {I_RMMOVQ, I_PUSHQ, I_CALL}; endfunction

  task automatic issue(icode_e ic, int word, word_t data);
    @(negedge clk);
    e_icode = ic; e_valE = word_t'(8 * word); e_valA = data;
    @(posedge clk); #1;
    checks++;
    if (M_icode !== ic || m_read !== is_rd(ic) || m_write !== is_wr(ic)) begin
      failures++;
      $display("FAIL icode %h: M_icode=%h read=%b write=%b", ic, M_icode, m_read, m_write);
    end
    if (is_rd(ic)) begin
      n_rd++;
      checks++;
      if (m_valM !== ref_w[word]) begin
        failures++;
        $display("FAIL load word %0d = %h expected %h", word, m_valM, ref_w[word]);
      end
    end else begin
      checks++;
      if (m_valM !== '0) begin failures++; $display("FAIL valM %h on non-load", m_valM); end
    end
    if (is_wr(ic)) begin
      ref_w[word] = data;
      n_wr++;
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    icode_e ics [12] = '{I_HALT, I_NOP, I_RRMOVQ, I_IRMOVQ, I_RMMOVQ, I_MRMOVQ,
                         I_OPQ, I_JXX, I_CALL, I_RET, I_PUSHQ, I_POPQ};
    rst = 1; e_icode = I_MRMOVQ; e_valE = 0; e_valA = 0;
    @(posedge clk); #1;
    checks++;
    if (M_icode !== I_NOP || m_read || m_write) begin failures++; $display("FAIL reset state"); end
    @(negedge clk) rst = 0;
    for (int w = 0; w < BYTES / 8; w++) issue(I_RMMOVQ, w, word_t'(1000 + w));
    issue(I_MRMOVQ, 3, 0);
    issue(I_PUSHQ, 4, 64'h1234);
    issue(I_POPQ, 4, 0);
    issue(I_CALL, 5, 64'h40);
    issue(I_RET, 5, 0);
    for (int i = 0; i < 300; i++)
      issue(ics[$urandom_range(0, 11)], $urandom_range(0, BYTES / 8 - 1), {$urandom, $urandom});
    checks++;
    if (n_rd == 0 || n_wr == 0) begin failures++; $display("FAIL no reads or writes"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
