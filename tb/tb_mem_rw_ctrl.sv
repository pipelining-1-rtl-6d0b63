// tb_mem_rw_ctrl: checks "is read?" and "is write?" for all sixteen icode
// values against a table written out here: reads for mrmovq (5), ret (9),
// popq (B); writes for rmmovq (4), call (8), pushq (A); nothing otherwise.
module tb_mem_rw_ctrl;
  int checks = 0, failures = 0;
  logic [3:0] icode;
  logic rd, wr;
  //                              FEDCBA9876543210
  localparam logic [15:0] RD_T = 16'b0000101000100000;
  localparam logic [15:0] WR_T = 16'b0000010100010000;

  mem_rw_ctrl dut (.icode(icode), .mem_read(rd), .mem_write(wr));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      icode = 4'(i); #1;
      checks++;
      if (rd !== RD_T[i] || wr !== WR_T[i]) begin
        failures++;
        $display("FAIL icode %h: read=%b write=%b", i, rd, wr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
