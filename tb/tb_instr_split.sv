// tb_instr_split: checks the field split for every addq register pair
// (byte 0 = 0x60, byte 1 = rA:rB gives icode OPQ, rA, rB) and that every
// other first byte (other icodes, and OPQ with ifun != 0) gives a NOP with
// rA = rB = 0xF.
module tb_instr_split;
  import y86_pkg::*;
  int checks = 0, failures = 0;
  logic [79:0] i10;
  icode_e icode;
  regid_t rA, rB;

  instr_split dut (.i10bytes(i10), .icode(icode), .rA(rA), .rB(rB));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ra = 0; ra < 16; ra++) begin
      for (int rb = 0; rb < 16; rb++) begin
        i10 = {{8{$urandom_range(0, 255)}}, 8'(ra * 16 + rb), 8'h60};
        #1;
        checks++;
        if (icode !== I_OPQ || rA !== 4'(ra) || rB !== 4'(rb)) begin
          failures++;
          $display("FAIL addq %0d,%0d -> %h %h %h", ra, rb, icode, rA, rB);
        end
      end
    end
    for (int b0 = 0; b0 < 256; b0++) begin
      if (b0 == 8'h60) continue;
      i10 = {64'h0, 8'h89, 8'(b0)};
      #1;
      checks++;
      if (icode !== I_NOP || rA !== 4'hF || rB !== 4'hF) begin
        failures++;
        $display("FAIL byte0 %h -> %h %h %h", b0, icode, rA, rB);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
