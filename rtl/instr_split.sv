// instr_split: the "split" box of the addq processor's fetch stage. It cuts
// the instruction bytes into fields: icode = bits 7:4, ifun = bits 3:0,
// rB = bits 11:8, rA = bits 15:12 (the listings' i10bytes[4..8], [8..12],
// [12..16]). The processor executes only addq (icode 6, ifun 0); any other
// encoding is passed on as a NOP with both register numbers REG_NONE, so it
// reads nothing and writes nothing (this design's choice). Combinational.
// Only the first two of the ten instruction bytes matter for addq; the
// other eight are unused inputs, which lint reports. Since only NOP (1)
// and OPQ (6) are produced, bit 3 of icode is always 0.
module instr_split
  import y86_pkg::*;
(
  input  logic [79:0] i10bytes,
  output icode_e      icode,
  output regid_t      rA,
  output regid_t      rB
);
  logic [3:0] raw_icode, raw_ifun;

  always_comb begin
    raw_ifun  = i10bytes[3:0];
    raw_icode = i10bytes[7:4];
    if (raw_icode == I_OPQ && raw_ifun == FN_ADD) begin
      icode = I_OPQ;
      rA    = i10bytes[15:12];
      rB    = i10bytes[11:8];
    end else begin
      icode = I_NOP;
      rA    = REG_NONE;
      rB    = REG_NONE;
    end
  end
endmodule
