// addq_pipe: a pipelined processor that runs only the Y86-64 addq
// instruction (addq rA, rB: R[rB] <= R[rA] + R[rB]).
//
// Four stages, one instruction in each, separated by the pipeline registers
// pP, fD, dE and eW:
//   fetch/PC update  PC (pP) addresses the instruction memory, "split" cuts
//                    out rA and rB, and the PC advances by 2;      -> fD
//   decode           the register file reads R[D_rA] and R[D_rB];
//                    the destination is D_rB;                      -> dE
//   execute          ADD forms valE = valA + valB;                 -> eW
//   writeback        the register file writes W_valE to W_dstE at the
//                    end of the cycle.
// A new instruction starts every cycle; each takes four cycles from its
// fetch to the cycle in which its result is written. The stage split,
// register contents and reset values follow the processor as published.
// Carrying icode down the pipeline, turning non-addq encodings into NOPs
// and bringing the register file's M write port out as a load port
// (load_dst/load_val; 0xF = no write) are this design's choices. There is
// no hazard detection or forwarding: an addq that reads a register written
// by one of the two addq instructions just before it reads the old value.
module addq_pipe
  import y86_pkg::*;
#(
  parameter int unsigned IMEM_BYTES = 1024
) (
  input  logic        clk,
  input  logic        rst,
  // program load
  input  logic        imem_we,
  input  logic [63:0] imem_waddr,
  input  logic [7:0]  imem_wdata,
  // register-file M port (initial register values)
  input  regid_t      load_dst,
  input  word_t       load_val,
  // observation
  output word_t       pc,
  output icode_e      W_icode,
  output regid_t      W_dstE,
  output word_t       W_valE,
  input  regid_t      dbg_src,
  output word_t       dbg_val
);
  // ---------------- fetch / PC update ----------------
  logic [79:0] i10bytes;
  fD_t f, D;

  pc_update #(.PC_INC(2)) u_pc (.clk(clk), .rst(rst), .pc(pc));

  instr_mem #(.BYTES(IMEM_BYTES)) u_imem (
    .clk(clk), .we(imem_we), .waddr(imem_waddr), .wdata(imem_wdata),
    .addr(pc), .i10bytes(i10bytes)
  );

  instr_split u_split (.i10bytes(i10bytes), .icode(f.icode), .rA(f.rA), .rB(f.rB));

  pipe_reg #(.T(fD_t), .RESET_VAL(FD_RESET)) u_fD (.clk(clk), .rst(rst), .d(f), .q(D));

  // ---------------- decode ----------------
  dE_t d, E;
  eW_t e, W;

  regfile u_rf (
    .clk(clk),
    .srcA(D.rA), .srcB(D.rB), .valA(d.valA), .valB(d.valB),
    .dstE(W.dstE), .valE(W.valE),
    .dstM(load_dst), .valM(load_val),
    .dbg_src(dbg_src), .dbg_val(dbg_val)
  );

  always_comb begin
    d.icode = D.icode;
    d.dstE  = D.rB;
  end

  pipe_reg #(.T(dE_t), .RESET_VAL(DE_RESET)) u_dE (.clk(clk), .rst(rst), .d(d), .q(E));

  // ---------------- execute ----------------
  adder #(.WIDTH(64)) u_alu (.a(E.valA), .b(E.valB), .sum(e.valE));

  always_comb begin
    e.icode = E.icode;
    e.dstE  = E.dstE;
  end

  pipe_reg #(.T(eW_t), .RESET_VAL(EW_RESET)) u_eW (.clk(clk), .rst(rst), .d(e), .q(W));

  // ---------------- writeback ----------------
  assign W_icode = W.icode;
  assign W_dstE  = W.dstE;
  assign W_valE  = W.valE;

`ifndef SYNTHESIS
  // A NOP never names a destination.
  a_nop_no_dst: assert property (@(posedge clk) disable iff (rst)
    (W.icode == I_NOP) |-> (W.dstE == REG_NONE));
`endif
endmodule
