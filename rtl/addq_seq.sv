// addq_seq: the unpipelined (single-cycle) addq processor, the design the
// pipelined one is derived from. In one clock cycle the PC addresses the
// instruction memory, "split" cuts out rA and rB, the register file reads
// R[rA] and R[rB], ADD forms their sum, and at the rising edge that ends
// the cycle both R[rB] and the PC (+2) are written. One instruction
// completes per cycle, and every instruction sees the results of all earlier
// ones. The cycle must cover the whole path from PC through memory,
// register read and add to register write. The structure follows the
// published single-cycle datapath; the instruction memory, NOP handling and
// load ports match addq_pipe and are this design's choices. Only the PC is
// reset (synchronous, active high).
module addq_seq
  import y86_pkg::*;
#(
  parameter int unsigned IMEM_BYTES = 1024
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        imem_we,
  input  logic [63:0] imem_waddr,
  input  logic [7:0]  imem_wdata,
  input  regid_t      load_dst,
  input  word_t       load_val,
  output word_t       pc,
  output icode_e      icode,
  output regid_t      dstE,
  output word_t       valE,
  input  regid_t      dbg_src,
  output word_t       dbg_val
);
  logic [79:0] i10bytes;
  regid_t      rA, rB, rf_dstE;
  word_t       valA, valB;

  pc_update #(.PC_INC(2)) u_pc (.clk(clk), .rst(rst), .pc(pc));

  instr_mem #(.BYTES(IMEM_BYTES)) u_imem (
    .clk(clk), .we(imem_we), .waddr(imem_waddr), .wdata(imem_wdata),
    .addr(pc), .i10bytes(i10bytes)
  );

  instr_split u_split (.i10bytes(i10bytes), .icode(icode), .rA(rA), .rB(rB));

  // While reset is held no instruction completes.
  assign rf_dstE = rst ? REG_NONE : rB;

  regfile u_rf (
    .clk(clk),
    .srcA(rA), .srcB(rB), .valA(valA), .valB(valB),
    .dstE(rf_dstE), .valE(valE),
    .dstM(load_dst), .valM(load_val),
    .dbg_src(dbg_src), .dbg_val(dbg_val)
  );

  adder #(.WIDTH(64)) u_alu (.a(valA), .b(valB), .sum(valE));

  assign dstE = rf_dstE;
endmodule
