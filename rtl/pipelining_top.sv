// pipelining_top: the three pipelining examples side by side, sharing only
// clock and reset:
//   * addq_pipe   - four-stage pipelined processor running Y86-64 addq;
//   * addq_seq    - the single-cycle processor it is derived from;
//   * times3_comb - the unpipelined times-three circuit;
//   * times3_pipe - times-three circuit pipelined at each adder;
//   * times3_deep - the same with each adder split over two stages;
//   * mem_stage   - the memory stage with its read/write decision.
// The examples do not connect to one another; each keeps its own ports,
// prefixed cpu_, seq_, t3c_, t3_, t3d_ and mem_. All registers load on the rising edge
// of clk; rst is synchronous and active high.
module pipelining_top
  import y86_pkg::*;
#(
  parameter int unsigned IMEM_BYTES = 1024,
  parameter int unsigned DMEM_BYTES = 1024,
  parameter int unsigned T3_WIDTH   = 64
) (
  input  logic                clk,
  input  logic                rst,
  // pipelined addq processor
  input  logic                cpu_imem_we,
  input  logic [63:0]         cpu_imem_waddr,
  input  logic [7:0]          cpu_imem_wdata,
  input  regid_t              cpu_load_dst,
  input  word_t               cpu_load_val,
  output word_t               cpu_pc,
  output icode_e              cpu_W_icode,
  output regid_t              cpu_W_dstE,
  output word_t               cpu_W_valE,
  input  regid_t              cpu_dbg_src,
  output word_t               cpu_dbg_val,
  // single-cycle addq processor
  input  logic                seq_imem_we,
  input  logic [63:0]         seq_imem_waddr,
  input  logic [7:0]          seq_imem_wdata,
  input  regid_t              seq_load_dst,
  input  word_t               seq_load_val,
  output word_t               seq_pc,
  output icode_e              seq_icode,
  output regid_t              seq_dstE,
  output word_t               seq_valE,
  input  regid_t              seq_dbg_src,
  output word_t               seq_dbg_val,
  // unpipelined times three
  input  logic [T3_WIDTH-1:0] t3c_a,
  output logic [T3_WIDTH-1:0] t3c_y,
  // pipelined times three
  input  logic                t3_in_valid,
  input  logic [T3_WIDTH-1:0] t3_a,
  output logic                t3_out_valid,
  output logic [T3_WIDTH-1:0] t3_y,
  // deeper times-three pipeline
  input  logic                t3d_in_valid,
  input  logic [T3_WIDTH-1:0] t3d_a,
  output logic                t3d_out_valid,
  output logic [T3_WIDTH-1:0] t3d_y,
  // memory stage
  input  icode_e              mem_e_icode,
  input  word_t               mem_e_valE,
  input  word_t               mem_e_valA,
  output icode_e              mem_M_icode,
  output word_t               mem_m_valM,
  output logic                mem_m_read,
  output logic                mem_m_write
);
  addq_pipe #(.IMEM_BYTES(IMEM_BYTES)) u_cpu (
    .clk(clk), .rst(rst),
    .imem_we(cpu_imem_we), .imem_waddr(cpu_imem_waddr), .imem_wdata(cpu_imem_wdata),
    .load_dst(cpu_load_dst), .load_val(cpu_load_val),
    .pc(cpu_pc), .W_icode(cpu_W_icode), .W_dstE(cpu_W_dstE), .W_valE(cpu_W_valE),
    .dbg_src(cpu_dbg_src), .dbg_val(cpu_dbg_val)
  );

  addq_seq #(.IMEM_BYTES(IMEM_BYTES)) u_seq (
    .clk(clk), .rst(rst),
    .imem_we(seq_imem_we), .imem_waddr(seq_imem_waddr), .imem_wdata(seq_imem_wdata),
    .load_dst(seq_load_dst), .load_val(seq_load_val),
    .pc(seq_pc), .icode(seq_icode), .dstE(seq_dstE), .valE(seq_valE),
    .dbg_src(seq_dbg_src), .dbg_val(seq_dbg_val)
  );

  times3_comb #(.WIDTH(T3_WIDTH)) u_t3c (.a(t3c_a), .y(t3c_y));

  times3_pipe #(.WIDTH(T3_WIDTH)) u_t3 (
    .clk(clk), .rst(rst), .in_valid(t3_in_valid), .a_in(t3_a),
    .out_valid(t3_out_valid), .y(t3_y)
  );

  times3_deep #(.WIDTH(T3_WIDTH)) u_t3d (
    .clk(clk), .rst(rst), .in_valid(t3d_in_valid), .a_in(t3d_a),
    .out_valid(t3d_out_valid), .y(t3d_y)
  );

  mem_stage #(.BYTES(DMEM_BYTES)) u_mem (
    .clk(clk), .rst(rst), .e_icode(mem_e_icode), .e_valE(mem_e_valE), .e_valA(mem_e_valA),
    .M_icode(mem_M_icode), .m_valM(mem_m_valM), .m_read(mem_m_read), .m_write(mem_m_write)
  );
endmodule
