// instr_mem: byte-addressed instruction memory. A fetch returns the ten
// bytes starting at addr (i10bytes, the longest Y86-64 instruction) with the
// byte at addr in bits 7:0, so that bit numbering matches the processor's
// field slicing (icode in bits 7:4, rA in bits 15:12, rB in bits 11:8).
// Reads are combinational; bytes past the end read as 0. A byte load port
// (we/waddr/wdata, written at the rising clock edge) places a program in the
// memory. Size and load port are choices of this design.
module instr_mem #(
  parameter int unsigned BYTES = 1024
) (
  input  logic        clk,
  input  logic        we,
  input  logic [63:0] waddr,
  input  logic [7:0]  wdata,
  input  logic [63:0] addr,
  output logic [79:0] i10bytes
);
  logic [7:0] mem [BYTES];

  always_ff @(posedge clk) begin
    if (we && waddr < 64'(BYTES)) mem[waddr[$clog2(BYTES)-1:0]] <= wdata;
  end

  always_comb begin
    for (int i = 0; i < 10; i++) begin
      logic [63:0] a;
      a = addr + 64'(i);
      i10bytes[8*i +: 8] = (a < 64'(BYTES)) ? mem[a[$clog2(BYTES)-1:0]] : 8'h00;
    end
  end
endmodule
