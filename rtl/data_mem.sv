// data_mem: byte-addressed data memory with one 8-byte little-endian word
// port. A read (read = 1) is combinational: rdata shows the word at addr in
// the same cycle, and 0 when read is low. A write (write = 1) stores wdata at
// the rising clock edge, at the end of the cycle. Bytes past the end read as
// 0 and are not written. Size, byte order and the zero output are this
// design's choices; the memory is not reset.
module data_mem #(
  parameter int unsigned BYTES = 1024
) (
  input  logic        clk,
  input  logic        read,
  input  logic        write,
  input  logic [63:0] addr,
  input  logic [63:0] wdata,
  output logic [63:0] rdata
);
  localparam int unsigned AW = $clog2(BYTES);

  logic [7:0] mem [BYTES];

  always_comb begin
    for (int i = 0; i < 8; i++) begin
      logic [63:0] a;
      a = addr + 64'(i);
      rdata[8*i +: 8] = (read && a < 64'(BYTES)) ? mem[a[AW-1:0]] : 8'h00;
    end
  end

  always_ff @(posedge clk) begin
    if (write) begin
      for (int i = 0; i < 8; i++) begin
        if (addr + 64'(i) < 64'(BYTES)) mem[AW'(addr + 64'(i))] <= wdata[8*i +: 8];
      end
    end
  end
endmodule
