// vram: the PPU's 64 KB video RAM, organised as 32K words of 16 bits.
//
// Port A serves the CPU side (register 0x2118/0x2119 writes with a byte
// enable per half, and reads for 0x2139/0x213A); port B is a read-only
// port for the background and sprite units. Both ports read synchronously
// with one cycle of latency. The size follows the document; the word
// organisation and the ports are this design's choice.
module vram #(
  parameter int unsigned AW = 15
) (
  input  logic          clk,
  input  logic [AW-1:0] a_addr,
  input  logic [1:0]    a_we,     // byte enables: [0] low, [1] high
  input  logic [15:0]   a_wdata,
  input  logic          a_rd,
  output logic [15:0]   a_rdata,
  input  logic [AW-1:0] b_addr,
  input  logic          b_rd,
  output logic [15:0]   b_rdata
);
  logic [15:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (a_we[0]) mem[a_addr][7:0]  <= a_wdata[7:0];
    if (a_we[1]) mem[a_addr][15:8] <= a_wdata[15:8];
    if (a_rd) a_rdata <= mem[a_addr];
    if (b_rd) b_rdata <= mem[b_addr];
  end
endmodule
