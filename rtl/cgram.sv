// cgram: the PPU's colour RAM, 256 entries of 15-bit BGR colour.
//
// One write port (a whole 15-bit colour, assembled from two byte writes of
// 0x2122 by the register block) and two synchronous read ports with one
// cycle of latency: port A for CPU reads through 0x213B and port B for the
// mixer's palette lookup. Size and width follow the document.
module cgram (
  input  logic        clk,
  input  logic [7:0]  w_addr,
  input  logic        we,
  input  logic [14:0] wdata,
  input  logic [7:0]  a_addr,
  output logic [14:0] a_rdata,
  input  logic [7:0]  b_addr,
  input  logic        b_rd,
  output logic [14:0] b_rdata
);
  logic [14:0] mem [256];

  always_ff @(posedge clk) begin
    if (we) mem[w_addr] <= wdata;
    a_rdata <= mem[a_addr];
    if (b_rd) b_rdata <= mem[b_addr];
  end
endmodule
