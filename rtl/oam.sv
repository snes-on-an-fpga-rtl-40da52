// oam: the PPU's 544-byte sprite attribute memory.
//
// Bytes 0-511 are the low table, four bytes per sprite for 128 sprites (X
// low, Y, tile, attributes); bytes 512-543 are the high table, two bits per
// sprite (X bit 8, size select). The CPU side writes and reads single bytes
// by byte address (0x2104, 0x2138). The sprite unit reads one whole sprite
// per cycle: its four low-table bytes and its two high-table bits, with
// one cycle of latency. The size follows the document; the split into a
// 32-bit wide low table and a byte-wide high table is this design's choice.
module oam (
  input  logic        clk,
  input  logic [9:0]  c_addr,    // byte address 0-543
  input  logic        c_we,
  input  logic [7:0]  c_wdata,
  output logic [7:0]  c_rdata,
  input  logic [6:0]  s_idx,     // sprite number
  input  logic        s_rd,
  output logic [31:0] s_low,     // {attr, tile, y, x}
  output logic [1:0]  s_high     // {size, x8}
);
  logic [7:0] lo [512];
  logic [7:0] hi [32];
  logic [7:0] hb;
  logic [1:0] s_idx_q;

  always_ff @(posedge clk) begin
    if (c_we) begin
      if (!c_addr[9]) lo[c_addr[8:0]] <= c_wdata;
      else if (c_addr[8:5] == 4'd0) hi[c_addr[4:0]] <= c_wdata;
    end
    if (s_rd) begin
      s_low <= {lo[{s_idx, 2'd3}], lo[{s_idx, 2'd2}], lo[{s_idx, 2'd1}], lo[{s_idx, 2'd0}]};
      hb    <= hi[s_idx[6:2]];
      s_idx_q <= s_idx[1:0];
    end
  end

  assign s_high  = 2'(hb >> {s_idx_q, 1'b0});
  assign c_rdata = !c_addr[9] ? lo[c_addr[8:0]] : (c_addr[8:5] == 4'd0 ? hi[c_addr[4:0]] : 8'h00);
endmodule
