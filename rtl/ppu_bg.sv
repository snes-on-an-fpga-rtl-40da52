// ppu_bg: background pixel unit for BG modes 0-6.
//
// On start it works out one pixel of background BG (0-3) at screen
// position (x, y). The scroll offsets move the pixel into the background's
// 10-bit plane; the tile map (base from 0x2107-0x210A bits 7:2, size 32 or
// 64 tiles in each direction from bits 1:0) is read for the tile entry
// (bits 9:0 tile, 12:10 palette, 13 priority, 14 horizontal flip, 15
// vertical flip), then one VRAM word per two bit planes of that tile row
// (tile data base from 0x210B/0x210C, 8x8 or 16x16 tiles from 0x2105).
// The result is the CGRAM index (2 bpp: palette x 4, plus BG x 32 in mode
// 0; 4 bpp: palette x 16; 8 bpp: direct), the priority bit and whether the
// pixel is opaque (colour 0 is transparent). A pixel takes 2 + bpp/2
// cycles from start to done; a background absent in the mode is done the
// cycle after start. VRAM is read through a port with one cycle of latency.
// The document describes the backgrounds, their registers and scrolling;
// the tile map and tile layout are this design's choice, taken from the
// console's programming model.
module ppu_bg
  import ppu_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic [8:0]  x,
  input  logic [8:0]  y,
  input  logic [1:0]  bg,
  input  ppu_cfg_t    cfg,
  output logic [14:0] v_addr,
  output logic        v_rd,
  input  logic [15:0] v_rdata,
  output logic        done,
  output layer_px_t   px
);
  typedef enum logic [1:0] {B_IDLE, B_MAP, B_PLANE} bstate_t;
  bstate_t st;
  logic [9:0]  pxx, pyy;
  logic [3:0]  bpp;
  logic        t16;
  logic [7:0]  sc;
  logic [5:0]  tx, ty;
  logic [14:0] map_addr;
  logic [15:0] ent, e;        // registered and current map entry
  logic [3:0]  fx, fy;        // position inside the (8 or 16 pixel) tile, flipped
  logic [9:0]  tile;
  logic [14:0] char_addr;
  logic [1:0]  pair, ipair, npairs_m1;
  logic [7:0]  pix, pix_n;
  logic [7:0]  color;

  always_comb begin
    bpp = bg_bpp(cfg.bg_mode, bg);
    t16 = cfg.bg_tile16[bg];
    sc  = cfg.bg_sc[bg];
    pxx = 10'(x) + cfg.hofs[bg];
    pyy = 10'(y) + cfg.vofs[bg];
    tx  = t16 ? pxx[9:4] : pxx[8:3];
    ty  = t16 ? pyy[9:4] : pyy[8:3];
    map_addr = {sc[6:2], 10'd0} + 15'({ty[4:0], tx[4:0]});
    if (tx[5] && sc[0]) map_addr = map_addr + 15'h400;
    if (ty[5] && sc[1]) map_addr = map_addr + (sc[0] ? 15'h800 : 15'h400);
    npairs_m1 = (bpp == 4'd8) ? 2'd3 : (bpp == 4'd4) ? 2'd1 : 2'd0;
  end

  // tile geometry from the map entry
  always_comb begin
    e  = (st == B_MAP) ? v_rdata : ent;
    fx = t16 ? pxx[3:0] : {1'b0, pxx[2:0]};
    fy = t16 ? pyy[3:0] : {1'b0, pyy[2:0]};
    if (e[14]) fx = t16 ? ~fx : {1'b0, ~fx[2:0]};
    if (e[15]) fy = t16 ? ~fy : {1'b0, ~fy[2:0]};
    tile  = e[9:0] + (fy[3] ? 10'd16 : 10'd0) + (fx[3] ? 10'd1 : 10'd0);
    ipair = (st == B_MAP) ? 2'd0 : pair + 2'd1;
    case (bpp)
      4'd2:    char_addr = {cfg.bg_nba[bg][2:0], 12'd0} + 15'({tile, 3'd0});
      4'd4:    char_addr = {cfg.bg_nba[bg][2:0], 12'd0} + 15'({tile, 4'd0});
      default: char_addr = {cfg.bg_nba[bg][2:0], 12'd0} + 15'({tile, 5'd0});
    endcase
    char_addr = char_addr + 15'(fy[2:0]) + 15'({ipair, 3'd0});
    // pixel bits with the pair arriving now
    pix_n = pix;
    pix_n[{pair, 1'b0}] = v_rdata[4'(3'd7 - fx[2:0])];
    pix_n[{pair, 1'b1}] = v_rdata[4'd15 - 4'(fx[2:0])];
    case (bpp)
      4'd2:    color = (cfg.bg_mode == 3'd0) ? {1'b0, bg, e[12:10], pix_n[1:0]} : {3'd0, e[12:10], pix_n[1:0]};
      4'd4:    color = {1'b0, e[12:10], pix_n[3:0]};
      default: color = pix_n;
    endcase
  end

  always_comb begin
    v_rd = 1'b0; v_addr = map_addr;
    if (st == B_IDLE && start && bpp != 0) v_rd = 1'b1;
    if (st == B_MAP || (st == B_PLANE && pair != npairs_m1)) begin
      v_rd = 1'b1; v_addr = char_addr;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= B_IDLE; done <= 1'b0; px <= '0; ent <= '0; pair <= '0; pix <= '0;
    end else begin
      done <= 1'b0;
      case (st)
        B_IDLE: if (start) begin
          pair <= '0; pix <= '0;
          if (bpp == 0) begin
            done <= 1'b1; px <= '0;
          end else st <= B_MAP;
        end
        B_MAP: begin
          ent <= v_rdata;
          st  <= B_PLANE;
        end
        B_PLANE: begin
          pix  <= pix_n;
          pair <= pair + 1'b1;
          if (pair == npairs_m1) begin
            st <= B_IDLE;
            done <= 1'b1;
            px.opaque <= (pix_n != 0);
            px.color  <= color;
            px.prio   <= {1'b0, e[13]};
          end
        end
        default: st <= B_IDLE;
      endcase
    end
  end
endmodule
