// ppu_obj: sprite pixel unit.
//
// When started with a screen position (x, y) it scans the 128 sprites in
// OAM from number 0 upward and returns the first one that covers the
// position with an opaque pixel: its CGRAM address (128 + palette x 16 +
// colour, sprites being 4 bits per pixel) and its priority (0-3), which the
// mixer weighs against the four backgrounds. Each sprite entry gives X
// (9 bits, wrapping at 512), Y, tile number, attributes (bit 7 vertical
// flip, 6 horizontal flip, 5:4 priority, 3:1 palette, 0 name table) and a
// size bit choosing between the small and large size of 0x2101 bits 7:5
// (8/16, 8/32, 8/64, 16/32, 16/64, 32/64; codes 6 and 7 are treated as
// 32/64). Tile data starts at the base in 0x2101 bits 2:0 (x 8K words);
// the second name table lies (name select + 1) x 4K words above it.
// A sprite that misses costs 2 cycles; one that hits costs 4. OAM and VRAM
// both answer one cycle after the read. The document describes the unit's
// function (a position in, a colour address and a priority out); the scan
// order, sprite format and sizes are this design's choice, taken from the
// console's programming model.
module ppu_obj
  import ppu_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic [8:0]  x,
  input  logic [8:0]  y,
  input  ppu_cfg_t    cfg,
  output logic [6:0]  oam_idx,
  output logic        oam_rd,
  input  logic [31:0] oam_low,
  input  logic [1:0]  oam_high,
  output logic [14:0] v_addr,
  output logic        v_rd,
  input  logic [15:0] v_rdata,
  output logic        done,
  output layer_px_t   px
);
  typedef enum logic [2:0] {O_IDLE, O_RD, O_CHK, O_P0, O_P1} ostate_t;
  ostate_t st;
  logic [6:0] idx;
  logic [8:0] sx, dx, dy;
  logic [7:0] sy, attr, tno;
  logic [6:0] w;                 // sprite size in pixels (8..64)
  logic       hit;
  logic [5:0] fx, fy;
  logic [7:0] tile8;
  logic [14:0] base, addr01;
  logic [14:0] addr_q;
  logic [7:0] attr_q;
  logic [2:0] fx_q;
  logic [1:0] p01;
  logic [3:0] pix;

  function automatic logic [6:0] obj_w(logic [2:0] sz, logic big);
    case (sz)
      3'd0: obj_w = big ? 7'd16 : 7'd8;
      3'd1: obj_w = big ? 7'd32 : 7'd8;
      3'd2: obj_w = big ? 7'd64 : 7'd8;
      3'd3: obj_w = big ? 7'd32 : 7'd16;
      3'd4: obj_w = big ? 7'd64 : 7'd16;
      default: obj_w = big ? 7'd64 : 7'd32;
    endcase
  endfunction

  always_comb begin
    sx   = {oam_high[0], oam_low[7:0]};
    sy   = oam_low[15:8];
    tno  = oam_low[23:16];
    attr = oam_low[31:24];
    w    = obj_w(cfg.obj_size, oam_high[1]);
    dx   = x - sx;
    dy   = {1'b0, 8'(y) - sy};
    hit  = (dx < 9'(w)) && (dy < 9'(w));
    fx   = attr[6] ? 6'(w - 7'd1) - dx[5:0] : dx[5:0];
    fy   = attr[7] ? 6'(w - 7'd1) - dy[5:0] : dy[5:0];
    tile8 = {tno[7:4] + {1'b0, fy[5:3]}, tno[3:0] + {1'b0, fx[5:3]}};
    base = {cfg.obj_base[1:0], 13'd0};
    if (attr[0]) base = base + {1'b0, cfg.obj_name, 12'd0} + 15'h1000;
    addr01 = base + 15'({tile8, 4'd0}) + 15'(fy[2:0]);
  end

  always_comb begin
    oam_idx = idx;
    oam_rd  = (st == O_RD);
    v_rd    = 1'b0;
    v_addr  = addr01;
    if (st == O_CHK && hit) v_rd = 1'b1;
    if (st == O_P0) begin v_rd = 1'b1; v_addr = addr_q + 15'd8; end
    pix = {v_rdata[4'(4'd15 - 4'(fx_q))], v_rdata[4'(3'd7 - fx_q)], p01};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= O_IDLE; idx <= '0; done <= 1'b0; px <= '0; addr_q <= '0; attr_q <= '0; fx_q <= '0; p01 <= '0;
    end else begin
      done <= 1'b0;
      case (st)
        O_IDLE: if (start) begin idx <= '0; st <= O_RD; end
        O_RD:   st <= O_CHK;
        O_CHK: begin
          if (hit) begin
            addr_q <= addr01; attr_q <= attr; fx_q <= fx[2:0];
            st <= O_P0;
          end else if (idx == 7'd127) begin
            done <= 1'b1; px <= '0; st <= O_IDLE;
          end else begin
            idx <= idx + 1'b1; st <= O_RD;
          end
        end
        O_P0: begin
          p01 <= {v_rdata[4'(4'd15 - 4'(fx_q))], v_rdata[4'(3'd7 - fx_q)]};
          st  <= O_P1;
        end
        O_P1: begin
          if (pix != 0) begin
            done <= 1'b1;
            px   <= '{opaque: 1'b1, color: {1'b1, attr_q[3:1], pix}, prio: attr_q[5:4]};
            st   <= O_IDLE;
          end else if (idx == 7'd127) begin
            done <= 1'b1; px <= '0; st <= O_IDLE;
          end else begin
            idx <= idx + 1'b1; st <= O_RD;
          end
        end
        default: st <= O_IDLE;
      endcase
    end
  end
endmodule
