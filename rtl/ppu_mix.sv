// ppu_mix: layer priority, palette lookup, colour math and brightness.
//
// Stage 1 (valid): among the four background pixels, the sprite pixel and
// the backdrop, the opaque layer enabled on the main screen (0x212C) with
// the highest rank wins, and its CGRAM index is looked up. The ranks,
// front to back, are: modes 0 and 1: OBJ3, BG1 high, BG2 high, OBJ2, BG1
// low, BG2 low, OBJ1, BG3 high, BG4 high, OBJ0, BG3 low, BG4 low, with BG3
// high moved in front of everything in mode 1 when 0x2105 bit e is set;
// modes 2-6: OBJ3, BG1 high, OBJ2, BG2 high, OBJ1, BG1 low, OBJ0, BG2 low.
// The backdrop is CGRAM entry 0.
// Stage 2 (one cycle later, when the colour arrives): when fixed-colour
// math is on (0x2130 bit 1) and the winning layer is enabled for it in
// 0x2131 (bits 3:0 BG4-BG1, bit 4 OBJ, bit 5 backdrop), the fixed colour
// of 0x2132 is added (0x2131 bit 7 = 0) or subtracted (= 1) per 5-bit
// channel with clamping, and halved if 0x2131 bit 6 is set. Then the
// brightness of 0x2100 scales the colour by (b + 1) / 16, and forced blank
// gives black. out_valid follows valid by two cycles.
// The registers and the fact that sprites carry a priority against the
// backgrounds follow the document; the rank order and the arithmetic are
// this design's choice, taken from the console's programming model. Main
// screen window masking is applied in ppu_top before this unit; the colour
// window and the sub screen are not built.
module ppu_mix
  import ppu_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        valid,
  input  layer_px_t   bgpx [4],
  input  layer_px_t   objpx,
  input  ppu_cfg_t    cfg,
  output logic [7:0]  cg_addr,
  output logic        cg_rd,
  input  logic [14:0] cg_rdata,
  output logic        out_valid,
  output logic [14:0] rgb,
  output logic [2:0]  layer       // winning layer of the last output: 0-3 BG, 4 OBJ, 5 backdrop
);
  logic [3:0] rank [6];
  logic [3:0] best;
  logic [2:0] win, win_q;
  logic       v_q;

  function automatic logic [3:0] bg_rank(logic [2:0] mode, logic b3p, logic [1:0] bg, logic hp);
    logic [3:0] r;
    if (mode <= 3'd1) begin
      case (bg)
        2'd0: r = hp ? 4'd11 : 4'd8;
        2'd1: r = hp ? 4'd10 : 4'd7;
        2'd2: r = hp ? ((mode == 3'd1 && b3p) ? 4'd13 : 4'd5) : 4'd2;
        default: r = hp ? 4'd4 : 4'd1;
      endcase
    end else begin
      case (bg)
        2'd0: r = hp ? 4'd11 : 4'd5;
        2'd1: r = hp ? 4'd8 : 4'd2;
        default: r = 4'd0;
      endcase
    end
    return r;
  endfunction

  always_comb begin
    for (int i = 0; i < 4; i++)
      rank[i] = (bgpx[i].opaque && cfg.tm[i]) ? bg_rank(cfg.bg_mode, cfg.bg3_prio, 2'(i), bgpx[i].prio[0]) : 4'd0;
    rank[4] = (objpx.opaque && cfg.tm[4]) ? 4'd3 + 4'd3 * 4'(objpx.prio) : 4'd0;
    rank[5] = 4'd0;
    win = 3'd5; best = 4'd0;
    for (int i = 0; i < 5; i++)
      if (rank[i] > best) begin best = rank[i]; win = 3'(i); end
    case (win)
      3'd0, 3'd1, 3'd2, 3'd3: cg_addr = bgpx[win[1:0]].color;
      3'd4:    cg_addr = objpx.color;
      default: cg_addr = 8'd0;
    endcase
    cg_rd = valid;
  end

  // stage 2 arithmetic
  logic [14:0] c_math, c_out;
  logic [5:0]  s;
  logic [4:0]  a, f;
  always_comb begin
    c_math = cg_rdata;
    c_out = '0; s = '0; a = '0; f = '0;
    if (cfg.cgwsel[1] && cfg.cgadsub[win_q]) begin
      for (int ch = 0; ch < 3; ch++) begin
        a = cg_rdata[ch*5 +: 5];
        f = cfg.fixed_color[ch*5 +: 5];
        if (!cfg.cgadsub[7]) s = {1'b0, a} + {1'b0, f};
        else                 s = (a > f) ? {1'b0, a - f} : 6'd0;
        if (cfg.cgadsub[6]) s = s >> 1;
        c_math[ch*5 +: 5] = (s > 6'd31) ? 5'd31 : s[4:0];
      end
    end
    for (int ch = 0; ch < 3; ch++)
      c_out[ch*5 +: 5] = 5'((10'(c_math[ch*5 +: 5]) * (10'(cfg.brightness) + 10'd1)) >> 4);
    if (cfg.force_blank) c_out = '0;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      v_q <= 1'b0; win_q <= '0; out_valid <= 1'b0; rgb <= '0; layer <= '0;
    end else begin
      v_q <= valid;
      if (valid) win_q <= win;
      out_valid <= v_q;
      if (v_q) begin
        rgb   <= c_out;
        layer <= win_q;
      end
    end
  end
endmodule
