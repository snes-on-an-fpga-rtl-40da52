// ppu_top: the picture processing unit, built as one unit.
//
// The CPU programs it through the B-bus registers (ppu_regs), which also
// fill the 64 KB VRAM, the 256-colour CGRAM and the 544-byte OAM. A
// frame_start pulse starts drawing a frame of H_RES x V_RES pixels in
// raster order. For each pixel the sequencer asks the four background
// units in turn (they share the renderer's VRAM port), then the sprite
// unit, and hands the five answers to the mixer, whose output appears on
// pix_valid/pix_x/pix_y/pix_rgb (15-bit BGR). A pixel costs between about
// 10 and a few hundred clock cycles, depending on the mode and on how many
// sprites must be examined, so the frame is drawn into whatever frame
// buffer follows, not raced against the video beam. While a frame is being
// drawn and the screen is not forced blank, CPU writes to VRAM, CGRAM and
// OAM are ignored. Mosaic (0x2106): a background with its enable bit set
// (bit 0 = BG1 ... bit 3 = BG4) is asked for the top-left pixel of the
// (size+1) x (size+1) block holding the current pixel; the block origin is
// kept by two counters that step with the raster. Main screen windows
// (0x2123-0x212B, 0x212E) hide a layer's pixels inside its window region
// before the mixer sees them; the document names these registers, and
// their bit layout here follows the console. The split into registers, memories, four background
// units, a sprite unit and a combining module follows the document; the
// sequencing is this design's choice.
module ppu_top
  import ppu_pkg::*;
#(
  parameter int unsigned H_RES = 256,
  parameter int unsigned V_RES = 224
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  b_addr,
  input  logic        b_wr,
  input  logic        b_rd,
  input  logic [7:0]  b_wdata,
  output logic [7:0]  b_rdata,
  output logic        b_sel,
  input  logic [8:0]  hlat,
  input  logic [8:0]  vlat,
  output logic        hv_latch,
  input  logic        frame_start,
  output logic        busy,
  output logic        pix_valid,
  output logic [8:0]  pix_x,
  output logic [8:0]  pix_y,
  output logic [14:0] pix_rgb,
  output logic [2:0]  pix_layer,
  output logic        frame_done
);
  ppu_cfg_t cfg;
  logic [14:0] va_addr, vb_addr; logic [1:0] va_we; logic [15:0] va_wdata, va_rdata, vb_rdata;
  logic va_rd, vb_rd;
  logic [7:0] cg_waddr, cg_raddr, cg_baddr; logic cg_we, cg_brd; logic [14:0] cg_wdata, cg_rdata, cg_bdata;
  logic [9:0] oam_addr; logic oam_we; logic [7:0] oam_wdata, oam_rdata;
  logic [6:0] oam_idx; logic oam_srd; logic [31:0] oam_low; logic [1:0] oam_high;

  typedef enum logic [2:0] {P_IDLE, P_BG, P_OBJ, P_MIX, P_WAIT} pstate_t;
  pstate_t st;
  logic [1:0] k;
  logic [8:0] x, y;
  logic [3:0] bg_start, bg_done, bg_vrd;
  logic [14:0] bg_vaddr [4];
  layer_px_t bgpx [4];
  layer_px_t objpx;
  logic obj_start, obj_done, obj_vrd, mix_valid, kick;
  logic [14:0] obj_vaddr;
  logic [8:0] mx, my, bgx [4], bgy [4];
  logic [3:0] mcx, mcy;
  layer_px_t bgm [4];
  layer_px_t objm;
  logic [4:0] masked;

  // main screen window masks: a layer with its 0x212E bit set is hidden
  // where its window region (windows 1 and 2, each enabled and optionally
  // inverted by its 0x2123-0x2125 nibble, joined by its 0x212A/0x212B logic)
  // covers the pixel
  function automatic logic in_win(input logic [3:0] sel, input logic [1:0] lg,
                                  input logic [3:0][7:0] pos, input logic [8:0] px);
    logic w1, w2;
    w1 = (px >= {1'b0, pos[0]} && px <= {1'b0, pos[1]}) ^ sel[0];
    w2 = (px >= {1'b0, pos[2]} && px <= {1'b0, pos[3]}) ^ sel[2];
    case ({sel[3], sel[1]})
      2'b01:   return w1;
      2'b10:   return w2;
      2'b11:
        case (lg)
          2'd0:    return w1 | w2;
          2'd1:    return w1 & w2;
          2'd2:    return w1 ^ w2;
          default: return ~(w1 ^ w2);
        endcase
      default: return 1'b0;
    endcase
  endfunction

  always_comb begin
    for (int i = 0; i < 5; i++)
      masked[i] = cfg.tmw[i] && in_win(cfg.win_sel[i], cfg.win_logic[i], cfg.win_pos, x);
    for (int i = 0; i < 4; i++) begin
      bgm[i] = bgpx[i];
      if (masked[i]) bgm[i].opaque = 1'b0;
    end
    objm = objpx;
    if (masked[4]) objm.opaque = 1'b0;
  end

  ppu_regs u_regs (.clk, .rst, .b_addr, .b_wr, .b_rd, .b_wdata, .b_rdata, .b_sel,
    .lock(busy && !cfg.force_blank), .hlat, .vlat, .hv_latch,
    .v_addr(va_addr), .v_we(va_we), .v_wdata(va_wdata), .v_rd(va_rd), .v_rdata(va_rdata),
    .cg_waddr, .cg_we, .cg_wdata, .cg_raddr, .cg_rdata, .oam_addr, .oam_we, .oam_wdata, .oam_rdata, .cfg);
  vram u_vram (.clk, .a_addr(va_addr), .a_we(va_we), .a_wdata(va_wdata), .a_rd(va_rd), .a_rdata(va_rdata),
    .b_addr(vb_addr), .b_rd(vb_rd), .b_rdata(vb_rdata));
  cgram u_cgram (.clk, .w_addr(cg_waddr), .we(cg_we), .wdata(cg_wdata), .a_addr(cg_raddr), .a_rdata(cg_rdata),
    .b_addr(cg_baddr), .b_rd(cg_brd), .b_rdata(cg_bdata));
  oam u_oam (.clk, .c_addr(oam_addr), .c_we(oam_we), .c_wdata(oam_wdata), .c_rdata(oam_rdata),
    .s_idx(oam_idx), .s_rd(oam_srd), .s_low(oam_low), .s_high(oam_high));

  for (genvar g = 0; g < 4; g++) begin : g_bg
    assign bgx[g] = cfg.mosaic_en[g] ? mx : x;
    assign bgy[g] = cfg.mosaic_en[g] ? my : y;
    ppu_bg u_bg (.clk, .rst, .start(bg_start[g]), .x(bgx[g]), .y(bgy[g]), .bg(2'(g)), .cfg,
      .v_addr(bg_vaddr[g]), .v_rd(bg_vrd[g]), .v_rdata(vb_rdata), .done(bg_done[g]), .px(bgpx[g]));
  end
  ppu_obj u_obj (.clk, .rst, .start(obj_start), .x, .y, .cfg, .oam_idx, .oam_rd(oam_srd),
    .oam_low, .oam_high, .v_addr(obj_vaddr), .v_rd(obj_vrd), .v_rdata(vb_rdata), .done(obj_done), .px(objpx));
  ppu_mix u_mix (.clk, .rst, .valid(mix_valid), .bgpx(bgm), .objpx(objm), .cfg, .cg_addr(cg_baddr), .cg_rd(cg_brd),
    .cg_rdata(cg_bdata), .out_valid(pix_valid), .rgb(pix_rgb), .layer(pix_layer));

  // renderer VRAM port: the active unit drives it
  always_comb begin
    vb_addr = obj_vaddr; vb_rd = obj_vrd;
    if (st == P_BG) begin vb_addr = bg_vaddr[k]; vb_rd = bg_vrd[k]; end
    bg_start  = (st == P_BG && kick) ? 4'(1) << k : 4'd0;
    obj_start = (st == P_OBJ && kick);
    mix_valid = (st == P_MIX);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= P_IDLE; k <= '0; x <= '0; y <= '0; busy <= 1'b0; kick <= 1'b0;
      pix_x <= '0; pix_y <= '0; frame_done <= 1'b0;
      mx <= '0; my <= '0; mcx <= '0; mcy <= '0;
    end else begin
      kick <= 1'b0;
      frame_done <= 1'b0;
      case (st)
        P_IDLE: if (frame_start) begin
          x <= '0; y <= '0; k <= '0; busy <= 1'b1; kick <= 1'b1; st <= P_BG;
          mx <= '0; my <= '0; mcx <= '0; mcy <= '0;
        end
        P_BG: if (bg_done[k]) begin
          kick <= 1'b1;
          if (k == 2'd3) st <= P_OBJ;
          k <= k + 1'b1;
        end
        P_OBJ: if (obj_done) st <= P_MIX;
        P_MIX: begin
          pix_x <= x; pix_y <= y;
          st <= P_WAIT;
        end
        P_WAIT: if (pix_valid) begin
          // mosaic block origin: moves on every mosaic_size+1 pixels/lines
          if (mcx == cfg.mosaic_size) begin mcx <= '0; mx <= x + 1'b1; end
          else mcx <= mcx + 1'b1;
          if (x == 9'(H_RES - 1)) begin
            x <= '0; mx <= '0; mcx <= '0;
            if (mcy == cfg.mosaic_size) begin mcy <= '0; my <= y + 1'b1; end
            else mcy <= mcy + 1'b1;
            if (y == 9'(V_RES - 1)) begin
              y <= '0; busy <= 1'b0; frame_done <= 1'b1; st <= P_IDLE;
            end else begin
              y <= y + 1'b1; kick <= 1'b1; st <= P_BG;
            end
          end else begin
            x <= x + 1'b1; kick <= 1'b1; st <= P_BG;
          end
        end
        default: st <= P_IDLE;
      endcase
    end
  end
endmodule
