// ppu_regs: the PPU register file on the 8-bit B-bus (0x2100-0x213F).
//
// Writes (b_wr) and reads (b_rd, which marks a read for its side effects)
// use the low byte of the CPU address. Plain setting registers are stored
// and decoded into the ppu_cfg_t bundle for the renderer. The memory ports
// work as follows:
//  * VRAM: 0x2116/0x2117 set the word address; a write of 0x2118 (low
//    byte) or 0x2119 (high byte) stores that byte at the address, and the
//    address then advances by 1, 32 or 128 words (0x2115 bits 1:0) after
//    the low or the high byte (0x2115 bit 7). Reads of 0x2139/0x213A return
//    a prefetched word, refetched after every address change.
//  * CGRAM: 0x2121 sets the colour number; two writes of 0x2122 (low byte,
//    then high byte) store one 15-bit colour and advance the number.
//    0x213B reads low then high byte.
//  * OAM: 0x2102/0x2103 set the address (word address, so byte address =
//    2 x value); each 0x2104 write stores one byte and advances; 0x2138
//    reads one byte and advances.
// Scroll registers (0x210D-0x2114) and the mode 7 registers (0x211B-0x2120)
// take two writes, low byte first. 0x2134-0x2136 give the signed product
// of the 16-bit value of 0x211B and the last byte written to 0x211C. A read
// or write of 0x2137 latches the H/V counters, read back low byte then
// bit 8 from 0x213C/0x213D. While lock is high (active display) writes to
// VRAM, CGRAM and OAM are dropped, as the document requires memory writes
// to take place during blanking; the addresses still advance.
// Register addresses and bit fields follow the document's register table;
// the prefetch, the two-write order and the OAM addressing are this
// design's choice, taken from the console's programming model.
module ppu_regs
  import ppu_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  b_addr,
  input  logic        b_wr,
  input  logic        b_rd,
  input  logic [7:0]  b_wdata,
  output logic [7:0]  b_rdata,
  output logic        b_sel,
  input  logic        lock,
  input  logic [8:0]  hlat,
  input  logic [8:0]  vlat,
  output logic        hv_latch,
  // VRAM port A
  output logic [14:0] v_addr,
  output logic [1:0]  v_we,
  output logic [15:0] v_wdata,
  output logic        v_rd,
  input  logic [15:0] v_rdata,
  // CGRAM
  output logic [7:0]  cg_waddr,
  output logic        cg_we,
  output logic [14:0] cg_wdata,
  output logic [7:0]  cg_raddr,
  input  logic [14:0] cg_rdata,
  // OAM
  output logic [9:0]  oam_addr,
  output logic        oam_we,
  output logic [7:0]  oam_wdata,
  input  logic [7:0]  oam_rdata,
  output ppu_cfg_t    cfg
);
  logic [7:0]  r2123, r2124, r2125, r212a, r212b;
  logic [3:0][7:0] wpos;
  logic [4:0]  tmw;
  logic [7:0]  r2100, r2101, r2105, r2106, r2115, r2130, r2131, r2133;
  logic [3:0][7:0] sc;
  logic [3:0][3:0] nba;
  logic [3:0][9:0] hofs, vofs;
  logic [3:0]  hofs_t, vofs_t;     // two-write toggles
  logic [1:0]  hi, vi;
  logic [2:0]  mi;
  logic [15:0] vmadd, vlatch;
  logic [7:0]  cgadd, cglo;
  logic        cgflip, cgrflip, hflip_r, vflip_r;
  logic [9:0]  oamadd;
  logic [5:0][15:0] m7;            // 0x211B-0x2120
  logic [5:0]  m7_t;
  logic [7:0]  m7b_last;
  logic [4:0]  tm, ts;
  logic [14:0] fixc;
  logic        pf, pf_q;
  logic [23:0] mpy;
  logic [15:0] vinc;
  logic        wr_reg, rd_reg;
  logic [7:0]  a;

  assign a = b_addr;
  assign hi = 2'((a - 8'h0D) >> 1);
  assign vi = 2'((a - 8'h0E) >> 1);
  assign mi = 3'(a - 8'h1B);
  assign b_sel  = b_addr[7:6] == 2'b00;
  assign wr_reg = b_wr && b_sel;
  assign rd_reg = b_rd && b_sel;

  always_comb begin
    case (r2115[1:0])
      2'd0:    vinc = 16'd1;
      2'd1:    vinc = 16'd32;
      default: vinc = 16'd128;
    endcase
  end

  assign mpy = 24'($signed(m7[0]) * $signed(m7b_last));

  // memory port outputs
  always_comb begin
    v_addr   = vmadd[14:0];
    v_we     = 2'b00;
    v_wdata  = {b_wdata, b_wdata};
    if (wr_reg && a == 8'h18 && !lock) v_we = 2'b01;
    if (wr_reg && a == 8'h19 && !lock) v_we = 2'b10;
    v_rd     = pf;
    cg_waddr = cgadd;
    cg_we    = wr_reg && a == 8'h22 && cgflip && !lock;
    cg_wdata = {b_wdata[6:0], cglo};
    cg_raddr = cgadd;
    oam_addr = oamadd;
    oam_we   = wr_reg && a == 8'h04 && !lock;
    oam_wdata = b_wdata;
    hv_latch = (wr_reg || rd_reg) && a == 8'h37;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      r2100 <= 8'h80; r2101 <= '0; r2105 <= '0; r2106 <= '0;
      r2123 <= '0; r2124 <= '0; r2125 <= '0; r212a <= '0; r212b <= '0; wpos <= '0; tmw <= '0; r2115 <= '0; r2130 <= '0; r2131 <= '0; r2133 <= '0;
      sc <= '0; nba <= '0; hofs <= '0; vofs <= '0; hofs_t <= '0; vofs_t <= '0;
      vmadd <= '0; vlatch <= '0; cgadd <= '0; cglo <= '0; cgflip <= 1'b0; cgrflip <= 1'b0;
      hflip_r <= 1'b0; vflip_r <= 1'b0; oamadd <= '0; m7 <= '0; m7_t <= '0; m7b_last <= '0;
      tm <= '0; ts <= '0; fixc <= '0; pf <= 1'b0; pf_q <= 1'b0;
    end else begin
      pf   <= 1'b0;
      pf_q <= pf;
      if (pf_q) vlatch <= v_rdata;
      if (wr_reg) begin
        case (a)
          8'h00: r2100 <= b_wdata;
          8'h01: r2101 <= b_wdata;
          8'h02: oamadd <= {oamadd[9], b_wdata, 1'b0};
          8'h03: oamadd[9] <= b_wdata[0];
          8'h04: oamadd <= (oamadd == 10'd543) ? 10'd0 : oamadd + 1'b1;
          8'h05: r2105 <= b_wdata;
          8'h06: r2106 <= b_wdata;
          8'h07, 8'h08, 8'h09, 8'h0A: sc[a[1:0] - 2'd3] <= b_wdata;
          8'h0B: nba[1:0] <= {b_wdata[7:4], b_wdata[3:0]};
          8'h0C: nba[3:2] <= {b_wdata[7:4], b_wdata[3:0]};
          8'h0D, 8'h0F, 8'h11, 8'h13: begin
            if (!hofs_t[hi]) hofs[hi][7:0] <= b_wdata;
            else             hofs[hi][9:8] <= b_wdata[1:0];
            hofs_t[hi] <= ~hofs_t[hi];
          end
          8'h0E, 8'h10, 8'h12, 8'h14: begin
            if (!vofs_t[vi]) vofs[vi][7:0] <= b_wdata;
            else             vofs[vi][9:8] <= b_wdata[1:0];
            vofs_t[vi] <= ~vofs_t[vi];
          end
          8'h15: r2115 <= b_wdata;
          8'h16: begin vmadd[7:0]  <= b_wdata; pf <= 1'b1; end
          8'h17: begin vmadd[15:8] <= b_wdata; pf <= 1'b1; end
          8'h18: if (!r2115[7]) vmadd <= vmadd + vinc;
          8'h19: if (r2115[7])  vmadd <= vmadd + vinc;
          8'h1B, 8'h1C, 8'h1D, 8'h1E, 8'h1F, 8'h20: begin
            if (!m7_t[mi]) m7[mi][7:0]  <= b_wdata;
            else           m7[mi][15:8] <= b_wdata;
            m7_t[mi] <= ~m7_t[mi];
            if (a == 8'h1C) m7b_last <= b_wdata;
          end
          8'h21: begin cgadd <= b_wdata; cgflip <= 1'b0; cgrflip <= 1'b0; end
          8'h22: begin
            if (!cgflip) cglo <= b_wdata;
            else         cgadd <= cgadd + 1'b1;
            cgflip <= ~cgflip;
          end
          8'h23: r2123 <= b_wdata;
          8'h24: r2124 <= b_wdata;
          8'h25: r2125 <= b_wdata;
          8'h26, 8'h27, 8'h28, 8'h29: wpos[a[1:0] - 2'd2] <= b_wdata;
          8'h2A: r212a <= b_wdata;
          8'h2B: r212b <= b_wdata;
          8'h2C: tm <= b_wdata[4:0];
          8'h2E: tmw <= b_wdata[4:0];
          8'h2D: ts <= b_wdata[4:0];
          8'h30: r2130 <= b_wdata;
          8'h31: r2131 <= b_wdata;
          8'h32: begin
            if (b_wdata[5]) fixc[4:0]   <= b_wdata[4:0];
            if (b_wdata[6]) fixc[9:5]   <= b_wdata[4:0];
            if (b_wdata[7]) fixc[14:10] <= b_wdata[4:0];
          end
          8'h33: r2133 <= b_wdata;
          default: ;
        endcase
      end
      if (rd_reg) begin
        case (a)
          8'h38: oamadd <= (oamadd == 10'd543) ? 10'd0 : oamadd + 1'b1;
          8'h39: if (!r2115[7]) begin vmadd <= vmadd + vinc; pf <= 1'b1; end
          8'h3A: if (r2115[7])  begin vmadd <= vmadd + vinc; pf <= 1'b1; end
          8'h3B: begin
            if (cgrflip) cgadd <= cgadd + 1'b1;
            cgrflip <= ~cgrflip;
          end
          8'h3C: hflip_r <= ~hflip_r;
          8'h3D: vflip_r <= ~vflip_r;
          8'h3F: begin hflip_r <= 1'b0; vflip_r <= 1'b0; end
          default: ;
        endcase
      end
      if (hv_latch) begin hflip_r <= 1'b0; vflip_r <= 1'b0; end
    end
  end

  always_comb begin
    case (a)
      8'h34: b_rdata = mpy[7:0];
      8'h35: b_rdata = mpy[15:8];
      8'h36: b_rdata = mpy[23:16];
      8'h38: b_rdata = oam_rdata;
      8'h39: b_rdata = vlatch[7:0];
      8'h3A: b_rdata = vlatch[15:8];
      8'h3B: b_rdata = cgrflip ? {1'b0, cg_rdata[14:8]} : cg_rdata[7:0];
      8'h3C: b_rdata = hflip_r ? {7'd0, hlat[8]} : hlat[7:0];
      8'h3D: b_rdata = vflip_r ? {7'd0, vlat[8]} : vlat[7:0];
      8'h3E: b_rdata = 8'h01;   // PPU1 version
      8'h3F: b_rdata = 8'h01;   // PPU2 version
      default: b_rdata = 8'h00;
    endcase
  end

  always_comb begin
    cfg.force_blank = r2100[7];
    cfg.brightness  = r2100[3:0];
    cfg.obj_size    = r2101[7:5];
    cfg.obj_name    = r2101[4:3];
    cfg.obj_base    = r2101[2:0];
    cfg.bg_tile16   = r2105[7:4];
    cfg.bg3_prio    = r2105[3];
    cfg.bg_mode     = r2105[2:0];
    cfg.mosaic_size = r2106[7:4];
    cfg.mosaic_en   = r2106[3:0];
    cfg.bg_sc       = sc;
    cfg.bg_nba      = nba;
    cfg.hofs        = hofs;
    cfg.vofs        = vofs;
    cfg.tm          = tm;
    cfg.ts          = ts;
    cfg.win_sel     = {r2125[3:0], r2124[7:4], r2124[3:0], r2123[7:4], r2123[3:0]};
    cfg.win_pos     = wpos;
    cfg.win_logic   = {r212b[1:0], r212a};
    cfg.tmw         = tmw;
    cfg.cgwsel      = r2130;
    cfg.cgadsub     = r2131;
    cfg.fixed_color = fixc;
  end
endmodule
