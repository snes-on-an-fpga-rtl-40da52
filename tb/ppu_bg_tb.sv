// ppu_bg_tb: fills a VRAM model with random words and, for random modes,
// backgrounds, map sizes, tile sizes and scroll offsets, compares the
// unit's pixel with a reference computed directly from the tile map and
// tile layout. Also checks the 2 + bpp/2 cycle latency.
module ppu_bg_tb;
  import ppu_pkg::*;
  logic clk = 0, rst = 1, start = 0, done, v_rd;
  logic [8:0] x, y;
  logic [1:0] bg;
  ppu_cfg_t cfg;
  logic [14:0] v_addr;
  logic [15:0] v_rdata;
  layer_px_t px;
  logic [15:0] vmem [32768];
  int checks = 0, failures = 0;
  ppu_bg dut (.clk, .rst, .start, .x, .y, .bg, .cfg, .v_addr, .v_rd, .v_rdata, .done, .px);
  always #5 clk = ~clk;
  always @(posedge clk) if (v_rd) v_rdata <= vmem[v_addr];
  initial begin #50000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic int vr(int a); return int'(vmem[a % 32768]); endfunction

  task automatic ref_px(output bit op, output int color, output int prio, output int bpp);
    int ts, px_, py_, col, row, sc, addr, e, inx, iny, tile, words, chr, pix;
    bpp = (cfg.bg_mode == 0) ? 2 : (cfg.bg_mode == 1) ? (bg == 3 ? 0 : bg == 2 ? 2 : 4) :
          (cfg.bg_mode == 2) ? (bg >= 2 ? 0 : 4) : (cfg.bg_mode == 3) ? (bg >= 2 ? 0 : bg == 0 ? 8 : 4) :
          (cfg.bg_mode == 4) ? (bg >= 2 ? 0 : bg == 0 ? 8 : 2) : (cfg.bg_mode == 5) ? (bg >= 2 ? 0 : bg == 0 ? 4 : 2) :
          (cfg.bg_mode == 6) ? (bg == 0 ? 4 : 0) : 0;
    op = 0; color = 0; prio = 0;
    if (bpp == 0) return;
    ts = cfg.bg_tile16[bg] ? 16 : 8;
    px_ = (x + cfg.hofs[bg]) % 1024; py_ = (y + cfg.vofs[bg]) % 1024;
    col = (px_ / ts) % 64; row = (py_ / ts) % 64;
    sc = cfg.bg_sc[bg];
    addr = (sc / 4) * 1024 + (row % 32) * 32 + (col % 32);
    if (col >= 32 && (sc & 1)) addr += 1024;
    if (row >= 32 && (sc & 2)) addr += (sc & 1) ? 2048 : 1024;
    e = vr(addr);
    inx = px_ % ts; iny = py_ % ts;
    if (e & 'h4000) inx = ts - 1 - inx;
    if (e & 'h8000) iny = ts - 1 - iny;
    tile = ((e & 1023) + (iny / 8) * 16 + (inx / 8)) % 1024;
    words = bpp * 4;
    chr = cfg.bg_nba[bg] * 4096 + tile * words + iny % 8;
    pix = 0;
    for (int p = 0; p < bpp; p++)
      pix |= ((vr(chr + (p / 2) * 8) >> ((p % 2) * 8 + 7 - inx % 8)) & 1) << p;
    op = pix != 0;
    prio = (e >> 13) & 1;
    if (bpp == 2) color = ((e >> 10) & 7) * 4 + pix + (cfg.bg_mode == 0 ? bg * 32 : 0);
    else if (bpp == 4) color = ((e >> 10) & 7) * 16 + pix;
    else color = pix;
  endtask

  initial begin
    foreach (vmem[i]) vmem[i] = 16'($urandom);
    cfg = '0; x = 0; y = 0; bg = 0;
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int t = 0; t < 3000; t++) begin
      bit op; int color, prio, bpp, cyc;
      cfg.bg_mode = 3'($urandom_range(0, 6));
      cfg.bg_tile16 = 4'($urandom);
      for (int b = 0; b < 4; b++) begin
        cfg.bg_sc[b] = 8'($urandom); cfg.bg_nba[b] = 4'($urandom);
        cfg.hofs[b] = 10'($urandom); cfg.vofs[b] = 10'($urandom);
      end
      bg = 2'($urandom); x = 9'($urandom_range(0, 255)); y = 9'($urandom_range(0, 223));
      start = 1; @(posedge clk); #1 start = 0; cyc = 1;
      while (!done) begin @(posedge clk); #1 cyc++; end
      ref_px(op, color, prio, bpp);
      checks++;
      if (px.opaque != op || (op && (int'(px.color) != color || int'(px.prio[0]) != prio))) begin
        failures++;
        if (failures < 10) $display("FAIL mode %0d bg %0d (%0d,%0d): %0d %0d %0d vs %0d %0d %0d", cfg.bg_mode, bg, x, y,
                                    px.opaque, px.color, px.prio, op, color, prio);
      end
      checks++;
      if (cyc != (bpp == 0 ? 1 : 2 + bpp / 2)) begin failures++; if (failures < 10) $display("FAIL latency %0d bpp %0d", cyc, bpp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
