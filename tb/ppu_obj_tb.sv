// ppu_obj_tb: random sprite tables (positions, sizes, flips, palettes,
// priorities, both name tables) and sparse random tile data; for random
// screen positions the unit's answer is compared with a reference that
// walks all 128 sprites and takes the first opaque one.
module ppu_obj_tb;
  import ppu_pkg::*;
  logic clk = 0, rst = 1, start = 0, done, v_rd, oam_rd;
  logic [8:0] x, y;
  ppu_cfg_t cfg;
  logic [6:0] oam_idx;
  logic [31:0] oam_low;
  logic [1:0] oam_high;
  logic [14:0] v_addr;
  logic [15:0] v_rdata;
  layer_px_t px;
  logic [15:0] vmem [32768];
  logic [31:0] lo [128];
  logic [1:0] hi [128];
  int checks = 0, failures = 0, nhit = 0;
  ppu_obj dut (.clk, .rst, .start, .x, .y, .cfg, .oam_idx, .oam_rd, .oam_low, .oam_high,
               .v_addr, .v_rd, .v_rdata, .done, .px);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (v_rd) v_rdata <= vmem[v_addr];
    if (oam_rd) begin oam_low <= lo[oam_idx]; oam_high <= hi[oam_idx]; end
  end
  initial begin #200000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic int sz(int code, int big);
    int s [6][2] = '{'{8, 16}, '{8, 32}, '{8, 64}, '{16, 32}, '{16, 64}, '{32, 64}};
    return s[code > 5 ? 5 : code][big];
  endfunction

  task automatic ref_px(output bit op, output int color, output int prio);
    op = 0; color = 0; prio = 0;
    for (int i = 0; i < 128; i++) begin
      int sx = int'({hi[i][0], lo[i][7:0]}), sy = int'(lo[i][15:8]), tn = int'(lo[i][23:16]);
      int at = int'(lo[i][31:24]), w = sz(int'(cfg.obj_size), int'(hi[i][1]));
      int dx = (int'(x) - sx + 512) % 512, dy = (int'(y) - sy + 256) % 256;
      if (dx < w && dy < w) begin
        int fx = (at & 'h40) ? w - 1 - dx : dx, fy = (at & 'h80) ? w - 1 - dy : dy;
        int t = (((tn >> 4) + fy / 8) % 16) * 16 + ((tn & 15) + fx / 8) % 16;
        int a = int'(cfg.obj_base[1:0]) * 8192 + ((at & 1) ? (int'(cfg.obj_name) + 1) * 4096 : 0) + t * 16 + fy % 8;
        int p = 0;
        for (int b = 0; b < 4; b++) p |= ((int'(vmem[(a + (b / 2) * 8) % 32768]) >> ((b % 2) * 8 + 7 - fx % 8)) & 1) << b;
        if (p != 0) begin
          op = 1; color = 128 + ((at >> 1) & 7) * 16 + p; prio = (at >> 4) & 3; return;
        end
      end
    end
  endtask

  initial begin
    foreach (vmem[i]) vmem[i] = 16'($urandom) & 16'($urandom) & 16'($urandom);
    cfg = '0; x = 0; y = 0;
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int f = 0; f < 12; f++) begin
      cfg.obj_size = 3'(f % 8); cfg.obj_base = 3'($urandom); cfg.obj_name = 2'($urandom);
      for (int i = 0; i < 128; i++) begin
        lo[i] = {8'($urandom), 8'($urandom), 8'($urandom_range(0, 200)), 8'($urandom)};
        hi[i] = 2'($urandom);
        if (i % 3 == 0) lo[i][15:8] = 8'hF0;      // off the visible lines
      end
      for (int t = 0; t < 150; t++) begin
        bit op; int color, prio;
        x = 9'($urandom_range(0, 255)); y = 9'($urandom_range(0, 223));
        start = 1; @(posedge clk); #1 start = 0;
        while (!done) @(posedge clk);
        #1;
        ref_px(op, color, prio);
        if (op) nhit++;
        checks++;
        if (px.opaque != op || (op && (int'(px.color) != color || int'(px.prio) != prio))) begin
          failures++;
          if (failures < 400) $display("FAIL (%0d,%0d) size %0d: %0d %0d %0d vs %0d %0d %0d", x, y, cfg.obj_size,
                                      px.opaque, px.color, px.prio, op, color, prio);
        end
      end
    end
    checks++;
    if (nhit < 100) begin failures++; $display("FAIL too few sprite pixels %0d", nhit); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
