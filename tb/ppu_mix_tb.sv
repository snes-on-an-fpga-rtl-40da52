// ppu_mix_tb: random layer pixels, modes, main-screen enables, colour math
// and brightness settings; the mixer's output colour and winning layer are
// compared with a reference that walks the front-to-back layer order of
// the mode and applies the arithmetic per channel. Also checks the
// two-cycle output latency.
module ppu_mix_tb;
  import ppu_pkg::*;
  logic clk = 0, rst = 1, valid = 0, cg_rd, out_valid;
  layer_px_t bgpx [4];
  layer_px_t objpx;
  ppu_cfg_t cfg;
  logic [7:0] cg_addr;
  logic [14:0] cg_rdata, rgb;
  logic [2:0] layer;
  logic [14:0] cgm [256];
  int checks = 0, failures = 0;
  int cnt_math = 0, cnt_obj = 0, cnt_back = 0;
  ppu_mix dut (.clk, .rst, .valid, .bgpx, .objpx, .cfg, .cg_addr, .cg_rd, .cg_rdata, .out_valid, .rgb, .layer);
  always #5 clk = ~clk;
  always @(posedge clk) if (cg_rd) cg_rdata <= cgm[cg_addr];
  initial begin #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // layer codes: 0-3 BG, 4 OBJ; hp/obj priority in second element
  task automatic ref_mix(output int win, output int col);
    int order [$][2];
    if (cfg.bg_mode <= 1) begin
      if (cfg.bg_mode == 1 && cfg.bg3_prio) order.push_back('{2, 1});
      order.push_back('{4, 3}); order.push_back('{0, 1}); order.push_back('{1, 1}); order.push_back('{4, 2});
      order.push_back('{0, 0}); order.push_back('{1, 0}); order.push_back('{4, 1});
      if (!(cfg.bg_mode == 1 && cfg.bg3_prio)) order.push_back('{2, 1});
      order.push_back('{3, 1}); order.push_back('{4, 0}); order.push_back('{2, 0}); order.push_back('{3, 0});
    end else begin
      order = '{'{4, 3}, '{0, 1}, '{4, 2}, '{1, 1}, '{4, 1}, '{0, 0}, '{4, 0}, '{1, 0}};
    end
    win = 5; col = 0;
    foreach (order[i]) begin
      int l = order[i][0], p = order[i][1];
      if (l == 4) begin
        if (objpx.opaque && cfg.tm[4] && int'(objpx.prio) == p) begin win = 4; col = objpx.color; break; end
      end else if (bgpx[l].opaque && cfg.tm[l] && int'(bgpx[l].prio[0]) == p &&
                   !(cfg.bg_mode >= 2 && l >= 2)) begin
        win = l; col = bgpx[l].color; break;
      end
    end
  endtask

  function automatic logic [14:0] ref_color(int win, int idx);
    logic [14:0] c = cgm[idx], o;
    for (int ch = 0; ch < 3; ch++) begin
      int a = (c >> (5 * ch)) & 31, f = (cfg.fixed_color >> (5 * ch)) & 31, s = a;
      if (cfg.cgwsel[1] && cfg.cgadsub[win]) begin
        s = cfg.cgadsub[7] ? (a - f < 0 ? 0 : a - f) : a + f;
        if (cfg.cgadsub[6]) s = s / 2;
        if (s > 31) s = 31;
      end
      s = s * (int'(cfg.brightness) + 1) / 16;
      o[5 * ch +: 5] = 5'(s);
    end
    if (cfg.force_blank) o = 0;
    return o;
  endfunction

  initial begin
    foreach (cgm[i]) cgm[i] = 15'($urandom);
    cfg = '0; objpx = '0; foreach (bgpx[i]) bgpx[i] = '0;
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int t = 0; t < 4000; t++) begin
      int win, col, cyc;
      cfg.bg_mode = 3'($urandom_range(0, 6)); cfg.bg3_prio = 1'($urandom); cfg.tm = 5'($urandom) | 5'($urandom);
      cfg.cgwsel = 8'($urandom); cfg.cgadsub = 8'($urandom); cfg.fixed_color = 15'($urandom);
      cfg.brightness = (t % 3 == 0) ? 4'd15 : 4'($urandom); cfg.force_blank = (t % 50 == 7);
      for (int i = 0; i < 4; i++) bgpx[i] = '{opaque: 1'($urandom), color: 8'($urandom), prio: 2'($urandom)};
      objpx = '{opaque: 1'($urandom), color: 8'($urandom), prio: 2'($urandom)};
      valid = 1; @(posedge clk); #1 valid = 0; cyc = 1;
      while (!out_valid) begin @(posedge clk); #1 cyc++; end
      ref_mix(win, col);
      if (win == 4) cnt_obj++;
      if (win == 5) cnt_back++;
      if (cfg.cgwsel[1] && cfg.cgadsub[win]) cnt_math++;
      checks++;
      if (int'(layer) != win || rgb != ref_color(win, col) || cyc != 2) begin
        failures++;
        if (failures < 10) $display("FAIL t%0d mode %0d: layer %0d rgb %h vs %0d %h cyc %0d", t, cfg.bg_mode, layer, rgb,
                                    win, ref_color(win, col), cyc);
      end
    end
    checks++;
    if (cnt_math == 0 || cnt_obj == 0 || cnt_back == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
