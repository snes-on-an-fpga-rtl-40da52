// hv_timer_tb: runs the counters over two frames with a reference model of
// the dot/line counts and checks blanking flags, the pulses and the H, V
// and H+V timer matches.
module hv_timer_tb;
  localparam int HD = 341, VL = 262;
  logic clk = 0, rst = 1, dot_ce = 0, h_en = 0, v_en = 0, latch = 0;
  logic [8:0] htime = 9'd100, vtime = 9'd50, hc, vc, hl, vl;
  logic hb, vb, hbs, vbs, fs, hit;
  int checks = 0, failures = 0, eh = 0, ev = 0, nhit = 0, nvbs = 0, nfs = 0;
  hv_timer dut (.clk, .rst, .dot_ce, .htime, .vtime, .h_en, .v_en, .latch, .hcount(hc), .vcount(vc),
                .hlat(hl), .vlat(vl), .hblank(hb), .vblank(vb), .hblank_start(hbs),
                .vblank_start(vbs), .frame_start(fs), .timer_hit(hit));
  always #5 clk = ~clk;
  initial begin #20000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s h=%0d v=%0d", m, eh, ev); end
  endtask
  initial begin
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int mode = 0; mode < 4; mode++) begin
      {v_en, h_en} = 2'(mode);
      nhit = 0;
      for (int i = 0; i < HD * VL; i++) begin
        dot_ce = 1;
        #1;
        chk(hc == 9'(eh) && vc == 9'(ev), "count");
        chk(hb == (eh >= 256), "hblank");
        chk(vb == (ev == 0 || ev > 224), "vblank");
        chk(hit == ((mode == 1 && eh == 100) || (mode == 2 && ev == 50 && eh == 0) ||
                    (mode == 3 && ev == 50 && eh == 100)), "timer");
        if (hit) nhit++;
        if (vbs) begin nvbs++; chk(ev == 225 && eh == 0, "vbs"); end
        if (fs) nfs++;
        @(posedge clk); #1;
        eh++; if (eh == HD) begin eh = 0; ev = (ev + 1) % VL; end
      end
      chk(nhit == (mode == 1 ? VL : mode == 0 ? 0 : 1), "hit count");
    end
    chk(nvbs == 4 && nfs == 4, "pulse count");
    dot_ce = 0; latch = 1; @(posedge clk); #1 latch = 0;
    chk(hl == hc && vl == vc, "latch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
