// dsp_pitch_tb: steps the pitch counter with random pitches, with and
// without modulation by a random previous-voice output, and checks the
// sample advance (valid one cycle after the step) and effective pitch
// against a model of the 12-bit fractional position.
module dsp_pitch_tb;
  logic clk = 0, rst = 1, restart = 0, step = 0, mod_en = 0;
  logic [13:0] pitch = 0; logic signed [15:0] prev_out = 0;
  logic [2:0] adv; logic adv_valid; logic [13:0] eff_pitch;
  int checks = 0, failures = 0;
  int frac = 0;

  dsp_pitch dut (.clk, .rst, .restart, .step, .pitch, .mod_en, .prev_out, .adv, .adv_valid, .eff_pitch);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 3000; i++) begin
      int ep, sum;
      @(negedge clk);
      if (i % 500 == 0) begin restart = 1; frac = 0; @(negedge clk); restart = 0; end
      pitch = 14'($urandom); mod_en = 1'($urandom); prev_out = 16'($urandom);
      if (i % 7 == 0) pitch = 14'h1000;
      ep = int'(pitch);
      if (mod_en) begin
        ep = ep + ((int'(pitch) * (int'(prev_out) >>> 5)) >>> 10);
        if (ep < 0) ep = 0;
        if (ep > 16383) ep = 16383;
      end
      #1;
      checks++;
      if (int'(eff_pitch) != ep) begin failures++; $display("FAIL eff %0d exp %0d", eff_pitch, ep); end
      sum = frac + ep;
      step = 1;
      @(negedge clk);
      step = 0;
      checks++;
      if (!adv_valid || int'(adv) != (sum >> 12)) begin
        failures++; if (failures < 10) $display("FAIL adv %0d exp %0d", adv, sum >> 12);
      end
      if (pitch == 14'h1000 && !mod_en) begin checks++; if (adv != 3'd1) failures++; end
      frac = sum & 12'hFFF;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
