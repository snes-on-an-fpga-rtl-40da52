// dsp_env_tb: drives the envelope generator through direct gain, the four
// variable-gain curves at several rates, a full ADSR sequence (attack,
// decay to the sustain level, sustain) and release after key-off, and
// compares the envelope and phase after every tick with an integer model.
module dsp_env_tb;
  import dsp_pkg::*;
  logic clk = 0, rst = 1, key_on = 0, key_off = 0, tick = 0;
  logic [7:0] adsr1 = 0, adsr2 = 0, gain = 0;
  logic [10:0] env; logic [6:0] envx; logic [1:0] phase;
  int checks = 0, failures = 0;
  int m_env = 0, m_ph = 3, m_cnt = 0;
  int seen_attack = 0, seen_decay = 0, seen_sustain = 0, seen_release = 0;

  dsp_env dut (.clk, .rst, .key_on, .key_off, .tick, .adsr1, .adsr2, .gain, .env, .envx, .phase);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int exp_dec(int e);
    return e - ((e - 1) >>> 8) - 1;
  endfunction

  task automatic model_tick();
    int r, n;
    if (adsr1[7]) r = (m_ph == 0) ? int'(adsr1[3:0]) * 2 + 1 : (m_ph == 1) ? 16 + int'(adsr1[6:4]) : int'(adsr2[4:0]);
    else r = gain[7] ? int'(gain[4:0]) : 31;
    if (m_ph == 3) begin
      n = m_env - 8; if (n < 0) n = 0; m_env = n; return;
    end
    if (r == 0) return;
    if (m_cnt > 1) begin m_cnt--; return; end
    m_cnt = int'(rate_period(5'(r)));
    if (adsr1[7]) n = (m_ph == 0) ? m_env + ((adsr1[3:0] == 15) ? 1024 : 32) : exp_dec(m_env);
    else if (!gain[7]) n = int'(gain[6:0]) * 16;
    else case (gain[6:5])
      0: n = m_env - 32;
      1: n = exp_dec(m_env);
      2: n = m_env + 32;
      default: n = m_env + ((m_env < 'h600) ? 32 : 8);
    endcase
    if (n < 0) n = 0;
    if (n > 2047) n = 2047;
    if (adsr1[7] && m_ph == 0 && n >= 2047) m_ph = 1;
    else if (adsr1[7] && m_ph == 1 && (n >> 8) <= int'(adsr2[7:5])) m_ph = 2;
    m_env = n;
  endtask

  task automatic do_tick();
    tick = 1; model_tick(); @(negedge clk); tick = 0;
    checks++;
    if (int'(env) != m_env || int'(phase) != m_ph || envx != env[10:4]) begin
      failures++;
      if (failures < 10) $display("FAIL env %0d/%0d phase %0d/%0d a1=%h g=%h", env, m_env, phase, m_ph, adsr1, gain);
    end
    case (phase) 0: seen_attack++; 1: seen_decay++; 2: seen_sustain++; default: seen_release++; endcase
  endtask

  task automatic kon();
    key_on = 1; @(negedge clk); key_on = 0; m_env = 0; m_ph = 0; m_cnt = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    // direct and variable gain
    for (int g = 0; g < 12; g++) begin
      adsr1 = 8'h00;
      gain = (g < 2) ? 8'($urandom & 8'h7F) : {1'b1, 2'(g % 4), (g < 8) ? 5'd31 : 5'd26};
      kon();
      for (int t = 0; t < 300; t++) do_tick();
    end
    // ADSR: fast attack, each decay rate, random sustain
    for (int k = 0; k < 6; k++) begin
      adsr1 = {1'b1, 3'(k + 2), (k < 3) ? 4'hF : 4'hE};
      adsr2 = {3'($urandom), 5'd28};
      kon();
      for (int t = 0; t < 1200; t++) do_tick();
      key_off = 1; @(negedge clk); key_off = 0; m_ph = 3;
      for (int t = 0; t < 300; t++) do_tick();
    end
    checks++;
    if (seen_attack == 0 || seen_decay == 0 || seen_sustain == 0 || seen_release == 0) begin
      failures++; $display("FAIL phases %0d %0d %0d %0d", seen_attack, seen_decay, seen_sustain, seen_release);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
