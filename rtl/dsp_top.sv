// dsp_top: the sound DSP. Eight sample voices, noise, echo and the master
// mix, producing one 16-bit stereo sample every SAMPLE_CYCLES clocks.
//
// The sound CPU writes and reads the DSP's 128 registers through reg_*
// (address in reg_addr[6:0], write in one cycle, combinational read).
// Register map: per voice x (0-7), x0/x1 left/right volume, x2/x3 pitch,
// x4 source number, x5/x6 ADSR, x7 GAIN, x8 ENVX and x9 OUTX (read back);
// 0C/1C main volume, 2C/3C echo volume, 4C key-on, 5C key-off, 6C flags
// (bit 7 soft reset, bit 6 mute, bit 5 echo write disable, bits 4:0 noise
// rate), 7C ENDX (any write clears it), 0D echo feedback, 2D pitch
// modulation enables, 3D noise enables, 4D echo enables, 5D sample
// directory page, 6D echo start page, 7D echo delay, xF FIR coefficients.
//
// A sample period is split into steps run one after another: the eight
// voices (dsp_voice), then the echo (dsp_echo), then the mix, after which
// the noise generator steps and left/right/sample_valid present the new
// stereo sample. The voices and echo share the sound RAM port b_* (one
// cycle read latency); only the unit whose step it is drives it. Mix:
// main = sum(voice) x MVOL / 128 + echo x EVOL / 128, each clamped to
// 16 bits. The echo input is the sum of the voices enabled in EON.
// The document gives the DSP's parts (decoder, pitch, noise, envelope,
// echo, volume), 8 voices, 16-bit stereo at 32 kHz and a 32-step process
// per sample; here each step waits for its unit instead of having a fixed
// number of cycles, which is this design's choice, as is the register map
// (taken from the console's DSP).
module dsp_top
  import dsp_pkg::*;
#(
  parameter int unsigned SAMPLE_CYCLES = 768  // 24.576 MHz / 32 kHz
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [6:0]         reg_addr,
  input  logic               reg_wr,
  input  logic [7:0]         reg_wdata,
  output logic [7:0]         reg_rdata,
  output logic [15:0]        b_addr,
  output logic               b_rd,
  output logic               b_wr,
  output logic [7:0]         b_wdata,
  input  logic [7:0]         b_rdata,
  output logic signed [15:0] left,
  output logic signed [15:0] right,
  output logic               sample_valid,
  output logic               echo_done
);
  logic [7:0] r [128];
  logic [7:0] kon_pend, endx;
  logic [$clog2(SAMPLE_CYCLES)-1:0] period;
  logic [3:0] step;            // 0-7 voices, 8 echo, 9 mix, 10 wait
  logic       step_go;
  logic [7:0] v_done, v_end;
  logic [15:0] v_addr [8];
  logic [7:0]  v_rd;
  logic signed [15:0] v_out [8], v_l [8], v_r [8];
  logic [6:0]  v_envx [8];
  logic signed [15:0] noise, echo_l, echo_r;
  logic [15:0] e_addr;
  logic        e_rd, e_wr, e_done;
  logic [7:0]  e_wdata;
  logic signed [19:0] acc_l, acc_r, eacc_l, eacc_r;
  logic [7:0]  fir [8];

  assign reg_rdata = r[reg_addr];
  for (genvar i = 0; i < 8; i++) begin : g_fir
    assign fir[i] = r[{3'(i), 4'hF}];
  end

  for (genvar v = 0; v < 8; v++) begin : g_voice
    dsp_voice u_voice (
      .clk, .rst(rst || r[7'h6C][7]),
      .go(step_go && step == 4'(v)),
      .key_on(kon_pend[v]), .key_off(r[7'h5C][v]),
      .dir(r[7'h5D]), .srcn(r[{3'(v), 4'h4}]),
      .pitch({r[{3'(v), 4'h3}][5:0], r[{3'(v), 4'h2}]}),
      .pmon_en(r[7'h2D][v] && v != 0), .prev_out(v_out[(v + 7) % 8]),
      .noise_en(r[7'h3D][v]), .noise,
      .adsr1(r[{3'(v), 4'h5}]), .adsr2(r[{3'(v), 4'h6}]), .gain(r[{3'(v), 4'h7}]),
      .vol_l(r[{3'(v), 4'h0}]), .vol_r(r[{3'(v), 4'h1}]),
      .a_addr(v_addr[v]), .a_rd(v_rd[v]), .a_rdata(b_rdata),
      .out(v_out[v]), .out_l(v_l[v]), .out_r(v_r[v]), .envx(v_envx[v]),
      .ended(v_end[v]), .done(v_done[v]));
  end

  dsp_echo u_echo (
    .clk, .rst, .start(step_go && step == 4'd8),
    .esa(r[7'h6D]), .edl(r[7'h7D][3:0]), .efb(r[7'h0D]), .fir,
    .write_en(!r[7'h6C][5]), .in_l(clamp16(eacc_l)), .in_r(clamp16(eacc_r)),
    .a_addr(e_addr), .a_rd(e_rd), .a_wr(e_wr), .a_wdata(e_wdata), .a_rdata(b_rdata),
    .out_l(echo_l), .out_r(echo_r), .done(e_done));

  dsp_noise u_noise (.clk, .rst, .tick(sample_valid), .rate(r[7'h6C][4:0]), .noise);

  always_comb begin
    b_addr = e_addr; b_rd = 1'b0; b_wr = 1'b0; b_wdata = e_wdata;
    if (step < 4'd8) begin
      b_addr = v_addr[step[2:0]]; b_rd = v_rd[step[2:0]];
    end else if (step == 4'd8) begin
      b_rd = e_rd; b_wr = e_wr;
    end
    acc_l = '0; acc_r = '0; eacc_l = '0; eacc_r = '0;
    for (int v = 0; v < 8; v++) begin
      acc_l = acc_l + 20'(v_l[v]);
      acc_r = acc_r + 20'(v_r[v]);
      if (r[7'h4D][v]) begin
        eacc_l = eacc_l + 20'(v_l[v]);
        eacc_r = eacc_r + 20'(v_r[v]);
      end
    end
  end

  function automatic logic signed [15:0] mix(input logic signed [19:0] main, input logic [7:0] mv,
                                             input logic signed [15:0] ech, input logic [7:0] ev);
    logic signed [31:0] m, e;
    m = (32'(clamp16(main)) * 32'(signed'(mv))) >>> 7;
    e = (32'(ech) * 32'(signed'(ev))) >>> 7;
    return clamp16(20'(clamp16(20'(m))) + 20'(clamp16(20'(e))));
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 128; i++) r[i] <= '0;
      r[7'h6C] <= 8'hE0;
      kon_pend <= '0; endx <= '0; period <= '0; step <= 4'd10; step_go <= 1'b0;
      left <= '0; right <= '0; sample_valid <= 1'b0; echo_done <= 1'b0;
    end else begin
      sample_valid <= 1'b0; step_go <= 1'b0; echo_done <= 1'b0;
      period <= (period == $bits(period)'(SAMPLE_CYCLES - 1)) ? '0 : period + 1'b1;
      if (period == '0) begin step <= 4'd0; step_go <= 1'b1; end
      else if (step < 4'd8 && v_done[step[2:0]]) begin
        if (kon_pend[step[2:0]]) kon_pend[step[2:0]] <= 1'b0;
        step <= step + 1'b1; step_go <= 1'b1;
      end else if (step == 4'd8 && e_done) begin
        step <= 4'd9; echo_done <= 1'b1;
      end else if (step == 4'd9) begin
        step <= 4'd10;
        sample_valid <= 1'b1;
        if (r[7'h6C][6]) begin left <= '0; right <= '0; end
        else begin
          left  <= mix(acc_l, r[7'h0C], echo_l, r[7'h2C]);
          right <= mix(acc_r, r[7'h1C], echo_r, r[7'h3C]);
        end
      end
      // voice status back into the register file
      for (int v = 0; v < 8; v++) begin
        r[{3'(v), 4'h8}] <= {1'b0, v_envx[v]};
        r[{3'(v), 4'h9}] <= v_out[v][15:8];
      end
      endx <= endx | v_end;
      r[7'h7C] <= endx | v_end;
      if (reg_wr) begin
        if (reg_addr == 7'h7C) begin endx <= '0; r[7'h7C] <= '0; end
        else if (reg_addr[3:0] != 4'h8 && reg_addr[3:0] != 4'h9) r[reg_addr] <= reg_wdata;
        if (reg_addr == 7'h4C) kon_pend <= kon_pend | reg_wdata;
      end
      if (r[7'h6C][7]) kon_pend <= '0;
    end
  end
endmodule
