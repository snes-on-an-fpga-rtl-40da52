// dsp_env: volume envelope generator of one voice.
//
// The 11-bit envelope (0-0x7FF) is updated once per output sample (tick)
// whenever the countdown for the current rate expires (periods from
// dsp_pkg::rate_period). In ADSR mode (ADSR1 bit 7) a key-on starts
// Attack (+32 per step at rate 2A+1, or +1024 every sample for A = 15)
// up to 0x7FF, then Decay (-((env-1)/256 + 1) at rate 2D+16) down to the
// sustain level ((SL+1) x 256, SL = ADSR2 bits 7:5), then Sustain (same
// exponential fall at rate ADSR2 bits 4:0). Without ADSR the GAIN register
// applies: bit 7 = 0 sets the envelope directly to (GAIN & 0x7F) x 16;
// otherwise bits 6:5 pick linear decrease (-32), exponential decrease,
// linear increase (+32) or bent increase (+32 below 0x600, +8 above) at
// rate GAIN bits 4:0. A key-off starts Release, -8 every sample to 0.
// envx is the top 7 bits. The document lists ADSR, direct gain and
// variable gain; the step sizes and rates are this design's choice, taken
// from the console's DSP.
module dsp_env
  import dsp_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        key_on,
  input  logic        key_off,
  input  logic        tick,
  input  logic [7:0]  adsr1,
  input  logic [7:0]  adsr2,
  input  logic [7:0]  gain,
  output logic [10:0] env,
  output logic [6:0]  envx,
  output logic [1:0]  phase
);
  localparam logic [1:0] PH_ATTACK = 2'd0, PH_DECAY = 2'd1, PH_SUSTAIN = 2'd2, PH_RELEASE = 2'd3;
  logic [4:0]  rate;
  logic [11:0] cnt;
  logic        ev;
  logic signed [12:0] e, ne;

  always_comb begin
    e = 13'(env);
    if (adsr1[7]) begin
      case (phase)
        PH_ATTACK:  rate = {adsr1[3:0], 1'b1};
        PH_DECAY:   rate = {2'b10, adsr1[6:4]};
        default:    rate = adsr2[4:0];
      endcase
    end else begin
      rate = gain[7] ? gain[4:0] : 5'd31;
    end
    ev = tick && rate != 0 && cnt <= 12'd1;
    ne = e;
    if (phase == PH_RELEASE) ne = e - 13'sd8;
    else if (adsr1[7]) begin
      if (phase == PH_ATTACK) ne = e + ((adsr1[3:0] == 4'hF) ? 13'sd1024 : 13'sd32);
      else                    ne = e - ((e - 13'sd1) >>> 8) - 13'sd1;
    end else if (!gain[7]) ne = 13'({gain[6:0], 4'd0});
    else begin
      case (gain[6:5])
        2'd0: ne = e - 13'sd32;
        2'd1: ne = e - ((e - 13'sd1) >>> 8) - 13'sd1;
        2'd2: ne = e + 13'sd32;
        default: ne = e + ((e < 13'sh600) ? 13'sd32 : 13'sd8);
      endcase
    end
    if (ne < 0) ne = '0;
    if (ne > 13'sh7FF) ne = 13'sh7FF;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      env <= '0; phase <= PH_RELEASE; cnt <= '0;
    end else if (key_on) begin
      env <= '0; phase <= PH_ATTACK; cnt <= '0;
    end else if (key_off) begin
      phase <= PH_RELEASE;
    end else if (tick) begin
      if (phase == PH_RELEASE) env <= 11'(ne);
      else if (ev) begin
        env <= 11'(ne);
        cnt <= rate_period(rate);
        if (adsr1[7] && phase == PH_ATTACK && ne >= 13'sh7FF) phase <= PH_DECAY;
        if (adsr1[7] && phase == PH_DECAY && ne[10:8] <= adsr2[7:5]) phase <= PH_SUSTAIN;
      end else if (rate != 0) begin
        cnt <= cnt - 1'b1;
      end
    end
  end

  assign envx = env[10:4];
endmodule
