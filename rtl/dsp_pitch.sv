// dsp_pitch: pitch counter of one voice, with pitch modulation.
//
// Each output sample (step) the 14-bit pitch (0x1000 = one source sample
// per output sample) is added to a 12-bit fractional position; the carry,
// 0 to 4, is the number of source samples the voice must advance (adv,
// valid with adv_valid one cycle after step). With modulation enabled
// (voices 1-7, PMON register) the pitch is first scaled by the previous
// voice's output: pitch + pitch * (prev >> 5) / 1024, clamped to 14 bits.
// restart clears the position (key-on). The document describes the
// function; the counter widths and the modulation formula are this
// design's choice, taken from the console's DSP.
module dsp_pitch (
  input  logic               clk,
  input  logic               rst,
  input  logic               restart,
  input  logic               step,
  input  logic [13:0]        pitch,
  input  logic               mod_en,
  input  logic signed [15:0] prev_out,
  output logic [2:0]         adv,
  output logic               adv_valid,
  output logic [13:0]        eff_pitch
);
  logic [11:0] frac;
  logic signed [31:0] prod, ep;
  logic [15:0] sum;

  always_comb begin
    prod = $signed({18'd0, pitch}) * $signed(32'(prev_out >>> 5));
    ep   = $signed({18'd0, pitch}) + (prod >>> 10);
    if (!mod_en)           eff_pitch = pitch;
    else if (ep < 0)       eff_pitch = '0;
    else if (ep > 32'sh3FFF) eff_pitch = 14'h3FFF;
    else                   eff_pitch = ep[13:0];
    sum = {4'd0, frac} + {2'd0, eff_pitch};
  end

  always_ff @(posedge clk) begin
    if (rst || restart) begin
      frac <= '0; adv <= '0; adv_valid <= 1'b0;
    end else begin
      adv_valid <= step;
      if (step) begin
        frac <= sum[11:0];
        adv  <= sum[14:12];
      end
    end
  end
endmodule
