// dsp_noise: the DSP's pseudorandom noise source.
//
// A 15-bit linear feedback shift register (new bit 14 = bit 0 xor bit 1,
// shifting right, seeded with 0x4000 at reset) steps on an output sample
// (tick) when the rate countdown, reloaded from the period of the 5-bit
// noise rate (FLG register bits 4:0), expires. Rate 0 stops it. The output
// is the register doubled into a signed 16-bit sample. Any voice whose NON
// bit is set uses this sample instead of its own. The document describes
// the function; the register length, taps and rate table are this
// design's choice, taken from the console's DSP.
module dsp_noise
  import dsp_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               tick,
  input  logic [4:0]         rate,
  output logic signed [15:0] noise
);
  logic [14:0] lfsr;
  logic [11:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      lfsr <= 15'h4000; cnt <= '0;
    end else if (tick && rate != 0) begin
      if (cnt <= 12'd1) begin
        cnt  <= rate_period(rate);
        lfsr <= {lfsr[0] ^ lfsr[1], lfsr[14:1]};
      end else begin
        cnt <= cnt - 1'b1;
      end
    end
  end

  assign noise = {lfsr, 1'b0};
endmodule
