// dsp_brr: sample decoder for the DSP's compressed sample format (BRR).
//
// A sample block is 9 bytes: a header (bits 7:4 shift, 3:2 filter, 1 loop,
// 0 end) and 16 signed 4-bit values, high nibble first. For each value
// (valid with the block header and the nibble) the decoder scales it by
// the shift (s << shift >> 1; shifts above 12 give 0 or -2048), adds the
// prediction of the selected filter from the two previous samples
//   0: none   1: p1 * 15/16   2: p1 * 61/32 - p2 * 15/16
//   3: p1 * 115/64 - p2 * 13/16
// and clamps to 16 bits. The result appears on sample one cycle later and
// becomes the new p1 (p1 becomes p2). restart clears the history, as at
// key-on. The document names the block; the format and the filters are
// this design's choice, taken from the console's documented sample format.
module dsp_brr
  import dsp_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               restart,
  input  logic               valid,
  input  logic [7:0]         header,
  input  logic [3:0]         nibble,
  output logic signed [15:0] sample,
  output logic               sample_valid
);
  logic signed [15:0] p1, p2;
  logic signed [19:0] s, a1, a2;

  always_comb begin
    s = 20'(signed'(nibble));
    if (header[7:4] <= 4'd12) s = (s <<< header[7:4]) >>> 1;
    else                      s = s[3] ? -20'sd2048 : 20'sd0;
    a1 = 20'(p1);
    a2 = 20'(p2);
    case (header[3:2])
      2'd1: s = s + a1 + ((-a1) >>> 4);
      2'd2: s = s + (a1 <<< 1) + ((-((a1 <<< 1) + a1)) >>> 5) - a2 + (a2 >>> 4);
      2'd3: s = s + (a1 <<< 1) + ((-(a1 + (a1 <<< 2) + (a1 <<< 3))) >>> 6) - a2 + (((a2 <<< 1) + a2) >>> 4);
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst || restart) begin
      p1 <= '0; p2 <= '0; sample_valid <= 1'b0;
    end else begin
      sample_valid <= valid;
      if (valid) begin
        p2 <= p1;
        p1 <= clamp16(s);
      end
    end
  end

  assign sample = p1;
endmodule
