// dsp_echo: the DSP's echo system.
//
// The echo buffer is a ring in sound RAM starting at ESA x 256 and holding
// EDL x 2048 bytes (4 bytes when EDL is 0): one stereo pair of 16-bit
// little-endian samples per output sample, so the delay is EDL x 16 ms at
// 32 kHz. On start (once per output sample) the unit reads the pair at the
// ring position, pushes it into an 8-sample history per channel and runs
// an 8-tap FIR filter (coefficients FIR0-FIR7, signed, FIR0 on the oldest
// sample, sum >> 7). The filtered pair is the echo output. Unless writes
// are disabled (FLG bit 5) the unit then writes back the voices' echo
// input plus the filtered pair times the feedback EFB (signed, >> 7), both
// clamped, and advances the ring position by 4. Reads and writes use a
// sound RAM port with one cycle of read latency; a sample takes 11 cycles.
// The document describes an echo with selectable delay; the buffer
// layout, FIR filter and feedback are this design's choice, taken from
// the console's DSP.
module dsp_echo
  import dsp_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               start,
  input  logic [7:0]         esa,
  input  logic [3:0]         edl,
  input  logic signed [7:0]  efb,
  input  logic [7:0]         fir [8],
  input  logic               write_en,
  input  logic signed [15:0] in_l,
  input  logic signed [15:0] in_r,
  output logic [15:0]        a_addr,
  output logic               a_rd,
  output logic               a_wr,
  output logic [7:0]         a_wdata,
  input  logic [7:0]         a_rdata,
  output logic signed [15:0] out_l,
  output logic signed [15:0] out_r,
  output logic               done
);
  typedef enum logic [1:0] {E_IDLE, E_RD, E_FIR, E_WR} estate_t;
  estate_t st;
  logic [2:0]  k;
  logic [14:0] pos;
  logic [7:0]  rb [4];
  logic signed [15:0] hl [8], hr [8];
  logic signed [15:0] wl, wr_;
  logic signed [23:0] accl, accr;
  logic [14:0] size;

  always_comb begin
    size = (edl == 0) ? 15'd4 : {edl, 11'd0};
    a_addr = {esa, 8'd0} + {1'b0, pos} + 16'(k);
    a_rd = (st == E_RD) && k < 3'd4;
    a_wr = (st == E_WR) && write_en;
    case (k[1:0])
      2'd0: a_wdata = wl[7:0];
      2'd1: a_wdata = wl[15:8];
      2'd2: a_wdata = wr_[7:0];
      default: a_wdata = wr_[15:8];
    endcase
    accl = '0; accr = '0;
    for (int i = 0; i < 8; i++) begin
      accl = accl + 24'(hl[i]) * 24'(signed'(fir[i]));
      accr = accr + 24'(hr[i]) * 24'(signed'(fir[i]));
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= E_IDLE; k <= '0; pos <= '0; done <= 1'b0; out_l <= '0; out_r <= '0; wl <= '0; wr_ <= '0;
      for (int i = 0; i < 8; i++) begin hl[i] <= '0; hr[i] <= '0; end
      for (int i = 0; i < 4; i++) rb[i] <= '0;
    end else begin
      done <= 1'b0;
      case (st)
        E_IDLE: if (start) begin k <= '0; st <= E_RD; end
        E_RD: begin
          if (k != 0) rb[k[1:0] - 2'd1] <= a_rdata;
          k <= k + 1'b1;
          if (k == 3'd4) begin
            for (int i = 0; i < 7; i++) begin hl[i] <= hl[i + 1]; hr[i] <= hr[i + 1]; end
            hl[7] <= {rb[1], rb[0]};
            hr[7] <= {a_rdata, rb[2]};
            st <= E_FIR;
          end
        end
        E_FIR: begin
          out_l <= clamp16(20'(accl >>> 7));
          out_r <= clamp16(20'(accr >>> 7));
          wl  <= clamp16(20'(in_l) + 20'((32'(clamp16(20'(accl >>> 7))) * 32'(efb)) >>> 7));
          wr_ <= clamp16(20'(in_r) + 20'((32'(clamp16(20'(accr >>> 7))) * 32'(efb)) >>> 7));
          k  <= '0;
          st <= E_WR;
        end
        E_WR: begin
          k <= k + 1'b1;
          if (k == 3'd3) begin
            pos  <= (pos + 15'd4 >= size) ? '0 : pos + 15'd4;
            done <= 1'b1;
            st   <= E_IDLE;
          end
        end
        default: st <= E_IDLE;
      endcase
    end
  end
endmodule
