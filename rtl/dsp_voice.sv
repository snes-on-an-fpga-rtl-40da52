// dsp_voice: one of the DSP's eight voices, run once per output sample.
//
// go starts the voice's turn. On a pending key-on it reads the 4-byte
// entry SRCN of the sample directory (DIR x 256: start address, loop
// address, little-endian), loads the first 9-byte sample block and
// restarts the decoder, pitch counter and envelope. Every turn it steps
// the pitch counter, decodes as many new samples as the counter advanced
// (0-4), loading the next block when one is used up: after a block whose
// header has the end flag the voice reports end and jumps to the loop
// address if the loop flag is set, or falls silent otherwise. The current
// sample (or the noise sample, when noise_en) is scaled by the envelope
// (x env / 2048) to give out, and by the signed 8-bit left and right
// volumes (/ 128) to give out_l and out_r. done pulses at the end of the
// turn, which takes at most 24 cycles. The sound RAM port has one cycle
// of read latency.
// The voice's parts (sample decoder, pitch modulator, envelope) follow the
// document; the directory and block handling is this design's choice,
// taken from the console's DSP.
module dsp_voice (
  input  logic               clk,
  input  logic               rst,
  input  logic               go,
  input  logic               key_on,     // pending key-on, taken at go
  input  logic               key_off,
  input  logic [7:0]         dir,
  input  logic [7:0]         srcn,
  input  logic [13:0]        pitch,
  input  logic               pmon_en,
  input  logic signed [15:0] prev_out,
  input  logic               noise_en,
  input  logic signed [15:0] noise,
  input  logic [7:0]         adsr1,
  input  logic [7:0]         adsr2,
  input  logic [7:0]         gain,
  input  logic signed [7:0]  vol_l,
  input  logic signed [7:0]  vol_r,
  output logic [15:0]        a_addr,
  output logic               a_rd,
  input  logic [7:0]         a_rdata,
  output logic signed [15:0] out,
  output logic signed [15:0] out_l,
  output logic signed [15:0] out_r,
  output logic [6:0]         envx,
  output logic               ended,      // pulse: end-flagged block finished
  output logic               done
);
  typedef enum logic [2:0] {V_IDLE, V_DIR, V_LOAD, V_PITCH, V_DEC, V_OUT} vstate_t;
  vstate_t st;
  logic [3:0]  k;
  logic [15:0] start_a, loop_a, blk_a;
  logic [7:0]  blk [9];
  logic [3:0]  nib;
  logic [2:0]  remain;
  logic        active, kon_q, restart, brr_valid, brr_sv, pstep, adv_valid;
  logic [2:0]  adv;
  logic [13:0] eff_pitch;
  logic signed [15:0] brr_s, src;
  logic [10:0] env;
  logic [1:0]  phase;
  logic [7:0]  cur_byte;

  assign cur_byte = blk[1 + 4'(nib[3:1])];
  assign restart  = (st == V_LOAD) && kon_q && k == 0;

  dsp_brr u_brr (.clk, .rst, .restart, .valid(brr_valid), .header(blk[0]),
                 .nibble(nib[0] ? cur_byte[3:0] : cur_byte[7:4]), .sample(brr_s), .sample_valid(brr_sv));
  dsp_pitch u_pitch (.clk, .rst, .restart, .step(pstep), .pitch, .mod_en(pmon_en), .prev_out,
                     .adv, .adv_valid, .eff_pitch);
  dsp_env u_env (.clk, .rst, .key_on(go && key_on), .key_off(go && key_off && !key_on && phase != 2'd3),
                 .tick(go && !key_on), .adsr1, .adsr2, .gain, .env, .envx, .phase);

  always_comb begin
    a_rd = 1'b0; a_addr = blk_a + 16'(k);
    if (st == V_DIR && k < 4'd4) begin a_rd = 1'b1; a_addr = {dir, 8'd0} + {6'd0, srcn, 2'd0} + 16'(k); end
    if (st == V_LOAD && k < 4'd9) a_rd = 1'b1;
    pstep     = (st == V_PITCH) && k == 0;
    brr_valid = (st == V_DEC) && remain != 0 && active;
    src = noise_en ? noise : brr_s;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= V_IDLE; k <= '0; start_a <= '0; loop_a <= '0; blk_a <= '0; nib <= '0; remain <= '0;
      active <= 1'b0; kon_q <= 1'b0; out <= '0; out_l <= '0; out_r <= '0; ended <= 1'b0; done <= 1'b0;
      for (int i = 0; i < 9; i++) blk[i] <= '0;
    end else begin
      done <= 1'b0; ended <= 1'b0;
      case (st)
        V_IDLE: if (go) begin
          k <= '0;
          if (key_on) begin kon_q <= 1'b1; st <= V_DIR; end
          else st <= V_PITCH;
        end
        V_DIR: begin
          k <= k + 1'b1;
          case (k)
            4'd1: start_a[7:0]  <= a_rdata;
            4'd2: start_a[15:8] <= a_rdata;
            4'd3: loop_a[7:0]   <= a_rdata;
            4'd4: begin loop_a[15:8] <= a_rdata; blk_a <= start_a; k <= '0; st <= V_LOAD; end
            default: ;
          endcase
        end
        V_LOAD: begin
          k <= k + 1'b1;
          if (k != 0) blk[k - 4'd1] <= a_rdata;
          if (k == 4'd9) begin
            k <= '0; nib <= '0;
            if (kon_q) begin kon_q <= 1'b0; active <= 1'b1; st <= V_PITCH; end
            else st <= V_DEC;
          end
        end
        V_PITCH: begin
          k <= k + 1'b1;
          if (adv_valid) begin remain <= active ? adv : 3'd0; st <= V_DEC; end
        end
        V_DEC: begin
          if (remain == 0 || !active) st <= V_OUT;
          else begin
            remain <= remain - 1'b1;
            nib <= nib + 1'b1;
            if (nib == 4'd15) begin
              k <= '0;
              if (blk[0][0]) begin
                ended <= 1'b1;
                if (blk[0][1]) begin blk_a <= loop_a; st <= V_LOAD; end
                else begin active <= 1'b0; st <= V_OUT; end
              end else begin
                blk_a <= blk_a + 16'd9; st <= V_LOAD;
              end
            end
          end
        end
        V_OUT: begin
          // the decoder result of the last nibble is ready now
          if (active || noise_en) begin
            out   <= 16'((32'(src) * 32'({1'b0, env})) >>> 11);
            out_l <= 16'((32'(16'((32'(src) * 32'({1'b0, env})) >>> 11)) * 32'(vol_l)) >>> 7);
            out_r <= 16'((32'(16'((32'(src) * 32'({1'b0, env})) >>> 11)) * 32'(vol_r)) >>> 7);
          end else begin
            out <= '0; out_l <= '0; out_r <= '0;
          end
          done <= 1'b1;
          st <= V_IDLE;
        end
        default: st <= V_IDLE;
      endcase
    end
  end
endmodule
