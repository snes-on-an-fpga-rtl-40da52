// hv_timer: horizontal/vertical dot counters, blanking flags and the H/V
// timer that the CPU uses for raster interrupts.
//
// The counters advance on every dot_ce pulse: h counts 0..H_DOTS-1 and v
// counts 0..V_LINES-1 once per line. hblank is high from H_VISIBLE on, and
// vblank from line V_VISIBLE+1 on (line 0 is not displayed). The timer
// compares against HTIME (0x4207/0x4208) and VTIME (0x4209/0x420A) as
// enabled by bits b (V) and c (H) of 0x4200: H only matches at dot HTIME of
// every line, V only at dot 0 of line VTIME, and both at dot HTIME of line
// VTIME. timer_hit pulses for one dot. A latch pulse (0x2137) copies the
// counters to hlat/vlat (0x213C/0x213D). The document names the timers and
// their registers; the line and frame lengths (341 dots, 262 lines, 256x224
// visible) are this design's choice, taken from the NTSC console.
module hv_timer #(
  parameter int unsigned H_DOTS    = 341,
  parameter int unsigned V_LINES   = 262,
  parameter int unsigned H_VISIBLE = 256,
  parameter int unsigned V_VISIBLE = 224
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       dot_ce,
  input  logic [8:0] htime,
  input  logic [8:0] vtime,
  input  logic       h_en,
  input  logic       v_en,
  input  logic       latch,
  output logic [8:0] hcount,
  output logic [8:0] vcount,
  output logic [8:0] hlat,
  output logic [8:0] vlat,
  output logic       hblank,
  output logic       vblank,
  output logic       hblank_start,  // one-dot pulse at the first hblank dot
  output logic       vblank_start,  // one-dot pulse at the first vblank dot
  output logic       frame_start,   // one-dot pulse at dot 0 of line 0
  output logic       timer_hit
);
  logic hm, vm;

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount <= '0; vcount <= '0; hlat <= '0; vlat <= '0;
    end else begin
      if (latch) begin
        hlat <= hcount; vlat <= vcount;
      end
      if (dot_ce) begin
        if (hcount == 9'(H_DOTS - 1)) begin
          hcount <= '0;
          vcount <= (vcount == 9'(V_LINES - 1)) ? '0 : vcount + 1'b1;
        end else begin
          hcount <= hcount + 1'b1;
        end
      end
    end
  end

  always_comb begin
    hblank = hcount >= 9'(H_VISIBLE);
    vblank = (vcount > 9'(V_VISIBLE)) || (vcount == 0);
    hblank_start = dot_ce && hcount == 9'(H_VISIBLE);
    vblank_start = dot_ce && hcount == 0 && vcount == 9'(V_VISIBLE + 1);
    frame_start  = dot_ce && hcount == 0 && vcount == 0;
    hm = hcount == htime;
    vm = vcount == vtime;
    unique case ({v_en, h_en})
      2'b01:   timer_hit = dot_ce && hm;
      2'b10:   timer_hit = dot_ce && vm && hcount == 0;
      2'b11:   timer_hit = dot_ce && vm && hm;
      default: timer_hit = 1'b0;
    endcase
  end
endmodule
