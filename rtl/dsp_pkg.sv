// dsp_pkg: constants shared by the sound DSP blocks.
//
// rate_period gives, for a 5-bit rate code, how many output samples pass
// between two envelope or noise steps (0 = never). The 32 values follow
// the console's DSP as documented for programmers; the document itself
// only says that rates are selectable.
package dsp_pkg;

  function automatic logic [11:0] rate_period(logic [4:0] r);
    case (r)
      5'd0:  rate_period = 12'd0;    5'd1:  rate_period = 12'd2048;
      5'd2:  rate_period = 12'd1536; 5'd3:  rate_period = 12'd1280;
      5'd4:  rate_period = 12'd1024; 5'd5:  rate_period = 12'd768;
      5'd6:  rate_period = 12'd640;  5'd7:  rate_period = 12'd512;
      5'd8:  rate_period = 12'd384;  5'd9:  rate_period = 12'd320;
      5'd10: rate_period = 12'd256;  5'd11: rate_period = 12'd192;
      5'd12: rate_period = 12'd160;  5'd13: rate_period = 12'd128;
      5'd14: rate_period = 12'd96;   5'd15: rate_period = 12'd80;
      5'd16: rate_period = 12'd64;   5'd17: rate_period = 12'd48;
      5'd18: rate_period = 12'd40;   5'd19: rate_period = 12'd32;
      5'd20: rate_period = 12'd24;   5'd21: rate_period = 12'd20;
      5'd22: rate_period = 12'd16;   5'd23: rate_period = 12'd12;
      5'd24: rate_period = 12'd10;   5'd25: rate_period = 12'd8;
      5'd26: rate_period = 12'd6;    5'd27: rate_period = 12'd5;
      5'd28: rate_period = 12'd4;    5'd29: rate_period = 12'd3;
      5'd30: rate_period = 12'd2;    default: rate_period = 12'd1;
    endcase
  endfunction

  function automatic logic signed [15:0] clamp16(logic signed [19:0] v);
    if (v > 20'sd32767)       clamp16 = 16'sh7FFF;
    else if (v < -20'sd32768) clamp16 = 16'sh8000;
    else                      clamp16 = v[15:0];
  endfunction

endpackage
