// cpu_div: the CPU's 16-bit by 8-bit unsigned hardware divider.
//
// A write of the divisor (register 0x4206) starts a restoring division of
// the dividend (0x4204/0x4205). One quotient bit is produced per clock, so
// quotient (0x4214/0x4215) and remainder (0x4216/0x4217) are valid 16
// cycles after start, marked by a one-cycle done pulse. The operand widths
// follow the document; the bit-serial structure is this design's choice.
// Division by zero gives a quotient of all ones and the dividend as
// remainder, which is what a restoring divider naturally produces.
module cpu_div #(
  parameter int unsigned NW = 16, // dividend width
  parameter int unsigned DW = 8   // divisor width
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [NW-1:0] dividend,
  input  logic [DW-1:0] divisor,
  input  logic          start,
  output logic [NW-1:0] quotient,
  output logic [NW-1:0] remainder,
  output logic          busy,
  output logic          done
);
  logic [NW-1:0] q;
  logic [NW-1:0] r;       // partial remainder
  logic [DW-1:0] d;
  logic [$clog2(NW+1)-1:0] step;
  logic [NW:0]   r_sh, r_sub;

  always_comb begin
    r_sh  = {r, q[NW-1]};
    r_sub = r_sh - {{(NW+1-DW){1'b0}}, d};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      q <= '0; r <= '0; d <= '0; step <= '0; busy <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        q    <= dividend;
        r    <= '0;
        d    <= divisor;
        step <= NW[$clog2(NW+1)-1:0];
        busy <= 1'b1;
      end else if (busy) begin
        if (!r_sub[NW]) begin
          r <= r_sub[NW-1:0];
          q <= {q[NW-2:0], 1'b1};
        end else begin
          r <= r_sh[NW-1:0];
          q <= {q[NW-2:0], 1'b0};
        end
        step <= step - 1'b1;
        if (step == 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign quotient  = q;
  assign remainder = r;
endmodule
