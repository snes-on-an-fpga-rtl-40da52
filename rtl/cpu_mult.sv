// cpu_mult: the CPU's 8-bit by 8-bit unsigned hardware multiplier.
//
// The multiplicand is held from register 0x4202; a write of the multiplier
// (register 0x4203) starts a product, which appears in the 16-bit result
// register (0x4216/0x4217) LATENCY clock cycles later, with done pulsing
// for one cycle. The multiplier width follows the document; it performs
// one shift-and-add step per cycle (the latency of 8 is this design's
// choice), so the product register is only valid after done.
module cpu_mult #(
  parameter int unsigned W = 8  // operand width
) (
  input  logic           clk,
  input  logic           rst,
  input  logic [W-1:0]   a,       // multiplicand (0x4202)
  input  logic [W-1:0]   b,       // multiplier (0x4203)
  input  logic           start,   // write strobe of 0x4203
  output logic [2*W-1:0] product, // 0x4216/0x4217
  output logic           busy,
  output logic           done
);
  logic [2*W-1:0] acc, mcand;
  logic [W-1:0]   mplier;
  logic [$clog2(W+1)-1:0] step;

  always_ff @(posedge clk) begin
    if (rst) begin
      acc <= '0; mcand <= '0; mplier <= '0; step <= '0;
      busy <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        acc    <= '0;
        mcand  <= {{W{1'b0}}, a};
        mplier <= b;
        step   <= W[$clog2(W+1)-1:0];
        busy   <= 1'b1;
      end else if (busy) begin
        if (mplier[0]) acc <= acc + mcand;
        mcand  <= mcand << 1;
        mplier <= mplier >> 1;
        step   <= step - 1'b1;
        if (step == 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign product = acc;
endmodule
