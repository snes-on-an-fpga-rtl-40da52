// cpu_irq: the interrupt module that gathers interrupt sources for the
// 65C816 core.
//
// An NMI flag is set at the start of every vertical blank; the NMI line
// (active low) is driven while the flag is set and NMI is enabled (bit a of
// 0x4200). Reading 0x4210 returns the flag in bit 7 and clears it. A timer
// flag is set by the H/V timer; reading 0x4211 returns it in bit 7 and
// clears it. The IRQ line (active low) is the OR of the timer flag and the
// cartridge's /IRQ pin. Sources and registers follow the document; the
// read-to-clear behaviour and the flag-in-bit-7 layout are this design's
// choice, taken from the console's programming model.
module cpu_irq (
  input  logic       clk,
  input  logic       rst,
  input  logic       nmi_en,       // 0x4200 bit 7
  input  logic       vblank_start,
  input  logic       timer_hit,
  input  logic       cart_irq_n,
  input  logic       rd_4210,
  input  logic       rd_4211,
  output logic [7:0] rdata_4210,
  output logic [7:0] rdata_4211,
  output logic       nmi_n,
  output logic       irq_n
);
  logic nmi_flag, timer_flag;

  always_ff @(posedge clk) begin
    if (rst) begin
      nmi_flag <= 1'b0; timer_flag <= 1'b0;
    end else begin
      if (vblank_start)  nmi_flag <= 1'b1;
      else if (rd_4210)  nmi_flag <= 1'b0;
      if (timer_hit)     timer_flag <= 1'b1;
      else if (rd_4211)  timer_flag <= 1'b0;
    end
  end

  assign rdata_4210 = {nmi_flag, 7'h02};   // low bits: CPU version number
  assign rdata_4211 = {timer_flag, 7'h00};
  assign nmi_n = !(nmi_flag && nmi_en);
  assign irq_n = !(timer_flag || !cart_irq_n);
endmodule
