// aram: the 64 KB sound RAM shared by the SPC700 and the DSP.
//
// Two synchronous ports on one clock: port A serves the SPC700, port B the
// DSP (sample fetch and echo buffer). Each port writes on the clock edge
// and returns read data one cycle after its read strobe. If both ports
// write the same byte in one cycle, port A wins. The size follows the
// document; the two-port arrangement is this design's choice.
module aram #(
  parameter int unsigned AW = 16
) (
  input  logic          clk,
  input  logic [AW-1:0] a_addr,
  input  logic          a_rd,
  input  logic          a_wr,
  input  logic [7:0]    a_wdata,
  output logic [7:0]    a_rdata,
  input  logic [AW-1:0] b_addr,
  input  logic          b_rd,
  input  logic          b_wr,
  input  logic [7:0]    b_wdata,
  output logic [7:0]    b_rdata
);
  logic [7:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (b_wr && !(a_wr && a_addr == b_addr)) mem[b_addr] <= b_wdata;
    if (a_wr) mem[a_addr] <= a_wdata;
    if (a_rd) a_rdata <= mem[a_addr];
    if (b_rd) b_rdata <= mem[b_addr];
  end
endmodule
