// wram: the CPU's 128 KB byte-addressable work RAM.
//
// A single-port synchronous RAM: a write stores wdata at addr on the clock
// edge; a read returns the byte at addr on rdata one cycle after rd. The
// CPU and the DMA engine share the port, since the CPU is halted while DMA
// runs. The size follows the document; the port timing is this design's
// choice.
module wram #(
  parameter int unsigned AW = 17  // 2^17 bytes = 128 KB
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          rd,
  input  logic          wr,
  input  logic [7:0]    wdata,
  output logic [7:0]    rdata
);
  logic [7:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (wr) mem[addr] <= wdata;
    if (rd) rdata <= mem[addr];
  end
endmodule
