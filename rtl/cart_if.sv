// cart_if: bus interface from the console's A-bus to a real cartridge
// connector.
//
// A request (rd or wr) with a 24-bit address starts one cartridge cycle:
// the address is driven onto the cartridge address lines, /CART is pulled
// low for cartridge memory, and /RD or /WR is held low for the number of
// master-clock cycles that the memory-map speed calls for (8 at 2.68 MHz,
// 6 at 3.58 MHz). For a write, ddir turns the data level shifter towards
// the cartridge and dout carries the byte; for a read the byte on din is
// captured on the last cycle of the strobe and returned on rdata with a
// one-cycle ready pulse. The pins (address bus A, data bus, /CART, /RD,
// /WR, data direction, /RST) follow the interface schematic; the strobe
// timing is this design's choice.
module cart_if
  import snes_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // console side
  input  logic        rd,
  input  logic        wr,
  input  logic [23:0] addr,
  input  logic [7:0]  wdata,
  input  logic        sel,      // address decodes to cartridge memory
  input  speed_t      speed,
  output logic [7:0]  rdata,
  output logic        ready,
  output logic        busy,
  // connector side
  output logic [23:0] cart_addr,
  output logic        cart_n,
  output logic        rd_n,
  output logic        wr_n,
  output logic        ddir,     // 1: FPGA drives the cartridge data bus
  output logic [7:0]  dout,
  input  logic [7:0]  din,
  output logic        rst_n
);
  logic [3:0] cnt;
  logic       is_wr;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= '0; busy <= 1'b0; is_wr <= 1'b0; ready <= 1'b0;
      cart_addr <= '0; cart_n <= 1'b1; rd_n <= 1'b1; wr_n <= 1'b1; ddir <= 1'b0;
      dout <= '0; rdata <= '0; rst_n <= 1'b0;
    end else begin
      rst_n <= 1'b1;
      ready <= 1'b0;
      if (!busy) begin
        if (rd || wr) begin
          busy      <= 1'b1;
          is_wr     <= wr;
          cnt       <= speed_cycles(speed) - 1'b1;
          cart_addr <= addr;
          cart_n    <= !sel;
          rd_n      <= !rd;
          wr_n      <= !wr;
          ddir      <= wr;
          dout      <= wdata;
        end
      end else begin
        cnt <= cnt - 1'b1;
        if (cnt == 1) begin
          if (!is_wr) rdata <= din;
          busy   <= 1'b0;
          ready  <= 1'b1;
          cart_n <= 1'b1;
          rd_n   <= 1'b1;
          wr_n   <= 1'b1;
          ddir   <= 1'b0;
        end
      end
    end
  end
endmodule
