// cpu_io: the CPU's memory-mapped I/O registers at 0x4200-0x421F, with the
// units they control: multiplier, divider, H/V timers, interrupt module and
// joypad reader.
//
// Register writes (reg_wr with reg_addr) take effect on the clock edge;
// reads are combinational, and reg_rd marks the cycle of a read so that
// 0x4210/0x4211 can clear their flags. Writing 0x4203 starts a multiply
// (product in 0x4216/7 after 8 cycles); writing 0x4206 starts a divide
// (quotient in 0x4214/5, remainder in 0x4216/7 after 16 cycles); the
// result register 0x4216/7 holds whichever finished last. 0x4212 reports
// vblank (bit 7), hblank (bit 6) and a joypad read in progress (bit 0).
// 0x421C-0x421F (controllers 3 and 4) read zero, since only two
// controller ports are wired. The register map and bit fields follow the
// document's register table; the timing of the arithmetic units is this
// design's choice.
module cpu_io #(
  parameter int unsigned H_DOTS   = 341,
  parameter int unsigned V_LINES  = 262,
  parameter int unsigned JOY_HALF = 128,
  parameter int unsigned H_VISIBLE = 256,
  parameter int unsigned V_VISIBLE = 224
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        dot_ce,
  input  logic        reg_wr,
  input  logic        reg_rd,
  input  logic [15:0] reg_addr,
  input  logic [7:0]  reg_wdata,
  output logic [7:0]  reg_rdata,
  input  logic        hv_latch,     // 0x2137 read/write
  input  logic [7:0]  rdio_in,      // programmable I/O port input pins
  output logic [7:0]  wrio_out,     // programmable I/O port output pins
  input  logic        cart_irq_n,
  output logic        nmi_n,
  output logic        irq_n,
  output logic        fast,         // 0x420D
  output logic [8:0]  hcount,
  output logic [8:0]  vcount,
  output logic [8:0]  hlat,
  output logic [8:0]  vlat,
  output logic        hblank,
  output logic        vblank,
  output logic        hblank_start,
  output logic        vblank_start,
  output logic        frame_start,
  // controllers
  input  logic        ctx1,
  input  logic        ctx2,
  output logic        col,
  output logic        cclk1,
  output logic        cclk2
);
  logic [7:0]  nmitimen, wrmpya;
  logic [15:0] wrdiv;
  logic [8:0]  htime, vtime;
  logic        mul_start, div_start, mul_done, div_done, mul_busy, div_busy;
  logic [15:0] product, quotient, remainder, rdmpy;
  logic        timer_hit, joy_busy;
  logic [15:0] pad1, pad2;
  logic [7:0]  d4210, d4211;

  assign mul_start = reg_wr && reg_addr == 16'h4203;
  assign div_start = reg_wr && reg_addr == 16'h4206;

  always_ff @(posedge clk) begin
    if (rst) begin
      nmitimen <= '0; wrio_out <= 8'hFF; wrmpya <= 8'hFF; wrdiv <= 16'hFFFF;
      htime <= 9'h1FF; vtime <= 9'h1FF; fast <= 1'b0; rdmpy <= '0;
    end else begin
      if (reg_wr) begin
        case (reg_addr)
          16'h4200: nmitimen    <= reg_wdata;
          16'h4201: wrio_out    <= reg_wdata;
          16'h4202: wrmpya      <= reg_wdata;
          16'h4204: wrdiv[7:0]  <= reg_wdata;
          16'h4205: wrdiv[15:8] <= reg_wdata;
          16'h4207: htime[7:0]  <= reg_wdata;
          16'h4208: htime[8]    <= reg_wdata[0];
          16'h4209: vtime[7:0]  <= reg_wdata;
          16'h420A: vtime[8]    <= reg_wdata[0];
          16'h420D: fast        <= reg_wdata[0];
          default: ;
        endcase
      end
      if (mul_done) rdmpy <= product;
      if (div_done) rdmpy <= remainder;
    end
  end

  cpu_mult u_mult (.clk, .rst, .a(wrmpya), .b(reg_wdata), .start(mul_start), .product,
                   .busy(mul_busy), .done(mul_done));
  cpu_div u_div (.clk, .rst, .dividend(wrdiv), .divisor(reg_wdata), .start(div_start), .quotient,
                 .remainder, .busy(div_busy), .done(div_done));
  hv_timer #(.H_DOTS(H_DOTS), .V_LINES(V_LINES), .H_VISIBLE(H_VISIBLE), .V_VISIBLE(V_VISIBLE)) u_hv (.clk, .rst, .dot_ce, .htime, .vtime,
                 .h_en(nmitimen[4]), .v_en(nmitimen[5]), .latch(hv_latch), .hcount, .vcount,
                 .hlat, .vlat, .hblank, .vblank, .hblank_start, .vblank_start, .frame_start,
                 .timer_hit);
  cpu_irq u_irq (.clk, .rst, .nmi_en(nmitimen[7]), .vblank_start, .timer_hit, .cart_irq_n,
                 .rd_4210(reg_rd && reg_addr == 16'h4210), .rd_4211(reg_rd && reg_addr == 16'h4211),
                 .rdata_4210(d4210), .rdata_4211(d4211), .nmi_n, .irq_n);
  joypad_if #(.HALF_PERIOD(JOY_HALF)) u_joy (.clk, .rst, .auto_en(nmitimen[0]), .start(vblank_start),
                 .ctx1, .ctx2, .col, .cclk1, .cclk2, .pad1, .pad2, .busy(joy_busy));

  always_comb begin
    case (reg_addr)
      16'h4210: reg_rdata = d4210;
      16'h4211: reg_rdata = d4211;
      16'h4212: reg_rdata = {vblank, hblank, 5'd0, joy_busy};
      16'h4213: reg_rdata = rdio_in;
      16'h4214: reg_rdata = quotient[7:0];
      16'h4215: reg_rdata = quotient[15:8];
      16'h4216: reg_rdata = rdmpy[7:0];
      16'h4217: reg_rdata = rdmpy[15:8];
      16'h4218: reg_rdata = pad1[7:0];
      16'h4219: reg_rdata = pad1[15:8];
      16'h421A: reg_rdata = pad2[7:0];
      16'h421B: reg_rdata = pad2[15:8];
      default:  reg_rdata = 8'h00;
    endcase
  end
endmodule
