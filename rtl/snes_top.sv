// snes_top: the console around its two processors.
//
// The 65C816 CPU core and the SPC700 sound CPU are outside this design;
// their buses are brought out as ports. Everything between them is here:
// the CPU's memory map and bus timing, 128 KB work RAM, the CPU I/O block
// (multiplier, divider, interrupts, H/V timers, controller reader), the
// DMA/HDMA engine, the cartridge connector interface, the PPU with its
// memories, the four APU ports, the 64 KB sound RAM and the sound DSP.
//
// CPU bus: the core pulses cpu_rd or cpu_wr for one cycle with cpu_addr
// (and cpu_wdata) while cpu_ready is low; the access then takes as many
// master cycles as the memory map gives the region (8 = 2.68 MHz,
// 6 = 3.58 MHz, 12 = 1.79 MHz; banks 80-FF at 3.58 MHz after 420D bit 0
// is set), or until the cartridge completes, and ends with a cpu_ready
// pulse carrying cpu_rdata. The core must not start an access while
// cpu_halt is high (DMA or HDMA owns the buses). The register strobes of
// an access are given once, in its first cycle, so reads with side
// effects happen once. The B-bus (2100-21FF) reaches the PPU (2100-213F)
// and the APU ports (2140-217F).
//
// DMA/HDMA: A-bus reads return one cycle later; a cartridge access holds
// the engine through its wait input until the connector cycle completes.
// A DMA access also waits while a CPU access started before the halt is
// still running. The B-bus answers DMA reads one cycle later.
//
// Video: dot_ce runs the H/V counters at master clock / DOT_DIV. The PPU
// renders each frame from frame_start (start of the vertical counter) and
// streams pixels. Audio: the DSP produces a stereo sample every
// SAMPLE_CYCLES cycles of the same clock, reading sound RAM through its
// second port; the SPC700 uses the first port, the APU ports and the DSP
// register port.
// The block split, memory sizes, memory map, region speeds and the bus
// structure follow the document; the one-cycle strobes, the ready pulse,
// the single clock for all parts and the reduced-rate PPU (it renders
// pixel by pixel, slower than real time) are this design's choices.
module snes_top
  import snes_pkg::*;
#(
  parameter int unsigned H_DOTS        = 341,
  parameter int unsigned V_LINES       = 262,
  parameter int unsigned DOT_DIV       = 4,
  parameter int unsigned JOY_HALF      = 128,
  parameter int unsigned H_RES         = 256,
  parameter int unsigned V_RES         = 224,
  parameter int unsigned SAMPLE_CYCLES = 768
) (
  input  logic               clk,
  input  logic               rst,
  // 65C816 core bus
  input  logic [23:0]        cpu_addr,
  input  logic               cpu_rd,
  input  logic               cpu_wr,
  input  logic [7:0]         cpu_wdata,
  output logic [7:0]         cpu_rdata,
  output logic               cpu_ready,
  output logic               cpu_halt,
  output logic               nmi_n,
  output logic               irq_n,
  // cartridge connector
  output logic [23:0]        cart_addr,
  output logic               cart_n,
  output logic               cart_rd_n,
  output logic               cart_wr_n,
  output logic               cart_ddir,
  output logic [7:0]         cart_dout,
  input  logic [7:0]         cart_din,
  output logic               cart_rst_n,
  input  logic               cart_irq_n,
  // controllers and I/O port
  input  logic               ctx1,
  input  logic               ctx2,
  output logic               col,
  output logic               cclk1,
  output logic               cclk2,
  input  logic [7:0]         rdio_in,
  output logic [7:0]         wrio_out,
  // SPC700 side
  input  logic [15:0]        spc_addr,
  input  logic               spc_rd,
  input  logic               spc_wr,
  input  logic [7:0]         spc_wdata,
  output logic [7:0]         spc_rdata,
  input  logic [1:0]         spc_port,
  input  logic               spc_port_wr,
  input  logic [7:0]         spc_port_wdata,
  output logic [7:0]         spc_port_rdata,
  input  logic [6:0]         dsp_addr,
  input  logic               dsp_wr,
  input  logic [7:0]         dsp_wdata,
  output logic [7:0]         dsp_rdata,
  // outputs
  output logic signed [15:0] audio_l,
  output logic signed [15:0] audio_r,
  output logic               audio_valid,
  output logic               pix_valid,
  output logic [8:0]         pix_x,
  output logic [8:0]         pix_y,
  output logic [14:0]        pix_rgb,
  output logic               frame_done
);
  // ---------------------------------------------------------------- clocks
  logic [$clog2(DOT_DIV)-1:0] dot_cnt;
  logic dot_ce;
  always_ff @(posedge clk) begin
    if (rst) dot_cnt <= '0;
    else     dot_cnt <= (dot_cnt == $bits(dot_cnt)'(DOT_DIV - 1)) ? '0 : dot_cnt + 1'b1;
  end
  assign dot_ce = (dot_cnt == '0);

  // ------------------------------------------------------------- CPU bus FSM
  typedef enum logic [1:0] {C_IDLE, C_STROBE, C_WAIT, C_DONE} cstate_t;
  cstate_t cst;
  logic [23:0] c_addr;
  logic [7:0]  c_wdata, c_rdata;
  logic        c_rd, c_wr;
  logic [3:0]  c_cnt;
  logic        c_cart;          // cartridge access of the CPU in progress
  region_t     c_region;
  speed_t      c_speed;
  logic [16:0] c_wram_addr;
  logic [7:0]  c_bbus_addr;
  logic        fast;

  mem_map u_cmap (.addr(c_addr), .fast, .region(c_region), .speed(c_speed),
                  .wram_addr(c_wram_addr), .bbus_addr(c_bbus_addr));

  // ------------------------------------------------------------- DMA side
  logic [23:0] d_addr;
  logic        d_rd, d_wr, d_wait;
  logic [7:0]  d_wdata, d_rdata;
  logic [7:0]  d_baddr, d_bwdata, d_brdata;
  logic        d_brd, d_bwr;
  region_t     d_region, d_region_q;
  speed_t      d_speed;
  logic [16:0] d_wram_addr;
  logic [7:0]  d_bbus_unused;
  logic        dma_active, hdma_active;
  logic        d_cart_req, d_go;
  logic [7:0]  d_reg_q;            // register read data for DMA

  mem_map u_dmap (.addr(d_addr), .fast, .region(d_region), .speed(d_speed),
                  .wram_addr(d_wram_addr), .bbus_addr(d_bbus_unused));

  // ------------------------------------------------------------- targets
  logic        strobe;             // CPU's one-cycle strobe
  logic        s_rd, s_wr;
  logic [7:0]  io_rdata, dma_rdata, ppu_rdata, apu_rdata, wram_rdata;
  logic        io_rd, io_wr, dreg_wr;
  logic [15:0] io_addr;
  logic [7:0]  io_wdata;
  logic        w_rd, w_wr;
  logic [16:0] w_addr;
  logic [7:0]  w_wdata;
  logic [7:0]  b_addr, b_wdata, b_rdata;
  logic        b_rd, b_wr, ppu_bsel, apu_bsel;
  logic        k_rd, k_wr, k_ready, k_busy, k_sel;
  logic [23:0] k_addr;
  logic [7:0]  k_wdata, k_rdata;
  speed_t      k_speed;
  logic        k_owner_dma;        // who started the current cartridge access
  logic [23:0] k_owner_addr;
  logic        hv_latch, frame_start, hblank_start;
  logic [8:0]  hlat, vlat, hcount, vcount;
  logic        hblank, vblank, vblank_start, ppu_busy;
  logic [2:0]  pix_layer;

  assign strobe = (cst == C_STROBE);
  assign s_rd   = strobe && c_rd;
  assign s_wr   = strobe && c_wr;

  // DMA request handling
  assign d_cart_req = (d_rd || d_wr) && d_region == REG_CART;
  assign d_wait = (cst != C_IDLE && cst != C_DONE) ||
                  (d_cart_req && !(k_ready && k_owner_dma && k_owner_addr == d_addr));
  assign d_go   = !d_wait;

  always_comb begin
    // CPU I/O and DMA register ports: CPU only
    io_addr  = c_addr[15:0];
    io_wdata = c_wdata;
    io_rd    = s_rd && c_region == REG_CPUIO;
    io_wr    = s_wr && c_region == REG_CPUIO;
    dreg_wr  = s_wr && (c_region == REG_CPUIO || c_region == REG_DMA);
    // work RAM
    if (cpu_halt) begin
      w_addr = d_wram_addr; w_wdata = d_wdata;
      w_rd = d_go && d_rd && d_region == REG_WRAM;
      w_wr = d_go && d_wr && d_region == REG_WRAM;
    end else begin
      w_addr = c_wram_addr; w_wdata = c_wdata;
      w_rd = s_rd && c_region == REG_WRAM;
      w_wr = s_wr && c_region == REG_WRAM;
    end
    // B-bus
    if (cpu_halt) begin
      b_addr = d_baddr; b_wdata = d_bwdata;
      b_rd = d_go && d_brd; b_wr = d_go && d_bwr;
    end else begin
      b_addr = c_bbus_addr; b_wdata = c_wdata;
      b_rd = s_rd && c_region == REG_BBUS;
      b_wr = s_wr && c_region == REG_BBUS;
    end
    b_rdata = ppu_bsel ? ppu_rdata : apu_bsel ? apu_rdata : 8'h00;
    // cartridge
    if (d_cart_req && cst == C_IDLE) begin
      k_addr = d_addr; k_wdata = d_wdata; k_speed = d_speed;
      k_rd = d_rd && !k_busy && !k_ready; k_wr = d_wr && !k_busy && !k_ready;
      k_sel = 1'b1;
    end else begin
      k_addr = c_addr; k_wdata = c_wdata; k_speed = c_speed;
      k_rd = s_rd && c_region == REG_CART; k_wr = s_wr && c_region == REG_CART;
      k_sel = c_region == REG_CART;
    end
    // CPU read data of register targets, valid in the strobe cycle
    case (c_region)
      REG_CPUIO: c_rdata = io_rdata;
      REG_DMA:   c_rdata = dma_rdata;
      REG_BBUS:  c_rdata = b_rdata;
      default:   c_rdata = 8'h00;
    endcase
    // DMA A-bus read data, one cycle after the read
    case (d_region_q)
      REG_WRAM:  d_rdata = wram_rdata;
      REG_CART:  d_rdata = k_rdata;
      default:   d_rdata = d_reg_q;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cst <= C_IDLE; c_addr <= '0; c_wdata <= '0; c_rd <= 1'b0; c_wr <= 1'b0; c_cnt <= '0;
      c_cart <= 1'b0; cpu_rdata <= '0; cpu_ready <= 1'b0;
      d_region_q <= REG_OPEN; d_reg_q <= '0; d_brdata <= '0;
      k_owner_dma <= 1'b0; k_owner_addr <= '0;
    end else begin
      cpu_ready <= 1'b0;
      case (cst)
        C_IDLE: if ((cpu_rd || cpu_wr) && !cpu_halt) begin
          c_addr <= cpu_addr; c_wdata <= cpu_wdata; c_rd <= cpu_rd; c_wr <= cpu_wr;
          cst <= C_STROBE;
        end
        C_STROBE: begin
          c_cnt  <= speed_cycles(c_speed) - 4'd2;
          c_cart <= c_region == REG_CART;
          if (c_region == REG_CPUIO || c_region == REG_DMA || c_region == REG_BBUS)
            cpu_rdata <= c_rdata;
          else
            cpu_rdata <= 8'hFF;    // open bus; WRAM and cartridge data follow
          cst <= C_WAIT;
        end
        C_WAIT: begin
          if (c_region == REG_WRAM && c_cnt == speed_cycles(c_speed) - 4'd2) cpu_rdata <= wram_rdata;
          if (c_cart) begin
            if (k_ready && !k_owner_dma) begin
              if (c_rd) cpu_rdata <= k_rdata;
              cst <= C_DONE; cpu_ready <= 1'b1;
            end
          end else begin
            c_cnt <= c_cnt - 1'b1;
            if (c_cnt <= 4'd1) begin cst <= C_DONE; cpu_ready <= 1'b1; end
          end
        end
        C_DONE: cst <= C_IDLE;
        default: cst <= C_IDLE;
      endcase
      // DMA read data registers
      if (d_go) d_region_q <= d_region;
      if (d_go && d_rd) d_reg_q <= (d_region == REG_CPUIO) ? io_rdata :
                                   (d_region == REG_DMA) ? dma_rdata : 8'hFF;
      if (cpu_halt && b_rd) d_brdata <= b_rdata;
      if (k_rd || k_wr) begin k_owner_dma <= d_cart_req && cst == C_IDLE; k_owner_addr <= k_addr; end
    end
  end

  // ------------------------------------------------------------- blocks
  wram u_wram (.clk, .addr(w_addr), .rd(w_rd), .wr(w_wr), .wdata(w_wdata), .rdata(wram_rdata));

  cpu_io #(.H_DOTS(H_DOTS), .V_LINES(V_LINES), .JOY_HALF(JOY_HALF), .H_VISIBLE(H_RES), .V_VISIBLE(V_RES)) u_io (
    .clk, .rst, .dot_ce, .reg_wr(io_wr), .reg_rd(io_rd), .reg_addr(io_addr), .reg_wdata(io_wdata),
    .reg_rdata(io_rdata), .hv_latch, .rdio_in, .wrio_out, .cart_irq_n, .nmi_n, .irq_n, .fast,
    .hcount, .vcount, .hlat, .vlat, .hblank, .vblank, .hblank_start, .vblank_start, .frame_start,
    .ctx1, .ctx2, .col, .cclk1, .cclk2);

  dma_hdma u_dma (
    .clk, .rst, .reg_wr(dreg_wr), .reg_addr(c_addr[15:0]), .reg_wdata(c_wdata), .reg_rdata(dma_rdata),
    .frame_start, .hblank_start,
    .a_addr(d_addr), .a_rd(d_rd), .a_wr(d_wr), .a_wdata(d_wdata), .a_rdata(d_rdata), .a_wait(d_wait),
    .b_addr(d_baddr), .b_rd(d_brd), .b_wr(d_bwr), .b_wdata(d_bwdata), .b_rdata(d_brdata),
    .halt(cpu_halt), .dma_active, .hdma_active);

  cart_if u_cart (
    .clk, .rst, .rd(k_rd), .wr(k_wr), .addr(k_addr), .wdata(k_wdata), .sel(k_sel), .speed(k_speed),
    .rdata(k_rdata), .ready(k_ready), .busy(k_busy),
    .cart_addr, .cart_n, .rd_n(cart_rd_n), .wr_n(cart_wr_n), .ddir(cart_ddir), .dout(cart_dout),
    .din(cart_din), .rst_n(cart_rst_n));

  ppu_top #(.H_RES(H_RES), .V_RES(V_RES)) u_ppu (
    .clk, .rst, .b_addr, .b_wr, .b_rd, .b_wdata, .b_rdata(ppu_rdata), .b_sel(ppu_bsel),
    .hlat, .vlat, .hv_latch, .frame_start, .busy(ppu_busy),
    .pix_valid, .pix_x, .pix_y, .pix_rgb, .pix_layer, .frame_done);

  apu_ports u_apu (
    .clk, .rst, .b_addr, .b_wr, .b_wdata, .b_rdata(apu_rdata), .b_sel(apu_bsel),
    .spc_port, .spc_wr(spc_port_wr), .spc_wdata(spc_port_wdata), .spc_rdata(spc_port_rdata));

  logic [15:0] dsp_baddr;
  logic        dsp_brd, dsp_bwr;
  logic [7:0]  dsp_bwdata, dsp_brdata;
  logic        echo_done;

  aram u_aram (
    .clk, .a_addr(spc_addr), .a_rd(spc_rd), .a_wr(spc_wr), .a_wdata(spc_wdata), .a_rdata(spc_rdata),
    .b_addr(dsp_baddr), .b_rd(dsp_brd), .b_wr(dsp_bwr), .b_wdata(dsp_bwdata), .b_rdata(dsp_brdata));

  dsp_top #(.SAMPLE_CYCLES(SAMPLE_CYCLES)) u_dsp (
    .clk, .rst, .reg_addr(dsp_addr), .reg_wr(dsp_wr), .reg_wdata(dsp_wdata), .reg_rdata(dsp_rdata),
    .b_addr(dsp_baddr), .b_rd(dsp_brd), .b_wr(dsp_bwr), .b_wdata(dsp_bwdata), .b_rdata(dsp_brdata),
    .left(audio_l), .right(audio_r), .sample_valid(audio_valid), .echo_done);
endmodule
