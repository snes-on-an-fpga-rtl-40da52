// snes_top_tb: end-to-end test of the console logic at a reduced screen size (40 x 20 dots, 16 x 8 pixels).
//
// The testbench plays the part of the 65C816 core (bus reads and writes
// through the CPU port), of the SPC700 (sound RAM, APU ports and DSP
// registers), of a cartridge ROM (byte = low ^ middle ^ bank address byte)
// and of two controllers. It checks: work RAM read-back and its 2.68 MHz
// access time; I/O register and B-bus access times; cartridge reads at
// both speeds of banks 80-FF (mode switch through 420D) and a cartridge
// write strobe; the multiplier and divider; the NMI flag at vertical blank
// and the V-timer IRQ, each cleared by its read; the automatic controller
// read; the four APU ports in both directions; a general DMA from
// cartridge ROM into VRAM (mode 1, read back through 2139/213A) and one
// from the APU ports into work RAM (B-bus to A-bus); HDMA writing one
// byte per line from a work RAM table; a rendered PPU frame (every pixel
// present, colour from CGRAM); DSP samples with one voice and with echo.
// Each of these mechanisms is counted, and one that never happened counts
// as a failure.
module snes_top_tb;
  import snes_pkg::*;
  localparam int HR = 16, VR = 8, SC = 768;
  logic clk = 0, rst = 1;
  logic [23:0] cpu_addr = 0; logic cpu_rd = 0, cpu_wr = 0; logic [7:0] cpu_wdata = 0, cpu_rdata;
  logic cpu_ready, cpu_halt, nmi_n, irq_n;
  logic [23:0] cart_addr; logic cart_n, cart_rd_n, cart_wr_n, cart_ddir, cart_rst_n;
  logic [7:0] cart_dout, cart_din; logic cart_irq_n = 1'b1;
  logic ctx1, ctx2, col, cclk1, cclk2; logic [7:0] rdio_in = 8'h5A, wrio_out;
  logic [15:0] spc_addr = 0; logic spc_rd = 0, spc_wr = 0; logic [7:0] spc_wdata = 0, spc_rdata;
  logic [1:0] spc_port = 0; logic spc_port_wr = 0; logic [7:0] spc_port_wdata = 0, spc_port_rdata;
  logic [6:0] dsp_addr = 0; logic dsp_wr = 0; logic [7:0] dsp_wdata = 0, dsp_rdata;
  logic signed [15:0] audio_l, audio_r; logic audio_valid;
  logic pix_valid, frame_done; logic [8:0] pix_x, pix_y; logic [14:0] pix_rgb;
  int checks = 0, failures = 0;

  snes_top #(.H_DOTS(40), .V_LINES(20), .H_RES(16), .V_RES(8), .JOY_HALF(4)) dut (.*);
  always #5 clk = ~clk;

  // cartridge ROM
  function automatic logic [7:0] rom(input logic [23:0] a);
    return a[7:0] ^ a[15:8] ^ a[23:16];
  endfunction
  assign cart_din = (!cart_n && !cart_rd_n) ? rom(cart_addr) : 8'hFF;
  int n_cart_wr = 0;
  always @(posedge clk) if (!rst && !cart_wr_n && $past(cart_wr_n)) n_cart_wr++;

  // controllers: shift registers loaded while the latch is high
  logic [15:0] pad1 = 16'hA5C3, pad2 = 16'h3C18, s1, s2;
  always @(posedge clk) if (col) begin s1 <= ~pad1; s2 <= ~pad2; end
  always @(posedge cclk1) if (!col) s1 <= {s1[14:0], 1'b1};
  always @(posedge cclk2) if (!col) s2 <= {s2[14:0], 1'b1};
  assign ctx1 = s1[15];
  assign ctx2 = s2[15];

  // mechanism counters
  int n_nmi = 0, n_irq = 0, n_dma_bytes = 0, n_hdma_bytes = 0, n_frames = 0, n_pixels = 0;
  int n_samples = 0, n_echo = 0, n_joy = 0, n_mul = 0, n_div = 0, n_cart_rd = 0, n_speed = 0;
  int n_wram = 0, n_ports = 0, n_dma_ba = 0, n_halted_cpu = 0;
  logic nmi_q = 1, irq_q = 1;
  always @(posedge clk) begin
    nmi_q <= nmi_n; irq_q <= irq_n;
    if (!rst && nmi_q && !nmi_n) n_nmi++;
    if (!rst && irq_q && !irq_n) n_irq++;
    if (!rst && dut.u_dma.dma_active && dut.b_wr) n_dma_bytes++;
    if (!rst && dut.u_dma.hdma_active && dut.b_wr) n_hdma_bytes++;
    if (!rst && frame_done) n_frames++;
    if (!rst && pix_valid) n_pixels++;
    if (!rst && audio_valid) n_samples++;
    if (!rst && dut.u_dsp.echo_done) n_echo++;
    if (!rst && cpu_halt && (cpu_rd || cpu_wr)) n_halted_cpu++;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // CPU bus cycle; returns the read data and the cycle count
  task automatic bus(input logic [23:0] a, input logic w, input logic [7:0] d, output logic [7:0] q, output int cyc);
    @(negedge clk);
    while (cpu_halt) @(negedge clk);
    cpu_addr = a; cpu_wdata = d; cpu_rd = !w; cpu_wr = w;
    @(negedge clk); cpu_rd = 0; cpu_wr = 0; cyc = 1;
    while (!cpu_ready) begin @(negedge clk); cyc++; end
    q = cpu_rdata;
  endtask
  task automatic wr(input logic [23:0] a, input logic [7:0] d);
    logic [7:0] q; int c; bus(a, 1'b1, d, q, c);
  endtask
  task automatic rd(input logic [23:0] a, output logic [7:0] q);
    int c; bus(a, 1'b0, 8'h00, q, c);
  endtask
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic dsp_w(input logic [6:0] a, input logic [7:0] d);
    @(negedge clk); dsp_addr = a; dsp_wdata = d; dsp_wr = 1; @(negedge clk); dsp_wr = 0;
  endtask
  task automatic aram_w(input logic [15:0] a, input logic [7:0] d);
    @(negedge clk); spc_addr = a; spc_wdata = d; spc_wr = 1; @(negedge clk); spc_wr = 0;
  endtask

  initial begin
    logic [7:0] q, q2;
    int c;
    repeat (4) @(posedge clk);
    rst <= 0;
    repeat (4) @(posedge clk);

    // work RAM in bank 7E/7F and its mirror in bank 00, 2.68 MHz
    for (int i = 0; i < 16; i++) wr({8'h7E + 8'(i & 1), 16'(i * 4099)}, 8'(i * 37 + 1));
    for (int i = 0; i < 16; i++) begin
      bus({8'h7E + 8'(i & 1), 16'(i * 4099)}, 1'b0, 8'h00, q, c);
      check(q == 8'(i * 37 + 1), "work RAM read-back"); check(c == 8, "work RAM access time");
      n_wram++;
    end
    wr(24'h00_0123, 8'h77); rd(24'h7E_0123, q); check(q == 8'h77, "low RAM mirror");
    // register access times: I/O 3.58 MHz, serial controller ports 1.79 MHz
    bus(24'h00_4213, 1'b0, 8'h00, q, c); check(q == 8'h5A && c == 6, "RDIO read and time");
    bus(24'h00_4016, 1'b0, 8'h00, q, c); check(c == 12, "1.79 MHz region time");
    bus(24'h00_2140, 1'b0, 8'h00, q, c); check(c == 6, "B-bus time");
    wr(24'h00_4201, 8'hC6); check(wrio_out == 8'hC6, "WRIO output");

    // cartridge ROM, and the 420D speed switch for banks 80-FF
    for (int i = 0; i < 8; i++) begin
      logic [23:0] a;
      a = {8'(i * 3), 1'b1, 15'($urandom)};
      rd(a, q); check(q == rom(a), "cartridge ROM read"); n_cart_rd++;
    end
    bus(24'h80_9000, 1'b0, 8'h00, q, c); check(q == rom(24'h80_9000), "bank 80 read");
    begin int slow; slow = c;
      wr(24'h00_420D, 8'h01);
      bus(24'h80_9000, 1'b0, 8'h00, q, c); check(q == rom(24'h80_9000), "bank 80 fast read");
      check(c == slow - 2, "fast ROM is 2 master cycles shorter"); n_speed++;
      bus(24'h00_9000, 1'b0, 8'h00, q, c); check(c == slow, "bank 00 stays slow");
    end
    wr(24'h70_0000, 8'h99); check(n_cart_wr == 1, "cartridge write strobe");

    // multiplier and divider
    for (int i = 0; i < 6; i++) begin
      logic [7:0] a, b; logic [15:0] dv; logic [7:0] ds;
      a = 8'($urandom); b = 8'($urandom);
      wr(24'h00_4202, a); wr(24'h00_4203, b);
      rd(24'h00_4212, q);
      rd(24'h00_4216, q); rd(24'h00_4217, q2);
      check({q2, q} == 16'(a) * 16'(b), "multiply"); n_mul++;
      dv = 16'($urandom); ds = 8'($urandom_range(1, 255));
      wr(24'h00_4204, dv[7:0]); wr(24'h00_4205, dv[15:8]); wr(24'h00_4206, ds);
      repeat (3) rd(24'h00_4212, q);
      rd(24'h00_4214, q); rd(24'h00_4215, q2); check({q2, q} == dv / 16'(ds), "quotient");
      rd(24'h00_4216, q); rd(24'h00_4217, q2); check({q2, q} == dv % 16'(ds), "remainder"); n_div++;
    end

    // APU ports both ways
    wr(24'h00_2141, 8'h3E); spc_port = 2'd1; #1; check(spc_port_rdata == 8'h3E, "port 1 to SPC700");
    @(negedge clk); spc_port = 2'd2; spc_port_wdata = 8'hD4; spc_port_wr = 1; @(negedge clk); spc_port_wr = 0;
    rd(24'h00_2142, q); check(q == 8'hD4, "port 2 to CPU"); n_ports++;

    // NMI at vertical blank, V-timer IRQ, automatic controller read
    wr(24'h00_4209, 8'(VR / 2)); wr(24'h00_420A, 8'h00);
    wr(24'h00_4200, 8'hA1);
    wait (!nmi_n);
    rd(24'h00_4210, q); check(q[7] == 1'b1, "NMI flag set");
    rd(24'h00_4210, q); check(q[7] == 1'b0, "NMI flag cleared by read");
    do rd(24'h00_4212, q); while (q[0]);
    rd(24'h00_4218, q); rd(24'h00_4219, q2); check({q2, q} == pad1, "controller 1");
    rd(24'h00_421A, q); rd(24'h00_421B, q2); check({q2, q} == pad2, "controller 2"); n_joy++;
    wait (!irq_n);
    rd(24'h00_4211, q); check(q[7] == 1'b1, "IRQ flag set");
    #1; check(irq_n == 1'b1, "IRQ line released after read");
    wr(24'h00_4200, 8'h00);

    // general DMA: cartridge ROM 01:8000, 32 bytes, mode 1 -> VRAM word 0x0400
    wr(24'h00_2100, 8'h80);
    wr(24'h00_2115, 8'h80); wr(24'h00_2116, 8'h00); wr(24'h00_2117, 8'h04);
    wr(24'h00_4300, 8'h01); wr(24'h00_4301, 8'h18);
    wr(24'h00_4302, 8'h00); wr(24'h00_4303, 8'h80); wr(24'h00_4304, 8'h01);
    wr(24'h00_4305, 8'd32); wr(24'h00_4306, 8'h00);
    wr(24'h00_420B, 8'h01);
    rd(24'h00_4305, q); check(q == 8'h00, "DMA count exhausted");
    wr(24'h00_2116, 8'h00); wr(24'h00_2117, 8'h04);
    for (int i = 0; i < 16; i++) begin
      rd(24'h00_2139, q); rd(24'h00_213A, q2);
      check(q == rom(24'h01_8000 + 24'(2 * i)) && q2 == rom(24'h01_8001 + 24'(2 * i)), "DMA ROM -> VRAM");
      if (q != rom(24'h01_8000 + 24'(2 * i)) || q2 != rom(24'h01_8001 + 24'(2 * i)))
        $display("  word %0d: %h %h", i, q2, q);
    end
    // general DMA from the APU ports to work RAM (B-bus -> A-bus, mode 4)
    for (int p = 0; p < 4; p++) begin
      @(negedge clk); spc_port = 2'(p); spc_port_wdata = 8'(8'h60 + p); spc_port_wr = 1; @(negedge clk); spc_port_wr = 0;
    end
    wr(24'h00_4310, 8'h84); wr(24'h00_4311, 8'h40);
    wr(24'h00_4312, 8'h00); wr(24'h00_4313, 8'h20); wr(24'h00_4314, 8'h7E);
    wr(24'h00_4315, 8'd8); wr(24'h00_4316, 8'h00);
    wr(24'h00_420B, 8'h02);
    for (int i = 0; i < 8; i++) begin
      rd(24'h7E_2000 + 24'(i), q); check(q == 8'(8'h60 + (i % 4)), "DMA ports -> work RAM");
    end
    n_dma_ba++;

    // PPU: backdrop colour, screen on; HDMA to APU port 3, one byte per line
    wr(24'h00_2121, 8'h00); wr(24'h00_2122, 8'hEF); wr(24'h00_2122, 8'h3D);
    wr(24'h00_212C, 8'h00); wr(24'h00_2131, 8'h00); wr(24'h00_2130, 8'h00);
    wr(24'h00_2100, 8'h0F);
    wr(24'h7E_3000, 8'h01); wr(24'h7E_3001, 8'hA1);
    wr(24'h7E_3002, 8'h01); wr(24'h7E_3003, 8'hA2);
    wr(24'h7E_3004, 8'h01); wr(24'h7E_3005, 8'hA3);
    wr(24'h7E_3006, 8'h00);
    wr(24'h00_4320, 8'h00); wr(24'h00_4321, 8'h43);
    wr(24'h00_4322, 8'h00); wr(24'h00_4323, 8'h30); wr(24'h00_4324, 8'h7E);
    wr(24'h00_420C, 8'h04);
    begin int px0, fr0, bad;
      fr0 = n_frames; bad = 0;
      while (n_frames < fr0 + 1) @(posedge clk);
      px0 = n_pixels; fr0 = n_frames;
      while (n_frames < fr0 + 1) begin
        @(posedge clk);
        if (pix_valid && pix_rgb != 15'h3DEF) bad++;
      end
      check(bad == 0, "PPU pixels show the backdrop colour");
      check(n_pixels - px0 == HR * VR, "PPU pixels per frame");
    end
    begin int h0;
      @(posedge dut.frame_start); h0 = n_hdma_bytes;
      @(posedge dut.frame_start);
      check(n_hdma_bytes - h0 == 3, "HDMA one byte per line for three lines");
      spc_port = 2'd3; #1; check(spc_port_rdata == 8'hA3, "HDMA last table value");
    end
    wr(24'h00_420C, 8'h00);

    // DSP: a looping block in sound RAM played on voice 0, then with echo
    aram_w(16'h0200, 8'h00); aram_w(16'h0201, 8'h03); aram_w(16'h0202, 8'h00); aram_w(16'h0203, 8'h03);
    aram_w(16'h0300, 8'hC3);
    for (int i = 1; i < 9; i++) aram_w(16'h0300 + 16'(i), 8'h11);
    dsp_w(7'h6C, 8'h20); dsp_w(7'h0C, 8'd127); dsp_w(7'h1C, 8'd127); dsp_w(7'h5D, 8'h02);
    dsp_w(7'h00, 8'd64); dsp_w(7'h01, 8'd32); dsp_w(7'h02, 8'h00); dsp_w(7'h03, 8'h10);
    dsp_w(7'h04, 8'h00); dsp_w(7'h05, 8'h00); dsp_w(7'h07, 8'h7F);
    dsp_w(7'h4C, 8'h01);
    repeat (30) @(posedge audio_valid);
    @(negedge clk);
    check(audio_l == 16'sd1008 && audio_r == 16'sd504, "DSP one voice");
    dsp_w(7'h4D, 8'h01); dsp_w(7'h6D, 8'h80); dsp_w(7'h7D, 8'h00); dsp_w(7'h7F, 8'd127);
    dsp_w(7'h2C, 8'd127); dsp_w(7'h3C, 8'd127); dsp_w(7'h6C, 8'h00);
    repeat (10) @(posedge audio_valid);
    @(negedge clk);
    check(audio_l == 16'sd2008 && audio_r == 16'sd1004, "DSP with echo");
    @(negedge clk); spc_addr = 16'h8000; spc_rd = 1; @(negedge clk); spc_rd = 0; @(negedge clk);
    check(spc_rdata == 8'hF8, "echo buffer holds the voice's left sample (1016 = 0x03F8)");

    // every mechanism happened
    check(n_wram > 0, "mechanism: work RAM access");
    check(n_cart_rd > 0, "mechanism: cartridge read");
    check(n_cart_wr > 0, "mechanism: cartridge write");
    check(n_speed > 0, "mechanism: 420D speed switch");
    check(n_mul > 0, "mechanism: multiply");
    check(n_div > 0, "mechanism: divide");
    check(n_ports > 0, "mechanism: APU ports");
    check(n_nmi > 0, "mechanism: NMI");
    check(n_irq > 0, "mechanism: timer IRQ");
    check(n_joy > 0, "mechanism: controller read");
    check(n_dma_bytes > 0, "mechanism: DMA A->B");
    check(n_dma_ba > 0, "mechanism: DMA B->A");
    check(n_hdma_bytes > 0, "mechanism: HDMA");
    check(n_frames > 0, "mechanism: PPU frame");
    check(n_samples > 0, "mechanism: DSP sample");
    check(n_echo > 0, "mechanism: echo");
    $display("mechanisms: wram=%0d cart_rd=%0d cart_wr=%0d speed=%0d mul=%0d div=%0d ports=%0d nmi=%0d irq=%0d joy=%0d dma=%0d dma_ba=%0d hdma=%0d frames=%0d samples=%0d echo=%0d",
             n_wram, n_cart_rd, n_cart_wr, n_speed, n_mul, n_div, n_ports, n_nmi, n_irq, n_joy,
             n_dma_bytes, n_dma_ba, n_hdma_bytes, n_frames, n_samples, n_echo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
