// cpu_io_tb: exercises the 0x42xx register file through its register port:
// multiply and divide results, the NMI at vblank with read-to-clear, the
// vblank/hblank status bits, the H timer IRQ, the automatic joypad read
// from two controller models, and the memory speed bit.
module cpu_io_tb;
  logic clk = 0, rst = 1, dot_ce = 1, reg_wr = 0, reg_rd = 0, hv_latch = 0;
  logic [15:0] reg_addr;
  logic [7:0] reg_wdata, reg_rdata, wrio;
  logic nmi_n, irq_n, fast, hb, vb, hbs, vbs, fs, col, c1, c2;
  logic [8:0] hc, vc, hl, vl;
  logic [15:0] s1, s2;
  int checks = 0, failures = 0;
  cpu_io #(.JOY_HALF(4)) dut (.clk, .rst, .dot_ce, .reg_wr, .reg_rd, .reg_addr, .reg_wdata, .reg_rdata,
    .hv_latch, .rdio_in(8'h3C), .wrio_out(wrio), .cart_irq_n(1'b1), .nmi_n, .irq_n, .fast,
    .hcount(hc), .vcount(vc), .hlat(hl), .vlat(vl), .hblank(hb), .vblank(vb), .hblank_start(hbs),
    .vblank_start(vbs), .frame_start(fs), .ctx1(s1[15]), .ctx2(s2[15]), .col, .cclk1(c1), .cclk2(c2));
  always #5 clk = ~clk;
  always @(posedge clk) if (col) begin s1 <= ~16'hC3A0; s2 <= ~16'h1250; end
  always @(posedge c1) if (!col) s1 <= {s1[14:0], 1'b0};
  always @(posedge c2) if (!col) s2 <= {s2[14:0], 1'b0};
  initial begin #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  task automatic wreg(input logic [15:0] a, input logic [7:0] d);
    reg_addr = a; reg_wdata = d; reg_wr = 1; @(posedge clk); #1 reg_wr = 0;
  endtask
  task automatic rreg(input logic [15:0] a, output logic [7:0] d);
    reg_addr = a; reg_rd = 1; #1 d = reg_rdata; @(posedge clk); #1 reg_rd = 0;
  endtask
  initial begin
    logic [7:0] lo, hi;
    s1 = '1; s2 = '1; reg_addr = 0; reg_wdata = 0;
    repeat (2) @(posedge clk); #1 rst = 0;
    wreg(16'h4202, 8'd213); wreg(16'h4203, 8'd97);
    repeat (9) @(posedge clk); #1;
    rreg(16'h4216, lo); rreg(16'h4217, hi);
    chk({hi, lo} == 16'(213 * 97), "multiply");
    wreg(16'h4204, 8'h39); wreg(16'h4205, 8'hC1); wreg(16'h4206, 8'd23);
    repeat (17) @(posedge clk); #1;
    rreg(16'h4214, lo); rreg(16'h4215, hi);
    chk({hi, lo} == 16'h C139 / 16'd23, "quotient");
    rreg(16'h4216, lo); rreg(16'h4217, hi);
    chk({hi, lo} == 16'h C139 % 16'd23, "remainder");
    wreg(16'h420D, 8'h01); chk(fast, "fast");
    wreg(16'h4201, 8'h5A); chk(wrio == 8'h5A, "wrio");
    rreg(16'h4213, lo); chk(lo == 8'h3C, "rdio");
    // NMI + joypad + H timer at dot 100
    wreg(16'h4207, 8'd100); wreg(16'h4208, 8'd0);
    wreg(16'h4200, 8'h91);
    wait (vbs); @(posedge clk); #1;
    chk(!nmi_n, "nmi at vblank");
    rreg(16'h4212, lo); chk(lo[7] && lo[0], "vblank + joypad busy");
    rreg(16'h4210, lo); chk(lo[7], "4210 flag");
    chk(nmi_n, "nmi cleared");
    wait (!dut.joy_busy); @(posedge clk); #1;
    rreg(16'h4219, hi); rreg(16'h4218, lo); chk({hi, lo} == 16'hC3A0, "pad1");
    rreg(16'h421B, hi); rreg(16'h421A, lo); chk({hi, lo} == 16'h1250, "pad2");
    wait (hc == 200); rreg(16'h4211, lo);
    wait (!irq_n); #1 chk(hc == 101, "timer irq position");
    rreg(16'h4211, lo); chk(lo[7] && irq_n, "4211 clears");
    wait (hbs); @(posedge clk); #1 rreg(16'h4212, lo); chk(lo[6], "hblank flag");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
