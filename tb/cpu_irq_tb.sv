// cpu_irq_tb: checks NMI flag set at vblank, NMI line gating by the enable,
// read-to-clear of 0x4210 and 0x4211, and IRQ from timer and cartridge.
module cpu_irq_tb;
  logic clk = 0, rst = 1, nmi_en = 0, vbs = 0, hit = 0, cirq_n = 1, r10 = 0, r11 = 0;
  logic [7:0] d10, d11;
  logic nmi_n, irq_n;
  int checks = 0, failures = 0;
  cpu_irq dut (.clk, .rst, .nmi_en, .vblank_start(vbs), .timer_hit(hit), .cart_irq_n(cirq_n),
               .rd_4210(r10), .rd_4211(r11), .rdata_4210(d10), .rdata_4211(d11), .nmi_n, .irq_n);
  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  initial begin
    repeat (2) @(posedge clk); #1 rst = 0;
    chk(nmi_n && irq_n && d10[7] == 0, "idle");
    vbs = 1; @(posedge clk); #1 vbs = 0;
    chk(d10[7] == 1 && nmi_n == 1, "flag set, disabled");
    nmi_en = 1; #1 chk(nmi_n == 0, "nmi asserted");
    r10 = 1; @(posedge clk); #1 r10 = 0;
    chk(d10[7] == 0 && nmi_n == 1, "read clears");
    hit = 1; @(posedge clk); #1 hit = 0;
    chk(irq_n == 0 && d11[7] == 1, "timer irq");
    r11 = 1; @(posedge clk); #1 r11 = 0;
    chk(irq_n == 1 && d11[7] == 0, "timer irq cleared");
    cirq_n = 0; #1 chk(irq_n == 0, "cart irq");
    cirq_n = 1; #1 chk(irq_n == 1, "cart irq gone");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
