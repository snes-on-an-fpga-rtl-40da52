// dma_hdma_tb: drives the DMA/HDMA engine through its register port with
// an A-bus memory model and a B-bus register model (both one cycle of read
// latency) and compares every bus write against a reference list built
// from the register settings: A->B and B->A DMA, all five address
// patterns, increment/decrement/fixed, channel priority, direct and
// indirect HDMA with repeat and non-repeat line counts, HDMA priority over
// a running DMA, and the two-cycle-per-byte DMA rate.
module dma_hdma_tb;
  import snes_pkg::*;
  logic clk = 0, rst = 1, reg_wr = 0, fs = 0, hbs = 0;
  logic [15:0] reg_addr;
  logic [7:0] reg_wdata, reg_rdata;
  logic [23:0] a_addr; logic a_rd, a_wr; logic [7:0] a_wdata, a_rdata;
  logic [7:0] b_addr; logic b_rd, b_wr; logic [7:0] b_wdata, b_rdata;
  logic halt, dact, hact;
  logic [7:0] amem [int];
  logic [7:0] bmem [256];
  logic [15:0] bq [$];   // {addr,data} of B writes
  logic [31:0] aq [$];   // {addr,data} of A writes
  int checks = 0, failures = 0, n_hdma_during_dma = 0;

  dma_hdma dut (.clk, .rst, .reg_wr, .reg_addr, .reg_wdata, .reg_rdata, .frame_start(fs),
    .hblank_start(hbs), .a_addr, .a_rd, .a_wr, .a_wdata, .a_rdata, .a_wait(1'b0), .b_addr, .b_rd, .b_wr,
    .b_wdata, .b_rdata, .halt, .dma_active(dact), .hdma_active(hact));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (a_rd) a_rdata <= amem.exists(int'(a_addr)) ? amem[int'(a_addr)] : 8'hEE;
    if (b_rd) b_rdata <= bmem[b_addr];
    if (a_wr) begin amem[int'(a_addr)] = a_wdata; aq.push_back({a_addr, a_wdata}); end
    if (b_wr) begin bmem[b_addr] <= b_wdata; bq.push_back({b_addr, b_wdata}); end
    if (hact && dact) n_hdma_during_dma++;
  end
  initial begin #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  task automatic wreg(input logic [15:0] a, input logic [7:0] d);
    reg_addr = a; reg_wdata = d; reg_wr = 1; @(posedge clk); #1 reg_wr = 0;
  endtask
  task automatic setup(input int c, input logic [7:0] ctrl, input logic [7:0] bb,
                       input logic [23:0] aa, input logic [15:0] cnt);
    logic [15:0] base = 16'h4300 + 16'(c * 16);
    wreg(base + 0, ctrl); wreg(base + 1, bb);
    wreg(base + 2, aa[7:0]); wreg(base + 3, aa[15:8]); wreg(base + 4, aa[23:16]);
    wreg(base + 5, cnt[7:0]); wreg(base + 6, cnt[15:8]);
  endtask
  task automatic wait_idle(output int cyc);
    cyc = 0;
    while (halt) begin @(posedge clk); #1 cyc++; end
  endtask

  // reference for an A->B DMA
  task automatic exp_dma(input logic [7:0] ctrl, input logic [7:0] bb, input logic [23:0] aa,
                         input int n, inout logic [15:0] ex [$]);
    logic [15:0] ad = aa[15:0];
    for (int i = 0; i < n; i++) begin
      ex.push_back({bb + 8'(dma_offset(ctrl[2:0], 2'(i))), amem[int'({aa[23:16], ad})]});
      if (!ctrl[3]) ad = ctrl[4] ? ad - 1 : ad + 1;
    end
  endtask

  task automatic cmp_b(input logic [15:0] ex [$], input string m);
    chk(bq.size() == ex.size(), {m, " count"});
    for (int i = 0; i < ex.size() && i < bq.size(); i++)
      if (bq[i] != ex[i]) begin chk(0, $sformatf("%s byte %0d: %h vs %h", m, i, bq[i], ex[i])); break; end
    checks++;
  endtask

  initial begin
    logic [15:0] ex [$];
    int cyc;
    for (int i = 0; i < 'h400; i++) amem['h7E1000 + i] = 8'($urandom);
    foreach (bmem[i]) bmem[i] = 8'(i ^ 8'hA5);
    reg_addr = 0; reg_wdata = 0; a_rdata = 0; b_rdata = 0;
    repeat (2) @(posedge clk); #1 rst = 0;

    // 1) each mode, A->B, increment/decrement/fixed, one channel at a time
    for (int m = 0; m < 8; m++) begin
      logic [7:0] ctrl = {3'b000, 2'(m % 3 == 1 ? 2 : m % 3 == 2 ? 1 : 0), 3'(m)};
      bq.delete(); ex.delete();
      setup(3, ctrl, 8'h18, 24'h7E1100, 16'd37);
      exp_dma(ctrl, 8'h18, 24'h7E1100, 37, ex);
      wreg(16'h420B, 8'h08);
      wait_idle(cyc);
      cmp_b(ex, $sformatf("mode %0d", m));
      chk(cyc <= 2 * 37 + 3 && cyc >= 2 * 37, $sformatf("rate %0d cycles", cyc));
    end
    // 2) two channels started together: channel 1 before channel 5
    bq.delete(); ex.delete();
    setup(5, 8'h01, 8'h22, 24'h7E1200, 16'd10);
    setup(1, 8'h00, 8'h04, 24'h7E1300, 16'd6);
    exp_dma(8'h00, 8'h04, 24'h7E1300, 6, ex);
    exp_dma(8'h01, 8'h22, 24'h7E1200, 10, ex);
    wreg(16'h420B, 8'h22);
    wait_idle(cyc);
    cmp_b(ex, "priority");
    // 3) B->A
    aq.delete();
    setup(2, 8'h81, 8'h39, 24'h7E0100, 16'd8);
    wreg(16'h420B, 8'h04);
    wait_idle(cyc);
    chk(aq.size() == 8, "b->a count");
    for (int i = 0; i < 8 && i < aq.size(); i++)
      chk(aq[i] == {24'h7E0100 + 24'(i), bmem[8'h39 + 8'(i % 2)]}, $sformatf("b->a byte %0d", i));

    // 4) HDMA: ch0 direct mode 0 (non-repeat 3 lines, then repeat 2 lines, end),
    //          ch4 indirect mode 1 (repeat 4 lines, end)
    amem['h7E2000] = 8'h03; amem['h7E2001] = 8'h11;
    amem['h7E2002] = 8'h82; amem['h7E2003] = 8'h22; amem['h7E2004] = 8'h33;
    amem['h7E2005] = 8'h00;
    amem['h7E3000] = 8'h84; amem['h7E3001] = 8'h00; amem['h7E3002] = 8'h40; amem['h7E3003] = 8'h00;
    for (int i = 0; i < 8; i++) amem['h7F4000 + i] = 8'(8'h60 + i);
    setup(0, 8'h00, 8'h21, 24'h7E2000, 16'd0);
    setup(4, 8'h41, 8'h0D, 24'h7E3000, 16'd0);
    wreg(16'h4347, 8'h7F);
    wreg(16'h420C, 8'h11);
    bq.delete(); ex.delete();
    fs = 1; @(posedge clk); #1 fs = 0;
    wait_idle(cyc);
    for (int line = 0; line < 8; line++) begin
      if (line == 0) ex.push_back({8'h21, 8'h11});
      if (line == 3 || line == 4) ex.push_back({8'h21, line == 3 ? 8'h22 : 8'h33});
      if (line < 4) begin
        ex.push_back({8'h0D, 8'(8'h60 + 2 * line)});
        ex.push_back({8'h0E, 8'(8'h61 + 2 * line)});
      end
      hbs = 1; @(posedge clk); #1 hbs = 0;
      repeat (2) @(posedge clk); #1;
      wait_idle(cyc);
    end
    cmp_b(ex, "hdma");
    // 5) HDMA line interrupts a running DMA, which then resumes
    wreg(16'h420C, 8'h01);
    amem['h7E2000] = 8'h81;
    fs = 1; @(posedge clk); #1 fs = 0;
    wait_idle(cyc);
    bq.delete(); ex.delete();
    setup(6, 8'h00, 8'h80, 24'h7E1000, 16'd40);
    wreg(16'h420B, 8'h40);
    repeat (10) @(posedge clk); #1 hbs = 1; @(posedge clk); #1 hbs = 0;
    wait_idle(cyc);
    chk(n_hdma_during_dma > 0, "hdma ran during dma");
    begin
      int nh = 0, nd = 0;
      foreach (bq[i]) if (bq[i][15:8] == 8'h21) nh++; else if (bq[i][15:8] == 8'h80) nd++;
      chk(nh == 1 && nd == 40, $sformatf("hdma/dma mix %0d %0d", nh, nd));
    end
    // register read-back
    reg_addr = 16'h4361; #1 chk(reg_rdata == 8'h80, "readback");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
