// ppu_regs_tb: writes and reads the PPU registers over the B-bus with VRAM,
// CGRAM and OAM models attached, and checks the VRAM address increments
// (1 and 32 words, after the low or the high byte), prefetched VRAM
// reads, two-write CGRAM colours, OAM addressing, two-write scroll
// registers, the decoded settings, the signed multiplier, the H/V latch
// and the write lock during active display.
module ppu_regs_tb;
  import ppu_pkg::*;
  logic clk = 0, rst = 1, b_wr = 0, b_rd = 0, lock = 0, b_sel, hv_latch;
  logic [7:0] b_addr, b_wdata, b_rdata;
  logic [14:0] v_addr; logic [1:0] v_we; logic [15:0] v_wdata, v_rdata; logic v_rd;
  logic [7:0] cg_waddr, cg_raddr; logic cg_we; logic [14:0] cg_wdata, cg_rdata;
  logic [9:0] oam_addr; logic oam_we; logic [7:0] oam_wdata, oam_rdata;
  ppu_cfg_t cfg;
  logic [15:0] vmem [32768];
  logic [14:0] cgm [256];
  logic [7:0] om [544];
  int checks = 0, failures = 0;
  ppu_regs dut (.clk, .rst, .b_addr, .b_wr, .b_rd, .b_wdata, .b_rdata, .b_sel, .lock, .hlat(9'h155),
    .vlat(9'h0AB), .hv_latch, .v_addr, .v_we, .v_wdata, .v_rd, .v_rdata, .cg_waddr, .cg_we, .cg_wdata,
    .cg_raddr, .cg_rdata, .oam_addr, .oam_we, .oam_wdata, .oam_rdata, .cfg);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (v_we[0]) vmem[v_addr][7:0] <= v_wdata[7:0];
    if (v_we[1]) vmem[v_addr][15:8] <= v_wdata[15:8];
    if (v_rd) v_rdata <= vmem[v_addr];
    if (cg_we) cgm[cg_waddr] <= cg_wdata;
    cg_rdata <= cgm[cg_raddr];
    if (oam_we) om[oam_addr] <= oam_wdata;
  end
  assign oam_rdata = om[oam_addr];
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  task automatic w(input logic [7:0] a, input logic [7:0] d);
    b_addr = a; b_wdata = d; b_wr = 1; @(posedge clk); #1 b_wr = 0;
  endtask
  task automatic r(input logic [7:0] a, output logic [7:0] d);
    b_addr = a; b_rd = 1; #1 d = b_rdata; @(posedge clk); #1 b_rd = 0;
  endtask
  initial begin
    logic [7:0] d, d2;
    foreach (vmem[i]) vmem[i] = 16'(i * 7);
    foreach (om[i]) om[i] = 0;
    b_addr = 0; b_wdata = 0;
    repeat (2) @(posedge clk); #1 rst = 0;
    // VRAM writes, increment 1 after the high byte
    w(8'h15, 8'h80); w(8'h16, 8'h34); w(8'h17, 8'h12);
    for (int i = 0; i < 4; i++) begin w(8'h18, 8'(8'h10 + i)); w(8'h19, 8'(8'hA0 + i)); end
    for (int i = 0; i < 4; i++) chk(vmem[15'h1234 + 15'(i)] == {8'(8'hA0 + i), 8'(8'h10 + i)}, $sformatf("vram inc1 %0d", i));
    // increment 32 after the low byte
    w(8'h15, 8'h01); w(8'h16, 8'h00); w(8'h17, 8'h20);
    for (int i = 0; i < 3; i++) w(8'h18, 8'(8'h55 + i));
    for (int i = 0; i < 3; i++) chk(vmem[15'h2000 + 15'(32 * i)][7:0] == 8'(8'h55 + i), $sformatf("vram inc32 %0d", i));
    // prefetched reads, increment after the high byte
    w(8'h15, 8'h80); w(8'h16, 8'h00); w(8'h17, 8'h30);
    repeat (2) @(posedge clk); #1;
    for (int i = 0; i < 3; i++) begin
      r(8'h39, d); r(8'h3A, d2); repeat (2) @(posedge clk); #1;
      chk({d2, d} == vmem[15'h3000 + 15'(i)], $sformatf("vram read %0d", i));
    end
    // lock drops memory writes
    lock = 1; w(8'h16, 8'h00); w(8'h17, 8'h40); w(8'h18, 8'hEE); w(8'h19, 8'hEE); lock = 0;
    chk(vmem[15'h4000] == 16'(15'h4000 * 7), "lock");
    // CGRAM
    w(8'h21, 8'h05); w(8'h22, 8'h34); w(8'h22, 8'h7A); w(8'h22, 8'hFF); w(8'h22, 8'h01);
    chk(cgm[5] == 15'h7A34 && cgm[6] == 15'h01FF, "cgram");
    w(8'h21, 8'h05); @(posedge clk); #1 r(8'h3B, d); @(posedge clk); #1 r(8'h3B, d2);
    chk({d2, d} == 16'h7A34, "cgram read");
    // OAM: word address 0x10 -> byte 0x20
    w(8'h02, 8'h10); w(8'h03, 8'h00); w(8'h04, 8'h11); w(8'h04, 8'h22);
    chk(om[32] == 8'h11 && om[33] == 8'h22, "oam write");
    w(8'h02, 8'h10); r(8'h38, d); r(8'h38, d2); chk(d == 8'h11 && d2 == 8'h22, "oam read");
    w(8'h03, 8'h01); w(8'h02, 8'h00); w(8'h04, 8'h99); chk(om[512] == 8'h99, "oam high table");
    // scroll registers and settings
    w(8'h0D, 8'h34); w(8'h0D, 8'h01); w(8'h14, 8'hFF); w(8'h14, 8'h03);
    chk(cfg.hofs[0] == 10'h134 && cfg.vofs[3] == 10'h3FF, "scroll");
    w(8'h05, 8'h19); w(8'h07, 8'hFD); w(8'h0B, 8'h21); w(8'h2C, 8'h13); w(8'h00, 8'h0F); w(8'h01, 8'hA3);
    chk(cfg.bg_mode == 1 && cfg.bg3_prio && cfg.bg_tile16 == 4'h1 && cfg.bg_sc[0] == 8'hFD &&
        cfg.bg_nba[0] == 4'h1 && cfg.bg_nba[1] == 4'h2 && cfg.tm == 5'h13 && !cfg.force_blank &&
        cfg.brightness == 15 && cfg.obj_size == 5 && cfg.obj_base == 3, "settings");
    w(8'h32, 8'hE5); w(8'h32, 8'h43); chk(cfg.fixed_color == {5'd5, 5'd3, 5'd5}, "fixed colour");
    // multiplier 0x1000 * (-128)
    w(8'h1B, 8'h00); w(8'h1B, 8'h10); w(8'h1C, 8'h05); w(8'h1C, 8'h80);
    r(8'h34, d); chk(d == 8'h00, "mpy lo"); r(8'h35, d); chk(d == 8'h00, "mpy mid"); r(8'h36, d); chk(d == 8'hF8, "mpy hi");
    // H/V latch
    b_addr = 8'h37; b_rd = 1; #1 chk(hv_latch, "latch strobe"); @(posedge clk); #1 b_rd = 0;
    r(8'h3C, d); r(8'h3C, d2); chk({d2[0], d} == 9'h155, "h counter");
    r(8'h3D, d); r(8'h3D, d2); chk({d2[0], d} == 9'h0AB, "v counter");
    b_addr = 8'h40; #1 chk(!b_sel, "decode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
