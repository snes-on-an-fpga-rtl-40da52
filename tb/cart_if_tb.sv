// cart_if_tb: connects the interface to a cartridge model (a ROM holding a
// game title at 0xFFC0 and a small save RAM at bank 0x70) and checks the
// strobes, the data direction, the captured bytes and the access length
// at both memory speeds.
module cart_if_tb;
  import snes_pkg::*;
  logic clk = 0, rst = 1, rd = 0, wr = 0, sel = 1, ready, busy;
  logic [23:0] addr, ca;
  logic [7:0] wdata, rdata, dout, din;
  logic cart_n, rd_n, wr_n, ddir, rst_n;
  speed_t speed;
  logic [7:0] rom [int];
  logic [7:0] sram [int];
  int checks = 0, failures = 0;
  string title = "Arcades Greatest Hits";
  cart_if dut (.clk, .rst, .rd, .wr, .addr, .wdata, .sel, .speed, .rdata, .ready, .busy,
               .cart_addr(ca), .cart_n, .rd_n, .wr_n, .ddir, .dout, .din, .rst_n);
  always #5 clk = ~clk;
  // cartridge model: ROM answers while /CART and /RD are low
  always_comb din = (!cart_n && !rd_n) ? (ca[23:16] == 8'h70 ? (sram.exists(int'(ca)) ? sram[int'(ca)] : 8'h00)
                                                             : (rom.exists(int'(ca)) ? rom[int'(ca)] : 8'hFF)) : 8'hZZ;
  always @(posedge clk) if (!wr_n && !cart_n && ddir) sram[int'(ca)] = dout;
  always @(posedge clk) if (!rst && !rd_n && ddir) begin failures++; $display("FAIL bus contention"); end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  task automatic access(input bit w, input logic [23:0] a, input logic [7:0] d, input speed_t s,
                        output logic [7:0] q, output int cyc);
    addr = a; wdata = d; speed = s; rd = !w; wr = w; cyc = 1;  // the request cycle counts
    @(posedge clk); #1 rd = 0; wr = 0;
    while (!ready) begin @(posedge clk); #1 cyc++; end
    q = rdata;
  endtask
  initial begin
    logic [7:0] q; int cyc;
    for (int i = 0; i < title.len(); i++) rom['h00FFC0 + i] = title[i];
    rom['h808000] = 8'h78;
    speed = SPD_268; addr = 0; wdata = 0;
    repeat (2) @(posedge clk); #1 rst = 0;
    @(posedge clk); #1 chk(rst_n && cart_n && rd_n && wr_n, "idle pins");
    for (int i = 0; i < title.len(); i++) begin
      access(0, 24'h00FFC0 + 24'(i), 0, SPD_268, q, cyc);
      chk(q == title[i], $sformatf("title byte %0d: %c", i, q));
      chk(cyc == 8, $sformatf("slow cycles %0d", cyc));
    end
    access(0, 24'h808000, 0, SPD_358, q, cyc);
    chk(q == 8'h78 && cyc == 6, "fast read");
    access(1, 24'h700010, 8'h5C, SPD_268, q, cyc);
    chk(sram[int'(24'h700010)] == 8'h5C, "write reached cartridge");
    access(0, 24'h700010, 0, SPD_268, q, cyc);
    chk(q == 8'h5C, "read back save RAM");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
