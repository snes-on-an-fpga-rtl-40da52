// joypad_if_tb: models two controllers as 16-bit shift registers (latched
// by COL, shifted on the rising clock edge, active-low data) and checks that
// the reader returns the button words and keeps busy for 16 bit periods.
module joypad_if_tb;
  localparam int HP = 4;
  logic clk = 0, rst = 1, en = 1, start = 0, col, c1, c2, busy;
  logic [15:0] p1, p2, b1, b2, s1, s2;
  int checks = 0, failures = 0;
  joypad_if #(.HALF_PERIOD(HP)) dut (.clk, .rst, .auto_en(en), .start, .ctx1(s1[15]), .ctx2(s2[15]),
               .col, .cclk1(c1), .cclk2(c2), .pad1(p1), .pad2(p2), .busy);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (col) begin s1 <= ~b1; s2 <= ~b2; end
  end
  always @(posedge c1) if (!col) s1 <= {s1[14:0], 1'b0};
  always @(posedge c2) if (!col) s2 <= {s2[14:0], 1'b0};
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    s1 = '1; s2 = '1;
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int t = 0; t < 20; t++) begin
      int cyc;
      cyc = 0;
      b1 = (t == 0) ? 16'h8000 : 16'($urandom) & 16'hFFF0;
      b2 = (t == 0) ? 16'h0010 : 16'($urandom) & 16'hFFF0;
      start = 1; @(posedge clk); #1 start = 0;
      while (busy) begin @(posedge clk); #1 cyc++; end
      checks++;
      if (p1 !== b1 || p2 !== b2) begin failures++; $display("FAIL %h %h got %h %h", b1, b2, p1, p2); end
      checks++;
      if (cyc != HP * 2 * 16) begin failures++; $display("FAIL cycles %0d", cyc); end
    end
    en = 0; b1 = 16'h1234; start = 1; @(posedge clk); #1 start = 0; @(posedge clk); #1;
    checks++; if (busy) begin failures++; $display("FAIL read while disabled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
