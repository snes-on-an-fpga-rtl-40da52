// cpu_mult_tb: checks the 8x8 multiplier against the arithmetic product for
// corner operands and random pairs, and that each product takes 8 cycles.
module cpu_mult_tb;
  logic clk = 0, rst = 1, start = 0, busy, done;
  logic [7:0] a, b;
  logic [15:0] p;
  int checks = 0, failures = 0;
  cpu_mult dut (.clk, .rst, .a, .b, .start, .product(p), .busy, .done);
  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic run(input logic [7:0] x, input logic [7:0] y);
    int cyc = 0;
    a = x; b = y; start = 1; @(posedge clk); #1 start = 0;
    while (!done) begin @(posedge clk); #1 cyc++; end
    checks++;
    if (p !== 16'(x) * 16'(y) || cyc != 8) begin
      failures++; $display("FAIL %0d*%0d = %0d cyc %0d", x, y, p, cyc);
    end
  endtask
  initial begin
    a = 0; b = 0;
    repeat (2) @(posedge clk); #1 rst = 0;
    run(0, 0); run(255, 255); run(1, 200); run(200, 1); run(16, 16);
    repeat (200) run(8'($urandom), 8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
