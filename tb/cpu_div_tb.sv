// cpu_div_tb: checks quotient and remainder of the 16/8 divider against
// integer division, including division by zero, and the 16-cycle latency.
module cpu_div_tb;
  logic clk = 0, rst = 1, start = 0, busy, done;
  logic [15:0] n, q, r;
  logic [7:0] d;
  int checks = 0, failures = 0;
  cpu_div dut (.clk, .rst, .dividend(n), .divisor(d), .start, .quotient(q), .remainder(r), .busy, .done);
  always #5 clk = ~clk;
  initial begin #400000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic run(input logic [15:0] x, input logic [7:0] y);
    int cyc = 0;
    logic [15:0] eq, er;
    n = x; d = y; start = 1; @(posedge clk); #1 start = 0;
    while (!done) begin @(posedge clk); #1 cyc++; end
    if (y == 0) begin eq = 16'hFFFF; er = x; end
    else begin eq = x / 16'(y); er = x % 16'(y); end
    checks++;
    if (q !== eq || r !== er || cyc != 16) begin
      failures++; $display("FAIL %0d/%0d = %0d r %0d cyc %0d", x, y, q, r, cyc);
    end
  endtask
  initial begin
    n = 0; d = 0;
    repeat (2) @(posedge clk); #1 rst = 0;
    run(0, 1); run(65535, 1); run(65535, 255); run(1000, 7); run(1234, 0); run(5, 200);
    repeat (200) run(16'($urandom), 8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
