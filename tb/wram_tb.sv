// wram_tb: writes a pattern to the first and last pages and random
// addresses of the 128 KB work RAM and reads it back with one cycle of
// latency, keeping a reference copy in an associative array.
module wram_tb;
  logic clk = 0, rd = 0, wr = 0;
  logic [16:0] addr;
  logic [7:0] wdata, rdata;
  logic [7:0] model [int];
  int checks = 0, failures = 0;
  wram dut (.clk, .addr, .rd, .wr, .wdata, .rdata);
  always #5 clk = ~clk;
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic wb(input logic [16:0] a, input logic [7:0] d);
    addr = a; wdata = d; wr = 1; @(posedge clk); #1 wr = 0; model[int'(a)] = d;
  endtask
  task automatic rb(input logic [16:0] a);
    addr = a; rd = 1; @(posedge clk); #1 rd = 0;
    checks++;
    if (rdata !== model[int'(a)]) begin failures++; $display("FAIL %h: %h vs %h", a, rdata, model[int'(a)]); end
  endtask
  initial begin
    for (int i = 0; i < 256; i++) begin wb(17'(i), 8'(i ^ 8'h5A)); wb(17'h1FF00 + 17'(i), 8'(i * 3)); end
    repeat (2000) wb(17'($urandom), 8'($urandom));
    foreach (model[a]) rb(17'(a));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
