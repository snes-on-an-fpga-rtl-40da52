// aram_tb: writes through both ports of the sound RAM, reads each port's
// data through the other, and checks the port-A-wins rule on a collision.
module aram_tb;
  logic clk = 0, a_rd = 0, a_wr = 0, b_rd = 0, b_wr = 0;
  logic [15:0] a_addr, b_addr;
  logic [7:0] a_wdata, b_wdata, a_rdata, b_rdata;
  logic [7:0] model [int];
  int checks = 0, failures = 0;
  aram dut (.clk, .a_addr, .a_rd, .a_wr, .a_wdata, .a_rdata, .b_addr, .b_rd, .b_wr, .b_wdata, .b_rdata);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int i = 0; i < 500; i++) begin
      a_addr = 16'($urandom); a_wdata = 8'($urandom); b_addr = 16'($urandom); b_wdata = 8'($urandom);
      if (i == 0) b_addr = a_addr;
      a_wr = 1; b_wr = 1; @(posedge clk); #1 a_wr = 0; b_wr = 0;
      model[int'(b_addr)] = b_wdata; model[int'(a_addr)] = a_wdata;
    end
    foreach (model[k]) begin
      a_addr = 16'(k); b_addr = 16'(k); a_rd = 1; b_rd = 1; @(posedge clk); #1 a_rd = 0; b_rd = 0;
      checks++;
      if (a_rdata !== model[k] || b_rdata !== model[k]) begin failures++; $display("FAIL %h", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
