// cgram_tb: fills all 256 colours and reads them back through both ports.
module cgram_tb;
  logic clk = 0, we = 0, b_rd = 0;
  logic [7:0] w_addr, a_addr, b_addr;
  logic [14:0] wdata, a_rdata, b_rdata;
  logic [14:0] model [256];
  int checks = 0, failures = 0;
  cgram dut (.clk, .w_addr, .we, .wdata, .a_addr, .a_rdata, .b_addr, .b_rd, .b_rdata);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int i = 0; i < 256; i++) begin
      w_addr = 8'(i); wdata = 15'($urandom); model[i] = wdata; we = 1; @(posedge clk); #1 we = 0;
    end
    for (int i = 0; i < 256; i++) begin
      a_addr = 8'(i); b_addr = 8'(255 - i); b_rd = 1; @(posedge clk); #1 b_rd = 0;
      checks++;
      if (a_rdata !== model[i] || b_rdata !== model[255 - i]) begin failures++; $display("FAIL %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
