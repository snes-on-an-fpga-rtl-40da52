// vram_tb: byte-lane writes on port A, then reads of both ports against a
// reference copy.
module vram_tb;
  logic clk = 0, a_rd = 0, b_rd = 0;
  logic [14:0] a_addr, b_addr;
  logic [1:0] a_we = 0;
  logic [15:0] a_wdata, a_rdata, b_rdata;
  logic [15:0] model [int];
  int checks = 0, failures = 0;
  vram dut (.clk, .a_addr, .a_we, .a_wdata, .a_rd, .a_rdata, .b_addr, .b_rd, .b_rdata);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int i = 0; i < 400; i++) begin
      a_addr = (i < 200) ? 15'(i) : 15'($urandom); a_wdata = 16'($urandom);
      a_we = 2'b11; @(posedge clk); #1;
      model[int'(a_addr)] = a_wdata;
      a_wdata = 16'($urandom); a_we = 2'(1 + i % 2); @(posedge clk); #1 a_we = 0;
      if (i % 2 == 0) model[int'(a_addr)][7:0] = a_wdata[7:0];
      else            model[int'(a_addr)][15:8] = a_wdata[15:8];
    end
    foreach (model[k]) begin
      a_addr = 15'(k); b_addr = 15'(k); a_rd = 1; b_rd = 1; @(posedge clk); #1 a_rd = 0; b_rd = 0;
      checks++;
      if (a_rdata !== model[k] || b_rdata !== model[k]) begin failures++; $display("FAIL %h", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
