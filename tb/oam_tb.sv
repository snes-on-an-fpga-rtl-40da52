// oam_tb: writes all 544 bytes through the CPU port and checks byte reads
// and the sprite port's 32-bit entry and 2-bit high-table field for every
// sprite.
module oam_tb;
  logic clk = 0, c_we = 0, s_rd = 0;
  logic [9:0] c_addr;
  logic [7:0] c_wdata, c_rdata;
  logic [6:0] s_idx;
  logic [31:0] s_low;
  logic [1:0] s_high;
  logic [7:0] model [544];
  int checks = 0, failures = 0;
  oam dut (.clk, .c_addr, .c_we, .c_wdata, .c_rdata, .s_idx, .s_rd, .s_low, .s_high);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int i = 0; i < 544; i++) begin
      c_addr = 10'(i); c_wdata = 8'($urandom); model[i] = c_wdata; c_we = 1; @(posedge clk); #1 c_we = 0;
    end
    for (int i = 0; i < 544; i++) begin
      c_addr = 10'(i); #1; checks++;
      if (c_rdata !== model[i]) begin failures++; $display("FAIL byte %0d", i); end
    end
    for (int s = 0; s < 128; s++) begin
      s_idx = 7'(s); s_rd = 1; @(posedge clk); #1 s_rd = 0;
      checks++;
      if (s_low !== {model[4*s+3], model[4*s+2], model[4*s+1], model[4*s]} ||
          s_high !== 2'(model[512 + s / 4] >> (2 * (s % 4)))) begin failures++; $display("FAIL sprite %0d", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
