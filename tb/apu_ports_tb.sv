// apu_ports_tb: checks that bytes written by the CPU on each port reach the
// SPC700 side and bytes written by the SPC700 reach the CPU side, that the
// two directions are independent, and that other B-bus addresses are
// ignored.
module apu_ports_tb;
  logic clk = 0, rst = 1, b_wr = 0, spc_wr = 0, b_sel;
  logic [7:0] b_addr, b_wdata, b_rdata, spc_wdata, spc_rdata;
  logic [1:0] spc_port;
  int checks = 0, failures = 0;
  apu_ports dut (.clk, .rst, .b_addr, .b_wr, .b_wdata, .b_rdata, .b_sel, .spc_port, .spc_wr,
                 .spc_wdata, .spc_rdata);
  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  initial begin
    b_addr = 0; b_wdata = 0; spc_port = 0; spc_wdata = 0;
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 4; i++) begin
      b_addr = 8'h40 + 8'(i); b_wdata = 8'hA0 + 8'(i); b_wr = 1;
      spc_port = 2'(i); spc_wdata = 8'h50 + 8'(i); spc_wr = 1;
      @(posedge clk); #1 b_wr = 0; spc_wr = 0;
    end
    b_addr = 8'h18; b_wdata = 8'hFF; b_wr = 1; @(posedge clk); #1 b_wr = 0;
    for (int i = 0; i < 4; i++) begin
      spc_port = 2'(i); b_addr = 8'h40 + 8'(i); #1;
      chk(spc_rdata == 8'hA0 + 8'(i), $sformatf("cpu->spc %0d", i));
      chk(b_rdata == 8'h50 + 8'(i), $sformatf("spc->cpu %0d", i));
      chk(b_sel, "select");
    end
    b_addr = 8'h18; #1 chk(!b_sel, "no select");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
