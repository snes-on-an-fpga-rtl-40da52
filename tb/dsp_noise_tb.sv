// dsp_noise_tb: runs the noise generator at several rates and checks each
// output against a model of the 15-bit feedback shift register stepped once
// every rate-table period of ticks, and that rate 0 holds the output.
module dsp_noise_tb;
  import dsp_pkg::*;
  logic clk = 0, rst = 1, tick = 0; logic [4:0] rate = 0;
  logic signed [15:0] noise;
  int checks = 0, failures = 0;

  dsp_noise dut (.clk, .rst, .tick, .rate, .noise);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int lfsr = 16'h4000, cnt = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int r = 0; r < 6; r++) begin
      logic [4:0] rr;
      rr = (r == 0) ? 5'd0 : (r == 1) ? 5'd31 : (r == 2) ? 5'd30 : (r == 3) ? 5'd28 : (r == 4) ? 5'd20 : 5'd1;
      @(negedge clk); rate = rr;
      for (int t = 0; t < 5000; t++) begin
        tick = 1;
        @(negedge clk);
        tick = 0;
        if (rr != 0) begin
          if (cnt <= 1) begin
            cnt = int'(rate_period(rr));
            lfsr = (((lfsr ^ (lfsr >> 1)) & 1) << 14) | (lfsr >> 1);
          end else cnt--;
        end
        checks++;
        if (int'(noise) != ((lfsr << 1) | ((lfsr >> 14) != 0 ? 32'hFFFF0000 : 0))) begin
          failures++; if (failures < 10) $display("FAIL rate %0d got %h exp %h", rr, noise, lfsr << 1);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
