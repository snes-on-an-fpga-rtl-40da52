// dsp_brr_tb: drives random sample blocks (all shifts and filters) through
// the sample decoder and compares each decoded sample, one cycle after its
// nibble, with an integer model of the shift, filter and clamp.
module dsp_brr_tb;
  logic clk = 0, rst = 1, restart = 0, valid = 0;
  logic [7:0] header = 0; logic [3:0] nibble = 0;
  logic signed [15:0] sample; logic sample_valid;
  int checks = 0, failures = 0;
  int p1 = 0, p2 = 0;

  dsp_brr dut (.clk, .rst, .restart, .valid, .header, .nibble, .sample, .sample_valid);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int model(int sh, int flt, int nib, int a, int b);
    int s = (nib >= 8) ? nib - 16 : nib;
    if (sh <= 12) s = (s * (1 << sh)) >>> 1;
    else          s = (s < 0) ? -2048 : 0;
    case (flt)
      1: s = s + a + ((-a) >>> 4);
      2: s = s + 2 * a + ((-3 * a) >>> 5) - b + (b >>> 4);
      3: s = s + 2 * a + ((-13 * a) >>> 6) - b + ((3 * b) >>> 4);
      default: ;
    endcase
    if (s > 32767) s = 32767;
    if (s < -32768) s = -32768;
    return s;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int blk = 0; blk < 400; blk++) begin
      @(negedge clk);
      if (blk % 50 == 0) begin restart = 1; p1 = 0; p2 = 0; @(negedge clk); restart = 0; end
      header = 8'($urandom);
      for (int n = 0; n < 16; n++) begin
        int exp_s;
        nibble = 4'($urandom);
        valid = 1;
        exp_s = model(int'(header[7:4]), int'(header[3:2]), int'(nibble), p1, p2);
        @(negedge clk);
        valid = 0;
        checks++;
        if (!sample_valid || int'(sample) != exp_s) begin
          failures++;
          if (failures < 10) $display("FAIL hdr=%h nib=%h got %0d exp %0d", header, nibble, sample, exp_s);
        end
        p2 = p1; p1 = exp_s;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
