// dsp_echo_tb: runs the echo unit on a sound RAM model for more samples
// than the ring holds, with random FIR coefficients, feedback and inputs,
// and checks the filtered output of each sample, the bytes written back,
// the ring wrap and the number of cycles per sample against a model.
module dsp_echo_tb;
  logic clk = 0, rst = 1, start = 0, write_en = 1;
  logic [7:0] esa = 8'h40; logic [3:0] edl = 4'd1; logic signed [7:0] efb = 0;
  logic [7:0] fir [8];
  logic signed [15:0] in_l = 0, in_r = 0, out_l, out_r;
  logic [15:0] a_addr; logic a_rd, a_wr; logic [7:0] a_wdata, a_rdata = 0;
  logic done;
  logic [7:0] mem [65536];
  int checks = 0, failures = 0;

  dsp_echo dut (.clk, .rst, .start, .esa, .edl, .efb, .fir, .write_en, .in_l, .in_r,
                .a_addr, .a_rd, .a_wr, .a_wdata, .a_rdata, .out_l, .out_r, .done);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (a_rd) a_rdata <= mem[a_addr];
    if (a_wr && !rst) mem[a_addr] <= a_wdata;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int clamp(int v);
    return v > 32767 ? 32767 : v < -32768 ? -32768 : v;
  endfunction

  initial begin
    logic [7:0] ref_mem [65536];
    int hl [8], hr [8];
    int pos = 0, size, base, accl, accr, ol, or_, wl, wr, cyc;
    for (int i = 0; i < 65536; i++) begin mem[i] = 8'($urandom); ref_mem[i] = mem[i]; end
    for (int i = 0; i < 8; i++) begin fir[i] = 8'($urandom_range(0, 60)) - 8'd20; hl[i] = 0; hr[i] = 0; end
    efb = 8'sd70;
    size = 2048; base = 32'h4000;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int s = 0; s < 700; s++) begin
      @(negedge clk);
      in_l = 16'($urandom); in_r = 16'($urandom);
      write_en = (s % 50) != 7;
      for (int i = 0; i < 7; i++) begin hl[i] = hl[i + 1]; hr[i] = hr[i + 1]; end
      hl[7] = int'(signed'({ref_mem[base + pos + 1], ref_mem[base + pos]}));
      hr[7] = int'(signed'({ref_mem[base + pos + 3], ref_mem[base + pos + 2]}));
      accl = 0; accr = 0;
      for (int i = 0; i < 8; i++) begin
        accl += hl[i] * int'(signed'(fir[i]));
        accr += hr[i] * int'(signed'(fir[i]));
      end
      ol = clamp(accl >>> 7); or_ = clamp(accr >>> 7);
      wl = clamp(int'(in_l) + ((ol * int'(efb)) >>> 7));
      wr = clamp(int'(in_r) + ((or_ * int'(efb)) >>> 7));
      if (write_en) begin
        ref_mem[base + pos] = 8'(wl); ref_mem[base + pos + 1] = 8'(wl >> 8);
        ref_mem[base + pos + 2] = 8'(wr); ref_mem[base + pos + 3] = 8'(wr >> 8);
      end
      pos = (pos + 4 >= size) ? 0 : pos + 4;
      start = 1; cyc = 0;
      @(negedge clk); start = 0;
      while (!done && cyc < 100) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != 10) begin failures++; $display("FAIL cycles %0d", cyc + 1); end
      checks++;
      if (int'(out_l) != ol || int'(out_r) != or_) begin
        failures++; if (failures < 10) $display("FAIL out %0d %0d exp %0d %0d", out_l, out_r, ol, or_);
      end
    end
    @(negedge clk);
    for (int i = 0; i < 65536; i++) begin
      checks++;
      if (mem[i] != ref_mem[i]) begin failures++; if (failures < 20) $display("FAIL mem %h", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
