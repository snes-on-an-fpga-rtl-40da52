// dsp_top_tb: plays a looping sample block through the DSP from a sound
// RAM model and checks the stereo output against hand-worked values: one
// voice with direct gain and left/right volume, all eight voices mixed,
// the echo path (feedback-free, newest-tap FIR) added to the main mix,
// ENDX and ENVX read-back, noise replacing the sample, mute, and release
// after key-off down to silence. It also checks the sample period.
//
// Worked values: the block (shift 12, filter 0, nibbles 1) decodes to
// 2048; gain 0x7F gives envelope 2032, so a voice outputs 2048 x 2032 /
// 2048 = 2032, times volume 64/128 = 1016 left and 32/128 = 508 right;
// main volume 127 gives 1016 x 127 / 128 = 1008 and 504.
module dsp_top_tb;
  localparam int SC = 768;
  logic clk = 0, rst = 1;
  logic [6:0] reg_addr = 0; logic reg_wr = 0; logic [7:0] reg_wdata = 0, reg_rdata;
  logic [15:0] b_addr; logic b_rd, b_wr; logic [7:0] b_wdata, b_rdata = 0;
  logic signed [15:0] left, right; logic sample_valid, echo_done;
  logic [7:0] mem [65536];
  int checks = 0, failures = 0;

  dsp_top #(.SAMPLE_CYCLES(SC)) dut (.clk, .rst, .reg_addr, .reg_wr, .reg_wdata, .reg_rdata,
    .b_addr, .b_rd, .b_wr, .b_wdata, .b_rdata, .left, .right, .sample_valid, .echo_done);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (b_rd) b_rdata <= mem[b_addr];
    if (b_wr && !rst) mem[b_addr] <= b_wdata;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic wr(input logic [6:0] a, input logic [7:0] d);
    @(negedge clk); reg_addr = a; reg_wdata = d; reg_wr = 1; @(negedge clk); reg_wr = 0;
  endtask

  task automatic samples(input int n);
    repeat (n) @(posedge sample_valid);
    @(negedge clk);
  endtask

  task automatic expect_lr(input int l, input int r, input string what);
    checks++;
    if (int'(left) != l || int'(right) != r) begin
      failures++; $display("FAIL %s: got %0d %0d exp %0d %0d", what, left, right, l, r);
    end
  endtask

  initial begin
    int t0, t1, prev, changes;
    for (int i = 0; i < 65536; i++) mem[i] = 8'h00;
    mem[16'h0200] = 8'h00; mem[16'h0201] = 8'h03; mem[16'h0202] = 8'h00; mem[16'h0203] = 8'h03;
    mem[16'h0300] = 8'hC3;
    for (int i = 1; i < 9; i++) mem[16'h0300 + i] = 8'h11;
    repeat (3) @(posedge clk);
    rst <= 0;
    wr(7'h6C, 8'h20); wr(7'h0C, 8'd127); wr(7'h1C, 8'd127); wr(7'h5D, 8'h02);
    for (int v = 0; v < 8; v++) begin
      wr({3'(v), 4'h0}, 8'd64); wr({3'(v), 4'h1}, 8'd32); wr({3'(v), 4'h2}, 8'h00); wr({3'(v), 4'h3}, 8'h10);
      wr({3'(v), 4'h4}, 8'h00); wr({3'(v), 4'h5}, 8'h00); wr({3'(v), 4'h7}, 8'h7F);
    end
    // sample period
    @(posedge sample_valid); t0 = $time; @(posedge sample_valid); t1 = $time;
    checks++;
    if ((t1 - t0) != SC * 10) begin failures++; $display("FAIL period %0d", (t1 - t0) / 10); end
    // one voice
    wr(7'h4C, 8'h01);
    samples(40);
    expect_lr(1008, 504, "one voice");
    wr(7'h08, 8'h00); @(negedge clk); reg_addr = 7'h08; #1;
    checks++; if (reg_rdata != 8'd127) begin failures++; $display("FAIL envx %h", reg_rdata); end
    reg_addr = 7'h7C; #1;
    checks++; if (reg_rdata[0] != 1'b1) begin failures++; $display("FAIL endx %h", reg_rdata); end
    wr(7'h7C, 8'h00); reg_addr = 7'h7C; #1;
    checks++; if (reg_rdata[0] != 1'b0) begin failures++; $display("FAIL endx clear %h", reg_rdata); end
    // all voices: 8 x 1016 = 8128 -> 8064, 8 x 508 = 4064 -> 4032
    wr(7'h4C, 8'hFE);
    samples(40);
    expect_lr(8064, 4032, "eight voices");
    // echo: voice 0 only, 4-byte ring, FIR7 = 127, echo volume 127, writes on
    wr(7'h5C, 8'hFE); samples(400);
    expect_lr(1008, 504, "after key-off of voices 1-7");
    wr(7'h4D, 8'h01); wr(7'h6D, 8'h80); wr(7'h7D, 8'h00); wr(7'h7F, 8'd127); wr(7'h0D, 8'h00);
    wr(7'h2C, 8'd127); wr(7'h3C, 8'd64); wr(7'h6C, 8'h00);
    samples(10);
    // echo in 1016 -> FIR 1008 -> x127/128 = 1000; right 508 -> 504 -> x64/128 = 252
    expect_lr(1008 + 1000, 504 + 252, "echo");
    // noise on voice 0
    wr(7'h4D, 8'h00); wr(7'h2C, 8'h00); wr(7'h3C, 8'h00);
    wr(7'h3D, 8'h01); wr(7'h6C, 8'h3F);
    changes = 0; prev = left;
    for (int i = 0; i < 40; i++) begin samples(1); if (int'(left) != prev) changes++; prev = left; end
    checks++; if (changes < 30) begin failures++; $display("FAIL noise changes %0d", changes); end
    // mute
    wr(7'h6C, 8'h60); samples(2);
    expect_lr(0, 0, "mute");
    // release
    wr(7'h3D, 8'h00); wr(7'h6C, 8'h20); samples(4);
    expect_lr(1008, 504, "unmuted");
    wr(7'h5C, 8'h01); samples(300);
    expect_lr(0, 0, "release");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
