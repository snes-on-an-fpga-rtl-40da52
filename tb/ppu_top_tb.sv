// ppu_top_tb: programs the PPU over the B-bus (palette, one background
// tile map entry and character, mode 0, main-screen enable) and renders
// small frames, checking every pixel's position and colour: the tile's
// colour on the left 8 columns and the backdrop elsewhere, the brightness
// scaling, forced blank, that palette writes during a frame are
// dropped, mosaic block sizes and enables, and main screen windows. Frame size is reduced to keep the run short.
module ppu_top_tb;
  localparam int HR = 16, VR = 8;
  logic clk = 0, rst = 1;
  logic [7:0] b_addr = 0, b_wdata = 0, b_rdata; logic b_wr = 0, b_rd = 0, b_sel;
  logic [8:0] hlat = 9'd5, vlat = 9'd6; logic hv_latch;
  logic frame_start = 0, busy, pix_valid, frame_done;
  logic [8:0] pix_x, pix_y; logic [14:0] pix_rgb; logic [2:0] pix_layer;
  int checks = 0, failures = 0;

  ppu_top #(.H_RES(HR), .V_RES(VR)) dut (.clk, .rst, .b_addr, .b_wr, .b_rd, .b_wdata, .b_rdata, .b_sel,
    .hlat, .vlat, .hv_latch, .frame_start, .busy, .pix_valid, .pix_x, .pix_y, .pix_rgb, .pix_layer, .frame_done);
  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic wr(input logic [7:0] a, input logic [7:0] d);
    @(negedge clk); b_addr = a; b_wdata = d; b_wr = 1; @(negedge clk); b_wr = 0;
  endtask

  function automatic logic [14:0] scale(input logic [14:0] c, input int b);
    logic [14:0] r;
    for (int ch = 0; ch < 3; ch++) r[ch*5 +: 5] = 5'((int'(c[ch*5 +: 5]) * (b + 1)) >> 4);
    return r;
  endfunction

  // one frame: every pixel in raster order with the expected colour
  task automatic frame(input int bright, input logic blank, input logic [14:0] c_tile, input logic [14:0] c_back,
                       input logic poke, input int tile_w = 8,
                       input int hide_lo = -1, input int hide_hi = -1, input bit inv = 0);
    int n = 0;
    @(negedge clk); frame_start = 1; @(negedge clk); frame_start = 0;
    if (poke) begin wr(8'h21, 8'h00); wr(8'h22, 8'hFF); wr(8'h22, 8'h7F); end
    while (!frame_done) begin
      @(posedge clk);
      if (pix_valid) begin
        logic [14:0] e; bit hid;
        hid = (int'(pix_x) >= hide_lo && int'(pix_x) <= hide_hi) ^ inv;
        e = blank ? 15'd0 : scale((pix_x < tile_w && !hid) ? c_tile : c_back, bright);
        checks++;
        if (pix_x != 9'(n % HR) || pix_y != 9'(n / HR) || pix_rgb != e) begin
          failures++;
          if (failures < 10) $display("FAIL px %0d,%0d rgb %h exp %h", pix_x, pix_y, pix_rgb, e);
        end
        n++;
      end
    end
    checks++;
    if (n != HR * VR) begin failures++; $display("FAIL pixel count %0d", n); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    wr(8'h00, 8'h8F);                       // forced blank while loading
    wr(8'h21, 8'h00); wr(8'h22, 8'h34); wr(8'h22, 8'h12);   // backdrop 0x1234
    wr(8'h22, 8'h1F); wr(8'h22, 8'h7C);                     // colour 1 0x7C1F
    wr(8'h15, 8'h80);
    wr(8'h16, 8'h00); wr(8'h17, 8'h00);
    wr(8'h18, 8'h01); wr(8'h19, 8'h00);     // map (0,0): tile 1
    wr(8'h18, 8'h00); wr(8'h19, 8'h00);     // map (1,0): tile 0
    wr(8'h16, 8'h00); wr(8'h17, 8'h10);
    for (int i = 0; i < 8; i++) begin wr(8'h18, 8'h00); wr(8'h19, 8'h00); end   // tile 0 empty
    for (int i = 0; i < 8; i++) begin wr(8'h18, 8'hFF); wr(8'h19, 8'h00); end   // tile 1 colour 1
    wr(8'h05, 8'h00); wr(8'h07, 8'h00); wr(8'h0B, 8'h01);
    wr(8'h0D, 8'h00); wr(8'h0D, 8'h00); wr(8'h0E, 8'h00); wr(8'h0E, 8'h00);
    wr(8'h2C, 8'h01); wr(8'h30, 8'h00); wr(8'h31, 8'h00);
    wr(8'h00, 8'h0F);
    frame(15, 1'b0, 15'h7C1F, 15'h1234, 1'b1);   // the write of colour 0 is dropped
    wr(8'h00, 8'h07);
    frame(7, 1'b0, 15'h7C1F, 15'h1234, 1'b0);
    wr(8'h00, 8'h8F);
    frame(15, 1'b1, 15'h7C1F, 15'h1234, 1'b0);
    // during forced blank the palette can be written
    wr(8'h21, 8'h00); wr(8'h22, 8'h00); wr(8'h22, 8'h7C);
    wr(8'h00, 8'h0F);
    frame(15, 1'b0, 15'h7C1F, 15'h7C00, 1'b0);
    // mosaic: BG1 in 5-pixel blocks (origins 0, 5, 10, 15), then 9-pixel
    // blocks, then the enable on BG2 only, which leaves BG1 unchanged
    wr(8'h06, 8'h41);
    frame(15, 1'b0, 15'h7C1F, 15'h7C00, 1'b0, 10);
    wr(8'h06, 8'h81);
    frame(15, 1'b0, 15'h7C1F, 15'h7C00, 1'b0, 9);
    wr(8'h06, 8'h42);
    frame(15, 1'b0, 15'h7C1F, 15'h7C00, 1'b0, 8);
    // main screen window 1 over columns 2-5 on BG1: masked inside, then
    // inverted (masked outside), then the same window with 0x212E clear
    wr(8'h06, 8'h00);
    wr(8'h26, 8'd2); wr(8'h27, 8'd5); wr(8'h23, 8'h02); wr(8'h2E, 8'h01);
    frame(15, 1'b0, 15'h7C1F, 15'h7C00, 1'b0, 8, 2, 5);
    wr(8'h23, 8'h03);
    frame(15, 1'b0, 15'h7C1F, 15'h7C00, 1'b0, 8, 2, 5, 1);
    // window 2 over columns 4-9 joined with AND: masked on 4-5 only
    wr(8'h23, 8'h0A); wr(8'h28, 8'd4); wr(8'h29, 8'd9); wr(8'h2A, 8'h01);
    frame(15, 1'b0, 15'h7C1F, 15'h7C00, 1'b0, 8, 4, 5);
    wr(8'h2E, 8'h00);
    frame(15, 1'b0, 15'h7C1F, 15'h7C00, 1'b0, 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
