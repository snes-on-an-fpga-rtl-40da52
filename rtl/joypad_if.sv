// joypad_if: automatic reader for the two serial game controllers.
//
// When auto-read is enabled (bit d of 0x4200) and a vertical blank starts,
// the reader pulses the shared latch line (COL in the connector wiring)
// and then clocks 16 bits out of both controllers on their clock lines
// (CCLK1, CCLK2), sampling the data lines (CTX1, CTX2). Controller data is
// active low; the stored words are active high. The first bit read lands in
// bit 15, so the words match the register layout of 0x4218-0x421B: high
// byte B, Y, Select, Start, Up, Down, Left, Right; low byte A, X, L, R, 0000.
// busy (bit 0 of 0x4212) is high during a read. Each half period of the
// controller clock lasts HALF_PERIOD system clocks. The pins and register
// layout follow the document; the button order on the wire and the
// timing are this design's choice.
module joypad_if #(
  parameter int unsigned HALF_PERIOD = 128,
  parameter int unsigned BITS        = 16
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       auto_en,
  input  logic       start,       // vblank start
  input  logic       ctx1,        // controller 1 data (active low)
  input  logic       ctx2,        // controller 2 data (active low)
  output logic       col,         // latch to both controllers
  output logic       cclk1,       // clock to controller 1 (idle high)
  output logic       cclk2,       // clock to controller 2 (idle high)
  output logic [BITS-1:0] pad1,
  output logic [BITS-1:0] pad2,
  output logic       busy
);
  typedef enum logic [1:0] {J_IDLE, J_LATCH, J_LOW, J_HIGH} jstate_t;
  jstate_t st;
  logic [$clog2(HALF_PERIOD+1)-1:0] tmr;
  logic [$clog2(BITS+1)-1:0] nbit;
  logic [BITS-1:0] sh1, sh2;

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= J_IDLE; tmr <= '0; nbit <= '0; sh1 <= '0; sh2 <= '0;
      pad1 <= '0; pad2 <= '0;
    end else begin
      case (st)
        J_IDLE: if (start && auto_en) begin
          st <= J_LATCH; tmr <= '0; nbit <= '0;
        end
        J_LATCH: begin
          tmr <= tmr + 1'b1;
          if (tmr == HALF_PERIOD[$bits(tmr)-1:0] - 1'b1) begin
            tmr <= '0;
            st  <= J_HIGH;   // first bit is valid right after the latch
          end
        end
        J_HIGH: begin       // clock high: sample data
          tmr <= tmr + 1'b1;
          if (tmr == 0) begin
            sh1 <= {sh1[BITS-2:0], ~ctx1};
            sh2 <= {sh2[BITS-2:0], ~ctx2};
          end
          if (tmr == HALF_PERIOD[$bits(tmr)-1:0] - 1'b1) begin
            tmr  <= '0;
            nbit <= nbit + 1'b1;
            if (nbit == BITS[$bits(nbit)-1:0] - 1'b1) begin
              st   <= J_IDLE;
              pad1 <= sh1;
              pad2 <= sh2;
            end else begin
              st <= J_LOW;
            end
          end
        end
        J_LOW: begin        // clock low: controller shifts next bit
          tmr <= tmr + 1'b1;
          if (tmr == HALF_PERIOD[$bits(tmr)-1:0] - 1'b1) begin
            tmr <= '0;
            st  <= J_HIGH;
          end
        end
        default: st <= J_IDLE;
      endcase
    end
  end

  assign col   = (st == J_LATCH);
  assign cclk1 = (st != J_LOW);
  assign cclk2 = (st != J_LOW);
  assign busy  = (st != J_IDLE);
endmodule
