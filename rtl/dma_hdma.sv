// dma_hdma: eight-channel DMA and HDMA engine of the CPU.
//
// Each channel has the registers 0x43X0-0x43XA: parameters (bit 7
// direction, bit 6 HDMA indirect, bit 4 decrement, bit 3 fixed, bits 2:0
// transfer mode), B address, A address and bank, byte count (HDMA:
// indirect address), indirect data bank, table address and line counter.
//
// General DMA: writing 0x420B starts the channels whose bits are set. They
// run one after the other, lowest channel first; each byte takes two
// cycles, a read of the source in the first and a write of the destination
// in the second (both buses have one cycle of read latency). Direction 0
// moves A-bus -> B-bus, 1 moves B-bus -> A-bus. The A address steps by +1,
// -1 or not at all; the B address follows the mode's pattern
// (0: B B B B, 1: B B+1 B B+1, 2: B B B B, 3: B B B+1 B+1,
// 4: B B+1 B+2 B+3). A byte count of 0 means 65536.
//
// HDMA: channels enabled in 0x420C are loaded at frame_start and serve one
// unit of 1, 2 or 4 bytes per line at hblank_start (patterns 0: B,
// 1: B B+1, 2: B B, 3: B B B+1 B+1, 4: B B+1 B+2 B+3). The table in A-bus
// memory holds a line-count byte (bit 7 repeat, bits 6:0 lines; 0 ends the
// channel), then either the data (direct) or a 16-bit pointer to it in the
// data bank (indirect). Without repeat a unit is sent on the first line of
// the count only. HDMA always goes A-bus -> B-bus. HDMA takes precedence
// over DMA: a pending line or frame load is served between two DMA bytes.
//
// a_wait freezes the sequence (not the register port or the frame and
// line requests) while a slow A-bus target, the cartridge, finishes; the
// caller must hold off the strobes of a waiting cycle itself.
// halt stops the CPU core while either kind of transfer is in progress.
// The channel count, priorities, register map and address patterns follow
// the document; the two-cycle byte timing, the table format and the
// treatment of modes 5-7 (repeating modes 1-3) are this design's choices.
module dma_hdma
  import snes_pkg::*;
#(
  parameter int unsigned CHANNELS = 8
) (
  input  logic        clk,
  input  logic        rst,
  // register port (0x420B, 0x420C, 0x43X0-0x43XF)
  input  logic        reg_wr,
  input  logic [15:0] reg_addr,
  input  logic [7:0]  reg_wdata,
  output logic [7:0]  reg_rdata,
  // timing
  input  logic        frame_start,
  input  logic        hblank_start,
  // A-bus master
  output logic [23:0] a_addr,
  output logic        a_rd,
  output logic        a_wr,
  output logic [7:0]  a_wdata,
  input  logic [7:0]  a_rdata,
  input  logic        a_wait,   // A-bus target not ready: hold the current state
  // B-bus master
  output logic [7:0]  b_addr,
  output logic        b_rd,
  output logic        b_wr,
  output logic [7:0]  b_wdata,
  input  logic [7:0]  b_rdata,
  output logic        halt,
  output logic        dma_active,
  output logic        hdma_active
);
  localparam int CW = $clog2(CHANNELS);

  typedef struct packed {
    logic [7:0]  ctrl;    // 43X0
    logic [7:0]  bbus;    // 43X1
    logic [15:0] aaddr;   // 43X2/3
    logic [7:0]  abank;   // 43X4
    logic [15:0] count;   // 43X5/6 (HDMA indirect address)
    logic [7:0]  dbank;   // 43X7
    logic [15:0] taddr;   // 43X8/9
    logic [7:0]  lc;      // 43XA
  } chan_t;

  typedef enum logic [3:0] {
    S_IDLE, S_DMA, S_DWR, S_HLOAD, S_HLC, S_HIAL, S_HIAH, S_HXFER, S_HWR, S_HDEC
  } state_t;

  chan_t ch [CHANNELS];
  state_t st;
  logic [CHANNELS-1:0] dma_en, hdma_en, hact, do_xfer, load_m, xfer_m;
  logic init_pend, line_pend;
  logic [CW-1:0] cur;
  logic [1:0] unit;          // byte within an HDMA unit
  logic [1:0] dunit;         // byte within a DMA pattern, kept across HDMA interruptions
  logic [7:0] cap;

  // lowest set bit of a mask
  function automatic logic [CW-1:0] ffs(logic [CHANNELS-1:0] m);
    ffs = '0;
    for (int i = CHANNELS - 1; i >= 0; i--) if (m[i]) ffs = CW'(i);
  endfunction

  logic [CW-1:0] sel_dma, sel_load, sel_xfer;
  assign sel_dma  = ffs(dma_en);
  assign sel_load = ffs(load_m);
  assign sel_xfer = ffs(xfer_m);

  logic reg_chan;
  logic [CW-1:0] reg_ch;
  assign reg_chan = reg_addr[15:8] == 8'h43 && reg_addr[7:4] < 4'(CHANNELS);
  assign reg_ch   = reg_addr[4+CW-1:4];

  always_comb begin
    reg_rdata = 8'h00;
    if (reg_chan) begin
      case (reg_addr[3:0])
        4'h0: reg_rdata = ch[reg_ch].ctrl;
        4'h1: reg_rdata = ch[reg_ch].bbus;
        4'h2: reg_rdata = ch[reg_ch].aaddr[7:0];
        4'h3: reg_rdata = ch[reg_ch].aaddr[15:8];
        4'h4: reg_rdata = ch[reg_ch].abank;
        4'h5: reg_rdata = ch[reg_ch].count[7:0];
        4'h6: reg_rdata = ch[reg_ch].count[15:8];
        4'h7: reg_rdata = ch[reg_ch].dbank;
        4'h8: reg_rdata = ch[reg_ch].taddr[7:0];
        4'h9: reg_rdata = ch[reg_ch].taddr[15:8];
        4'hA: reg_rdata = ch[reg_ch].lc;
        default: reg_rdata = 8'h00;
      endcase
    end else if (reg_addr == 16'h420C) begin
      reg_rdata = 8'(hdma_en);
    end
  end

  // bus outputs
  always_comb begin
    a_addr = '0; a_rd = 1'b0; a_wr = 1'b0; a_wdata = cap;
    b_addr = '0; b_rd = 1'b0; b_wr = 1'b0; b_wdata = cap;
    case (st)
      S_DMA: if (dma_en != 0 && !init_pend && !line_pend) begin
        if (ch[sel_dma].ctrl[7]) begin
          b_rd   = 1'b1;
          b_addr = ch[sel_dma].bbus + 8'(dma_offset(ch[sel_dma].ctrl[2:0], dunit));
        end else begin
          a_rd   = 1'b1;
          a_addr = {ch[sel_dma].abank, ch[sel_dma].aaddr};
        end
      end
      S_DWR: begin
        if (ch[cur].ctrl[7]) begin
          a_wr    = 1'b1;
          a_addr  = {ch[cur].abank, ch[cur].aaddr};
          a_wdata = b_rdata;
        end else begin
          b_wr    = 1'b1;
          b_addr  = ch[cur].bbus + 8'(dma_offset(ch[cur].ctrl[2:0], dunit));
          b_wdata = a_rdata;
        end
      end
      S_HLOAD: if (load_m != 0) begin
        a_rd = 1'b1; a_addr = {ch[sel_load].abank, ch[sel_load].taddr};
      end
      S_HLC: if (a_rdata != 0 && ch[cur].ctrl[6]) begin
        a_rd = 1'b1; a_addr = {ch[cur].abank, ch[cur].taddr};
      end
      S_HIAL: begin
        a_rd = 1'b1; a_addr = {ch[cur].abank, ch[cur].taddr};
      end
      S_HXFER: if (xfer_m != 0) begin
        a_rd   = 1'b1;
        a_addr = ch[sel_xfer].ctrl[6] ? {ch[sel_xfer].dbank, ch[sel_xfer].count}
                                      : {ch[sel_xfer].abank, ch[sel_xfer].taddr};
      end
      S_HWR: begin
        b_wr    = 1'b1;
        b_addr  = ch[cur].bbus + 8'(dma_offset(ch[cur].ctrl[2:0], unit));
        b_wdata = a_rdata;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < CHANNELS; i++) ch[i] <= '{ctrl: 8'hFF, bbus: 8'hFF, aaddr: '1, abank: '1,
                                                   count: '1, dbank: '1, taddr: '1, lc: '1};
      st <= S_IDLE; dma_en <= '0; hdma_en <= '0; hact <= '0; do_xfer <= '0;
      load_m <= '0; xfer_m <= '0; init_pend <= 1'b0; line_pend <= 1'b0;
      cur <= '0; unit <= '0; dunit <= '0; cap <= '0;
    end else begin
      if (frame_start)  init_pend <= 1'b1;
      if (hblank_start) line_pend <= 1'b1;
      // register writes
      if (reg_wr && reg_chan) begin
        case (reg_addr[3:0])
          4'h0: ch[reg_ch].ctrl         <= reg_wdata;
          4'h1: ch[reg_ch].bbus         <= reg_wdata;
          4'h2: ch[reg_ch].aaddr[7:0]   <= reg_wdata;
          4'h3: ch[reg_ch].aaddr[15:8]  <= reg_wdata;
          4'h4: ch[reg_ch].abank        <= reg_wdata;
          4'h5: ch[reg_ch].count[7:0]   <= reg_wdata;
          4'h6: ch[reg_ch].count[15:8]  <= reg_wdata;
          4'h7: ch[reg_ch].dbank        <= reg_wdata;
          4'h8: ch[reg_ch].taddr[7:0]   <= reg_wdata;
          4'h9: ch[reg_ch].taddr[15:8]  <= reg_wdata;
          4'hA: ch[reg_ch].lc           <= reg_wdata;
          default: ;
        endcase
      end
      if (reg_wr && reg_addr == 16'h420B) dma_en  <= dma_en | reg_wdata[CHANNELS-1:0];
      if (reg_wr && reg_addr == 16'h420C) hdma_en <= reg_wdata[CHANNELS-1:0];

      if (!a_wait) case (st)
        S_IDLE: begin
          if (init_pend) begin
            init_pend <= 1'b0;
            line_pend <= 1'b0;
            hact   <= hdma_en;
            load_m <= hdma_en;
            for (int i = 0; i < CHANNELS; i++)
              if (hdma_en[i]) ch[i].taddr <= ch[i].aaddr;
            st <= S_HLOAD;
          end else if (line_pend) begin
            line_pend <= 1'b0;
            if (hact != 0) begin
              xfer_m <= hact & do_xfer;
              unit   <= '0;
              st     <= S_HXFER;
            end
          end else if (dma_en != 0) begin
            unit <= '0;
            st   <= S_DMA;
          end
        end
        // ---------------- general DMA ----------------
        S_DMA: begin
          if (dma_en == 0 || init_pend || line_pend) st <= S_IDLE;
          else begin
            cur <= sel_dma;
            st  <= S_DWR;
          end
        end
        S_DWR: begin
          dunit <= dunit + 1'b1;
          if (!ch[cur].ctrl[3])
            ch[cur].aaddr <= ch[cur].ctrl[4] ? ch[cur].aaddr - 1'b1 : ch[cur].aaddr + 1'b1;
          ch[cur].count <= ch[cur].count - 1'b1;
          if (ch[cur].count == 16'd1) begin
            dma_en[cur] <= 1'b0;
            dunit <= '0;
          end
          st <= S_DMA;
        end
        // ---------------- HDMA table load ----------------
        S_HLOAD: begin
          if (load_m == 0) st <= S_IDLE;
          else begin
            cur <= sel_load;
            ch[sel_load].taddr <= ch[sel_load].taddr + 1'b1;
            st <= S_HLC;
          end
        end
        S_HLC: begin
          ch[cur].lc <= a_rdata;
          if (a_rdata == 0) begin
            hact[cur]    <= 1'b0;
            do_xfer[cur] <= 1'b0;
            load_m[cur]  <= 1'b0;
            st <= S_HLOAD;
          end else begin
            do_xfer[cur] <= 1'b1;
            if (ch[cur].ctrl[6]) begin
              ch[cur].taddr <= ch[cur].taddr + 1'b1;
              st <= S_HIAL;
            end else begin
              load_m[cur] <= 1'b0;
              st <= S_HLOAD;
            end
          end
        end
        S_HIAL: begin
          ch[cur].count[7:0] <= a_rdata;
          ch[cur].taddr <= ch[cur].taddr + 1'b1;
          st <= S_HIAH;
        end
        S_HIAH: begin
          ch[cur].count[15:8] <= a_rdata;
          load_m[cur] <= 1'b0;
          st <= S_HLOAD;
        end
        // ---------------- HDMA line transfer ----------------
        S_HXFER: begin
          if (xfer_m == 0) st <= S_HDEC;
          else begin
            cur <= sel_xfer;
            if (ch[sel_xfer].ctrl[6]) ch[sel_xfer].count <= ch[sel_xfer].count + 1'b1;
            else                      ch[sel_xfer].taddr <= ch[sel_xfer].taddr + 1'b1;
            st <= S_HWR;
          end
        end
        S_HWR: begin
          if (3'(unit) == hdma_units(ch[cur].ctrl[2:0]) - 3'd1) begin
            unit <= '0;
            xfer_m[cur] <= 1'b0;
          end else begin
            unit <= unit + 1'b1;
          end
          st <= S_HXFER;
        end
        S_HDEC: begin
          for (int i = 0; i < CHANNELS; i++) begin
            if (hact[i]) begin
              ch[i].lc[6:0] <= ch[i].lc[6:0] - 1'b1;
              do_xfer[i] <= ch[i].lc[7];
              if (ch[i].lc[6:0] == 7'd1) load_m[i] <= 1'b1;
            end
          end
          st <= S_HLOAD;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign dma_active  = (dma_en != 0);
  assign hdma_active = (st inside {S_HLOAD, S_HLC, S_HIAL, S_HIAH, S_HXFER, S_HWR, S_HDEC});
  assign halt = dma_active || hdma_active;
endmodule
