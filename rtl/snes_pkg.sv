// snes_pkg: types and constants shared by the console blocks.
//
// Holds the A-bus region and access-speed codes produced by the memory map
// decoder, the number of master-clock cycles per access for each speed, and
// the B-bus address offset pattern that the DMA/HDMA engine follows for each
// of its transfer modes. The region boundaries and speeds follow the CPU
// memory map figure; the master clock of 21.477 MHz and the divider of 6, 8
// and 12 master cycles per access are this design's choice.
package snes_pkg;

  // A-bus regions of the CPU memory map
  typedef enum logic [2:0] {
    REG_WRAM   = 3'd0,  // work RAM (low 8 KB mirror or banks 7E-7F)
    REG_BBUS   = 3'd1,  // 0x2100-0x21FF: PPU, APU ports (B-bus)
    REG_JOYSER = 3'd2,  // 0x4000-0x41FF: old-style controller ports
    REG_CPUIO  = 3'd3,  // 0x4200-0x42FF: CPU I/O registers
    REG_DMA    = 3'd4,  // 0x4300-0x43FF: DMA channel registers
    REG_EXPAND = 3'd5,  // 0x6000-0x7FFF: expansion
    REG_CART   = 3'd6,  // cartridge memory
    REG_OPEN   = 3'd7   // nothing mapped
  } region_t;

  // access speed of a region
  typedef enum logic [1:0] {
    SPD_268 = 2'd0,  // 2.68 MHz
    SPD_358 = 2'd1,  // 3.58 MHz
    SPD_179 = 2'd2   // 1.79 MHz
  } speed_t;

  // master-clock cycles per bus access at each speed (21.477 MHz master)
  function automatic logic [3:0] speed_cycles(speed_t s);
    case (s)
      SPD_358: speed_cycles = 4'd6;
      SPD_179: speed_cycles = 4'd12;
      default: speed_cycles = 4'd8;
    endcase
  endfunction

  // B-bus address offset of the idx-th byte of a DMA/HDMA unit for a
  // 3-bit transfer mode (0: B, 1: B B+1, 2: B B, 3: B B B+1 B+1,
  // 4: B B+1 B+2 B+3; 5-7 repeat the patterns of 1-3)
  function automatic logic [1:0] dma_offset(logic [2:0] mode, logic [1:0] idx);
    case (mode)
      3'd1, 3'd5: dma_offset = {1'b0, idx[0]};
      3'd3, 3'd7: dma_offset = {1'b0, idx[1]};
      3'd4:       dma_offset = idx;
      default:    dma_offset = 2'd0;
    endcase
  endfunction

  // bytes per HDMA line for each mode
  function automatic logic [2:0] hdma_units(logic [2:0] mode);
    case (mode)
      3'd0:             hdma_units = 3'd1;
      3'd1, 3'd2, 3'd6: hdma_units = 3'd2;
      default:          hdma_units = 3'd4;
    endcase
  endfunction

endpackage
