// mem_map: decoder of the CPU's 24-bit A-bus address.
//
// It follows the CPU memory map figure. Banks 00-3F and 80-BF hold, in
// their lower half, the first 8 KB of work RAM at 0000-1FFF (2.68 MHz),
// the PPU and other B-bus registers at 2000-3FFF (3.58 MHz; 2100-21FF is
// passed to the 8-bit B-bus), the controller ports at 4000-41FF
// (1.79 MHz), the CPU and DMA registers at 4200-5FFF (3.58 MHz) and the
// expansion area at 6000-7FFF (2.68 MHz); their upper half, 8000-FFFF, is
// cartridge memory. Banks 40-7D and C0-FF are cartridge memory throughout,
// and banks 7E-7F are the 128 KB of work RAM. Cartridge memory in banks
// 00-7D is "memory 1", fixed at 2.68 MHz; in banks 80-FF it is "memory 2",
// 2.68 MHz or 3.58 MHz as selected by 0x420D (fast). The decoder is purely
// combinational.
module mem_map
  import snes_pkg::*;
(
  input  logic [23:0] addr,
  input  logic        fast,      // 0x420D bit 0
  output region_t     region,
  output speed_t      speed,
  output logic [16:0] wram_addr,
  output logic [7:0]  bbus_addr
);
  logic [7:0]  bank;
  logic [15:0] off;
  logic        sys_bank;  // banks 00-3F, 80-BF
  speed_t      mem_speed;

  always_comb begin
    bank = addr[23:16];
    off  = addr[15:0];
    sys_bank  = (bank[6] == 1'b0);
    mem_speed = (bank[7] && fast) ? SPD_358 : SPD_268;
    wram_addr = {4'd0, off[12:0]};
    bbus_addr = off[7:0];
    region = REG_CART;
    speed  = mem_speed;
    if (bank[7:1] == 7'h3F) begin            // banks 7E, 7F
      region    = REG_WRAM;
      speed     = SPD_268;
      wram_addr = {bank[0], off};
    end else if (sys_bank && !off[15]) begin
      priority casez (off[14:8])
        7'b00?????: begin region = REG_WRAM;   speed = SPD_268; end
        7'b0100001: begin region = REG_BBUS;   speed = SPD_358; end
        7'b01?????: begin region = REG_OPEN;   speed = SPD_358; end
        7'b1000000,
        7'b1000001: begin region = REG_JOYSER; speed = SPD_179; end
        7'b1000010: begin region = REG_CPUIO;  speed = SPD_358; end
        7'b1000011: begin region = REG_DMA;    speed = SPD_358; end
        7'b10?????: begin region = REG_OPEN;   speed = SPD_358; end
        default:    begin region = REG_EXPAND; speed = SPD_268; end
      endcase
    end
  end
endmodule
