// ppu_pkg: types and helper functions shared by the PPU blocks.
//
// ppu_cfg_t is the decoded view of the PPU registers (0x2100-0x2133) that
// the background, sprite and mixer units read. bg_bpp gives the bits per
// pixel of each background in each BG mode (0 when the background is not
// present in that mode); the table is this design's choice, taken from the
// console's programming model, since the document only names the modes.
package ppu_pkg;

  typedef struct packed {
    logic            force_blank;  // 0x2100 a
    logic [3:0]      brightness;   // 0x2100 b
    logic [2:0]      obj_size;     // 0x2101 a
    logic [1:0]      obj_name;     // 0x2101 b
    logic [2:0]      obj_base;     // 0x2101 c
    logic [3:0]      bg_tile16;    // 0x2105 abcd (BG4..BG1)
    logic [3:0]      mosaic_size;  // 0x2106 a: block is size+1 pixels square
    logic [3:0]      mosaic_en;    // 0x2106 b (BG4..BG1)
    logic            bg3_prio;     // 0x2105 e
    logic [2:0]      bg_mode;      // 0x2105 f
    logic [3:0][7:0] bg_sc;        // 0x2107-0x210A
    logic [3:0][3:0] bg_nba;       // 0x210B-0x210C
    logic [3:0][9:0] hofs;         // 0x210D, 0x210F, 0x2111, 0x2113
    logic [3:0][9:0] vofs;         // 0x210E, 0x2110, 0x2112, 0x2114
    logic [4:0]      tm;           // 0x212C main screen enables
    logic [4:0]      ts;           // 0x212D sub screen enables
    logic [4:0][3:0] win_sel;      // 0x2123-0x2125 b/a nibbles (OBJ, BG4..BG1)
    logic [3:0][7:0] win_pos;      // 0x2126-0x2129 (W2R, W2L, W1R, W1L)
    logic [4:0][1:0] win_logic;    // 0x212A-0x212B (OBJ, BG4..BG1)
    logic [4:0]      tmw;          // 0x212E main screen window masks
    logic [7:0]      cgwsel;       // 0x2130
    logic [7:0]      cgadsub;      // 0x2131
    logic [14:0]     fixed_color;  // 0x2132, {B,G,R}
  } ppu_cfg_t;

  function automatic logic [3:0] bg_bpp(logic [2:0] mode, logic [1:0] bg);
    logic [3:0] r;
    case (mode)
      3'd0: r = 4'd2;
      3'd1: r = (bg == 2'd3) ? 4'd0 : (bg == 2'd2) ? 4'd2 : 4'd4;
      3'd2: r = (bg[1]) ? 4'd0 : 4'd4;
      3'd3: r = (bg[1]) ? 4'd0 : (bg == 2'd0) ? 4'd8 : 4'd4;
      3'd4: r = (bg[1]) ? 4'd0 : (bg == 2'd0) ? 4'd8 : 4'd2;
      3'd5: r = (bg[1]) ? 4'd0 : (bg == 2'd0) ? 4'd4 : 4'd2;
      3'd6: r = (bg == 2'd0) ? 4'd4 : 4'd0;
      default: r = 4'd0;   // mode 7 is not built
    endcase
    return r;
  endfunction

  // result of a background or sprite unit for one pixel
  typedef struct packed {
    logic       opaque;
    logic [7:0] color;     // CGRAM index
    logic [1:0] prio;      // BG: tile priority bit in [0]; OBJ: 0-3
  } layer_px_t;

endpackage
