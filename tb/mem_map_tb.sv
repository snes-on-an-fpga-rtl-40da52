// mem_map_tb: checks the decoder against the memory map for a set of
// addresses on every region border and random addresses checked against
// an independent reference written with bank/offset ranges.
module mem_map_tb;
  import snes_pkg::*;
  logic [23:0] addr;
  logic fast;
  region_t region;
  speed_t speed;
  logic [16:0] wa;
  logic [7:0] ba;
  int checks = 0, failures = 0;
  mem_map dut (.addr, .fast, .region, .speed, .wram_addr(wa), .bbus_addr(ba));
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic ref_map(input logic [23:0] a, input logic f, output region_t r, output speed_t s,
                         output logic [16:0] w);
    int bank = int'(a[23:16]), off = int'(a[15:0]);
    w = 17'(off % 8192);
    if (bank == 'h7E || bank == 'h7F) begin r = REG_WRAM; s = SPD_268; w = 17'((bank - 'h7E) * 65536 + off); end
    else if ((bank <= 'h3F || (bank >= 'h80 && bank <= 'hBF)) && off < 'h8000) begin
      if (off < 'h2000)       begin r = REG_WRAM;   s = SPD_268; end
      else if (off < 'h2100)  begin r = REG_OPEN;   s = SPD_358; end
      else if (off < 'h2200)  begin r = REG_BBUS;   s = SPD_358; end
      else if (off < 'h4000)  begin r = REG_OPEN;   s = SPD_358; end
      else if (off < 'h4200)  begin r = REG_JOYSER; s = SPD_179; end
      else if (off < 'h4300)  begin r = REG_CPUIO;  s = SPD_358; end
      else if (off < 'h4400)  begin r = REG_DMA;    s = SPD_358; end
      else if (off < 'h6000)  begin r = REG_OPEN;   s = SPD_358; end
      else                    begin r = REG_EXPAND; s = SPD_268; end
    end else begin
      r = REG_CART; s = (bank >= 'h80 && f) ? SPD_358 : SPD_268;
    end
  endtask

  task automatic one(input logic [23:0] a, input logic f);
    region_t er; speed_t es; logic [16:0] ew;
    addr = a; fast = f; #1;
    ref_map(a, f, er, es, ew);
    checks++;
    if (region != er || speed != es || (er == REG_WRAM && wa != ew) || (er == REG_BBUS && ba != a[7:0])) begin
      failures++; if (failures < 10) $display("FAIL %h f%0d: %0d %0d %h", a, f, region, speed, wa);
    end
  endtask

  initial begin
    logic [23:0] pts[$] = '{24'h000000, 24'h001FFF, 24'h002000, 24'h002100, 24'h0021FF, 24'h002200,
      24'h004000, 24'h0041FF, 24'h004200, 24'h00420D, 24'h004300, 24'h00437F, 24'h005FFF,
      24'h006000, 24'h007FFF, 24'h008000, 24'h00FFC0, 24'h3F2118, 24'h400000, 24'h7D8000,
      24'h7E0000, 24'h7E1FFF, 24'h7FFFFF, 24'h800000, 24'h80FFFF, 24'hBF4300, 24'hC00000, 24'hFFFFFF};
    foreach (pts[i]) begin one(pts[i], 0); one(pts[i], 1); end
    repeat (20000) one(24'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
