// dcb_mem_decode: external memory map of the board (22-bit byte address).
//
//   000000-001FFF  spare            (no select)
//   002000-003FFF  boot ROM, 8 KB   8-bit bus
//   004000-07FFFF  spare            (no select)
//   080000-0FFFFF  EEPROM, 256 KB   16-bit bus; 084000 upward is an alias
//   100000-1FFFFF  RAM bank 1       16-bit bus
//   200000-2FFFFF  RAM bank 2
//   300000-3FFFFF  RAM bank 3
// Purely combinational. Outputs are active high; the board's active-low
// chip selects are formed at the pins. The region boundaries are the board's
// memory map; mapping the spare area above the EEPROM onto it by ignoring
// address bits [19:18] is how this design realises the alias. The boot ROM
// select goes to the alternate boot device instead when alt_boot is high.
// The address ranges are the board's; the decode is purely combinational
// and adds no delay of its own.
module dcb_mem_decode (
  input  logic [21:0] addr,
  input  logic        alt_boot,     // select the alternate boot device
  output logic        rom_cs,
  output logic        alt_rom_cs,
  output logic        ee_cs,
  output logic [2:0]  ram_cs,       // one-hot bank select
  output logic        bus16,        // 1: 16-bit device, 0: 8-bit boot ROM
  output logic        any_cs
);
  logic boot;
  always_comb begin
    boot       = (addr[21:13] == 9'h001);           // 2000-3FFF
    rom_cs     = boot && !alt_boot;
    alt_rom_cs = boot && alt_boot;
    ee_cs      = (addr[21:19] == 3'b001);           // 080000-0FFFFF
    ram_cs     = 3'b000;
    unique case (addr[21:20])
      2'd1: ram_cs = 3'b001;
      2'd2: ram_cs = 3'b010;
      2'd3: ram_cs = 3'b100;
      default: ram_cs = 3'b000;
    endcase
    bus16  = !boot;
    any_cs = boot || ee_cs || (|ram_cs);
  end
endmodule
