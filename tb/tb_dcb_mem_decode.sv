// tb_dcb_mem_decode: checks the memory map decode on region edges and on
// random addresses against a reference written with plain range compares.
// Purely combinational: each address is applied and the outputs checked
// after a short delay. The map is the board's; the treatment of the spare
// range above the EEPROM as an alias is this design's reading of it.
module tb_dcb_mem_decode;
  logic [21:0] addr;
  logic alt_boot, rom_cs, alt_rom_cs, ee_cs, bus16, any_cs;
  logic [2:0] ram_cs;
  int checks = 0, failures = 0;

  dcb_mem_decode dut (.*);

  task automatic check_one(input int a, input bit alt);
    bit boot, ee;
    logic [2:0] ram;
    addr = 22'(a); alt_boot = alt;
    #1;
    boot = (a >= 'h2000 && a <= 'h3FFF);
    ee   = (a >= 'h80000 && a < 'h100000);
    ram  = (a >= 'h300000) ? 3'b100 : (a >= 'h200000) ? 3'b010 : (a >= 'h100000) ? 3'b001 : 3'b000;
    checks++;
    if (rom_cs != (boot && !alt) || alt_rom_cs != (boot && alt) || ee_cs != ee ||
        ram_cs != ram || bus16 != !boot || any_cs != (boot || ee || ram != 0)) begin
      failures++;
      $display("FAIL addr %06h: rom %b alt %b ee %b ram %b bus16 %b", a, rom_cs, alt_rom_cs, ee_cs, ram_cs, bus16);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int edges[] = '{0, 'h1FFF, 'h2000, 'h2080, 'h3FFF, 'h4000, 'h7FFFF, 'h80000, 'h83FFF,
                    'h84000, 'hFFFFF, 'h100000, 'h1FFFFF, 'h200000, 'h2FFFFF, 'h300000, 'h3FFFFF};
    foreach (edges[i]) begin
      check_one(edges[i], 1'b0);
      check_one(edges[i], 1'b1);
    end
    for (int i = 0; i < 2000; i++) check_one(int'($urandom_range(0, 'h3FFFFF)), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
