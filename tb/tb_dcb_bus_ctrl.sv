// tb_dcb_bus_ctrl: runs processor bus cycles (ALE, then a read or write
// strobe) through the bus controller with random page registers and
// addresses, and checks against a reference decode: the linear address,
// which chip select is active, the suppressed selects for the internal
// register space, the SuMMIT and FPGA register windows, BUSWIDTH for the
// boot ROM, EEPROM write protection and the one-state wait when EEPROM
// writes are enabled, FPGA register write strobes and read data, and the
// switch of the memory bus to FPGA and SuMMIT DMA cycles.
// The expected addresses and selects are computed here from the board's
// memory map and paging rules; the bus cycle shapes are this testbench's.
module tb_dcb_bus_ctrl;
  localparam int WAIT = 3;
  logic clk = 1'b0, rst = 1'b1;
  logic ale = 0, rd_n = 1, wr_n = 1, inst = 0, bhe_n = 0, alt_boot = 0;
  logic [15:0] ad_in = '0, ad_out, reg_wdata, reg_rdata, mem_wdata, dma_wdata = '0;
  logic ad_oe, buswidth, ready, reg_wr, reg_rd_drive = 1'b1, diag_sel;
  logic [5:0] page0 = '0, reg_idx;
  logic [7:0] page1 = '0, page2 = '0, page3 = '0;
  logic ee_we = 1'b0;
  logic fpga_own = 0, dma_we = 0, dma_rd = 0, dma_wr = 0, sum_own = 0, sum_rd_n = 1, sum_wr_n = 1;
  logic [21:1] dma_addr = '0, sum_addr = '0;
  logic [21:0] mem_addr;
  logic mem_bhe_n, rom_cs, alt_rom_cs, ee_cs, summit_cs, fpga_cs, mem_rd_n, mem_wr_n, mem_wdata_oe, cstr, dstr;
  logic [2:0] ram_cs;
  logic [15:0] mem_rdata;
  int checks = 0, failures = 0, n_wait = 0, n_regwr = 0, n_int = 0, n_io = 0;
  logic [5:0] last_widx; logic [15:0] last_wdata;

  dcb_bus_ctrl #(.WAIT_CLKS(WAIT)) dut (.*);
  always #5 clk = ~clk;
  assign reg_rdata = {10'h2A5, reg_idx};
  assign mem_rdata = mem_addr[16:1] ^ 16'hC33C;

  always @(posedge clk) if (reg_wr) begin n_regwr++; last_widx = reg_idx; last_wdata = reg_wdata; end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  function automatic logic [21:0] ref_lin(input logic [15:0] a, input bit code);
    int w = code ? 0 : a / 16384;
    case (w)
      0: return 22'(page0 * 65536 + a);
      1: return 22'(page1 * 16384 + a % 16384);
      2: return 22'(page2 * 16384 + a % 16384);
      default: return 22'(page3 * 16384 + a % 16384);
    endcase
  endfunction

  task automatic cycle(input logic [15:0] a, input bit code, input bit write, input logic [15:0] d);
    logic [21:0] l;
    bit internal, io, boot, ee, ram, mem;
    int waits = 0;
    l = ref_lin(a, code);
    internal = !code && a < 16'h0400;
    io = !code && a >= 16'h1F00 && a <= 16'h1FFF;
    mem = !internal && !io;
    boot = mem && l >= 22'h2000 && l <= 22'h3FFF;
    ee = mem && l >= 22'h80000 && l < 22'h100000;
    ram = mem && l >= 22'h100000;
    @(negedge clk);
    ale = 1; ad_in = a; inst = code;
    @(negedge clk);
    ale = 0; ad_in = d;
    if (write) wr_n = 0; else rd_n = 0;
    #1;
    chk(rom_cs == boot && ee_cs == ee && (|ram_cs) == ram, $sformatf("selects for %04h code %0b lin %06h", a, code, l));
    chk(summit_cs == (io && a < 16'h1F80), "SuMMIT select");
    chk(fpga_cs == (io && a >= 16'h1F80), "FPGA register select");
    if (mem) chk(mem_addr == l, $sformatf("linear address %06h expected %06h", mem_addr, l));
    if (mem) chk(buswidth == !boot, "bus width");
    if (ram) chk(ram_cs == 3'(1 << (l[21:20] - 1)), "RAM bank");
    chk(mem_wr_n == !(write && ((mem && !(ee && !ee_we)) || (io && a < 16'h1F80))), "write strobe");
    chk(mem_rd_n == !(!write && (mem || (io && a < 16'h1F80))), "read strobe");
    if (write && mem) chk(mem_wdata_oe && mem_wdata == d, "write data to memory");
    if (!write && io && a >= 16'h1F80) chk(ad_oe && ad_out == {10'h2A5, a[6:1]}, "FPGA register read");
    if (!write && mem && (boot || ee || ram)) chk(ad_oe && ad_out == (l[16:1] ^ 16'hC33C), "memory read bridged");
    chk(cstr == !internal, "CPU strobe flag");
    while (!ready) begin waits++; @(negedge clk); end
    if (ee && ee_we) begin chk(waits == WAIT, $sformatf("EEPROM wait %0d", waits)); n_wait++; end
    else chk(waits == 0, "no wait state");
    @(negedge clk);
    @(negedge clk);
    rd_n = 1; wr_n = 1;
    @(negedge clk);
    if (write && io && a >= 16'h1F80) begin
      chk(last_widx == a[6:1] && last_wdata == d, "FPGA register write");
    end
    n_int += int'(internal); n_io += int'(io);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int wr0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    // reset state: page 0 = 0, code fetch at 2080 hits the boot ROM
    cycle(16'h2080, 1, 0, 0);
    cycle(16'h0100, 0, 0, 0);
    cycle(16'h0100, 1, 0, 0);
    wr0 = n_regwr;
    cycle(16'h1F84, 0, 1, 16'h1234);
    chk(n_regwr == wr0 + 1, "one register write strobe");
    cycle(16'h1F02, 0, 1, 16'hABCD);
    cycle(16'h1F8C, 0, 0, 0);
    for (int i = 0; i < 600; i++) begin
      if (i % 20 == 0) begin
        page0 = 6'($urandom); page1 = 8'($urandom); page2 = 8'($urandom); page3 = 8'($urandom);
        if (i % 40 == 0) page1 = 8'h20 + 8'($urandom_range(0, 15));   // EEPROM window
        ee_we = 1'($urandom);
      end
      cycle(16'($urandom), 1'($urandom % 4 == 0), 1'($urandom), 16'($urandom));
    end
    chk(n_wait > 0 && n_int > 0 && n_io > 0, "wait states, internal and I/O accesses seen");
    // FPGA DMA cycle
    @(negedge clk);
    fpga_own = 1; dma_addr = 21'h0ABCDE; dma_we = 1; dma_wr = 1; dma_wdata = 16'h5555;
    #1;
    chk(mem_addr == {21'h0ABCDE, 1'b0} && !mem_wr_n && mem_wdata_oe && mem_wdata == 16'h5555 && dstr && !cstr,
        "FPGA DMA drives the memory bus");
    chk(ram_cs == 3'(1 << (mem_addr[21:20] - 1)), "FPGA DMA RAM select");
    @(negedge clk);
    fpga_own = 0; dma_wr = 0; dma_we = 0;
    sum_own = 1; sum_addr = 21'h112345; sum_rd_n = 0;
    #1;
    chk(mem_addr == {21'h112345, 1'b0} && !mem_rd_n && dstr && ram_cs == 3'b010, "SuMMIT DMA drives the memory bus");
    @(negedge clk);
    sum_own = 0; sum_rd_n = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
