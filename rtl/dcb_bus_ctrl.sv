// dcb_bus_ctrl: processor bus control - address demultiplexing, paging,
// chip-select decode, wait states and the memory bus multiplexer.
//
// The 16-bit processor multiplexes address and data on AD[15:0]; the address
// is latched while ALE is high. Address and strobes are sampled on the
// 24 MHz clock. For a processor access:
//   - 0000-03FF with INST=0 is the processor's own register/RAM space: no
//     external select.
//   - 1F00-1FFF with INST=0 is I/O: 1F00-1F7F selects the SuMMIT registers,
//     1F80-1FFF the FPGA registers (index = address[6:1]).
//   - Everything else goes to memory through the page select registers.
//     Code fetches (INST=1) always use page 0; data accesses use the window
//     address[15:14]. Page 0 supplies Addr[21:16] and the processor drives
//     Addr[15:0]; pages 1-3 supply Addr[21:14] and the processor Addr[13:0].
//     dcb_mem_decode then picks boot ROM, EEPROM or a RAM bank.
//   - BUSWIDTH is low (8-bit) only for the boot ROM.
//   - With the EEPROM write enable clear, EEPROM writes are suppressed; with
//     it set, every EEPROM access gets WAIT_CLKS clocks (one 8 MHz state) of
//     READY low at the start of its strobe.
// The FPGA bridges data between AD and the memory data bus and answers FPGA
// register reads itself. FPGA register writes take effect (reg_wr, one
// cycle) when the write strobe ends, with the data seen during the strobe.
// While the arbiter owns the bus (after HLDA) the memory address, selects and
// strobes come from the DMA side instead: from an FPGA client (word
// accesses, FPGA-made strobes) or from the SuMMIT (its strobes, page-based
// address, RAM only). fpga_cs marks processor accesses to the FPGA register
// window, and cstr/dstr flag processor and DMA strobes, for the
// diagnostic connector. The memory map, paging, override rules, bus width
// and EEPROM behaviour are the board's; sampling everything on the 24 MHz
// clock, the data bridge and the select/strobe timing are this design's.
module dcb_bus_ctrl
  import dcb_pkg::*;
#(
  parameter int unsigned WAIT_CLKS = 3
) (
  input  logic        clk,
  input  logic        rst,
  // processor bus
  input  logic        ale,
  input  logic        rd_n,
  input  logic        wr_n,
  input  logic        inst,
  input  logic        bhe_n,
  input  logic [15:0] ad_in,
  output logic [15:0] ad_out,
  output logic        ad_oe,
  output logic        buswidth,       // 1: 16-bit access
  output logic        ready,
  input  logic        alt_boot,       // select the alternate boot device
  // configuration
  input  logic [5:0]  page0,
  input  logic [7:0]  page1,
  input  logic [7:0]  page2,
  input  logic [7:0]  page3,
  input  logic        ee_we,
  // FPGA registers
  output logic        reg_wr,
  output logic [5:0]  reg_idx,
  output logic [15:0] reg_wdata,
  input  logic [15:0] reg_rdata,
  input  logic        reg_rd_drive,
  output logic        diag_sel,
  // DMA side
  input  logic        fpga_own,
  input  logic [21:1] dma_addr,
  input  logic [15:0] dma_wdata,
  input  logic        dma_we,
  input  logic        dma_rd,
  input  logic        dma_wr,
  input  logic        sum_own,
  input  logic [21:1] sum_addr,
  input  logic        sum_rd_n,
  input  logic        sum_wr_n,       // already gated outside RAM
  // memory bus
  output logic [21:0] mem_addr,
  output logic        mem_bhe_n,
  output logic        rom_cs,
  output logic        alt_rom_cs,
  output logic        ee_cs,
  output logic [2:0]  ram_cs,
  output logic        summit_cs,
  output logic        fpga_cs,        // FPGA register window (diagnostic)
  output logic        mem_rd_n,
  output logic        mem_wr_n,
  output logic [15:0] mem_wdata,
  output logic        mem_wdata_oe,
  input  logic [15:0] mem_rdata,
  output logic        cstr,
  output logic        dstr
);
  logic [15:0] a_q;
  logic        inst_q, bhe_q, wr_q, strobe_q;
  logic [$clog2(WAIT_CLKS + 1)-1:0] ws_cnt;

  logic        rd, wr, int_reg, io, sum_sel, fpga_sel, mem_sel;
  logic [1:0]  win;
  logic [21:0] lin, dec_addr;
  logic        d_rom, d_alt, d_ee, d_any, d_bus16;
  logic [2:0]  d_ram;
  logic        ee_access;

  always_comb begin
    rd       = !rd_n;
    wr       = !wr_n;
    int_reg  = !inst_q && (a_q < 16'h0400);
    io       = !inst_q && (a_q[15:8] == 8'h1F);
    sum_sel  = io && !a_q[7];
    fpga_sel = io && a_q[7];
    mem_sel  = !int_reg && !io;
    win      = inst_q ? 2'd0 : a_q[15:14];
    unique case (win)
      2'd0: lin = {page0, a_q};
      2'd1: lin = {page1, a_q[13:0]};
      2'd2: lin = {page2, a_q[13:0]};
      default: lin = {page3, a_q[13:0]};
    endcase
    if (fpga_own)     dec_addr = {dma_addr, 1'b0};
    else if (sum_own) dec_addr = {sum_addr, 1'b0};
    else              dec_addr = lin;
  end

  dcb_mem_decode u_dec (
    .addr(dec_addr), .alt_boot(alt_boot), .rom_cs(d_rom), .alt_rom_cs(d_alt),
    .ee_cs(d_ee), .ram_cs(d_ram), .bus16(d_bus16), .any_cs(d_any)
  );

  assign ee_access = !fpga_own && !sum_own && mem_sel && d_ee && (rd || wr);

  always_ff @(posedge clk) begin
    if (rst) begin
      a_q <= '0; inst_q <= 1'b0; bhe_q <= 1'b1; wr_q <= 1'b0; strobe_q <= 1'b0;
      ws_cnt <= '0; reg_wdata <= '0;
    end else begin
      if (ale) begin
        a_q    <= ad_in;
        inst_q <= inst;
        bhe_q  <= bhe_n;
      end
      wr_q     <= wr;
      strobe_q <= rd || wr;
      if (wr && fpga_sel) reg_wdata <= ad_in;
      if (ee_access && ee_we && !strobe_q) ws_cnt <= ($bits(ws_cnt))'(WAIT_CLKS - 1);
      else if (ws_cnt != '0) ws_cnt <= ws_cnt - 1'b1;
    end
  end

  always_comb begin
    reg_idx  = a_q[6:1];
    reg_wr   = fpga_sel && wr_q && !wr && !fpga_own && !sum_own;
    diag_sel = fpga_sel && (reg_idx == R_DIAG) && (rd || wr);
    ready    = !((ee_access && ee_we && !strobe_q) || ws_cnt != '0);
    buswidth = !(mem_sel && !d_bus16);

    mem_addr     = dec_addr;
    mem_bhe_n    = 1'b0;
    rom_cs       = 1'b0;
    alt_rom_cs   = 1'b0;
    ee_cs        = 1'b0;
    ram_cs       = '0;
    summit_cs    = 1'b0;
    fpga_cs      = 1'b0;
    mem_rd_n     = 1'b1;
    mem_wr_n     = 1'b1;
    mem_wdata    = '0;
    mem_wdata_oe = 1'b0;
    ad_out       = '0;
    ad_oe        = 1'b0;
    cstr         = 1'b0;
    dstr         = 1'b0;
    if (fpga_own) begin
      rom_cs       = d_rom;
      alt_rom_cs   = d_alt;
      ee_cs        = d_ee;
      ram_cs       = d_ram;
      mem_rd_n     = !dma_rd;
      mem_wr_n     = !(dma_wr && !(d_ee && !ee_we));
      mem_wdata    = dma_wdata;
      mem_wdata_oe = dma_we;
      dstr         = dma_rd || dma_wr;
    end else if (sum_own) begin
      ram_cs       = d_ram;
      mem_rd_n     = sum_rd_n;
      mem_wr_n     = sum_wr_n;
      dstr         = !sum_rd_n || !sum_wr_n;
    end else begin
      mem_bhe_n    = bhe_q;
      rom_cs       = mem_sel && d_rom;
      alt_rom_cs   = mem_sel && d_alt;
      ee_cs        = mem_sel && d_ee;
      ram_cs       = mem_sel ? d_ram : 3'b000;
      summit_cs    = sum_sel;
      fpga_cs      = fpga_sel;
      mem_rd_n     = !(rd && (mem_sel || sum_sel));
      mem_wr_n     = !(wr && (sum_sel || (mem_sel && !(d_ee && !ee_we))));
      mem_wdata    = ad_in;
      mem_wdata_oe = wr && (mem_sel || sum_sel);
      ad_out       = fpga_sel ? reg_rdata : mem_rdata;
      ad_oe        = rd && ((fpga_sel && reg_rd_drive) || (mem_sel && d_any) || sum_sel);
      cstr         = (rd || wr) && (mem_sel || io);
    end
  end
endmodule
