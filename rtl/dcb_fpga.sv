// dcb_fpga: the Data Controller Board FPGA.
//
// Sits between the board's 16-bit microcontroller, its memories (boot ROM,
// EEPROM, three RAM banks), the SuMMIT 1553 protocol chip and the serial
// links to five instruments (0 Plastic, 1 SWEA, 2 MAG, 3 SEP, 4 STED). It
//   - divides the 24 MHz board clock into the 8 MHz processor clock and the
//     1 MHz serial timing (dcb_clkgen);
//   - keeps the 20-bit microsecond counter and makes the 1 s tick, the timer
//     tick and the sample-clock (F0) command timing (dcb_timebase);
//   - demultiplexes and pages the processor bus into a 4 MB space and
//     decodes the chip selects (dcb_bus_ctrl, dcb_mem_decode);
//   - holds the FPGA registers at 1F80-1FFF (dcb_regs) and the interrupt
//     latches (dcb_intc);
//   - arbitrates the memory bus among the SuMMIT, five telemetry writers and
//     the command reader using HOLD/HLDA (dcb_arbiter, dcb_summit_if);
//   - sends commands from a DMA queue and the periodic F0 command to the
//     instruments (dcb_cmd_ctrl);
//   - receives telemetry from each instrument into its own circular buffer
//     (dcb_tlm_shift, dcb_tlm_ctrl).
// All logic runs on clk24. rst_n is the board reset (power-on, push button),
// synchronised here; writing bit 7 of the pulse register resets everything
// except the microsecond counter. Ports are active high unless named _n;
// chip selects and strobes toward memory are active high (selects) or low
// (_n) as listed. The instrument clock and command outputs of a subsystem
// are driven only when its output enable bit is set.
// Some sub-block outputs are left unread here on purpose: the live counter
// value, the command engine's F0/command/dead-time event strobes, each
// shifter's sync flag, error strobe and current address, and the SuMMIT
// in-RAM flag serve as observation points for simulation.
// The set of functions and their connections follow the board description;
// the reset synchroniser, running everything from one clock with enables,
// and the DMASEL client numbering are this design's own choices.
module dcb_fpga
  import dcb_pkg::*;
#(
  parameter int unsigned CNT_W     = 20,
  parameter int unsigned TT_BITS   = 15,
  parameter int unsigned DIV1M     = 24,
  parameter int unsigned DMA_CLKS  = 5,
  parameter int unsigned WAIT_CLKS = 3,
  parameter logic [7:0]  VERSION   = 8'h03
) (
  input  logic            clk24,
  input  logic            rst_n,
  // processor
  output logic            clk8m,
  input  logic            ale,
  input  logic            rd_n,
  input  logic            wr_n,
  input  logic            inst,
  input  logic            bhe_n,
  input  logic [15:0]     ad_in,
  output logic [15:0]     ad_out,
  output logic            ad_oe,
  output logic            buswidth,
  output logic            ready,
  output logic            hold,
  input  logic            hlda,
  output logic            extint1,
  output logic            extint,
  input  logic            sel_alt_boot_n,   // low selects the alternate boot device
  // memory bus
  output logic [21:0]     mem_addr,
  output logic            mem_bhe_n,
  output logic            rom_cs,
  output logic            alt_rom_sel,
  output logic            ee_cs,
  output logic [2:0]      ram_cs,
  output logic            mem_rd_n,
  output logic            mem_wr_n,
  output logic [15:0]     mem_wdata,
  output logic            mem_wdata_oe,
  input  logic [15:0]     mem_rdata,
  output logic            rom_on,           // boot ROM power switch
  // SuMMIT
  output logic            summit_cs,
  output logic            fpga_cs,          // FPGA register select (diagnostic)
  output logic            summit_rst_n,
  input  logic            sum_dmar,
  output logic            sum_dmag,
  input  logic            sum_dmack,
  input  logic [16:1]     sum_addr,
  input  logic            sum_rd_n,
  input  logic            sum_wr_n,
  input  logic            sum_teract,
  input  logic            sum_ready,
  input  logic            yf_int,
  input  logic            msg_int,
  // instruments
  input  logic [NTLM-1:0] tlm_in,
  output logic [NTLM-1:0] cmd_out,
  output logic [NTLM-1:0] iclk_out,
  // diagnostic connector
  output logic            diag_sel,
  output logic [NTLM-1:0] dmareq,
  output logic            cmddmareq,
  output logic [2:0]      dmasel,
  output logic            cstr,
  output logic            dstr,
  output logic            sererrs
);
  // ---------------------------------------------------------------- reset
  logic [1:0] rs;
  logic       hard_rst, soft_rst, soft_q, rst;
  always_ff @(posedge clk24) rs <= {rs[0], rst_n};
  assign hard_rst = !rs[1];
  always_ff @(posedge clk24) soft_q <= hard_rst ? 1'b0 : soft_rst;
  assign rst = hard_rst || soft_q;

  // ---------------------------------------------------------------- clocks
  logic bit_stb, mid_stb, clk1m;
  dcb_clkgen #(.DIV1M(DIV1M)) u_clk (
    .clk(clk24), .rst(hard_rst), .clk8m(clk8m), .bit_stb(bit_stb),
    .mid_stb(mid_stb), .clk1m(clk1m)
  );

  // ---------------------------------------------------------------- registers
  logic [6:0]  ctrl;
  logic [5:0]  page0, ien, int_clr, int_status;
  logic [7:0]  page1, page2, page3;
  logic [15:0] time_reg, reg_rdata, reg_wdata;
  logic [6:0]  cdmasa;
  logic [4:0]  sdma_page;
  tlm_cfg_t  [NTLM-1:0] tlm_cfg;
  tlm_stat_t [NTLM-1:0] tlm_stat;
  logic [NTLM-1:0] tlm_err_clr;
  logic        cnt_latch, cmd_start, cmd_busy, reg_wr, reg_rd_drive;
  logic [5:0]  reg_idx;
  logic [1:0]  sum_stat;
  logic [CNT_W-1:0] cnt, cnt_lat;
  logic [19:0] cnt_lat20;

  assign cnt_lat20 = 20'(cnt_lat);

  dcb_regs #(.VERSION(VERSION)) u_regs (
    .clk(clk24), .rst(rst), .wr(reg_wr), .idx(reg_idx), .wdata(reg_wdata),
    .rdata(reg_rdata), .rd_drive(reg_rd_drive), .ctrl(ctrl), .page0(page0),
    .page1(page1), .page2(page2), .page3(page3), .time_reg(time_reg), .ien(ien),
    .cdmasa(cdmasa), .sdma_page(sdma_page), .tlm_cfg(tlm_cfg), .int_clr(int_clr),
    .soft_rst(soft_rst), .cnt_latch(cnt_latch), .cmd_start(cmd_start),
    .tlm_err_clr(tlm_err_clr), .cnt_lat(cnt_lat20), .int_status(int_status),
    .cmd_busy(cmd_busy), .sum_stat(sum_stat), .tlm_stat(tlm_stat)
  );
  assign rom_on = !ctrl[C_ROM_DIS];

  // ---------------------------------------------------------------- timebase
  logic tick1s, ticktim, f0_start, guard, stb;
  dcb_timebase #(.CNT_W(CNT_W), .TT_BITS(TT_BITS)) u_tb (
    .clk(clk24), .hard_rst(hard_rst), .bit_stb(bit_stb), .latch(cnt_latch),
    .tt_sel(ctrl[3:2]), .cnt(cnt), .cnt_lat(cnt_lat), .tick1s(tick1s),
    .ticktim(ticktim), .f0_start(f0_start), .guard(guard), .stb(stb)
  );

  // ---------------------------------------------------------------- interrupts
  logic       cmd_done_evt, cmd_ofl_evt;
  logic [1:0] yfm_s1, yfm_s2;
  logic [5:0] int_set;
  always_ff @(posedge clk24) begin
    yfm_s1 <= {msg_int, yf_int};
    yfm_s2 <= yfm_s1;
  end
  always_comb begin
    int_set            = '0;
    int_set[I_TICK1S]  = tick1s;
    int_set[I_TICKTIM] = ticktim;
    int_set[I_CMDDONE] = cmd_done_evt;
    int_set[I_YF]      = yfm_s2[0];
    int_set[I_MSG]     = yfm_s2[1];
    int_set[I_CMDOFL]  = cmd_ofl_evt;
  end
  dcb_intc u_int (
    .clk(clk24), .rst(rst), .set(int_set), .clr(int_clr), .ien(ien),
    .status(int_status), .extint1(extint1), .extint(extint)
  );

  // ---------------------------------------------------------------- SuMMIT
  logic        sum_req, sum_own, fpga_own, s_wr_n, s_rd_n;
  logic [21:1] s_addr;
  dcb_summit_if u_sum (
    .clk(clk24), .rst(rst), .sum_en(ctrl[C_SUM_EN]), .sum_dma_en(ctrl[C_SUM_DMA]),
    .sdma_page(sdma_page), .dmar(sum_dmar), .sum_addr(sum_addr),
    .sum_wr_n(sum_wr_n), .sum_rd_n(sum_rd_n), .teract_in(sum_teract),
    .ready_in(sum_ready), .sum_rst_n(summit_rst_n), .dma_req(sum_req),
    .dma_addr(s_addr), .dma_wr_n(s_wr_n), .dma_rd_n(s_rd_n), .in_sram(),
    .stat(sum_stat)
  );

  // ---------------------------------------------------------------- arbiter
  dma_req_t [5:0] fc;
  logic [5:0]  dma_done;
  logic [15:0] dma_rdata, dma_wdata;
  logic [21:1] inc_addr, dma_addr;
  logic        dma_we, dma_rd, dma_wr;
  dcb_arbiter #(.DMA_CLKS(DMA_CLKS)) u_arb (
    .clk(clk24), .rst(rst), .hold(hold), .hlda(hlda), .sum_req(sum_req),
    .sum_dmag(sum_dmag), .sum_dmack(sum_dmack), .fc(fc), .done(dma_done),
    .rdata(dma_rdata), .inc_addr(inc_addr), .mem_rdata(mem_rdata),
    .fpga_own(fpga_own), .sum_own(sum_own), .dma_addr(dma_addr),
    .dma_wdata(dma_wdata), .dma_we(dma_we), .dma_rd(dma_rd), .dma_wr(dma_wr),
    .dma_sel(dmasel)
  );

  // ---------------------------------------------------------------- bus control
  dcb_bus_ctrl #(.WAIT_CLKS(WAIT_CLKS)) u_bus (
    .clk(clk24), .rst(rst), .ale(ale), .rd_n(rd_n), .wr_n(wr_n), .inst(inst),
    .bhe_n(bhe_n), .ad_in(ad_in), .ad_out(ad_out), .ad_oe(ad_oe),
    .buswidth(buswidth), .ready(ready), .alt_boot(!sel_alt_boot_n),
    .page0(page0), .page1(page1), .page2(page2), .page3(page3),
    .ee_we(ctrl[C_EE_WE]), .reg_wr(reg_wr), .reg_idx(reg_idx),
    .reg_wdata(reg_wdata), .reg_rdata(reg_rdata), .reg_rd_drive(reg_rd_drive),
    .diag_sel(diag_sel), .fpga_own(fpga_own), .dma_addr(dma_addr),
    .dma_wdata(dma_wdata), .dma_we(dma_we), .dma_rd(dma_rd), .dma_wr(dma_wr),
    .sum_own(sum_own), .sum_addr(s_addr), .sum_rd_n(s_rd_n), .sum_wr_n(s_wr_n),
    .mem_addr(mem_addr), .mem_bhe_n(mem_bhe_n), .rom_cs(rom_cs),
    .alt_rom_cs(alt_rom_sel), .ee_cs(ee_cs), .ram_cs(ram_cs),
    .summit_cs(summit_cs), .fpga_cs(fpga_cs), .mem_rd_n(mem_rd_n), .mem_wr_n(mem_wr_n),
    .mem_wdata(mem_wdata), .mem_wdata_oe(mem_wdata_oe), .mem_rdata(mem_rdata),
    .cstr(cstr), .dstr(dstr)
  );

  // ---------------------------------------------------------------- commands
  logic [NTLM-1:0] out_en;
  logic            f0_evt, cmd_evt, dead_evt;
  for (genvar i = 0; i < NTLM; i++) begin : g_oe
    assign out_en[i] = tlm_cfg[i].out_en;
  end
  dcb_cmd_ctrl u_cmd (
    .clk(clk24), .rst(rst), .dma_en(ctrl[C_CMD_DMA]), .start(cmd_start),
    .cdmasa(cdmasa), .time_reg(time_reg), .stb(stb), .f0_start(f0_start),
    .guard(guard), .out_en(out_en), .dma(fc[5]), .done(dma_done[5]),
    .rdata(dma_rdata), .inc_addr(inc_addr), .busy(cmd_busy),
    .done_evt(cmd_done_evt), .ofl_evt(cmd_ofl_evt), .cmd_out(cmd_out),
    .f0_evt(f0_evt), .cmd_evt(cmd_evt), .dead_evt(dead_evt)
  );
  assign cmddmareq = fc[5].req;

  // ---------------------------------------------------------------- telemetry
  logic [NTLM-1:0] errlat;
  for (genvar i = 0; i < NTLM; i++) begin : g_tlm
    logic        w_vld, w_first, w_last, w_ferr, synced, err_evt;
    logic [15:0] w_data, cur;
    dcb_tlm_shift u_sh (
      .clk(clk24), .rst(rst), .en(tlm_cfg[i].en), .samp(mid_stb), .din(tlm_in[i]),
      .word_vld(w_vld), .word(w_data), .first(w_first), .last(w_last),
      .frame_err(w_ferr), .synced(synced)
    );
    dcb_tlm_ctrl u_ctl (
      .clk(clk24), .rst(rst), .cfg(tlm_cfg[i]), .err_clr(tlm_err_clr[i]),
      .word_vld(w_vld), .word(w_data), .first(w_first), .last(w_last),
      .frame_err(w_ferr), .dma(fc[i]), .done(dma_done[i]), .inc_addr(inc_addr),
      .stat(tlm_stat[i]), .cur_addr(cur), .err_evt(err_evt)
    );
    assign iclk_out[i] = clk1m && tlm_cfg[i].out_en;
    assign dmareq[i]   = fc[i].req;
    assign errlat[i]   = tlm_stat[i].frame_err || tlm_stat[i].tmo_err || tlm_stat[i].ovr_err;
  end
  assign sererrs = |errlat;
endmodule
