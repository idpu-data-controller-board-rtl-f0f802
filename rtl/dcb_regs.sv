// dcb_regs: the FPGA register file at CPU addresses 1F80-1FFF.
//
// The CPU bus controller presents one-cycle write requests (wr, idx, wdata)
// and a register index for reads; idx is CPU address bits [6:1]. Read data
// is combinational. Register map (index: read / write):
//   0  control              (bit6 EEPROM write enable, bit5 SuMMIT DMA
//                            enable, bit4 command DMA enable, bits3:2 timer
//                            period, bit1 boot ROM off, bit0 SuMMIT enable)
//   1  page select 0 [5:0] = Addr[21:16];  2-4 page select 1-3 [7:0] = Addr[21:14]
//   5  version number / spare       6  diagnostic select (board-level device)
//   7  time register [15:0]         8  counter low / write latches counter
//   9  counter high [3:0]           10 interrupt enables [5:0]
//   11 interrupt status / pulse register (bit7 FPGA reset, bits5:0 clear)
//   12 command DMA: bit15 busy/start, bits14:8 buffer address Addr[21:15]
//   15 SuMMIT status (bit7 TERACT, bit6 READY) and DMA page [4:0] = Addr[21:17]
//   16+8n+0 telemetry n start page [11:0] = Addr[21:10]
//   16+8n+1 telemetry n read pointer [15:0] (word address [16:1])
//   16+8n+2 telemetry n next-message start address (read only)
//   16+8n+3 telemetry n end page [14:8], output enable [7], enable [6],
//           error latches [2:0] on read; a write with bit0 set clears them.
// Every register clears on rst (hard or FPGA soft reset). Writing bit 7 of
// the pulse register raises soft_rst for one cycle; the top turns it into
// the FPGA-wide reset. The map is the board's; the version value, the
// diagnostic select strobe and reads of unused indices returning zero are
// this design's own choices. rd_drive is low for the diagnostic index, whose
// data comes from the external diagnostic device.
module dcb_regs
  import dcb_pkg::*;
#(
  parameter logic [7:0] VERSION = 8'h03
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             wr,
  input  logic [5:0]       idx,
  input  logic [15:0]      wdata,
  output logic [15:0]      rdata,
  output logic             rd_drive,
  // register contents
  output logic [6:0]       ctrl,
  output logic [5:0]       page0,
  output logic [7:0]       page1,
  output logic [7:0]       page2,
  output logic [7:0]       page3,
  output logic [15:0]      time_reg,
  output logic [5:0]       ien,
  output logic [6:0]       cdmasa,
  output logic [4:0]       sdma_page,
  output tlm_cfg_t [NTLM-1:0] tlm_cfg,
  // one-cycle pulses
  output logic [5:0]       int_clr,
  output logic             soft_rst,
  output logic             cnt_latch,
  output logic             cmd_start,
  output logic [NTLM-1:0]  tlm_err_clr,
  // read-only sources
  input  logic [19:0]      cnt_lat,
  input  logic [5:0]       int_status,
  input  logic             cmd_busy,
  input  logic [1:0]       sum_stat,      // {TERACT, READY}
  input  tlm_stat_t [NTLM-1:0] tlm_stat
);
  logic       tlm_sel;
  logic [2:0] tlm_n;
  logic [1:0] tlm_r;

  assign tlm_sel = idx >= R_TLM0 && idx < R_TLM0 + 6'(8 * NTLM);
  assign tlm_n   = 3'((idx - R_TLM0) >> 3);
  assign tlm_r   = idx[1:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      ctrl        <= '0;
      page0       <= '0;
      page1       <= '0;
      page2       <= '0;
      page3       <= '0;
      time_reg    <= '0;
      ien         <= '0;
      cdmasa      <= '0;
      sdma_page   <= '0;
      tlm_cfg     <= '0;
      int_clr     <= '0;
      soft_rst    <= 1'b0;
      cnt_latch   <= 1'b0;
      cmd_start   <= 1'b0;
      tlm_err_clr <= '0;
    end else begin
      int_clr     <= '0;
      soft_rst    <= 1'b0;
      cnt_latch   <= 1'b0;
      cmd_start   <= 1'b0;
      tlm_err_clr <= '0;
      if (wr) begin
        unique case (idx)
          R_CTRL:   ctrl      <= wdata[6:0];
          R_PAGE0:  page0     <= wdata[5:0];
          R_PAGE1:  page1     <= wdata[7:0];
          R_PAGE2:  page2     <= wdata[7:0];
          R_PAGE3:  page3     <= wdata[7:0];
          R_TIME:   time_reg  <= wdata;
          R_CNTLO:  cnt_latch <= 1'b1;
          R_IEN:    ien       <= wdata[5:0];
          R_STATUS: begin
            int_clr  <= wdata[5:0];
            soft_rst <= wdata[7];
          end
          R_CMDDMA: begin
            cdmasa    <= wdata[14:8];
            cmd_start <= wdata[15];
          end
          R_SUMMIT: sdma_page <= wdata[4:0];
          default: begin
            if (tlm_sel) begin
              unique case (tlm_r)
                2'd0: tlm_cfg[tlm_n].st_page <= wdata[11:0];
                2'd1: tlm_cfg[tlm_n].rd_ptr  <= wdata;
                2'd3: begin
                  tlm_cfg[tlm_n].end_page <= wdata[14:8];
                  tlm_cfg[tlm_n].out_en   <= wdata[7];
                  tlm_cfg[tlm_n].en       <= wdata[6];
                  tlm_err_clr[tlm_n]      <= wdata[0];
                end
                default: ;
              endcase
            end
          end
        endcase
      end
    end
  end

  always_comb begin
    rdata    = '0;
    rd_drive = (idx != R_DIAG);
    unique case (idx)
      R_CTRL:    rdata = {9'd0, ctrl};
      R_PAGE0:   rdata = {10'd0, page0};
      R_PAGE1:   rdata = {8'd0, page1};
      R_PAGE2:   rdata = {8'd0, page2};
      R_PAGE3:   rdata = {8'd0, page3};
      R_VERSION: rdata = {8'd0, VERSION};
      R_TIME:    rdata = time_reg;
      R_CNTLO:   rdata = cnt_lat[15:0];
      R_CNTHI:   rdata = {12'd0, cnt_lat[19:16]};
      R_IEN:     rdata = {10'd0, ien};
      R_STATUS:  rdata = {10'd0, int_status};
      R_CMDDMA:  rdata = {cmd_busy, cdmasa, 8'd0};
      R_SUMMIT:  rdata = {8'd0, sum_stat, 1'b0, sdma_page};
      default: begin
        if (tlm_sel) begin
          unique case (tlm_r)
            2'd0: rdata = {4'd0, tlm_cfg[tlm_n].st_page};
            2'd1: rdata = tlm_cfg[tlm_n].rd_ptr;
            2'd2: rdata = tlm_stat[tlm_n].nm_st_adr;
            2'd3: rdata = {1'b0, tlm_cfg[tlm_n].end_page, tlm_cfg[tlm_n].out_en,
                           tlm_cfg[tlm_n].en, 3'd0, tlm_stat[tlm_n].frame_err,
                           tlm_stat[tlm_n].tmo_err, tlm_stat[tlm_n].ovr_err};
          endcase
        end
      end
    endcase
  end
endmodule
