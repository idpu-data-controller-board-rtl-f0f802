// tb_dcb_regs: checks the FPGA register map: write/read-back of every
// writable register with its documented width, read-only sources, the pulse
// outputs (interrupt clear, soft reset, counter latch, command start,
// telemetry error clear) and reset values.
// The register layout is the board's; the version value and zero reads of
// unused indices are this design's own choices.
module tb_dcb_regs;
  import dcb_pkg::*;
  logic clk = 1'b0, rst = 1'b1, wr = 1'b0;
  logic [5:0] idx = '0;
  logic [15:0] wdata = '0, rdata;
  logic rd_drive;
  logic [6:0] ctrl, cdmasa;
  logic [5:0] page0, ien, int_clr;
  logic [7:0] page1, page2, page3;
  logic [15:0] time_reg;
  logic [4:0] sdma_page;
  tlm_cfg_t [NTLM-1:0] tlm_cfg;
  logic soft_rst, cnt_latch, cmd_start;
  logic [NTLM-1:0] tlm_err_clr;
  logic [19:0] cnt_lat = 20'hA5C3E;
  logic [5:0] int_status = 6'h2B;
  logic cmd_busy = 1'b1;
  logic [1:0] sum_stat = 2'b10;
  tlm_stat_t [NTLM-1:0] tlm_stat;
  int checks = 0, failures = 0;

  dcb_regs #(.VERSION(8'h5A)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic wr_reg(input logic [5:0] i, input logic [15:0] d);
    idx <= i; wdata <= d; wr <= 1'b1;
    @(posedge clk);
    wr <= 1'b0;
  endtask

  task automatic rd_expect(input logic [5:0] i, input logic [15:0] e, input string msg);
    idx <= i;
    @(posedge clk); #1;
    chk(rdata === e, $sformatf("%s: idx %0d read %04h expected %04h", msg, i, rdata, e));
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < NTLM; n++) begin
      tlm_stat[n].nm_st_adr = 16'(16'h1000 * n + 16'h123);
      tlm_stat[n].frame_err = 1'(n);
      tlm_stat[n].tmo_err   = 1'(n >> 1);
      tlm_stat[n].ovr_err   = 1'b1;
    end
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    rd_expect(R_CTRL, 16'h0000, "control resets to 0");
    rd_expect(R_PAGE0, 16'h0000, "page 0 resets to 0");
    wr_reg(R_CTRL, 16'hFFFF);   rd_expect(R_CTRL, 16'h007F, "control width");
    wr_reg(R_PAGE0, 16'hFFFF);  rd_expect(R_PAGE0, 16'h003F, "page 0 width");
    wr_reg(R_PAGE1, 16'h12F1);  rd_expect(R_PAGE1, 16'h00F1, "page 1");
    wr_reg(R_PAGE2, 16'h0042);  rd_expect(R_PAGE2, 16'h0042, "page 2");
    wr_reg(R_PAGE3, 16'h00C3);  rd_expect(R_PAGE3, 16'h00C3, "page 3");
    rd_expect(R_VERSION, 16'h005A, "version");
    wr_reg(R_TIME, 16'hBEEF);   rd_expect(R_TIME, 16'hBEEF, "time");
    rd_expect(R_CNTLO, 16'h5C3E, "counter low");
    rd_expect(R_CNTHI, 16'h000A, "counter high");
    wr_reg(R_IEN, 16'hFFFF);    rd_expect(R_IEN, 16'h003F, "enables");
    rd_expect(R_STATUS, 16'h002B, "status");
    wr_reg(R_CMDDMA, 16'h7F00); rd_expect(R_CMDDMA, 16'hFF00, "cmd dma address + busy");
    wr_reg(R_SUMMIT, 16'hFFFF); rd_expect(R_SUMMIT, 16'h009F, "summit page + status");
    chk(ctrl == 7'h7F && page0 == 6'h3F && page1 == 8'hF1 && time_reg == 16'hBEEF &&
        ien == 6'h3F && cdmasa == 7'h7F && sdma_page == 5'h1F, "register outputs");
    rd_expect(R_DIAG, 16'h0000, "diag");
    chk(!rd_drive, "diag not driven");
    for (int n = 0; n < NTLM; n++) begin
      logic [5:0] b;
      b = R_TLM0 + 6'(8 * n);
      wr_reg(b, 16'hF000 | 16'(n * 16'h111));
      rd_expect(b, 16'(n * 16'h111) & 16'h0FFF, "start page");
      wr_reg(b + 6'd1, 16'h8000 + 16'(n));
      rd_expect(b + 6'd1, 16'h8000 + 16'(n), "read pointer");
      rd_expect(b + 6'd2, tlm_stat[n].nm_st_adr, "next message address");
      wr_reg(b + 6'd3, 16'h5AC0 | 16'(n));
      rd_expect(b + 6'd3, 16'h5AC0 | {13'd0, tlm_stat[n].frame_err, tlm_stat[n].tmo_err, tlm_stat[n].ovr_err},
                "control/end page");
      chk(tlm_cfg[n].en && tlm_cfg[n].out_en && tlm_cfg[n].end_page == 7'h5A, "tlm cfg fields");
    end
    // pulses
    fork
      wr_reg(R_STATUS, 16'h0015);
      begin @(posedge clk); #1 chk(int_clr == 6'h15 && !soft_rst, "interrupt clear pulse"); end
    join
    @(posedge clk); #1 chk(int_clr == 6'h00, "clear pulse is one cycle");
    fork
      wr_reg(R_CNTLO, 16'h0000);
      begin @(posedge clk); #1 chk(cnt_latch, "counter latch pulse"); end
    join
    fork
      wr_reg(R_CMDDMA, 16'h8300);
      begin @(posedge clk); #1 chk(cmd_start && cdmasa == 7'h03, "command start pulse"); end
    join
    fork
      wr_reg(R_TLM0 + 6'd8 * 6'd2 + 6'd3, 16'h0001);
      begin @(posedge clk); #1 chk(tlm_err_clr == 5'b00100, "telemetry error clear"); end
    join
    fork
      wr_reg(R_STATUS, 16'h0080);
      begin @(posedge clk); #1 chk(soft_rst, "soft reset pulse"); end
    join
    rst <= 1'b1; @(posedge clk); rst <= 1'b0;
    rd_expect(R_CTRL, 16'h0000, "control after reset");
    rd_expect(R_PAGE1, 16'h0000, "page 1 after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
