// tb_dcb_cmd_ctrl: runs command queues from a RAM model through the command
// subsystem, with a small (10-bit) microsecond counter supplying the bit
// strobe, F0 timing and guard. Five receivers decode the serial lines and
// check start bit, odd parity and stop bit; each decoded command must be the
// next queued command whose mask names that instrument, or the F0 command,
// whose parity bit must fall on the counter's all-ones value. Instrument 2
// has its outputs disabled and must receive nothing. Also checks:
// back-to-back frames 27 bit times apart (26 after a zero-mask record), the
// dead-time count, end-of-block done and busy, the buffer overflow at the
// last word of the 32 KB buffer, and abort by clearing the enable.
// Frame format, parity, dead time and the overflow rule are the board's;
// the expected record-to-frame timing reflects this design's prefetch.
module tb_dcb_cmd_ctrl;
  import dcb_pkg::*;
  localparam int SP = 4, CW = 10;
  logic clk = 1'b0, rst = 1'b1;
  logic dma_en = 1'b0, start = 1'b0, bit_stb = 1'b0;
  logic [6:0] cdmasa = 7'h25;
  logic [15:0] time_reg = 16'h4321;
  logic [NTLM-1:0] out_en = 5'b11011;
  dma_req_t dma;
  logic done = 1'b0;
  logic [15:0] rdata = '0;
  logic [21:1] inc_addr = '0;
  logic busy, done_evt, ofl_evt, f0_evt, cmd_evt, dead_evt;
  logic [NTLM-1:0] cmd_out;
  logic [CW-1:0] cnt, cnt_lat;
  logic tick1s, ticktim, f0_start, guard, stb;
  int checks = 0, failures = 0;
  int n_done = 0, n_ofl = 0, n_dead = 0, n_cmd = 0, exp_dead = 0, n_f0_rx[NTLM], n_rx[NTLM];
  int last_load = -1, last_len = 0, n_b2b = 0;
  bit gap_blocked = 0;
  logic [15:0] mem [logic [20:0]];
  logic [23:0] expq[NTLM][$];
  int bitno = 0;
  bit ignore_unexp = 0;

  dcb_timebase #(.CNT_W(CW), .TT_BITS(6)) u_tb (.clk, .hard_rst(rst), .bit_stb,
    .latch(1'b0), .tt_sel(2'd0), .cnt, .cnt_lat, .tick1s, .ticktim, .f0_start, .guard, .stb);
  dcb_cmd_ctrl dut (.clk, .rst, .dma_en, .start, .cdmasa, .time_reg, .stb, .f0_start,
    .guard, .out_en, .dma, .done, .rdata, .inc_addr, .busy, .done_evt, .ofl_evt,
    .cmd_out, .f0_evt, .cmd_evt, .dead_evt);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  // bit strobe every SP clocks
  initial forever begin
    repeat (SP - 1) @(posedge clk);
    bit_stb <= 1'b1;
    @(posedge clk);
    bit_stb <= 1'b0;
    bitno++;
  end

  // RAM model for command reads; unwritten words read as a zero-mask record
  initial forever begin
    @(negedge clk);
    done = 1'b0;
    if (dma.req) begin
      repeat ($urandom_range(1, 5)) @(negedge clk);
      chk(!dma.we, "command subsystem only reads");
      rdata = mem.exists(dma.addr) ? mem[dma.addr] : 16'h1200;
      inc_addr = dma.addr + 1'b1;
      done = 1'b1;
      @(negedge clk);
      done = 1'b0;
    end
  end

  // receivers, sampling in the middle of each bit
  for (genvar i = 0; i < NTLM; i++) begin : g_rx
    initial begin
      logic [25:0] f;
      int parity_cnt;
      forever begin
        @(posedge stb);
        repeat (SP - 1) @(posedge clk);
        #1;
        if (cmd_out[i]) begin
          for (int b = 0; b < 26; b++) begin
            @(posedge stb); repeat (SP - 1) @(posedge clk); #1;
            f[25 - b] = cmd_out[i];
            if (b == 24) parity_cnt = int'(cnt);
          end
          chk(^f[25:1] == 1'b1, "odd parity");
          chk(f[0] == 1'b0, "stop bit");
          chk(out_en[i], $sformatf("instrument %0d has outputs disabled", i));
          if (f[25:2] == {8'hF0, time_reg}) begin
            n_f0_rx[i]++;
            chk(parity_cnt == (1 << CW) - 1, $sformatf("F0 parity at count %0d", parity_cnt));
          end else begin
            n_rx[i]++;
            if (expq[i].size() == 0) chk(ignore_unexp, "unexpected command");
            else begin
              logic [23:0] e;
              e = expq[i].pop_front();
              chk(f[25:2] == e, $sformatf("instrument %0d command %06h expected %06h", i, f[25:2], e));
            end
          end
        end
      end
    end
  end

  // frame spacing and event counts
  always @(posedge clk) if (!rst) begin
    if (guard || f0_evt) gap_blocked = 1;
    if (cmd_evt || dead_evt) begin
      if (last_load >= 0 && !gap_blocked && busy) begin
        chk(bitno - last_load == last_len, $sformatf("frame spacing %0d, expected %0d", bitno - last_load, last_len));
        n_b2b++;
      end
      last_load = bitno;
      last_len  = cmd_evt ? CMD_FRAME : CMD_DEAD;
      gap_blocked = 0;
    end
    n_done += int'(done_evt); n_ofl += int'(ofl_evt);
    n_dead += int'(dead_evt); n_cmd += int'(cmd_evt);
  end

  task automatic go();
    last_load = -1;
    @(negedge clk); start = 1'b1; @(negedge clk); start = 1'b0;
    @(negedge clk);
    chk(busy, "busy after start");
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n = 60;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    dma_en = 1'b1;
    // queue of n records, a few with a zero mask, then the terminator
    for (int r = 0; r < n; r++) begin
      logic [23:0] c;
      logic [7:0] m;
      c = 24'($urandom) & 24'h7FFFFF;
      m = (r % 9 == 4) ? 8'h00 : {3'b000, 5'($urandom_range(1, 31))};
      if (m == 0) exp_dead++;
      mem[{cdmasa, 14'(2 * r)}]     = {c[7:0], m};
      mem[{cdmasa, 14'(2 * r + 1)}] = c[23:8];
      for (int i = 0; i < NTLM; i++) if (m[i] && out_en[i]) expq[i].push_back(c);
    end
    mem[{cdmasa, 14'(2 * n)}] = 16'h0080;
    go();
    wait (!busy);
    repeat (40 * SP) @(posedge clk);
    chk(n_done == 1, "done event");
    chk(n_dead == exp_dead, $sformatf("dead times %0d of %0d", n_dead, exp_dead));
    for (int i = 0; i < NTLM; i++) chk(expq[i].size() == 0, $sformatf("instrument %0d missed %0d", i, expq[i].size()));
    chk(n_b2b > 20, "back-to-back frames measured");
    // abort a queue by clearing the enable
    ignore_unexp = 1;
    go();
    repeat (100 * SP) @(posedge clk);
    dma_en = 1'b0;
    repeat (10) @(posedge clk);
    chk(!busy, "abort clears busy");
    for (int i = 0; i < NTLM; i++) expq[i].delete();
    repeat (40 * SP) @(posedge clk);
    ignore_unexp = 0;
    // buffer with no terminator: overflow at its last word
    cdmasa = 7'h26;
    dma_en = 1'b1;
    go();
    wait (!busy);
    repeat (40 * SP) @(posedge clk);
    chk(n_ofl == 1, "buffer overflow flagged");
    chk(n_done == 1, "no done event on overflow");
    for (int i = 0; i < NTLM; i++)
      if (out_en[i]) chk(n_f0_rx[i] >= 3, $sformatf("instrument %0d F0 count %0d", i, n_f0_rx[i]));
    chk(n_f0_rx[2] == 0 && n_rx[2] == 0, "disabled instrument silent");
    $display("commands %0d dead %0d F0 %p done %0d overflow %0d", n_cmd, n_dead, n_f0_rx, n_done, n_ofl);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
