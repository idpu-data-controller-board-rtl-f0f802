// tb_dcb_fpga: end-to-end test of the Data Controller Board FPGA.
//
// Models around the FPGA: a processor that runs bus cycles (ALE, strobes,
// READY) and answers HOLD with HLDA after a settable latency; one RAM/ROM/
// EEPROM array behind the chip selects; a SuMMIT that requests DMA and
// writes words; five instruments that send telemetry on their serial lines
// clocked by the FPGA's instrument clock and decode the command lines.
// The run: boot-ROM fetch, internal-register and spare accesses, paging,
// EEPROM write protection and wait state, register read-back, interrupts
// (1 s tick, timer tick, SuMMIT lines) with masking and clearing, counter
// latch, a command queue written by the processor through a page window and
// sent by DMA (with a dead-time record and guard/F0 interaction), the F0
// command on all enabled instruments, SuMMIT DMA inside and outside RAM,
// telemetry from all five instruments into separate circular buffers with
// a wrap, an overrun, a framing error and (with a slow HLDA) a timeout, and
// finally the FPGA soft reset. The microsecond counter is shortened to
// 12 bits so several F0 periods fit. Each mechanism is counted; one that
// never happened counts as a failure.
// The mechanisms and the rules checked are the board's; the models of the
// processor, memory, SuMMIT and instruments are simple stand-ins written
// for this testbench, and the shortened counter is a simulation choice.
module tb_dcb_fpga;
  import dcb_pkg::*;
  localparam int CW = 12;
  logic clk24 = 1'b0, rst_n = 1'b0;
  logic clk8m, ale = 0, rd_n = 1, wr_n = 1, inst = 0, bhe_n = 0;
  logic [15:0] ad_in = '0, ad_out;
  logic ad_oe, buswidth, ready, hold, hlda = 0, extint1, extint, sel_alt_boot_n = 1;
  logic [21:0] mem_addr;
  logic mem_bhe_n, rom_cs, alt_rom_sel, ee_cs, mem_rd_n, mem_wr_n, mem_wdata_oe, rom_on;
  logic [2:0] ram_cs;
  logic [15:0] mem_wdata, mem_rdata;
  logic summit_cs, fpga_cs, summit_rst_n, sum_dmar = 0, sum_dmag, sum_dmack = 0, sum_rd_n = 1, sum_wr_n = 1;
  logic [16:1] sum_addr = '0;
  logic sum_teract = 0, sum_ready = 1, yf_int = 0, msg_int = 0;
  logic [NTLM-1:0] tlm_in = '0, cmd_out, iclk_out, dmareq;
  logic diag_sel, cmddmareq, cstr, dstr, sererrs;
  logic [2:0] dmasel;

  dcb_fpga #(.CNT_W(CW), .TT_BITS(8)) dut (.*);
  always #5 clk24 = ~clk24;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  // ------------------------------------------------------------ mechanisms
  typedef enum int {M_BOOT, M_PAGE, M_INTREG, M_EE_WP, M_EE_WAIT, M_TICK1S, M_TICKTIM,
                    M_SUMINT, M_CMD, M_DEAD, M_F0, M_EOB, M_GUARD, M_SUMDMA, M_SUM_INH,
                    M_TLM_MSG, M_WRAP, M_OVR, M_FRAME, M_TMO, M_SECOND, M_SOFTRST, M_ROMOFF,
                    M_LATCH, M_NUM} mech_t;
  int mech[M_NUM];

  // ------------------------------------------------------------ memory
  logic [15:0] mem [logic [20:0]];
  logic [15:0] sum_wdata = '0;
  logic any_cs;
  assign any_cs = rom_cs || ee_cs || (|ram_cs);
  assign mem_rdata = (any_cs && mem.exists(mem_addr[21:1])) ? mem[mem_addr[21:1]] : 16'h0000;
  always @(posedge clk24) begin
    if (!mem_wr_n && any_cs) mem[mem_addr[21:1]] = dut.sum_own ? sum_wdata : mem_wdata;
  end

  // ------------------------------------------------------------ processor
  int hlda_lat = 4;
  bit cpu_busy = 0;
  int n_wait_clks = 0;
  always @(posedge clk24) begin
    if (hold && !hlda && !cpu_busy) begin
      repeat (hlda_lat) @(posedge clk24);
      hlda <= 1'b1;
    end else if (!hold && hlda) hlda <= 1'b0;
  end
  always @(posedge clk24) if (!ready) n_wait_clks++;

  task automatic bus(input logic [15:0] a, input bit code, input bit write,
                     input logic [15:0] d, output logic [15:0] q);
    @(negedge clk24);
    while (hold || hlda) @(negedge clk24);
    cpu_busy = 1;
    ale = 1; ad_in = a; inst = code;
    @(negedge clk24);
    ale = 0; ad_in = d;
    if (write) wr_n = 0; else rd_n = 0;
    @(negedge clk24);
    @(negedge clk24);
    while (!ready) @(negedge clk24);
    q = ad_oe ? ad_out : 16'hDEAD;
    rd_n = 1; wr_n = 1;
    @(negedge clk24);
    cpu_busy = 0;
  endtask

  task automatic wr(input logic [15:0] a, input logic [15:0] d);
    logic [15:0] q;
    bus(a, 0, 1, d, q);
  endtask
  task automatic rd(input logic [15:0] a, output logic [15:0] q);
    bus(a, 0, 0, 0, q);
  endtask
  function automatic logic [15:0] tr(input int n, input int r);
    return 16'h1FA0 + 16'(n * 16 + r * 2);
  endfunction

  // ------------------------------------------------------------ SuMMIT
  task automatic summit_write(input logic [16:1] a, input logic [15:0] d);
    @(negedge clk24);
    sum_dmar = 1;
    wait (sum_dmag);
    @(negedge clk24);
    sum_dmar = 0; sum_dmack = 1; sum_addr = a; sum_wdata = d;
    @(negedge clk24); sum_wr_n = 0;
    @(negedge clk24); @(negedge clk24); sum_wr_n = 1;
    @(negedge clk24); sum_dmack = 0;
  endtask

  // ------------------------------------------------------------ instruments
  logic [15:0] sent [NTLM][$];          // words of complete messages
  bit tlm_run[NTLM];
  int n_msg_sent[NTLM];
  bit one_word_msg[NTLM];

  task automatic tx_bit(input int i, input logic b);
    @(posedge iclk_out[i]);
    tlm_in[i] = b;
  endtask

  for (genvar i = 0; i < NTLM; i++) begin : g_inst
    int seq = 0;
    initial begin
      forever begin
        wait (tlm_run[i]);
        for (int z = 0; z < 17 + (i * 3) % 7; z++) tx_bit(i, 1'b0);
        if (one_word_msg[i]) begin
          tx_bit(i, 1'b1);
          for (int b = 15; b >= 0; b--) tx_bit(i, 1'b0 ^ b[0]);
          tx_bit(i, 1'b0);
          one_word_msg[i] = 0;
        end else begin
          automatic int n = 2 + (seq % 4);
          automatic logic [15:0] w[$];
          w.delete();
          for (int k = 0; k < n; k++) begin
            logic [15:0] v;
            v = {3'(i), 13'(seq * 7 + k)};
            w.push_back(v);
            tx_bit(i, 1'b1);
            for (int b = 15; b >= 0; b--) tx_bit(i, v[b]);
          end
          tx_bit(i, 1'b0);
          foreach (w[k]) sent[i].push_back(w[k]);
          seq++;
          n_msg_sent[i]++;
        end
      end
    end

    // command receiver: samples on the falling edge of the instrument clock
    int n_cmd_rx = 0, n_f0_rx = 0;
    logic [23:0] exp_cmd[$];
    initial begin
      logic [25:0] f;
      int pcnt;
      forever begin
        @(negedge iclk_out[i]);
        if (cmd_out[i]) begin
          for (int b = 0; b < 26; b++) begin
            @(negedge iclk_out[i]);
            f[25 - b] = cmd_out[i];
            if (b == 24) pcnt = int'(dut.cnt);
          end
          chk(^f[25:1] && !f[0], "command frame parity and stop bit");
          if (f[25:18] == 8'hF0) begin
            n_f0_rx++;
            mech[M_F0]++;
            chk(pcnt == (1 << CW) - 1, $sformatf("F0 parity bit at count %0d", pcnt));
            chk(f[17:2] == dut.time_reg, "F0 carries the time register");
          end else begin
            n_cmd_rx++;
            mech[M_CMD]++;
            if (exp_cmd.size() == 0) chk(1'b0, $sformatf("instrument %0d unexpected command %06h", i, f[25:2]));
            else chk(f[25:2] == exp_cmd.pop_front(), "command contents");
          end
        end
      end
    end
  end

  // ------------------------------------------------------------ monitors
  always @(posedge clk24) if (rst_n) begin
    if (dut.u_cmd.dead_evt) mech[M_DEAD]++;
    if (dut.u_cmd.ds == 3'd3 && dut.guard && dut.stb) mech[M_GUARD]++;
    if (dut.u_arb.st == 3'd2 && dut.u_arb.ncyc == 1) mech[M_SECOND]++;
    if (rom_cs && !rd_n) mech[M_BOOT]++;
  end

  // ------------------------------------------------------------ test
  initial begin
    repeat (3000000) @(posedge clk24);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] q, q2;
    logic [21:0] cbuf;
    int nrec;
    repeat (5) @(posedge clk24);
    rst_n = 1;
    repeat (5) @(posedge clk24);

    // boot ROM code fetch through page 0 = 0, internal registers, spare
    mem[22'h2080 >> 1] = 16'hA55A;
    bus(16'h2080, 1, 0, 0, q);
    chk(q == 16'hA55A && !buswidth, "boot ROM fetch");
    @(negedge clk24);
    ale = 1; ad_in = 16'h0100; inst = 0; @(negedge clk24); ale = 0; rd_n = 0; #1;
    chk(!any_cs && !ad_oe, "internal register space selects nothing");
    mech[M_INTREG]++;
    @(negedge clk24); rd_n = 1;

    // registers: control and pages read back, version
    wr(16'h1F82, 16'h0003); rd(16'h1F82, q); chk(q == 16'h0003, "page 0 read-back");
    wr(16'h1F82, 16'h0000);
    rd(16'h1F8A, q); chk(q == 16'h0003, "version register");

    // page window 1 -> RAM bank 1, data write and read back
    wr(16'h1F84, 16'h0040);                    // Addr[21:14] = 0x40 -> 0x100000
    wr(16'h4010, 16'h1234);
    chk(mem[22'h100010 >> 1] == 16'h1234, "write through page 1 lands at 100010");
    rd(16'h4010, q); chk(q == 16'h1234, "read through page 1");
    mech[M_PAGE]++;

    // EEPROM through page 2: protected, then enabled with a wait state
    wr(16'h1F86, 16'h0020);                    // 0x080000
    mem[22'h080004 >> 1] = 16'h7777;
    wr(16'h8004, 16'h1111);
    chk(mem[22'h080004 >> 1] == 16'h7777, "EEPROM write protected");
    mech[M_EE_WP]++;
    wr(16'h1F80, 16'h0040);                    // EEPROM write enable
    n_wait_clks = 0;
    wr(16'h8004, 16'h2222);
    chk(mem[22'h080004 >> 1] == 16'h2222, "EEPROM write when enabled");
    chk(n_wait_clks == 3, $sformatf("EEPROM wait state %0d clocks", n_wait_clks));
    if (n_wait_clks > 0) mech[M_EE_WAIT]++;
    wr(16'h1F80, 16'h0000);

    // counter latch
    wr(16'h1F90, 16'h0000);
    rd(16'h1F90, q); rd(16'h1F92, q2);
    chk({q2[3:0], q} <= 20'(dut.cnt) && 20'(dut.cnt) - {q2[3:0], q} < 20'd3, "counter latch");
    mech[M_LATCH]++;

    // interrupts: 1 s tick and timer tick
    wr(16'h1F96, 16'h003F);
    wr(16'h1F94, 16'h0003);
    wait (extint1);
    rd(16'h1F96, q);
    chk(q[1:0] != 0, "tick latched in status");
    if (q[0]) mech[M_TICK1S]++;
    if (q[1]) mech[M_TICKTIM]++;
    wr(16'h1F94, 16'h0000);
    repeat (3) @(posedge clk24);
    chk(!extint1, "masking drops EXTINT1");
    wr(16'h1F96, 16'h0003);
    wr(16'h1F94, 16'h0001);
    wait (extint1);
    rd(16'h1F96, q); if (q[0]) mech[M_TICK1S]++;
    wr(16'h1F96, 16'h0001);
    repeat (3) @(posedge clk24);
    rd(16'h1F96, q); chk(!q[0], "TICK1S cleared by the pulse register");
    // timer tick with the 256 Hz select
    wr(16'h1F96, 16'h0002); wr(16'h1F80, 16'h000C); wr(16'h1F94, 16'h0002);
    wait (extint1); mech[M_TICKTIM]++;
    wr(16'h1F94, 16'h0000); wr(16'h1F96, 16'h0002);
    // SuMMIT interrupt lines
    @(negedge clk24); yf_int = 1; repeat (3) @(negedge clk24); yf_int = 0;
    repeat (4) @(negedge clk24);
    chk(extint, "YF_INT latched onto EXTINT");
    wr(16'h1F96, 16'h0008);
    repeat (3) @(negedge clk24);
    chk(!extint, "YF_INT cleared");
    mech[M_SUMINT]++;

    // SuMMIT DMA inside RAM and outside it
    wr(16'h1F9E, 16'h000A);                    // Addr[21:17] = 0x0A -> 0x140000
    wr(16'h1F80, 16'h0021);                    // SuMMIT enabled, SuMMIT DMA enabled
    chk(summit_rst_n, "SuMMIT out of reset");
    for (int k = 0; k < 4; k++) summit_write(16'h0100 + 16'(k), 16'hC000 + 16'(k));
    for (int k = 0; k < 4; k++)
      chk(mem[{5'h0A, 16'h0100 + 16'(k)}] == 16'hC000 + 16'(k), "SuMMIT DMA data in RAM");
    mech[M_SUMDMA]++;
    wr(16'h1F9E, 16'h0004);                    // 0x080000: EEPROM, not RAM
    mem[{5'h04, 16'h0200}] = 16'h9999;
    summit_write(16'h0200, 16'h5555);
    chk(mem[{5'h04, 16'h0200}] == 16'h9999, "SuMMIT write outside RAM inhibited");
    mech[M_SUM_INH]++;

    // telemetry buffers: subsystem n in segment 0x08+2n; 4 has one page
    for (int n = 0; n < NTLM; n++) begin
      logic [6:0] ep;
      ep = (n == 4) ? 7'd0 : 7'd7;
      wr(tr(n, 0), {4'd0, 5'(8 + 2 * n), 7'd0});
      wr(tr(n, 1), {ep, 9'h1FF});
      wr(tr(n, 3), {1'b0, ep, 1'b1, 1'b1, 6'd0});
      rd(tr(n, 2), q);
      chk(q == 16'h0000, "next message address starts at the buffer start");
      tlm_run[n] = 1;
    end
    one_word_msg[3] = 1;

    // command queue: written by the processor through page window 1
    cbuf = 22'h1F8000;                          // CDMASA = 0x3F
    wr(16'h1F84, 16'(cbuf >> 14));
    nrec = 200;
    for (int r = 0; r < nrec; r++) begin
      logic [23:0] c;
      logic [7:0] m;
      c = {8'h3C, 16'(r * 1111)};
      m = (r == 5) ? 8'h00 : {3'b000, 5'(r % 31 + 1)};
      wr(16'h4000 + 16'(4 * r), {c[7:0], m});
      wr(16'h4000 + 16'(4 * r + 2), c[23:8]);
      if (m != 0) begin
        if (m[0]) g_inst[0].exp_cmd.push_back(c);
        if (m[1]) g_inst[1].exp_cmd.push_back(c);
        if (m[2]) g_inst[2].exp_cmd.push_back(c);
        if (m[3]) g_inst[3].exp_cmd.push_back(c);
        if (m[4]) g_inst[4].exp_cmd.push_back(c);
      end
    end
    wr(16'h4000 + 16'(4 * nrec), 16'h0080);
    wr(16'h1F8E, 16'h1234);                    // time register for F0
    wr(16'h1F96, 16'h0004);
    wr(16'h1F94, 16'h0004);                    // command done interrupt
    wr(16'h1F80, 16'h0031);                    // + command DMA enable
    wr(16'h1F98, 16'hBF00);                    // start, CDMASA = 0x3F
    rd(16'h1F98, q); chk(q[15], "command DMA busy");
    // let the buffers fill; the CPU drains subsystem 4 halfway once
    begin
      bit moved = 0;
      for (int t = 0; t < 1200; t++) begin
        repeat (400) @(posedge clk24);
        if (!moved) begin
          rd(tr(4, 2), q);
          if (q >= 16'h0100) begin
            wr(tr(4, 1), 16'h0080);
            moved = 1;
          end
        end
        if (extint1) begin
          rd(16'h1F96, q);
          if (q[2]) begin mech[M_EOB]++; wr(16'h1F94, 16'h0000); wr(16'h1F96, 16'h0004); end
        end
      end
    end
    rd(16'h1F98, q); chk(!q[15], "command DMA finished");
    chk(g_inst[0].exp_cmd.size() + g_inst[1].exp_cmd.size() + g_inst[2].exp_cmd.size() +
        g_inst[3].exp_cmd.size() + g_inst[4].exp_cmd.size() == 0, "all queued commands received");

    // check telemetry of subsystems 0..2 against what was sent
    for (int n = 0; n < 3; n++) begin
      automatic int k = 0;
      automatic bit ok = 1;
      rd(tr(n, 2), q);
      for (int a = 0; a < int'(q); a++) begin
        if (mem[{5'(8 + 2 * n), 16'(a)}] != sent[n][a]) begin
          if (ok) $display("sub %0d word %0d: RAM %04h sent %04h (sent %0d)", n, a, mem[{5'(8 + 2 * n), 16'(a)}], sent[n][a], sent[n].size());
          ok = 0;
        end
        k++;
      end
      chk(ok && k > 20, $sformatf("subsystem %0d buffer holds the %0d words sent", n, k));
      if (k > 0) mech[M_TLM_MSG]++;
    end
    rd(tr(3, 3), q); chk(q[2], "subsystem 3 framing error latched");
    if (q[2]) mech[M_FRAME]++;
    rd(tr(4, 3), q); chk(q[0], "subsystem 4 overrun latched");
    if (q[0]) mech[M_OVR]++;
    if (dut.g_tlm[4].u_ctl.cur == 16'h0080 || dut.g_tlm[4].u_ctl.nm < 16'h0080) mech[M_WRAP]++;
    rd(tr(4, 2), q); chk(q <= 16'h0080, "subsystem 4 wrapped and stopped at the read pointer");
    chk(sererrs, "serial error indicator");

    // slow HLDA: a word arrives before the previous one is written
    wr(tr(0, 3), {1'b0, 7'd7, 1'b1, 1'b1, 6'd1});
    hlda_lat = 600;
    repeat (20000) @(posedge clk24);
    hlda_lat = 4;
    repeat (2000) @(posedge clk24);
    rd(tr(0, 3), q); chk(q[1], "timeout latched");
    if (q[1]) mech[M_TMO]++;

    // boot ROM off, then the FPGA soft reset
    wr(16'h1F80, 16'h0002);
    chk(!rom_on, "boot ROM power switched off"); mech[M_ROMOFF]++;
    wr(16'h1F90, 0); rd(16'h1F90, q2);
    wr(16'h1F96, 16'h0080);
    repeat (5) @(posedge clk24);
    rd(16'h1F80, q); chk(q == 16'h0000 && rom_on, "soft reset clears control");
    rd(tr(1, 3), q); chk(q == 16'h0000, "soft reset clears telemetry control");
    chk(20'(dut.cnt) > 20'(q2), "soft reset leaves the counter running");
    mech[M_SOFTRST]++;

    for (int m = 0; m < M_NUM; m++) chk(mech[m] > 0, $sformatf("mechanism %s never happened", mech_t'(m)));
    $display("mechanisms: %p", mech);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
