// tb_dcb_fpga_load: the FPGA under full DMA load, at its default sizes.
//
// All DMA clients run at once at the rates the board is specified for:
//   - the SuMMIT writes a word every 20 us, with bursts of four
//     back-to-back words at the start and six at the end of each block;
//   - all five instruments send telemetry without pause: 8-word messages,
//     one word every 17 us, 17 zero bits between messages;
//   - the command engine works through a 120-record queue that sends each
//     command to all five instruments (two reads every 27 us).
// The processor answers HOLD after 16 clocks (about 650 ns), the hold
// latency the board expects. The run lasts about 4 ms. It must end with no
// telemetry error latched, every telemetry word, SuMMIT word and command
// where it belongs, and the command block finished. The testbench also
// measures the bus share taken by DMA (clocks with HLDA high) and the
// longest SuMMIT request-to-grant time, and prints both. The share must stay
// below one half, and the SuMMIT must always be granted within 2 us. All
// times are counted in periods of the 24 MHz master clock (the simulation
// clock period itself is arbitrary).
// The rates and the hold latency are the board's figures; the message
// length, queue length and run time are this testbench's choices.
module tb_dcb_fpga_load;
  import dcb_pkg::*;
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

  dcb_fpga dut (.*);
  always #5 clk24 = ~clk24;

  localparam int HLDA_LAT = 16;           // clocks, ~650 ns
  localparam int NREC     = 120;          // command records
  localparam logic [6:0] CBUF = 7'h2A;    // command buffer at 0x150000
  localparam logic [4:0] SPAGE = 5'h0A;   // SuMMIT DMA page at 0x140000

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

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
  bit cpu_busy = 0;
  always @(posedge clk24) begin
    if (hold && !hlda && !cpu_busy) begin
      repeat (HLDA_LAT) @(posedge clk24);
      hlda <= 1'b1;
    end else if (!hold && hlda) hlda <= 1'b0;
  end

  task automatic bus(input logic [15:0] a, input bit write, input logic [15:0] d,
                     output logic [15:0] q);
    @(negedge clk24);
    while (hold || hlda) @(negedge clk24);
    cpu_busy = 1;
    ale = 1; ad_in = a; inst = 0;
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
    bus(a, 1, d, q);
  endtask
  task automatic rd(input logic [15:0] a, output logic [15:0] q);
    bus(a, 0, 0, q);
  endtask
  function automatic logic [15:0] tr(input int n, input int r);
    return 16'h1FA0 + 16'(n * 16 + r * 2);
  endfunction
  function automatic logic [4:0] seg(input int n);
    return 5'(8'h0C + n);                 // telemetry n buffer segment
  endfunction

  // ------------------------------------------------------------ measurements
  bit measuring = 0;
  longint n_clk = 0, n_hlda = 0, n_fpga_cyc = 0, n_sum_cyc = 0;
  int sum_wait = 0, sum_wait_max = 0;
  always @(posedge clk24) begin
    if (measuring) begin
      n_clk++;
      if (hlda) n_hlda++;
      if (|dut.dma_done) n_fpga_cyc++;
    end
    if (sum_dmar && !sum_dmag) begin
      sum_wait++;
      if (sum_wait > sum_wait_max) sum_wait_max = sum_wait;
    end else sum_wait = 0;
  end

  // ------------------------------------------------------------ SuMMIT
  bit sum_run = 0;
  int sum_n = 0;
  logic [15:0] sum_exp [logic [16:1]];
  task automatic summit_write(input logic [16:1] a, input logic [15:0] d);
    @(negedge clk24);
    sum_dmar = 1;
    wait (sum_dmag);
    @(negedge clk24);
    sum_dmar = 0; sum_dmack = 1; sum_addr = a; sum_wdata = d;
    @(negedge clk24); sum_wr_n = 0;
    @(negedge clk24); @(negedge clk24); sum_wr_n = 1;
    @(negedge clk24); sum_dmack = 0;
    sum_exp[a] = d;
    sum_n++;
    if (measuring) n_sum_cyc++;
  endtask
  initial begin
    wait (sum_run);
    while (sum_run) begin
      for (int k = 0; k < 4; k++) summit_write(16'(sum_n), 16'(sum_n * 3 + 1));
      for (int k = 0; k < 16; k++) begin
        repeat (480) @(posedge clk24);   // 20 us
        summit_write(16'(sum_n), 16'(sum_n * 3 + 1));
      end
      for (int k = 0; k < 6; k++) summit_write(16'(sum_n), 16'(sum_n * 3 + 1));
      repeat (480) @(posedge clk24);   // 20 us
    end
  end

  // ------------------------------------------------------------ instruments
  logic [15:0] sent [NTLM][$];
  bit tlm_run = 0;
  task automatic tx_bit(input int i, input logic b);
    @(posedge iclk_out[i]);
    tlm_in[i] = b;
  endtask

  for (genvar i = 0; i < NTLM; i++) begin : g_inst
    int seq = 0;
    bit idle = 1;
    initial begin
      wait (tlm_run);
      while (tlm_run) begin
        automatic logic [15:0] w[$];
        idle = 0;
        for (int z = 0; z < 17; z++) tx_bit(i, 1'b0);
        for (int k = 0; k < 8; k++) begin
          logic [15:0] v;
          v = {3'(i), 13'(seq * 8 + k)};
          w.push_back(v);
          tx_bit(i, 1'b1);
          for (int b = 15; b >= 0; b--) tx_bit(i, v[b]);
        end
        tx_bit(i, 1'b0);
        foreach (w[k]) sent[i].push_back(w[k]);
        seq++;
        idle = 1;
      end
    end

    int n_cmd_rx = 0;
    logic [23:0] exp_cmd[$];
    initial begin
      logic [25:0] f;
      forever begin
        @(negedge iclk_out[i]);
        if (cmd_out[i]) begin
          for (int b = 0; b < 26; b++) begin
            @(negedge iclk_out[i]);
            f[25 - b] = cmd_out[i];
          end
          chk(^f[25:1] && !f[0], "command frame parity and stop bit");
          n_cmd_rx++;
          if (exp_cmd.size() == 0) chk(1'b0, $sformatf("instrument %0d unexpected command %06h", i, f[25:2]));
          else chk(f[25:2] == exp_cmd.pop_front(), "command contents");
        end
      end
    end
  end

  // ------------------------------------------------------------ test
  initial begin
    repeat (1500000) @(posedge clk24);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] q;
    int nw;
    repeat (5) @(posedge clk24);
    rst_n = 1;
    repeat (5) @(posedge clk24);

    // command queue: every record to all five instruments, then the end mark
    for (int k = 0; k < NREC; k++) begin
      logic [23:0] c;
      c = 24'h123400 + 24'(k * 77);
      mem[{CBUF, 14'(2 * k)}]     = {c[7:0], 8'h1F};
      mem[{CBUF, 14'(2 * k + 1)}] = c[23:8];
      for (int i = 0; i < NTLM; i++)
        case (i)
          0: g_inst[0].exp_cmd.push_back(c);
          1: g_inst[1].exp_cmd.push_back(c);
          2: g_inst[2].exp_cmd.push_back(c);
          3: g_inst[3].exp_cmd.push_back(c);
          default: g_inst[4].exp_cmd.push_back(c);
        endcase
    end
    mem[{CBUF, 14'(2 * NREC)}] = 16'h0080;

    // telemetry buffers: 4 KB each in their own segment, read pointer on
    // the last word, outputs and subsystem enabled
    for (int n = 0; n < NTLM; n++) begin
      wr(tr(n, 0), {4'd0, seg(n), 7'd0});
      wr(tr(n, 1), 16'h07FF);
      wr(tr(n, 3), {1'b0, 7'd3, 1'b1, 1'b1, 6'd0});
    end
    wr(16'h1F9E, {11'd0, SPAGE});
    wr(16'h1F80, 16'h0031);                    // SuMMIT + its DMA, command DMA
    repeat (50) @(posedge clk24);
    tlm_run = 1;
    sum_run = 1;
    repeat (4800) @(posedge clk24);                 // 200 us: all streams running
    measuring = 1;
    wr(16'h1F98, {1'b1, CBUF, 8'h00});
    repeat (84000) @(posedge clk24);                // 3.5 ms
    measuring = 0;
    tlm_run = 0;
    sum_run = 0;
    wait (g_inst[0].idle && g_inst[1].idle && g_inst[2].idle && g_inst[3].idle && g_inst[4].idle);
    repeat (2400) @(posedge clk24);                 // 100 us

    // command block finished, every command on every instrument
    rd(16'h1F98, q); chk(!q[15], "command block finished");
    rd(16'h1F96, q); chk(q[2] && !q[5], "command done latched, no overflow");
    chk(g_inst[0].n_cmd_rx == NREC && g_inst[1].n_cmd_rx == NREC && g_inst[2].n_cmd_rx == NREC &&
        g_inst[3].n_cmd_rx == NREC && g_inst[4].n_cmd_rx == NREC, "all commands received");

    // telemetry: no errors, buffers hold exactly what was sent
    for (int n = 0; n < NTLM; n++) begin
      automatic bit ok = 1;
      rd(tr(n, 3), q); chk(q[2:0] == 3'b000, $sformatf("subsystem %0d no error latched (%03b)", n, q[2:0]));
      rd(tr(n, 2), q);
      nw = int'(q);
      chk(nw == sent[n].size() && nw >= 150, $sformatf("subsystem %0d next-message address %0d, %0d words sent", n, nw, sent[n].size()));
      for (int a = 0; a < nw && a < sent[n].size(); a++)
        if (mem[{seg(n), 16'(a)}] != sent[n][a]) ok = 0;
      chk(ok, $sformatf("subsystem %0d buffer contents", n));
    end

    // SuMMIT words
    begin
      automatic bit ok = 1;
      foreach (sum_exp[a]) if (mem[{SPAGE, a}] != sum_exp[a]) ok = 0;
      chk(ok && sum_n > 150, $sformatf("SuMMIT wrote %0d words", sum_n));
    end

    // load figures
    $display("DMA share of the bus: %0d of %0d clocks (%0d %%), FPGA cycles %0d, SuMMIT cycles %0d",
             n_hlda, n_clk, n_hlda * 100 / n_clk, n_fpga_cyc, n_sum_cyc);
    $display("FPGA+SuMMIT DMA cycles per ms: %0d, longest SuMMIT wait %0d clocks",
             (n_fpga_cyc + n_sum_cyc) * 24000 / n_clk, sum_wait_max);
    chk(n_hlda * 2 < n_clk, "DMA takes less than half of the bus");
    chk(sum_wait_max < 48, "SuMMIT granted within 2 us");
    chk((n_fpga_cyc + n_sum_cyc) * 24000 / n_clk > 350, "DMA cycles near the specified 0.42 per us");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
