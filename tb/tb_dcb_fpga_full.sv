// tb_dcb_fpga_full: one complete operation of the FPGA at its real sizes
// (20-bit microsecond counter, 24 clocks per bit). The processor model sets
// up telemetry subsystem 0 and a three-record command queue; instrument 0
// sends one three-word message, which must appear at the buffer start with
// the next-message address after it; the queued commands must arrive on
// the instruments named in their masks; then the run continues to the end
// of the first counter period (2^20 us), where the F0 sample-clock command
// must arrive with its parity bit on count FFFFF and the 1 s tick must be
// latched.
// The top runs with no parameter changes. The rules checked are the
// board's; the processor and instrument models are this testbench's own.
module tb_dcb_fpga_full;
  import dcb_pkg::*;
  logic clk24 = 1'b0, rst_n = 1'b0;
  logic clk8m, ale = 0, rd_n = 1, wr_n = 1, inst = 0, bhe_n = 0;
  logic [15:0] ad_in = '0, ad_out;
  logic ad_oe, buswidth, ready, hold, hlda = 0, extint1, extint, sel_alt_boot_n = 1;
  logic [21:0] mem_addr;
  logic mem_bhe_n, rom_cs, alt_rom_sel, ee_cs, mem_rd_n, mem_wr_n, mem_wdata_oe, rom_on;
  logic [2:0] ram_cs;
  logic [15:0] mem_wdata, mem_rdata;
  logic summit_cs, fpga_cs, summit_rst_n, sum_dmag;
  logic [NTLM-1:0] tlm_in = '0, cmd_out, iclk_out, dmareq;
  logic diag_sel, cmddmareq, cstr, dstr, sererrs;
  logic [2:0] dmasel;

  dcb_fpga dut (.clk24, .rst_n, .clk8m, .ale, .rd_n, .wr_n, .inst, .bhe_n, .ad_in,
    .ad_out, .ad_oe, .buswidth, .ready, .hold, .hlda, .extint1, .extint,
    .sel_alt_boot_n, .mem_addr, .mem_bhe_n, .rom_cs, .alt_rom_sel, .ee_cs, .ram_cs,
    .mem_rd_n, .mem_wr_n, .mem_wdata, .mem_wdata_oe, .mem_rdata, .rom_on,
    .summit_cs, .fpga_cs, .summit_rst_n, .sum_dmar(1'b0), .sum_dmag, .sum_dmack(1'b0),
    .sum_addr(16'h0000), .sum_rd_n(1'b1), .sum_wr_n(1'b1), .sum_teract(1'b0),
    .sum_ready(1'b1), .yf_int(1'b0), .msg_int(1'b0), .tlm_in, .cmd_out, .iclk_out,
    .diag_sel, .dmareq, .cmddmareq, .dmasel, .cstr, .dstr, .sererrs);
  always #5 clk24 = ~clk24;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  logic [15:0] mem [logic [20:0]];
  logic any_cs;
  assign any_cs = rom_cs || ee_cs || (|ram_cs);
  assign mem_rdata = (any_cs && mem.exists(mem_addr[21:1])) ? mem[mem_addr[21:1]] : 16'h0000;
  always @(posedge clk24) if (!mem_wr_n && any_cs) mem[mem_addr[21:1]] = mem_wdata;

  bit cpu_busy = 0;
  always @(posedge clk24) begin
    if (hold && !hlda && !cpu_busy) begin
      repeat (8) @(posedge clk24);
      hlda <= 1'b1;
    end else if (!hold && hlda) hlda <= 1'b0;
  end

  task automatic bus(input logic [15:0] a, input bit write, input logic [15:0] d, output logic [15:0] q);
    @(negedge clk24);
    while (hold || hlda) @(negedge clk24);
    cpu_busy = 1;
    ale = 1; ad_in = a; inst = 0;
    @(negedge clk24);
    ale = 0; ad_in = d;
    if (write) wr_n = 0; else rd_n = 0;
    @(negedge clk24); @(negedge clk24);
    while (!ready) @(negedge clk24);
    q = ad_out;
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

  // command receivers
  logic [23:0] exp_cmd [NTLM][$];
  int n_f0 [NTLM];
  for (genvar i = 0; i < NTLM; i++) begin : g_rx
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
          chk(^f[25:1] && !f[0], "parity and stop bit");
          if (f[25:2] == 24'hF05A5A) begin
            n_f0[i]++;
            chk(pcnt == 'hFFFFF, $sformatf("F0 parity at count %05h", pcnt));
          end else if (exp_cmd[i].size() == 0) chk(1'b0, "unexpected command");
          else chk(f[25:2] == exp_cmd[i].pop_front(), "command contents");
        end
      end
    end
  end

  task automatic tx_bit(input logic b);
    @(posedge iclk_out[0]);
    tlm_in[0] = b;
  endtask

  initial begin
    #400000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] q;
    logic [15:0] words[3] = '{16'h8001, 16'h0000, 16'hFFFF};
    repeat (5) @(posedge clk24);
    rst_n = 1;
    repeat (5) @(posedge clk24);
    // telemetry subsystem 0: segment 0x08 (0x100000), pages 0..3
    wr(16'h1FA0, {4'd0, 5'h08, 7'd0});
    wr(16'h1FA2, {7'd3, 9'h1FF});
    wr(16'h1FA6, {1'b0, 7'd3, 1'b1, 1'b1, 6'd0});
    // enable outputs of the other instruments too
    for (int n = 1; n < NTLM; n++) wr(16'h1FA6 + 16'(n * 16), 16'h0080);
    // command queue at CDMASA 0x21 (0x108000), written through page 1
    wr(16'h1F84, 16'h0042);
    wr(16'h4000, 16'h1103); wr(16'h4002, 16'h2233);   // 0x223311 to 0,1
    wr(16'h4004, 16'h4410); wr(16'h4006, 16'h5566);   // 0x556644 to 4
    wr(16'h4008, 16'h771F); wr(16'h400A, 16'h0099);   // 0x009977 to all
    wr(16'h400C, 16'h0080);
    exp_cmd[0] = '{24'h223311, 24'h009977};
    exp_cmd[1] = '{24'h223311, 24'h009977};
    exp_cmd[2] = '{24'h009977};
    exp_cmd[3] = '{24'h009977};
    exp_cmd[4] = '{24'h556644, 24'h009977};
    wr(16'h1F8E, 16'h5A5A);
    wr(16'h1F80, 16'h0010);
    wr(16'h1F98, 16'hA100);
    wr(16'h1F94, 16'h0001);
    // one telemetry message of three words
    for (int z = 0; z < 20; z++) tx_bit(1'b0);
    foreach (words[k]) begin
      tx_bit(1'b1);
      for (int b = 15; b >= 0; b--) tx_bit(words[k][b]);
    end
    tx_bit(1'b0);
    repeat (30) tx_bit(1'b0);
    rd(16'h1FA4, q);
    chk(q == 16'h0003, $sformatf("next message address %04h", q));
    foreach (words[k]) chk(mem[{5'h08, 16'(k)}] == words[k], "telemetry word in RAM");
    rd(16'h1F98, q);
    chk(!q[15], "command block finished");
    for (int n = 0; n < NTLM; n++) chk(exp_cmd[n].size() == 0, "queued commands delivered");
    // run to the end of the first second
    wait (dut.cnt == 20'hFFFF0);
    wait (dut.cnt == 20'h00010);
    for (int n = 0; n < NTLM; n++) chk(n_f0[n] == 1, $sformatf("instrument %0d F0 count %0d", n, n_f0[n]));
    chk(extint1, "1 s tick interrupt");
    rd(16'h1F96, q);
    chk(q[0], "TICK1S latched");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
