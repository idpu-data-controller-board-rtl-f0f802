// tb_dcb_arbiter: random traffic from the SuMMIT and six FPGA clients
// against a processor that grants HLDA after a random hold latency.
// Checks that every new bus cycle goes to the highest-priority client that
// was requesting, that no hold carries more than MAX_CYC cycles, that the
// strobe and done timing of an FPGA cycle is DMA_CLKS clocks, that read data,
// write data and the incremented address are right, and that both a
// second cycle in one hold and the SuMMIT handshake were exercised.
// The priority order, the two-cycle limit and the HOLD/HLDA use are the
// board's rules; the traffic pattern and the latency range are this
// testbench's own.
module tb_dcb_arbiter;
  import dcb_pkg::*;
  localparam int DMA_CLKS = 5, MAX_CYC = 2;
  logic clk = 1'b0, rst = 1'b1;
  logic hold, hlda = 1'b0, sum_req = 1'b0, sum_dmag, sum_dmack = 1'b0;
  dma_req_t [5:0] fc;
  logic [5:0] done;
  logic [15:0] rdata, mem_rdata, dma_wdata;
  logic [21:1] inc_addr, dma_addr;
  logic fpga_own, sum_own, dma_we, dma_rd, dma_wr;
  logic [2:0] dma_sel;
  int checks = 0, failures = 0;
  int n_cycles[NCLI], n_second = 0, cyc_in_hold = 0, strobe_len = 0, own_len = 0;
  logic [NCLI-1:0] reqs_prev = '0;
  logic own_prev = 1'b0;

  dcb_arbiter #(.DMA_CLKS(DMA_CLKS), .MAX_CYC(MAX_CYC)) dut (.*);
  always #5 clk = ~clk;
  assign mem_rdata = dma_addr[16:1] ^ 16'h5A5A;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  function automatic int highest(input logic [NCLI-1:0] r);
    for (int i = 0; i < NCLI; i++) if (r[i]) return i;
    return -1;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // processor: HLDA follows HOLD after a random latency, drops after HOLD
  initial begin
    forever begin
      @(negedge clk);
      if (hold && !hlda) begin
        repeat ($urandom_range(1, 12)) @(negedge clk);
        hlda = 1'b1;
      end else if (!hold && hlda) begin
        repeat ($urandom_range(0, 2)) @(negedge clk);
        hlda = 1'b0;
      end
    end
  end

  // SuMMIT: requests now and then, acknowledges a grant for a few clocks
  initial begin
    forever begin
      @(negedge clk);
      if (!sum_req && $urandom % 300 == 0) sum_req = 1'b1;
      if (sum_dmag && !sum_dmack) begin
        sum_dmack = 1'b1;
        repeat ($urandom_range(2, 5)) @(negedge clk);
        sum_dmack = 1'b0;
        sum_req   = 1'b0;
      end
    end
  end

  // FPGA clients
  for (genvar c = 0; c < 6; c++) begin : g_cli
    initial begin
      fc[c] = '0;
      forever begin
        @(negedge clk);
        if (!rst && !fc[c].req && $urandom % 150 == 0) begin
          fc[c].req   = 1'b1;
          fc[c].we    = (c < 5);
          fc[c].addr  = 21'($urandom);
          fc[c].wdata = 16'($urandom);
        end else if (fc[c].req && done[c]) begin
          chk(inc_addr == fc[c].addr + 1'b1, "incremented address");
          if (!fc[c].we) chk(rdata == (fc[c].addr[16:1] ^ 16'h5A5A), "read data");
          fc[c].req = 1'b0;
        end
      end
    end
  end

  // bus monitor
  always @(negedge clk) begin
    logic [NCLI-1:0] reqs;
    logic own;
    reqs[0] = sum_req;
    for (int i = 0; i < 6; i++) reqs[i + 1] = fc[i].req;
    own = fpga_own || sum_own;
    if (!rst) begin
      if (own && !own_prev) begin
        chk(int'(dma_sel) == highest(reqs_prev),
            $sformatf("priority: owner %0d, requests %b", dma_sel, reqs_prev));
        n_cycles[dma_sel]++;
        cyc_in_hold++;
        if (cyc_in_hold == 2) n_second++;
        chk(cyc_in_hold <= MAX_CYC, "cycles per hold");
        chk(hlda, "bus used only with HLDA");
        own_len = 0; strobe_len = 0;
      end
      if (fpga_own) begin
        own_len++;
        if (dma_rd || dma_wr) strobe_len++;
        if (dma_wr) chk(dma_wdata == fc[dma_sel - 1].wdata && dma_addr == fc[dma_sel - 1].addr, "write data/address");
        if (|done) chk(own_len == DMA_CLKS && strobe_len == DMA_CLKS - 2,
                       $sformatf("cycle timing %0d/%0d", own_len, strobe_len));
      end
      if (!hold) cyc_in_hold = 0;
    end
    reqs_prev = reqs;
    own_prev  = own;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (60000) @(posedge clk);
    for (int i = 0; i < NCLI; i++) chk(n_cycles[i] > 0, $sformatf("client %0d served", i));
    chk(n_second > 0, "second cycle in one hold");
    $display("cycles per client: %p, second cycles %0d", n_cycles, n_second);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
