// tb_dcb_summit_if: checks SuMMIT reset, request gating, DMA address
// composition, write inhibit outside RAM and the status synchronisers.
// 500 random sets of register settings and SuMMIT signals are applied, each
// held for three clocks so that the synchronised status has settled, and
// then every output is compared with the expected value. The
// rules are the board's; the two-flop synchronisers are this design's.
module tb_dcb_summit_if;
  logic clk = 1'b0, rst = 1'b1;
  logic sum_en, sum_dma_en, dmar, sum_wr_n, sum_rd_n, teract_in, ready_in;
  logic [4:0] sdma_page;
  logic [16:1] sum_addr;
  logic sum_rst_n, dma_req, dma_wr_n, dma_rd_n, in_sram;
  logic [21:1] dma_addr;
  logic [1:0] stat;
  int checks = 0, failures = 0;

  dcb_summit_if dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    for (int i = 0; i < 500; i++) begin
      sum_en = 1'($urandom); sum_dma_en = 1'($urandom); dmar = 1'($urandom);
      sdma_page = 5'($urandom); sum_addr = 16'($urandom);
      sum_wr_n = 1'($urandom); sum_rd_n = 1'($urandom);
      teract_in = 1'($urandom); ready_in = 1'($urandom);
      repeat (3) @(posedge clk);
      #1;
      chk(sum_rst_n == sum_en, "reset line");
      chk(dma_req == (dmar && sum_dma_en && sum_en), "request gating");
      chk(dma_addr == {sdma_page, sum_addr}, "address");
      chk(in_sram == (sdma_page >= 5'd8), "in RAM");
      chk(dma_wr_n == (sum_wr_n || sdma_page < 5'd8), "write inhibit");
      chk(dma_rd_n == sum_rd_n, "read strobe");
      chk(stat == {teract_in, ready_in}, "status");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
