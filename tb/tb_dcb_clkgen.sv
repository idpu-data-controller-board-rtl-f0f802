// tb_dcb_clkgen: checks the clock divider against counted periods.
// After reset it measures, over many microseconds, the spacing of bit_stb
// (DIV1M clocks), the position of mid_stb (DIV1M/2 after bit_stb), the 8 MHz
// clock (high one clock in three) and the 50 % duty of the 1 MHz clock.
// The rates and the 33/67 duty come from the board description; the
// mid-bit strobe position is this design's own and checked as built.
module tb_dcb_clkgen;
  localparam int DIV = 24;
  logic clk = 1'b0, rst = 1'b1;
  logic clk8m, bit_stb, mid_stb, clk1m;
  int checks = 0, failures = 0;
  int last_bit = -1, cyc = 0, hi8 = 0, hi1 = 0, n_bits = 0;

  dcb_clkgen #(.DIV1M(DIV)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", msg, cyc); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (2) @(posedge clk);
    for (int i = 0; i < 24 * 20; i++) begin
      @(posedge clk); #1;
      cyc++;
      if (clk8m) hi8++;
      if (clk1m) hi1++;
      if (bit_stb) begin
        if (last_bit >= 0) chk(cyc - last_bit == DIV, "bit_stb period");
        last_bit = cyc;
        n_bits++;
      end
      if (mid_stb && last_bit >= 0) chk(cyc - last_bit == DIV / 2, "mid_stb position");
    end
    chk(hi8 == 24 * 20 / 3, $sformatf("clk8m duty %0d", hi8));
    chk(hi1 >= 24 * 20 / 2 - 12 && hi1 <= 24 * 20 / 2 + 12, $sformatf("clk1m duty %0d", hi1));
    chk(n_bits == 20, "number of bit strobes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
