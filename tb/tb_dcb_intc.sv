// tb_dcb_intc: checks interrupt latching, clearing, masking and the two
// interrupt lines against a reference copy of the latch rules.
// In each of 1000 rounds a random mix of event pulses and clear bits (and
// now and then new enables) is applied; one clock later the latched status
// is compared with the reference, and one clock after that the EXTINT1 and
// EXTINT lines. The latch and mask rules are the
// board's; the same-clock set/clear priority is this design's own choice.
module tb_dcb_intc;
  logic clk = 1'b0, rst = 1'b1;
  logic [5:0] set = '0, clr = '0, ien = '0, status;
  logic extint1, extint;
  logic [5:0] ref_st = '0;
  int checks = 0, failures = 0;

  dcb_intc dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    for (int i = 0; i < 1000; i++) begin
      set <= ($urandom % 4 == 0) ? 6'($urandom) : '0;
      clr <= ($urandom % 3 == 0) ? 6'($urandom) : '0;
      if (i % 50 == 0) ien <= 6'($urandom);
      @(posedge clk);
      ref_st = (ref_st & ~clr) | set;
      #1;
      checks++;
      if (status != ref_st) begin failures++; $display("FAIL status %b ref %b", status, ref_st); end
      @(negedge clk);
      // lines follow the latches one clock later
      @(posedge clk); #1;
      checks++;
      if (extint1 != |(ref_st & ien) || extint != (ref_st[3] | ref_st[4])) begin
        failures++; $display("FAIL lines %b %b for status %b ien %b", extint1, extint, ref_st, ien);
      end
      set <= '0; clr <= '0;
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
