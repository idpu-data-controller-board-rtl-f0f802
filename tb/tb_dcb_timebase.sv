// tb_dcb_timebase: checks the microsecond counter and its ticks.
// Uses a 10-bit counter and a 6-bit timer base so that whole counter
// periods are short. A reference count kept in the testbench predicts when
// tick1s, ticktim (for each period select), f0_start and guard must be high,
// and the latched value after a latch request.
// The tick rules and the F0 placement are the board's; the guard window
// length is this design's choice and is checked as built.
module tb_dcb_timebase;
  localparam int CW = 10, TT = 6;
  logic clk = 1'b0, rst = 1'b1, bit_stb = 1'b0, latch = 1'b0;
  logic [1:0] tt_sel = 2'd0;
  logic [CW-1:0] cnt, cnt_lat;
  logic tick1s, ticktim, f0_start, guard, stb;
  int checks = 0, failures = 0;
  int ref_cnt = 0, n1s = 0, ntt = 0, nf0 = 0;
  localparam int F0_AT = (1 << CW) - 26;

  dcb_timebase #(.CNT_W(CW), .TT_BITS(TT)) dut (.clk, .hard_rst(rst), .bit_stb,
    .latch, .tt_sel, .cnt, .cnt_lat, .tick1s, .ticktim, .f0_start, .guard, .stb);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s ref=%0d", msg, ref_cnt); end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int s = 0; s < 4; s++) begin
      tt_sel <= 2'(s);
      for (int i = 0; i < (1 << CW) + 5; i++) begin
        bit_stb <= 1'b1;
        @(posedge clk);
        bit_stb <= 1'b0;
        ref_cnt = (ref_cnt + 1) % (1 << CW);
        #1;
        chk(cnt == CW'(ref_cnt), "count");
        chk(stb, "aligned strobe");
        chk(tick1s == (ref_cnt == (1 << CW) - 1), "tick1s");
        chk(ticktim == ((ref_cnt % (1 << (TT - s))) == (1 << (TT - s)) - 1), "ticktim");
        chk(f0_start == (ref_cnt == F0_AT), "f0_start");
        chk(guard == (ref_cnt >= F0_AT - 26 || ref_cnt == 0), "guard");
        n1s += int'(tick1s); ntt += int'(ticktim); nf0 += int'(f0_start);
        @(posedge clk); #1;
        chk(!tick1s && !ticktim && !f0_start, "pulses last one cycle");
      end
    end
    latch <= 1'b1;
    @(posedge clk);
    latch <= 1'b0;
    #1 chk(cnt_lat == CW'(ref_cnt), "latched count");
    chk(n1s == 4, "tick1s count");
    chk(ntt == 16 + 32 + 64 + 128 + 1, $sformatf("ticktim count %0d", ntt));
    chk(nf0 == 4, "f0 count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
