// tb_dcb_tlm_shift: sends serial telemetry to the shifter and compares the
// delivered words with the words sent. The stream starts with line noise
// that holds no 17-zero gap (nothing may be received), then carries random
// messages of 2..6 words separated by random gaps, with one-word messages
// mixed in that must give a framing error and no word.
// The 17-zero gap and the one-word framing rule are the board's; the word
// format (start bit plus 16 bits, MSB first) is this design's assumption.
module tb_dcb_tlm_shift;
  localparam int SP = 4;                  // clocks per bit in this test
  logic clk = 1'b0, rst = 1'b1, en = 1'b0, samp = 1'b0, din = 1'b0;
  logic word_vld, first, last, frame_err, synced;
  logic [15:0] word;
  int checks = 0, failures = 0, n_words = 0, n_ferr = 0, exp_ferr = 0, n_msgs = 0;
  typedef struct { logic [15:0] w; bit f; bit l; } exp_t;
  exp_t q[$];

  dcb_tlm_shift dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  // one bit: the line holds for SP clocks, sampled once in the middle
  task automatic send_bit(input logic b);
    din <= b;
    repeat (SP / 2) @(posedge clk);
    samp <= 1'b1;
    @(posedge clk);
    samp <= 1'b0;
    repeat (SP - SP / 2 - 1) @(posedge clk);
  endtask

  task automatic send_msg(input int n);
    logic [15:0] w;
    for (int i = 0; i < n; i++) begin
      w = 16'($urandom);
      send_bit(1'b1);
      for (int b = 15; b >= 0; b--) send_bit(w[b]);
      if (n > 1) q.push_back('{w, i == 0, i == n - 1});
    end
    send_bit(1'b0);                       // end bit
    if (n == 1) exp_ferr++;
    else n_msgs++;
  endtask

  always @(posedge clk) begin
    if (word_vld && !rst) begin
      n_words++;
      if (q.size() == 0) chk(1'b0, "unexpected word");
      else begin
        exp_t e;
        e = q.pop_front();
        chk(word == e.w && first == e.f && last == e.l,
            $sformatf("word %04h f%0b l%0b expected %04h f%0b l%0b", word, first, last, e.w, e.f, e.l));
      end
    end
    if (frame_err && !rst) n_ferr++;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    en  <= 1'b1;
    for (int i = 0; i < 60; i++) send_bit(1'(i % 5 == 0 || i % 7 == 0));
    chk(!synced, "no sync inside noise");
    chk(n_words == 0, "nothing received from noise");
    for (int i = 0; i < 17; i++) send_bit(1'b0);
    chk(synced, "synchronised after 17 zeros");
    for (int m = 0; m < 60; m++) begin
      send_msg((m % 7 == 3) ? 1 : $urandom_range(2, 6));
      repeat (16 + $urandom_range(0, 6)) send_bit(1'b0);
    end
    chk(q.size() == 0, $sformatf("%0d words never delivered", q.size()));
    chk(n_ferr == exp_ferr && exp_ferr > 0, $sformatf("framing errors %0d of %0d", n_ferr, exp_ferr));
    $display("messages %0d words %0d framing errors %0d", n_msgs, n_words, n_ferr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
