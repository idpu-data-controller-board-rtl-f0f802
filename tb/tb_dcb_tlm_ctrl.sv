// tb_dcb_tlm_ctrl: drives message words into the telemetry buffer writer
// through a simple DMA responder and compares the RAM contents, the next
// message address and the error latches with a message-level reference
// model of the circular buffer. Covers the first write at the buffer start,
// wrap-around at the end page, overruns against the read pointer (the
// damaged message must not appear and writing resumes with the next
// message), a timeout (two words back to back), a framing error report and
// clearing of the error latches.
// The pointer, wrap, overrun and roll-back rules are the board's; the
// word-by-word DMA handshake is this design's own.
module tb_dcb_tlm_ctrl;
  import dcb_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  tlm_cfg_t cfg;
  logic err_clr = 1'b0, word_vld = 1'b0, first = 1'b0, last = 1'b0, frame_err = 1'b0;
  logic [15:0] word = '0;
  dma_req_t dma;
  logic done = 1'b0;
  logic [21:1] inc_addr = '0;
  tlm_stat_t stat;
  logic [15:0] cur_addr;
  logic err_evt;
  int checks = 0, failures = 0, n_wrap = 0, n_ovr = 0, n_msgs = 0;
  logic [15:0] mem [logic [20:0]];
  logic [15:0] refm [logic [20:0]];
  logic [15:0] ref_cur, ref_nm;
  localparam logic [11:0] ST = {5'h15, 7'd3};
  localparam logic [6:0]  EP = 7'd4;
  localparam logic [15:0] FIRST_W = 16'h0600, LAST_W = 16'h09FF;

  dcb_tlm_ctrl dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  // DMA responder: completes each request after a few clocks
  initial begin
    forever begin
      @(negedge clk);
      done = 1'b0;
      if (dma.req) begin
        repeat ($urandom_range(1, 6)) @(negedge clk);
        chk(dma.we, "telemetry only writes");
        mem[dma.addr] = dma.wdata;
        inc_addr = dma.addr + 1'b1;
        done = 1'b1;
        @(negedge clk);
        done = 1'b0;
      end
    end
  end

  task automatic put_word(input logic [15:0] w, input bit f, input bit l, input int gap);
    @(negedge clk);
    word = w; first = f; last = l; word_vld = 1'b1;
    @(negedge clk);
    word_vld = 1'b0;
    repeat (gap) @(negedge clk);
  endtask

  // reference: a whole message at a time
  task automatic send_msg(input int n);
    logic [15:0] w;
    bit dropped = 0;
    logic [15:0] c = ref_cur;
    for (int i = 0; i < n; i++) begin
      w = 16'($urandom);
      put_word(w, i == 0, i == n - 1, 20);
      if (!dropped) begin
        if (c == cfg.rd_ptr) begin
          dropped = 1; n_ovr++; c = ref_nm;
        end else begin
          refm[{ST[11:7], c}] = w;
          if (c == LAST_W) begin c = FIRST_W; n_wrap++; end
          else c = c + 1'b1;
        end
      end
    end
    ref_cur = c;
    if (!dropped) begin ref_nm = c; n_msgs++; end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '0;
    cfg.st_page = ST; cfg.end_page = EP; cfg.rd_ptr = LAST_W;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(negedge clk);
    cfg.en = 1'b1;
    repeat (3) @(negedge clk);
    chk(cur_addr == FIRST_W && stat.nm_st_adr == FIRST_W, "start address after enable");
    ref_cur = FIRST_W; ref_nm = FIRST_W;
    // fill most of the buffer
    while (ref_cur < 16'h0900) send_msg($urandom_range(2, 10));
    repeat (20) @(negedge clk);
    chk(stat.nm_st_adr == ref_nm, "next message address after fill");
    chk(!stat.ovr_err && !stat.tmo_err && !stat.frame_err, "no errors during fill");
    // the CPU has read up to 0x0700: the writer wraps and then runs into it
    cfg.rd_ptr = 16'h0700;
    for (int m = 0; m < 150; m++) send_msg($urandom_range(2, 10));
    repeat (20) @(negedge clk);
    chk(n_wrap > 0, "buffer wrapped");
    chk(n_ovr > 0, "overrun happened");
    chk(stat.ovr_err == (n_ovr > 0), "overrun latch");
    chk(stat.nm_st_adr == ref_nm, $sformatf("next message address %04h expected %04h", stat.nm_st_adr, ref_nm));
    chk(cur_addr == ref_nm, "current address rolled back to message start");
    foreach (refm[a]) begin
      checks++;
      if (!mem.exists(a) || mem[a] != refm[a]) begin
        failures++;
        $display("FAIL RAM %06h = %04h expected %04h", {a, 1'b0}, mem.exists(a) ? mem[a] : 16'hxxxx, refm[a]);
      end
    end
    // clear the errors, move the read pointer far ahead, check a timeout
    @(negedge clk); err_clr = 1'b1; @(negedge clk); err_clr = 1'b0;
    chk(!stat.ovr_err, "error latches cleared");
    cfg.rd_ptr = ref_nm - 1'b1;
    send_msg(3);
    put_word(16'h1111, 1, 0, 0);
    put_word(16'h2222, 0, 0, 0);                // arrives before the first is written
    put_word(16'h3333, 0, 1, 20);
    repeat (20) @(negedge clk);
    chk(stat.tmo_err, "timeout latched");
    chk(stat.nm_st_adr == ref_nm && cur_addr == ref_nm, "timeout rolls back the message");
    send_msg(4);
    repeat (20) @(negedge clk);
    chk(stat.nm_st_adr == ref_nm, "writing resumes after a timeout");
    // framing error report
    @(negedge clk); frame_err = 1'b1; @(negedge clk); frame_err = 1'b0;
    chk(stat.frame_err, "framing error latched");
    $display("messages %0d wraps %0d overruns %0d", n_msgs, n_wrap, n_ovr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
