// dcb_cmd_ctrl: the central command subsystem serving all five instruments.
//
// Two sources share one serialiser:
//  - Command DMA. A CPU write with bit 15 set to the command DMA register
//    (start) makes the subsystem busy and it reads, through the bus arbiter,
//    a queue of two-word records from the 32 KB buffer at CDMASA[21:15]:
//      word 0 = {CommandWord[7:0], CommandMask[7:0]}, word 1 = CommandWord[23:8].
//    Mask bits [4:0] select the receiving instruments; a zero mask sends
//    nothing for CMD_DEAD bit times; mask bit 7 ends the block (the record
//    0x0080). End of block clears busy and pulses done_evt. Reading the
//    buffer's last word (offset 3FFF) pulses ofl_evt and ends the block.
//    Clearing the command-DMA enable stops fetching and clears busy.
//    One record is fetched ahead while the previous one is on the line.
//  - The sample-clock command F0 = {8'hF0, time register}, started by the
//    timebase's f0_start so that its parity bit falls on the counter's
//    all-ones count, and sent to every instrument. Queued commands are held
//    back while the timebase's guard is high, so F0 always finds the line
//    free. F0 is sent whether or not command DMA is enabled.
// Frame, one bit per microsecond (stb), idle line low: high start bit,
// 24 command bits MSB first, odd parity bit, one low stop bit: 27 us, and a
// new frame can follow straight after the stop bit. Instrument i receives
// the frame only if it is in the frame's mask and its outputs are enabled.
// The record format, mask rules, terminator, overflow rule, parity, F0
// placement and dead time follow the board description; the F0 data field,
// bit order, line polarity, prefetch and exactly one stop bit are this
// design's choices. Outputs cmd_out are registered. The engine only reads
// memory, so the write flag and write data of its DMA request bundle (a
// type shared with the telemetry writers) are tied to zero.
module dcb_cmd_ctrl
  import dcb_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             dma_en,        // control bit 4
  input  logic             start,         // CPU wrote bit 15 of the DMA register
  input  logic [6:0]       cdmasa,        // buffer address Addr[21:15]
  input  logic [15:0]      time_reg,
  input  logic             stb,           // bit strobe, aligned with counter
  input  logic             f0_start,
  input  logic             guard,
  input  logic [NTLM-1:0]  out_en,
  // arbiter
  output dma_req_t         dma,
  input  logic             done,
  input  logic [15:0]      rdata,
  input  logic [21:1]      inc_addr,
  // status
  output logic             busy,
  output logic             done_evt,
  output logic             ofl_evt,
  output logic [NTLM-1:0]  cmd_out,
  output logic             f0_evt,        // an F0 frame was started
  output logic             cmd_evt,       // a queued frame was started
  output logic             dead_evt       // a zero-mask dead time was started
);
  typedef enum logic [2:0] {D_IDLE, D_RD0, D_RD1, D_FULL, D_END} ds_t;

  ds_t        ds;
  logic [13:0] off;
  logic        req;
  logic [15:0] w0;
  logic [23:0] rec_cmd;
  logic [7:0]  rec_mask;

  // serialiser
  logic [CMD_FRAME-1:0] sr;
  logic [4:0]           tx_cnt;
  logic [NTLM-1:0]      tx_mask;
  logic                 tx_busy, tx_free, load_q;

  assign tx_free = !tx_busy || (stb && tx_cnt == 5'd1);
  assign load_q  = (ds == D_FULL) && stb && tx_free && !guard && !f0_start;

  function automatic logic [CMD_FRAME-1:0] frame(input logic [23:0] c);
    return {1'b1, c, ~^c, 1'b0};
  endfunction

  // record fetch
  always_ff @(posedge clk) begin
    if (rst) begin
      ds <= D_IDLE; off <= '0; req <= 1'b0; w0 <= '0;
      rec_cmd <= '0; rec_mask <= '0; busy <= 1'b0;
      done_evt <= 1'b0; ofl_evt <= 1'b0;
    end else begin
      done_evt <= 1'b0;
      ofl_evt  <= 1'b0;
      unique case (ds)
        D_IDLE: if (start && dma_en) begin
          busy <= 1'b1; off <= '0; req <= 1'b1; ds <= D_RD0;
        end
        D_RD0: if (done) begin
          w0  <= rdata;
          off <= inc_addr[14:1];
          if (rdata[7]) begin               // end of block
            req <= 1'b0; ds <= D_END;
          end else ds <= D_RD1;              // keep requesting for word 1
        end
        D_RD1: if (done) begin
          req <= 1'b0;
          if (off == 14'h3FFF) begin        // ran into the buffer's last word
            ofl_evt <= 1'b1; busy <= 1'b0; ds <= D_IDLE;
          end else begin
            off      <= inc_addr[14:1];
            rec_cmd  <= {rdata, w0[15:8]};
            rec_mask <= w0[7:0];
            ds       <= D_FULL;
          end
        end
        D_FULL: if (load_q) begin
          req <= 1'b1; ds <= D_RD0;
        end
        D_END: if (!tx_busy || (stb && tx_cnt == 5'd1)) begin
          busy <= 1'b0; done_evt <= 1'b1; ds <= D_IDLE;
        end
        default: ds <= D_IDLE;
      endcase
      // abort: only between bus cycles
      if (!dma_en && ds != D_IDLE && !(req && (ds == D_RD0 || ds == D_RD1))) begin
        busy <= 1'b0; req <= 1'b0; ds <= D_IDLE;
      end
    end
  end

  // serialiser
  always_ff @(posedge clk) begin
    if (rst) begin
      sr <= '0; tx_cnt <= '0; tx_mask <= '0; tx_busy <= 1'b0;
      cmd_out <= '0; f0_evt <= 1'b0; cmd_evt <= 1'b0; dead_evt <= 1'b0;
    end else begin
      f0_evt   <= 1'b0;
      cmd_evt  <= 1'b0;
      dead_evt <= 1'b0;
      if (f0_start) begin
        sr      <= frame({8'hF0, time_reg});
        tx_cnt  <= 5'(CMD_FRAME);
        tx_mask <= '1;
        tx_busy <= 1'b1;
        f0_evt  <= 1'b1;
      end else if (load_q) begin
        tx_busy <= 1'b1;
        if (rec_mask[NTLM-1:0] == '0) begin
          sr       <= '0;
          tx_cnt   <= 5'(CMD_DEAD);
          tx_mask  <= '0;
          dead_evt <= 1'b1;
        end else begin
          sr      <= frame(rec_cmd);
          tx_cnt  <= 5'(CMD_FRAME);
          tx_mask <= rec_mask[NTLM-1:0];
          cmd_evt <= 1'b1;
        end
      end else if (stb && tx_busy) begin
        if (tx_cnt == 5'd1) begin
          tx_busy <= 1'b0;
          sr      <= '0;
        end else begin
          sr     <= sr << 1;
          tx_cnt <= tx_cnt - 1'b1;
        end
      end
      cmd_out <= {NTLM{tx_busy && sr[CMD_FRAME-1]}} & tx_mask & out_en;
    end
  end

  assign dma.req   = req;
  assign dma.we    = 1'b0;
  assign dma.addr  = {cdmasa, off};
  assign dma.wdata = '0;

  a_f0_free: assert property (@(posedge clk) disable iff (rst)
                              f0_start |-> (!tx_busy || (stb && tx_cnt == 5'd1)));
endmodule
