// dcb_tlm_ctrl: master telemetry control (MTLMCNTL) of one telemetry subsystem.
//
// Writes the words that the shifter delivers into a circular buffer in RAM,
// one DMA write per word through the bus arbiter. The buffer lies in the
// 128 KB segment given by START_PAGE[21:17] and runs from START_PAGE[16:10]
// to the last word of END_PAGE[16:10], in 1 KB steps. Addresses kept here
// are 16-bit word addresses inside the segment (Addr[16:1]).
//   - On enable, CURRENT_ADDRESS and NEXT_MESSAGE_START_ADDR are set to the
//     buffer start.
//   - Each delivered word is held until written; the write goes to
//     {START_PAGE[21:17], CURRENT_ADDRESS}. After the write CURRENT_ADDRESS
//     takes the arbiter's incremented address, or the buffer start when it
//     was the buffer's last word (END_PAGE + 3FE bytes).
//   - After a message's last word is written, NEXT_MESSAGE_START_ADDR takes
//     CURRENT_ADDRESS: the CPU may read everything before it.
//   - Buffer overrun: a word is due to be written while CURRENT_ADDRESS
//     equals the CPU's READ_POINTER.
//   - Timeout: a word arrives while the previous one is still unwritten.
//   - Framing error: reported by the shifter.
// Each error sets its latch (cleared by err_clr) and rolls CURRENT_ADDRESS
// back to NEXT_MESSAGE_START_ADDR, so the damaged message vanishes; the rest
// of it is dropped and writing resumes with the next message's first word.
// A write already on the bus when a timeout hits is allowed to finish and
// is then discarded by the roll-back. The register meanings, wrap rule,
// overrun rule and roll-back are the board's; the word hold register, the
// handling of a write in flight and the req/done handshake are this design's.
module dcb_tlm_ctrl
  import dcb_pkg::*;
#(
  parameter int unsigned WORD_W = 16
) (
  input  logic              clk,
  input  logic              rst,
  input  tlm_cfg_t          cfg,
  input  logic              err_clr,
  // from the shifter
  input  logic              word_vld,
  input  logic [WORD_W-1:0] word,
  input  logic              first,
  input  logic              last,
  input  logic              frame_err,
  // to and from the arbiter
  output dma_req_t          dma,
  input  logic              done,
  input  logic [21:1]       inc_addr,
  // status
  output tlm_stat_t         stat,
  output logic [15:0]       cur_addr,
  output logic              err_evt        // any error this cycle, for counting
);
  logic [15:0]       cur, nm, buf_start, buf_last, nxt;
  logic              en_q, pend, req, kill, drop, plast;
  logic [WORD_W-1:0] pword;
  logic              ovr_err, tmo_err, frm_err;

  assign buf_start = {cfg.st_page[6:0], 9'd0};
  assign buf_last  = {cfg.end_page, 9'h1FF};
  assign nxt       = (cur == buf_last) ? buf_start : inc_addr[16:1];

  always_ff @(posedge clk) begin
    if (rst) begin
      cur <= '0; nm <= '0; en_q <= 1'b0; pend <= 1'b0; req <= 1'b0;
      kill <= 1'b0; drop <= 1'b0; plast <= 1'b0; pword <= '0;
      ovr_err <= 1'b0; tmo_err <= 1'b0; frm_err <= 1'b0; err_evt <= 1'b0;
    end else begin
      en_q    <= cfg.en;
      err_evt <= 1'b0;
      if (err_clr) begin
        ovr_err <= 1'b0; tmo_err <= 1'b0; frm_err <= 1'b0;
      end
      if (cfg.en && !en_q) begin
        cur <= buf_start; nm <= buf_start;
        pend <= 1'b0; req <= 1'b0; kill <= 1'b0; drop <= 1'b0;
      end else if (cfg.en || req) begin
        // write completion, or overrun check before requesting the bus
        if (done && req) begin
          req  <= 1'b0;
          pend <= 1'b0;
          kill <= 1'b0;
          if (kill) cur <= nm;
          else begin
            cur <= nxt;
            if (plast) nm <= nxt;
          end
        end else if (pend && !req) begin
          if (cur == cfg.rd_ptr) begin
            ovr_err <= 1'b1; err_evt <= 1'b1;
            cur <= nm; pend <= 1'b0; drop <= 1'b1;
          end else req <= 1'b1;
        end
        // incoming word
        if (word_vld && cfg.en) begin
          if (pend && !(done && req)) begin
            tmo_err <= 1'b1; err_evt <= 1'b1;
            drop    <= 1'b1;
            if (req) kill <= 1'b1;
            else begin
              cur  <= nm;
              pend <= 1'b0;
            end
          end else if (first || !drop) begin
            pend  <= 1'b1;
            pword <= word;
            plast <= last;
            drop  <= 1'b0;
          end
        end
        if (frame_err) begin
          frm_err <= 1'b1; err_evt <= 1'b1;
          drop    <= 1'b1;
        end
      end
    end
  end

  assign dma.req   = req;
  assign dma.we    = 1'b1;
  assign dma.addr  = {cfg.st_page[11:7], cur};
  assign dma.wdata = 16'(pword);
  assign stat.nm_st_adr = nm;
  assign stat.frame_err = frm_err;
  assign stat.tmo_err   = tmo_err;
  assign stat.ovr_err   = ovr_err;
  assign cur_addr       = cur;
endmodule
