// dcb_tlm_shift: telemetry shift-in logic (TSHIFT) of one telemetry subsystem.
//
// The instrument sends messages of two or more words on a serial line
// sampled once per microsecond (samp, the mid-bit strobe). The idle line is
// low. Each word is a high start bit followed by WORD_W data bits, most
// significant first; a word followed by another start bit continues the
// message, a word followed by a low bit ends it. Messages are separated by
// at least SYNC_ZEROS low bits.
//
// After enable, and after every message, the shifter first seeks SYNC_ZEROS
// consecutive low bits (the low bit that ends a message counts as the first
// of them). Then a start bit begins the first word. A word is handed on
// (word_vld pulse with word, first, last) only once the bit after it is seen:
// the first word goes out when the second word's start bit arrives, which is
// also the point where the message is known to be real; the last word goes
// out with last=1 when the low end bit arrives. A low bit right after the
// first word is a framing error: the word is dropped, frame_err pulses and
// the shifter goes back to seeking zeros.
// The 17-zero sync, start bits, two-word minimum and framing rule are the
// board's; the 16-bit word, MSB-first order, line polarity and the counting
// of the end bit as a sync zero are this design's choices (one start bit plus
// 16 data bits matches the 17 us per word the board quotes).
module dcb_tlm_shift #(
  parameter int unsigned WORD_W     = 16,
  parameter int unsigned SYNC_ZEROS = 17
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              en,
  input  logic              samp,        // 1 MHz mid-bit sample strobe
  input  logic              din,         // serial telemetry line
  output logic              word_vld,    // one-cycle pulse
  output logic [WORD_W-1:0] word,
  output logic              first,       // word_vld is a message's first word
  output logic              last,        // word_vld is a message's last word
  output logic              frame_err,   // one-cycle pulse
  output logic              synced       // inter-message gap found
);
  typedef enum logic [1:0] {T_SEEK, T_IDLE, T_SHIFT, T_FOLLOW} ts_t;
  localparam int ZW = $clog2(SYNC_ZEROS + 1);
  localparam int BW = $clog2(WORD_W + 1);

  ts_t               st;
  logic [ZW-1:0]     zcnt;
  logic [BW-1:0]     bcnt;
  logic [WORD_W-1:0] sr;
  logic              is_first;

  always_ff @(posedge clk) begin
    if (rst || !en) begin
      st        <= T_SEEK;
      zcnt      <= '0;
      bcnt      <= '0;
      sr        <= '0;
      is_first  <= 1'b0;
      word_vld  <= 1'b0;
      word      <= '0;
      first     <= 1'b0;
      last      <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      word_vld  <= 1'b0;
      frame_err <= 1'b0;
      if (samp) begin
        unique case (st)
          T_SEEK: begin
            if (din) zcnt <= '0;
            else if (zcnt == ZW'(SYNC_ZEROS - 1)) begin
              zcnt <= '0;
              st   <= T_IDLE;
            end else zcnt <= zcnt + 1'b1;
          end
          T_IDLE: if (din) begin
            st       <= T_SHIFT;
            bcnt     <= '0;
            is_first <= 1'b1;
          end
          T_SHIFT: begin
            sr   <= {sr[WORD_W-2:0], din};
            bcnt <= bcnt + 1'b1;
            if (bcnt == BW'(WORD_W - 1)) st <= T_FOLLOW;
          end
          T_FOLLOW: begin
            if (din) begin                       // next word's start bit
              word_vld <= 1'b1;
              word     <= sr;
              first    <= is_first;
              last     <= 1'b0;
              is_first <= 1'b0;
              bcnt     <= '0;
              st       <= T_SHIFT;
            end else begin                       // end of message
              if (is_first) frame_err <= 1'b1;
              else begin
                word_vld <= 1'b1;
                word     <= sr;
                first    <= 1'b0;
                last     <= 1'b1;
              end
              zcnt <= ZW'(1);
              st   <= T_SEEK;
            end
          end
          default: st <= T_SEEK;
        endcase
      end
    end
  end

  assign synced = (st != T_SEEK);
endmodule
