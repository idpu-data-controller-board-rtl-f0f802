// dcb_timebase: the FPGA's internal 1 MHz counter and the ticks derived from it.
//
// A CNT_W-bit counter (20 bits on the board) advances on every 1 MHz bit
// strobe. It is cleared only by the hard reset, never by the FPGA soft reset.
// A CPU write to the counter-latch register copies it into cnt_lat so that
// the two 16-bit halves read back consistently.
//
// Ticks (one-cycle pulses in the cycle where the counter takes the value):
//   tick1s   - counter reaches all ones (once per 2^20 us on the board);
//   ticktim  - the low (TT_BITS - sel) bits reach all ones, sel = control
//              register bits [3:2]: 0 -> 32 Hz, 1 -> 64 Hz, 2 -> 128 Hz,
//              3 -> 256 Hz with the board's 20-bit counter;
//   f0_start - counter reaches 2^CNT_W - 26: a command frame loaded now has
//              its parity bit at the all-ones count and its stop bit at zero,
//              which is how the sample-clock (F0) command is placed.
// guard is high while a 27-bit command frame started now would still be on
// the line when the F0 frame begins, and during the F0 stop bit; the command
// subsystem starts no queued command while it is high. The counter width,
// the tick rules and the F0 alignment follow the board description; the
// guard window's exact length is this design's own choice.
module dcb_timebase #(
  parameter int unsigned CNT_W   = 20,
  parameter int unsigned TT_BITS = 15     // 2^20 us / 2^15 = 32 Hz base rate
) (
  input  logic             clk,
  input  logic             hard_rst,
  input  logic             bit_stb,       // 1 MHz enable
  input  logic             latch,         // CPU wrote the latch register
  input  logic [1:0]       tt_sel,        // timer interrupt period select
  output logic [CNT_W-1:0] cnt,
  output logic [CNT_W-1:0] cnt_lat,
  output logic             tick1s,
  output logic             ticktim,
  output logic             f0_start,
  output logic             guard,
  output logic             stb            // bit strobe aligned with cnt
);
  import dcb_pkg::*;

  localparam logic [CNT_W-1:0] F0_AT    = CNT_W'((1 << CNT_W) - (CMD_FRAME - 1));
  localparam logic [CNT_W-1:0] GUARD_AT = F0_AT - CNT_W'(CMD_FRAME - 1);

  logic [CNT_W-1:0] nxt;
  logic [TT_BITS-1:0] tt_mask;
  assign nxt     = cnt + 1'b1;
  assign tt_mask = {TT_BITS{1'b1}} >> tt_sel;

  always_ff @(posedge clk) begin
    if (hard_rst) begin
      cnt      <= '0;
      cnt_lat  <= '0;
      tick1s   <= 1'b0;
      ticktim  <= 1'b0;
      f0_start <= 1'b0;
      stb      <= 1'b0;
    end else begin
      stb      <= bit_stb;
      tick1s   <= bit_stb && (&nxt);
      ticktim  <= bit_stb && ((nxt[TT_BITS-1:0] & tt_mask) == tt_mask);
      f0_start <= bit_stb && (nxt == F0_AT);
      if (bit_stb) cnt <= nxt;
      if (latch)   cnt_lat <= cnt;
    end
  end

  assign guard = (cnt >= GUARD_AT) || (cnt == '0);

  initial begin
    assert (CNT_W > TT_BITS) else $error("CNT_W must exceed TT_BITS");
  end
endmodule
