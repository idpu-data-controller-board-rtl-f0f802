// dcb_intc: interrupt latches and the two external processor interrupt lines.
//
// Six sources are latched on a one-cycle (or level) set input: TICK1S,
// TICKTIM, command-DMA-done, SuMMIT YF_INT, SuMMIT MSG_INT and the command
// buffer overflow error. A latched bit stays set until the CPU writes a 1 to
// the matching bit of the pulse register (clr); a set in the same cycle as
// a clear wins, so no event is lost. The latched bits are the status
// register whatever the enables are.
//   extint1 (FPGA interrupt, to EXTINT1) = OR of latched bits with enable set;
//   extint  (SuMMIT interrupt, to EXTINT) = latched YF_INT OR latched MSG_INT,
//            with no mask in the FPGA.
// The register bit positions follow the board's register map. The map gives
// enable bits for all six sources while the interrupt description names only
// the three FPGA timing/DMA sources for EXTINT1; this design lets every
// enabled source reach EXTINT1 and keeps EXTINT unmasked as described.
// Outputs are registered.
module dcb_intc (
  input  logic       clk,
  input  logic       rst,
  input  logic [5:0] set,         // source events, bit order as status reg
  input  logic [5:0] clr,         // pulse register write, one cycle
  input  logic [5:0] ien,         // interrupt enable register
  output logic [5:0] status,
  output logic       extint1,
  output logic       extint
);
  import dcb_pkg::*;

  always_ff @(posedge clk) begin
    if (rst) begin
      status  <= '0;
      extint1 <= 1'b0;
      extint  <= 1'b0;
    end else begin
      status  <= (status & ~clr) | set;
      extint1 <= |(status & ien);
      extint  <= status[I_YF] | status[I_MSG];
    end
  end
endmodule
