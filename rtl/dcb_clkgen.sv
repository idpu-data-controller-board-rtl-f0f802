// dcb_clkgen: clock division for the Data Controller Board FPGA.
//
// Everything in the FPGA runs on the 24 MHz board clock. This block makes the
// 8 MHz processor clock (divide by three, high for one of three cycles, the
// 33/67 duty cycle the board asks for) and, from a divide-by-DIV1M counter,
// the 1 MHz timing used by the serial interfaces: a one-cycle bit strobe at
// the start of each microsecond, a mid-bit sample strobe, and a 50 % duty
// 1 MHz clock for the instruments whose rising edge follows the bit strobe
// by one cycle. Instead of gating clocks, downstream logic uses the strobes
// as clock enables (this design's choice). All outputs are registered.
module dcb_clkgen #(
  parameter int unsigned DIV1M = 24       // 24 MHz / 1 MHz
) (
  input  logic clk,                       // 24 MHz
  input  logic rst,                       // synchronous, active high
  output logic clk8m,                     // 8 MHz CPU clock, 33 % high
  output logic bit_stb,                   // 1 MHz: first cycle of each bit
  output logic mid_stb,                   // 1 MHz: middle of each bit
  output logic clk1m                      // 1 MHz instrument clock
);
  localparam int CW = $clog2(DIV1M);
  logic [1:0]    div3;
  logic [CW-1:0] div;

  always_ff @(posedge clk) begin
    if (rst) begin
      div3    <= '0;
      div     <= '0;
      clk8m   <= 1'b0;
      bit_stb <= 1'b0;
      mid_stb <= 1'b0;
      clk1m   <= 1'b0;
    end else begin
      div3    <= (div3 == 2'd2) ? 2'd0 : div3 + 2'd1;
      clk8m   <= (div3 == 2'd2);
      div     <= (div == CW'(DIV1M - 1)) ? '0 : div + 1'b1;
      bit_stb <= (div == CW'(DIV1M - 1));
      mid_stb <= (div == CW'(DIV1M / 2 - 1));
      clk1m   <= (div < CW'(DIV1M / 2));
    end
  end
endmodule
