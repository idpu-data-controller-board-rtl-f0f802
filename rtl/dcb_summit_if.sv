// dcb_summit_if: the FPGA side of the SuMMIT 1553 protocol chip.
//
// Drives the SuMMIT reset line from the control register (reset held until
// the CPU sets the enable bit), gates the SuMMIT DMA request with the
// SuMMIT-DMA enable bit before it reaches the arbiter, and during a SuMMIT
// DMA cycle forms the memory address: bits [21:17] from the SuMMIT DMA page
// register, bits [16:1] from the SuMMIT's own address outputs. If that
// address is outside the RAM (100000-3FFFFF), the write strobe to memory is
// suppressed and no RAM bank is selected, so a read returns whatever the bus
// floats to. The SuMMIT's TERACT and READY outputs are synchronised to the
// 24 MHz clock for the status register. The behaviour follows the board
// description; the two-flop synchronisers are this design's own.
// Combinational except for the synchronisers; most of the DMA address is
// the chip's own address passed through beneath the page bits.
module dcb_summit_if (
  input  logic        clk,
  input  logic        rst,
  input  logic        sum_en,        // control bit 0
  input  logic        sum_dma_en,    // control bit 5
  input  logic [4:0]  sdma_page,     // Addr[21:17] during SuMMIT DMA
  input  logic        dmar,          // SuMMIT DMA request
  input  logic [16:1] sum_addr,      // SuMMIT address outputs
  input  logic        sum_wr_n,      // SuMMIT write strobe
  input  logic        sum_rd_n,      // SuMMIT read strobe
  input  logic        teract_in,
  input  logic        ready_in,
  output logic        sum_rst_n,     // SuMMIT reset, low = reset
  output logic        dma_req,       // to arbiter
  output logic [21:1] dma_addr,
  output logic        dma_wr_n,      // write strobe to memory, gated
  output logic        dma_rd_n,
  output logic        in_sram,
  output logic [1:0]  stat           // {TERACT, READY}
);
  logic [1:0] s1, s2;

  always_ff @(posedge clk) begin
    if (rst) begin
      s1 <= '0;
      s2 <= '0;
    end else begin
      s1 <= {teract_in, ready_in};
      s2 <= s1;
    end
  end

  assign sum_rst_n = sum_en;
  assign dma_req   = dmar && sum_dma_en && sum_en;
  assign dma_addr  = {sdma_page, sum_addr};
  assign in_sram   = (sdma_page[4:3] != 2'b00);
  assign dma_wr_n  = sum_wr_n || !in_sram;
  assign dma_rd_n  = sum_rd_n;
  assign stat      = s2;
endmodule
