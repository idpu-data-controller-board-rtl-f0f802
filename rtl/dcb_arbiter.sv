// dcb_arbiter: bus arbiter and DMA cycle generator for the seven DMA clients.
//
// Clients, highest priority first: the SuMMIT 1553 chip (0), telemetry
// subsystems 0..4 (1..5) and the command subsystem (6). When any client
// requests, the arbiter raises HOLD to the processor; once HLDA comes back it
// gives the bus to the highest-priority requester. After that cycle, if a
// request is pending, it runs another one before dropping HOLD, up to MAX_CYC
// cycles per hold, to save the processor's hold latency. It then drops HOLD
// and waits for HLDA to fall before arbitrating again.
//
// An FPGA client's cycle lasts DMA_CLKS 24 MHz clocks: the address is driven
// for the whole cycle, the read or write strobe (dma_rd/dma_wr) for the
// middle DMA_CLKS-2 clocks, read data is captured on the last strobe clock,
// and done[client] pulses on the final clock together with rdata and
// inc_addr = granted address + 1, the shared address incrementer the clients
// load into their running address registers. A client holds req until done.
// The SuMMIT makes its own strobes: it is granted with sum_dmag and its
// cycle ends when its acknowledge sum_dmack has risen and fallen again.
// The priority order, HOLD/HLDA use, second cycle and shared incrementer are
// the board's; the cycle length, strobe placement and the SuMMIT
// grant/acknowledge handshake are this design's own choices.
module dcb_arbiter
  import dcb_pkg::*;
#(
  parameter int unsigned DMA_CLKS = 5,     // ~208 ns at 24 MHz
  parameter int unsigned MAX_CYC  = 2
) (
  input  logic             clk,
  input  logic             rst,
  // processor bus handshake
  output logic             hold,
  input  logic             hlda,
  // SuMMIT
  input  logic             sum_req,
  output logic             sum_dmag,
  input  logic             sum_dmack,
  // FPGA clients: 0..4 telemetry, 5 command
  input  dma_req_t [5:0]   fc,
  output logic [5:0]       done,
  output logic [15:0]      rdata,
  output logic [21:1]      inc_addr,
  // memory bus side
  input  logic [15:0]      mem_rdata,
  output logic             fpga_own,      // an FPGA client owns the bus
  output logic             sum_own,       // the SuMMIT owns the bus
  output logic [21:1]      dma_addr,
  output logic [15:0]      dma_wdata,
  output logic             dma_we,
  output logic             dma_rd,        // FPGA-generated strobes
  output logic             dma_wr,
  output logic [2:0]       dma_sel        // current owner, for status
);
  typedef enum logic [2:0] {S_IDLE, S_HREQ, S_ARB, S_FCYC, S_SCYC, S_NEXT, S_REL} st_t;
  localparam int CW = $clog2(DMA_CLKS + 1);
  localparam int NW = $clog2(MAX_CYC + 1);

  st_t          st;
  logic [2:0]   owner;
  logic [CW-1:0] cnt;
  logic [NW-1:0] ncyc;
  logic         seen_ack;
  logic [NCLI-1:0] reqs;
  logic         any_req;
  logic [2:0]   win;

  always_comb begin
    reqs[CL_SUMMIT] = sum_req;
    for (int i = 0; i < 6; i++) reqs[i + 1] = fc[i].req;
    any_req = |reqs;
    win = 3'd0;
    for (int i = NCLI - 1; i >= 0; i--)
      if (reqs[i]) win = 3'(i);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st       <= S_IDLE;
      owner    <= '0;
      cnt      <= '0;
      ncyc     <= '0;
      seen_ack <= 1'b0;
      rdata    <= '0;
    end else begin
      unique case (st)
        S_IDLE: if (any_req) st <= S_HREQ;
        S_HREQ: if (hlda) begin
          st   <= S_ARB;
          ncyc <= '0;
        end
        S_ARB: begin
          if (!any_req) st <= S_REL;
          else begin
            owner    <= win;
            ncyc     <= ncyc + 1'b1;
            cnt      <= '0;
            seen_ack <= 1'b0;
            st       <= (win == 3'(CL_SUMMIT)) ? S_SCYC : S_FCYC;
          end
        end
        S_FCYC: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(DMA_CLKS - 2)) rdata <= mem_rdata;
          if (cnt == CW'(DMA_CLKS - 1)) st <= S_NEXT;
        end
        S_SCYC: begin
          if (sum_dmack) seen_ack <= 1'b1;
          else if (seen_ack) st <= S_NEXT;
        end
        S_NEXT: st <= (any_req && ncyc < NW'(MAX_CYC)) ? S_ARB : S_REL;
        S_REL:  if (!hlda) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  logic [2:0] fidx;
  assign fidx = owner - 3'd1;

  always_comb begin
    hold      = (st == S_HREQ) || (st == S_ARB) || (st == S_FCYC) ||
                (st == S_SCYC) || (st == S_NEXT);
    fpga_own  = (st == S_FCYC);
    sum_own   = (st == S_SCYC);
    sum_dmag  = (st == S_SCYC) && !seen_ack;
    dma_addr  = '0;
    dma_wdata = '0;
    dma_we    = 1'b0;
    if (st == S_FCYC) begin
      dma_addr  = fc[fidx].addr;
      dma_wdata = fc[fidx].wdata;
      dma_we    = fc[fidx].we;
    end
    dma_rd   = fpga_own && !dma_we && cnt >= CW'(1) && cnt <= CW'(DMA_CLKS - 2);
    dma_wr   = fpga_own &&  dma_we && cnt >= CW'(1) && cnt <= CW'(DMA_CLKS - 2);
    inc_addr = dma_addr + 1'b1;
    done     = '0;
    if (fpga_own && cnt == CW'(DMA_CLKS - 1)) done[fidx] = 1'b1;
    dma_sel  = owner;
  end

  // The bus is only used while the processor has handed it over.
  a_own_hlda: assert property (@(posedge clk) disable iff (rst)
                               (fpga_own || sum_own) |-> hlda);
  a_done_1h:  assert property (@(posedge clk) disable iff (rst) $onehot0(done));
  initial assert (DMA_CLKS >= 3 && MAX_CYC >= 1) else $error("bad arbiter parameters");
endmodule
