// dcb_pkg: types and constants shared by the Data Controller Board FPGA.
//
// Holds the FPGA register indices (word index = CPU address[6:1] inside the
// 1F80-1FFF block), the DMA client bundle used between the bus arbiter and
// its clients, the client numbering (SuMMIT, five telemetry subsystems,
// command subsystem) and the serial frame constants. Register indices and
// bit positions follow the board's register map; the struct layout and the
// client numbering are this design's own.
package dcb_pkg;

  // FPGA register word indices (CPU address 1F80 + 2*index)
  localparam logic [5:0] R_CTRL    = 6'd0;
  localparam logic [5:0] R_PAGE0   = 6'd1;
  localparam logic [5:0] R_PAGE1   = 6'd2;
  localparam logic [5:0] R_PAGE2   = 6'd3;
  localparam logic [5:0] R_PAGE3   = 6'd4;
  localparam logic [5:0] R_VERSION = 6'd5;
  localparam logic [5:0] R_DIAG    = 6'd6;
  localparam logic [5:0] R_TIME    = 6'd7;
  localparam logic [5:0] R_CNTLO   = 6'd8;
  localparam logic [5:0] R_CNTHI   = 6'd9;
  localparam logic [5:0] R_IEN     = 6'd10;
  localparam logic [5:0] R_STATUS  = 6'd11;
  localparam logic [5:0] R_CMDDMA  = 6'd12;
  localparam logic [5:0] R_SUMMIT  = 6'd15;
  localparam logic [5:0] R_TLM0    = 6'd16;   // subsystem n at R_TLM0 + 8*n

  // Control register bits
  localparam int C_SUM_EN   = 0;
  localparam int C_ROM_DIS  = 1;
  localparam int C_CMD_DMA  = 4;
  localparam int C_SUM_DMA  = 5;
  localparam int C_EE_WE    = 6;

  // Interrupt source bits (status, enable and pulse registers)
  localparam int I_TICK1S  = 0;
  localparam int I_TICKTIM = 1;
  localparam int I_CMDDONE = 2;
  localparam int I_YF      = 3;
  localparam int I_MSG     = 4;
  localparam int I_CMDOFL  = 5;

  localparam int NTLM = 5;           // telemetry subsystems
  localparam int NCLI = NTLM + 2;    // arbiter clients

  // Arbiter client numbers, highest priority first
  localparam int CL_SUMMIT = 0;
  localparam int CL_TLM0   = 1;      // telemetry n is client 1+n
  localparam int CL_CMD    = 6;

  // Command frame: start + 24 data + odd parity + one stop bit
  localparam int CMD_W      = 24;
  localparam int CMD_FRAME  = CMD_W + 3;
  localparam int CMD_DEAD   = 26;    // dead time of a zero-mask record, in bit times

  // One request from an FPGA DMA client (word address, 16-bit data)
  typedef struct packed {
    logic        req;
    logic        we;
    logic [21:1] addr;
    logic [15:0] wdata;
  } dma_req_t;

  // Telemetry subsystem register set written by the CPU
  typedef struct packed {
    logic [11:0] st_page;   // Addr[21:10] of the first buffer word
    logic [6:0]  end_page;  // Addr[16:10] of the last buffer word
    logic [15:0] rd_ptr;    // word address [16:1] last read by the CPU
    logic        en;        // enable telemetry subsystem
    logic        out_en;    // enable CLK and COMMAND outputs
  } tlm_cfg_t;

  // Telemetry subsystem status returned to the register file
  typedef struct packed {
    logic [15:0] nm_st_adr; // next message start address [16:1]
    logic        frame_err;
    logic        tmo_err;
    logic        ovr_err;
  } tlm_stat_t;

endpackage
