// babol_pkg: types and constants shared by the BABOL operation-execution
// hardware of one NAND flash channel.
//
// Software (the operation and transaction schedulers) describes every
// waveform segment as an instruction and queues it; the hardware executes the
// queued instructions later, one uFSM at a time. This package defines:
//   * instr_t        - the queued instruction word (one per uFSM call or
//                      Packetizer call, plus a transaction delimiter);
//   * onfi_timing_t  - the per-package timing registers, counted in clock
//                      cycles, that the uFSMs honour inside their segments;
//   * onfi_drv_t     - the ONFI pins (except CE#) that a uFSM drives.
// The five uFSMs (C/A Writer, Data Writer, Data Reader, Chip Control, Timer),
// the three operands of the C/A Writer and the two data modes follow the
// published description. The bit layout of the instruction, the cycle-count
// timing registers and their default values are this design's own choices.
package babol_pkg;

  // ONFI DQ bus width in bits (x8 package).
  localparam int unsigned DQ_W = 8;
  // Largest number of latches one C/A Writer instruction can carry.
  localparam int unsigned MAX_LATCHES = 8;
  localparam int unsigned ARG_W = MAX_LATCHES * DQ_W;   // 64

  typedef enum logic [2:0] {
    OP_CE       = 3'd0,  // Chip Control: arg[N_LUNS-1:0] = LUN bitmap
    OP_CA       = 3'd1,  // C/A Writer: len, types, arg = latch values
    OP_DWRITE   = 3'd2,  // Data Writer: arg[31:0] = number of bytes
    OP_DREAD    = 3'd3,  // Data Reader: arg[31:0] = number of bytes
    OP_TIMER    = 3'd4,  // Timer: arg[31:0] = duration in nanoseconds
    OP_DMA_ADDR = 3'd5,  // Packetizer: arg[31:0] = DRAM byte address
    OP_TXN_END  = 3'd6,  // end of a transaction: arg[15:0] = transaction id
    OP_NOP      = 3'd7
  } ufsm_op_e;

  // Latch type bit of the C/A Writer: 0 = command latch, 1 = address latch.
  localparam logic LATCH_CMD  = 1'b0;
  localparam logic LATCH_ADDR = 1'b1;

  typedef struct packed {
    ufsm_op_e                 op;
    logic [3:0]               len;    // C/A Writer: number of latches (1..8)
    logic [MAX_LATCHES-1:0]   types;  // C/A Writer: bit i = type of latch i
    logic [ARG_W-1:0]         arg;    // latch i value in arg[8i+7:8i], or operand
  } instr_t;

  typedef enum logic {
    MODE_SDR    = 1'b0,
    MODE_NVDDR2 = 1'b1
  } data_mode_e;

  // Timing registers, in clock cycles (each at least 1 where it is a pulse).
  typedef struct packed {
    logic [7:0] t_cs;     // CE# low to first strobe (Chip Control)
    logic [7:0] t_ch;     // last strobe to CE# high (Chip Control)
    logic [7:0] t_cals;   // CLE/ALE and DQ set-up before WE# falls
    logic [7:0] t_wp;     // WE# low pulse
    logic [7:0] t_wh;     // WE# high between latches / CLE, ALE, DQ hold
    logic [7:0] t_wb;     // after a final command latch (busy goes low)
    logic [7:0] t_whr;    // after a READ STATUS command, before RE# falls
    logic [7:0] t_ccs;    // after a change-column command (E0h / 85h)
    logic [7:0] t_adl;    // address cycle to first data-in
    logic [7:0] t_rr;     // ready to first RE# edge
    logic [7:0] t_rp;     // SDR RE# low pulse (data sampled at its end)
    logic [7:0] t_reh;    // SDR RE# high pulse
    logic [7:0] t_ddr;    // NV-DDR2 cycles per byte, one DQS edge each (1 = one per cycle)
    logic [7:0] t_pre;    // NV-DDR2 DQS (write) / RE# (read) preamble
    logic [7:0] t_pst;    // NV-DDR2 postamble
  } onfi_timing_t;

  // Default register values for a 200 MHz controller clock (5 ns cycle):
  // ONFI SDR timing mode 0 for the latch strobes and NV-DDR2 data at
  // 100 MT/s (two clock cycles per byte).
  localparam onfi_timing_t TIMING_DEFAULT = '{
    t_cs: 8'd14, t_ch: 8'd4, t_cals: 8'd10, t_wp: 8'd10, t_wh: 8'd6,
    t_wb: 8'd20, t_whr: 8'd24, t_ccs: 8'd60, t_adl: 8'd40, t_rr: 8'd8,
    t_rp: 8'd10, t_reh: 8'd6, t_ddr: 8'd2, t_pre: 8'd4, t_pst: 8'd4
  };

  // Pins driven by a uFSM (CE# comes from Chip Control).
  typedef struct packed {
    logic            cle;
    logic            ale;
    logic            we_n;
    logic            re_n;
    logic [DQ_W-1:0] dq;
    logic            dq_oe;
    logic            dqs;
    logic            dqs_oe;
  } onfi_drv_t;

  localparam onfi_drv_t ONFI_IDLE = '{
    cle: 1'b0, ale: 1'b0, we_n: 1'b1, re_n: 1'b1, dq: '0, dq_oe: 1'b0,
    dqs: 1'b0, dqs_oe: 1'b0
  };

  // ONFI command codes after which the C/A Writer holds a longer wait.
  localparam logic [7:0] CMD_READ_STATUS     = 8'h70;
  localparam logic [7:0] CMD_READ_STATUS_ENH = 8'h78;
  localparam logic [7:0] CMD_CHANGE_COL_END  = 8'hE0;
  localparam logic [7:0] CMD_CHANGE_WCOL     = 8'h85;

endpackage
