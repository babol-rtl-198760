// babol_op_exec: BABOL Operation Execution unit of one NAND flash channel.
//
// This is the hardware half of the BABOL controller. Operation software
// (READ, PROGRAM, ERASE and their package-specific variants) and the
// transaction schedulers run on a processor; they describe every waveform
// segment as an instruction and push whole transactions into this unit long
// before the channel is free. The unit executes them later, in order:
//
//   instr_* --> babol_instr_queue --> babol_dispatcher --+--> ufsm_chip_control --> ce_n
//                                                        +--> ufsm_ca_writer   \
//                                                        +--> ufsm_data_writer  >-> ONFI pins
//                                                        +--> ufsm_data_reader /
//                                                        +--> ufsm_timer
//                                                        +--> babol_packetizer <--> DRAM port
//
// The Packetizer feeds the Data Writer from DRAM and stores what the Data
// Reader reads. txn_done/txn_id report each finished transaction (all its
// data in DRAM); queued_txns counts complete transactions waiting. The ONFI pins are the controller side of the PHY: separate
// output, output-enable and input signals for DQ and DQS, one active-low CE#
// per LUN; R/B# is not used because operations poll with READ STATUS.
//
// Timing registers (cfg_timing, in clock cycles) and the data interface mode
// (cfg_mode, SDR or NV-DDR2) are inputs so that software can reconfigure the
// channel for each package at boot. The split into queue, dispatcher,
// uFSMs and Packetizer follows figure 5 and figure 6 of the BABOL publication; the
// instruction format, handshakes and widths are this design's own.
//
// rst_n resets the flops asynchronously and also switches the assertions off
// during reset ("disable iff"); lint reports that second use as a
// synchronous one. No flop uses rst_n synchronously.
module babol_op_exec
  import babol_pkg::*;
#(
  parameter int unsigned N_LUNS        = 8,
  parameter int unsigned QUEUE_DEPTH   = 64,
  parameter int unsigned MEM_AW        = 32,
  parameter int unsigned CLK_PERIOD_NS = 5
) (
  input  logic              clk,
  input  logic              rst_n,
  // configuration
  input  onfi_timing_t      cfg_timing,
  input  data_mode_e        cfg_mode,
  // instruction push (from the processor running the schedulers)
  input  logic              instr_valid,
  input  instr_t            instr,
  output logic              instr_ready,
  // completion
  output logic              txn_done,
  output logic [15:0]       txn_id,
  output logic              idle,
  output logic [$clog2(QUEUE_DEPTH):0] queued_txns,
  // DRAM word port
  output logic              mem_req,
  output logic              mem_we,
  output logic [MEM_AW-1:0] mem_addr,
  output logic [31:0]       mem_wdata,
  output logic [3:0]        mem_be,
  input  logic              mem_gnt,
  input  logic              mem_rvalid,
  input  logic [31:0]       mem_rdata,
  // ONFI pins (controller side of the PHY)
  output logic [N_LUNS-1:0] ce_n,
  output logic              cle,
  output logic              ale,
  output logic              we_n,
  output logic              re_n,
  output logic [DQ_W-1:0]   dq_o,
  output logic              dq_oe,
  input  logic [DQ_W-1:0]   dq_i,
  output logic              dqs_o,
  output logic              dqs_oe,
  input  logic              dqs_i
);
  logic   head_valid, pop;
  instr_t head;
  logic   start_ce, start_ca, start_dw, start_dr, start_tm;
  logic   done_ce, done_ca, done_dw, done_dr, done_tm;
  logic   act_ca, act_dw, act_dr;
  logic   pkt_set_addr, pkt_rd_start, pkt_wr_start, pkt_busy;
  logic   disp_busy, waiting_commit;
  onfi_drv_t pins_ca, pins_dw, pins_dr, pins;
  logic            rd_valid, rd_ready, wr_valid, wr_ready;
  logic [DQ_W-1:0] rd_data, wr_data;

  babol_instr_queue #(.DEPTH(QUEUE_DEPTH)) u_queue (
    .clk, .rst_n,
    .push(instr_valid), .push_data(instr), .push_ready(instr_ready),
    .head_valid, .head, .pop, .txn_count(queued_txns), .waiting_commit
  );

  babol_dispatcher u_disp (
    .clk, .rst_n, .head_valid, .head, .pop,
    .start_ce, .start_ca, .start_dw, .start_dr, .start_tm,
    .done_ce, .done_ca, .done_dw, .done_dr, .done_tm,
    .pkt_set_addr, .pkt_rd_start, .pkt_wr_start, .pkt_busy,
    .pins_ca, .pins_dw, .pins_dr, .pins,
    .txn_done, .txn_id, .busy(disp_busy)
  );

  ufsm_chip_control #(.N_LUNS(N_LUNS)) u_ce (
    .clk, .rst_n, .start(start_ce), .bitmap(head.arg[N_LUNS-1:0]),
    .t_cs(cfg_timing.t_cs), .t_ch(cfg_timing.t_ch), .done(done_ce), .ce_n
  );

  ufsm_ca_writer u_ca (
    .clk, .rst_n, .start(start_ca), .len(head.len), .types(head.types),
    .values(head.arg), .timing(cfg_timing), .done(done_ca), .active(act_ca),
    .pins(pins_ca)
  );

  ufsm_data_writer u_dw (
    .clk, .rst_n, .start(start_dw), .nbytes(head.arg[31:0]), .mode(cfg_mode),
    .timing(cfg_timing), .in_valid(rd_valid), .in_data(rd_data),
    .in_ready(rd_ready), .done(done_dw), .active(act_dw), .pins(pins_dw)
  );

  ufsm_data_reader u_dr (
    .clk, .rst_n, .start(start_dr), .nbytes(head.arg[31:0]), .mode(cfg_mode),
    .timing(cfg_timing), .dq_i, .dqs_i, .out_valid(wr_valid),
    .out_data(wr_data), .out_ready(wr_ready), .done(done_dr),
    .active(act_dr), .pins(pins_dr)
  );

  ufsm_timer #(.CLK_PERIOD_NS(CLK_PERIOD_NS)) u_tm (
    .clk, .rst_n, .start(start_tm), .duration_ns(head.arg[31:0]), .done(done_tm)
  );

  babol_packetizer #(.MEM_AW(MEM_AW)) u_pkt (
    .clk, .rst_n, .set_addr(pkt_set_addr), .addr_in(head.arg[31:0]),
    .rd_start(pkt_rd_start), .wr_start(pkt_wr_start), .nbytes(head.arg[31:0]),
    .busy(pkt_busy), .rd_valid, .rd_data, .rd_ready, .wr_valid, .wr_data,
    .wr_ready, .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_be, .mem_gnt,
    .mem_rvalid, .mem_rdata
  );

  assign cle    = pins.cle;
  assign ale    = pins.ale;
  assign we_n   = pins.we_n;
  assign re_n   = pins.re_n;
  assign dq_o   = pins.dq;
  assign dq_oe  = pins.dq_oe;
  assign dqs_o  = pins.dqs;
  assign dqs_oe = pins.dqs_oe;
  assign idle   = !disp_busy && !head_valid && !pkt_busy && !waiting_commit;

  // Only the uFSM the dispatcher started may be driving the bus.
  a_one_driver: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({act_ca, act_dw, act_dr}));
  // DQ and DQS are never driven while the controller strobes RE#.
  a_no_contention: assert property (@(posedge clk) disable iff (!rst_n)
    !(dq_oe && !re_n));
endmodule
