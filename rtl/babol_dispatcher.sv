// babol_dispatcher: executes queued instructions, one at a time.
//
// Whenever it is idle and the instruction queue shows a head (a complete
// transaction is queued), the dispatcher pops the head in the same cycle and
// starts the unit it names: one of the five uFSMs (start_* pulse, the
// operands are taken from the popped word), or the Packetizer (set_addr for
// OP_DMA_ADDR, and the read or write direction together with the Data
// Writer or Data Reader, with the same byte count). It then waits for that
// unit's done pulse and returns to idle, so consecutive segments follow with
// a two-cycle gap. OP_TXN_END waits until the Packetizer has written all
// data to DRAM and then pulses txn_done with the transaction id from
// arg[15:0]; software uses it to resume the operation that queued the
// transaction. While a uFSM runs, its pin bundle is routed to the ONFI
// outputs; otherwise the pins are idle.
//
// the BABOL publication gives only the principle (queued instructions executed later by
// the uFSMs, one transaction at a time); the one-unit-at-a-time sequencing,
// the completion pulse and the pin routing are this design's choices.
//
// rst_n resets the flops asynchronously and also switches the assertions off
// during reset ("disable iff"); lint reports that second use as a
// synchronous one. No flop uses rst_n synchronously.
module babol_dispatcher
  import babol_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  // instruction queue
  input  logic      head_valid,
  input  instr_t    head,
  output logic      pop,
  // uFSM control
  output logic      start_ce,
  output logic      start_ca,
  output logic      start_dw,
  output logic      start_dr,
  output logic      start_tm,
  input  logic      done_ce,
  input  logic      done_ca,
  input  logic      done_dw,
  input  logic      done_dr,
  input  logic      done_tm,
  // Packetizer control
  output logic      pkt_set_addr,
  output logic      pkt_rd_start,
  output logic      pkt_wr_start,
  input  logic      pkt_busy,
  // pins of the uFSMs that drive the bus
  input  onfi_drv_t pins_ca,
  input  onfi_drv_t pins_dw,
  input  onfi_drv_t pins_dr,
  output onfi_drv_t pins,
  // completion
  output logic      txn_done,
  output logic [15:0] txn_id,
  output logic      busy
);
  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_TXN} state_e;
  state_e     state;
  ufsm_op_e   cur_op;
  logic [15:0] id_q;
  logic       unit_done;

  assign pop  = (state == S_IDLE) && head_valid;
  assign busy = (state != S_IDLE);

  assign start_ce     = pop && head.op == OP_CE;
  assign start_ca     = pop && head.op == OP_CA;
  assign start_dw     = pop && head.op == OP_DWRITE;
  assign start_dr     = pop && head.op == OP_DREAD;
  assign start_tm     = pop && head.op == OP_TIMER;
  assign pkt_set_addr = pop && head.op == OP_DMA_ADDR;
  assign pkt_rd_start = start_dw;
  assign pkt_wr_start = start_dr;

  always_comb begin
    unique case (cur_op)
      OP_CE:     unit_done = done_ce;
      OP_CA:     unit_done = done_ca;
      OP_DWRITE: unit_done = done_dw;
      OP_DREAD:  unit_done = done_dr;
      OP_TIMER:  unit_done = done_tm;
      default:   unit_done = 1'b1;
    endcase
  end

  always_comb begin
    pins = ONFI_IDLE;
    if (state == S_WAIT) begin
      unique case (cur_op)
        OP_CA:     pins = pins_ca;
        OP_DWRITE: pins = pins_dw;
        OP_DREAD:  pins = pins_dr;
        default:   pins = ONFI_IDLE;
      endcase
    end
  end

  assign txn_done = (state == S_TXN) && !pkt_busy;
  assign txn_id   = id_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      cur_op <= OP_NOP;
      id_q   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (pop) begin
          cur_op <= head.op;
          id_q   <= head.arg[15:0];
          if (head.op == OP_TXN_END) state <= S_TXN;
          else if (head.op == OP_DMA_ADDR || head.op == OP_NOP) state <= S_IDLE;
          else state <= S_WAIT;
        end
        S_WAIT: if (unit_done) state <= S_IDLE;
        S_TXN:  if (!pkt_busy) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // Exactly one unit is started per popped instruction.
  a_one_start: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({start_ce, start_ca, start_dw, start_dr, start_tm, pkt_set_addr}));
endmodule
