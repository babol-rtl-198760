// babol_instr_queue: the execution queue between software and the uFSMs.
//
// Software builds a transaction as a run of instructions (uFSM and
// Packetizer calls) closed by an OP_TXN_END instruction, and pushes the
// words one by one (push/push_data/push_ready). The queue is a plain FIFO of
// DEPTH instructions, but it shows its head to the dispatcher (head_valid)
// only while at least one complete transaction is stored: it counts the
// OP_TXN_END words it holds. Because a transaction's instructions are all
// present before the first one is executed, the waveform segments of a
// transaction run back to back and the transaction holds the channel until
// it ends, as the BABOL publication requires of a transaction; a half-written
// transaction never stalls the channel in the middle of a waveform.
//
// Timing: a pushed word can be popped on the next cycle at the earliest.
// A transaction longer than DEPTH words can never be released; software must
// keep transactions shorter (asserted). Gating on complete transactions and
// the depth are this design's choices; the BABOL publication says only that
// instructions are queued and that a transaction executes atomically.
//
// rst_n resets the flops asynchronously and also switches the assertions off
// during reset ("disable iff"); lint reports that second use as a
// synchronous one. No flop uses rst_n synchronously.
module babol_instr_queue
  import babol_pkg::*;
#(
  parameter int unsigned DEPTH = 64
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   push,
  input  instr_t push_data,
  output logic   push_ready,
  output logic   head_valid,
  output instr_t head,
  input  logic   pop,
  output logic [$clog2(DEPTH):0] txn_count,
  output logic   waiting_commit
);
  localparam int unsigned PW = $clog2(DEPTH);

  instr_t       mem [DEPTH];
  logic [PW-1:0] wp, rp;
  logic [PW:0]   cnt;
  logic [PW:0]   txns;
  logic          do_push, do_pop;

  assign push_ready = (cnt != (PW+1)'(DEPTH));
  assign do_push    = push && push_ready;
  assign do_pop     = pop && head_valid;
  assign head_valid = (txns != 0);
  assign head       = mem[rp];
  assign txn_count  = txns;
  // Instructions are stored but their transaction is not complete yet.
  assign waiting_commit = (cnt != 0) && (txns == 0);

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= push_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp   <= '0;
      rp   <= '0;
      cnt  <= '0;
      txns <= '0;
    end else begin
      if (do_push) wp <= wp + PW'(1);
      if (do_pop)  rp <= rp + PW'(1);
      cnt  <= cnt + (PW+1)'(do_push) - (PW+1)'(do_pop);
      txns <= txns + (PW+1)'(do_push && push_data.op == OP_TXN_END)
                   - (PW+1)'(do_pop && head.op == OP_TXN_END);
    end
  end

  // A full queue without a complete transaction can never drain.
  a_txn_fits: assert property (@(posedge clk) disable iff (!rst_n)
    !(cnt == (PW+1)'(DEPTH) && txns == 0));
endmodule
