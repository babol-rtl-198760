// tb_babol_instr_queue: checks the execution queue against a reference
// queue. Instructions of a transaction stay invisible to the dispatcher
// until the transaction's OP_TXN_END word is pushed; complete transactions
// come out in order and unchanged; the queue refuses words when it holds
// DEPTH of them; waiting_commit and txn_count report the state. Pushes and
// pops are random and overlap.
module tb_babol_instr_queue;
  timeunit 1ns;
  timeprecision 100ps;
  import babol_pkg::*;
  localparam int DEPTH = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  always #2.5 clk = ~clk;
  logic push = 1'b0, push_ready, head_valid, pop = 1'b0, waiting_commit;
  instr_t push_data = '0, head;
  logic [$clog2(DEPTH):0] txn_count;
  int checks = 0, failures = 0;

  babol_instr_queue #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .push, .push_data, .push_ready,
    .head_valid, .head, .pop, .txn_count, .waiting_commit);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic instr_t rnd(bit last);
    instr_t i;
    i.op    = last ? OP_TXN_END : ufsm_op_e'($urandom_range(0, 5));
    i.len   = 4'($urandom());
    i.types = 8'($urandom());
    i.arg   = {32'($urandom()), 32'($urandom())};
    return i;
  endfunction

  instr_t model[$];
  int     model_txns = 0;

  initial begin
    int full_seen = 0, hold_seen = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!head_valid && push_ready && txn_count == 0, "empty after reset");

    // an incomplete transaction is not visible
    for (int k = 0; k < 3; k++) begin
      push_data = rnd(0); push = 1'b1;
      model.push_back(push_data);
      @(negedge clk);
    end
    push = 1'b0;
    repeat (5) @(negedge clk);
    check(!head_valid && waiting_commit, "incomplete transaction held back");
    push_data = rnd(1); push = 1'b1;
    model.push_back(push_data); model_txns++;
    @(negedge clk);
    push = 1'b0;
    check(head_valid && txn_count == 1 && !waiting_commit, "complete transaction visible");
    // drain it
    while (model.size() > 0) begin
      check(head == model[0], "head matches the reference");
      if (model[0].op == OP_TXN_END) model_txns--;
      void'(model.pop_front());
      pop = 1'b1;
      @(negedge clk);
      pop = 1'b0;
    end
    check(!head_valid && txn_count == 0, "empty again");

    // fill to DEPTH: the queue must refuse the next word
    for (int k = 0; k < DEPTH; k++) begin
      push_data = rnd(k % 4 == 3); push = 1'b1;
      model.push_back(push_data);
      if (push_data.op == OP_TXN_END) model_txns++;
      @(negedge clk);
    end
    push_data = rnd(0);
    check(!push_ready, "full queue refuses a word");
    @(negedge clk);
    push = 1'b0;
    check(txn_count == model_txns, "transaction count when full");

    // random overlapping traffic
    for (int cyc = 0; cyc < 4000; cyc++) begin
      instr_t w;
      bit do_push, do_pop, exp_hv;
      w = rnd($urandom_range(0, 3) == 0);
      exp_hv = (model_txns > 0);
      check(head_valid == exp_hv, "head_valid follows complete transactions");
      if (!exp_hv && model.size() > 0) hold_seen++;
      if (model.size() == DEPTH) full_seen++;
      check(push_ready == (model.size() < DEPTH), "push_ready follows fill level");
      do_pop  = exp_hv && $urandom_range(0, 1);
      do_push = (model.size() < DEPTH) && $urandom_range(0, 1);
      // never leave the queue full of an incomplete transaction
      if (do_push && model.size() == DEPTH - 1 && model_txns == 0 && !do_pop) w.op = OP_TXN_END;
      if (do_pop) check(head == model[0], "popped word matches the reference");
      push = do_push; push_data = w; pop = do_pop;
      @(negedge clk);
      if (do_pop) begin
        if (model[0].op == OP_TXN_END) model_txns--;
        void'(model.pop_front());
      end
      if (do_push) begin
        model.push_back(w);
        if (w.op == OP_TXN_END) model_txns++;
      end
      push = 1'b0; pop = 1'b0;
      check(txn_count == model_txns, "txn_count");
    end
    check(full_seen > 0 && hold_seen > 0, "full queue and held transaction both exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
