// tb_babol_dispatcher: feeds random instruction streams to the dispatcher
// and replaces the uFSMs by stubs that answer a start with done after a
// random delay. Checks that each instruction starts exactly the unit its
// opcode names (data instructions also start the matching Packetizer
// direction, OP_DMA_ADDR only loads the address), that no further
// instruction is popped before the running unit is done, that the running
// uFSM's pins (and only those) reach the ONFI outputs, and that
// OP_TXN_END reports its id only once the Packetizer is no longer busy.
module tb_babol_dispatcher;
  timeunit 1ns;
  timeprecision 100ps;
  import babol_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #2.5 clk = ~clk;
  logic head_valid = 1'b0, pop;
  instr_t head = '0;
  logic start_ce, start_ca, start_dw, start_dr, start_tm;
  logic [4:0] done_v = '0;
  logic pkt_set_addr, pkt_rd_start, pkt_wr_start, pkt_busy = 1'b0;
  onfi_drv_t pins_ca, pins_dw, pins_dr, pins;
  logic txn_done, busy;
  logic [15:0] txn_id;
  int checks = 0, failures = 0;

  babol_dispatcher dut (.clk, .rst_n, .head_valid, .head, .pop,
    .start_ce, .start_ca, .start_dw, .start_dr, .start_tm,
    .done_ce(done_v[0]), .done_ca(done_v[1]), .done_dw(done_v[2]), .done_dr(done_v[3]), .done_tm(done_v[4]),
    .pkt_set_addr, .pkt_rd_start, .pkt_wr_start, .pkt_busy,
    .pins_ca, .pins_dw, .pins_dr, .pins, .txn_done, .txn_id, .busy);

  // distinct, recognisable pin patterns per uFSM
  assign pins_ca = '{cle: 1'b1, ale: 1'b0, we_n: 1'b0, re_n: 1'b1, dq: 8'hCA, dq_oe: 1'b1, dqs: 1'b0, dqs_oe: 1'b0};
  assign pins_dw = '{cle: 1'b0, ale: 1'b0, we_n: 1'b1, re_n: 1'b1, dq: 8'hD7, dq_oe: 1'b1, dqs: 1'b1, dqs_oe: 1'b1};
  assign pins_dr = '{cle: 1'b0, ale: 1'b0, we_n: 1'b1, re_n: 1'b0, dq: 8'h00, dq_oe: 1'b0, dqs: 1'b0, dqs_oe: 1'b0};

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int unit_of(ufsm_op_e op);
    case (op)
      OP_CE: return 0; OP_CA: return 1; OP_DWRITE: return 2; OP_DREAD: return 3; OP_TIMER: return 4;
      default: return -1;
    endcase
  endfunction

  initial begin
    int txns_done = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(pins == ONFI_IDLE && !pop, "idle after reset");
    for (int k = 0; k < 400; k++) begin
      instr_t w;
      int u, delay, waited;
      logic [4:0] starts;
      w.op = ufsm_op_e'($urandom_range(0, 7));
      w.len = 4'($urandom()); w.types = 8'($urandom());
      w.arg = {32'($urandom()), 32'($urandom())};
      head = w; head_valid = 1'b1;
      #0.1;
      starts = {start_tm, start_dr, start_dw, start_ca, start_ce};
      u = unit_of(w.op);
      check(pop, "idle dispatcher pops the head");
      check(starts == ((u >= 0) ? 5'(1 << u) : 5'd0), $sformatf("%s starts unit mask %b", w.op.name(), starts));
      check(pkt_rd_start == (w.op == OP_DWRITE) && pkt_wr_start == (w.op == OP_DREAD) &&
            pkt_set_addr == (w.op == OP_DMA_ADDR), $sformatf("%s Packetizer controls", w.op.name()));
      @(negedge clk);
      head = '0;  // next head is a different word: must not be popped yet
      head.op = OP_CA;
      if (u >= 0) begin
        delay = $urandom_range(0, 12);
        for (int c = 0; c < delay; c++) begin
          check(!pop, "no pop while the unit runs");
          if (w.op == OP_CA) check(pins == pins_ca, "C/A Writer pins routed");
          else if (w.op == OP_DWRITE) check(pins == pins_dw, "Data Writer pins routed");
          else if (w.op == OP_DREAD) check(pins == pins_dr, "Data Reader pins routed");
          else check(pins == ONFI_IDLE, "idle pins for a pin-less uFSM");
          @(negedge clk);
        end
        done_v[u] = 1'b1;
        @(negedge clk);
        done_v = '0;
      end else if (w.op == OP_TXN_END) begin
        pkt_busy = 1'b1;
        #0.1;
        waited = $urandom_range(0, 10);
        for (int c = 0; c < waited; c++) begin
          check(!txn_done && !pop, "completion held while the Packetizer is busy");
          @(negedge clk);
          #0.1;
        end
        pkt_busy = 1'b0;
        #0.1;
        check(txn_done && txn_id == w.arg[15:0], "txn_done with the transaction id");
        txns_done++;
        @(negedge clk);
      end
      head_valid = 1'b0;
      @(negedge clk);
      check(!busy && pins == ONFI_IDLE, "back to idle");
    end
    check(txns_done > 0, "transactions completed");
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
