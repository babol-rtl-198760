// tb_babol_op_exec: end-to-end test of the BABOL operation-execution unit at
// its default parameters (8 LUNs, 64-entry queue, 16 KiB pages).
//
// The testbench plays the role of the operation software: it builds
// transactions out of uFSM and Packetizer instructions, queues them, and
// waits for their completion, exactly as the READ STATUS, READ with change
// column and pseudo-SLC READ operations are written for BABOL, plus PAGE
// PROGRAM (also gang-scheduled to two LUNs), BLOCK ERASE, a READ that
// waits t_R with the Timer instead of polling, and SET/GET FEATURES, where
// the Timer supplies t_ADL and the feature busy time. Eight ONFI LUN models share
// the DQ bus; a DRAM model with random grants sits behind the Packetizer.
// Every read is checked byte by byte against values the testbench computes
// itself. It runs in NV-DDR2 and in SDR mode, and counts how often each
// mechanism happened: transactions held back until complete, reads
// interleaved over several LUNs, queue full, Packetizer stalls, gang
// scheduling, timer waits, status polls, mode switches. One complete 16 KiB
// page read runs at full size, and one PROGRAM and two READs run with the
// NV-DDR2 bus at 200 MT/s (one byte per clock cycle).
module tb_babol_op_exec;
  timeunit 1ns;
  timeprecision 100ps;
  import babol_pkg::*;

  localparam int N_LUNS = 8;
  localparam int PAGE   = 16384;

  logic clk = 1'b0, rst_n = 1'b0;
  always #2.5 clk = ~clk;

  onfi_timing_t cfg_timing;
  data_mode_e   cfg_mode;
  logic         instr_valid, instr_ready;
  instr_t       instr;
  logic         txn_done, idle;
  logic [15:0]  txn_id;
  logic [6:0]   queued_txns;
  logic         mem_req, mem_we, mem_gnt, mem_rvalid;
  logic [31:0]  mem_addr, mem_wdata, mem_rdata;
  logic [3:0]   mem_be;
  logic [N_LUNS-1:0] ce_n;
  logic         dram_hold = 1'b0;
  logic         cle, ale, we_n, re_n, dq_oe, dqs_o, dqs_oe;
  logic [7:0]   dq_o, dq_i;
  logic         dqs_i;

  babol_op_exec dut (
    .clk, .rst_n, .cfg_timing, .cfg_mode, .instr_valid, .instr, .instr_ready,
    .txn_done, .txn_id, .idle, .queued_txns,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_be, .mem_gnt, .mem_rvalid,
    .mem_rdata, .ce_n, .cle, .ale, .we_n, .re_n, .dq_o, .dq_oe, .dq_i,
    .dqs_o, .dqs_oe, .dqs_i
  );

  dram_model #(.AW(32), .LATENCY(5), .GNT_PCT(60), .SEED(7)) u_dram (
    .clk, .hold(dram_hold), .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .be(mem_be), .gnt(mem_gnt), .rvalid(mem_rvalid), .rdata(mem_rdata)
  );

  // ---------------- LUNs on the shared bus ----------------
  logic [7:0] l_dq   [N_LUNS];
  logic       l_dqd  [N_LUNS];
  logic       l_dqs  [N_LUNS];
  logic       l_dqsd [N_LUNS];
  for (genvar g = 0; g < N_LUNS; g++) begin : g_lun
    onfi_lun_model #(.LUN_ID(g), .PAGE_BYTES(PAGE), .T_R(1200 + 100 * g),
                     .T_R_SLC(500), .T_PROG(2500), .T_BERS(3000),
                     .MIN_WP(2), .MIN_ADL(30), .MIN_WHR(20), .MIN_CCS(50)) u_lun (
      .clk, .ce_n(ce_n[g]), .cle, .ale, .we_n, .re_n, .dq_in(dq_o),
      .dqs_in(dqs_o), .dqs_in_oe(dqs_oe), .ddr_mode(cfg_mode == MODE_NVDDR2),
      .dq_out(l_dq[g]), .dq_drive(l_dqd[g]), .dqs_out(l_dqs[g]),
      .dqs_drive(l_dqsd[g])
    );
  end
  always_comb begin
    dq_i  = 8'h00;
    dqs_i = 1'b0;
    for (int i = 0; i < N_LUNS; i++) begin
      if (l_dqd[i])  dq_i  = dq_i | l_dq[i];
      if (l_dqsd[i]) dqs_i = dqs_i | l_dqs[i];
    end
  end

  // ---------------- bookkeeping ----------------
  int checks = 0, failures = 0;
  int n_commit_hold = 0, n_interleave = 0, n_queue_full = 0, n_pkt_stall = 0;
  int n_gang = 0, n_timer = 0, n_polls = 0, n_mode_switch = 0, n_multi_queued = 0;
  bit done_seen [int];
  int cycle = 0;

  always @(posedge clk) begin
    cycle++;
    if (txn_done) done_seen[int'(txn_id)] = 1;
    if (rst_n && !instr_ready && instr_valid) n_queue_full++;
    if (rst_n && queued_txns > 1) n_multi_queued++;
    if (rst_n && dut.u_dw.in_ready && !dut.u_dw.in_valid) n_pkt_stall++;
    if (rst_n && dut.u_dr.active && !dut.u_pkt.wr_ready) n_pkt_stall++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d)", what, cycle);
    end
  endtask

  // ---------------- instruction building ----------------
  instr_t txq[$];
  int     next_id = 1;

  function automatic instr_t mk(ufsm_op_e op, logic [63:0] arg);
    instr_t i;
    i.op = op; i.len = '0; i.types = '0; i.arg = arg;
    return i;
  endfunction

  // C/A Writer: types/values given low latch first.
  task automatic q_ca(logic [7:0] vals[$], bit is_addr[$]);
    instr_t i = mk(OP_CA, '0);
    i.len = 4'(vals.size());
    foreach (vals[k]) begin
      i.arg[8*k +: 8] = vals[k];
      i.types[k]      = is_addr[k];
    end
    txq.push_back(i);
  endtask
  task automatic q_cmd(logic [7:0] c);
    q_ca('{c}, '{1'b0});
  endtask

  // Words handed to the unit by a driver on the falling clock edge, so the
  // valid/ready handshake is sampled cleanly on the rising edge.
  instr_t pend[$];
  logic   was_ready = 1'b0;
  always @(negedge clk) begin
    if (instr_valid && was_ready) void'(pend.pop_front());
    if (pend.size() > 0) begin
      instr       = pend[0];
      instr_valid = 1'b1;
    end else begin
      instr_valid = 1'b0;
    end
    was_ready = instr_ready;
  end

  task automatic push_txn(output int id);
    id = next_id++;
    txq.push_back(mk(OP_TXN_END, 64'(id)));
    while (txq.size() > 0) pend.push_back(txq.pop_front());
  endtask

  task automatic wait_txn(int id);
    int guard = 0;
    while (!done_seen.exists(id)) begin
      @(posedge clk);
      guard++;
      if (guard > 2000000) begin
        check(0, $sformatf("transaction %0d never completed", id));
        return;
      end
    end
  endtask

  // ---------------- operations ----------------
  localparam logic [31:0] STATUS_BUF = 32'h0000_0100;

  task automatic read_status(int chip, output logic [7:0] st);
    int id;
    txq.push_back(mk(OP_CE, 64'(1 << chip)));
    q_cmd(8'h70);
    txq.push_back(mk(OP_DMA_ADDR, 64'(STATUS_BUF)));
    txq.push_back(mk(OP_DREAD, 64'd4));
    txq.push_back(mk(OP_CE, 64'd0));
    push_txn(id);
    wait_txn(id);
    st = u_dram.peek_byte(longint'(STATUS_BUF));
  endtask

  task automatic poll_ready(int chip);
    logic [7:0] st;
    int n = 0;
    do begin
      read_status(chip, st);
      n++;
      n_polls++;
    end while (st != 8'h40 && n < 10000);
    check(st == 8'h40, $sformatf("LUN %0d became ready", chip));
  endtask

  function automatic void row_addr(int row, ref logic [7:0] v[$], ref bit a[$]);
    v.push_back(8'(row)); a.push_back(1);
    v.push_back(8'(row >> 8)); a.push_back(1);
    v.push_back(8'(row >> 16)); a.push_back(1);
  endfunction

  // first transaction of a READ: 00h C1 C2 R1 R2 R3 30h (optional DAh prefix)
  task automatic q_read_start(int chip, int row, bit slc);
    logic [7:0] v[$]; bit a[$];
    txq.push_back(mk(OP_CE, 64'(1 << chip)));
    if (slc) q_cmd(8'hDA);
    v.push_back(8'h00); a.push_back(0);
    v.push_back(8'h00); a.push_back(1);
    v.push_back(8'h00); a.push_back(1);
    row_addr(row, v, a);
    v.push_back(8'h30); a.push_back(0);
    q_ca(v, a);
  endtask

  task automatic q_change_col(int col);
    q_ca('{8'h05, 8'(col), 8'(col >> 8), 8'hE0}, '{1'b0, 1'b1, 1'b1, 1'b0});
  endtask

  task automatic read_cc_start(int chip, int row, output int id);
    q_read_start(chip, row, 0);
    txq.push_back(mk(OP_CE, 64'd0));
    push_txn(id);
  endtask

  task automatic read_cc_transfer(int chip, int col, int len, logic [31:0] buf_addr);
    int id;
    txq.push_back(mk(OP_CE, 64'(1 << chip)));
    q_change_col(col);
    txq.push_back(mk(OP_DMA_ADDR, 64'(buf_addr)));
    txq.push_back(mk(OP_DREAD, 64'(len)));
    txq.push_back(mk(OP_CE, 64'd0));
    push_txn(id);
    wait_txn(id);
  endtask

  function automatic logic [7:0] pattern(int lun, int r, int c);
    return 8'((r * 7) ^ (c * 3) ^ (c >> 8) ^ (lun * 16'h55));
  endfunction

  // Compare a DRAM buffer with what the page should hold.
  logic [7:0] model_page [N_LUNS][int][int];   // programmed bytes
  bit         model_erased [N_LUNS][int];

  function automatic logic [7:0] expect_byte(int lun, int r, int c);
    if (model_page[lun].exists(r) && model_page[lun][r].exists(c)) return model_page[lun][r][c];
    if (model_erased[lun].exists(r / 64)) return 8'hFF;
    return pattern(lun, r, c);
  endfunction

  task automatic check_buf(int lun, int row, int col, int len, logic [31:0] buf_addr, string what);
    int bad = 0;
    for (int k = 0; k < len; k++)
      if (u_dram.peek_byte(longint'(buf_addr) + k) !== expect_byte(lun, row, col + k)) begin
        if (bad < 3) $display("  byte %0d: got %h expected %h", k,
                              u_dram.peek_byte(longint'(buf_addr) + k), expect_byte(lun, row, col + k));
        bad++;
      end
    check(bad == 0, $sformatf("%s: %0d of %0d bytes wrong (LUN %0d row %0d col %0d)",
                              what, bad, len, lun, row, col));
  endtask

  task automatic do_read(int chip, int row, int col, int len, logic [31:0] buf_addr);
    int id;
    read_cc_start(chip, row, id);
    wait_txn(id);
    poll_ready(chip);
    read_cc_transfer(chip, col, len, buf_addr);
    check_buf(chip, row, col, len, buf_addr, "READ with change column");
  endtask

  task automatic do_slc_read(int chip, int row, int len, logic [31:0] buf_addr);
    int id;
    q_read_start(chip, row, 1);
    txq.push_back(mk(OP_CE, 64'd0));
    push_txn(id);
    wait_txn(id);
    poll_ready(chip);
    txq.push_back(mk(OP_CE, 64'(1 << chip)));
    q_cmd(8'h00);
    txq.push_back(mk(OP_DMA_ADDR, 64'(buf_addr)));
    txq.push_back(mk(OP_DREAD, 64'(len)));
    txq.push_back(mk(OP_CE, 64'd0));
    push_txn(id);
    wait_txn(id);
    check_buf(chip, row, 0, len, buf_addr, "pseudo-SLC READ");
  endtask

  // READ in one transaction, waiting t_R with the Timer.
  task automatic do_timed_read(int chip, int row, int col, int len, int t_r_ns, logic [31:0] buf_addr);
    int id;
    q_read_start(chip, row, 0);
    txq.push_back(mk(OP_TIMER, 64'(t_r_ns)));
    q_change_col(col);
    txq.push_back(mk(OP_DMA_ADDR, 64'(buf_addr)));
    txq.push_back(mk(OP_DREAD, 64'(len)));
    txq.push_back(mk(OP_CE, 64'd0));
    push_txn(id);
    wait_txn(id);
    n_timer++;
    check_buf(chip, row, col, len, buf_addr, "READ timed with the Timer");
  endtask

  task automatic do_program(logic [7:0] bitmap, int row, int col, int len, logic [31:0] buf_addr);
    int id;
    logic [7:0] v[$]; bit a[$];
    // fill the DRAM buffer with a fresh pattern
    for (int k = 0; k < (len + 8) / 4 + 1; k++)
      u_dram.poke((longint'(buf_addr) >> 2) + k, $urandom());
    txq.push_back(mk(OP_CE, 64'(bitmap)));
    v.push_back(8'h80); a.push_back(0);
    v.push_back(8'(col)); a.push_back(1);
    v.push_back(8'(col >> 8)); a.push_back(1);
    row_addr(row, v, a);
    q_ca(v, a);
    txq.push_back(mk(OP_DMA_ADDR, 64'(buf_addr)));
    txq.push_back(mk(OP_DWRITE, 64'(len)));
    q_cmd(8'h10);
    txq.push_back(mk(OP_CE, 64'd0));
    push_txn(id);
    wait_txn(id);
    for (int l = 0; l < N_LUNS; l++) if (bitmap[l]) begin
      for (int k = 0; k < len; k++) begin
        logic [7:0] b = u_dram.peek_byte(longint'(buf_addr) + k);
        if (b != 8'hFF) model_page[l][row][col + k] = b;
      end
      poll_ready(l);
    end
    if ($countones(bitmap) > 1) n_gang++;
  endtask

  // SET FEATURES then GET FEATURES, both timed with the Timer: t_ADL between
  // the feature address and its data, t_FEAT after the data and after the
  // GET FEATURES address.
  localparam int T_FEAT_NS = 1200;
  task automatic do_features(int chip, logic [7:0] fa, logic [31:0] val);
    int id;
    u_dram.poke(longint'(32'h0006_0000) >> 2, val);
    txq.push_back(mk(OP_CE, 64'(1 << chip)));
    q_ca('{8'hEF, fa}, '{1'b0, 1'b1});
    txq.push_back(mk(OP_TIMER, 64'(int'(cfg_timing.t_adl) * 5)));
    txq.push_back(mk(OP_DMA_ADDR, 64'h0006_0000));
    txq.push_back(mk(OP_DWRITE, 64'd4));
    txq.push_back(mk(OP_TIMER, 64'(T_FEAT_NS)));
    txq.push_back(mk(OP_CE, 64'd0));
    push_txn(id);
    wait_txn(id);
    txq.push_back(mk(OP_CE, 64'(1 << chip)));
    q_ca('{8'hEE, fa}, '{1'b0, 1'b1});
    txq.push_back(mk(OP_TIMER, 64'(T_FEAT_NS)));
    txq.push_back(mk(OP_DMA_ADDR, 64'h0006_0010));
    txq.push_back(mk(OP_DREAD, 64'd4));
    txq.push_back(mk(OP_CE, 64'd0));
    push_txn(id);
    wait_txn(id);
    n_timer += 3;
    check(u_dram.peek(longint'(32'h0006_0010) >> 2) == val,
          $sformatf("GET FEATURES %h returned %h, set %h", fa, u_dram.peek(longint'(32'h0006_0010) >> 2), val));
  endtask

  task automatic do_erase(int chip, int row);
    int id;
    logic [7:0] v[$]; bit a[$];
    txq.push_back(mk(OP_CE, 64'(1 << chip)));
    v.push_back(8'h60); a.push_back(0);
    row_addr(row, v, a);
    v.push_back(8'hD0); a.push_back(0);
    q_ca(v, a);
    txq.push_back(mk(OP_CE, 64'd0));
    push_txn(id);
    wait_txn(id);
    poll_ready(chip);
    model_erased[chip][row / 64] = 1;
    model_page[chip].delete(row);
    for (int r = (row / 64) * 64; r < (row / 64) * 64 + 64; r++)
      if (model_page[chip].exists(r)) model_page[chip].delete(r);
  endtask

  // Interleaved reads: start a READ on several LUNs back to back, then
  // collect each one.
  task automatic interleaved_reads(int nluns, int row, int len);
    int ids[N_LUNS];
    for (int l = 0; l < nluns; l++) begin
      q_read_start(l, row + l, 0);
      txq.push_back(mk(OP_CE, 64'd0));
      push_txn(ids[l]);
    end
    for (int l = 0; l < nluns; l++) wait_txn(ids[l]);
    for (int l = 0; l < nluns; l++) begin
      poll_ready(l);
      read_cc_transfer(l, 16 * l, len, 32'h0004_0000 + 32'(l) * 32'h1000);
    end
    for (int l = 0; l < nluns; l++)
      check_buf(l, row + l, 16 * l, len, 32'h0004_0000 + 32'(l) * 32'h1000, "interleaved READ");
    n_interleave++;
  endtask

  // A transaction is held until its last word is queued.
  task automatic commit_hold_test();
    int id;
    int we_edges = 0;
    pend.push_back(mk(OP_CE, 64'd1));
    pend.push_back(mk(OP_TIMER, 64'd50));
    repeat (100) begin
      @(posedge clk);
      if (!ce_n[0] || dut.u_tm.busy) we_edges++;
    end
    check(we_edges == 0 && !txn_done, "incomplete transaction was not started");
    check(dut.u_queue.waiting_commit, "queue reports a transaction waiting for its end");
    n_commit_hold++;
    txq.push_back(mk(OP_CE, 64'd0));
    push_txn(id);
    wait_txn(id);
    check(ce_n == '1, "chip enables released after the transaction");
  endtask

  // Exact cycle count of a 16-byte NV-DDR2 read segment (t_ddr cycles/byte).
  task automatic check_ddr_rate();
    int t0 = 0, t1 = 0;
    int edges = 0;
    logic re_prev;
    int id;
    txq.push_back(mk(OP_CE, 64'd1));
    q_cmd(8'h00);
    txq.push_back(mk(OP_DMA_ADDR, 64'h0006_0000));
    txq.push_back(mk(OP_DREAD, 64'd64));
    txq.push_back(mk(OP_CE, 64'd0));
    push_txn(id);
    re_prev = re_n;
    while (!done_seen.exists(id)) begin
      @(posedge clk);
      if (re_n != re_prev) begin
        edges++;
        if (edges == 2) t0 = cycle;
        if (edges == 65) t1 = cycle;
      end
      re_prev = re_n;
    end
    check(t1 - t0 == 63 * int'(cfg_timing.t_ddr),
          $sformatf("NV-DDR2 read: %0d cycles for 63 byte edges, expected %0d",
                    t1 - t0, 63 * cfg_timing.t_ddr));
  endtask

  int viol_total;

  initial begin : main
    int id;
    cfg_timing  = TIMING_DEFAULT;
    cfg_mode    = MODE_NVDDR2;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);

    // ---------- NV-DDR2 ----------
    commit_hold_test();
    do_read(0, 5, 0, PAGE, 32'h0010_0000);          // one full 16 KiB page
    do_read(1, 9, 1000, 300, 32'h0002_0003);        // partial read, unaligned buffer
    do_slc_read(2, 12, 256, 32'h0002_1000);
    do_timed_read(3, 20, 64, 128, 12000, 32'h0002_2000);
    check_ddr_rate();
    do_features(6, 8'h89, 32'h0403_0201);
    fork
      do_program(8'b0000_0010, 70, 8, 200, 32'h0003_0001);
      begin   // DRAM busy in the middle of the data-in segment
        wait (dut.u_dw.active && dut.u_dw.state == dut.u_dw.S_LO);
        repeat (40) @(posedge clk);
        dram_hold = 1'b1;
        repeat (200) @(posedge clk);
        dram_hold = 1'b0;
      end
    join
    do_read(1, 70, 0, 256, 32'h0002_3000);
    do_program(8'b0011_0000, 71, 0, 128, 32'h0003_1000);   // gang program LUN 4 and 5
    do_read(4, 71, 0, 128, 32'h0002_4000);
    do_read(5, 71, 0, 128, 32'h0002_5000);
    // 200 MT/s: one byte per clock cycle in both directions
    cfg_timing.t_ddr = 8'd1;
    repeat (10) @(posedge clk);
    do_program(8'b0000_1000, 72, 0, 512, 32'h0003_4000);
    do_read(3, 72, 0, 512, 32'h0002_a000);
    do_read(2, 40, 0, 1024, 32'h0002_b000);
    cfg_timing.t_ddr = TIMING_DEFAULT.t_ddr;
    repeat (10) @(posedge clk);
    fork
      interleaved_reads(N_LUNS, 100, 64);
      begin   // DRAM busy while the first data-out segment streams
        wait (dut.u_dr.active && dut.u_dr.state == dut.u_dr.S_DDR);
        dram_hold = 1'b1;
        repeat (300) @(posedge clk);
        dram_hold = 1'b0;
      end
    join

    // ---------- SDR ----------
    cfg_mode = MODE_SDR;
    n_mode_switch++;
    repeat (10) @(posedge clk);
    do_read(6, 33, 5, 200, 32'h0002_6002);
    do_features(6, 8'h10, 32'hA5C3_0F7E);
    do_program(8'b1000_0000, 64, 0, 100, 32'h0003_2000);
    do_read(7, 64, 0, 120, 32'h0002_7000);
    do_erase(7, 64);
    do_read(7, 65, 0, 64, 32'h0002_8000);
    do_read(7, 64, 0, 64, 32'h0002_8100);
    do_slc_read(0, 3, 64, 32'h0002_9000);
    interleaved_reads(4, 200, 32);

    // burst of queued transactions to fill the queue
    for (int k = 0; k < 12; k++) begin
      txq.push_back(mk(OP_CE, 64'(1 << (k % N_LUNS))));
      q_cmd(8'h70);
      txq.push_back(mk(OP_DMA_ADDR, 64'(32'h0005_0000 + 32'(k) * 8)));
      txq.push_back(mk(OP_DREAD, 64'd4));
      txq.push_back(mk(OP_CE, 64'd0));
      push_txn(id);
    end
    wait_txn(id);
    for (int k = 0; k < 12; k++)
      check(u_dram.peek_byte(longint'(32'h0005_0000 + k * 8)) == 8'h40, "queued READ STATUS");

    repeat (20) @(posedge clk);
    check(idle, "unit idle at the end");

    viol_total = 0;
    viol_total += g_lun[0].u_lun.violations; viol_total += g_lun[1].u_lun.violations;
    viol_total += g_lun[2].u_lun.violations; viol_total += g_lun[3].u_lun.violations;
    viol_total += g_lun[4].u_lun.violations; viol_total += g_lun[5].u_lun.violations;
    viol_total += g_lun[6].u_lun.violations; viol_total += g_lun[7].u_lun.violations;
    check(viol_total == 0, $sformatf("%0d ONFI protocol/timing violations seen by the LUNs", viol_total));
    check(g_lun[2].u_lun.n_slc_reads == 1 && g_lun[0].u_lun.n_slc_reads == 1, "pseudo-SLC reads reached the LUNs");
    check(g_lun[6].u_lun.n_setfeat == 2 && g_lun[6].u_lun.n_getfeat == 2, "SET and GET FEATURES reached LUN 6");
    check(g_lun[4].u_lun.n_progs == 1 && g_lun[5].u_lun.n_progs == 1, "gang program reached both LUNs");
    check(g_lun[7].u_lun.n_erases == 1, "erase reached LUN 7");

    // every mechanism must have happened
    $display("mechanisms: commit_hold=%0d interleave=%0d multi_queued=%0d queue_full=%0d pkt_stall=%0d gang=%0d timer=%0d polls=%0d mode_switch=%0d",
             n_commit_hold, n_interleave, n_multi_queued, n_queue_full, n_pkt_stall,
             n_gang, n_timer, n_polls, n_mode_switch);
    check(n_commit_hold > 0, "transaction held until complete");
    check(n_interleave > 0, "interleaved reads");
    check(n_multi_queued > 0, "several complete transactions queued");
    check(n_queue_full > 0, "queue full back-pressure");
    check(n_pkt_stall > 0, "Packetizer stall");
    check(n_gang > 0, "gang scheduling with Chip Control");
    check(n_timer > 0, "Timer wait");
    check(n_polls > 0, "READ STATUS polling");
    check(n_mode_switch > 0, "data mode switch");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
