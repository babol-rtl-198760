// tb_babol_read_workload: page-READ throughput of one channel, the workload
// BABOL controllers are measured with.
//
// The top runs at its default parameters with eight LUN models holding
// 16384-byte pages and a 100 us array read time (20000 cycles at the 200 MHz
// clock), which are the numbers of an 8-LUN Hynix-style channel. The
// testbench acts as the operation software. For each LUN it runs a coroutine
// (a forked thread) that reads pages one after another, as a READ with
// change column is written:
//   1. a transaction latching 00h C1 C2 R1 R2 R3 30h;
//   2. READ STATUS transactions every 1 us until the status byte is 40h;
//   3. a transaction latching 05h C1 C2 E0h and reading the whole page.
// The LUN threads submit concurrently, so the queue holds transactions of
// several LUNs, and one LUN's array read overlaps another LUN's transfer.
//
// Runs: 2, 4 and 8 LUNs with sequential rows at 100 MT/s and at 200 MT/s
// (t_ddr = 2 and 1 cycles per byte), plus 8 LUNs with random rows at both
// rates. Each run reads PAGES pages per LUN and checks every byte in DRAM.
// Each run checks:
//   * the elapsed time is no shorter than the physical bound, which is the
//     larger of (first t_R + the channel's transfer time) and one LUN's
//     serial (t_R + transfer) time;
//   * the elapsed time is within 15% of that bound, so interleaving hides
//     the array reads;
//   * throughput never drops when LUNs are added;
//   * 200 MT/s is faster than 100 MT/s;
//   * with 8 LUNs the data transfer keeps the bus busy at least 80% of the
//     time.
// It prints a bandwidth table in MB/s.
module tb_babol_read_workload;
  timeunit 1ns;
  timeprecision 100ps;
  import babol_pkg::*;

  localparam int N_LUNS = 8;
  localparam int PAGE   = 16384;
  localparam int T_R    = 20000;     // cycles: 100 us at 5 ns
  localparam int PAGES  = 2;         // pages per LUN per run
  localparam real CLK_NS = 5.0;

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

  dram_model #(.AW(32), .LATENCY(4), .GNT_PCT(90), .SEED(11)) u_dram (
    .clk, .hold(1'b0), .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .be(mem_be), .gnt(mem_gnt), .rvalid(mem_rvalid), .rdata(mem_rdata)
  );

  logic [7:0] l_dq   [N_LUNS];
  logic       l_dqd  [N_LUNS];
  logic       l_dqs  [N_LUNS];
  logic       l_dqsd [N_LUNS];
  for (genvar g = 0; g < N_LUNS; g++) begin : g_lun
    onfi_lun_model #(.LUN_ID(g), .PAGE_BYTES(PAGE), .T_R(T_R),
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
  int cycle = 0;
  longint xfer_cycles = 0;     // cycles the Data Reader spent in page transfers
  bit in_page_xfer = 1'b0;
  bit done_seen [int];

  always @(posedge clk) begin
    cycle++;
    if (txn_done) done_seen[int'(txn_id)] = 1;
    if (in_page_xfer && dut.u_dr.active) xfer_cycles++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d)", what, cycle);
    end
  endtask

  // ---------------- transaction building ----------------
  instr_t pend[$];
  logic   was_ready = 1'b0;
  int     next_id = 1;

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

  function automatic instr_t mk(ufsm_op_e op, logic [63:0] arg);
    instr_t i;
    i.op = op; i.len = '0; i.types = '0; i.arg = arg;
    return i;
  endfunction

  function automatic instr_t mk_ca(logic [7:0] v[$], bit a[$]);
    instr_t i = mk(OP_CA, '0);
    i.len = 4'(v.size());
    foreach (v[k]) begin
      i.arg[8*k +: 8] = v[k];
      i.types[k]      = a[k];
    end
    return i;
  endfunction

  // Hands a whole transaction to the driver in one step, so transactions of
  // concurrent LUN threads never mix, and returns its id.
  function automatic int submit(instr_t t[$]);
    int id = next_id++;
    t.push_back(mk(OP_TXN_END, 64'(id)));
    foreach (t[k]) pend.push_back(t[k]);
    return id;
  endfunction

  task automatic wait_txn(int id);
    while (!done_seen.exists(id)) @(posedge clk);
    done_seen.delete(id);
  endtask

  function automatic logic [7:0] pattern(int lun, int r, int c);
    return 8'((r * 7) ^ (c * 3) ^ (c >> 8) ^ (lun * 16'h55));
  endfunction

  // ---------------- one READ operation ----------------
  task automatic page_read(int lun, int row, logic [31:0] buf_addr);
    instr_t t[$];
    logic [7:0] st;
    int id, bad;
    // 1. command and address
    t = {};
    t.push_back(mk(OP_CE, 64'(1 << lun)));
    t.push_back(mk_ca('{8'h00, 8'h00, 8'h00, 8'(row), 8'(row >> 8), 8'(row >> 16), 8'h30},
                      '{1'b0, 1'b1, 1'b1, 1'b1, 1'b1, 1'b1, 1'b0}));
    t.push_back(mk(OP_CE, 64'd0));
    id = submit(t);
    wait_txn(id);
    // 2. poll READ STATUS
    do begin
      repeat (200) @(posedge clk);
      t = {};
      t.push_back(mk(OP_CE, 64'(1 << lun)));
      t.push_back(mk_ca('{8'h70}, '{1'b0}));
      t.push_back(mk(OP_DMA_ADDR, 64'(32'h0000_0100 + 16 * lun)));
      t.push_back(mk(OP_DREAD, 64'd4));
      t.push_back(mk(OP_CE, 64'd0));
      id = submit(t);
      wait_txn(id);
      st = u_dram.peek_byte(longint'(32'h0000_0100 + 16 * lun));
    end while (st != 8'h40);
    // 3. change column to 0 and transfer the page
    t = {};
    t.push_back(mk(OP_CE, 64'(1 << lun)));
    t.push_back(mk_ca('{8'h05, 8'h00, 8'h00, 8'hE0}, '{1'b0, 1'b1, 1'b1, 1'b0}));
    t.push_back(mk(OP_DMA_ADDR, 64'(buf_addr)));
    t.push_back(mk(OP_DREAD, 64'(PAGE)));
    t.push_back(mk(OP_CE, 64'd0));
    id = submit(t);
    wait_txn(id);
    bad = 0;
    for (int c = 0; c < PAGE; c++)
      if (u_dram.peek_byte(longint'(buf_addr) + c) !== pattern(lun, row, c)) bad++;
    check(bad == 0, $sformatf("LUN %0d row %0d: %0d of %0d bytes wrong", lun, row, bad, PAGE));
  endtask

  // ---------------- one run ----------------
  real mbps [string];

  task automatic run(int nluns, int t_ddr, bit random_rows, string name);
    int t0, t1;
    longint bound_bus, bound_lun, bound, elapsed;
    real util;
    wait (idle);
    cfg_timing.t_ddr = 8'(t_ddr);
    repeat (10) @(posedge clk);
    xfer_cycles  = 0;
    in_page_xfer = 1'b1;
    t0 = cycle;
    for (int l = 0; l < nluns; l++) begin
      automatic int lun = l;
      fork
        for (int p = 0; p < PAGES; p++) begin
          automatic int row = random_rows ? int'($urandom_range(0, 65535)) : 1000 * lun + p;
          page_read(lun, row, 32'h0010_0000 + 32'((lun * PAGES + p) * PAGE));
        end
      join_none
    end
    wait fork;
    t1 = cycle;
    in_page_xfer = 1'b0;
    elapsed   = longint'(t1 - t0);
    // physical bounds: nothing can be transferred before the first t_R ends,
    // then all pages cross the bus at t_ddr cycles per byte (status bytes
    // ignored); and one LUN does t_R then its transfer for every page
    bound_bus = T_R + longint'(nluns) * PAGES * PAGE * t_ddr;
    bound_lun = longint'(PAGES) * (T_R + PAGE * t_ddr);
    bound     = (bound_bus > bound_lun) ? bound_bus : bound_lun;
    util      = real'(longint'(nluns) * PAGES * PAGE * t_ddr) / real'(elapsed);
    mbps[name] = real'(longint'(nluns) * PAGES * PAGE) / (real'(elapsed) * CLK_NS / 1000.0);
    $display("%-22s %0d LUNs  %0d MT/s  %8d cycles  bound %8d  %7.1f MB/s  bus data %4.1f%%",
             name, nluns, 200 / t_ddr, elapsed, bound, mbps[name], 100.0 * util);
    check(elapsed >= bound, $sformatf("%s faster than physically possible", name));
    check(real'(elapsed) <= 1.15 * real'(bound),
          $sformatf("%s took %0d cycles, more than 1.15 x bound %0d", name, elapsed, bound));
    check(xfer_cycles >= longint'(nluns) * PAGES * PAGE * t_ddr,
          $sformatf("%s: Data Reader active %0d cycles, less than the bytes need", name, xfer_cycles));
    if (nluns == N_LUNS)
      check(util >= 0.80, $sformatf("%s: bus data utilisation %.2f below 0.80", name, util));
  endtask

  int viol_total;

  initial begin : main
    cfg_timing  = TIMING_DEFAULT;
    cfg_mode    = MODE_NVDDR2;
    instr_valid = 1'b0;
    instr       = '0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);

    run(2, 2, 0, "seq_2_100");
    run(4, 2, 0, "seq_4_100");
    run(8, 2, 0, "seq_8_100");
    run(2, 1, 0, "seq_2_200");
    run(4, 1, 0, "seq_4_200");
    run(8, 1, 0, "seq_8_200");
    run(8, 2, 1, "rnd_8_100");
    run(8, 1, 1, "rnd_8_200");

    check(mbps["seq_4_100"] >= mbps["seq_2_100"] && mbps["seq_8_100"] >= mbps["seq_4_100"],
          "100 MT/s throughput grows with the number of LUNs");
    check(mbps["seq_4_200"] >= mbps["seq_2_200"] && mbps["seq_8_200"] >= mbps["seq_4_200"],
          "200 MT/s throughput grows with the number of LUNs");
    check(mbps["seq_8_200"] > mbps["seq_8_100"] && mbps["rnd_8_200"] > mbps["rnd_8_100"],
          "200 MT/s channel is faster than 100 MT/s");
    viol_total = g_lun[0].u_lun.violations + g_lun[1].u_lun.violations +
                 g_lun[2].u_lun.violations + g_lun[3].u_lun.violations +
                 g_lun[4].u_lun.violations + g_lun[5].u_lun.violations +
                 g_lun[6].u_lun.violations + g_lun[7].u_lun.violations;
    check(viol_total == 0, $sformatf("LUNs saw %0d timing violations", viol_total));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (6000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
