// tb_ufsm_data_writer: streams random bytes into the Data Writer uFSM, in SDR
// and NV-DDR2 mode, with and without gaps in the byte source, and captures
// the pins like a LUN: on WE# rising in SDR, on every DQS edge in NV-DDR2.
// Checks the bytes and their count, the t_adl wait before the first strobe,
// the DQS preamble, and the byte rate when the source never stalls: one
// byte per t_wp + t_wh cycles in SDR, per t_ddr cycles in NV-DDR2.
// In NV-DDR2 a second, event-driven receiver captures DQ at the exact time
// of every DQS edge and checks that DQ was stable for at least 2 ns before
// and after it (centre alignment); with t_ddr = 1 the DQS edges fall on the
// falling clock edge, so only this receiver is used.
module tb_ufsm_data_writer;
  timeunit 1ns;
  timeprecision 100ps;
  import babol_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #2.5 clk = ~clk;
  logic start = 1'b0, done, active, in_ready;
  logic in_valid = 1'b0;
  logic [31:0] nbytes = '0;
  data_mode_e mode = MODE_SDR;
  logic [7:0] in_data = 8'h00;
  onfi_timing_t timing;
  onfi_drv_t pins;
  int checks = 0, failures = 0;

  ufsm_data_writer dut (.clk, .rst_n, .start, .nbytes, .mode, .timing, .in_valid, .in_data,
                        .in_ready, .done, .active, .pins);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // byte source
  logic [7:0] src[$];
  int gap_pct = 0;
  logic rdy_s = 1'b0;
  always @(negedge clk) begin
    if (in_valid && rdy_s) void'(src.pop_front());   // taken at the last rising edge
    in_valid = (src.size() > 0) && ($urandom_range(0, 99) >= gap_pct);
    in_data  = (src.size() > 0) ? src[0] : 8'h00;
    rdy_s    = in_ready;
  end

  // event-driven NV-DDR2 receiver
  bit         ev_on = 1'b0;
  logic [7:0] ev_got[$];
  realtime    last_dq_t = 0.0, last_dqs_t = -100.0, ev_prev_t = -1.0;
  int         setup_bad = 0, hold_bad = 0, ev_rate_bad = 0;
  realtime    ev_period = 5.0;
  always @(pins.dq) begin
    if (ev_on && $realtime - last_dqs_t < 2.0) hold_bad++;
    last_dq_t = $realtime;
  end
  always @(pins.dqs) begin
    if (ev_on && pins.dqs_oe) begin
      if ($realtime - last_dq_t < 2.0) setup_bad++;
      if (ev_prev_t >= 0.0 && $realtime - ev_prev_t != ev_period) ev_rate_bad++;
      ev_prev_t = $realtime;
      ev_got.push_back(pins.dq);
      last_dqs_t = $realtime;
    end
  end

  task automatic run(data_mode_e m, int n, int gaps);
    logic [7:0] sent[$];
    logic [7:0] got[$];
    int cyc = 0, first_strobe = -1, last_edge = -1, bad_rate = 0, per;
    logic we_prev = 1'b1, dqs_prev = 1'b0;
    bit pre_ok = 1;
    gap_pct = gaps;
    for (int i = 0; i < n; i++) begin sent.push_back(8'($urandom())); src.push_back(sent[i]); end
    ev_got = {}; setup_bad = 0; hold_bad = 0; ev_rate_bad = 0; ev_prev_t = -1.0;
    ev_period = 5.0 * timing.t_ddr;
    ev_on = (m == MODE_NVDDR2);
    @(negedge clk);
    mode = m; nbytes = n; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    per = (m == MODE_SDR) ? timing.t_wp + timing.t_wh : timing.t_ddr;
    while (!done && cyc < 100000) begin
      cyc++;
      if (m == MODE_SDR && we_prev == 1'b0 && pins.we_n == 1'b1) begin
        got.push_back(pins.dq);
        if (last_edge >= 0 && cyc - last_edge != per) bad_rate++;
        last_edge = cyc;
      end
      if (m == MODE_SDR && we_prev == 1'b1 && pins.we_n == 1'b0 && first_strobe < 0) first_strobe = cyc;
      if (m == MODE_NVDDR2 && pins.dqs_oe && pins.dqs != dqs_prev) begin
        if (first_strobe < 0) first_strobe = cyc;
        got.push_back(pins.dq);
        if (last_edge >= 0 && cyc - last_edge != per) bad_rate++;
        last_edge = cyc;
      end
      if (m == MODE_NVDDR2 && pins.dqs_oe && first_strobe < 0 && pins.dqs != 1'b0) pre_ok = 0;
      we_prev = pins.we_n;
      dqs_prev = pins.dqs_oe ? pins.dqs : 1'b0;
      @(negedge clk);
    end
    ev_on = 1'b0;
    if (m == MODE_NVDDR2) begin
      check(ev_got == sent, $sformatf("DQS-edge receiver: %0d bytes, %0d sent, equal %0d",
                                      ev_got.size(), n, ev_got == sent));
      check(setup_bad == 0 && hold_bad == 0,
            $sformatf("DQ settled around DQS edges (setup misses %0d, hold misses %0d)", setup_bad, hold_bad));
      if (gaps == 0) check(ev_rate_bad == 0, $sformatf("%0d DQS edges off the %0.1f ns period", ev_rate_bad, ev_period));
    end
    if (m == MODE_NVDDR2 && timing.t_ddr <= 8'd1) got = sent;   // sampled by the receiver above
    check(got.size() == n, $sformatf("%s: %0d bytes strobed, %0d sent", m.name(), got.size(), n));
    for (int i = 0; i < n && i < got.size(); i++)
      if (got[i] != sent[i]) begin
        check(0, $sformatf("%s byte %0d: %h, sent %h", m.name(), i, got[i], sent[i]));
        break;
      end
    check(got == sent, "byte stream equal");
    if (n > 0) check(first_strobe > int'(timing.t_adl), $sformatf("first strobe at cycle %0d, t_adl %0d", first_strobe, timing.t_adl));
    if (m == MODE_NVDDR2) check(pre_ok, "DQS held low in the preamble");
    if (gaps == 0) check(bad_rate == 0, $sformatf("%s: %0d bytes off the %0d-cycle rate", m.name(), bad_rate, per));
    @(negedge clk);
    check(pins == ONFI_IDLE, "pins idle after the segment");
  endtask

  initial begin
    timing = TIMING_DEFAULT;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(MODE_SDR, 16, 0);
    run(MODE_NVDDR2, 64, 0);
    run(MODE_SDR, 40, 50);
    run(MODE_NVDDR2, 100, 60);
    run(MODE_SDR, 0, 0);
    timing.t_ddr = 8'd4;
    run(MODE_NVDDR2, 32, 0);
    timing.t_ddr = 8'd1;
    run(MODE_NVDDR2, 64, 0);
    run(MODE_NVDDR2, 90, 40);
    timing.t_ddr = 8'd2;
    timing.t_wp = 8'd3; timing.t_wh = 8'd2;
    run(MODE_SDR, 32, 0);
    for (int k = 0; k < 10; k++)
      run($urandom_range(0, 1) ? MODE_SDR : MODE_NVDDR2, $urandom_range(1, 80), $urandom_range(0, 70));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
