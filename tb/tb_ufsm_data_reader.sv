// tb_ufsm_data_reader: a LUN-like responder serves a random page through the
// Data Reader uFSM in SDR and NV-DDR2 mode, while the Packetizer side
// (out_ready) is throttled at random. In SDR the responder drives the next
// byte while RE# is low and advances on RE# rising; in NV-DDR2 it treats the
// first RE# fall as the preamble and answers every later RE# edge, one clock
// later, with the next byte and a DQS toggle. Checks the bytes handed on,
// their count, the t_rr wait before RE# first falls, the SDR RE# pulse
// (t_rp) and the NV-DDR2 rate of one RE# edge per t_ddr cycles.
module tb_ufsm_data_reader;
  timeunit 1ns;
  timeprecision 100ps;
  import babol_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #2.5 clk = ~clk;
  logic start = 1'b0, done, active, out_valid, out_ready = 1'b1;
  logic [31:0] nbytes = '0;
  data_mode_e mode = MODE_SDR;
  logic [7:0] dq_i = 8'h00, out_data;
  logic dqs_i = 1'b0;
  onfi_timing_t timing;
  onfi_drv_t pins;
  int checks = 0, failures = 0;

  ufsm_data_reader dut (.clk, .rst_n, .start, .nbytes, .mode, .timing, .dq_i, .dqs_i,
                        .out_valid, .out_data, .out_ready, .done, .active, .pins);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // responder
  logic [7:0] page [4096];
  int col = 0;
  logic re_q = 1'b1;
  bit burst = 0;
  always @(posedge clk) begin
    if (mode == MODE_SDR) begin
      if (re_q && !pins.re_n) dq_i <= page[col];
      if (!re_q && pins.re_n) col <= col + 1;
    end else if (re_q != pins.re_n) begin
      if (!burst) begin burst = 1; dqs_i <= 1'b0; end
      else begin dq_i <= page[col]; dqs_i <= ~dqs_i; col <= col + 1; end
    end
    re_q <= pins.re_n;
  end

  int ready_pct = 100;
  always @(negedge clk) out_ready = ($urandom_range(0, 99) < ready_pct);

  task automatic run(data_mode_e m, int n, int rdy);
    logic [7:0] got[$];
    int cyc = 0, first_fall = -1, low = 0, bad_pulse = 0, last_edge = -1, bad_rate = 0;
    logic re_prev = 1'b1;
    for (int i = 0; i < 4096; i++) page[i] = 8'($urandom());
    col = 0; burst = 0;
    ready_pct = rdy;
    @(negedge clk);
    mode = m; nbytes = n; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done && cyc < 200000) begin
      cyc++;
      if (out_valid) got.push_back(out_data);
      if (re_prev && !pins.re_n && first_fall < 0) first_fall = cyc;
      if (m == MODE_SDR) begin
        if (!pins.re_n) low++;
        if (!re_prev && pins.re_n) begin
          if (low != int'(timing.t_rp)) bad_pulse++;
          low = 0;
        end
      end else if (re_prev != pins.re_n && first_fall >= 0 && cyc != first_fall) begin
        if (last_edge >= 0 && rdy == 100 && got.size() < n && cyc - last_edge != int'(timing.t_ddr)) bad_rate++;
        last_edge = cyc;
      end
      re_prev = pins.re_n;
      @(negedge clk);
    end
    check(got.size() == n, $sformatf("%s: %0d bytes handed on, %0d expected", m.name(), got.size(), n));
    for (int i = 0; i < n && i < got.size(); i++)
      if (got[i] != page[i]) begin
        check(0, $sformatf("%s byte %0d: %h, page holds %h", m.name(), i, got[i], page[i]));
        break;
      end
    checks++;
    if (n > 0) check(first_fall > int'(timing.t_rr), $sformatf("RE# first falls at cycle %0d, t_rr %0d", first_fall, timing.t_rr));
    if (m == MODE_SDR) check(bad_pulse == 0, "RE# low pulse equals t_rp");
    else check(bad_rate == 0, $sformatf("%0d RE# edges off the t_ddr rate", bad_rate));
    @(negedge clk);
    check(pins.re_n && !active, "RE# high and uFSM idle after the segment");
  endtask

  initial begin
    timing = TIMING_DEFAULT;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(MODE_SDR, 4, 100);
    run(MODE_SDR, 64, 100);
    run(MODE_NVDDR2, 128, 100);
    run(MODE_NVDDR2, 4, 100);
    run(MODE_SDR, 50, 40);
    run(MODE_NVDDR2, 200, 40);
    timing.t_ddr = 8'd1;
    run(MODE_NVDDR2, 256, 100);
    timing.t_ddr = 8'd3;
    run(MODE_NVDDR2, 64, 100);
    for (int k = 0; k < 10; k++)
      run($urandom_range(0, 1) ? MODE_SDR : MODE_NVDDR2, 2 * $urandom_range(1, 100), $urandom_range(20, 100));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
