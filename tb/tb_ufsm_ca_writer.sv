// tb_ufsm_ca_writer: sends random command/address latch sequences (and the
// READ, READ STATUS and change-column preambles) through the C/A Writer uFSM
// and decodes the pins like a LUN would: a latch is taken on each WE#
// rising edge, as a command if CLE is high or an address if ALE is high.
// Checks the latched types and values, the WE# pulse width (t_wp), the
// CLE/ALE/DQ set-up before WE# falls (t_cals), that DQ is driven while a
// strobe is high, and the segment length including the wait after the final
// latch (t_whr after 70h, t_ccs after E0h, t_wb after other commands,
// none after an address).
module tb_ufsm_ca_writer;
  timeunit 1ns;
  timeprecision 100ps;
  import babol_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #2.5 clk = ~clk;
  logic start = 1'b0, done, active;
  logic [3:0] len = '0;
  logic [MAX_LATCHES-1:0] types = '0;
  logic [ARG_W-1:0] values = '0;
  onfi_timing_t timing;
  onfi_drv_t pins;
  int checks = 0, failures = 0;

  ufsm_ca_writer dut (.clk, .rst_n, .start, .len, .types, .values, .timing, .done, .active, .pins);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(int n_l, logic [7:0] vals[], bit isaddr[]);
    logic [7:0] got_v[$];
    bit got_a[$];
    int n = 0, low_len = 0, stable = 0, min_setup = 1000, bad_pulse = 0;
    int post, expect_n;
    logic we_prev = 1'b1, dq_prev;
    logic [7:0] last_v = vals[n_l-1];
    @(negedge clk);
    len = 4'(n_l);
    for (int i = 0; i < MAX_LATCHES; i++) begin
      types[i] = (i < n_l) ? isaddr[i] : 1'b0;
      values[8*i +: 8] = (i < n_l) ? vals[i] : 8'h00;
    end
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    n = 1;
    forever begin
      if (pins.we_n == 1'b0) low_len++;
      if (we_prev == 1'b1 && pins.we_n == 1'b0) begin
        if (stable < min_setup) min_setup = stable;
      end
      if (we_prev == 1'b0 && pins.we_n == 1'b1) begin
        if (low_len != int'(timing.t_wp)) bad_pulse++;
        low_len = 0;
        got_v.push_back(pins.dq);
        got_a.push_back(pins.ale);
        check(pins.cle ^ pins.ale, "exactly one of CLE/ALE high at WE# rising");
        check(pins.dq_oe, "DQ driven at WE# rising");
      end
      if (pins.we_n && (pins.cle || pins.ale)) stable++; else if (pins.we_n) stable = 0;
      we_prev = pins.we_n;
      if (done) break;
      @(negedge clk);
      n++;
      if (n > 100000) break;
    end
    check(got_v.size() == n_l, $sformatf("%0d latches seen, %0d sent", got_v.size(), n_l));
    for (int i = 0; i < n_l && i < got_v.size(); i++) begin
      check(got_v[i] == vals[i] && got_a[i] == isaddr[i],
            $sformatf("latch %0d: got %s %h, sent %s %h", i, got_a[i] ? "ADDR" : "CMD", got_v[i],
                      isaddr[i] ? "ADDR" : "CMD", vals[i]));
    end
    check(bad_pulse == 0, "WE# low pulse equals t_wp");
    check(min_setup >= int'(timing.t_cals), $sformatf("set-up %0d cycles before WE# falls, t_cals %0d", min_setup, timing.t_cals));
    if (isaddr[n_l-1]) post = 0;
    else if (last_v == 8'h70 || last_v == 8'h78) post = timing.t_whr;
    else if (last_v == 8'hE0 || last_v == 8'h85) post = timing.t_ccs;
    else post = timing.t_wb;
    expect_n = n_l * (timing.t_cals + timing.t_wp + timing.t_wh) + ((post > 1) ? post - 1 : 0) + 1;
    check(n == expect_n, $sformatf("segment of %0d latches took %0d cycles, expected %0d", n_l, n, expect_n));
    @(negedge clk);
    check(!active && pins == ONFI_IDLE, "pins idle after the segment");
  endtask

  initial begin
    timing = TIMING_DEFAULT;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(pins == ONFI_IDLE, "idle pins after reset");
    // READ preamble 00h C1 C2 R1 R2 R3 30h
    run(7, '{8'h00, 8'h34, 8'h12, 8'h05, 8'h00, 8'h00, 8'h30}, '{0, 1, 1, 1, 1, 1, 0});
    run(1, '{8'h70}, '{0});                                    // READ STATUS
    run(4, '{8'h05, 8'h00, 8'h04, 8'hE0}, '{0, 1, 1, 0});      // change column
    run(6, '{8'h80, 8'h00, 8'h00, 8'h01, 8'h02, 8'h03}, '{0, 1, 1, 1, 1, 1});
    run(8, '{8'hEF, 8'h01, 8'h02, 8'h03, 8'h04, 8'h05, 8'h06, 8'h10}, '{0, 1, 1, 1, 1, 1, 1, 0});
    for (int k = 0; k < 30; k++) begin
      automatic int nl = $urandom_range(1, MAX_LATCHES);
      automatic logic [7:0] v[] = new[nl];
      automatic bit a[] = new[nl];
      timing.t_cals = 8'($urandom_range(1, 8));
      timing.t_wp   = 8'($urandom_range(1, 8));
      timing.t_wh   = 8'($urandom_range(1, 8));
      timing.t_wb   = 8'($urandom_range(1, 30));
      for (int i = 0; i < nl; i++) begin v[i] = 8'($urandom()); a[i] = 1'($urandom()); end
      run(nl, v, a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
