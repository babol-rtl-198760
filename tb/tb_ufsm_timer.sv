// tb_ufsm_timer: checks that the Timer uFSM pauses for at least the
// requested number of nanoseconds and no longer than one clock period more:
// done must come max(1, ceil(duration/CLK_PERIOD_NS)) cycles after start.
module tb_ufsm_timer;
  timeunit 1ns;
  timeprecision 100ps;
  localparam int CLK_NS = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  always #2.5 clk = ~clk;
  logic start = 1'b0, done;
  logic [31:0] dur = '0;
  int checks = 0, failures = 0;

  ufsm_timer #(.CLK_PERIOD_NS(CLK_NS)) dut (.clk, .rst_n, .start, .duration_ns(dur), .done);

  task automatic run(int unsigned d);
    int n = 0, expect_n;
    @(negedge clk);
    dur = d; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    n = 1;
    while (!done && n < 100000) begin @(negedge clk); n++; end
    expect_n = (d + CLK_NS - 1) / CLK_NS;
    if (expect_n < 1) expect_n = 1;
    checks++;
    if (n != expect_n) begin
      failures++;
      $display("FAIL duration %0d ns: done after %0d cycles, expected %0d", d, n, expect_n);
    end
    @(negedge clk);
    checks++;
    if (done) begin failures++; $display("FAIL done held high"); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(0); run(1); run(5); run(6); run(10); run(12); run(200); run(78000 / 100);
    for (int i = 0; i < 30; i++) run($urandom_range(0, 3000));
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
