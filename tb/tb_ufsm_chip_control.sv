// tb_ufsm_chip_control: drives random LUN bitmaps into the Chip Control uFSM
// and checks CE# (active low, one bit per LUN), the CE# hold prev_en any LUN
// is released (t_ch) and the set-up after any LUN is selected (t_cs): done
// must come 1 + (release ? t_ch : 0) + (select ? t_cs : 0) cycles after
// start, and CE# must not change prev_en t_ch cycles have passed.
module tb_ufsm_chip_control;
  timeunit 1ns;
  timeprecision 100ps;
  localparam int N = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #2.5 clk = ~clk;
  logic start = 1'b0, done;
  logic [N-1:0] bitmap = '0, ce_n;
  logic [7:0] t_cs = 8'd7, t_ch = 8'd3;
  int checks = 0, failures = 0;

  ufsm_chip_control #(.N_LUNS(N)) dut (.clk, .rst_n, .start, .bitmap, .t_cs, .t_ch, .done, .ce_n);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic apply(logic [N-1:0] b);
    logic [N-1:0] prev_en = ~ce_n;
    bit rel = (prev_en & ~b) != 0;
    bit sel = (b & ~prev_en) != 0;
    int expect_n = 1 + (rel ? int'(t_ch) : 0) + (sel ? int'(t_cs) : 0);
    int n, first_change = -1;
    @(negedge clk);
    bitmap = b; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    n = 1;
    if (~ce_n != prev_en && first_change < 0) first_change = n;
    while (!done && n < 1000) begin
      @(negedge clk); n++;
      if (~ce_n != prev_en && first_change < 0) first_change = n;
    end
    check(n == expect_n, $sformatf("bitmap %b after %b: done after %0d cycles, expected %0d", b, prev_en, n, expect_n));
    check(ce_n == ~b, $sformatf("CE# %b for bitmap %b", ce_n, b));
    if (rel) check(first_change > int'(t_ch), $sformatf("CE# changed at cycle %0d, before t_ch", first_change));
    @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    check(ce_n == '1, "all LUNs deselected after reset");
    rst_n = 1'b1;
    apply(8'b0000_0001);
    apply(8'b0000_0000);
    apply(8'b0000_0100);
    apply(8'b0000_0100);
    apply(8'b1010_0000);    // gang: two LUNs at once
    apply(8'b1111_1111);
    for (int i = 0; i < 40; i++) begin
      t_cs = 8'($urandom_range(1, 20));
      t_ch = 8'($urandom_range(1, 20));
      apply(N'($urandom()));
    end
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
