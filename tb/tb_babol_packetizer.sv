// tb_babol_packetizer: moves random transfers through the Packetizer against
// a DRAM model with random grants and five cycles of read latency.
// Read direction: sets an (often unaligned) DRAM address, starts a transfer
// and drains the byte stream with a randomly throttled consumer; the bytes
// must equal DRAM from that address on. Write direction: offers bytes only
// while wr_ready holds (as the Data Reader does) and checks afterwards that
// exactly the addressed bytes changed in DRAM, neighbours untouched. Also
// checks that the address register advances past each transfer and that
// busy falls only when all data has been moved.
module tb_babol_packetizer;
  timeunit 1ns;
  timeprecision 100ps;
  import babol_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #2.5 clk = ~clk;
  logic set_addr = 1'b0, rd_start = 1'b0, wr_start = 1'b0, busy;
  logic [31:0] addr_in = '0, nbytes = '0;
  logic rd_valid, rd_ready = 1'b0, wr_valid = 1'b0, wr_ready;
  logic [7:0] rd_data, wr_data = '0;
  logic mem_req, mem_we, mem_gnt, mem_rvalid;
  logic [31:0] mem_addr, mem_wdata, mem_rdata;
  logic [3:0] mem_be;
  logic hold = 1'b0;
  int checks = 0, failures = 0;

  babol_packetizer #(.MEM_AW(32)) dut (
    .clk, .rst_n, .set_addr, .addr_in, .rd_start, .wr_start, .nbytes, .busy,
    .rd_valid, .rd_data, .rd_ready, .wr_valid, .wr_data, .wr_ready,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_be, .mem_gnt, .mem_rvalid, .mem_rdata
  );
  dram_model #(.AW(32), .LATENCY(5), .GNT_PCT(50), .SEED(3)) u_dram (
    .clk, .hold, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .be(mem_be), .gnt(mem_gnt), .rvalid(mem_rvalid), .rdata(mem_rdata)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic pulse_start(bit rd, int unsigned n);
    @(negedge clk);
    nbytes = n;
    if (rd) rd_start = 1'b1; else wr_start = 1'b1;
    @(negedge clk);
    rd_start = 1'b0; wr_start = 1'b0;
  endtask

  task automatic set_address(logic [31:0] a);
    @(negedge clk);
    addr_in = a; set_addr = 1'b1;
    @(negedge clk);
    set_addr = 1'b0;
  endtask

  task automatic do_read(logic [31:0] a, int n, int rdy_pct, bit set);
    int got = 0, bad = 0, cyc = 0;
    if (set) set_address(a);
    pulse_start(1, n);
    while (got < n && cyc < 100000) begin
      rd_ready = ($urandom_range(0, 99) < rdy_pct);
      #0.1;
      if (rd_valid && rd_ready) begin
        if (rd_data != u_dram.peek_byte(longint'(a) + got)) bad++;
        got++;
      end
      @(negedge clk);
      cyc++;
    end
    rd_ready = 1'b0;
    check(got == n && bad == 0, $sformatf("read %0d bytes at %h: %0d delivered, %0d wrong", n, a, got, bad));
    while (busy && cyc < 100000) begin @(negedge clk); cyc++; end
    check(!busy && !rd_valid, "read direction idle after the transfer");
  endtask

  task automatic do_write(logic [31:0] a, int n, int val_pct, bit set);
    logic [7:0] data[$];
    logic [7:0] before_lo, before_hi;
    int sent = 0, cyc = 0, bad = 0;
    for (int i = 0; i < n; i++) data.push_back(8'($urandom()));
    before_lo = u_dram.peek_byte(longint'(a) - 1);
    before_hi = u_dram.peek_byte(longint'(a) + n);
    if (set) set_address(a);
    pulse_start(0, n);
    while (sent < n && cyc < 100000) begin
      wr_valid = wr_ready && ($urandom_range(0, 99) < val_pct);
      wr_data  = data[sent];
      @(negedge clk);
      if (wr_valid) sent++;
      cyc++;
    end
    wr_valid = 1'b0;
    while (busy && cyc < 100000) begin @(negedge clk); cyc++; end
    for (int i = 0; i < n; i++) if (u_dram.peek_byte(longint'(a) + i) != data[i]) bad++;
    check(bad == 0, $sformatf("write %0d bytes at %h: %0d wrong in DRAM", n, a, bad));
    check(u_dram.peek_byte(longint'(a) - 1) == before_lo && u_dram.peek_byte(longint'(a) + n) == before_hi,
          $sformatf("bytes next to %h+%0d unchanged: %h/%h -> %h/%h", a, n, before_lo, before_hi, u_dram.peek_byte(longint'(a) - 1), u_dram.peek_byte(longint'(a) + n)));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!busy && !mem_req, "idle after reset");
    do_read(32'h1000, 16, 100, 1);
    do_read(32'h2003, 37, 60, 1);
    do_read(32'h2003 + 37, 20, 80, 0);    // address register advanced
    do_write(32'h3000, 16, 100, 1);
    do_write(32'h4001, 29, 70, 1);
    do_write(32'h4001 + 29, 10, 100, 0);
    do_write(32'h5002, 1, 100, 1);
    fork
      do_read(32'h6000, 200, 100, 1);
      begin repeat (30) @(negedge clk); hold = 1'b1; repeat (100) @(negedge clk); hold = 1'b0; end
    join
    for (int k = 0; k < 30; k++) begin
      automatic logic [31:0] a = 32'h10000 + 32'($urandom_range(0, 4000));
      automatic int n = $urandom_range(1, 300);
      if ($urandom_range(0, 1)) do_read(a, n, $urandom_range(10, 100), 1);
      else do_write(a, n, $urandom_range(10, 100), 1);
    end
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
