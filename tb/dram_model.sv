// dram_model: behavioural model of the SSD DRAM seen through a 32-bit word
// port with byte enables. A request is granted on a cycle when a
// pseudo-random draw passes GNT_PCT percent; read data returns in order
// exactly LATENCY cycles after the grant. While `hold` is high nothing is
// granted. Words never written read as
// init_word(addr). Testbenches poke and peek words directly.
module dram_model #(
  parameter int AW      = 32,
  parameter int LATENCY = 4,
  parameter int GNT_PCT = 70,
  parameter int SEED    = 1
) (
  input  logic          clk,
  input  logic          hold,      // 1: grant nothing (models a busy DRAM)
  input  logic          req,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [31:0]   wdata,
  input  logic [3:0]    be,
  output logic          gnt,
  output logic          rvalid,
  output logic [31:0]   rdata
);
  logic [31:0] mem [longint];
  logic [31:0] pipe_d [LATENCY];
  logic        pipe_v [LATENCY];
  int          n_reads = 0, n_writes = 0;
  int unsigned rng;

  function automatic logic [31:0] init_word(longint a);
    return 32'(a * 32'h9E3779B1) ^ 32'h5A5A0000;
  endfunction

  function automatic logic [31:0] peek(longint a);
    return mem.exists(a) ? mem[a] : init_word(a);
  endfunction

  function automatic logic [7:0] peek_byte(longint byte_addr);
    logic [31:0] w;
    w = peek(byte_addr >> 2);
    return w[8*(byte_addr % 4) +: 8];
  endfunction

  task automatic poke(longint a, logic [31:0] d);
    mem[a] = d;
  endtask

  initial begin
    rng = SEED;
    gnt = 1'b0;
    for (int i = 0; i < LATENCY; i++) begin pipe_v[i] = 0; pipe_d[i] = '0; end
  end

  always @(negedge clk) begin
    rng = rng * 1103515245 + 12345;
    gnt = !hold && (((rng >> 16) % 100) < GNT_PCT);
  end

  assign rvalid = pipe_v[LATENCY-1];
  assign rdata  = pipe_d[LATENCY-1];

  always @(posedge clk) begin
    for (int i = LATENCY - 1; i > 0; i--) begin
      pipe_v[i] <= pipe_v[i-1];
      pipe_d[i] <= pipe_d[i-1];
    end
    pipe_v[0] <= 1'b0;
    if (req && gnt) begin
      if (we) begin
        logic [31:0] w;
        w = peek(longint'(addr));
        for (int b = 0; b < 4; b++) if (be[b]) w[8*b +: 8] = wdata[8*b +: 8];
        mem[longint'(addr)] = w;
        n_writes++;
      end else begin
        pipe_v[0] <= 1'b1;
        pipe_d[0] <= peek(longint'(addr));
        n_reads++;
      end
    end
  end
endmodule
