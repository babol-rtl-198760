// ufsm_timer: the Timer uFSM.
//
// Produces a pause of at least `duration_ns` nanoseconds between two
// segments, during which every pin stays idle. It is how operation software
// waits between uFSMs (t_R after a READ, t_ADL before a SET FEATURES value,
// and so on) when it does not poll instead. The duration register is in
// nanoseconds as in the BABOL publication; the uFSM adds CLK_PERIOD_NS to an elapsed-time
// counter every cycle and finishes on the first cycle on which the elapsed
// time reaches the duration, so the pause is never shorter than asked.
//
// Interface: `start` loads the duration; `done` pulses one cycle at the end.
// Latency: max(1, ceil(duration_ns / CLK_PERIOD_NS)) cycles from `start` to
// `done`. The nanosecond counter and the 5 ns default clock period are this
// design's choices.
module ufsm_timer #(
  parameter int unsigned CLK_PERIOD_NS = 5
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] duration_ns,
  output logic        done
);
  logic        busy;
  logic [32:0] elapsed;
  logic [31:0] dur_q;
  logic [32:0] elapsed_nxt;

  assign elapsed_nxt = elapsed + 33'(CLK_PERIOD_NS);
  assign done = busy && (elapsed_nxt >= {1'b0, dur_q});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      elapsed <= '0;
      dur_q   <= '0;
    end else if (!busy) begin
      if (start) begin
        busy    <= 1'b1;
        elapsed <= '0;
        dur_q   <= duration_ns;
      end
    end else if (done) begin
      busy <= 1'b0;
    end else begin
      elapsed <= elapsed_nxt;
    end
  end
endmodule
