// ufsm_chip_control: the Chip Control (C/E Control) uFSM.
//
// Holds the chip-enable register of the channel: one bit per LUN, a 1 in the
// bitmap drives that LUN's active-low CE# pin low. Every other uFSM's
// segment therefore reaches exactly the LUNs selected here, and selecting
// several LUNs at once gang-schedules a segment to all of them, as the BABOL publication
// describes. The register keeps its value until the next Chip Control
// instruction.
//
// Timing: on `start` with a new bitmap, if any enabled LUN is to be
// disabled the uFSM first waits t_ch cycles (CE# hold after the last strobe),
// then loads the register; if any LUN becomes newly enabled it then waits
// t_cs cycles (CE# set-up before the next strobe). `done` pulses for one
// cycle at the end; a bitmap equal to the current one completes in two
// cycles. Reset disables every LUN. The t_cs/t_ch handling is this design's
// choice; the BABOL publication states only that the uFSM takes a LUN bitmap.
module ufsm_chip_control #(
  parameter int unsigned N_LUNS = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [N_LUNS-1:0] bitmap,
  input  logic [7:0]        t_cs,
  input  logic [7:0]        t_ch,
  output logic              done,
  output logic [N_LUNS-1:0] ce_n
);
  typedef enum logic [1:0] {S_IDLE, S_HOLD, S_SETUP, S_DONE} state_e;
  state_e            state;
  logic [7:0]        cnt;
  logic [N_LUNS-1:0] en_q, next_q;

  assign ce_n = ~en_q;
  assign done = (state == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      cnt    <= '0;
      en_q   <= '0;
      next_q <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          next_q <= bitmap;
          if ((en_q & ~bitmap) != '0) begin
            state <= S_HOLD;
            cnt   <= t_ch;
          end else begin
            en_q  <= bitmap;
            state <= ((bitmap & ~en_q) != '0) ? S_SETUP : S_DONE;
            cnt   <= t_cs;
          end
        end
        S_HOLD: begin
          if (cnt > 8'd1) cnt <= cnt - 8'd1;
          else begin
            en_q  <= next_q;
            state <= ((next_q & ~en_q) != '0) ? S_SETUP : S_DONE;
            cnt   <= t_cs;
          end
        end
        S_SETUP: begin
          if (cnt > 8'd1) cnt <= cnt - 8'd1;
          else state <= S_DONE;
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
