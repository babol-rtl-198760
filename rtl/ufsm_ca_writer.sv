// ufsm_ca_writer: the Command/Address Writer uFSM.
//
// Emits a segment of 1..MAX_LATCHES command and address latches, the
// preamble of every ONFI operation (for example 00h, C1, C2, R1, R2, R3, 30h
// for a page READ). Its three operands are the published design's: the number of
// latches, a vector with the type of each latch (command or address) and a
// vector with each latch's value. Latch i uses types[i] and values[8i+7:8i].
//
// Each latch is an SDR write cycle, used in every data interface mode:
//   set-up   t_cals cycles: CLE (command) or ALE (address) high, value on DQ;
//   strobe   t_wp cycles:   WE# low;
//   hold     t_wh cycles:   WE# high, CLE/ALE and DQ still held.
// The value is latched by the LUN on the rising edge of WE#. After the last
// latch the uFSM keeps the pins idle for the wait that ONFI ties to the
// command just latched, so the segment includes it (figure 7 of the BABOL publication puts
// t_WB on the C/A Writer's side): t_whr after 70h/78h (READ STATUS), t_ccs
// after E0h/85h (column change), t_wb after any other final command, and no
// wait after a final address latch (the Data Writer holds t_adl itself).
// `done` pulses one cycle after that wait. The exact phase lengths and the
// command table are this design's choices.
module ufsm_ca_writer
  import babol_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [3:0]             len,
  input  logic [MAX_LATCHES-1:0] types,
  input  logic [ARG_W-1:0]       values,
  input  onfi_timing_t           timing,
  output logic                   done,
  output logic                   active,
  output onfi_drv_t              pins
);
  typedef enum logic [2:0] {S_IDLE, S_SETUP, S_STROBE, S_HOLD, S_POST, S_DONE} state_e;
  state_e                 state;
  logic [7:0]             cnt;
  logic [3:0]             idx, len_q;
  logic [MAX_LATCHES-1:0] types_q;
  logic [ARG_W-1:0]       values_q;
  logic [DQ_W-1:0]        cur_val;
  logic                   cur_addr;
  logic [7:0]             post_wait;

  assign cur_val  = values_q[idx*DQ_W +: DQ_W];
  assign cur_addr = types_q[idx[2:0]];
  assign done     = (state == S_DONE);
  assign active   = (state != S_IDLE);

  // Wait held after the final latch.
  always_comb begin
    if (cur_addr == LATCH_ADDR)
      post_wait = 8'd0;
    else if (cur_val == CMD_READ_STATUS || cur_val == CMD_READ_STATUS_ENH)
      post_wait = timing.t_whr;
    else if (cur_val == CMD_CHANGE_COL_END || cur_val == CMD_CHANGE_WCOL)
      post_wait = timing.t_ccs;
    else
      post_wait = timing.t_wb;
  end

  always_comb begin
    pins = ONFI_IDLE;
    if (state == S_SETUP || state == S_STROBE || state == S_HOLD) begin
      pins.cle   = (cur_addr == LATCH_CMD);
      pins.ale   = (cur_addr == LATCH_ADDR);
      pins.dq    = cur_val;
      pins.dq_oe = 1'b1;
      pins.we_n  = (state != S_STROBE);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      cnt      <= '0;
      idx      <= '0;
      len_q    <= '0;
      types_q  <= '0;
      values_q <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          len_q    <= (len == 4'd0) ? 4'd1 : (len > 4'(MAX_LATCHES) ? 4'(MAX_LATCHES) : len);
          types_q  <= types;
          values_q <= values;
          idx      <= '0;
          cnt      <= timing.t_cals;
          state    <= S_SETUP;
        end
        S_SETUP: if (cnt > 8'd1) cnt <= cnt - 8'd1;
                 else begin cnt <= timing.t_wp; state <= S_STROBE; end
        S_STROBE: if (cnt > 8'd1) cnt <= cnt - 8'd1;
                  else begin cnt <= timing.t_wh; state <= S_HOLD; end
        S_HOLD: if (cnt > 8'd1) cnt <= cnt - 8'd1;
                else if (idx + 4'd1 < len_q) begin
                  idx   <= idx + 4'd1;
                  cnt   <= timing.t_cals;
                  state <= S_SETUP;
                end else if (post_wait > 8'd1) begin
                  cnt   <= post_wait - 8'd1;
                  state <= S_POST;
                end else begin
                  state <= S_DONE;
                end
        S_POST: if (cnt > 8'd1) cnt <= cnt - 8'd1;
                else state <= S_DONE;
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
