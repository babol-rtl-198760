// ufsm_data_writer: the Data Writer uFSM.
//
// Emits a data-input segment that moves `nbytes` bytes into the selected
// LUNs' page registers. Its only operand is the byte count, as in the BABOL publication;
// the bytes themselves arrive from the Packetizer on a valid/ready byte
// stream (in_valid/in_data/in_ready), one DQ-bus-wide packet per beat.
//
// The segment opens with t_adl idle cycles (address cycle to data loading,
// shown inside the Data Writer segment in figure 6(b) of the BABOL publication). Then, per
// data interface mode:
//   SDR:     per byte the value is put on DQ and WE# is pulsed low for t_wp
//            cycles and high for t_wh cycles; the LUN latches on WE# rising.
//   NV-DDR2: DQS is driven low for t_pre cycles (preamble), then each byte
//            occupies t_ddr cycles on DQ with DQS toggling in the middle of
//            that window (centre-aligned), then DQS is held t_pst cycles
//            (postamble) and released. With t_ddr = 2 or more the byte
//            window is split into t_ddr/2 cycles before the DQS edge and
//            the rest after it. With t_ddr = 1 (200 MT/s at a 200 MHz
//            clock) a new byte goes on DQ at every rising clock edge and
//            DQS is re-timed by a falling-edge flop, so each DQS edge sits
//            half a cycle after its byte appears, in the middle of the eye.
// If the Packetizer has no byte ready the uFSM stalls between bytes with
// the strobe idle, which ONFI allows. `done` pulses one cycle after the
// segment. The phase split per byte and the falling-edge DQS flop are this
// design's choices.
module ufsm_data_writer
  import babol_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [31:0]     nbytes,
  input  data_mode_e      mode,
  input  onfi_timing_t    timing,
  input  logic            in_valid,
  input  logic [DQ_W-1:0] in_data,
  output logic            in_ready,
  output logic            done,
  output logic            active,
  output onfi_drv_t       pins
);
  typedef enum logic [2:0] {S_IDLE, S_ADL, S_PRE, S_FETCH, S_LO, S_HI, S_PST, S_DONE} state_e;
  state_e          state;
  logic [7:0]      cnt;
  logic [31:0]     left;
  logic [DQ_W-1:0] byte_q;
  logic            ddr_q;
  logic            dqs_q;
  logic            dqs_n;     // dqs_q delayed to the falling clock edge
  logic            fast_q;    // NV-DDR2 with one cycle per byte
  logic [7:0]      half_lo, half_hi;

  // NV-DDR2 byte window of t_ddr cycles: DQ set for half_lo cycles, then the
  // DQS edge, then half_hi cycles of hold.
  assign half_lo  = (timing.t_ddr >= 8'd2) ? (timing.t_ddr >> 1) : 8'd1;
  assign half_hi  = (timing.t_ddr >= 8'd2) ? (timing.t_ddr - half_lo) : 8'd1;
  assign done     = (state == S_DONE);
  assign active   = (state != S_IDLE);
  // A byte is taken in S_FETCH, or straight at the end of the previous byte
  // so that back-to-back bytes need no extra cycle.
  assign in_ready = (state == S_FETCH) ||
                    (state == S_HI && cnt <= 8'd1 && left != 0) ||
                    (state == S_LO && fast_q && left != 0);

  always_comb begin
    pins = ONFI_IDLE;
    if (ddr_q && (state == S_PRE || state == S_FETCH || state == S_LO ||
                  state == S_HI || state == S_PST)) begin
      pins.dqs_oe = 1'b1;
      pins.dqs    = fast_q ? dqs_n : dqs_q;
    end
    if (state == S_LO || state == S_HI) begin
      pins.dq    = byte_q;
      pins.dq_oe = 1'b1;
      if (!ddr_q) pins.we_n = (state == S_HI);
    end
  end

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) dqs_n <= 1'b0;
    else        dqs_n <= dqs_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fast_q <= 1'b0;
      state  <= S_IDLE;
      cnt    <= '0;
      left   <= '0;
      byte_q <= '0;
      ddr_q  <= 1'b0;
      dqs_q  <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          left  <= nbytes;
          ddr_q <= (mode == MODE_NVDDR2);
          fast_q <= (mode == MODE_NVDDR2) && (timing.t_ddr <= 8'd1);
          dqs_q <= 1'b0;
          cnt   <= timing.t_adl;
          state <= S_ADL;
        end
        S_ADL: if (cnt > 8'd1) cnt <= cnt - 8'd1;
               else if (left == 0) state <= S_DONE;
               else if (ddr_q) begin cnt <= timing.t_pre; state <= S_PRE; end
               else state <= S_FETCH;
        S_PRE: if (cnt > 8'd1) cnt <= cnt - 8'd1;
               else state <= S_FETCH;
        S_FETCH: if (in_valid) begin
          byte_q <= in_data;
          left   <= left - 32'd1;
          cnt    <= ddr_q ? half_lo : timing.t_wp;
          if (fast_q) dqs_q <= ~dqs_q;  // edge follows half a cycle later
          state  <= S_LO;
        end
        S_LO: if (fast_q) begin
                if (left != 0 && in_valid) begin
                  byte_q <= in_data;
                  left   <= left - 32'd1;
                  dqs_q  <= ~dqs_q;
                end else if (left != 0) state <= S_FETCH;
                else begin cnt <= timing.t_pst; state <= S_PST; end
              end
              else if (cnt > 8'd1) cnt <= cnt - 8'd1;
              else begin
                if (ddr_q) dqs_q <= ~dqs_q;   // centre-aligned DQS edge
                cnt   <= ddr_q ? half_hi : timing.t_wh;
                state <= S_HI;
              end
        S_HI: if (cnt > 8'd1) cnt <= cnt - 8'd1;
              else if (left != 0) begin
                if (in_valid) begin
                  byte_q <= in_data;
                  left   <= left - 32'd1;
                  cnt    <= ddr_q ? half_lo : timing.t_wp;
                  state  <= S_LO;
                end else state <= S_FETCH;
              end
              else if (ddr_q) begin cnt <= timing.t_pst; state <= S_PST; end
              else state <= S_DONE;
        S_PST: if (cnt > 8'd1) cnt <= cnt - 8'd1;
               else state <= S_DONE;
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
