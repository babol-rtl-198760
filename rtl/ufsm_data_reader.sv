// ufsm_data_reader: the Data Reader uFSM.
//
// Emits a data-output segment that moves `nbytes` bytes out of the selected
// LUN's page register; each byte read is handed to the Packetizer, which
// writes it to DRAM. Its only operand is the byte count, as in the BABOL publication.
//
// The segment opens with t_rr idle cycles (ready to first RE#, on the Data
// Reader's side in figure 6(c) and figure 7 of the BABOL publication). Then, per mode:
//   SDR:     per byte RE# is driven low for t_rp cycles and DQ is sampled on
//            the last of them, then RE# is high for t_reh cycles.
//   NV-DDR2: RE# is driven low for t_pre cycles (preamble), then toggled every
//            t_ddr cycles, one edge per byte; the LUN answers each edge with
//            a DQS edge and the uFSM captures DQ on every DQS edge it sees.
//            After the last byte RE# returns high for t_pst cycles.
// Flow control: out_valid/out_data present one captured byte for one cycle
// and cannot be refused; out_ready means the Packetizer has room for the
// bytes still in flight, and the uFSM issues a new RE# edge only while it is
// high. `done` pulses one cycle after the segment. In NV-DDR2 mode the byte
// count must be even (ONFI transfers whole DQS cycles). DQS edge detection
// against a registered copy assumes DQS is synchronous to the controller
// clock (the PHY's job on a real board); that is this design's choice.
module ufsm_data_reader
  import babol_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [31:0]     nbytes,
  input  data_mode_e      mode,
  input  onfi_timing_t    timing,
  input  logic [DQ_W-1:0] dq_i,
  input  logic            dqs_i,
  output logic            out_valid,
  output logic [DQ_W-1:0] out_data,
  input  logic            out_ready,
  output logic            done,
  output logic            active,
  output onfi_drv_t       pins
);
  typedef enum logic [2:0] {S_IDLE, S_RR, S_REQ, S_LO, S_HI, S_PRE, S_DDR, S_PST} state_e;
  state_e      state;
  logic [7:0]  cnt;
  logic [31:0] sent, got, total;
  logic        re_q;
  logic        dqs_prev;
  logic        done_q;
  logic [7:0]  per_byte;
  logic        dqs_edge;

  assign per_byte = (timing.t_ddr != 8'd0) ? timing.t_ddr : 8'd1;
  assign done     = done_q;
  assign active   = (state != S_IDLE) || done_q;
  assign dqs_edge = (dqs_i != dqs_prev);
  assign out_data = dq_i;

  always_comb begin
    out_valid = 1'b0;
    if (state == S_LO && cnt <= 8'd1) out_valid = 1'b1;
    if (state == S_DDR && dqs_edge && got < total) out_valid = 1'b1;
  end

  always_comb begin
    pins = ONFI_IDLE;
    unique case (state)
      S_LO:        pins.re_n = 1'b0;
      S_PRE:       pins.re_n = 1'b0;
      S_DDR:       pins.re_n = re_q;
      default:     pins.re_n = 1'b1;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      cnt      <= '0;
      sent     <= '0;
      got      <= '0;
      total    <= '0;
      re_q     <= 1'b1;
      dqs_prev <= 1'b0;
      done_q   <= 1'b0;
    end else begin
      dqs_prev <= dqs_i;
      done_q   <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          total <= nbytes;
          sent  <= '0;
          got   <= '0;
          re_q  <= 1'b1;
          cnt   <= timing.t_rr;
          state <= S_RR;
        end
        S_RR: if (cnt > 8'd1) cnt <= cnt - 8'd1;
              else if (total == 0) begin state <= S_IDLE; done_q <= 1'b1; end
              else if (mode == MODE_NVDDR2) begin cnt <= timing.t_pre; state <= S_PRE; end
              else state <= S_REQ;
        // ---- SDR ----
        S_REQ: if (out_ready) begin cnt <= timing.t_rp; state <= S_LO; end
        S_LO: if (cnt > 8'd1) cnt <= cnt - 8'd1;
              else begin
                got   <= got + 32'd1;
                cnt   <= timing.t_reh;
                state <= S_HI;
              end
        S_HI: if (cnt > 8'd1) cnt <= cnt - 8'd1;
              else if (got < total) state <= S_REQ;
              else begin state <= S_IDLE; done_q <= 1'b1; end
        // ---- NV-DDR2 ----
        S_PRE: if (cnt > 8'd1) cnt <= cnt - 8'd1;
               else begin re_q <= 1'b0; cnt <= 8'd1; state <= S_DDR; end
        S_DDR: begin
          if (dqs_edge && got < total) got <= got + 32'd1;
          if (cnt > 8'd1) cnt <= cnt - 8'd1;
          else if (sent < total && out_ready) begin
            re_q <= ~re_q;
            sent <= sent + 32'd1;
            cnt  <= per_byte;
          end
          if (got + 32'(dqs_edge) >= total && sent == total) begin
            re_q  <= 1'b1;
            cnt   <= timing.t_pst;
            state <= S_PST;
          end
        end
        S_PST: if (cnt > 8'd1) cnt <= cnt - 8'd1;
               else begin state <= S_IDLE; done_q <= 1'b1; end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
