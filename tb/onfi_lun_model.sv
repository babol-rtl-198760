// onfi_lun_model: behavioural model of one ONFI NAND flash LUN for simulation.
//
// Samples the controller-side pins on every clock edge (it shares the
// controller clock), so it models the protocol, not the analog timing. It
// understands the commands the BABOL examples use:
//   00h a a a a a 30h   page READ (t_R busy; optional pseudo-SLC prefix DAh)
//   05h a a E0h         CHANGE READ COLUMN
//   70h                 READ STATUS (40h when ready, 00h when busy)
//   80h a a a a a D* 10h PAGE PROGRAM (t_PROG busy)
//   60h a a a D0h       BLOCK ERASE of a 64-page block (t_BERS busy)
//   EFh a D D D D       SET FEATURES (t_FEAT busy after the fourth byte)
//   EEh a               GET FEATURES (t_FEAT busy, then four bytes out)
// Address: two column bytes (C1 low) then three row bytes (R1 low).
// Data in is latched on WE# rising (SDR) or on every DQS edge (NV-DDR2);
// data out is driven after RE# falls (SDR) or, after an RE# preamble, with a
// DQS toggle on every further RE# edge (NV-DDR2). Unprogrammed, unerased
// bytes read as a pattern of LUN, row and column. It counts protocol-timing
// violations measured in cycles (WE# pulse, t_ADL, t_WHR, t_CCS, a command
// while busy) and how many operations of each kind it has seen.
module onfi_lun_model #(
  parameter int LUN_ID     = 0,
  parameter int PAGE_BYTES = 16384,
  parameter int T_R        = 2000,
  parameter int T_R_SLC    = 800,
  parameter int T_PROG     = 3000,
  parameter int T_BERS     = 4000,
  parameter int T_FEAT     = 200,
  parameter int MIN_WP     = 2,
  parameter int MIN_ADL    = 10,
  parameter int MIN_WHR    = 10,
  parameter int MIN_CCS    = 10
) (
  input  logic       clk,
  input  logic       ce_n,
  input  logic       cle,
  input  logic       ale,
  input  logic       we_n,
  input  logic       re_n,
  input  logic [7:0] dq_in,
  input  logic       dqs_in,
  input  logic       dqs_in_oe,
  input  logic       ddr_mode,
  output logic [7:0] dq_out,
  output logic       dq_drive,
  output logic       dqs_out,
  output logic       dqs_drive
);
  typedef enum {O_NONE, O_STATUS, O_DATA, O_FEAT} outmode_e;
  logic [7:0]  feat [256][4];
  int          feat_mode;     // 0 none, 1 SET FEATURES data in, 2 GET FEATURES
  int          feat_idx;
  int          n_setfeat = 0, n_getfeat = 0;

  logic [7:0]  page_reg [PAGE_BYTES];
  logic [7:0]  arr [longint];
  bit          erased [int];
  logic [7:0]  addr_b [8];
  int          n_addr;
  logic [7:0]  last_cmd;
  int          col, row, busy_left;
  bit          pslc, data_in_en, ddr_burst;
  outmode_e    omode;
  logic        we_q = 1'b1, re_q = 1'b1, dqs_q = 1'b0;
  int          cyc = 0, we_fall_cyc = 0, last_addr_cyc = -1000, last_cmd_cyc = -1000;
  logic [7:0]  last_cmd_val;
  bit          first_din;
  int          violations = 0;
  int          n_reads = 0, n_slc_reads = 0, n_progs = 0, n_erases = 0;
  int          n_status = 0, n_colchg = 0, n_din = 0, n_dout = 0;

  function automatic logic [7:0] pattern(int r, int c);
    return 8'((r * 7) ^ (c * 3) ^ (c >> 8) ^ (LUN_ID * 16'h55));
  endfunction

  function automatic logic [7:0] array_byte(int r, int c);
    longint k = longint'(r) * PAGE_BYTES + c;
    if (arr.exists(k)) return arr[k];
    if (erased.exists(r / 64)) return 8'hFF;
    return pattern(r, c);
  endfunction

  function automatic logic [7:0] next_out();
    if (omode == O_STATUS) return (busy_left > 0) ? 8'h00 : 8'h40;
    if (omode == O_DATA && col < PAGE_BYTES) return page_reg[col];
    if (omode == O_FEAT && col < 4) return feat[addr_b[0]][col];
    return 8'h00;
  endfunction

  task automatic do_command(logic [7:0] c);
    if (busy_left > 0 && c != 8'h70) violations++;
    ddr_burst = 0;
    feat_mode = 0;
    case (c)
      8'hEF: begin n_addr = 0; data_in_en = 0; feat_mode = 1; feat_idx = 0; first_din = 1; end
      8'hEE: begin n_addr = 0; data_in_en = 0; feat_mode = 2; end
      8'h00: begin n_addr = 0; data_in_en = 0; omode = O_DATA; end
      8'hDA: pslc = 1;
      8'h30: begin
        col = {addr_b[1], addr_b[0]};
        row = {addr_b[4], addr_b[3], addr_b[2]};
        for (int i = 0; i < PAGE_BYTES; i++) page_reg[i] = array_byte(row, i);
        busy_left = pslc ? T_R_SLC : T_R;
        if (pslc) n_slc_reads++;
        n_reads++;
        pslc  = 0;
        omode = O_DATA;
      end
      8'h05: begin n_addr = 0; end
      8'hE0: begin col = {addr_b[1], addr_b[0]}; omode = O_DATA; n_colchg++; end
      8'h70: begin omode = O_STATUS; n_status++; end
      8'h80: begin
        n_addr = 0; data_in_en = 1; first_din = 1;
        for (int i = 0; i < PAGE_BYTES; i++) page_reg[i] = 8'hFF;
      end
      8'h85: begin n_addr = 0; data_in_en = 1; first_din = 1; end
      8'h10: begin
        for (int i = 0; i < PAGE_BYTES; i++)
          if (page_reg[i] != 8'hFF) arr[longint'(row) * PAGE_BYTES + i] = page_reg[i];
        busy_left = T_PROG; data_in_en = 0; n_progs++;
      end
      8'h60: begin n_addr = 0; end
      8'hD0: begin
        row = {addr_b[2], addr_b[1], addr_b[0]};
        erased[row / 64] = 1;
        for (int r = (row / 64) * 64; r < (row / 64) * 64 + 64; r++)
          for (int i = 0; i < PAGE_BYTES; i++)
            if (arr.exists(longint'(r) * PAGE_BYTES + i)) arr.delete(longint'(r) * PAGE_BYTES + i);
        busy_left = T_BERS; n_erases++;
      end
      default: ;
    endcase
    last_cmd = c;
  endtask

  task automatic data_in(logic [7:0] d);
    if (first_din && (cyc - last_addr_cyc) < MIN_ADL) violations++;
    first_din = 0;
    if (feat_mode == 1) begin
      if (feat_idx < 4) feat[addr_b[0]][feat_idx] = d;
      feat_idx++;
      if (feat_idx == 4) begin busy_left = T_FEAT; feat_mode = 0; n_setfeat++; end
      return;
    end
    if (data_in_en && col < PAGE_BYTES) page_reg[col] = d;
    col++;
    n_din++;
  endtask

  initial begin
    dq_out = 8'h00; dq_drive = 1'b0; dqs_out = 1'b0; dqs_drive = 1'b0;
    n_addr = 0; col = 0; row = 0; busy_left = 0; pslc = 0; data_in_en = 0;
    ddr_burst = 0; omode = O_NONE; last_cmd = 8'h00; last_cmd_val = 8'h00;
    first_din = 0; feat_mode = 0; feat_idx = 0;
    foreach (feat[i, j]) feat[i][j] = 8'h00;
  end

  always @(posedge clk) begin
    cyc++;
    if (busy_left > 0) busy_left--;
    if (ce_n) begin
      dq_drive  <= 1'b0;
      dqs_drive <= 1'b0;
      ddr_burst = 0;
    end else begin
      // WE# edges: command, address and SDR data-in latches.
      if (we_q && !we_n) we_fall_cyc = cyc;
      if (!we_q && we_n) begin
        if (cyc - we_fall_cyc < MIN_WP) violations++;
        if (cle) begin
          do_command(dq_in);
          last_cmd_cyc = cyc; last_cmd_val = dq_in;
        end else if (ale) begin
          if (n_addr < 8) addr_b[n_addr] = dq_in;
          n_addr++;
          last_addr_cyc = cyc;
          if (data_in_en && n_addr == 2) col = {dq_in, addr_b[0]};
          if (data_in_en && n_addr == 5) row = {addr_b[4], addr_b[3], addr_b[2]};
          if (feat_mode == 2 && n_addr == 1) begin
            busy_left = T_FEAT; omode = O_FEAT; col = 0; n_getfeat++;
          end
        end else if (!ddr_mode) begin
          data_in(dq_in);
        end
      end
      // NV-DDR2 data in on DQS edges driven by the controller.
      if (ddr_mode && dqs_in_oe && (dqs_in != dqs_q) && !cle && !ale) data_in(dq_in);
      // RE# edges: data out.
      if (re_q != re_n) begin
        if (!re_n && re_q && last_cmd_val == 8'h70 && (cyc - last_cmd_cyc) < MIN_WHR) violations++;
        if (!re_n && re_q && last_cmd_val == 8'hE0 && (cyc - last_cmd_cyc) < MIN_CCS) violations++;
        if (!re_n && (omode == O_DATA || omode == O_FEAT) && busy_left > 0) violations++;
        if (!ddr_mode) begin
          if (!re_n) begin
            dq_out   <= next_out();
            dq_drive <= 1'b1;
            n_dout++;
          end else begin
            if (omode == O_DATA || omode == O_FEAT) col++;
            dq_drive <= 1'b0;
          end
        end else if (!ddr_burst) begin
          ddr_burst = 1;              // preamble: DQS driven low
          dqs_drive <= 1'b1;
          dqs_out   <= 1'b0;
        end else begin
          dq_out   <= next_out();
          dq_drive <= 1'b1;
          dqs_out  <= ~dqs_out;
          if (omode == O_DATA || omode == O_FEAT) col++;
          n_dout++;
        end
      end
      if (re_n && !ddr_burst) begin
        dqs_drive <= 1'b0;
      end
    end
    we_q  = we_n;
    re_q  = re_n;
    dqs_q = dqs_in;
  end
endmodule
