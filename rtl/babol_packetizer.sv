// babol_packetizer: the Packetizer, BABOL's DMA unit between DRAM and the
// data uFSMs.
//
// The published design's Packetizer reads data from the SSD's DRAM and delivers it in
// packets as wide as the package's DQ bus (for the Data Writer), and takes
// the bytes the Data Reader produces and writes them into DRAM. It is
// programmed in tandem with the data uFSMs: software gives it the DRAM
// address (set_addr), the data uFSM gets the byte count. Here the dispatcher
// starts the matching Packetizer direction with the same byte count when it
// starts a data uFSM. After each transfer the address register has advanced
// by the number of bytes moved.
//
// DRAM side: one 32-bit word port (MEM_DW), word addressed, with byte
// enables; a request is taken when mem_req && mem_gnt; read data returns in
// request order on mem_rvalid, any number of cycles later.
//   Read direction: fetches ceil((addr%4 + n)/4) words, keeping at most
//     RD_WORDS words requested or buffered, and splits them into bytes on
//     rd_valid/rd_data/rd_ready, starting at byte lane addr%4.
//   Write direction: packs the bytes of wr_valid/wr_data into words with byte
//     enables, one word per 4-byte-aligned group, and queues them (WR_WORDS
//     entries) for DRAM. wr_ready is the credit the Data Reader needs: the
//     queue can take every byte still in flight. A byte offered while the
//     queue is full is an error (assertion).
// `busy` stays high until every fetched word is consumed and every queued
// write has been granted, so a transaction is reported complete only after
// its data has reached DRAM. Word width, buffer depths and the handshakes
// are this design's choices.
//
// rst_n resets the flops asynchronously and also switches the assertions off
// during reset ("disable iff"); lint reports that second use as a
// synchronous one. No flop uses rst_n synchronously.
module babol_packetizer
  import babol_pkg::*;
#(
  parameter int unsigned MEM_AW   = 32,
  parameter int unsigned RD_WORDS = 8,
  parameter int unsigned WR_WORDS = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // control from the dispatcher
  input  logic              set_addr,
  input  logic [31:0]       addr_in,
  input  logic              rd_start,
  input  logic              wr_start,
  input  logic [31:0]       nbytes,
  output logic              busy,
  // byte stream towards the Data Writer
  output logic              rd_valid,
  output logic [DQ_W-1:0]   rd_data,
  input  logic              rd_ready,
  // byte stream from the Data Reader
  input  logic              wr_valid,
  input  logic [DQ_W-1:0]   wr_data,
  output logic              wr_ready,
  // DRAM word port
  output logic              mem_req,
  output logic              mem_we,
  output logic [MEM_AW-1:0] mem_addr,
  output logic [31:0]       mem_wdata,
  output logic [3:0]        mem_be,
  input  logic              mem_gnt,
  input  logic              mem_rvalid,
  input  logic [31:0]       mem_rdata
);
  localparam int unsigned RPW = $clog2(RD_WORDS);
  localparam int unsigned WPW = $clog2(WR_WORDS);

  logic [31:0] addr_q;

  // ---------------- read direction ----------------
  logic [31:0]    rd_left;        // bytes still to deliver
  logic [31:0]    rd_words_left;  // words still to request
  logic [MEM_AW-1:0] rd_waddr;
  logic [1:0]     rd_lane;
  logic [31:0]    rbuf [RD_WORDS];
  logic [RPW-1:0] rb_wp, rb_rp;
  logic [RPW:0]   rb_cnt;         // words buffered
  logic [RPW:0]   rd_pend;        // words requested, not yet returned
  logic           rd_issue, rd_pop, rb_push;

  // ---------------- write direction ----------------
  typedef struct packed {
    logic [MEM_AW-1:0] waddr;
    logic [31:0]       data;
    logic [3:0]        be;
  } wentry_t;
  wentry_t        wbuf [WR_WORDS];
  logic [WPW-1:0] wb_wp, wb_rp;
  logic [WPW:0]   wb_cnt;
  logic [31:0]    wr_left;
  logic [31:0]    wacc_data;
  logic [3:0]     wacc_be;
  logic [MEM_AW-1:0] wacc_addr;
  logic [1:0]     wr_lane;
  logic           wb_push, wb_pop, wr_issue, wr_take;

  // Read requests go out only while no write is queued (writes first).
  assign wr_issue = (wb_cnt != 0);
  assign rd_issue = !wr_issue && (rd_words_left != 0) &&
                    ((rb_cnt + rd_pend) < (RPW+1)'(RD_WORDS));

  assign mem_req   = wr_issue || rd_issue;
  assign mem_we    = wr_issue;
  assign mem_addr  = wr_issue ? wbuf[wb_rp].waddr : rd_waddr;
  assign mem_wdata = wbuf[wb_rp].data;
  assign mem_be    = wr_issue ? wbuf[wb_rp].be : 4'hF;
  assign wb_pop    = wr_issue && mem_gnt;

  assign rb_push  = mem_rvalid;
  assign rd_valid = (rb_cnt != 0) && (rd_left != 0);
  assign rd_data  = rbuf[rb_rp][rd_lane*8 +: 8];
  assign rd_pop   = rd_valid && rd_ready && (rd_lane == 2'd3 || rd_left == 32'd1);

  // Write packing: a word is queued when its last lane fills or the transfer ends.
  assign wr_take  = wr_valid && (wr_left != 0);
  assign wb_push  = wr_take && (wr_lane == 2'd3 || wr_left == 32'd1);
  assign wr_ready = (wb_cnt + (WPW+1)'(2)) < (WPW+1)'(WR_WORDS);

  assign busy = (rd_left != 0) || (rd_pend != 0) || (rb_cnt != 0) ||
                (wr_left != 0) || (wb_cnt != 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr_q        <= '0;
      rd_left       <= '0;
      rd_words_left <= '0;
      rd_waddr      <= '0;
      rd_lane       <= '0;
      rb_wp         <= '0;
      rb_rp         <= '0;
      rb_cnt        <= '0;
      rd_pend       <= '0;
      wb_wp         <= '0;
      wb_rp         <= '0;
      wb_cnt        <= '0;
      wr_left       <= '0;
      wacc_data     <= '0;
      wacc_be       <= '0;
      wacc_addr     <= '0;
      wr_lane       <= '0;
    end else begin
      if (set_addr) addr_q <= addr_in;

      // ---- read direction ----
      if (rd_start) begin
        rd_left       <= nbytes;
        rd_words_left <= (32'(addr_q[1:0]) + nbytes + 32'd3) >> 2;
        rd_waddr      <= MEM_AW'(addr_q >> 2);
        rd_lane       <= addr_q[1:0];
        addr_q        <= addr_q + nbytes;
      end
      if (rd_issue && mem_gnt) begin
        rd_words_left <= rd_words_left - 32'd1;
        rd_waddr      <= rd_waddr + MEM_AW'(1);
      end
      if (rb_push) begin
        rbuf[rb_wp] <= mem_rdata;
        rb_wp       <= rb_wp + RPW'(1);
      end
      if (rd_valid && rd_ready) begin
        rd_left <= rd_left - 32'd1;
        rd_lane <= rd_lane + 2'd1;
      end
      if (rd_pop) rb_rp <= rb_rp + RPW'(1);
      rb_cnt  <= rb_cnt + (RPW+1)'(rb_push) - (RPW+1)'(rd_pop);
      rd_pend <= rd_pend + (RPW+1)'(rd_issue && mem_gnt) - (RPW+1)'(mem_rvalid);

      // ---- write direction ----
      if (wr_start) begin
        wr_left   <= nbytes;
        wr_lane   <= addr_q[1:0];
        wacc_addr <= MEM_AW'(addr_q >> 2);
        wacc_be   <= '0;
        addr_q    <= addr_q + nbytes;
      end
      if (wr_take) begin
        wr_left <= wr_left - 32'd1;
        wr_lane <= wr_lane + 2'd1;
        if (wb_push) begin
          wbuf[wb_wp].waddr <= wacc_addr;
          wbuf[wb_wp].data  <= wacc_data;
          wbuf[wb_wp].be    <= wacc_be;
          wbuf[wb_wp].data[wr_lane*8 +: 8] <= wr_data;
          wbuf[wb_wp].be[wr_lane]          <= 1'b1;
          wb_wp     <= wb_wp + WPW'(1);
          wacc_be   <= '0;
          wacc_addr <= wacc_addr + MEM_AW'(1);
        end else begin
          wacc_data[wr_lane*8 +: 8] <= wr_data;
          wacc_be[wr_lane]          <= 1'b1;
        end
      end
      if (wb_pop) wb_rp <= wb_rp + WPW'(1);
      wb_cnt <= wb_cnt + (WPW+1)'(wb_push) - (WPW+1)'(wb_pop);
    end
  end

  // A byte from the Data Reader must always find room.
  a_no_wr_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    !(wb_push && !wb_pop && wb_cnt == (WPW+1)'(WR_WORDS)));
  a_no_rd_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    !(rb_push && !rd_pop && rb_cnt == (RPW+1)'(RD_WORDS)));
endmodule
