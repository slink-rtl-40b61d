// slink_top: the SLink controller, one end of an SLink point-to-point link.
//
// SLink joins two chips with up to four 8b10b lanes in each direction and
// lets one chip write a block of its memory into the other's memory, or
// read a block from it, with a header-only request instead of a full
// routed protocol stack. This module holds the three layers of one end:
//   transaction layer  function registers (slink_regs) and DMA controller
//                      (slink_dma, AXI3 master) that read and write memory
//   data link layer    packet building, CRC-16, retransmission and K-code
//                      framing (slink_tx_link), Tx data buffer, lane
//                      dispatch (slink_dispatch), K-code synchronization
//                      (slink_sync), packet assembly (slink_assemble), CRC
//                      check and header analysis (slink_rx_link), Rx data
//                      buffer
//   physical layer     8b10b encode/decode (slink_phy); the SerDes is
//                      external and connects to tx_sym/rx_sym, 20 bits
//                      (two 10-bit symbols, first symbol in bits 9:0) per
//                      lane per clock, plus phy_rate for its lane rate.
// A CRC RIGHT response is held back until the DMA controller has written
// the checked packet to memory, so that a write with CRC ends for the
// sender only when its data are in place. One clock drives everything; SOFT_RESETN in the CTRL register holds all
// but the registers in reset. Buffers default to 512 KB (BUF_DEPTH 64-bit
// words), the largest packet. The layer split, the blocks, the 64-bit
// datapath over four lanes, the header and K-codes follow the protocol;
// the single clock domain and the details given in each block are this
// design's choices.
module slink_top
  import slink_pkg::*;
#(
  parameter int unsigned BUF_DEPTH    = 65536,
  parameter int unsigned TRAIN_CYCLES = 16,
  parameter int unsigned SYNC_CNT     = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // configuration port
  input  logic        reg_we,
  input  logic [4:0]  reg_addr,
  input  logic [31:0] reg_wdata,
  output logic [31:0] reg_rdata,
  // AXI3 master to local memory
  output logic [31:0] m_araddr,
  output logic [3:0]  m_arlen,
  output logic [2:0]  m_arsize,
  output logic [1:0]  m_arburst,
  output logic        m_arvalid,
  input  logic        m_arready,
  input  logic [63:0] m_rdata,
  input  logic [1:0]  m_rresp,
  input  logic        m_rlast,
  input  logic        m_rvalid,
  output logic        m_rready,
  output logic [31:0] m_awaddr,
  output logic [3:0]  m_awlen,
  output logic [2:0]  m_awsize,
  output logic [1:0]  m_awburst,
  output logic        m_awvalid,
  input  logic        m_awready,
  output logic [63:0] m_wdata,
  output logic [7:0]  m_wstrb,
  output logic        m_wlast,
  output logic        m_wvalid,
  input  logic        m_wready,
  input  logic [1:0]  m_bresp,
  input  logic        m_bvalid,
  output logic        m_bready,
  // SerDes side
  output logic [NUM_LANES-1:0][19:0] tx_sym,
  input  logic [NUM_LANES-1:0][19:0] rx_sym,
  output logic                       phy_rate,
  output logic                       link_up
);

  localparam int unsigned BW = $clog2(BUF_DEPTH);

  logic        soft_resetn, core_rst_n;
  logic        start, op_done, retry, crc_err, bad_pkt;
  logic [31:0] hdr_lo, raddr, laddr;

  // transaction <-> data link
  logic        tx_start, tx_data_valid, tx_done, tx_busy;
  slink_hdr_t  tx_hdr;
  logic [63:0] tx_data;
  logic        rx_hdr_valid;
  slink_hdr_t  rx_hdr;
  logic        rxb_valid, rxb_ready;
  logic [63:0] rxb_data;

  // Tx data buffer
  logic        txb_clear, txb_wr_en, txb_rewind, txb_rd_valid, txb_rd_ready;
  logic [63:0] txb_wr_data, txb_rd_data;
  logic [BW:0] txb_committed;

  // Rx data buffer
  logic        rxb_wr_en, rxb_auto, rxb_commit, rxb_discard;
  logic [63:0] rxb_wr_data;
  logic [BW:0] rxb_committed;

  // link words and lanes
  link_word_t  lw;
  logic        lw_valid, lw_ready;
  logic [NUM_LANES-1:0][15:0] d_data, p_data, s_data;
  logic [NUM_LANES-1:0][1:0]  d_k, p_k, p_err, s_k;
  logic [NUM_LANES-1:0]       lane_synced;
  logic                       code_err;

  // assembled words
  logic        a_valid, a_first, a_end, a_err;
  logic [63:0] a_data;
  logic [2:0]  a_lanes;

  // CRC responses
  logic        rsp_req, rsp_ok, peer_rsp_valid, peer_rsp_ok;
  logic [2:0]  rsp_lanes;
  logic        chk_req, chk_ok, dma_wr_idle, right_hold;
  logic [2:0]  chk_lanes, right_lanes;

  logic gtps_q;

  assign core_rst_n = rst_n && soft_resetn;
  assign phy_rate   = gtps_q;

  slink_regs u_regs (
    .clk, .rst_n,
    .reg_we, .reg_addr, .reg_wdata, .reg_rdata,
    .soft_resetn, .gtps(gtps_q), .start, .hdr_lo, .remote_addr(raddr), .local_addr(laddr),
    .op_done, .link_up, .retry, .crc_err);

  slink_dma u_dma (
    .clk, .rst_n(core_rst_n),
    .start, .cfg_hdr_lo(hdr_lo), .cfg_raddr(raddr), .cfg_laddr(laddr), .op_done,
    .rx_hdr_valid, .rx_hdr, .rxb_valid, .rxb_data, .rxb_ready,
    .tx_start, .tx_hdr, .tx_data_valid, .tx_data, .tx_done, .wr_idle(dma_wr_idle),
    .m_araddr, .m_arlen, .m_arsize, .m_arburst, .m_arvalid, .m_arready,
    .m_rdata, .m_rresp, .m_rlast, .m_rvalid, .m_rready,
    .m_awaddr, .m_awlen, .m_awsize, .m_awburst, .m_awvalid, .m_awready,
    .m_wdata, .m_wstrb, .m_wlast, .m_wvalid, .m_wready,
    .m_bresp, .m_bvalid, .m_bready);

  slink_tx_link #(.TRAIN_CYCLES(TRAIN_CYCLES)) u_tx (
    .clk, .rst_n(core_rst_n), .link_up,
    .start(tx_start), .start_hdr(tx_hdr), .data_valid(tx_data_valid), .data(tx_data),
    .busy(tx_busy), .tx_done, .retry,
    .rsp_req, .rsp_ok, .rsp_lanes, .peer_rsp_valid, .peer_rsp_ok,
    .buf_clear(txb_clear), .buf_wr_en(txb_wr_en), .buf_wr_data(txb_wr_data),
    .buf_rewind(txb_rewind), .buf_rd_valid(txb_rd_valid), .buf_rd_data(txb_rd_data),
    .buf_rd_ready(txb_rd_ready),
    .out_word(lw), .out_valid(lw_valid), .out_ready(lw_ready));

  slink_buffer #(.DEPTH(BUF_DEPTH)) u_txbuf (
    .clk, .rst_n(core_rst_n), .clear(txb_clear), .auto_commit(1'b1),
    .wr_en(txb_wr_en), .wr_data(txb_wr_data), .commit(1'b0), .discard(1'b0),
    .rewind(txb_rewind), .rd_valid(txb_rd_valid), .rd_data(txb_rd_data),
    .rd_ready(txb_rd_ready), .committed(txb_committed));

  slink_dispatch u_dispatch (
    .clk, .rst_n(core_rst_n), .in_word(lw), .in_valid(lw_valid), .in_ready(lw_ready),
    .lane_data(d_data), .lane_k(d_k));

  slink_phy u_phy (
    .clk, .rst_n(core_rst_n), .tx_data(d_data), .tx_k(d_k), .tx_sym,
    .rx_sym, .rx_data(p_data), .rx_k(p_k), .rx_err(p_err));

  slink_sync #(.SYNC_CNT(SYNC_CNT)) u_sync (
    .clk, .rst_n(core_rst_n), .in_data(p_data), .in_k(p_k), .in_err(p_err),
    .out_data(s_data), .out_k(s_k), .lane_synced, .link_up, .code_err);

  slink_assemble u_asm (
    .clk, .rst_n(core_rst_n), .link_up, .lane_data(s_data), .lane_k(s_k),
    .out_valid(a_valid), .out_first(a_first), .out_data(a_data), .out_lanes(a_lanes),
    .pkt_end(a_end), .frame_err(a_err));

  slink_rx_link u_rx (
    .clk, .rst_n(core_rst_n),
    .in_valid(a_valid), .in_first(a_first), .in_data(a_data), .in_lanes(a_lanes),
    .pkt_end(a_end), .frame_err(a_err),
    .buf_wr_en(rxb_wr_en), .buf_wr_data(rxb_wr_data), .buf_auto_commit(rxb_auto),
    .buf_commit(rxb_commit), .buf_discard(rxb_discard),
    .hdr_valid(rx_hdr_valid), .hdr(rx_hdr),
    .rsp_req(chk_req), .rsp_ok(chk_ok), .rsp_lanes(chk_lanes), .peer_rsp_valid, .peer_rsp_ok,
    .crc_err, .bad_pkt);

  // RIGHT goes back only once the checked packet is in memory, so that the
  // sender's operation ends with its data in place; ERROR goes at once.
  always_ff @(posedge clk or negedge core_rst_n) begin
    if (!core_rst_n) begin
      right_hold  <= 1'b0;
      right_lanes <= XMODE_X1;
    end else if (chk_req && chk_ok) begin
      right_hold  <= 1'b1;
      right_lanes <= chk_lanes;
    end else if (dma_wr_idle) begin
      right_hold  <= 1'b0;
    end
  end

  assign rsp_req   = (chk_req && !chk_ok) || (right_hold && dma_wr_idle);
  assign rsp_ok    = !(chk_req && !chk_ok);
  assign rsp_lanes = (chk_req && !chk_ok) ? chk_lanes : right_lanes;

  slink_buffer #(.DEPTH(BUF_DEPTH)) u_rxbuf (
    .clk, .rst_n(core_rst_n), .clear(1'b0), .auto_commit(rxb_auto),
    .wr_en(rxb_wr_en), .wr_data(rxb_wr_data), .commit(rxb_commit), .discard(rxb_discard),
    .rewind(1'b0), .rd_valid(rxb_valid), .rd_data(rxb_data),
    .rd_ready(rxb_ready), .committed(rxb_committed));

endmodule
