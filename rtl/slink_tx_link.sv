// slink_tx_link: transmit packet layer (+control_word, crc / Bypass, Retry
// and +Kcode).
//
// `start` hands over the header control word of a new packet and empties
// the Tx data buffer. The data words of the packet then arrive on
// `data_valid`/`data` (from the DMA controller); they are written to the Tx
// data buffer while a CRC-16 over header and data is accumulated. The
// framer sends, through the lane dispatcher, STP, the header, the data
// words as the buffer delivers them (PAD while it runs dry, so a packet can
// leave before all its data has been read from memory), the CRC word when
// CRC is enabled (CRC in bits [15:0]), then END; IDL fills the gaps between
// packets. After reset, and whenever the receive side has lost
// synchronization, it sends COM until the receive side is synchronized and
// TRAIN_CYCLES clocks more. A packet sent with CRC waits for the far end's
// CRC response: RIGHT completes it (`tx_done`), ERROR rewinds the Tx data
// buffer and sends the packet again (`retry`); a response that arrives
// before END has gone out is held until then. CRC responses requested by
// the receive side (`rsp_req`) go out between packets, before a pending
// packet. A packet without CRC completes when its END is sent. The packet
// format, the K-codes and hardware retransmission follow the protocol; PAD
// as in-packet filler and the training rule are this design's choices.
module slink_tx_link
  import slink_pkg::*;
#(
  parameter int unsigned TRAIN_CYCLES = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        link_up,
  // packet request
  input  logic        start,
  input  slink_hdr_t  start_hdr,
  input  logic        data_valid,
  input  logic [63:0] data,
  output logic        busy,
  output logic        tx_done,
  output logic        retry,
  // CRC responses
  input  logic        rsp_req,
  input  logic        rsp_ok,
  input  logic [2:0]  rsp_lanes,
  input  logic        peer_rsp_valid,
  input  logic        peer_rsp_ok,
  // Tx data buffer
  output logic        buf_clear,
  output logic        buf_wr_en,
  output logic [63:0] buf_wr_data,
  output logic        buf_rewind,
  input  logic        buf_rd_valid,
  input  logic [63:0] buf_rd_data,
  output logic        buf_rd_ready,
  // to the dispatcher
  output link_word_t  out_word,
  output logic        out_valid,
  input  logic        out_ready
);

  typedef enum logic [2:0] {S_TRAIN, S_IDLE, S_STP, S_HDR, S_DATA, S_CRC, S_END} st_e;

  localparam int unsigned TW = $clog2(TRAIN_CYCLES + 1);

  st_e         st;
  slink_hdr_t  pkt_hdr, cur_hdr;
  logic        pkt_pend, rsp_pend, rsp_ok_q, in_flight, got_rsp, got_ok, is_rsp;
  logic [2:0]  rsp_lanes_q;
  logic [16:0] wr_cnt, sd_cnt;
  logic [TW-1:0] train_cnt;
  logic [15:0] crc;
  logic        crc_ready;

  slink_crc16 u_crc (
    .clk(clk), .rst_n(rst_n), .init(start), .en(start || data_valid),
    .data(start ? 64'(start_hdr) : data), .crc(crc));

  assign buf_clear   = start;
  assign buf_wr_en   = data_valid && !start;
  assign buf_wr_data = data;
  assign crc_ready   = (wr_cnt == {1'b0, cur_hdr.data_len});
  assign out_valid   = 1'b1;
  assign busy        = pkt_pend || in_flight || (!is_rsp && st inside {S_STP, S_HDR, S_DATA, S_CRC, S_END});

  function automatic link_word_t kword(logic [7:0] k, logic [2:0] lanes);
    link_word_t w;
    w.is_k  = 1'b1;
    w.kcode = k;
    w.lanes = lanes;
    w.data  = '0;
    return w;
  endfunction

  always_comb begin
    out_word     = kword(K_IDL, XMODE_X4);
    buf_rd_ready = 1'b0;
    case (st)
      S_TRAIN: out_word = kword(K_COM, XMODE_X4);
      S_STP:   out_word = kword(K_STP, cur_hdr.lanes);
      S_HDR:   out_word = '{is_k: 1'b0, kcode: 8'h00, lanes: cur_hdr.lanes, data: 64'(cur_hdr)};
      S_DATA: begin
        if (buf_rd_valid) begin
          out_word     = '{is_k: 1'b0, kcode: 8'h00, lanes: cur_hdr.lanes, data: buf_rd_data};
          buf_rd_ready = out_ready;
        end else begin
          out_word = kword(K_PAD, cur_hdr.lanes);
        end
      end
      S_CRC: begin
        if (crc_ready) out_word = '{is_k: 1'b0, kcode: 8'h00, lanes: cur_hdr.lanes, data: {48'd0, crc}};
        else           out_word = kword(K_PAD, cur_hdr.lanes);
      end
      S_END:   out_word = kword(K_END, cur_hdr.lanes);
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= S_TRAIN;
      pkt_hdr     <= '0;
      cur_hdr     <= '0;
      pkt_pend    <= 1'b0;
      rsp_pend    <= 1'b0;
      rsp_ok_q    <= 1'b0;
      rsp_lanes_q <= XMODE_X1;
      in_flight   <= 1'b0;
      got_rsp     <= 1'b0;
      got_ok      <= 1'b0;
      is_rsp      <= 1'b0;
      wr_cnt      <= '0;
      sd_cnt      <= '0;
      train_cnt   <= '0;
      tx_done     <= 1'b0;
      retry       <= 1'b0;
      buf_rewind  <= 1'b0;
    end else begin
      tx_done    <= 1'b0;
      retry      <= 1'b0;
      buf_rewind <= 1'b0;

      if (start) begin
        pkt_hdr  <= start_hdr;
        pkt_pend <= 1'b1;
        in_flight <= 1'b0;
        got_rsp  <= 1'b0;
        wr_cnt   <= '0;
      end else if (data_valid) begin
        wr_cnt <= wr_cnt + 1'b1;
      end

      if (rsp_req) begin
        rsp_pend    <= 1'b1;
        rsp_ok_q    <= rsp_ok;
        rsp_lanes_q <= rsp_lanes;
      end

      // A response may arrive while the packet is still going out (the far
      // end gives up on a broken frame early); it is acted on once END is out.
      if (peer_rsp_valid && in_flight) begin
        got_rsp <= 1'b1;
        got_ok  <= peer_rsp_ok;
      end
      if (in_flight && got_rsp && st == S_IDLE) begin
        in_flight <= 1'b0;
        got_rsp   <= 1'b0;
        if (got_ok) begin
          tx_done <= 1'b1;
        end else begin
          retry      <= 1'b1;
          pkt_pend   <= 1'b1;
          buf_rewind <= 1'b1;
        end
      end

      if (out_ready) begin
        case (st)
          S_TRAIN: begin
            if (!link_up)                           train_cnt <= '0;
            else if (train_cnt == TW'(TRAIN_CYCLES)) st <= S_IDLE;
            else                                    train_cnt <= train_cnt + 1'b1;
          end
          S_IDLE: begin
            if (!link_up) begin
              st        <= S_TRAIN;
              train_cnt <= '0;
            end else if (rsp_pend && !rsp_req) begin
              rsp_pend <= 1'b0;
              is_rsp   <= 1'b1;
              cur_hdr  <= '{remote_addr: 32'd0, rsvd_hi: 8'd0, data_len: 16'd0,
                            lanes: rsp_lanes_q, crc_en: 1'b0, pkt_type: PT_CRC_RSP,
                            rsvd_lo: 1'b0, req_type: rsp_ok_q ? RSP_RIGHT : RSP_ERROR};
              st       <= S_STP;
            end else if (pkt_pend && !start && !buf_rewind) begin
              pkt_pend <= 1'b0;
              is_rsp   <= 1'b0;
              cur_hdr  <= pkt_hdr;
              sd_cnt   <= '0;
              st       <= S_STP;
            end
          end
          S_STP: begin
            st <= S_HDR;
            if (!is_rsp && pkt_has_data(cur_hdr) && cur_hdr.crc_en) begin
              in_flight <= 1'b1;
              got_rsp   <= 1'b0;
            end
          end
          S_HDR: begin
            if (!pkt_has_data(cur_hdr)) st <= S_END;
            else if (cur_hdr.data_len != 16'd0) st <= S_DATA;
            else if (cur_hdr.crc_en) st <= S_CRC;
            else st <= S_END;
          end
          S_DATA: begin
            if (buf_rd_valid) begin
              sd_cnt <= sd_cnt + 1'b1;
              if (sd_cnt + 1'b1 == {1'b0, cur_hdr.data_len})
                st <= cur_hdr.crc_en ? S_CRC : S_END;
            end
          end
          S_CRC: if (crc_ready) st <= S_END;
          S_END: begin
            st <= S_IDLE;
            if (!is_rsp && !(pkt_has_data(cur_hdr) && cur_hdr.crc_en)) tx_done <= 1'b1;
          end
          default: st <= S_IDLE;
        endcase
      end
    end
  end

endmodule
