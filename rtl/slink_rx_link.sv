// slink_rx_link: receive packet layer (Bypass / crc_ck and Analyze
// Control_word).
//
// Takes the assembled 64-bit words of one packet. The first word is the
// header control word: it is decoded and, for a write request or a data
// packet, handed to the DMA controller at once (`hdr_valid`) so the write
// address and length are known. The next data_len words go to the Rx data
// buffer. Without CRC they are committed as they arrive (bypass,
// cut-through). With CRC enabled the words stay uncommitted, the CRC-16 of
// header and data is compared with the CRC word that follows them, and at
// END the words are committed (RIGHT) or discarded (ERROR); the verdict is
// handed to the transmit side as a CRC response request (`rsp_req`), to be
// sent in the packet's own lane mode. A read request (header only) is handed
// over at END when it arrived intact. A CRC response from the far end is
// reported on `peer_rsp_valid`/`peer_rsp_ok`. `crc_err` pulses for every
// CRC-checked packet that failed and `bad_pkt` for a malformed bypass packet.
// The packet contents and the RIGHT/ERROR response follow the protocol;
// the CRC covering the header as well as the data, and when each event is
// raised, are this design's choices.
module slink_rx_link
  import slink_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // from slink_assemble
  input  logic        in_valid,
  input  logic        in_first,
  input  logic [63:0] in_data,
  input  logic [2:0]  in_lanes,
  input  logic        pkt_end,
  input  logic        frame_err,
  // to the Rx data buffer
  output logic        buf_wr_en,
  output logic [63:0] buf_wr_data,
  output logic        buf_auto_commit,
  output logic        buf_commit,
  output logic        buf_discard,
  // to the DMA controller
  output logic        hdr_valid,
  output slink_hdr_t  hdr,
  // to the transmit side
  output logic        rsp_req,
  output logic        rsp_ok,
  output logic [2:0]  rsp_lanes,
  output logic        peer_rsp_valid,
  output logic        peer_rsp_ok,
  // status
  output logic        crc_err,
  output logic        bad_pkt
);

  typedef enum logic [1:0] {S_HDR, S_DATA, S_CRC, S_TAIL} st_e;

  st_e         st;
  logic        active;      // a header has been taken for this packet
  logic        err;         // malformed packet
  logic        crc_bad;
  logic [16:0] cnt;
  logic [2:0]  lanes;
  logic [15:0] crc;
  logic        crc_init, crc_en;
  logic        take_hdr;

  assign take_hdr = in_valid && in_first;
  assign crc_init = take_hdr;
  assign crc_en   = in_valid && (take_hdr || st == S_DATA);

  slink_crc16 u_crc (
    .clk(clk), .rst_n(rst_n), .init(crc_init), .en(crc_en), .data(in_data), .crc(crc));

  assign buf_wr_en       = in_valid && !in_first && st == S_DATA;
  assign buf_wr_data     = in_data;
  assign buf_auto_commit = !hdr.crc_en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st             <= S_HDR;
      active         <= 1'b0;
      err            <= 1'b0;
      crc_bad        <= 1'b0;
      cnt            <= '0;
      lanes          <= XMODE_X1;
      hdr            <= '0;
      hdr_valid      <= 1'b0;
      rsp_req        <= 1'b0;
      rsp_ok         <= 1'b0;
      rsp_lanes      <= XMODE_X1;
      peer_rsp_valid <= 1'b0;
      peer_rsp_ok    <= 1'b0;
      buf_commit     <= 1'b0;
      buf_discard    <= 1'b0;
      crc_err        <= 1'b0;
      bad_pkt        <= 1'b0;
    end else begin
      hdr_valid      <= 1'b0;
      rsp_req        <= 1'b0;
      peer_rsp_valid <= 1'b0;
      buf_commit     <= 1'b0;
      buf_discard    <= 1'b0;
      crc_err        <= 1'b0;
      bad_pkt        <= 1'b0;
      if (frame_err) err <= 1'b1;

      if (in_valid) begin
        if (in_first) begin
          hdr     <= slink_hdr_t'(in_data);
          lanes   <= in_lanes;
          active  <= 1'b1;
          err     <= frame_err;
          crc_bad <= 1'b0;
          cnt     <= '0;
          if (pkt_has_data(slink_hdr_t'(in_data))) begin
            hdr_valid <= 1'b1;
            if (in_data[23:8] != 16'd0)   st <= S_DATA;
            else if (in_data[4])          st <= S_CRC;
            else                          st <= S_TAIL;
          end else begin
            st <= S_TAIL;
          end
        end else begin
          case (st)
            S_DATA: begin
              cnt <= cnt + 1'b1;
              if (cnt + 1'b1 == {1'b0, hdr.data_len})
                st <= hdr.crc_en ? S_CRC : S_TAIL;
            end
            S_CRC: begin
              crc_bad <= (in_data[15:0] != crc);
              st      <= S_TAIL;
            end
            default: err <= 1'b1;   // words beyond the packet length
          endcase
        end
      end

      if (pkt_end && active) begin
        active <= 1'b0;
        st     <= S_HDR;
        if (hdr.pkt_type == PT_CRC_RSP) begin
          peer_rsp_valid <= !(err || frame_err || st != S_TAIL);
          peer_rsp_ok    <= (hdr.req_type == RSP_RIGHT);
        end else if (!pkt_has_data(hdr)) begin
          hdr_valid <= !(err || frame_err || st != S_TAIL);
        end else if (hdr.crc_en) begin
          rsp_req     <= 1'b1;
          rsp_lanes   <= lanes;
          rsp_ok      <= !(err || frame_err || crc_bad || st != S_TAIL);
          buf_commit  <= !(err || frame_err || crc_bad || st != S_TAIL);
          buf_discard <=  (err || frame_err || crc_bad || st != S_TAIL);
          crc_err     <=  (err || frame_err || crc_bad || st != S_TAIL);
        end else begin
          bad_pkt <= (err || frame_err || st != S_TAIL);
        end
      end
    end
  end

endmodule
