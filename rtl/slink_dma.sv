// slink_dma: DMA controller of SLink, an AXI3 burst master with the
// operation sequencer.
//
// Operations started from the function registers:
//   write (request type 0): a write request packet to the far end; its data
//     is read here from local memory at LADDR and streamed into the
//     transmit side. The operation ends when the packet has gone out, or,
//     with CRC, when the far end answered RIGHT.
//   read (request type 1): a header-only read request; the operation ends
//     when the data packet that answers it has been written to local memory
//     at LADDR.
// Requests from the far end:
//   write request: its data is taken from the Rx data buffer and written to
//     local memory at the header's remote address;
//   read request: a data packet is sent back in the request's lane mode and
//     CRC setting, with data read from local memory at the header's remote
//     address.
// The read engine issues INCR bursts of up to 16 beats of 64 bits (AXI3
// limit), never across a 4 KB boundary, one burst at a time, and forwards
// every R beat to the transmit side. The write engine issues one AW burst
// at a time as soon as the Rx data buffer holds a word and feeds W from the
// buffer; a header that arrives while the previous packet is still being
// written waits in a one-entry register. `wr_idle` tells when all received
// data have reached memory. Addresses are byte addresses and must be 8-byte aligned; RRESP
// and BRESP are not checked. AXI3 at 64 bits with bursts follows the
// protocol; the burst policy, the packet a read is answered with and the
// end-of-operation rules are this design's choices.
module slink_dma
  import slink_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // from the function registers
  input  logic        start,
  input  logic [31:0] cfg_hdr_lo,
  input  logic [31:0] cfg_raddr,
  input  logic [31:0] cfg_laddr,
  output logic        op_done,
  // from the receive side
  input  logic        rx_hdr_valid,
  input  slink_hdr_t  rx_hdr,
  input  logic        rxb_valid,
  input  logic [63:0] rxb_data,
  output logic        rxb_ready,
  // to / from the transmit side
  output logic        tx_start,
  output slink_hdr_t  tx_hdr,
  output logic        tx_data_valid,
  output logic [63:0] tx_data,
  input  logic        tx_done,
  // write engine idle, no packet waiting: the received data are in memory
  output logic        wr_idle,
  // AXI3 master, read channels
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
  // AXI3 master, write channels
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
  output logic        m_bready
);

  // Beats of the next burst: at most 16, the words left, and up to 4 KB.
  function automatic logic [4:0] burst_beats(logic [31:0] addr, logic [16:0] rem);
    logic [9:0] to_4k;
    to_4k = 10'd512 - {1'b0, addr[11:3]};   // 8-byte beats left in the 4 KB page
    if (rem < 17'd16 && rem < {7'd0, to_4k}) return 5'(rem);
    if (to_4k < 10'd16) return 5'(to_4k);
    return 5'd16;
  endfunction

  // ------------------------------------------------------------ sequencer
  typedef enum logic [1:0] {Q_IDLE, Q_LOCAL_WR, Q_LOCAL_RD, Q_REMOTE_RD} seq_e;
  seq_e        seq;
  slink_hdr_t  cfg_hdr;
  logic        rd_go, wr_go;
  logic [31:0] rd_go_addr, wr_go_addr;
  logic [16:0] rd_go_len, wr_go_len;
  logic        wr_fin, wr_is_data;

  always_comb begin
    cfg_hdr             = slink_hdr_t'({cfg_raddr, cfg_hdr_lo});
    cfg_hdr.rsvd_hi     = '0;
    cfg_hdr.pkt_type    = PT_REQ;
    cfg_hdr.rsvd_lo     = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seq        <= Q_IDLE;
      tx_start   <= 1'b0;
      tx_hdr     <= '0;
      rd_go      <= 1'b0;
      rd_go_addr <= '0;
      rd_go_len  <= '0;
      op_done    <= 1'b0;
    end else begin
      tx_start <= 1'b0;
      rd_go    <= 1'b0;
      op_done  <= 1'b0;
      case (seq)
        Q_IDLE: begin
          if (start) begin
            tx_start   <= 1'b1;
            tx_hdr     <= cfg_hdr;
            if (cfg_hdr.req_type == REQ_WRITE) begin
              rd_go      <= (cfg_hdr.data_len != 16'd0);
              rd_go_addr <= cfg_laddr;
              rd_go_len  <= {1'b0, cfg_hdr.data_len};
              seq        <= Q_LOCAL_WR;
            end else begin
              seq <= Q_LOCAL_RD;
            end
          end else if (rx_hdr_valid && rx_hdr.pkt_type == PT_REQ && rx_hdr.req_type == REQ_READ) begin
            tx_start   <= 1'b1;
            tx_hdr     <= '{remote_addr: 32'd0, rsvd_hi: 8'd0, data_len: rx_hdr.data_len,
                            lanes: rx_hdr.lanes, crc_en: rx_hdr.crc_en, pkt_type: PT_DATA,
                            rsvd_lo: 1'b0, req_type: REQ_WRITE};
            rd_go      <= (rx_hdr.data_len != 16'd0);
            rd_go_addr <= rx_hdr.remote_addr;
            rd_go_len  <= {1'b0, rx_hdr.data_len};
            seq        <= Q_REMOTE_RD;
          end
        end
        Q_LOCAL_WR, Q_REMOTE_RD: begin
          if (tx_done) begin
            op_done <= (seq == Q_LOCAL_WR);
            seq     <= Q_IDLE;
          end
        end
        Q_LOCAL_RD: begin
          if (wr_fin && wr_is_data) begin
            op_done <= 1'b1;
            seq     <= Q_IDLE;
          end
        end
        default: seq <= Q_IDLE;
      endcase
    end
  end

  // ---------------------------------------------------------- read engine
  typedef enum logic [1:0] {R_IDLE, R_AR, R_DATA} rst_e;
  rst_e        rs;
  logic [31:0] r_addr;
  logic [16:0] r_rem;
  logic [4:0]  r_beats;

  assign m_arsize      = 3'd3;
  assign m_arburst     = 2'b01;
  assign m_araddr      = r_addr;
  assign m_arlen       = 4'(r_beats - 5'd1);
  assign m_arvalid     = (rs == R_AR);
  assign m_rready      = (rs == R_DATA);
  assign tx_data_valid = (rs == R_DATA) && m_rvalid;
  assign tx_data       = m_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rs      <= R_IDLE;
      r_addr  <= '0;
      r_rem   <= '0;
      r_beats <= '0;
    end else begin
      case (rs)
        R_IDLE: if (rd_go) begin
          r_addr  <= rd_go_addr;
          r_rem   <= rd_go_len;
          r_beats <= burst_beats(rd_go_addr, rd_go_len);
          rs      <= R_AR;
        end
        R_AR: if (m_arready) rs <= R_DATA;
        R_DATA: if (m_rvalid && m_rlast) begin
          if (r_rem == 17'(r_beats)) begin
            rs <= R_IDLE;
          end else begin
            r_addr  <= r_addr + {24'd0, r_beats, 3'd0};
            r_rem   <= r_rem - 17'(r_beats);
            r_beats <= burst_beats(r_addr + {24'd0, r_beats, 3'd0}, r_rem - 17'(r_beats));
            rs      <= R_AR;
          end
        end
        default: rs <= R_IDLE;
      endcase
    end
  end

  // --------------------------------------------------------- write engine
  typedef enum logic [2:0] {W_IDLE, W_WAIT, W_AW, W_DATA, W_B} wst_e;
  wst_e        ws;
  logic [31:0] w_addr;
  logic [16:0] w_rem;
  logic [4:0]  w_beats, w_cnt;
  logic        pend_valid;   // a header that came while a packet was draining
  slink_hdr_t  pend_hdr, wr_hdr;
  logic        rx_has_data;

  // A header with data restarts the engine while it still waits for the
  // first word (a retransmitted packet); one that arrives while an earlier
  // packet is still being written is kept and started after it.
  always_comb begin
    rx_has_data = rx_hdr_valid && pkt_has_data(rx_hdr);
    wr_hdr      = pend_valid ? pend_hdr : rx_hdr;
    wr_go       = pend_valid ? (ws == W_IDLE)
                             : (rx_has_data && (ws == W_IDLE || ws == W_WAIT));
    wr_go_addr  = (wr_hdr.pkt_type == PT_DATA) ? cfg_laddr : wr_hdr.remote_addr;
    wr_go_len   = {1'b0, wr_hdr.data_len};
  end

  assign wr_idle = (ws == W_IDLE) && !pend_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_valid <= 1'b0;
      pend_hdr   <= '0;
    end else if (rx_has_data && !(wr_go && !pend_valid)) begin
      pend_valid <= 1'b1;
      pend_hdr   <= rx_hdr;
    end else if (wr_go) begin
      pend_valid <= 1'b0;
    end
  end

  assign m_awsize  = 3'd3;
  assign m_awburst = 2'b01;
  assign m_awaddr  = w_addr;
  assign m_awlen   = 4'(w_beats - 5'd1);
  assign m_awvalid = (ws == W_AW);
  assign m_wdata   = rxb_data;
  assign m_wstrb   = 8'hFF;
  assign m_wvalid  = (ws == W_DATA) && rxb_valid;
  assign m_wlast   = (w_cnt + 5'd1 == w_beats);
  assign rxb_ready = (ws == W_DATA) && m_wready;
  assign m_bready  = (ws == W_B);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ws         <= W_IDLE;
      w_addr     <= '0;
      w_rem      <= '0;
      w_beats    <= '0;
      w_cnt      <= '0;
      wr_fin     <= 1'b0;
      wr_is_data <= 1'b0;
    end else begin
      wr_fin <= 1'b0;
      if (wr_go) begin
        w_addr     <= wr_go_addr;
        w_rem      <= wr_go_len;
        w_beats    <= burst_beats(wr_go_addr, wr_go_len);
        wr_is_data <= (wr_hdr.pkt_type == PT_DATA);
        if (wr_go_len == '0) begin
          wr_fin <= 1'b1;
          ws     <= W_IDLE;
        end else begin
          ws <= W_WAIT;
        end
      end else begin
        case (ws)
          W_WAIT: if (rxb_valid) ws <= W_AW;
          W_AW: if (m_awready) begin
            w_cnt <= '0;
            ws    <= W_DATA;
          end
          W_DATA: if (rxb_valid && m_wready) begin
            w_cnt <= w_cnt + 1'b1;
            if (m_wlast) ws <= W_B;
          end
          W_B: if (m_bvalid) begin
            if (w_rem == 17'(w_beats)) begin
              wr_fin <= 1'b1;
              ws     <= W_IDLE;
            end else begin
              w_addr  <= w_addr + {24'd0, w_beats, 3'd0};
              w_rem   <= w_rem - 17'(w_beats);
              w_beats <= burst_beats(w_addr + {24'd0, w_beats, 3'd0}, w_rem - 17'(w_beats));
              ws      <= W_WAIT;
            end
          end
          default: ws <= W_IDLE;
        endcase
      end
    end
  end

endmodule
