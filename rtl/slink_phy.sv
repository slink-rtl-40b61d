// slink_phy: the digital part of the SLink physical layer (Tx/Rx phy).
//
// Each lane carries 16 bits per clock, two bytes, as two 8b10b symbols:
// byte [7:0] is encoded first and sent first (tx_sym[9:0]), byte [15:8]
// second (tx_sym[19:10]). The transmit half keeps one running disparity per
// lane and registers its output; the receive half decodes the two symbols
// of each lane and registers the bytes, their K flags and a code-error flag.
// Both halves have one cycle of latency. The serializer, the LVDS drivers
// and symbol (comma) alignment belong to the SerDes, which sits outside
// this module; tx_sym/rx_sym are its parallel 20-bit interface per lane.
// 8b10b encoding and decoding in the physical layer follow the protocol;
// two bytes per lane per clock follows its 64-bit datapath split over four
// lanes; the symbol order is this design's choice.
module slink_phy
  import slink_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  // from the dispatcher
  input  logic [NUM_LANES-1:0][15:0] tx_data,
  input  logic [NUM_LANES-1:0][1:0]  tx_k,
  // to the SerDes
  output logic [NUM_LANES-1:0][19:0] tx_sym,
  // from the SerDes
  input  logic [NUM_LANES-1:0][19:0] rx_sym,
  // to K-code synchronization
  output logic [NUM_LANES-1:0][15:0] rx_data,
  output logic [NUM_LANES-1:0][1:0]  rx_k,
  output logic [NUM_LANES-1:0][1:0]  rx_err
);

  logic [NUM_LANES-1:0]       rd_q;
  logic [NUM_LANES-1:0]       rd_mid, rd_nxt;
  logic [NUM_LANES-1:0][19:0] enc;
  logic [NUM_LANES-1:0][15:0] dec;
  logic [NUM_LANES-1:0][1:0]  dec_k, dec_err;

  for (genvar l = 0; l < NUM_LANES; l++) begin : g_lane
    slink_enc8b10b u_enc0 (
      .din(tx_data[l][7:0]), .kin(tx_k[l][0]), .rd_in(rd_q[l]),
      .dout(enc[l][9:0]), .rd_out(rd_mid[l]));
    slink_enc8b10b u_enc1 (
      .din(tx_data[l][15:8]), .kin(tx_k[l][1]), .rd_in(rd_mid[l]),
      .dout(enc[l][19:10]), .rd_out(rd_nxt[l]));
    slink_dec8b10b u_dec0 (
      .din(rx_sym[l][9:0]), .dout(dec[l][7:0]), .kout(dec_k[l][0]),
      .err(dec_err[l][0]));
    slink_dec8b10b u_dec1 (
      .din(rx_sym[l][19:10]), .dout(dec[l][15:8]), .kout(dec_k[l][1]),
      .err(dec_err[l][1]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q    <= '0;
      tx_sym  <= '0;
      rx_data <= '0;
      rx_k    <= '0;
      rx_err  <= '0;
    end else begin
      rd_q    <= rd_nxt;
      tx_sym  <= enc;
      rx_data <= dec;
      rx_k    <= dec_k;
      rx_err  <= dec_err;
    end
  end

endmodule
