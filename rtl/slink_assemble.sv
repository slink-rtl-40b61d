// slink_assemble: Assemble Packet, rebuilding 64-bit packet words from the
// enabled lanes.
//
// Between packets the receiver waits for STP (K27.7) in both slots of lane
// 0. The lanes that carry STP in that clock give the packet's lane mode
// (lanes 0-3: x4, lanes 0-1: x2, else x1), so the receiver follows the
// sender's mode without configuration. Inside a packet every clock of PAD
// (K23.7) on lane 0 is skipped, END (K29.7) closes the packet, and data
// clocks are gathered in the order slink_dispatch sends them (16 bits per
// lane per clock) until 64 bits are complete. Each complete word is given
// out with `out_first` marking the header word. `pkt_end` pulses when the
// packet closes; `frame_err` pulses with it when the packet was malformed:
// a stray K-code, an END inside a word or the loss of the link; it also
// pulses alone when a data clock mixes K-codes into an enabled lane.
// Outputs are registered. The K-code roles follow the protocol's K-code
// table; detecting the lane mode from STP is this design's choice.
module slink_assemble
  import slink_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       link_up,
  input  logic [NUM_LANES-1:0][15:0] lane_data,
  input  logic [NUM_LANES-1:0][1:0]  lane_k,
  output logic                       out_valid,
  output logic                       out_first,
  output logic [63:0]                out_data,
  output logic [2:0]                 out_lanes,
  output logic                       pkt_end,
  output logic                       frame_err
);

  logic        in_pkt, first;
  logic [1:0]  phase;
  logic [2:0]  lanes;
  logic [63:0] acc, acc_nxt;
  logic [NUM_LANES-1:0] is_stp, is_data;
  int unsigned nl;
  logic [1:0]  last_phase;
  logic        bad_mix;

  always_comb begin
    for (int l = 0; l < NUM_LANES; l++) begin
      is_stp[l]  = (lane_k[l] == 2'b11) && (lane_data[l] == {K_STP, K_STP});
      is_data[l] = (lane_k[l] == 2'b00);
    end
    nl = xmode_lanes(lanes);
    last_phase = (nl == 4) ? 2'd0 : (nl == 2) ? 2'd1 : 2'd3;
    bad_mix = 1'b0;
    for (int l = 0; l < NUM_LANES; l++)
      if (l < nl && !is_data[l]) bad_mix = 1'b1;
    acc_nxt = acc;
    for (int l = 0; l < NUM_LANES; l++)
      if (l < nl) acc_nxt[16 * (l + nl * phase) +: 16] = lane_data[l];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_pkt    <= 1'b0;
      first     <= 1'b0;
      phase     <= '0;
      lanes     <= XMODE_X1;
      acc       <= '0;
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_data  <= '0;
      out_lanes <= XMODE_X1;
      pkt_end   <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      pkt_end   <= 1'b0;
      frame_err <= 1'b0;
      if (!in_pkt) begin
        if (link_up && is_stp[0]) begin
          in_pkt <= 1'b1;
          first  <= 1'b1;
          phase  <= '0;
          if (&is_stp)       lanes <= XMODE_X4;
          else if (is_stp[1]) lanes <= XMODE_X2;
          else               lanes <= XMODE_X1;
        end
      end else if (!link_up) begin
        in_pkt    <= 1'b0;
        pkt_end   <= 1'b1;
        frame_err <= 1'b1;
      end else if (lane_k[0] != 2'b00) begin
        if (lane_k[0] == 2'b11 && lane_data[0] == {K_PAD, K_PAD}) begin
          // padding inside a packet: nothing to take
        end else if (lane_k[0] == 2'b11 && lane_data[0] == {K_END, K_END}) begin
          in_pkt    <= 1'b0;
          pkt_end   <= 1'b1;
          frame_err <= (phase != 2'd0);
        end else begin
          in_pkt    <= 1'b0;
          pkt_end   <= 1'b1;
          frame_err <= 1'b1;
        end
      end else begin
        if (bad_mix) frame_err <= 1'b1;
        acc <= acc_nxt;
        if (phase == last_phase) begin
          phase     <= '0;
          out_valid <= 1'b1;
          out_first <= first;
          out_data  <= acc_nxt;
          out_lanes <= lanes;
          first     <= 1'b0;
        end else begin
          phase <= phase + 1'b1;
        end
      end
    end
  end

endmodule
