// slink_dispatch: Dispatch Packets, spreading the link word stream over the
// enabled lanes.
//
// A data word is 64 bits; each lane carries 16 bits per clock. In x4 mode a
// word goes out in one clock (lane l gets bits [16l+15:16l]); in x2 mode in
// two clocks (lanes 0 and 1 get bits [31:0], then [63:32]); in x1 mode in
// four clocks on lane 0, low half-word first. A K-code entry takes one
// clock and puts the K-code in both symbol slots of every enabled lane.
// Lanes that the current mode does not use send IDL. `in_ready` is high in
// the clock that takes the last part of the current entry, so the upstream
// must offer its next entry continuously (it sends IDL when it has nothing
// else). Outputs are registered: one cycle of latency. Spreading 64-bit
// data as 16 bits over up to four lanes follows the protocol; the lane and
// half-word order and the K-code handling are this design's choice.
module slink_dispatch
  import slink_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  link_word_t                 in_word,
  input  logic                       in_valid,
  output logic                       in_ready,
  output logic [NUM_LANES-1:0][15:0] lane_data,
  output logic [NUM_LANES-1:0][1:0]  lane_k
);

  logic [1:0] phase;
  logic [1:0] last_phase;
  int unsigned nl;

  always_comb begin
    nl = xmode_lanes(in_word.lanes);
    if (!in_valid || in_word.is_k) last_phase = 2'd0;
    else                           last_phase = (nl == 4) ? 2'd0 : (nl == 2) ? 2'd1 : 2'd3;
    in_ready = (phase == last_phase);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= '0;
      lane_data <= {NUM_LANES{{K_IDL, K_IDL}}};
      lane_k    <= '1;
    end else begin
      phase <= in_ready ? 2'd0 : phase + 1'b1;
      for (int l = 0; l < NUM_LANES; l++) begin
        lane_data[l] <= {K_IDL, K_IDL};
        lane_k[l]    <= 2'b11;
        if (in_valid && l < nl) begin
          if (in_word.is_k) begin
            lane_data[l] <= {in_word.kcode, in_word.kcode};
          end else begin
            lane_data[l] <= in_word.data[16 * (l + nl * phase) +: 16];
            lane_k[l]    <= 2'b00;
          end
        end
      end
    end
  end

endmodule
