// slink_sync: K-code detection and lane synchronization (Detect_Kcode
// Synchronization).
//
// After a reset each transmitter sends COM (K28.5) on every lane. A lane
// becomes synchronized once it has received SYNC_CNT consecutive clocks of
// COM in both of its symbol slots; the link is up when all lanes are. A
// synchronized lane that sees COM again after other symbols takes it as the
// far end training anew, drops its sync and counts again, so that a link
// partner that was reset alone (for a lane-rate change) is picked up.
// Lane data, K flags and the sync state are registered (one cycle of
// latency); `code_err` pulses when a synchronized lane receives a symbol
// that is no 8b10b code. The protocol names this block and gives COM as
// the "initial value"; the counting rule is this design's choice.
module slink_sync
  import slink_pkg::*;
#(
  parameter int unsigned SYNC_CNT = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [NUM_LANES-1:0][15:0] in_data,
  input  logic [NUM_LANES-1:0][1:0]  in_k,
  input  logic [NUM_LANES-1:0][1:0]  in_err,
  output logic [NUM_LANES-1:0][15:0] out_data,
  output logic [NUM_LANES-1:0][1:0]  out_k,
  output logic [NUM_LANES-1:0]       lane_synced,
  output logic                       link_up,
  output logic                       code_err
);

  localparam int unsigned CW = $clog2(SYNC_CNT + 1);

  logic [NUM_LANES-1:0][CW-1:0] cnt;
  logic [NUM_LANES-1:0]         other;
  logic [NUM_LANES-1:0]         com;

  always_comb
    for (int l = 0; l < NUM_LANES; l++)
      com[l] = (in_k[l] == 2'b11) && (in_data[l] == {K_COM, K_COM}) && (in_err[l] == 2'b00);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt         <= '0;
      other       <= '0;
      lane_synced <= '0;
      out_data    <= '0;
      out_k       <= '0;
      code_err    <= 1'b0;
    end else begin
      out_data <= in_data;
      out_k    <= in_k;
      code_err <= |(lane_synced & {in_err[3] != 0, in_err[2] != 0, in_err[1] != 0, in_err[0] != 0});
      for (int l = 0; l < NUM_LANES; l++) begin
        if (!lane_synced[l]) begin
          if (com[l]) begin
            if (cnt[l] == CW'(SYNC_CNT - 1)) begin
              lane_synced[l] <= 1'b1;
              other[l]       <= 1'b0;
              cnt[l]         <= '0;
            end else begin
              cnt[l] <= cnt[l] + 1'b1;
            end
          end else begin
            cnt[l] <= '0;
          end
        end else if (!com[l]) begin
          other[l] <= 1'b1;
        end else if (other[l]) begin
          lane_synced[l] <= 1'b0;
          cnt[l]         <= CW'(1);
        end
      end
    end
  end

  assign link_up = &lane_synced;

endmodule
