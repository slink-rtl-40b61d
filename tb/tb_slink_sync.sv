// tb_slink_sync: checks lane synchronization on COM: a lane syncs after
// exactly SYNC_CNT clocks of COM, a broken run restarts the count, the link
// is up only with all lanes synced, COM after other symbols drops sync
// (far end retraining), data passes with one clock of latency, and a code
// error on a synced lane is reported.
module tb_slink_sync;
  import slink_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NUM_LANES-1:0][15:0] in_data = '0, out_data;
  logic [NUM_LANES-1:0][1:0]  in_k = '0, in_err = '0, out_k;
  logic [NUM_LANES-1:0]       lane_synced;
  logic                       link_up, code_err;
  int checks = 0, failures = 0;

  slink_sync #(.SYNC_CNT(4)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic drive(input logic [NUM_LANES-1:0] com_lanes);
    @(negedge clk);
    for (int l = 0; l < NUM_LANES; l++) begin
      if (com_lanes[l]) begin in_data[l] = {K_COM, K_COM}; in_k[l] = 2'b11; end
      else              begin in_data[l] = {K_IDL, K_IDL}; in_k[l] = 2'b11; end
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // lanes 0-2: three COM clocks, a gap, then four; lane 3 stays idle
    repeat (3) drive(4'b0111);
    drive(4'b0000);
    @(posedge clk); #1;
    check(lane_synced == 4'b0000, "synced after only three COM clocks");
    repeat (3) drive(4'b0111);
    @(posedge clk); #1;
    check(lane_synced == 4'b0000, "gap did not restart the count");
    drive(4'b0111);
    @(posedge clk); #1;
    check(lane_synced == 4'b0111, "lanes 0-2 not synced after four COM clocks");
    check(!link_up, "link up with lane 3 not synced");
    repeat (4) drive(4'b1000);
    @(posedge clk); #1;
    check(link_up, "link not up with all lanes synced");
    // data passes with one clock of latency
    @(negedge clk);
    for (int l = 0; l < NUM_LANES; l++) begin in_data[l] = 16'(l * 16'h1111 + 16'h0123); in_k[l] = 2'b00; end
    @(posedge clk); #1;
    check(out_data[2] == 16'h2345 && out_k[2] == 2'b00, "data not passed");
    // code error on a synced lane
    @(negedge clk); in_err[1] = 2'b01;
    @(posedge clk); #1;
    check(code_err, "code error not reported");
    @(negedge clk); in_err = '0;
    // COM again after data on lane 0: sync drops and returns after 4 clocks
    drive(4'b0001);
    @(posedge clk); #1;
    check(!lane_synced[0] && !link_up, "COM after data did not drop sync");
    repeat (3) drive(4'b0001);
    @(posedge clk); #1;
    check(lane_synced[0] && link_up, "lane 0 did not resync");
    // a continuing COM run after sync keeps the lane synced
    repeat (6) drive(4'b0001);
    @(posedge clk); #1;
    check(lane_synced[0], "continuous COM dropped sync");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
