// tb_slink_assemble: drives lane patterns for packets in x1, x2 and x4
// (STP on the enabled lanes, 16-bit slices, PAD clocks inside the packet,
// END) and checks the rebuilt 64-bit words, the header flag, the detected
// lane mode and the end pulse. Malformed packets (a stray IDL inside a
// packet, END inside a word, link loss) must raise frame_err.
module tb_slink_assemble;
  import slink_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                       link_up = 1;
  logic [NUM_LANES-1:0][15:0] lane_data;
  logic [NUM_LANES-1:0][1:0]  lane_k;
  logic        out_valid, out_first, pkt_end, frame_err;
  logic [63:0] out_data;
  logic [2:0]  out_lanes;
  int checks = 0, failures = 0;

  slink_assemble dut (.*);

  logic [63:0] expq [$];
  int n_end = 0, n_ferr = 0, n_first = 0;
  logic [2:0] exp_lanes;

  task automatic kclk(input logic [7:0] k, input int nl);
    @(negedge clk);
    for (int l = 0; l < NUM_LANES; l++) begin
      lane_data[l] = (l < nl) ? {k, k} : {K_IDL, K_IDL};
      lane_k[l]    = 2'b11;
    end
  endtask

  task automatic word(input logic [63:0] w, input int nl, input bit pad_inside);
    for (int c = 0; c < 4 / nl; c++) begin
      if (pad_inside && c == 1) kclk(K_PAD, nl);
      @(negedge clk);
      for (int l = 0; l < NUM_LANES; l++) begin
        lane_data[l] = (l < nl) ? w[16 * (c * nl + l) +: 16] : {K_IDL, K_IDL};
        lane_k[l]    = (l < nl) ? 2'b00 : 2'b11;
      end
    end
  endtask

  task automatic packet(input int nl, input int nwords);
    exp_lanes = (nl == 4) ? XMODE_X4 : (nl == 2) ? XMODE_X2 : XMODE_X1;
    kclk(K_STP, nl);
    for (int i = 0; i < nwords; i++) begin
      logic [63:0] w = {$urandom, $urandom};
      expq.push_back(w);
      word(w, nl, (i % 3) == 1);
    end
    kclk(K_END, nl);
    kclk(K_IDL, 4);
    kclk(K_IDL, 4);
  endtask

  always @(posedge clk) begin
    #1;
    if (out_valid) begin
      checks++;
      if (expq.size() == 0 || out_data !== expq[0] || out_lanes !== exp_lanes) begin
        failures++;
        $display("FAIL: word %h lanes %0d", out_data, out_lanes);
      end
      if (expq.size() > 0) void'(expq.pop_front());
      if (out_first) n_first++;
    end
    if (pkt_end) n_end++;
    if (frame_err) n_ferr++;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    kclk(K_IDL, 4);
    repeat (2) @(negedge clk);
    rst_n = 1;
    packet(4, 6);
    packet(2, 5);
    packet(1, 4);
    packet(4, 1);
    checks++;
    if (n_end != 4 || n_first != 4 || n_ferr != 0) begin
      failures++; $display("FAIL: %0d ends, %0d headers, %0d frame errors", n_end, n_first, n_ferr);
    end
    // END inside a word (x1, two of four slices)
    kclk(K_STP, 1);
    @(negedge clk); lane_data[0] = 16'h1234; lane_k[0] = 2'b00;
    @(negedge clk); lane_data[0] = 16'h5678; lane_k[0] = 2'b00;
    kclk(K_END, 1);
    kclk(K_IDL, 4);
    // stray IDL inside a packet
    kclk(K_STP, 2);
    kclk(K_IDL, 2);
    kclk(K_IDL, 4);
    // link lost inside a packet
    kclk(K_STP, 4);
    @(negedge clk);
    link_up = 0;
    for (int l = 0; l < NUM_LANES; l++) begin lane_data[l] = {K_PAD, K_PAD}; lane_k[l] = 2'b11; end
    kclk(K_IDL, 4);
    link_up = 1;
    kclk(K_IDL, 4);
    checks++;
    if (n_ferr != 3 || n_end != 7) begin
      failures++; $display("FAIL: %0d frame errors, %0d ends for 3 bad packets", n_ferr, n_end);
    end
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL: %0d words missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
