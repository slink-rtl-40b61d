// tb_slink_dispatch: checks lane dispatch for x1, x2 and x4 data words and
// for K-code entries against a reference of which 16 bits each lane must
// carry in each clock, with unused lanes idle. It also checks the rate:
// one word per clock in x4, one per two clocks in x2, one per four in x1.
module tb_slink_dispatch;
  import slink_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  link_word_t in_word;
  logic       in_valid = 1, in_ready;
  logic [NUM_LANES-1:0][15:0] lane_data;
  logic [NUM_LANES-1:0][1:0]  lane_k;
  int checks = 0, failures = 0;

  slink_dispatch dut (.*);

  // expected lane contents, one entry per clock
  logic [NUM_LANES-1:0][15:0] exp_d [$];
  logic [NUM_LANES-1:0][1:0]  exp_k [$];

  function automatic void expect_word(link_word_t w);
    int nl;
    logic [NUM_LANES-1:0][15:0] d;
    logic [NUM_LANES-1:0][1:0]  k;
    nl = (w.lanes == 3'd2) ? 4 : (w.lanes == 3'd1) ? 2 : 1;
    if (w.is_k) begin
      for (int l = 0; l < NUM_LANES; l++) begin
        d[l] = (l < nl) ? {w.kcode, w.kcode} : {K_IDL, K_IDL};
        k[l] = 2'b11;
      end
      exp_d.push_back(d); exp_k.push_back(k);
    end else begin
      for (int c = 0; c < 4 / nl; c++) begin
        for (int l = 0; l < NUM_LANES; l++) begin
          d[l] = (l < nl) ? w.data[16 * (c * nl + l) +: 16] : {K_IDL, K_IDL};
          k[l] = (l < nl) ? 2'b00 : 2'b11;
        end
        exp_d.push_back(d); exp_k.push_back(k);
      end
    end
  endfunction

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int accepted [3];
  int clocks [3];

  initial begin
    in_word = '{is_k: 1'b1, kcode: K_IDL, lanes: 3'd2, data: '0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < 3; m++) begin
      accepted[m] = 0; clocks[m] = 0;
      for (int i = 0; i < 30; i++) begin
        @(negedge clk);
        if (i % 7 == 3) in_word = '{is_k: 1'b1, kcode: K_PAD, lanes: 3'(m), data: '0};
        else            in_word = '{is_k: 1'b0, kcode: 8'h00, lanes: 3'(m), data: {$urandom, $urandom}};
        expect_word(in_word);
        // hold the word until it is taken
        #1;
        while (!in_ready) begin
          @(negedge clk); #1;
          clocks[m]++;
        end
        clocks[m]++;
        if (!in_word.is_k) accepted[m]++;
      end
    end
    @(negedge clk);
    in_word = '{is_k: 1'b1, kcode: K_IDL, lanes: 3'd2, data: '0};
    repeat (3) @(negedge clk);
    // 30 entries per mode, of which 4 K-code clocks and 26 data words
    checks++;
    if (clocks[2] != 30 || clocks[1] != 4 + 26 * 2 || clocks[0] != 4 + 26 * 4) begin
      failures++;
      $display("FAIL rate: %0d/%0d/%0d clocks for x1/x2/x4", clocks[0], clocks[1], clocks[2]);
    end
    checks++;
    if (exp_d.size() != 0) begin failures++; $display("FAIL: %0d lane clocks never seen", exp_d.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // compare every clock of lane output while entries are expected
  logic started = 0;
  always @(posedge clk) begin
    #2;
    if (rst_n && exp_d.size() > 0 && (started || lane_k[0] == 2'b00 || lane_data[0] != {K_IDL, K_IDL})) begin
      started = 1;
      checks++;
      if (lane_data !== exp_d[0] || lane_k !== exp_k[0]) begin
        failures++;
        $display("FAIL: lanes %h/%b expected %h/%b", lane_data, lane_k, exp_d[0], exp_k[0]);
      end
      void'(exp_d.pop_front()); void'(exp_k.pop_front());
    end
  end
endmodule
