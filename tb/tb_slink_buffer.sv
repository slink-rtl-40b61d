// tb_slink_buffer: checks the packet buffer (16 words here) against a queue
// model: cut-through writes, writes held back until commit, discard of
// uncommitted words, rewind for a retransmission, clear, and a ring that
// wraps several times, with random read back-pressure.
module tb_slink_buffer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        clear = 0, auto_commit = 1, wr_en = 0, commit = 0, discard = 0, rewind = 0;
  logic [63:0] wr_data = '0;
  logic        rd_valid, rd_ready = 0;
  logic [63:0] rd_data;
  logic [4:0]  committed;
  int checks = 0, failures = 0;

  slink_buffer #(.DEPTH(16)) dut (.*);

  logic [63:0] expq [$];

  task automatic put(input logic [63:0] d);
    @(negedge clk); wr_en = 1; wr_data = d;
    @(negedge clk); wr_en = 0;
  endtask

  // Pop n words with random back-pressure and compare with the model.
  task automatic drain(input int n);
    int got = 0, guard = 0;
    while (got < n && guard < 500) begin
      @(negedge clk);
      rd_ready = ($urandom % 3) != 0;
      #1;
      if (rd_valid && rd_ready) begin
        checks++;
        if (rd_data !== expq[0]) begin
          failures++;
          $display("FAIL: read %h expected %h", rd_data, expq[0]);
        end
        void'(expq.pop_front());
        got++;
      end
      guard++;
    end
    @(negedge clk); rd_ready = 0;
    checks++;
    if (got != n) begin failures++; $display("FAIL: only %0d of %0d words", got, n); end
  endtask

  task automatic expect_empty(input string what);
    repeat (3) @(negedge clk);
    checks++;
    if (rd_valid) begin failures++; $display("FAIL: %s: data visible", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] pkt [$];
    repeat (2) @(negedge clk);
    rst_n = 1;
    // cut-through, wrapping the ring three times
    for (int r = 0; r < 6; r++) begin
      for (int i = 0; i < 9; i++) begin
        logic [63:0] d = {$urandom, $urandom};
        put(d); expq.push_back(d);
      end
      drain(9);
    end
    // held back until commit
    auto_commit = 0;
    for (int i = 0; i < 5; i++) begin
      logic [63:0] d = {$urandom, $urandom};
      put(d); expq.push_back(d);
    end
    expect_empty("before commit");
    @(negedge clk); commit = 1; @(negedge clk); commit = 0;
    drain(5);
    // discarded words never appear
    for (int i = 0; i < 4; i++) put({$urandom, $urandom});
    @(negedge clk); discard = 1; @(negedge clk); discard = 0;
    @(negedge clk); commit = 1; @(negedge clk); commit = 0;
    expect_empty("after discard");
    // clear, fill a packet, read it, rewind and read it again
    auto_commit = 1;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    pkt.delete();
    for (int i = 0; i < 12; i++) begin
      logic [63:0] d = {$urandom, $urandom};
      put(d); pkt.push_back(d); expq.push_back(d);
    end
    drain(12);
    expect_empty("after reading the packet");
    @(negedge clk); rewind = 1; @(negedge clk); rewind = 0;
    foreach (pkt[i]) expq.push_back(pkt[i]);
    drain(12);
    checks++;
    if (committed != 0) begin failures++; $display("FAIL: committed count %0d", committed); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
