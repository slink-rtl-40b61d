// tb_slink_crc16: checks the CRC-16 unit against a long-division reference
// over random packets of 1 to 20 words, including restart with init and a
// word in the same clock, and idle clocks between words.
module tb_slink_crc16;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic init = 0, en = 0;
  logic [63:0] data = '0;
  logic [15:0] crc;
  int checks = 0, failures = 0;

  slink_crc16 dut (.clk, .rst_n, .init, .en, .data, .crc);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] msg [$];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < 40; p++) begin
      int n;
      n = 1 + ($urandom % 20);
      msg.delete();
      for (int i = 0; i < n; i++) begin
        msg.push_back({$urandom, $urandom});
        @(negedge clk);
        init = (i == 0);
        en   = 1;
        data = msg[i];
        @(negedge clk);
        init = 0;
        en   = 0;
        if ($urandom % 2 != 0) @(negedge clk);
      end
      checks++;
      if (crc !== crc_ref(msg)) begin
        failures++;
        $display("FAIL packet %0d: crc %h expected %h", p, crc, crc_ref(msg));
      end
    end
    // init alone returns to the initial value
    @(negedge clk); init = 1; @(negedge clk); init = 0;
    checks++;
    if (crc !== 16'h0000) begin failures++; $display("FAIL init"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
