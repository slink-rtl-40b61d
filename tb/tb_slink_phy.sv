// tb_slink_phy: loops the 8b10b transmit half of the PHY back into its
// receive half and checks, with random data and control bytes on all four
// lanes, that every byte and K flag comes back without a code error, that
// each 10-bit symbol has four, five or six ones and that the running
// disparity of every lane's bit stream stays within +-1 of its start (a
// property check independent of the code tables). It also checks the
// well-known K28.5 symbols for both disparities and that a symbol of all
// zeros is flagged as a code error.
module tb_slink_phy;
  import slink_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NUM_LANES-1:0][15:0] tx_data = '0, rx_data;
  logic [NUM_LANES-1:0][1:0]  tx_k = '0, rx_k, rx_err;
  logic [NUM_LANES-1:0][19:0] tx_sym, rx_sym;
  int checks = 0, failures = 0;

  slink_phy dut (.*);

  localparam logic [7:0] KLIST [12] = '{8'h1C, 8'h3C, 8'h5C, 8'h7C, 8'h9C, 8'hBC,
                                        8'hDC, 8'hFC, 8'hF7, 8'hFB, 8'hFD, 8'hFE};

  logic        bad_sym = 0;
  assign rx_sym = bad_sym ? '0 : tx_sym;

  // expected outputs: two clocks after the input (encode, then decode)
  logic [NUM_LANES-1:0][15:0] d1, d2;
  logic [NUM_LANES-1:0][1:0]  k1, k2;
  int disp [NUM_LANES];
  int started = 0;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ones10(logic [9:0] s);
    return $countones(s);
  endfunction

  initial begin
    foreach (disp[l]) disp[l] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // K28.5 from RD- then RD+ on lane 0
    tx_data[0] = {K_COM, K_COM}; tx_k[0] = 2'b11;
    @(posedge clk); #1;
    checks++;
    if (tx_sym[0][9:0] !== 10'b0011111010 || tx_sym[0][19:10] !== 10'b1100000101) begin
      failures++; $display("FAIL: K28.5 symbols %b %b", tx_sym[0][9:0], tx_sym[0][19:10]);
    end
    for (int c = 0; c < 1500; c++) begin
      @(negedge clk);
      for (int l = 0; l < NUM_LANES; l++)
        for (int b = 0; b < 2; b++) begin
          if ($urandom % 4 == 0) begin
            tx_k[l][b] = 1'b1;
            tx_data[l][8*b +: 8] = KLIST[$urandom % 12];
          end else begin
            tx_k[l][b] = 1'b0;
            tx_data[l][8*b +: 8] = 8'($urandom);
          end
        end
    end
    @(negedge clk);
    bad_sym = 1;
    @(posedge clk); #1;
    checks++;
    if (rx_err !== '1) begin failures++; $display("FAIL: all-zero symbols not flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    d1 <= tx_data; k1 <= tx_k;
    d2 <= d1;      k2 <= k1;
    if (rst_n) started <= started + 1;
    if (started >= 3 && !bad_sym) begin
      for (int l = 0; l < NUM_LANES; l++) begin
        checks++;
        if (rx_data[l] !== d2[l] || rx_k[l] !== k2[l] || rx_err[l] !== 2'b00) begin
          failures++;
          $display("FAIL lane %0d: got %h/%b/%b expected %h/%b", l, rx_data[l], rx_k[l], rx_err[l], d2[l], k2[l]);
        end
      end
    end
    if (started >= 2 && !bad_sym) begin
      for (int l = 0; l < NUM_LANES; l++)
        for (int b = 0; b < 2; b++) begin
          int o;
          o = ones10(tx_sym[l][10*b +: 10]);
          disp[l] = disp[l] + 2 * o - 10;
          checks++;
          if (o < 4 || o > 6 || disp[l] < -2 || disp[l] > 2) begin
            failures++;
            $display("FAIL lane %0d: symbol %b, running disparity %0d", l, tx_sym[l][10*b +: 10], disp[l]);
          end
        end
    end
  end
endmodule
