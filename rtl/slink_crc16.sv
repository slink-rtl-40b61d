// slink_crc16: running CRC-16 over a stream of 64-bit packet words.
//
// The same unit serves as the "crc" generator on the transmit side and the
// "crc_ck" checker on the receive side. `init` restarts the CRC at CRC_INIT;
// every cycle with `en` high folds one 64-bit word in, most significant bit
// first, with the CRC-16 polynomial x^16 + x^15 + x^2 + 1 (0x8005). `crc`
// is the registered result and is valid the cycle after the last word.
// `init` and `en` in the same cycle restart the CRC and fold the word in.
// CRC-16 is named by the protocol; the polynomial, the initial value and the
// bit order are this design's choice.
module slink_crc16
  import slink_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,
  input  logic        en,
  input  logic [63:0] data,
  output logic [15:0] crc
);

  logic [15:0] base;

  always_comb base = init ? CRC_INIT : crc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                crc <= CRC_INIT;
    else if (en)               crc <= crc16_word(base, data);
    else if (init)             crc <= CRC_INIT;
  end

endmodule
