// tb_ref_pkg: reference models shared by the SLink testbenches, written
// independently of the RTL.
package tb_ref_pkg;

  // CRC-16 (x^16 + x^15 + x^2 + 1, initial value 0, no reflection) of a
  // message of 64-bit words sent most significant bit first, computed by
  // polynomial long division of M(x) * x^16.
  function automatic logic [15:0] crc_ref(logic [63:0] words [$]);
    logic [16:0] rem;
    logic        b;
    rem = '0;
    for (int w = 0; w < words.size(); w++)
      for (int i = 63; i >= 0; i--) begin
        b   = words[w][i];
        rem = {rem[15:0], b};
        if (rem[16]) rem = rem ^ 17'h18005;
      end
    for (int i = 0; i < 16; i++) begin
      rem = {rem[15:0], 1'b0};
      if (rem[16]) rem = rem ^ 17'h18005;
    end
    return rem[15:0];
  endfunction

endpackage
