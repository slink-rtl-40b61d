// slink_enc8b10b: combinational 8b10b encoder for one byte.
//
// Standard 8b10b code (5b/6b and 3b/4b sub-blocks). `din` is HGFEDCBA,
// `kin` selects a control character, `rd_in` is the running disparity
// before the symbol (0 = RD-, 1 = RD+) and `rd_out` the disparity after it.
// `dout` is abcdei fghj with `a` in bit 9; bit 0 (`j`) is sent last. Only
// K28.y and K23/27/29/30.7 are legal control characters, which covers every
// K-code SLink uses. The code is the standard one the protocol names; the
// bit order on the output port is this design's choice.
module slink_enc8b10b (
  input  logic [7:0] din,
  input  logic       kin,
  input  logic       rd_in,
  output logic [9:0] dout,
  output logic       rd_out
);

  // 5b/6b code for RD- (abcdei, a = bit 5).
  function automatic logic [5:0] code6(logic [4:0] x);
    case (x)
      5'd0:  return 6'b100111;  5'd1:  return 6'b011101;
      5'd2:  return 6'b101101;  5'd3:  return 6'b110001;
      5'd4:  return 6'b110101;  5'd5:  return 6'b101001;
      5'd6:  return 6'b011001;  5'd7:  return 6'b111000;
      5'd8:  return 6'b111001;  5'd9:  return 6'b100101;
      5'd10: return 6'b010101;  5'd11: return 6'b110100;
      5'd12: return 6'b001101;  5'd13: return 6'b101100;
      5'd14: return 6'b011100;  5'd15: return 6'b010111;
      5'd16: return 6'b011011;  5'd17: return 6'b100011;
      5'd18: return 6'b010011;  5'd19: return 6'b110010;
      5'd20: return 6'b001011;  5'd21: return 6'b101010;
      5'd22: return 6'b011010;  5'd23: return 6'b111010;
      5'd24: return 6'b110011;  5'd25: return 6'b100110;
      5'd26: return 6'b010110;  5'd27: return 6'b110110;
      5'd28: return 6'b001110;  5'd29: return 6'b101110;
      5'd30: return 6'b011110;  default: return 6'b101011;
    endcase
  endfunction

  // 3b/4b code for RD- (fghj, f = bit 3); data and control tables.
  function automatic logic [3:0] code4d(logic [2:0] y, logic alt7);
    case (y)
      3'd0: return 4'b1011;  3'd1: return 4'b1001;
      3'd2: return 4'b0101;  3'd3: return 4'b1100;
      3'd4: return 4'b1101;  3'd5: return 4'b1010;
      3'd6: return 4'b0110;  default: return alt7 ? 4'b0111 : 4'b1110;
    endcase
  endfunction

  function automatic logic [3:0] code4k(logic [2:0] y);
    case (y)
      3'd0: return 4'b1011;  3'd1: return 4'b0110;
      3'd2: return 4'b1010;  3'd3: return 4'b1100;
      3'd4: return 4'b1101;  3'd5: return 4'b0101;
      3'd6: return 4'b1001;  default: return 4'b0111;
    endcase
  endfunction

  logic [4:0] x;
  logic [2:0] y;
  logic [5:0] c6;
  logic [3:0] c4;
  logic       unbal6, unbal4, rd6, alt7;

  always_comb begin
    x = din[4:0];
    y = din[7:5];
    c6 = (kin && x == 5'd28) ? 6'b001111 : code6(x);
    unbal6 = ($countones(c6) != 3);
    if (rd_in && (unbal6 || x == 5'd7)) c6 = ~c6;
    rd6 = rd_in ^ unbal6;
    alt7 = (!rd6 && (x == 5'd17 || x == 5'd18 || x == 5'd20)) ||
           ( rd6 && (x == 5'd11 || x == 5'd13 || x == 5'd14));
    if (kin) begin
      c4 = code4k(y);
      unbal4 = ($countones(c4) != 2);
      if (rd6) c4 = ~c4;
    end else begin
      c4 = code4d(y, alt7);
      unbal4 = ($countones(c4) != 2);
      if (rd6 && (unbal4 || y == 3'd3)) c4 = ~c4;
    end
    rd_out = rd6 ^ unbal4;
    dout   = {c6, c4};
  end

endmodule
