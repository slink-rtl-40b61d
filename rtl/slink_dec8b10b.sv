// slink_dec8b10b: combinational 8b10b decoder for one 10-bit symbol.
//
// `din` is abcdei fghj with `a` in bit 9, as slink_enc8b10b produces it.
// Each sub-block is looked up against both disparity forms of every code,
// so the decoder needs no running-disparity state. `kout` flags a control
// character (K28.y, K23.7, K27.7, K29.7, K30.7); `err` flags a 6-bit or
// 4-bit sub-block that is no legal code. Disparity errors are not checked:
// this is this design's simplification, the protocol only names 8b10b.
module slink_dec8b10b (
  input  logic [9:0] din,
  output logic [7:0] dout,
  output logic       kout,
  output logic       err
);

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

  logic [5:0] s6;
  logic [3:0] s4;
  logic [4:0] x;
  logic [2:0] y;
  logic       hit6, hit4, k28, k7;

  always_comb begin
    s6 = din[9:4];
    s4 = din[3:0];
    x = '0; hit6 = 1'b0;
    for (int i = 0; i < 32; i++) begin
      if (s6 == code6(5'(i)) || (s6 == ~code6(5'(i)) && ($countones(code6(5'(i))) != 3 || i == 7))) begin
        x = 5'(i);
        hit6 = 1'b1;
      end
    end
    k28 = (s6 == 6'b001111 || s6 == 6'b110000);
    if (k28) begin
      x = 5'd28;
      hit6 = 1'b1;
    end
    // 4b sub-block; 0111/1000 is D.x.A7 or, after x = 23/27/29/30, K.x.7.
    hit4 = 1'b1;
    k7 = 1'b0;
    case (s4)
      4'b1011, 4'b0100: y = 3'd0;
      4'b1001:          y = 3'd1;
      4'b0110:          y = k28 ? 3'd1 : 3'd6;
      4'b0101:          y = k28 ? 3'd5 : 3'd2;
      4'b1010:          y = k28 ? 3'd2 : 3'd5;
      4'b1100, 4'b0011: y = 3'd3;
      4'b1101, 4'b0010: y = 3'd4;
      4'b1110, 4'b0001: y = 3'd7;
      4'b0111, 4'b1000: begin y = 3'd7; k7 = 1'b1; end
      default: begin y = 3'd0; hit4 = 1'b0; end
    endcase
    // K28.1 and K28.6 share their 4b codes with opposite polarity; the
    // disparity of the 6b half tells them apart.
    if (k28 && (s4 == 4'b1001 || s4 == 4'b0110))
      y = ((s6 == 6'b001111) == (s4 == 4'b1001)) ? 3'd1 : 3'd6;
    if (k28 && (s4 == 4'b0101 || s4 == 4'b1010))
      y = ((s6 == 6'b001111) == (s4 == 4'b1010)) ? 3'd5 : 3'd2;
    kout = k28 || (k7 && (x == 5'd23 || x == 5'd27 || x == 5'd29 || x == 5'd30));
    dout = {y, x};
    err  = !hit6 || !hit4;
  end

endmodule
