// enc8b10b_pkg: the 8b/10b code (IEEE 802.3 clause 36 / Widmer-Franaszek) as a
// function, shared by the encoder and by the decoder, whose lookup table is the
// inverse of this function computed at elaboration.
// Bit order of a 10-bit code group: bit 0 is 'a', bit 5 is 'i', bit 6 is 'f',
// bit 9 is 'j'; bit 0 is sent first. K28.5 with negative running disparity is
// then 10'h17C. Running disparity: 0 = negative (RD-), 1 = positive (RD+).
// Valid control characters: K28.0..K28.7, K23.7, K27.7, K29.7, K30.7.
package enc8b10b_pkg;
  // 5b/6b code for RD-, written abcdei (a = MSB of the literal).
  function automatic logic [5:0] code6_rdn(input logic [4:0] x);
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

  // 3b/4b data code for RD-, written fghj.
  function automatic logic [3:0] code4_rdn(input logic [2:0] y);
    case (y)
      3'd0: return 4'b1011;  3'd1: return 4'b1001;
      3'd2: return 4'b0101;  3'd3: return 4'b1100;
      3'd4: return 4'b1101;  3'd5: return 4'b1010;
      3'd6: return 4'b0110;  default: return 4'b1110;
    endcase
  endfunction

  function automatic int unsigned ones(input logic [5:0] v);
    int unsigned n = 0;
    for (int i = 0; i < 6; i++) n += v[i];
    return n;
  endfunction

  // Is {k, d} a control character this code defines?
  function automatic logic k_valid(input logic [7:0] d);
    return (d[4:0] == 5'd28) ||
           (d[7:5] == 3'd7 && (d[4:0] == 5'd23 || d[4:0] == 5'd27 ||
                               d[4:0] == 5'd29 || d[4:0] == 5'd30));
  endfunction

  // Encode one byte. Returns {new running disparity, code[9:0]}.
  function automatic logic [10:0] encode(input logic [7:0] d, input logic k,
                                         input logic rd);
    logic [4:0] x;
    logic [2:0] y;
    logic [5:0] c6;
    logic [3:0] c4;
    logic       rd1, rd2;
    logic [9:0] code;
    x = d[4:0];
    y = d[7:5];
    // 6-bit sub-block
    c6 = (k && x == 5'd28) ? 6'b001111 : code6_rdn(x);
    if (rd && (ones(c6) != 3 || c6 == 6'b111000)) c6 = ~c6;
    rd1 = (ones(c6) == 3) ? rd : (ones(c6) > 3);
    // 4-bit sub-block
    if (k && x == 5'd28) begin
      case (y)
        3'd0: c4 = 4'b1011;  3'd1: c4 = 4'b0110;
        3'd2: c4 = 4'b1010;  3'd3: c4 = 4'b1100;
        3'd4: c4 = 4'b1101;  3'd5: c4 = 4'b0101;
        3'd6: c4 = 4'b1001;  default: c4 = 4'b0111;
      endcase
      if (rd1) c4 = ~c4;
    end else begin
      if (y == 3'd7 && (k || (!rd1 && (x == 5'd17 || x == 5'd18 || x == 5'd20)) ||
                        (rd1 && (x == 5'd11 || x == 5'd13 || x == 5'd14))))
        c4 = 4'b0111;                        // alternate D.x.A7 / K.x.7
      else
        c4 = code4_rdn(y);
      if (rd1 && (ones({2'b00, c4}) != 2 || c4 == 4'b1100)) c4 = ~c4;
    end
    rd2 = (ones({2'b00, c4}) == 2) ? rd1 : (ones({2'b00, c4}) > 2);
    // abcdei -> bits 0..5, fghj -> bits 6..9
    for (int i = 0; i < 6; i++) code[i]     = c6[5-i];
    for (int i = 0; i < 4; i++) code[6 + i] = c4[3-i];
    return {rd2, code};
  endfunction
endpackage
