// enc8b10b: 8b/10b encoder (one character), combinational.
//
// The standard Widmer-Franaszek code used on both directions of the link:
// the 5 low bits EDCBA map to a 6-bit group abcdei and the 3 high bits HGF to
// a 4-bit group fghj, each chosen from the running disparity (RD) so that
// the line stays DC balanced. Control characters K28.0-K28.7, K23.7, K27.7,
// K29.7 and K30.7 are supported; K28.5 is the comma that marks the start of
// a superframe (downstream) and of a burst (upstream).
//
// Interface: rd_i is the running disparity before the character
// (0 = RD-, 1 = RD+), rd_o the disparity after it; chain rd_o to rd_i of the
// next character and register it once per clock. code_o = {j,h,g,f,i,e,d,c,b,a},
// bit a first on the line. No clock: the caller registers the result, so two
// instances in series encode two characters per cycle.
// The link's use of 8b/10b is from the published protocol; the encoder
// itself is the standard code.
module enc8b10b (
  input  logic       k_i,     // 1: control character
  input  logic [7:0] d_i,     // HGFEDCBA
  input  logic       rd_i,
  output logic [9:0] code_o,
  output logic       rd_o
);

  // 6-bit group abcdei (a = bit 5 of the literal) for RD-.
  function automatic logic [5:0] tab6(input logic [4:0] x);
    case (x)
      5'd0:  tab6 = 6'b100111;  5'd1:  tab6 = 6'b011101;
      5'd2:  tab6 = 6'b101101;  5'd3:  tab6 = 6'b110001;
      5'd4:  tab6 = 6'b110101;  5'd5:  tab6 = 6'b101001;
      5'd6:  tab6 = 6'b011001;  5'd7:  tab6 = 6'b111000;
      5'd8:  tab6 = 6'b111001;  5'd9:  tab6 = 6'b100101;
      5'd10: tab6 = 6'b010101;  5'd11: tab6 = 6'b110100;
      5'd12: tab6 = 6'b001101;  5'd13: tab6 = 6'b101100;
      5'd14: tab6 = 6'b011100;  5'd15: tab6 = 6'b010111;
      5'd16: tab6 = 6'b011011;  5'd17: tab6 = 6'b100011;
      5'd18: tab6 = 6'b010011;  5'd19: tab6 = 6'b110010;
      5'd20: tab6 = 6'b001011;  5'd21: tab6 = 6'b101010;
      5'd22: tab6 = 6'b011010;  5'd23: tab6 = 6'b111010;
      5'd24: tab6 = 6'b110011;  5'd25: tab6 = 6'b100110;
      5'd26: tab6 = 6'b010110;  5'd27: tab6 = 6'b110110;
      5'd28: tab6 = 6'b001110;  5'd29: tab6 = 6'b101110;
      5'd30: tab6 = 6'b011110;  default: tab6 = 6'b101011;
    endcase
  endfunction

  // 4-bit group fghj (f = bit 3 of the literal) for RD-; y = 8 selects the
  // alternate A7 form of y = 7.
  function automatic logic [3:0] tab4(input logic [3:0] y);
    case (y)
      4'd0: tab4 = 4'b1011;  4'd1: tab4 = 4'b1001;
      4'd2: tab4 = 4'b0101;  4'd3: tab4 = 4'b1100;
      4'd4: tab4 = 4'b1101;  4'd5: tab4 = 4'b1010;
      4'd6: tab4 = 4'b0110;  4'd7: tab4 = 4'b1110;
      default: tab4 = 4'b0111;
    endcase
  endfunction

  logic [4:0] x;
  logic [2:0] y;
  logic [5:0] g6;
  logic [3:0] g4;
  logic       rd_mid, use_a7;
  logic [9:0] abcdeifghj;

  assign x = d_i[4:0];
  assign y = d_i[7:5];

  always_comb begin
    // 6b group
    if (k_i && x == 5'd28) g6 = 6'b001111;
    else                   g6 = tab6(x);
    if (rd_i && (($countones(g6) != 3) || (x == 5'd7 && !k_i)))
      g6 = ~g6;
    rd_mid = rd_i ^ ($countones(g6) != 3);

    // 4b group
    use_a7 = (y == 3'd7) &&
             (k_i ||
              (!rd_mid && (x == 5'd17 || x == 5'd18 || x == 5'd20)) ||
              ( rd_mid && (x == 5'd11 || x == 5'd13 || x == 5'd14)));
    g4 = tab4(use_a7 ? 4'd8 : {1'b0, y});
    if (rd_mid && (($countones(g4) != 2) || y == 3'd3))
      g4 = ~g4;
    // K28.y with RD- after the 6b group: balanced fghj is inverted so that
    // the comma sequence is kept.
    if (k_i && x == 5'd28 && !rd_mid &&
        (y == 3'd1 || y == 3'd2 || y == 3'd5 || y == 3'd6))
      g4 = ~g4;
    rd_o = rd_mid ^ ($countones(g4) != 2);

    abcdeifghj = {g6, g4};
    for (int i = 0; i < 10; i++) code_o[i] = abcdeifghj[9-i];
  end

endmodule
