// dec8b10b: 8b/10b decoder (one code group), combinational.
//
// Inverse of enc8b10b. The 6-bit group abcdei is looked up among the 32
// data groups of both disparities (and the K28 group), the 4-bit group fghj
// among the 3b/4b groups. A control character is K28.y, or K23/27/29/30.7
// (recognised by the alternate A7 form after those groups). code_err flags
// a group that is not in the code, disp_err one whose disparity does not
// match the running disparity rd_i (0 = RD-, 1 = RD+). rd_o is the running
// disparity after the group, computed from the received bits so the decoder
// resynchronises after an error.
//
// Interface: code_i = {j,h,g,f,i,e,d,c,b,a} as sent LSB first; no clock, the
// caller registers. Standard code; the error outputs are this design's.
module dec8b10b (
  input  logic [9:0] code_i,
  input  logic       rd_i,
  output logic [7:0] d_o,
  output logic       k_o,
  output logic       code_err_o,
  output logic       disp_err_o,
  output logic       rd_o
);

  // RD- tables in abcdei / fghj order (first line bit = literal MSB).
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

  logic [5:0] g6;
  logic [3:0] g4, g4n;
  logic [4:0] x;
  logic [2:0] y;
  logic       hit6, hit4, k28, a7, rd_mid;
  int unsigned n6, n4;

  always_comb begin
    for (int i = 0; i < 6; i++) g6[5-i] = code_i[i];
    for (int i = 0; i < 4; i++) g4[3-i] = code_i[6+i];

    // 6b -> 5b
    x    = '0;
    hit6 = 1'b0;
    k28  = (g6 == 6'b001111) || (g6 == 6'b110000);
    for (int v = 0; v < 32; v++) begin
      if (g6 == tab6(5'(v)) || g6 == ~tab6(5'(v))) begin
        // balanced groups other than D.07 have a single form; their
        // complement is not a valid group
        if (g6 == tab6(5'(v)) || $countones(tab6(5'(v))) != 3 || v == 7) begin
          x    = 5'(v);
          hit6 = 1'b1;
        end
      end
    end
    if (k28) begin
      x    = 5'd28;
      hit6 = 1'b1;
    end

    // 4b -> 3b; a K28 sent after RD- mid-disparity carries inverted fghj
    g4n = (g6 == 6'b110000) ? ~g4 : g4;
    hit4 = 1'b1;
    a7   = 1'b0;
    case (g4n)
      4'b1011, 4'b0100: y = 3'd0;
      4'b1001:          y = 3'd1;
      4'b0101:          y = 3'd2;
      4'b1100, 4'b0011: y = 3'd3;
      4'b1101, 4'b0010: y = 3'd4;
      4'b1010:          y = 3'd5;
      4'b0110:          y = 3'd6;
      4'b1110, 4'b0001: y = 3'd7;
      4'b0111, 4'b1000: begin y = 3'd7; a7 = 1'b1; end
      default:          begin y = 3'd0; hit4 = 1'b0; end
    endcase

    d_o = {y, x};
    k_o = k28 || (a7 && (x == 5'd23 || x == 5'd27 || x == 5'd29 || x == 5'd30));
    // A7 is legal for data only after D17/18/20 (RD-) or D11/13/14 (RD+)
    code_err_o = !hit6 || !hit4 ||
                 (a7 && !k_o && !(x == 5'd17 || x == 5'd18 || x == 5'd20 ||
                                  x == 5'd11 || x == 5'd13 || x == 5'd14));

    // running disparity
    n6 = $countones(g6);
    n4 = $countones(g4);
    disp_err_o = (n6 > 3 && rd_i) || (n6 < 3 && !rd_i);
    rd_mid = (n6 > 3) ? 1'b1 : (n6 < 3) ? 1'b0 :
             (g6 == 6'b111000) ? 1'b0 : (g6 == 6'b000111) ? 1'b1 : rd_i;
    disp_err_o = disp_err_o || (n4 > 2 && rd_mid) || (n4 < 2 && !rd_mid);
    rd_o = (n4 > 2) ? 1'b1 : (n4 < 2) ? 1'b0 :
           (g4 == 4'b1100) ? 1'b0 : (g4 == 4'b0011) ? 1'b1 : rd_mid;
  end

endmodule
