// onu_barrel_shifter: word alignment of the ONU's deserialized downstream.
//
// The receiver's divide-by-10 parallel clock can start on any edge of the
// serial clock, so each 20-bit word from the deserializer may begin at any
// of 20 bit positions of the code-group stream. Every superframe starts
// with the comma K28.5; this block looks for it at each of the 20 offsets
// of the window {current word, previous word}, remembers the offset where
// it was found and shifts all words by it, so the K always lands in
// bits [9:0] of the output. The offset (0..19, one step = one 625 ps serial
// bit) is brought out: it is the measure of the receiver's latency that a
// phase-correcting PLL would use.
//
// Interface: rx_word_i, bit 0 earliest, one word per recovered 80 MHz
// clock. aligned_o is cut from the previous and the current input word and
// registered, so it lags the input by one to two words depending on the
// offset; comma_o marks an aligned word whose bits [9:0] are K28.5; pos_o and
// locked_o report the offset in use. Realignment happens on any comma found
// at a new offset (8b/10b data cannot form a comma).
// The comma search and the position output follow the published receiver;
// the window and register stages are this design's.
module onu_barrel_shifter
  import pon_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [19:0] rx_word_i,
  output logic [19:0] aligned_o,
  output logic        comma_o,
  output logic [4:0]  pos_o,
  output logic        locked_o
);

  logic [19:0] prev_q;
  logic [39:0] win;
  logic [4:0]  hit_pos, use_pos;
  logic        hit;

  assign win = {rx_word_i, prev_q};

  always_comb begin
    hit     = 1'b0;
    hit_pos = '0;
    for (int p = 19; p >= 0; p--) begin
      if (win[p +: 10] == K28_5_RDN || win[p +: 10] == K28_5_RDP) begin
        hit     = 1'b1;
        hit_pos = 5'(p);
      end
    end
    use_pos = hit ? hit_pos : pos_o;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      prev_q    <= '0;
      aligned_o <= '0;
      comma_o   <= 1'b0;
      pos_o     <= '0;
      locked_o  <= 1'b0;
    end else begin
      prev_q    <= rx_word_i;
      aligned_o <= win[6'(use_pos) +: 20];
      comma_o   <= hit;
      if (hit) begin
        pos_o    <= hit_pos;
        locked_o <= 1'b1;
      end
    end
  end

endmodule
