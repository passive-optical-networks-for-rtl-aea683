// comma_aligner: cuts a recovered bit stream into 10-bit code groups.
//
// The oversampler delivers NB bits per cycle (NB <= 10) with no notion of
// character boundaries. This block keeps the last 10+NB bits, searches the
// NB newly completed 10-bit windows for the K28.5 comma (either disparity)
// and, when it finds one, emits that group and counts the following bits
// from its end; without a comma it emits a group each time 10 further bits
// have arrived. Each upstream burst carries a K28.5 after its preamble, so
// the groups are aligned from the start of the frame onward; a comma at a
// new offset realigns at once.
//
// Interface: bits_i (bit 0 earliest); code_o = {j..a} with valid_o,
// registered, at most one group per cycle; comma_o marks a group that is
// K28.5; locked_o is set by the first comma. valid_o is only raised when
// locked. Realigning on the comma of each burst follows the published frame
// format ("comma for frame alignment"); the bit-buffer structure is this
// design's.
module comma_aligner
  import pon_pkg::*;
#(
  parameter int unsigned NB = 4
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [NB-1:0] bits_i,
  output logic [9:0]    code_o,
  output logic          valid_o,
  output logic          comma_o,
  output logic          locked_o
);

  localparam int unsigned HL = 10 + NB;
  localparam int unsigned PB = $clog2(HL + 1);

  logic [9:0]    hist_q;           // last 10 bits, index grows with time
  logic [HL-1:0] hist_n;
  logic [PB-1:0] pend_q, pend, pend_n;
  logic          hit, emit;
  logic [PB-1:0] hit_q;
  logic [9:0]    grp;

  always_comb begin
    hist_n = {bits_i, hist_q};
    pend   = pend_q + PB'(NB);
    hit    = 1'b0;
    hit_q  = '0;
    // comma windows ending in the new bits: start q = HL-NB-9 .. HL-10
    for (int q = HL - 10; q >= int'(HL - NB - 9); q--) begin
      if (hist_n[q +: 10] == K28_5_RDN || hist_n[q +: 10] == K28_5_RDP) begin
        hit   = 1'b1;
        hit_q = PB'(q);
      end
    end
    emit   = 1'b0;
    grp    = '0;
    pend_n = pend;
    if (hit) begin
      emit   = 1'b1;
      grp    = hist_n[hit_q +: 10];
      pend_n = PB'(HL - 10) - hit_q;
    end else if (pend >= PB'(10)) begin
      emit   = 1'b1;
      grp    = hist_n[(PB'(HL) - pend) +: 10];
      pend_n = pend - PB'(10);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hist_q   <= '0;
      pend_q   <= '0;
      code_o   <= '0;
      valid_o  <= 1'b0;
      comma_o  <= 1'b0;
      locked_o <= 1'b0;
    end else begin
      hist_q   <= hist_n[HL-1:NB];
      pend_q   <= pend_n;
      code_o   <= grp;
      valid_o  <= emit && (locked_o || hit);
      comma_o  <= hit;
      if (hit) locked_o <= 1'b1;
    end
  end

endmodule
