// onu_frame_rx: downstream superframe parser of an ONU.
//
// Takes the decoded downstream characters, two per 80 MHz cycle, word-
// aligned so that the superframe's K28.5 is character 0 of word 0, and
// follows the superframe K | T F D1 D2 x64 | T F R (130 words):
//  * T (trigger byte) of every subframe is output in the cycle its word
//    arrives (trig_valid_o, every second cycle = every 25 ns), F one cycle
//    later (aux_valid_o);
//  * D1 D2 of slot s is a command for this ONU when D1[7] = 1 and s is this
//    ONU's address, or for every ONU when D1[7] = 0; the 15-bit payload
//    {D1[6:0], D2} is output with cmd_valid_o, payload 0 meaning "none";
//  * R (last character) is output on r_valid_o; grant_o pulses when it
//    carries this ONU's address.
// It locks on a K in character 0 and stays locked while the K comes back
// every 130 words; a missing or misplaced K drops the lock (sync_err_o) and
// it relocks on the next K. Decoding errors while locked pulse code_err_o.
// The field layout and addressing rules follow the published protocol; the
// lock rules and output timing are this design's.
module onu_frame_rx
  import pon_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  onu_addr_t   my_addr_i,
  input  logic [15:0] data_i,       // char 0 in [7:0]
  input  logic [1:0]  k_i,
  input  logic        err_i,        // a decoding error in this word
  output logic        locked_o,
  output logic        sof_o,        // word 0 seen
  output logic        trig_valid_o,
  output logic [7:0]  trig_o,
  output logic        aux_valid_o,
  output logic [7:0]  aux_o,
  output logic        cmd_valid_o,
  output logic        cmd_bcast_o,
  output logic [14:0] cmd_payload_o,
  output logic        r_valid_o,
  output onu_addr_t   r_o,
  output logic        grant_o,
  output logic        sync_err_o,
  output logic        code_err_o
);

  localparam int unsigned WB = $clog2(SF_WORDS);

  logic [WB-1:0] w_q;        // index of the previous word
  logic [WB-1:0] w;          // index of this word
  logic          is_k, last;
  logic [7:0]    d1_q;
  logic          d1_mine_q;

  assign is_k = k_i[0] && data_i[7:0] == K28_5;
  assign last = (w_q == WB'(SF_WORDS - 1));
  assign w    = last ? '0 : w_q + 1'b1;

  always_ff @(posedge clk) begin
    if (rst) begin
      w_q <= '0;
      locked_o <= 1'b0;
      {sof_o, trig_valid_o, aux_valid_o, cmd_valid_o, r_valid_o, grant_o,
       sync_err_o, code_err_o} <= '0;
      trig_o <= '0; aux_o <= '0; cmd_bcast_o <= 1'b0; cmd_payload_o <= '0;
      r_o <= '0; d1_q <= '0; d1_mine_q <= 1'b0;
    end else begin
      {sof_o, trig_valid_o, aux_valid_o, cmd_valid_o, r_valid_o, grant_o,
       sync_err_o, code_err_o} <= '0;
      if (!locked_o) begin
        if (is_k) begin
          locked_o <= 1'b1;
          w_q      <= '0;
          sof_o    <= 1'b1;
          trig_valid_o <= 1'b1;
          trig_o   <= data_i[15:8];
        end
      end else if ((w == '0) != is_k) begin
        // K missing at word 0 or found elsewhere: drop lock
        sync_err_o <= 1'b1;
        locked_o   <= is_k;
        w_q        <= '0;
        sof_o      <= is_k;
      end else begin
        w_q        <= w;
        sof_o      <= (w == '0);
        code_err_o <= err_i || k_i[1];  // no K is sent in char 1
        if (!w[0]) begin
          // {K or D2, T}
          trig_valid_o <= 1'b1;
          trig_o       <= data_i[15:8];
          if (w != '0) begin
            automatic logic [14:0] pl = {d1_q[6:0], data_i[7:0]};
            if (pl != '0 && (d1_mine_q || !d1_q[7])) begin
              cmd_valid_o   <= 1'b1;
              cmd_bcast_o   <= !d1_q[7];
              cmd_payload_o <= pl;
            end
          end
        end else begin
          // {F, D1} or {F, R}
          aux_valid_o <= 1'b1;
          aux_o       <= data_i[7:0];
          if (w == WB'(SF_WORDS - 1)) begin
            r_valid_o <= 1'b1;
            r_o       <= data_i[14:8];
            grant_o   <= (my_addr_i != '0) && (data_i[15:8] == {1'b0, my_addr_i});
          end else begin
            d1_q      <= data_i[15:8];
            d1_mine_q <= (onu_addr_t'(w >> 1) + 7'd1) == my_addr_i;
          end
        end
      end
    end
  end

endmodule
