// olt_frame_gen: downstream superframe generator and 40->80 MHz gearbox.
//
// Builds the OLT's downstream superframe, two characters per 80 MHz word
// (char 0 in bits [7:0] goes out first):
//   K | T F D1 D2 (slot 1) | ... | T F D1 D2 (slot 64) | T F R
// 260 characters = 130 words = 1.625 us at 1.6 Gb/s. T (trigger byte) and
// F (auxiliary byte) are taken once per 25 ns bunch crossing: bx_o is high
// in every other cycle and trig_i / aux_i are sampled at the end of that
// cycle, into the word registered at the same edge, so triggers are exactly
// 4 characters (25 ns) apart, across superframe boundaries too.
// D1/D2 of slot s carry a command for ONU s, or a broadcast: D1[7] = 1 for
// an individual command, 0 for a broadcast, D1[6:0] D2 = 15-bit payload;
// 0x00 0x00 means no command. R carries the address chosen by
// olt_bw_alloc for the next upstream burst.
//
// Commands enter through a valid/ready port into one mailbox per ONU and a
// broadcast mailbox; a pending broadcast takes the next slot whatever its
// ONU, else slot s carries ONU s's mailbox. cmd_ready_o is low while the
// target mailbox is full. Out-of-range addresses are accepted and dropped.
// tx_k_o has one flag per character for the encoders; only character 0
// of word 0 is ever a K, so tx_k_o[1] is constant 0.
// Frame layout, field sizes and the D1 MSB rule are from the published
// protocol; the mailboxes, the broadcast priority and the idle value are this
// design's choices.
module olt_frame_gen
  import pon_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  // bunch-crossing input (40 MHz rate)
  output logic              bx_o,
  input  logic [7:0]        trig_i,
  input  logic [7:0]        aux_i,
  // commands
  input  logic              cmd_valid_i,
  output logic              cmd_ready_o,
  input  logic              cmd_bcast_i,
  input  onu_addr_t         cmd_onu_i,
  input  logic [14:0]       cmd_payload_i,
  // upstream arbitration
  input  logic [N_SLOTS-1:0] onu_enable_i,
  output onu_addr_t         r_addr_o,     // address sent in the last R
  // parallel output, 2 characters per cycle
  output logic [15:0]       tx_data_o,
  output logic [1:0]        tx_k_o,
  output logic              sof_o         // word 0 (K) of a superframe
);

  localparam int unsigned WB = $clog2(SF_WORDS);

  logic [WB-1:0]     w_q;                 // index of the word being built
  logic [7:0]        f_q, d2_q;
  logic [N_SLOTS-1:0] mb_valid_q;
  logic [14:0]       mb_payload_q [N_SLOTS];
  logic              bc_valid_q;
  logic [14:0]       bc_payload_q;
  onu_addr_t         grant;
  logic              is_last, even;
  logic [5:0]        slot;                // slot of the D1 being built
  logic              in_range, take_bc, take_mb, acc;

  assign even    = !w_q[0];
  assign is_last = (w_q == WB'(SF_WORDS - 1));
  assign bx_o    = even;
  assign slot    = 6'(w_q >> 1);

  olt_bw_alloc #(.SLOTS(N_SLOTS)) u_alloc (
    .clk, .rst, .onu_enable_i,
    .advance_i(is_last),
    .grant_o  (grant)
  );

  // command intake
  assign in_range    = (cmd_onu_i >= 7'd1) && (cmd_onu_i <= 7'(N_SLOTS));
  assign cmd_ready_o = cmd_bcast_i ? !bc_valid_q
                     : (!in_range || !mb_valid_q[6'(cmd_onu_i - 7'd1)]);
  assign acc         = cmd_valid_i && cmd_ready_o;
  // command output in the D1 word of slot `slot`
  assign take_bc = !even && !is_last && bc_valid_q;
  assign take_mb = !even && !is_last && !bc_valid_q && mb_valid_q[slot];

  always_ff @(posedge clk) begin
    if (rst) begin
      w_q        <= '0;
      f_q        <= '0;
      d2_q       <= '0;
      mb_valid_q <= '0;
      bc_valid_q <= 1'b0;
      tx_data_o  <= '0;
      tx_k_o     <= '0;
      sof_o      <= 1'b0;
      r_addr_o   <= '0;
    end else begin
      w_q   <= is_last ? '0 : w_q + 1'b1;
      sof_o <= (w_q == '0);
      if (even) begin
        // {K or D2 of the previous slot, T}
        tx_data_o <= {trig_i, (w_q == '0) ? K28_5 : d2_q};
        tx_k_o    <= {1'b0, (w_q == '0)};
        f_q       <= aux_i;
      end else if (is_last) begin
        // {F, R}
        tx_data_o <= {1'b0, grant, f_q};
        tx_k_o    <= 2'b00;
        r_addr_o  <= grant;
      end else begin
        // {F, D1}
        tx_k_o <= 2'b00;
        if (take_bc) begin
          tx_data_o <= {1'b0, bc_payload_q[14:8], f_q};
          d2_q      <= bc_payload_q[7:0];
        end else if (take_mb) begin
          tx_data_o <= {1'b1, mb_payload_q[slot][14:8], f_q};
          d2_q      <= mb_payload_q[slot][7:0];
        end else begin
          tx_data_o <= {8'h00, f_q};
          d2_q      <= 8'h00;
        end
      end

      // mailboxes
      if (take_bc) bc_valid_q <= 1'b0;
      if (take_mb) mb_valid_q[slot] <= 1'b0;
      if (acc && cmd_bcast_i) begin
        bc_valid_q   <= 1'b1;
        bc_payload_q <= cmd_payload_i;
      end else if (acc && in_range) begin
        mb_valid_q[6'(cmd_onu_i - 7'd1)]   <= 1'b1;
        mb_payload_q[6'(cmd_onu_i - 7'd1)] <= cmd_payload_i;
      end
    end
  end

endmodule
