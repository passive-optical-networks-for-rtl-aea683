// onu: logic of one Optical Network Unit.
//
// Downstream: the deserializer's 20-bit words (recovered 80 MHz clock) are
// word-aligned on the superframe comma by the barrel shifter, decoded two
// characters per cycle and parsed: the ONU outputs the trigger byte every
// 25 ns, the auxiliary byte, the commands addressed to it or broadcast, and
// the barrel-shifter position that measures its receive latency.
// Upstream: when an R character carries this ONU's address, the burst
// transmitter sends one frame (preamble, SFD, address, 90 data bytes) with
// the laser enabled, one 10-bit code group per cycle of the same recovered
// clock, to the serializer.
//
// Timing: a trigger present in the word that completes the deserializer
// input is output 4 cycles later for a fixed barrel-shifter position;
// the grant reaches the transmitter the cycle after R is decoded.
// The split into these blocks follows the published ONU receiver and
// protocol; register stages are this design's.
module onu
  import pon_pkg::*;
#(
  parameter int unsigned LASER_ON_CYCLES = 2
) (
  input  logic        clk,            // recovered 80 MHz parallel clock
  input  logic        rst,
  input  onu_addr_t   my_addr_i,
  // downstream from the deserializer
  input  logic [19:0] rx_word_i,
  output logic [4:0]  bs_pos_o,
  output logic        bs_locked_o,
  output logic        frame_locked_o,
  output logic        sof_o,
  output logic        trig_valid_o,
  output logic [7:0]  trig_o,
  output logic        aux_valid_o,
  output logic [7:0]  aux_o,
  output logic        cmd_valid_o,
  output logic        cmd_bcast_o,
  output logic [14:0] cmd_payload_o,
  output logic        grant_o,
  output logic        rx_err_o,
  // upstream
  input  logic [7:0]  pl_data_i,
  output logic        pl_rd_o,
  output logic [9:0]  tx_code_o,
  output logic        laser_en_o,
  output logic        tx_busy_o
);

  logic [19:0] aligned;
  logic        comma;
  logic        rd_q, rd_mid, rd_n;
  logic [7:0]  d0, d1;
  logic        k0, k1, ce0, ce1, de0, de1;
  logic [15:0] data_q;
  logic [1:0]  k_q;
  logic        err_q;
  logic        sync_err, code_err;
  onu_addr_t   r_unused;
  logic        r_valid_unused;

  onu_barrel_shifter u_bs (
    .clk, .rst, .rx_word_i,
    .aligned_o(aligned), .comma_o(comma), .pos_o(bs_pos_o), .locked_o(bs_locked_o)
  );

  // the comma restarts the running disparity from its own bits
  dec8b10b u_dec0 (.code_i(aligned[9:0]),  .rd_i(rd_q),   .d_o(d0), .k_o(k0),
                   .code_err_o(ce0), .disp_err_o(de0), .rd_o(rd_mid));
  dec8b10b u_dec1 (.code_i(aligned[19:10]), .rd_i(rd_mid), .d_o(d1), .k_o(k1),
                   .code_err_o(ce1), .disp_err_o(de1), .rd_o(rd_n));

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_q   <= 1'b0;
      data_q <= '0;
      k_q    <= '0;
      err_q  <= 1'b0;
    end else begin
      rd_q   <= rd_n;
      data_q <= {d1, d0};
      k_q    <= {k1, k0};
      err_q  <= ce0 | ce1 | ((de0 | de1) && !comma);
    end
  end

  onu_frame_rx u_frx (
    .clk, .rst, .my_addr_i,
    .data_i(data_q), .k_i(k_q), .err_i(err_q),
    .locked_o(frame_locked_o), .sof_o,
    .trig_valid_o, .trig_o, .aux_valid_o, .aux_o,
    .cmd_valid_o, .cmd_bcast_o, .cmd_payload_o,
    .r_valid_o(r_valid_unused), .r_o(r_unused), .grant_o,
    .sync_err_o(sync_err), .code_err_o(code_err)
  );

  assign rx_err_o = sync_err | code_err;

  onu_burst_tx #(.LASER_ON_CYCLES(LASER_ON_CYCLES)) u_tx (
    .clk, .rst, .my_addr_i, .grant_i(grant_o),
    .pl_data_i, .pl_rd_o, .tx_code_o, .laser_en_o, .busy_o(tx_busy_o)
  );

endmodule
