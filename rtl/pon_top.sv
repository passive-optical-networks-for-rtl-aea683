// pon_top: FPGA logic of the PON timing-distribution demonstrator.
//
// One Optical Line Terminal (OLT) and N_ONU Optical Network Units (ONUs)
// share one point-to-multipoint fibre. Downstream, the OLT broadcasts a
// fixed-latency 1.6 Gb/s superframe that carries a trigger byte every 25 ns,
// per-ONU or broadcast commands, and an R character granting the upstream
// channel to one ONU per superframe. Upstream, the granted ONU sends an
// 800 Mb/s burst that the OLT recovers with 5x blind oversampling.
//
// The transceivers (serializers, deserializers, CDR, PLLs) and the optics
// are outside this logic: the ports are the transceivers' parallel sides.
//   olt_tx_word_o   20 bits per clk_tx cycle to the OLT serializer
//   onu_rx_word_i   20 bits per onu_clk cycle from each ONU deserializer
//   onu_tx_code_o   10 bits per onu_clk cycle to each ONU serializer, with
//                   onu_laser_en_o switching the ONU's burst laser
//   olt_samples_i   OS*NB samples per clk_os cycle from the OLT's
//                   oversampling deserializer
// clk_tx and each onu_clk are 80 MHz (the ONU's is its recovered clock);
// clk_os is the oversampling deserializer's parallel clock (200 MHz with
// the default 20 samples). rst must be held for a few cycles of every
// clock. The protocol supports 64 ONUs; N_ONU = 2 instances are built, as
// in the published two-ONU demonstrator, with addresses onu_addr_i.
module pon_top
  import pon_pkg::*;
#(
  parameter int unsigned N_ONU           = 2,
  parameter int unsigned LASER_ON_CYCLES = 2,
  parameter int unsigned OS              = 5,
  parameter int unsigned NB              = 4,
  parameter int unsigned WIN             = 16
) (
  input  logic               rst,
  // ---- OLT transmitter, clk_tx ----
  input  logic               clk_tx,
  output logic               bx_o,
  input  logic [7:0]         trig_i,
  input  logic [7:0]         aux_i,
  input  logic               cmd_valid_i,
  output logic               cmd_ready_o,
  input  logic               cmd_bcast_i,
  input  onu_addr_t          cmd_onu_i,
  input  logic [14:0]        cmd_payload_i,
  input  logic [N_SLOTS-1:0] onu_enable_i,
  output onu_addr_t          r_addr_o,
  output logic [19:0]        olt_tx_word_o,
  output logic               olt_sof_o,
  // ---- OLT burst-mode receiver, clk_os ----
  input  logic               clk_os,
  input  logic [OS*NB-1:0]   olt_samples_i,
  output logic [$clog2(OS)-1:0] up_phase_o,
  output logic               up_data_valid_o,
  output logic [7:0]         up_data_o,
  output logic [6:0]         up_data_idx_o,
  output logic               up_frame_done_o,
  output logic               up_frame_ok_o,
  output logic [15:0]        up_frame_addr_o,
  // ---- ONUs, onu_clk[i] ----
  input  logic               onu_clk        [N_ONU],
  input  onu_addr_t          onu_addr_i     [N_ONU],
  input  logic [19:0]        onu_rx_word_i  [N_ONU],
  output logic [4:0]         onu_bs_pos_o   [N_ONU],
  output logic               onu_locked_o   [N_ONU],
  output logic               onu_trig_valid_o [N_ONU],
  output logic [7:0]         onu_trig_o     [N_ONU],
  output logic               onu_aux_valid_o [N_ONU],
  output logic [7:0]         onu_aux_o      [N_ONU],
  output logic               onu_cmd_valid_o [N_ONU],
  output logic               onu_cmd_bcast_o [N_ONU],
  output logic [14:0]        onu_cmd_payload_o [N_ONU],
  output logic               onu_grant_o    [N_ONU],
  output logic               onu_rx_err_o   [N_ONU],
  input  logic [7:0]         onu_pl_data_i  [N_ONU],
  output logic               onu_pl_rd_o    [N_ONU],
  output logic [9:0]         onu_tx_code_o  [N_ONU],
  output logic               onu_laser_en_o [N_ONU]
);

  olt_tx u_olt_tx (
    .clk(clk_tx), .rst, .bx_o, .trig_i, .aux_i,
    .cmd_valid_i, .cmd_ready_o, .cmd_bcast_i, .cmd_onu_i, .cmd_payload_i,
    .onu_enable_i, .r_addr_o, .tx_word_o(olt_tx_word_o), .sof_o(olt_sof_o)
  );

  logic up_aligned_unused, up_sof_unused;

  olt_rx #(.OS(OS), .NB(NB), .WIN(WIN)) u_olt_rx (
    .clk(clk_os), .rst, .samples_i(olt_samples_i),
    .phase_o(up_phase_o), .aligned_o(up_aligned_unused), .sof_o(up_sof_unused),
    .data_valid_o(up_data_valid_o), .data_o(up_data_o), .data_idx_o(up_data_idx_o),
    .frame_done_o(up_frame_done_o), .frame_ok_o(up_frame_ok_o),
    .frame_addr_o(up_frame_addr_o)
  );

  for (genvar i = 0; i < N_ONU; i++) begin : g_onu
    logic bs_locked_unused, sof_unused, busy_unused;
    onu #(.LASER_ON_CYCLES(LASER_ON_CYCLES)) u_onu (
      .clk(onu_clk[i]), .rst, .my_addr_i(onu_addr_i[i]),
      .rx_word_i(onu_rx_word_i[i]),
      .bs_pos_o(onu_bs_pos_o[i]), .bs_locked_o(bs_locked_unused),
      .frame_locked_o(onu_locked_o[i]), .sof_o(sof_unused),
      .trig_valid_o(onu_trig_valid_o[i]), .trig_o(onu_trig_o[i]),
      .aux_valid_o(onu_aux_valid_o[i]), .aux_o(onu_aux_o[i]),
      .cmd_valid_o(onu_cmd_valid_o[i]), .cmd_bcast_o(onu_cmd_bcast_o[i]),
      .cmd_payload_o(onu_cmd_payload_o[i]),
      .grant_o(onu_grant_o[i]), .rx_err_o(onu_rx_err_o[i]),
      .pl_data_i(onu_pl_data_i[i]), .pl_rd_o(onu_pl_rd_o[i]),
      .tx_code_o(onu_tx_code_o[i]), .laser_en_o(onu_laser_en_o[i]),
      .tx_busy_o(busy_unused)
    );
  end

endmodule
