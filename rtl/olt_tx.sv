// olt_tx: OLT downstream transmitter (transceiver PCS side).
//
// The superframe generator's 2 characters per 80 MHz cycle are 8b/10b
// encoded by two chained encoders into the 20-bit word handed to the
// transceiver's serializer (1.6 Gb/s). There is deliberately no elastic
// buffer between this word and the serializer: the transceiver is run with
// its TX buffer bypassed and its serial clock phase-aligned to this clock,
// so the path has a fixed latency. In this block a trigger sampled with bx_o
// at a clock edge is in tx_word_o (bits [19:10], the second code group) from
// the next edge on, every time: one cycle, 12.5 ns.
// tx_word_o[9:0] is sent before [19:10]; bit 0 first.
// The structure (frame generator/gearbox, 8b/10b, buffer bypass) follows the
// published transmitter; the register stages are this design's.
module olt_tx
  import pon_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
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
  output logic [19:0]        tx_word_o,
  output logic               sof_o         // tx_word_o holds the K of a superframe
);

  logic [15:0] data;
  logic [1:0]  k;
  logic        sof;
  logic        rd_q, rd_mid, rd_next;
  logic [9:0]  c0, c1;

  olt_frame_gen u_fg (
    .clk, .rst, .bx_o, .trig_i, .aux_i,
    .cmd_valid_i, .cmd_ready_o, .cmd_bcast_i, .cmd_onu_i, .cmd_payload_i,
    .onu_enable_i, .r_addr_o,
    .tx_data_o(data), .tx_k_o(k), .sof_o(sof)
  );

  enc8b10b u_enc0 (.k_i(k[0]), .d_i(data[7:0]),  .rd_i(rd_q),   .code_o(c0), .rd_o(rd_mid));
  enc8b10b u_enc1 (.k_i(k[1]), .d_i(data[15:8]), .rd_i(rd_mid), .code_o(c1), .rd_o(rd_next));

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_q      <= 1'b0;
      tx_word_o <= '0;
      sof_o     <= 1'b0;
    end else begin
      rd_q      <= rd_next;
      tx_word_o <= {c1, c0};
      sof_o     <= sof;
    end
  end

endmodule
