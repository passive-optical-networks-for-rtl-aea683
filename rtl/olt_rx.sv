// olt_rx: burst-mode upstream receiver of the OLT.
//
// The 800 Mb/s upstream line, where bursts from different ONUs arrive with
// different phases and powers, is deserialized at 5x oversampling into OS*NB
// samples per clock. The chain is: blind-oversampling bit recovery with a
// majority-vote phase decision (olt_oversampler), comma alignment into
// 10-bit groups (comma_aligner), 8b/10b decoding, and the upstream frame
// parser (olt_burst_rx) that delivers each burst's ONU address and 90 data
// bytes.
//
// Interface: samples_i (sample 0 earliest) on clk, the deserializer's
// parallel clock (with NB = 4, 4 bits or 20 samples per cycle, 200 MHz);
// all outputs on clk. The decoder's running disparity is reset by each
// comma, whose own bits set it.
// Oversampling x5, the 20-sample parallel input and majority voting follow
// the published receiver; window length and structure are this design's.
module olt_rx
  import pon_pkg::*;
#(
  parameter int unsigned OS  = 5,
  parameter int unsigned NB  = 4,
  parameter int unsigned WIN = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [OS*NB-1:0] samples_i,
  output logic [$clog2(OS)-1:0] phase_o,
  output logic             aligned_o,
  output logic             sof_o,
  output logic             data_valid_o,
  output logic [7:0]       data_o,
  output logic [6:0]       data_idx_o,
  output logic             frame_done_o,
  output logic             frame_ok_o,
  output logic [15:0]      frame_addr_o
);

  logic [NB-1:0] bits;
  logic          upd_unused;
  logic [9:0]    code;
  logic          cvalid, comma;
  logic          rd_q, rd_n;
  logic [7:0]    d;
  logic          k, ce, de;
  logic          v_q, k_q, err_q;
  logic [7:0]    d_q;

  olt_oversampler #(.OS(OS), .NB(NB), .WIN(WIN)) u_os (
    .clk, .rst, .samples_i, .bits_o(bits), .phase_o, .update_o(upd_unused)
  );

  comma_aligner #(.NB(NB)) u_al (
    .clk, .rst, .bits_i(bits),
    .code_o(code), .valid_o(cvalid), .comma_o(comma), .locked_o(aligned_o)
  );

  dec8b10b u_dec (.code_i(code), .rd_i(rd_q), .d_o(d), .k_o(k),
                  .code_err_o(ce), .disp_err_o(de), .rd_o(rd_n));

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_q <= 1'b0; v_q <= 1'b0; k_q <= 1'b0; err_q <= 1'b0; d_q <= '0;
    end else begin
      if (cvalid) rd_q <= rd_n;
      v_q   <= cvalid;
      d_q   <= d;
      k_q   <= k;
      err_q <= ce | (de && !comma);
    end
  end

  olt_burst_rx u_frm (
    .clk, .rst, .valid_i(v_q), .d_i(d_q), .k_i(k_q), .err_i(err_q),
    .sof_o, .data_valid_o, .data_o, .data_idx_o,
    .frame_done_o, .frame_ok_o, .frame_addr_o
  );

endmodule
