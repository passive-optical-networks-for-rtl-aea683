// olt_burst_rx: upstream frame parser of the OLT.
//
// Follows one upstream frame in the decoded character stream: it waits for
// the start-of-frame delimiter K28.5 SFD2_BYTE (the preamble before it is
// only for the optical receiver and the sampling phase), takes the 2-byte
// ONU address, then passes on the 90 data bytes and reports the end of the
// frame with its address and whether any character was in error. A
// character other than SFD2_BYTE after the K, or a K inside the frame,
// restarts the hunt.
//
// Interface: one character per valid_i (with its K flag and error flag);
// outputs are registered: data_valid_o/data_o/data_idx_o for the payload,
// frame_done_o with frame_addr_o and frame_ok_o after the last byte.
// Field order and sizes follow the published upstream frame; the SFD's
// second byte and the 16-bit address format are this design's.
module olt_burst_rx
  import pon_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        valid_i,
  input  logic [7:0]  d_i,
  input  logic        k_i,
  input  logic        err_i,
  output logic        sof_o,          // SFD recognised
  output logic        data_valid_o,
  output logic [7:0]  data_o,
  output logic [6:0]  data_idx_o,
  output logic        frame_done_o,
  output logic        frame_ok_o,
  output logic [15:0] frame_addr_o
);

  typedef enum logic [2:0] {HUNT, SFD2, ADDR_HI, ADDR_LO, DATA} state_t;

  state_t     st_q;
  logic [6:0] cnt_q;
  logic       err_q;
  logic       is_k;

  assign is_k = k_i && d_i == K28_5;

  always_ff @(posedge clk) begin
    if (rst) begin
      st_q <= HUNT;
      cnt_q <= '0;
      err_q <= 1'b0;
      sof_o <= 1'b0;
      data_valid_o <= 1'b0;
      data_o <= '0;
      data_idx_o <= '0;
      frame_done_o <= 1'b0;
      frame_ok_o <= 1'b0;
      frame_addr_o <= '0;
    end else begin
      sof_o        <= 1'b0;
      data_valid_o <= 1'b0;
      frame_done_o <= 1'b0;
      if (valid_i) begin
        if (is_k && st_q != SFD2) begin
          st_q <= SFD2;               // (re)start on any comma
        end else begin
          case (st_q)
            HUNT: ;
            SFD2: begin
              if (!k_i && d_i == SFD2_BYTE) begin
                st_q  <= ADDR_HI;
                sof_o <= 1'b1;
                err_q <= err_i;
              end else begin
                st_q <= is_k ? SFD2 : HUNT;
              end
            end
            ADDR_HI: begin
              frame_addr_o[15:8] <= d_i;
              err_q <= err_q | err_i | k_i;
              st_q  <= ADDR_LO;
            end
            ADDR_LO: begin
              frame_addr_o[7:0] <= d_i;
              err_q <= err_q | err_i | k_i;
              st_q  <= DATA;
              cnt_q <= '0;
            end
            DATA: begin
              data_valid_o <= 1'b1;
              data_o       <= d_i;
              data_idx_o   <= cnt_q;
              cnt_q        <= cnt_q + 1'b1;
              if (cnt_q == 7'(UP_DATA_B - 1)) begin
                st_q         <= HUNT;
                frame_done_o <= 1'b1;
                frame_ok_o   <= !(err_q | err_i | k_i);
              end else begin
                err_q <= err_q | err_i | k_i;
              end
            end
            default: st_q <= HUNT;
          endcase
        end
      end
    end
  end

endmodule
