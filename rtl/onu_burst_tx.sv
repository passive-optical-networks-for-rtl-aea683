// onu_burst_tx: upstream burst transmitter of an ONU.
//
// When the downstream R character grants the channel to this ONU (grant_i),
// the ONU switches its laser on, waits LASER_ON_CYCLES for the optical power
// to settle, and sends one upstream frame, one 8b/10b character per 80 MHz
// cycle (800 Mb/s):
//   32 x preamble | K28.5 SFD2_BYTE | address (2 bytes) | 90 data bytes
// then switches the laser off. The preamble is the byte 0x55 (D21.2), whose
// code group 1010100101 is the same in either disparity and has a
// transition at 8 of its 10 bit boundaries, all at the same phase: the
// pattern the OLT's burst-mode receiver needs to settle its threshold and
// sampling phase. The same byte is sent while the laser settles.
// Data bytes are pulled from the ONU's logic: pl_rd_o is high in the cycle
// pl_data_i is taken. A burst lasts LASER_ON_CYCLES + 126 cycles and must
// end before the next superframe's R (130 cycles later), leaving the rest as
// interframe gap. Each burst starts at running disparity RD-.
//
// Outputs are registered: tx_code_o (bit 0 sent first) and laser_en_o are
// aligned. A grant while a burst is in progress is ignored.
// Frame fields and sizes follow the published upstream frame; the SFD's
// second byte, the address format and the settling time are this design's.
module onu_burst_tx
  import pon_pkg::*;
#(
  parameter int unsigned LASER_ON_CYCLES = 2
) (
  input  logic       clk,
  input  logic       rst,
  input  onu_addr_t  my_addr_i,
  input  logic       grant_i,
  input  logic [7:0] pl_data_i,
  output logic       pl_rd_o,
  output logic [9:0] tx_code_o,
  output logic       laser_en_o,
  output logic       busy_o
);

  typedef enum logic [2:0] {IDLE, SETTLE, PRE, SFD, ADDR, DATA} state_t;

  state_t     st_q;
  logic [6:0] cnt_q;
  logic       rd_q, rd_n;
  logic       k;
  logic [7:0] d;
  logic [9:0] code;
  logic       send;

  // character for the current state
  always_comb begin
    k       = 1'b0;
    d       = PREAMBLE_BYTE;
    send    = 1'b1;
    pl_rd_o = 1'b0;
    case (st_q)
      IDLE:   send = 1'b0;
      SETTLE, PRE: d = PREAMBLE_BYTE;
      SFD:    begin k = (cnt_q == 0); d = (cnt_q == 0) ? K28_5 : SFD2_BYTE; end
      ADDR:   d = (cnt_q == 0) ? 8'h00 : {1'b0, my_addr_i};
      DATA:   begin d = pl_data_i; pl_rd_o = 1'b1; end
      default: send = 1'b0;
    endcase
  end

  enc8b10b u_enc (.k_i(k), .d_i(d), .rd_i(rd_q), .code_o(code), .rd_o(rd_n));

  assign busy_o = (st_q != IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      st_q       <= IDLE;
      cnt_q      <= '0;
      rd_q       <= 1'b0;
      tx_code_o  <= '0;
      laser_en_o <= 1'b0;
    end else begin
      laser_en_o <= send;
      tx_code_o  <= send ? code : '0;
      rd_q       <= send ? rd_n : 1'b0;
      cnt_q      <= cnt_q + 1'b1;
      case (st_q)
        IDLE: if (grant_i) begin
          st_q  <= (LASER_ON_CYCLES == 0) ? PRE : SETTLE;
          cnt_q <= '0;
        end
        SETTLE: if (cnt_q == 7'(LASER_ON_CYCLES - 1)) begin st_q <= PRE;  cnt_q <= '0; end
        PRE:    if (cnt_q == 7'(UP_PREAMBLE_B - 1))   begin st_q <= SFD;  cnt_q <= '0; end
        SFD:    if (cnt_q == 7'(UP_SFD_B - 1))        begin st_q <= ADDR; cnt_q <= '0; end
        ADDR:   if (cnt_q == 7'(UP_ADDR_B - 1))       begin st_q <= DATA; cnt_q <= '0; end
        DATA:   if (cnt_q == 7'(UP_DATA_B - 1))       begin st_q <= IDLE; cnt_q <= '0; end
        default: st_q <= IDLE;
      endcase
    end
  end

  // the burst and its settling time fit in one superframe
  initial assert (LASER_ON_CYCLES + UP_FRAME_B < SF_WORDS)
    else $error("burst longer than a superframe");

endmodule
