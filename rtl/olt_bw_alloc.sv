// olt_bw_alloc: upstream channel arbiter of the OLT.
//
// Once per superframe the OLT sends an R character carrying the address of
// the ONU that may transmit the next upstream burst (TDMA, one burst per
// superframe). This block chooses that address by round robin over the ONUs
// whose bit is set in onu_enable_i (bit i = ONU address i+1), so every
// connected ONU gets the channel in turn; disabled slots are skipped and an
// all-zero mask gives address 0, "no grant".
//
// Interface: grant_o is the address to put in the next R; a one-cycle
// advance_i (the R character is being emitted) moves it to the next enabled
// ONU, visible from the following cycle. Reset starts before ONU 1.
// The R character and its meaning are from the published protocol; the
// round-robin policy is this design's simple reading of its "statistical
// multiplexing" allocation.
module olt_bw_alloc
  import pon_pkg::*;
#(
  parameter int unsigned SLOTS = N_SLOTS
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [SLOTS-1:0] onu_enable_i,
  input  logic             advance_i,
  output onu_addr_t        grant_o
);

  logic [$clog2(SLOTS)-1:0] last_q;    // index of the last granted slot
  logic [$clog2(SLOTS)-1:0] next_idx;
  logic                     any;

  // first enabled slot after last_q, wrapping around
  always_comb begin
    next_idx = last_q;
    any      = 1'b0;
    for (int unsigned off = SLOTS; off >= 1; off--) begin
      automatic logic [$clog2(SLOTS)-1:0] idx =
        ($clog2(SLOTS))'((int'(last_q) + off) % SLOTS);
      if (onu_enable_i[idx]) begin
        next_idx = idx;
        any      = 1'b1;
      end
    end
  end

  assign grant_o = any ? onu_addr_t'(next_idx) + 7'd1 : '0;

  always_ff @(posedge clk) begin
    if (rst)                   last_q <= ($clog2(SLOTS))'(SLOTS - 1);
    else if (advance_i && any) last_q <= next_idx;
  end

endmodule
