// olt_oversampler: blind 5x oversampling data recovery for upstream bursts.
//
// The OLT's burst-mode receiver cannot wait for a PLL to lock on each burst,
// so the 800 Mb/s upstream line is sampled blindly at OS times the bit rate
// (OS*NB samples per clock from the deserializer, sample 0 earliest) and the
// data bits are picked from the samples. For every sample, a transition
// against its predecessor is counted in one of OS phase bins (sample index
// mod OS). After WIN cycles the bin with the most transitions is taken as
// the bit boundary (majority vote), and from then on the sample OS/2 after it,
// the one nearest the bit centre, is used for all bits; the bins are then
// cleared. A window with no transitions (laser off) keeps the previous
// choice. When the next burst, from another ONU, arrives with another phase,
// its preamble's transitions move the choice within one window.
//
// Interface: samples_i, OS*NB bits per cycle; bits_o, NB recovered bits
// (bit 0 earliest), registered; phase_o the sample index used (0..OS-1).
// Oversampling factor and majority voting over a window follow the
// published receiver; the transition-histogram form of the vote, the window
// length and the tie rule are this design's. Source and
// receiver share one reference clock, so exactly NB bits come per cycle; a
// change of phase during the preamble may repeat or drop one bit, which
// the comma alignment that follows absorbs.
module olt_oversampler #(
  parameter int unsigned OS  = 5,
  parameter int unsigned NB  = 4,
  parameter int unsigned WIN = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [OS*NB-1:0] samples_i,
  output logic [NB-1:0]    bits_o,
  output logic [$clog2(OS)-1:0] phase_o,
  output logic             update_o     // a window ended with a new decision
);

  localparam int unsigned CW = $clog2(NB*WIN + 1);
  localparam int unsigned PW = $clog2(OS);

  logic          last_q;                 // last sample of the previous word
  logic [CW-1:0] bin_q [OS];
  logic [CW-1:0] bin_n [OS];
  logic [$clog2(WIN)-1:0] wcnt_q;
  logic [PW-1:0] best, cur;
  logic          any;

  // transition histogram for this word
  always_comb begin
    for (int b = 0; b < OS; b++) bin_n[b] = bin_q[b];
    for (int i = 0; i < OS*NB; i++) begin
      automatic logic prev = (i == 0) ? last_q : samples_i[i-1];
      if (samples_i[i] != prev) bin_n[i % OS] = bin_n[i % OS] + 1'b1;
    end
    // the boundary bin in use wins ties, so the choice only moves when
    // another bin has strictly more transitions
    cur  = PW'((int'(phase_o) + OS - OS / 2) % OS);
    best = cur;
    any  = 1'b0;
    for (int b = 0; b < OS; b++) begin
      if (bin_n[b] != '0) any = 1'b1;
      if (bin_n[b] > bin_n[best]) best = PW'(b);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      last_q   <= 1'b0;
      wcnt_q   <= '0;
      phase_o  <= PW'(OS / 2);
      bits_o   <= '0;
      update_o <= 1'b0;
      for (int b = 0; b < OS; b++) bin_q[b] <= '0;
    end else begin
      last_q   <= samples_i[OS*NB-1];
      update_o <= 1'b0;
      for (int k = 0; k < NB; k++) bits_o[k] <= samples_i[k*OS + int'(phase_o)];
      if (wcnt_q == ($clog2(WIN))'(WIN - 1)) begin
        wcnt_q <= '0;
        for (int b = 0; b < OS; b++) bin_q[b] <= '0;
        if (any) begin
          phase_o  <= PW'((int'(best) + OS / 2) % OS);
          update_o <= 1'b1;
        end
      end else begin
        wcnt_q <= wcnt_q + 1'b1;
        for (int b = 0; b < OS; b++) bin_q[b] <= bin_n[b];
      end
    end
  end

endmodule
