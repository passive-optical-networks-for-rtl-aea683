// tb_olt_oversampler: self-checking test of the 5x blind oversampling
// data recovery.
// Bursts of random bits, each starting with an alternating preamble, are
// sampled five times per bit with a per-burst phase (bit boundaries at
// sample index phi mod 5) and with jitter: the first sample of a bit
// sometimes still shows the previous bit. Between bursts the line is low.
// After the preamble the block must select sample (phi + 2) mod 5, the bit
// centre (or, in a window where jitter ties the vote, a neighbour of it,
// but mostly the centre), and recover every bit; a change of phase between bursts must be
// followed. The expected bits and sample are computed from the stimulus.
`timescale 1ns/1ps
module tb_olt_oversampler;
  localparam int OS = 5, NB = 4, WIN = 16;
  logic clk = 0, rst = 1;
  logic [OS*NB-1:0] samples = '0;
  logic [NB-1:0] bits;
  logic [2:0] phase;
  logic upd;
  int checks = 0, failures = 0;

  olt_oversampler #(.OS(OS), .NB(NB), .WIN(WIN)) dut (.clk, .rst, .samples_i(samples),
    .bits_o(bits), .phase_o(phase), .update_o(upd));

  always #2.5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the sample stream, by global sample index
  bit line [int];
  bit bitv [int];          // bit value by global bit index of the current burst
  int phi, b0;             // burst phase and first sample of the burst
  int n_bits_ok = 0, n_phase = 0, n_centre = 0;

  initial begin
    static int cyc = 0;
    int s0;
    logic [2:0] sel_exp;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int burst = 0; burst < 12; burst++) begin
      automatic int nbits = 600;
      automatic int gap = 20 * $urandom_range(2, 6);
      phi = (burst == 0) ? 1 : (phi + $urandom_range(1, 4)) % 5;
      sel_exp = 3'((phi + 2) % 5);
      // build: gap of zeros, then the burst starting at a sample = phi mod 5
      s0 = cyc * 20 + gap + phi;
      for (int s = cyc * 20; s < s0; s++) line[s] = 0;
      for (int b = 0; b < nbits; b++) begin
        automatic bit v = (b < 160) ? bit'(b % 2) : bit'($urandom_range(0, 1));
        automatic bit pv = (b == 0) ? 1'b0 : bitv[b - 1];
        bitv[b] = v;
        for (int s = 0; s < 5; s++) line[s0 + 5 * b + s] = (s == 0 && $urandom_range(0, 3) == 0) ? pv : v;
      end
      // play it, 20 samples per cycle
      while (cyc * 20 < s0 + 5 * nbits - 20) begin
        @(negedge clk);
        for (int k = 0; k < 20; k++) samples[k] = line[cyc * 20 + k];
        @(posedge clk);
        #1;
        // bits_o now holds the samples of this cycle at phase_o's previous value
        if (cyc * 20 > s0 + 5 * 160) begin
          // jittered edges may pull the vote to a neighbour of the centre,
          // which still lies inside the bit
          check(phase == sel_exp || phase == 3'((int'(sel_exp) + 1) % 5) || phase == 3'((int'(sel_exp) + 4) % 5),
                $sformatf("burst %0d phase %0d expected %0d", burst, phase, sel_exp));
          if (phase == sel_exp) n_centre++;
          for (int k = 0; k < NB; k++) begin
            automatic int s = cyc * 20 + 5 * k + int'(sel_exp);
            automatic int b = (s - s0) / 5;
            check(bits[k] == bitv[b], $sformatf("burst %0d bit %0d", burst, b));
            n_bits_ok++;
          end
        end
        cyc++;
      end
      n_phase++;
      line.delete();
      bitv.delete();
    end
    check(n_bits_ok > 12 * 300, "bits checked");
    check(n_centre * 4 > n_bits_ok * 3 / 4, "centre sample chosen most of the time");
    $display("bursts %0d, bits checked %0d", n_phase, n_bits_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
