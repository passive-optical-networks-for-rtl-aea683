// tb_comma_aligner: self-checking test of the 10-bit group aligner.
// Bursts of 8b/10b characters (a K28.5 followed by random data characters,
// encoded by the encoder with its running disparity) are serialized, bit a
// first, and fed four bits per cycle. Before each burst comes a run of zero
// bits of random length, so every burst starts at a different bit offset.
// After each burst's comma the aligner must output exactly the sent groups
// in order, flag the comma group, and stay locked. The expected groups are
// the encoder's output for the same stimulus.
`timescale 1ns/1ps
module tb_comma_aligner;
  import pon_pkg::*;
  localparam int NB = 4;
  localparam int NCH = 40;     // characters after the comma in each burst
  localparam int NBURST = 10;

  logic clk = 0, rst = 1;
  logic [NB-1:0] bits = '0;
  logic [9:0] code;
  logic valid, comma, locked;
  int checks = 0, failures = 0;

  comma_aligner #(.NB(NB)) dut (.clk, .rst, .bits_i(bits), .code_o(code),
    .valid_o(valid), .comma_o(comma), .locked_o(locked));

  // reference encoder used to build the stimulus
  logic ek; logic [7:0] ed; logic erd_i; logic [9:0] ecode; logic erd_o;
  enc8b10b u_ref (.k_i(ek), .d_i(ed), .rd_i(erd_i), .code_o(ecode), .rd_o(erd_o));

  always #2.5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit stream [$];
  logic [9:0] exp_q [$];      // expected groups, starting with each comma
  int burst_of [$];
  int offsets [int];

  initial begin
    logic rd;
    rd = 1'b0;
    for (int b = 0; b < NBURST; b++) begin
      automatic int gap = 23 + $urandom_range(0, 37);
      offsets[stream.size() + gap] = 1;
      for (int i = 0; i < gap; i++) stream.push_back(1'b0);
      for (int c = 0; c <= NCH; c++) begin
        ek = (c == 0); ed = (c == 0) ? K28_5 : 8'($urandom_range(0, 255)); erd_i = rd;
        #0.01;
        rd = erd_o;
        exp_q.push_back(ecode);
        burst_of.push_back(b);
        for (int i = 0; i < 10; i++) stream.push_back(ecode[i]);
      end
    end
    for (int i = 0; i < 40; i++) stream.push_back(1'b0);
  end

  // drive NB bits per cycle, bit 0 earliest
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    while (stream.size() >= NB) begin
      for (int i = 0; i < NB; i++) bits[i] = stream.pop_front();
      @(negedge clk);
    end
    bits = '0;
    repeat (10) @(negedge clk);
    check(exp_q.size() == 0, $sformatf("%0d groups never seen", exp_q.size()));
    check(n_commas == NBURST, $sformatf("commas seen %0d of %0d", n_commas, NBURST));
    check(n_offsets > 1, "bursts covered more than one offset within a nibble");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // compare output groups from each comma onward
  int n_in_burst = -1, n_commas = 0, n_offsets = 0;
  int seen_off [int];
  initial begin
    #1;
    foreach (offsets[o]) if (!seen_off.exists(o % NB)) begin seen_off[o % NB] = 1; n_offsets++; end
  end

  always @(posedge clk) if (!rst) begin
    if (valid && comma) begin
      n_commas++;
      n_in_burst = 0;
      check(locked, "locked with a comma");
    end
    if (valid && n_in_burst >= 0) begin
      if (exp_q.size() == 0) check(0, "group beyond the stimulus");
      else begin
        automatic logic [9:0] e = exp_q.pop_front();
        check(code == e, $sformatf("group %0d: got %b exp %b", n_in_burst, code, e));
        check(comma == (n_in_burst == 0), "comma flag only on the K28.5");
      end
      n_in_burst++;
      if (n_in_burst > NCH) n_in_burst = -1;
    end
    if (valid) check(locked, "valid only when locked");
  end
endmodule
