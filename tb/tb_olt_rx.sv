// tb_olt_rx: self-checking test of the OLT burst-mode receive chain.
// Upstream bursts (32 preamble characters, K28.5 plus SFD byte, 2-byte ONU
// address, 90 random data bytes) are 8b/10b encoded by the encoder, each
// bit repeated over five samples, and fed 20 samples per cycle. Every burst
// starts at its own sample phase, the line is low between bursts, and
// jitter sometimes moves a bit edge by one sample. Each burst must be
// delivered with its address, all 90 bytes in order and frame_ok set, and
// the sampling phase must have changed between bursts.
`timescale 1ns/1ps
module tb_olt_rx;
  import pon_pkg::*;
  localparam int OS = 5, NB = 4, NBURST = 8;

  logic clk = 0, rst = 1;
  logic [OS*NB-1:0] samples = '0;
  logic [2:0] phase;
  logic aligned, sof, dv, done, ok;
  logic [7:0] dout; logic [6:0] idx; logic [15:0] addr;
  int checks = 0, failures = 0;

  olt_rx dut (.clk, .rst, .samples_i(samples), .phase_o(phase), .aligned_o(aligned),
    .sof_o(sof), .data_valid_o(dv), .data_o(dout), .data_idx_o(idx),
    .frame_done_o(done), .frame_ok_o(ok), .frame_addr_o(addr));

  logic ek; logic [7:0] ed; logic erd_i; logic [9:0] ecode; logic erd_o;
  enc8b10b u_ref (.k_i(ek), .d_i(ed), .rd_i(erd_i), .code_o(ecode), .rd_o(erd_o));

  always #2.5 clk = ~clk;

  task automatic check(input bit ok_, input string what);
    checks++;
    if (!ok_) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit line [$];
  logic [7:0] exp_data [$];
  logic [15:0] exp_addr [$];
  logic rd;

  task automatic put_char(input logic kk, input logic [7:0] dd);
    ek = kk; ed = dd; erd_i = rd;
    #0.01;
    rd = erd_o;
    for (int i = 0; i < 10; i++) begin
      automatic bit prev = (line.size() > 0) ? line[line.size() - 1] : 1'b0;
      for (int s = 0; s < OS; s++) begin
        // jitter: the first sample of a bit sometimes still shows the last one
        if (s == 0 && $urandom_range(0, 3) == 0) line.push_back(prev);
        else line.push_back(ecode[i]);
      end
    end
  endtask

  initial begin
    for (int b = 0; b < NBURST; b++) begin
      automatic int gap = 100 + $urandom_range(0, 4) + 5 * $urandom_range(0, 10);
      automatic logic [15:0] a = {8'h00, 1'b0, 7'($urandom_range(1, 64))};
      for (int i = 0; i < gap; i++) line.push_back(1'b0);
      rd = 1'b0;
      for (int i = 0; i < UP_PREAMBLE_B; i++) put_char(0, PREAMBLE_BYTE);
      put_char(1, K28_5);
      put_char(0, SFD2_BYTE);
      put_char(0, a[15:8]);
      put_char(0, a[7:0]);
      for (int i = 0; i < UP_DATA_B; i++) begin
        automatic logic [7:0] v = 8'($urandom_range(0, 255));
        put_char(0, v);
        exp_data.push_back(v);
      end
      exp_addr.push_back(a);
    end
    for (int i = 0; i < 400; i++) line.push_back(1'b0);
  end

  int n_done = 0, n_phase_chg = 0;
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    #1;
    while (line.size() >= OS * NB) begin
      for (int i = 0; i < OS * NB; i++) samples[i] = line.pop_front();
      @(negedge clk);
    end
    samples = '0;
    repeat (20) @(negedge clk);
    check(n_done == NBURST, $sformatf("frames %0d of %0d", n_done, NBURST));
    check(exp_data.size() == 0, $sformatf("%0d bytes never delivered", exp_data.size()));
    check(n_phase_chg > 0, "sampling phase changed between bursts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [2:0] last_phase = 3'd2;
  int exp_idx = 0;
  always @(posedge clk) if (!rst) begin
    if (phase != last_phase) n_phase_chg++;
    last_phase = phase;
    if (sof) exp_idx = 0;
    if (dv) begin
      if (exp_data.size() == 0) check(0, "unexpected data byte");
      else begin
        automatic logic [7:0] e = exp_data.pop_front();
        check(dout == e, $sformatf("byte %0d: got %h exp %h", exp_idx, dout, e));
        check(idx == 7'(exp_idx), "data index");
      end
      exp_idx++;
    end
    if (done) begin
      n_done++;
      check(ok, "frame_ok");
      check(exp_idx == UP_DATA_B, "90 bytes per frame");
      if (exp_addr.size() == 0) check(0, "unexpected frame");
      else begin
        automatic logic [15:0] ea = exp_addr.pop_front();
        check(addr == ea, $sformatf("addr got %h exp %h", addr, ea));
      end
    end
  end
endmodule
