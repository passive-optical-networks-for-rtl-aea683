// tb_olt_burst_rx: self-checking test of the upstream frame parser.
// Frames of preamble, K28.5 plus SFD byte, 2-byte address and 90 random
// data bytes are fed as decoded characters, with random idle cycles
// (valid low) between characters. Some frames carry a character error
// (frame_ok must be 0), some have a wrong SFD byte or a K28.5 inside the
// data (the frame must be dropped, and the following good frame received).
// Every payload byte, its index, the address and the end-of-frame flags
// are compared with the stimulus.
`timescale 1ns/1ps
module tb_olt_burst_rx;
  import pon_pkg::*;
  logic clk = 0, rst = 1;
  logic valid = 0, k = 0, err = 0;
  logic [7:0] d = '0;
  logic sof, dv, done, ok;
  logic [7:0] dout;
  logic [6:0] idx;
  logic [15:0] addr;
  int checks = 0, failures = 0;

  olt_burst_rx dut (.clk, .rst, .valid_i(valid), .d_i(d), .k_i(k), .err_i(err),
    .sof_o(sof), .data_valid_o(dv), .data_o(dout), .data_idx_o(idx),
    .frame_done_o(done), .frame_ok_o(ok), .frame_addr_o(addr));

  always #6.25 clk = ~clk;

  task automatic check(input bit ok_, input string what);
    checks++;
    if (!ok_) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input logic kk, input logic [7:0] dd, input logic ee);
    while ($urandom_range(0, 3) == 0) begin valid = 0; @(negedge clk); end
    valid = 1; k = kk; d = dd; err = ee;
    @(negedge clk);
    valid = 0; k = 0; err = 0;
  endtask

  // expected results
  logic [7:0] exp_data [$];
  logic [15:0] exp_addr [$];
  bit exp_ok [$];
  int n_sof_exp = 0, n_sof = 0, n_done = 0, n_bad = 0, n_drop = 0;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int f = 0; f < 30; f++) begin
      automatic int kind = (f < 3) ? 0 : $urandom_range(0, 5);  // 0..2 good, 3 error, 4 bad SFD, 5 K in data
      automatic logic [15:0] a = {8'h00, 1'b0, 7'($urandom_range(1, 64))};
      automatic int err_at = (kind == 3) ? $urandom_range(0, 91) : -1;
      automatic int k_at = (kind == 5) ? $urandom_range(0, 89) : -1;
      for (int i = 0; i < 32; i++) send(0, PREAMBLE_BYTE, 0);
      send(1, K28_5, 0);
      send(0, (kind == 4) ? 8'h55 : SFD2_BYTE, 0);
      if (kind == 4) begin n_drop++; end
      else n_sof_exp++;
      send(0, a[15:8], err_at == 0);
      send(0, a[7:0], err_at == 1);
      for (int i = 0; i < UP_DATA_B; i++) begin
        automatic logic [7:0] v = 8'($urandom_range(0, 255));
        if (i == k_at) begin send(1, K28_5, 0); break; end
        send(0, v, err_at == i + 2);
        if (kind != 4) exp_data.push_back(v);
      end
      if (kind == 5) begin
        n_drop++;
        // the bytes sent before the comma were delivered and must still be
        // consumed from the expected queue by the monitor
      end else if (kind != 4) begin
        exp_addr.push_back(a);
        exp_ok.push_back(kind != 3);
        if (kind == 3) n_bad++;
      end
      repeat ($urandom_range(0, 5)) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    check(exp_data.size() == 0, $sformatf("%0d data bytes never delivered", exp_data.size()));
    check(exp_addr.size() == 0, $sformatf("%0d frames never completed", exp_addr.size()));
    check(n_sof == n_sof_exp, $sformatf("sof %0d exp %0d", n_sof, n_sof_exp));
    check(n_done >= 3 && n_bad > 0 && n_drop > 0, "good, errored and dropped frames all occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int exp_idx = 0;
  always @(posedge clk) if (!rst) begin
    if (sof) begin n_sof++; exp_idx = 0; end
    if (dv) begin
      if (exp_data.size() == 0) check(0, "unexpected data byte");
      else begin
        automatic logic [7:0] e = exp_data.pop_front();
        check(dout == e, $sformatf("data %0d: got %h exp %h", exp_idx, dout, e));
        check(idx == 7'(exp_idx), $sformatf("index got %0d exp %0d", idx, exp_idx));
      end
      exp_idx++;
    end
    if (done) begin
      n_done++;
      check(exp_idx == UP_DATA_B, $sformatf("frame ended after %0d bytes", exp_idx));
      if (exp_addr.size() == 0) check(0, "unexpected frame end");
      else begin
        automatic logic [15:0] ea = exp_addr.pop_front();
        automatic bit eo = exp_ok.pop_front();
        check(addr == ea, $sformatf("addr got %h exp %h", addr, ea));
        check(ok == eo, $sformatf("frame_ok got %0d exp %0d", ok, eo));
      end
    end
  end
endmodule
