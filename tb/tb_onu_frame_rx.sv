// tb_onu_frame_rx: self-checking test of the ONU superframe parser.
// The testbench builds superframes character by character (K, 64 x T F D1 D2,
// T F R) with random trigger and auxiliary bytes, commands in random slots,
// individual or broadcast, and random R addresses, and feeds them two
// characters per cycle. Checked: lock on the first K; every T in the cycle
// its word arrives, every 2 cycles, and every F; only the commands for this
// ONU (address 2) or broadcast, with the right payload, and none with
// payload 0; a grant exactly when R is 2; a misplaced K drops and retakes
// the lock (sync_err_o); an error input while locked gives code_err_o.
`timescale 1ns/1ps
module tb_onu_frame_rx;
  import pon_pkg::*;
  localparam onu_addr_t ME = 7'd2;
  logic clk = 0, rst = 1;
  logic [15:0] data = '0; logic [1:0] kf = '0; logic err = 0;
  logic locked, sof, tv, av, cv, cb, rv, gr, serr, cerr;
  logic [7:0] tg, ax; logic [14:0] cp; onu_addr_t r;
  int checks = 0, failures = 0;

  onu_frame_rx dut (.clk, .rst, .my_addr_i(ME), .data_i(data), .k_i(kf), .err_i(err),
    .locked_o(locked), .sof_o(sof), .trig_valid_o(tv), .trig_o(tg),
    .aux_valid_o(av), .aux_o(ax), .cmd_valid_o(cv), .cmd_bcast_o(cb),
    .cmd_payload_o(cp), .r_valid_o(rv), .r_o(r), .grant_o(gr),
    .sync_err_o(serr), .code_err_o(cerr));

  always #6.25 clk = ~clk;

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

  // expected output events
  logic [7:0]  exp_t [$], exp_f [$];
  logic [15:0] exp_cmd [$];      // {bcast, payload}
  logic        exp_gr [$];
  logic [8:0]  chars [$];        // {k, d}
  int n_cmd = 0, n_bc = 0, n_gr = 0, n_serr = 0, n_cerr = 0;

  task automatic build_sf(input bit record);
    logic [7:0] t, f, d1, d2, rr;
    chars.push_back({1'b1, K28_5});
    for (int s = 0; s < 65; s++) begin
      t = 8'($urandom); f = 8'($urandom);
      chars.push_back({1'b0, t}); chars.push_back({1'b0, f});
      if (record) begin exp_t.push_back(t); exp_f.push_back(f); end
      if (s < 64) begin
        int kind = $urandom_range(0, 5);
        logic [14:0] p = 15'($urandom_range(1, 32767));
        if (kind == 0)      begin d1 = {1'b0, p[14:8]}; d2 = p[7:0]; end   // broadcast
        else if (kind == 1) begin d1 = {1'b1, p[14:8]}; d2 = p[7:0]; end   // individual
        else if (kind == 2 && s == int'(ME) - 1) begin d1 = {1'b1, p[14:8]}; d2 = p[7:0]; end
        else begin d1 = 8'h00; d2 = 8'h00; end
        if (s == int'(ME) - 1 && $urandom_range(0, 1) == 0) begin d1 = {1'b1, p[14:8]}; d2 = p[7:0]; end
        chars.push_back({1'b0, d1}); chars.push_back({1'b0, d2});
        if (record && {d1[6:0], d2} != '0 && (!d1[7] || s == int'(ME) - 1))
          exp_cmd.push_back({!d1[7], d1[6:0], d2});
      end else begin
        rr = ($urandom_range(0, 2) == 0) ? {1'b0, ME} : 8'($urandom_range(0, 64));
        chars.push_back({1'b0, rr});
        if (record) exp_gr.push_back(rr == {1'b0, ME});
      end
    end
  endtask

  // checker
  bit chk_on = 1;
  always @(posedge clk) begin
    #1;
    if (!rst && chk_on) begin
      if (tv) begin
        check(exp_t.size() > 0 && tg == exp_t[0], $sformatf("T %h", tg));
        if (exp_t.size() > 0) void'(exp_t.pop_front());
      end
      if (av) begin
        check(exp_f.size() > 0 && ax == exp_f[0], $sformatf("F %h", ax));
        if (exp_f.size() > 0) void'(exp_f.pop_front());
      end
      if (cv) begin
        check(exp_cmd.size() > 0 && {cb, cp} == exp_cmd[0], $sformatf("command %h", {cb, cp}));
        if (exp_cmd.size() > 0) void'(exp_cmd.pop_front());
        if (cb) n_bc++; else n_cmd++;
      end
      if (rv) begin
        check(exp_gr.size() > 0 && gr == exp_gr[0], "grant");
        if (exp_gr.size() > 0) void'(exp_gr.pop_front());
      end
      if (gr) n_gr++;
      if (cerr) n_cerr++;
    end
    if (!rst && serr) n_serr++;
  end

  task automatic send_all(input int err_at = -1);
    int w = 0;
    while (chars.size() >= 2) begin
      logic [8:0] c0, c1;
      @(negedge clk);
      c0 = chars.pop_front(); c1 = chars.pop_front();
      data = {c1[7:0], c0[7:0]}; kf = {c1[8], c0[8]};
      err = (w == err_at);
      w++;
    end
  endtask

  // T spacing
  int prev_tv = -1, cycn = 0;
  always @(posedge clk) begin
    cycn++;
    #1;
    if (!rst && tv && locked && chk_on) begin
      if (prev_tv >= 0 && !sof) check(cycn - prev_tv == 2, "T every 2 cycles");
      prev_tv = cycn;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // idle words, then superframes
    for (int i = 0; i < 7; i++) chars.push_back({1'b0, 8'($urandom)} & 9'h0FF);
    chars.push_back(9'h000);
    send_all();
    for (int n = 0; n < 30; n++) begin build_sf(1); send_all(); end
    check(locked, "locked");
    check(n_serr == 0, "no sync errors on good superframes");
    // a K in the wrong place: lock drops, then comes back on the next K
    chk_on = 0;
    chars.push_back({1'b1, K28_5});
    for (int i = 0; i < 41; i++) chars.push_back({1'b0, 8'h00});
    // expected events of the broken superframe are not checked
    build_sf(0);
    send_all();
    @(posedge clk); #1;
    check(n_serr == 1, $sformatf("misplaced K reported: %0d", n_serr));
    repeat (4) @(negedge clk);
    exp_t.delete(); exp_f.delete(); exp_cmd.delete(); exp_gr.delete();
    chk_on = 1;
    for (int n = 0; n < 10; n++) begin build_sf(1); send_all(); end
    // decoding error while locked
    build_sf(1); send_all(57);
    check(locked, "locked again");
    check(n_cerr == 1, $sformatf("code errors %0d", n_cerr));
    check(n_cmd > 20 && n_bc > 100 && n_gr > 5, $sformatf("cmd %0d bc %0d gr %0d", n_cmd, n_bc, n_gr));
    $display("individual %0d, broadcast %0d, grants %0d, sync errors %0d", n_cmd, n_bc, n_gr, n_serr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
