// tb_pon_top: end-to-end test of the PON demonstrator logic at its default
// size (one OLT, two ONUs, 64-slot superframes).
//
// A channel model joins the transceiver-side ports:
//  * downstream: the OLT's 20-bit words go into a bit stream; each ONU reads
//    it with its own delay in bits (fibre plus a random divider phase), so
//    each ONU's barrel shifter has to find its own offset;
//  * upstream: each ONU's 10-bit groups are expanded to 5 samples per bit,
//    gated by its laser enable, delayed by its own number of samples (so
//    bursts arrive with different phases) and summed on one line, which the
//    OLT reads 20 samples per 200 MHz cycle.
// Checks: every trigger/aux byte reaches each ONU in order, every 25 ns,
// with a latency that never changes; individual commands reach only their
// ONU and broadcasts reach all; upstream bursts alternate between the
// granted ONUs and carry the right address and data; lasers never overlap.
// Each mechanism (lock, trigger, individual and broadcast command, command
// back-pressure, grant, burst, oversampler phase change, nonzero barrel
// shift) is counted and must occur.
`timescale 1ns/1ps
module tb_pon_top;
  import pon_pkg::*;

  localparam int N_ONU = 2;
  localparam int SF_RUN = 24;            // superframes to simulate

  logic rst;
  logic clk_tx = 0, clk_os = 0;
  logic onu_clk [N_ONU];
  logic bx; logic [7:0] trig, aux;
  logic cmd_valid, cmd_ready, cmd_bcast; onu_addr_t cmd_onu; logic [14:0] cmd_payload;
  logic [N_SLOTS-1:0] onu_enable;
  onu_addr_t r_addr;
  logic [19:0] olt_word; logic olt_sof;
  logic [19:0] samples;
  logic [2:0] up_phase;
  logic up_dv; logic [7:0] up_d; logic [6:0] up_idx;
  logic up_done, up_ok; logic [15:0] up_addr;
  onu_addr_t onu_addr [N_ONU];
  logic [19:0] rx_word [N_ONU];
  logic [4:0] bs_pos [N_ONU];
  logic locked [N_ONU], tv [N_ONU], av [N_ONU], cv [N_ONU], cb [N_ONU], gr [N_ONU], rerr [N_ONU];
  logic [7:0] tg [N_ONU], ax [N_ONU];
  logic [14:0] cp [N_ONU];
  logic [7:0] pl_data [N_ONU];
  logic pl_rd [N_ONU], laser [N_ONU];
  logic [9:0] tx_code [N_ONU];

  pon_top dut (
    .rst, .clk_tx, .bx_o(bx), .trig_i(trig), .aux_i(aux),
    .cmd_valid_i(cmd_valid), .cmd_ready_o(cmd_ready), .cmd_bcast_i(cmd_bcast),
    .cmd_onu_i(cmd_onu), .cmd_payload_i(cmd_payload),
    .onu_enable_i(onu_enable), .r_addr_o(r_addr),
    .olt_tx_word_o(olt_word), .olt_sof_o(olt_sof),
    .clk_os, .olt_samples_i(samples), .up_phase_o(up_phase),
    .up_data_valid_o(up_dv), .up_data_o(up_d), .up_data_idx_o(up_idx),
    .up_frame_done_o(up_done), .up_frame_ok_o(up_ok), .up_frame_addr_o(up_addr),
    .onu_clk, .onu_addr_i(onu_addr), .onu_rx_word_i(rx_word),
    .onu_bs_pos_o(bs_pos), .onu_locked_o(locked),
    .onu_trig_valid_o(tv), .onu_trig_o(tg), .onu_aux_valid_o(av), .onu_aux_o(ax),
    .onu_cmd_valid_o(cv), .onu_cmd_bcast_o(cb), .onu_cmd_payload_o(cp),
    .onu_grant_o(gr), .onu_rx_err_o(rerr),
    .onu_pl_data_i(pl_data), .onu_pl_rd_o(pl_rd),
    .onu_tx_code_o(tx_code), .onu_laser_en_o(laser)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  // ---------------- clocks ----------------
  always #6.25 clk_tx = ~clk_tx;
  always #2.5  clk_os = ~clk_os;
  // recovered ONU clocks: same frequency, own phase
  initial begin onu_clk[0] = 0; #1.9; forever #6.25 onu_clk[0] = ~onu_clk[0]; end
  initial begin onu_clk[1] = 0; #4.3; forever #6.25 onu_clk[1] = ~onu_clk[1]; end

  // ---------------- downstream channel ----------------
  localparam int DN_RING = 4096;
  bit dn_bits [DN_RING];
  function automatic logic [11:0] dn_ix(input longint p);
    return 12'(p % longint'(DN_RING));
  endfunction
  longint dn_wr = 0;
  int dn_delay [N_ONU];
  longint dn_rd [N_ONU];

  always @(posedge clk_tx) begin
    for (int b = 0; b < 20; b++) dn_bits[dn_ix(dn_wr + longint'(b))] = rst ? 1'b0 : olt_word[b];
    dn_wr += 20;
  end
  for (genvar i = 0; i < N_ONU; i++) begin : g_dn
    logic [19:0] w_q;
    assign rx_word[i] = w_q;
    always @(negedge onu_clk[i]) begin
      logic [19:0] w;
      for (int b = 0; b < 20; b++)
        w[b] = (dn_rd[i] + longint'(b) >= 0) ? dn_bits[dn_ix(dn_rd[i] + longint'(b))] : 1'b0;
      w_q <= w;
      dn_rd[i] += 20;
    end
  end

  // ---------------- upstream channel ----------------
  localparam int UP_RING = 8192;
  bit up_line [UP_RING];
  function automatic logic [12:0] up_ix(input longint p);
    return 13'(p % longint'(UP_RING));
  endfunction
  longint up_cnt [N_ONU];
  int up_delay [N_ONU];
  longint os_cnt = 0;
  int overlap_cycles = 0;

  for (genvar i = 0; i < N_ONU; i++) begin : g_up
    always @(negedge onu_clk[i]) begin
      if (!rst) begin
        for (int b = 0; b < 10; b++)
          for (int s = 0; s < 5; s++)
            if (laser[i] && tx_code[i][b])
              up_line[up_ix(up_cnt[i] * 50 + longint'(up_delay[i]) + longint'(b) * 5 + longint'(s))] = 1'b1;
      end
      up_cnt[i]++;
    end
  end
  always @(negedge clk_os) begin
    logic [19:0] s;
    for (int k = 0; k < 20; k++) begin
      s[k] = up_line[up_ix(os_cnt*20 + longint'(k))];
      up_line[up_ix(os_cnt*20 + longint'(k))] = 1'b0;
    end
    samples <= s;
    os_cnt++;
  end
  always @(posedge clk_tx) if (!rst && laser[0] && laser[1]) overlap_cycles++;

  // ---------------- triggers ----------------
  int unsigned bx_n = 0;
  longint bx_time [65536];   // ps
  always @(negedge clk_tx) begin
    if (!rst && bx) begin
      trig <= bx_n[7:0];
      aux  <= bx_n[15:8];
      bx_time[bx_n[15:0]] = longint'($realtime * 1000.0) + 6250;  // sampled at the next edge
      bx_n++;
    end
  end

  bit          ident_ok = 0;           // start following triggers
  int unsigned n_trig [N_ONU];
  int          exp_n [N_ONU];
  longint      lat0 [N_ONU];
  realtime     last_t [N_ONU];
  int          n_lat_bad [N_ONU];
  int          pending_aux [N_ONU];
  for (genvar i = 0; i < N_ONU; i++) begin : g_trig
    always @(posedge onu_clk[i]) begin
      if (!rst && tv[i] && ident_ok) begin
        if (exp_n[i] < 0) begin
          // first trigger after lock: find its number from the send log
          exp_n[i] = int'(bx_n) - 1;
          while (exp_n[i] > 0 && exp_n[i][7:0] != tg[i]) exp_n[i]--;
          lat0[i] = longint'($realtime * 1000.0) - bx_time[exp_n[i][15:0]];
        end else begin
          check(tg[i] == exp_n[i][7:0], $sformatf("onu%0d trigger %0d got %0d", i, exp_n[i], tg[i]));
          check($realtime - last_t[i] > 24.9 && $realtime - last_t[i] < 25.1,
                $sformatf("onu%0d trigger spacing %0t", i, $realtime - last_t[i]));
          check(longint'($realtime * 1000.0) - bx_time[exp_n[i][15:0]] == lat0[i],
                $sformatf("onu%0d latency changed, trigger %0d", i, exp_n[i]));
          n_trig[i]++;
        end
        pending_aux[i] = exp_n[i];
        last_t[i] = $realtime;
        exp_n[i]++;
      end
      if (!rst && av[i] && pending_aux[i] >= 0)
        check(ax[i] == pending_aux[i][15:8], $sformatf("onu%0d aux", i));
    end
  end

  // ---------------- commands ----------------
  logic [14:0] exp_cmd [N_ONU][$];
  int n_ind_rx = 0, n_bc_rx = 0, n_backpressure = 0;
  for (genvar i = 0; i < N_ONU; i++) begin : g_cmd
    always @(posedge onu_clk[i]) begin
      if (!rst && cv[i] && ident_ok) begin
        if (exp_cmd[i].size() == 0) check(0, $sformatf("onu%0d unexpected command %h bcast %0d", i, cp[i], cb[i]));
        else begin
                    int hit;
          hit = -1;
          // mailboxes are per ONU, so commands may overtake each other
          foreach (exp_cmd[i][j]) if (hit < 0 && exp_cmd[i][j] == cp[i]) hit = j;
          check(hit >= 0, $sformatf("onu%0d command %h not expected", i, cp[i]));
          if (hit >= 0) exp_cmd[i].delete(hit);
        end
        if (cb[i]) n_bc_rx++; else n_ind_rx++;
      end
    end
  end

  task automatic send_cmd(input bit bc, input onu_addr_t a, input logic [14:0] p);
    @(negedge clk_tx);
    cmd_valid = 1; cmd_bcast = bc; cmd_onu = a; cmd_payload = p;
    @(posedge clk_tx);
    while (!cmd_ready) begin n_backpressure++; @(posedge clk_tx); end
    #0.1;
    cmd_valid = 0;
    for (int i = 0; i < N_ONU; i++)
      if (bc || onu_addr[i] == a) exp_cmd[i].push_back(p);
  endtask

  // ---------------- upstream data ----------------
  int unsigned pl_cnt [N_ONU];
  int unsigned exp_up_cnt [N_ONU];
  int n_burst [N_ONU];
  int n_grant = 0, n_phase_change = 0;
  logic [2:0] last_phase;
  for (genvar i = 0; i < N_ONU; i++) begin : g_pl
    assign pl_data[i] = 8'(pl_cnt[i]) ^ {onu_addr[i][2:0], 5'd0};
    always @(posedge onu_clk[i]) begin
      if (!rst && pl_rd[i]) pl_cnt[i]++;
      if (!rst && gr[i]) n_grant++;
    end
  end
  int cur_onu = -1;
  always @(posedge clk_os) begin
    if (!rst) begin
      if (up_phase != last_phase) n_phase_change++;
      last_phase <= up_phase;
      if (up_dv) begin
        cur_onu = -1;
        for (int i = 0; i < N_ONU; i++) if (up_addr == 16'(onu_addr[i])) cur_onu = i;
        check(cur_onu >= 0, $sformatf("upstream address %0d unknown", up_addr));
        if (cur_onu >= 0) begin
          check(up_d == (8'(exp_up_cnt[cur_onu]) ^ {onu_addr[cur_onu][2:0], 5'd0}),
                $sformatf("upstream data onu%0d byte %0d: %h exp cnt %0d", cur_onu, up_idx, up_d, exp_up_cnt[cur_onu]));
          exp_up_cnt[cur_onu]++;
        end
      end
      if (up_done) begin
        check(up_ok, "upstream frame error flag");
        if (cur_onu >= 0) n_burst[cur_onu]++;
      end
    end
  end

  // ---------------- watchdog ----------------
  initial begin
    repeat (SF_RUN * 130 + 4000) @(posedge clk_tx);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- stimulus ----------------
  int lost_lock = 0;
  initial begin
    rst = 1;
    trig = 0; aux = 0;
    cmd_valid = 0; cmd_bcast = 0; cmd_onu = '0; cmd_payload = '0;
    onu_enable = '0; onu_enable[0] = 1; onu_enable[1] = 1;
    onu_addr[0] = 7'd1; onu_addr[1] = 7'd2;
    for (int i = 0; i < N_ONU; i++) begin
      // equal fibre lengths (no ranging); only the divider phase differs
      dn_delay[i] = 100 + int'($urandom_range(0, 19));
      dn_rd[i]    = -longint'(dn_delay[i]);
      up_delay[i] = 300 + int'($urandom_range(0, 4));
      up_cnt[i] = 0; exp_n[i] = -1; n_trig[i] = 0; pl_cnt[i] = 0; exp_up_cnt[i] = 0;
      n_burst[i] = 0; pending_aux[i] = -1; n_lat_bad[i] = 0;
    end
    // make the two bursts arrive with different sampling phases
    if (up_delay[0] == up_delay[1]) up_delay[1] = 300 + (up_delay[0] + 2) % 5;
    if (dn_delay[0] % 20 == 0 && dn_delay[1] % 20 == 0) dn_delay[1] += 7;
    for (int k = 0; k < UP_RING; k++) up_line[k] = 0;
    for (int k = 0; k < DN_RING; k++) dn_bits[k] = 0;
    last_phase = 0;
    repeat (8) @(posedge clk_tx);
    rst = 0;
    // wait for both ONUs to lock
    repeat (3 * 130) @(posedge clk_tx);
    for (int i = 0; i < N_ONU; i++) check(locked[i], $sformatf("onu%0d locked", i));
    ident_ok = 1;
    // individual commands, a broadcast, a command to an absent ONU
    send_cmd(0, 7'd1, 15'h1234);
    send_cmd(0, 7'd2, 15'h0abc);
    send_cmd(1, 7'd0, 15'h7001);
    send_cmd(0, 7'd5, 15'h0555);
    send_cmd(0, 7'd1, 15'h2222);   // ONU1's mailbox is still full: back-pressure
    send_cmd(1, 7'd0, 15'h7002);
    repeat (2 * 130) @(posedge clk_tx);
    for (int r = 0; r < 6; r++) begin
      send_cmd(0, 7'(1 + r % 2), 15'(16'h0100 + r));
      repeat (40) @(posedge clk_tx);
    end
    repeat ((SF_RUN - 9) * 130) @(posedge clk_tx);

    // ---- summary ----
    for (int i = 0; i < N_ONU; i++) begin
      check(locked[i], $sformatf("onu%0d still locked", i));
      check(n_trig[i] > 16 * 65, $sformatf("onu%0d triggers %0d", i, n_trig[i]));
      check(exp_cmd[i].size() == 0, $sformatf("onu%0d missing %0d commands", i, exp_cmd[i].size()));
      check(n_burst[i] >= 4, $sformatf("onu%0d bursts %0d", i, n_burst[i]));
      $display("onu%0d: delay %0d bits, barrel shifter %0d, latency %0d ps, triggers %0d, bursts %0d",
               i, dn_delay[i], bs_pos[i], lat0[i], n_trig[i], n_burst[i]);
    end
    check(bs_pos[0] != 0 || bs_pos[1] != 0, "a nonzero barrel shift occurred");
    check(n_ind_rx >= 8, $sformatf("individual commands %0d", n_ind_rx));
    check(n_bc_rx == 4, $sformatf("broadcast receptions %0d", n_bc_rx));
    check(n_backpressure > 0, "command back-pressure occurred");
    check(n_grant >= 8, $sformatf("grants %0d", n_grant));
    check(n_phase_change >= 2, $sformatf("oversampler phase changes %0d", n_phase_change));
    check(overlap_cycles == 0, "two lasers on at once");
    $display("mechanisms: triggers %0d/%0d ind.cmds %0d bcast rx %0d backpressure %0d grants %0d bursts %0d/%0d phase changes %0d",
             n_trig[0], n_trig[1], n_ind_rx, n_bc_rx, n_backpressure, n_grant, n_burst[0], n_burst[1], n_phase_change);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
