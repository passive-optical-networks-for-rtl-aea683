// tb_onu: self-checking test of one ONU against the OLT transmitter.
// The OLT transmitter's 20-bit words go into a bit stream which the ONU
// reads with a random delay in bits, as a deserializer with an arbitrary
// word phase would. The OLT sends a counting trigger byte every bunch
// crossing, commands to this ONU, to another ONU and to all, and grants the
// upstream channel to this ONU every superframe.
// Checks: the ONU locks with a barrel-shifter position equal to the delay
// modulo 20; triggers arrive in order, one per 25 ns, with one constant
// latency; exactly the commands for this ONU and the broadcasts arrive;
// each grant produces one burst with the laser on for the settle time plus
// 126 characters, carrying preamble, SFD, this ONU's address and the data
// bytes it pulled, in that order (checked by decoding the code groups).
`timescale 1ns/1ps
module tb_onu;
  import pon_pkg::*;
  localparam int LON = 2;
  localparam int NSF = 8;                  // superframes to run

  logic clk = 0, rst = 1;
  logic bx; logic [7:0] trig = '0, aux = '0;
  logic cmd_valid = 0, cmd_ready, cmd_bcast = 0; onu_addr_t cmd_onu = '0;
  logic [14:0] cmd_payload = '0;
  logic [N_SLOTS-1:0] onu_enable;
  onu_addr_t r_addr;
  logic [19:0] olt_word; logic olt_sof;

  onu_addr_t my_addr;
  logic [19:0] rx_word = '0;
  logic [4:0] bs_pos; logic bs_locked, frm_locked, sof, tv, av, cv, cb, gr, rerr;
  logic [7:0] tg, ax; logic [14:0] cp;
  logic [7:0] pl_data = '0; logic pl_rd;
  logic [9:0] tx_code; logic laser, busy;

  olt_tx u_olt (.clk, .rst, .bx_o(bx), .trig_i(trig), .aux_i(aux),
    .cmd_valid_i(cmd_valid), .cmd_ready_o(cmd_ready), .cmd_bcast_i(cmd_bcast),
    .cmd_onu_i(cmd_onu), .cmd_payload_i(cmd_payload), .onu_enable_i(onu_enable),
    .r_addr_o(r_addr), .tx_word_o(olt_word), .sof_o(olt_sof));

  onu #(.LASER_ON_CYCLES(LON)) dut (.clk, .rst, .my_addr_i(my_addr), .rx_word_i(rx_word),
    .bs_pos_o(bs_pos), .bs_locked_o(bs_locked), .frame_locked_o(frm_locked), .sof_o(sof),
    .trig_valid_o(tv), .trig_o(tg), .aux_valid_o(av), .aux_o(ax),
    .cmd_valid_o(cv), .cmd_bcast_o(cb), .cmd_payload_o(cp), .grant_o(gr),
    .rx_err_o(rerr), .pl_data_i(pl_data), .pl_rd_o(pl_rd), .tx_code_o(tx_code),
    .laser_en_o(laser), .tx_busy_o(busy));

  // decoder that follows the upstream code groups
  logic urd = 0, urd_n; logic [7:0] ud; logic uk, uce, ude;
  dec8b10b u_chk (.code_i(tx_code), .rd_i(urd), .d_o(ud), .k_o(uk),
                  .code_err_o(uce), .disp_err_o(ude), .rd_o(urd_n));

  always #6.25 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    repeat (130 * (NSF + 4)) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- downstream bit channel ----
  bit chan [int];
  int wr = 0, delay;
  longint cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int i = 0; i < 20; i++) chan[wr + i] = olt_word[i];
    wr <= wr + 20;
    if (wr - delay >= 0)
      for (int i = 0; i < 20; i++) rx_word[i] <= chan[wr - delay + i];
  end

  // ---- OLT side stimulus ----
  longint sent_at [256];
  always @(posedge clk) if (!rst && bx) begin
    sent_at[trig] = cyc;
    trig <= trig + 1'b1;
    aux  <= 8'($urandom_range(0, 255));
  end

  logic [14:0] exp_cmd [$];
  int n_cmd_sent = 0;
  initial begin
    my_addr = 7'($urandom_range(1, 64));
    delay = 60 + $urandom_range(0, 19);
    if (delay % 20 == 0) delay += 3;
    onu_enable = '0;
    onu_enable[my_addr - 1] = 1'b1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (400) @(negedge clk);          // lock first
    for (int c = 0; c < 12; c++) begin
      automatic int kind = c % 3;           // 0 mine, 1 other ONU, 2 broadcast
      cmd_valid   = 1;
      cmd_bcast   = (kind == 2);
      cmd_onu     = (kind == 1) ? 7'((int'(my_addr) % 64) + 1) : my_addr;
      cmd_payload = 15'($urandom_range(1, 32767));
      if (kind != 1) exp_cmd.push_back(cmd_payload);
      @(posedge clk);
      while (!cmd_ready) @(posedge clk);
      @(negedge clk);
      cmd_valid = 0;
      n_cmd_sent++;
    end
  end

  // ---- ONU checks ----
  logic [7:0] last_tg; bit have_tg = 0;
  longint lat = -1, last_tv = -1;
  int n_trig = 0, n_cmd = 0, n_bc = 0;
  always @(posedge clk) if (!rst) begin
    if (frm_locked) check(bs_pos == 5'(delay % 20), $sformatf("bs_pos %0d exp %0d", bs_pos, delay % 20));
    if (tv) begin
      n_trig++;
      if (have_tg) begin
        check(tg == last_tg + 1'b1, $sformatf("trigger %0d after %0d", tg, last_tg));
        check(cyc - last_tv == 2, "one trigger per 25 ns");
      end
      if (lat < 0) lat = cyc - sent_at[tg];
      else check(cyc - sent_at[tg] == lat, $sformatf("trigger latency %0d exp %0d", cyc - sent_at[tg], lat));
      last_tg = tg; have_tg = 1; last_tv = cyc;
    end
    if (cv) begin
      automatic int hit = -1;
      foreach (exp_cmd[j]) if (exp_cmd[j] == cp && hit < 0) hit = j;
      check(hit >= 0, $sformatf("unexpected command %h", cp));
      if (hit >= 0) exp_cmd.delete(hit);
      n_cmd++;
      if (cb) n_bc++;
    end
    check(!rerr, "no downstream code errors");
  end

  // ---- upstream burst checks ----
  logic [7:0] pulled [$];
  int n_grant = 0, n_burst = 0, pos = -1;
  always @(posedge clk) if (!rst) begin
    if (pl_rd) begin pulled.push_back(pl_data); pl_data <= pl_data + 8'd7; end
    if (gr) n_grant++;
    if (laser) begin
      if (pos < 0) pos = 0;
      if (pos >= LON) begin : chr
        automatic int c = pos - LON;
        automatic logic [7:0] ed; automatic logic ek;
        ek = (c == UP_PREAMBLE_B);
        if (c < UP_PREAMBLE_B) ed = PREAMBLE_BYTE;
        else if (c == UP_PREAMBLE_B) ed = K28_5;
        else if (c == UP_PREAMBLE_B + 1) ed = SFD2_BYTE;
        else if (c == UP_PREAMBLE_B + 2) ed = 8'h00;
        else if (c == UP_PREAMBLE_B + 3) ed = {1'b0, my_addr};
        else ed = (pulled.size() > 0) ? pulled.pop_front() : 8'hxx;
        check(!uce, $sformatf("code error at char %0d", c));
        check(ud == ed && uk == ek, $sformatf("burst char %0d: got %h/%0d exp %h/%0d", c, ud, uk, ed, ek));
      end
      urd <= urd_n;
      pos++;
    end else if (pos >= 0) begin
      check(pos == LON + UP_FRAME_B, $sformatf("laser on for %0d cycles", pos));
      n_burst++;
      pos = -1;
      urd <= 1'b0;
    end
  end

  initial begin
    repeat (130 * NSF) @(posedge clk);
    check(bs_locked && frm_locked, "ONU locked");
    check(n_trig > 400, $sformatf("triggers received %0d", n_trig));
    check(exp_cmd.size() == 0 && n_cmd_sent == 12, $sformatf("%0d commands missing", exp_cmd.size()));
    check(n_bc == 4, $sformatf("broadcasts %0d", n_bc));
    check(n_burst > 0 && n_burst >= n_grant - 1, $sformatf("bursts %0d grants %0d", n_burst, n_grant));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
