// tb_olt_frame_gen: self-checking test of the downstream superframe
// generator.
// The two characters of every output word are placed in a character stream
// and checked against the superframe layout: K28.5 (with its K flag) every
// 260 characters, T at 1+4s holding the trigger byte sampled with bx_o one
// cycle before (so triggers are 4 characters = 25 ns apart everywhere), F
// after it, D1 D2 per slot, and T F R closing the superframe with R
// following the enabled ONUs in turn. Random commands to random ONUs and
// broadcasts are offered; each must appear exactly once, individual ones
// (D1[7] = 1) only in their ONU's slot, and back-pressure must occur.
`timescale 1ns/1ps
module tb_olt_frame_gen;
  import pon_pkg::*;
  logic clk = 0, rst = 1;
  logic bx; logic [7:0] trig = 0, aux = 0;
  logic cmd_valid = 0, cmd_ready, cmd_bcast = 0;
  onu_addr_t cmd_onu = '0; logic [14:0] cmd_payload = '0;
  logic [63:0] en;
  onu_addr_t r_addr;
  logic [15:0] data; logic [1:0] kf; logic sof;
  int checks = 0, failures = 0;

  olt_frame_gen dut (.clk, .rst, .bx_o(bx), .trig_i(trig), .aux_i(aux),
    .cmd_valid_i(cmd_valid), .cmd_ready_o(cmd_ready), .cmd_bcast_i(cmd_bcast),
    .cmd_onu_i(cmd_onu), .cmd_payload_i(cmd_payload), .onu_enable_i(en),
    .r_addr_o(r_addr), .tx_data_o(data), .tx_k_o(kf), .sof_o(sof));

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

  // ---- stimulus: trigger counter, random commands ----
  int unsigned bxn = 0;
  logic [15:0] sent_tf [$];                // {F, T} in send order
  typedef struct { bit bc; int onu; logic [14:0] p; } cmd_t;
  cmd_t pending [$];
  int n_bp = 0, n_cmd_acc = 0;
  always @(posedge clk) begin
    if (!rst && bx) sent_tf.push_back({aux, trig});
    if (!rst && cmd_valid && cmd_ready) begin
      cmd_t c;
      c.bc = cmd_bcast; c.onu = int'(cmd_onu); c.p = cmd_payload;
      if (c.bc || (c.onu >= 1 && c.onu <= 64)) pending.push_back(c);
      n_cmd_acc++;
    end
    if (!rst && cmd_valid && !cmd_ready) n_bp++;
  end
  always @(negedge clk) begin
    if (!rst) begin
      if (bx) begin trig <= 8'(bxn); aux <= 8'(bxn >> 8) ^ 8'h5A; bxn++; end
      if (!cmd_valid || cmd_ready || $urandom_range(0, 3) == 0) begin
        cmd_valid <= ($urandom_range(0, 2) != 0);
        cmd_bcast <= ($urandom_range(0, 7) == 0);
        // mostly few ONUs so that mailboxes fill up
        cmd_onu   <= ($urandom_range(0, 3) == 0) ? onu_addr_t'($urandom_range(0, 66))
                                                 : onu_addr_t'($urandom_range(1, 3));
        cmd_payload <= 15'($urandom_range(1, 32767));
      end
    end
  end

  // ---- checker: character stream ----
  int ci = -1;                 // character index in the superframe, -1 = before first K
  int tf_idx = 0;
  int last_r = 63;             // last granted slot (0-based)
  logic [7:0] d1;
  int n_sf = 0, n_ind = 0, n_bc = 0, n_r = 0;
  int prev_bx_cycle = -2, cyc = 0;
  logic [15:0] exp_tf;

  task automatic take_char(input logic [7:0] c, input bit kk);
    int s, pos;
    if (kk && c == K28_5) begin
      check(ci == -1 || ci == 260, $sformatf("K at character %0d", ci));
      ci = 0; n_sf++;
    end else if (ci < 0) begin
      return;
    end else begin
      check(!kk, "K flag on a data character");
      check(ci < 260, "superframe too long");
    end
    if (ci > 0) begin
      s = (ci - 1) / 4; pos = (ci - 1) % 4;
      if (pos == 0) begin
        check(tf_idx < sent_tf.size(), "trigger before it was sent");
        exp_tf = sent_tf[tf_idx];
        check(c == exp_tf[7:0], $sformatf("T %h expected %h", c, exp_tf[7:0]));
      end else if (pos == 1) begin
        check(c == exp_tf[15:8], $sformatf("F %h expected %h", c, exp_tf[15:8]));
        tf_idx++;
      end else if (pos == 2 && s == 64) begin
        // R: next enabled ONU
        int nx = -1;
        for (int off = 1; off <= 64 && nx < 0; off++)
          if (en[(last_r + off) % 64]) nx = (last_r + off) % 64;
        check(c == ((nx < 0) ? 8'd0 : 8'(nx + 1)), $sformatf("R %0d expected %0d", c, nx + 1));
        if (nx >= 0) last_r = nx;
        n_r++;
      end else if (pos == 2) begin
        d1 = c;
      end else if (pos == 3) begin
        logic [14:0] p = {d1[6:0], c};
        if (p != '0) begin
          int hit = -1;
          foreach (pending[j])
            if (hit < 0 && pending[j].p == p &&
                (d1[7] ? (!pending[j].bc && pending[j].onu == s + 1) : pending[j].bc)) hit = j;
          check(hit >= 0, $sformatf("slot %0d: unexpected command D1=%h D2=%h", s, d1, c));
          if (hit >= 0) pending.delete(hit);
          if (d1[7]) n_ind++; else n_bc++;
        end
      end
    end
    ci++;
  endtask

  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
      if (bx) begin
        if (prev_bx_cycle >= 0) check(cyc - prev_bx_cycle == 2, "bx every 2 cycles");
        prev_bx_cycle = cyc;
      end
      #1;
      check(sof == (kf[0] && data[7:0] == K28_5), "sof marks the K word");
      take_char(data[7:0], kf[0]);
      take_char(data[15:8], kf[1]);
    end
  end

  initial begin
    en = 64'h0000_0000_0000_00B5;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (20 * 130) @(posedge clk);
    en = 64'h8000_0000_0000_0001;
    repeat (10 * 130) @(posedge clk);
    en = '0;
    repeat (3 * 130) @(posedge clk);
    en = '1;
    @(negedge clk) cmd_valid = 0;
    #0.1; force cmd_valid = 0;
    repeat (100 * 130) @(posedge clk);
    check(pending.size() == 0, $sformatf("%0d commands never sent", pending.size()));
    check(n_sf > 130, "superframes");
    check(n_ind > 50 && n_bc > 5, $sformatf("commands sent: ind %0d bc %0d", n_ind, n_bc));
    check(n_bp > 0, "back-pressure");
    $display("superframes %0d, triggers %0d, individual %0d, broadcast %0d, R %0d, back-pressure %0d",
             n_sf, tf_idx, n_ind, n_bc, n_r, n_bp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
