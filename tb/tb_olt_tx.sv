// tb_olt_tx: self-checking test of the OLT downstream transmitter.
// The 20-bit words are decoded in the testbench (two decoders in series) and
// checked: no code or disparity errors on the line, the K28.5 comma at the
// start of every 130-word superframe (marked by sof_o), and every trigger
// byte sampled with bx_o at a clock edge present as the second code group of
// the word registered at the next edge, a fixed latency, with the auxiliary
// byte in the word after it. A few commands and a change of the ONU enables go through too.
`timescale 1ns/1ps
module tb_olt_tx;
  import pon_pkg::*;
  logic clk = 0, rst = 1;
  logic bx; logic [7:0] trig = 0, aux = 0;
  logic cmd_valid = 0, cmd_ready, cmd_bcast = 0;
  onu_addr_t cmd_onu = '0; logic [14:0] cmd_payload = '0;
  logic [63:0] en = 64'h3;
  onu_addr_t r_addr;
  logic [19:0] word; logic sof;
  logic rd = 0, rd_mid, rd_n;
  logic [7:0] d0, d1; logic k0, k1, ce0, ce1, de0, de1;
  int checks = 0, failures = 0;

  olt_tx dut (.clk, .rst, .bx_o(bx), .trig_i(trig), .aux_i(aux),
    .cmd_valid_i(cmd_valid), .cmd_ready_o(cmd_ready), .cmd_bcast_i(cmd_bcast),
    .cmd_onu_i(cmd_onu), .cmd_payload_i(cmd_payload), .onu_enable_i(en),
    .r_addr_o(r_addr), .tx_word_o(word), .sof_o(sof));

  dec8b10b u_d0 (.code_i(word[9:0]),   .rd_i(rd),     .d_o(d0), .k_o(k0), .code_err_o(ce0), .disp_err_o(de0), .rd_o(rd_mid));
  dec8b10b u_d1 (.code_i(word[19:10]), .rd_i(rd_mid), .d_o(d1), .k_o(k1), .code_err_o(ce1), .disp_err_o(de1), .rd_o(rd_n));

  always #6.25 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  logic [7:0] trig_at [int];
  logic [7:0] aux_at [int];
  int n_trig = 0, n_sof = 0, last_sof = -1, n_cmd = 0;
  bit started = 0;

  always @(negedge clk) if (!rst && bx) begin trig <= 8'($urandom); aux <= 8'($urandom); end

  always @(posedge clk) begin
    cyc++;
    if (!rst && bx) begin trig_at[cyc] = trig; aux_at[cyc] = aux; end
    if (!rst) begin
      #1;
      if (sof) begin
        check(k0 && d0 == K28_5, "K28.5 at superframe start");
        if (last_sof >= 0) check(cyc - last_sof == 130, "130 words per superframe");
        last_sof = cyc; n_sof++; started = 1;
      end else if (started) begin
        check(!k0 && !k1, "no other control characters");
      end
      if (started) begin
        check(!ce0 && !ce1 && !de0 && !de1, "line code valid");
        if (trig_at.exists(cyc - 1)) begin
          check(d1 == trig_at[cyc - 1], $sformatf("trigger latency: %h vs %h", d1, trig_at[cyc - 1]));
          n_trig++;
        end
        if (aux_at.exists(cyc - 2))
          check(d0 == aux_at[cyc - 2], "aux byte follows its trigger");
      end
      rd = rd_n;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (300) @(posedge clk);
    for (int i = 0; i < 20; i++) begin
      @(negedge clk);
      cmd_valid = 1; cmd_bcast = (i % 5 == 0); cmd_onu = onu_addr_t'(1 + i % 2);
      cmd_payload = 15'(16'h1000 + i);
      @(posedge clk); while (!cmd_ready) @(posedge clk);
      n_cmd++;
      #0.1 cmd_valid = 0;
    end
    en = 64'hFFFF_0000_FFFF_0000;
    repeat (20 * 130) @(posedge clk);
    check(n_sof >= 20 && n_trig > 20 * 64, $sformatf("superframes %0d triggers %0d", n_sof, n_trig));
    $display("superframes %0d, triggers checked %0d, commands %0d", n_sof, n_trig, n_cmd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
