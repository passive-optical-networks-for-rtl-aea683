// tb_onu_burst_tx: self-checking test of the ONU upstream burst transmitter.
// After each grant the testbench decodes the code groups while the laser is
// on and checks the burst against the upstream frame: LASER_ON_CYCLES + 32
// preamble groups (0x55, D21.2), K28.5, the second SFD byte, the 2-byte address,
// then the 90 bytes handed over on pl_rd_o, in order, with a valid line code
// and the laser on for exactly LASER_ON_CYCLES + 126 cycles starting the
// cycle after the grant. A grant during a burst must be ignored. Run with
// the default settling time and with none.
`timescale 1ns/1ps
module tb_onu_burst_tx;
  import pon_pkg::*;
  localparam onu_addr_t ME = 7'd37;
  logic clk = 0, rst = 1;
  logic grant = 0;
  logic [7:0] pl_data [2];
  int checks = 0, failures = 0;

  always #6.25 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // two instances: default settling time and none
  logic       pl_rd [2], laser [2], busy [2];
  logic [9:0] code [2];
  onu_burst_tx #(.LASER_ON_CYCLES(2)) dut0 (.clk, .rst, .my_addr_i(ME), .grant_i(grant),
    .pl_data_i(pl_data[0]), .pl_rd_o(pl_rd[0]), .tx_code_o(code[0]), .laser_en_o(laser[0]), .busy_o(busy[0]));
  onu_burst_tx #(.LASER_ON_CYCLES(0)) dut1 (.clk, .rst, .my_addr_i(ME), .grant_i(grant),
    .pl_data_i(pl_data[1]), .pl_rd_o(pl_rd[1]), .tx_code_o(code[1]), .laser_en_o(laser[1]), .busy_o(busy[1]));

  // decoders on both outputs
  logic rd [2], rd_n [2], k [2], ce [2], de [2];
  logic [7:0] d [2];
  for (genvar i = 0; i < 2; i++) begin : g_dec
    dec8b10b u_dec (.code_i(code[i]), .rd_i(rd[i]), .d_o(d[i]), .k_o(k[i]),
                    .code_err_o(ce[i]), .disp_err_o(de[i]), .rd_o(rd_n[i]));
  end

  // payload: a counter per instance
  int unsigned cnt [2] = '{0, 0};
  for (genvar i = 0; i < 2; i++) begin : g_pl
    assign pl_data[i] = 8'(cnt[i] * 7 + 3);
    always @(posedge clk) if (!rst && pl_rd[i]) cnt[i] <= cnt[i] + 1;
  end

  int settle [2] = '{2, 0};
  int n_burst [2] = '{0, 0};

  for (genvar i = 0; i < 2; i++) begin : g_chk
    int pos = -1;               // position in the burst, -1 = laser off
    int start_cyc = 0, cyc = 0, grant_cyc = -10;
    int unsigned base;
    always @(posedge clk) begin
      cyc++;
      if (grant && !busy[i]) grant_cyc = cyc;
      #1;
      if (!rst) begin
        if (laser[i]) begin
          if (pos < 0) begin
            pos = 0;
            check(cyc == grant_cyc + 1, "laser on the cycle after the grant");
          end
          check(!ce[i] && !de[i], $sformatf("u%0d line code at %0d", i, pos));
          if (pos < settle[i] + 32)
            check(code[i] == 10'b1010010101, $sformatf("u%0d preamble %b", i, code[i]));
          else if (pos == settle[i] + 32) check(k[i] && d[i] == K28_5, "SFD K28.5");
          else if (pos == settle[i] + 33) check(!k[i] && d[i] == SFD2_BYTE, "SFD byte 2");
          else if (pos == settle[i] + 34) check(d[i] == 8'h00, "address high byte");
          else if (pos == settle[i] + 35) begin
            check(d[i] == {1'b0, ME}, "address low byte");
            base = cnt[i];
          end else begin
            check(!k[i] && d[i] == 8'((base + pos - settle[i] - 36) * 7 + 3),
                  $sformatf("u%0d data byte %0d", i, pos - settle[i] - 36));
          end
          rd[i] = rd_n[i];
          pos++;
        end else begin
          check(code[i] == '0, "no code group with the laser off");
          rd[i] = 0;                // each burst starts at RD-
          if (pos >= 0) begin
            check(pos == settle[i] + 126, $sformatf("u%0d burst length %0d", i, pos));
            n_burst[i]++;
          end
          pos = -1;
        end
      end
    end
  end

  // pl_rd only during data
  int n_rd = 0;
  always @(posedge clk) if (!rst && pl_rd[0]) n_rd++;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int b = 0; b < 4; b++) begin
      repeat ($urandom_range(1, 10)) @(negedge clk);
      grant = 1; @(negedge clk); grant = 0;
      repeat (60) @(negedge clk);
      grant = 1; @(negedge clk); grant = 0;     // ignored: burst in progress
      repeat (140) @(negedge clk);
    end
    check(n_burst[0] == 4 && n_burst[1] == 4, $sformatf("bursts %0d %0d", n_burst[0], n_burst[1]));
    check(n_rd == 4 * 90, $sformatf("payload reads %0d", n_rd));
    $display("bursts %0d/%0d, payload bytes %0d", n_burst[0], n_burst[1], n_rd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
