// tb_olt_bw_alloc: self-checking test of the upstream arbiter.
// With random enable masks, each advance must move the grant to the next
// enabled ONU after the previous grant (round robin, wrapping from 64 to 1),
// a mask of zeros must give address 0, and the grant must not move without
// an advance. A reference model in the testbench computes the expected
// address.
`timescale 1ns/1ps
module tb_olt_bw_alloc;
  import pon_pkg::*;
  logic clk = 0, rst = 1, adv = 0;
  logic [63:0] en;
  onu_addr_t grant;
  int checks = 0, failures = 0;
  int last;          // last granted index, 0-based

  olt_bw_alloc dut (.clk, .rst, .onu_enable_i(en), .advance_i(adv), .grant_o(grant));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic int model_next(input logic [63:0] m, input int from);
    for (int off = 1; off <= 64; off++)
      if (m[(from + off) % 64]) return (from + off) % 64;
    return -1;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nx;
    en = 64'h3;
    repeat (3) @(posedge clk);
    rst = 0;
    last = 63;
    @(negedge clk);
    // two ONUs: 1, 2, 1, 2 ...
    for (int i = 0; i < 6; i++) begin
      check(grant == onu_addr_t'(1 + i % 2), $sformatf("two-ONU grant %0d", grant));
      adv = 1; @(negedge clk); adv = 0;
      last = i % 2;
    end
    // random masks, advances and idle cycles
    for (int i = 0; i < 2000; i++) begin
      if ($urandom_range(0, 19) == 0) en = '0;
      else if ($urandom_range(0, 9) == 0) en = {$urandom, $urandom};
      else if ($urandom_range(0, 9) == 0) en = 64'(1) << $urandom_range(0, 63);
      #1;
      nx = model_next(en, last);
      check(grant == ((nx < 0) ? 7'd0 : onu_addr_t'(nx + 1)),
            $sformatf("grant %0d expected %0d", grant, nx + 1));
      adv = 1'($urandom_range(0, 1));
      @(negedge clk);
      if (adv && nx >= 0) last = nx;
      adv = 0;
    end
    // all 64 in turn
    en = '1;
    #1;
    for (int i = 0; i < 130; i++) begin
      check(grant == onu_addr_t'((last + 1) % 64 + 1), "full mask sequence");
      adv = 1; @(negedge clk); adv = 0;
      last = (last + 1) % 64;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
