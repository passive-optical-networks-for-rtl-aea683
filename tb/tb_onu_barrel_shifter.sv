// tb_onu_barrel_shifter: self-checking test of the ONU word alignment.
// An 8b/10b stream (K28.5 at the start of every 130-word superframe, random
// data otherwise, encoded in the testbench) is cut into 20-bit words after a
// random number of leading bits, as a deserializer whose divider started on
// an arbitrary serial edge would. After the first K the block must report
// the offset (leading bits mod 20) on pos_o and output the original words,
// two edges later. Then bits are slipped three times (a changed divider
// phase); after the next K the new offset and words must be right again.
`timescale 1ns/1ps
module tb_onu_barrel_shifter;
  import pon_pkg::*;
  logic clk = 0, rst = 1;
  logic [19:0] rx_word, aligned;
  logic comma, locked;
  logic [4:0] pos;
  int checks = 0, failures = 0;

  onu_barrel_shifter dut (.clk, .rst, .rx_word_i(rx_word), .aligned_o(aligned),
                          .comma_o(comma), .pos_o(pos), .locked_o(locked));

  // stimulus encoder (two characters per word)
  logic ek0, ek1, erd = 0, erd_mid, erd_n;
  logic [7:0] ed0, ed1;
  logic [9:0] ec0, ec1;
  enc8b10b u_e0 (.k_i(ek0), .d_i(ed0), .rd_i(erd),     .code_o(ec0), .rd_o(erd_mid));
  enc8b10b u_e1 (.k_i(ek1), .d_i(ed1), .rd_i(erd_mid), .code_o(ec1), .rd_o(erd_n));

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

  bit          bits [$];
  logic [19:0] orig [$];
  int          lead;         // bits ahead of word 0 of the stream
  int          j = 0;        // rx words delivered
  bit          valid_chk = 0;
  int          n_ok = 0, n_relock = 0;

  task automatic gen_word(input int m);
    ek0 = (m % 130 == 0); ed0 = ek0 ? K28_5 : 8'($urandom);
    ek1 = 0;              ed1 = 8'($urandom);
    #0.01;
    orig.push_back({ec1, ec0});
    for (int b = 0; b < 10; b++) bits.push_back(ec0[b]);
    for (int b = 0; b < 10; b++) bits.push_back(ec1[b]);
    erd = erd_n;
  endtask

  initial begin
    static int m = 0, pending_slip = 0;
    lead = $urandom_range(0, 19);
    for (int b = 0; b < lead; b++) bits.push_back(1'($urandom));
    rx_word = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int cyc = 0; cyc < 130 * 40; cyc++) begin
      @(negedge clk);
      if (cyc == 130 * 10 || cyc == 130 * 20 + 37 || cyc == 130 * 30 + 5) begin
        int s;
        s = $urandom_range(1, 19);
        for (int b = 0; b < s; b++) bits.push_front(1'($urandom));
        lead += s;
        valid_chk = 0;
      end
      while (bits.size() < 60) begin gen_word(m); m++; end
      for (int b = 0; b < 20; b++) rx_word[b] = bits.pop_front();
      @(posedge clk);
      j++;
      #1;
      if (comma && !valid_chk) begin valid_chk = 1; n_relock++; end
      if (valid_chk) begin
        int idx;
        idx = j - 2 - (lead / 20);
        check(locked && pos == 5'(lead % 20), $sformatf("pos %0d expected %0d", pos, lead % 20));
        check(idx >= 0 && aligned == orig[idx], $sformatf("word %0d misaligned", idx));
        n_ok++;
      end
    end
    check(n_relock == 4, $sformatf("locked %0d times", n_relock));
    check(n_ok > 130 * 30, "aligned words checked");
    $display("relocks %0d, words checked %0d, final offset %0d", n_relock, n_ok, lead % 20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
