// tb_enc8b10b: self-checking test of the 8b/10b encoder.
// Checks published code groups for a set of characters in both
// disparities, that every data character gives a distinct group with 4..6
// ones and a correct rd_o, and that a long random stream (data and control
// characters) keeps the running disparity within +-1 at character
// boundaries, never runs more than 5 equal bits and contains the comma
// pattern only where K28.5 was sent.
`timescale 1ns/1ps
module tb_enc8b10b;
  logic       k, rd;
  logic [7:0] d;
  logic [9:0] code;
  logic       rd_o;
  int checks = 0, failures = 0;

  enc8b10b dut (.k_i(k), .d_i(d), .rd_i(rd), .code_o(code), .rd_o(rd_o));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // group written as in the standard tables: abcdei fghj, a first
  function automatic logic [9:0] tab(input string s);
    logic [9:0] c;
    int j = 0;
    for (int i = 0; i < s.len(); i++)
      if (s[i] == "0" || s[i] == "1") begin c[j] = (s[i] == "1"); j++; end
    return c;
  endfunction

  task automatic known(input bit kk, input logic [7:0] dd, input bit r,
                       input string exp, input string name);
    k = kk; d = dd; rd = r; #1;
    check(code == tab(exp), $sformatf("%s rd%0d: got %b", name, r, code));
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int disp, run, prev, ones;
    logic [9:0] seen [2][256];
    logic [19:0] pair;
    logic [9:0] last;
    bit last_k287;
    known(1, 8'hBC, 0, "001111 1010", "K28.5");
    known(1, 8'hBC, 1, "110000 0101", "K28.5");
    known(1, 8'h3C, 0, "001111 1001", "K28.1");
    known(1, 8'h3C, 1, "110000 0110", "K28.1");
    known(1, 8'hFC, 0, "001111 1000", "K28.7");
    known(1, 8'hF7, 0, "111010 1000", "K23.7");
    known(1, 8'hF7, 1, "000101 0111", "K23.7");
    known(0, 8'h00, 0, "100111 0100", "D0.0");
    known(0, 8'h00, 1, "011000 1011", "D0.0");
    known(0, 8'hB5, 0, "101010 1010", "D21.5");
    known(0, 8'hB5, 1, "101010 1010", "D21.5");
    known(0, 8'h4A, 0, "010101 0101", "D10.2");
    known(0, 8'h03, 0, "110001 1011", "D3.0");
    known(0, 8'h03, 1, "110001 0100", "D3.0");
    known(0, 8'hF1, 0, "100011 0111", "D17.7");
    known(0, 8'hF1, 1, "100011 0001", "D17.7");
    known(0, 8'h67, 0, "111000 1100", "D7.3");
    known(0, 8'h67, 1, "000111 0011", "D7.3");
    known(0, 8'hFF, 0, "101011 0001", "D31.7");

    // every data character, both disparities
    for (int r = 0; r < 2; r++)
      for (int v = 0; v < 256; v++) begin
        k = 0; d = 8'(v); rd = r[0]; #1;
        ones = $countones(code);
        check(ones >= 4 && ones <= 6, $sformatf("D%0d ones %0d", v, ones));
        check(rd_o == ((ones == 5) ? rd : (ones > 5)), $sformatf("D%0d rd_o", v));
        check(!(ones == 6 && rd) && !(ones == 4 && !rd), $sformatf("D%0d disparity sign", v));
        seen[r][v] = code;
        for (int u = 0; u < v; u++)
          if (seen[r][u] == code) check(0, $sformatf("D%0d and D%0d share a group", u, v));
      end

    // random stream
    disp = -1; run = 0; prev = -1; rd = 0;   // RD- is a running disparity of -1 last = '0; last_k287 = 0;
    for (int n = 0; n < 20000; n++) begin
      if ($urandom_range(0, 9) == 0) begin
        static logic [7:0] ks [12] = '{8'h1C, 8'h3C, 8'h5C, 8'h7C, 8'h9C, 8'hBC, 8'hDC, 8'hFC,
                                8'hF7, 8'hFB, 8'hFD, 8'hFE};
        k = 1; d = ks[$urandom_range(0, 11)];
      end else begin
        k = 0; d = 8'($urandom);
      end
      #1;
      for (int b = 0; b < 10; b++) begin
        disp += code[b] ? 1 : -1;
        if (int'(code[b]) == prev) run++; else run = 1;
        prev = int'(code[b]);
        check(run <= 5, $sformatf("run length %0d at char %0d", run, n));
      end
      check(disp == 1 || disp == -1, $sformatf("running disparity %0d", disp));
      check(rd_o == (disp > 0), "rd_o matches line disparity");
      // commas only inside K28.1/5/7 groups, never across boundaries
      pair = {code, last};
      // (K28.7 is the one character allowed to form one with its successor)
      for (int p = 1; p < 10; p++)
        if (!last_k287 && (pair[p +: 7] == 7'b1111100 || pair[p +: 7] == 7'b0000011))
          check(0, $sformatf("comma across boundary at char %0d", n));
      if (code[6:0] == 7'b1111100 || code[6:0] == 7'b0000011)
        check(k && (d == 8'hBC || d == 8'h3C || d == 8'hFC), "comma only in K28.1/5/7");
      last = code;
      last_k287 = k && d == 8'hFC;
      rd = rd_o;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
