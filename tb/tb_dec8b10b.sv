// tb_dec8b10b: self-checking test of the 8b/10b decoder.
// Decodes published code groups (both disparities) and compares with the
// characters they stand for; decodes every data character and all twelve
// control characters as produced by the encoder in both disparities;
// checks rd_o and the error flags, including groups outside the code and
// groups of the wrong disparity.
`timescale 1ns/1ps
module tb_dec8b10b;
  logic [9:0] code;
  logic       rd;
  logic [7:0] d;
  logic       k, ce, de, rd_o;
  logic       ek, erd, erd_o;
  logic [7:0] ed;
  logic [9:0] ecode;
  int checks = 0, failures = 0;

  dec8b10b dut (.code_i(code), .rd_i(rd), .d_o(d), .k_o(k),
                .code_err_o(ce), .disp_err_o(de), .rd_o(rd_o));
  // stimulus generator
  enc8b10b u_enc (.k_i(ek), .d_i(ed), .rd_i(erd), .code_o(ecode), .rd_o(erd_o));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic logic [9:0] tab(input string s);
    logic [9:0] c;
    int j = 0;
    for (int i = 0; i < s.len(); i++)
      if (s[i] == "0" || s[i] == "1") begin c[j] = (s[i] == "1"); j++; end
    return c;
  endfunction

  task automatic known(input string grp, input bit r, input bit kk, input logic [7:0] dd,
                       input bit r_after);
    code = tab(grp); rd = r; #1;
    check(d == dd && k == kk && !ce && !de && rd_o == r_after,
          $sformatf("%s: got d=%h k=%0d ce=%0d de=%0d rd=%0d", grp, d, k, ce, de, rd_o));
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static logic [7:0] ks [12] = '{8'h1C, 8'h3C, 8'h5C, 8'h7C, 8'h9C, 8'hBC, 8'hDC, 8'hFC,
                            8'hF7, 8'hFB, 8'hFD, 8'hFE};
    known("001111 1010", 0, 1, 8'hBC, 1);
    known("110000 0101", 1, 1, 8'hBC, 0);
    known("001111 1001", 0, 1, 8'h3C, 1);
    known("110000 0110", 1, 1, 8'h3C, 0);
    known("111010 1000", 0, 1, 8'hF7, 0);
    known("100111 0100", 0, 0, 8'h00, 0);
    known("011000 1011", 1, 0, 8'h00, 1);
    known("101010 1010", 0, 0, 8'hB5, 0);
    known("101010 1010", 1, 0, 8'hB5, 1);
    known("100011 0111", 0, 0, 8'hF1, 1);
    known("100011 0001", 1, 0, 8'hF1, 0);
    known("111000 1100", 0, 0, 8'h67, 0);
    known("000111 0011", 1, 0, 8'h67, 1);

    for (int r = 0; r < 2; r++) begin
      for (int v = 0; v < 256 + 12; v++) begin
        ek = (v >= 256); ed = (v >= 256) ? ks[v - 256] : 8'(v); erd = r[0]; #1;
        code = ecode; rd = r[0]; #1;
        check(d == ed && k == ek && !ce && !de && rd_o == erd_o,
              $sformatf("%s%h rd%0d: d=%h k=%0d ce=%0d de=%0d", ek ? "K" : "D", ed, r, d, k, ce, de));
      end
    end

    // groups outside the code
    code = 10'b0000000000; rd = 0; #1; check(ce, "all zeros is invalid");
    code = 10'b1111111111; rd = 1; #1; check(ce, "all ones is invalid");
    code = tab("111111 0000"); rd = 0; #1; check(ce, "111111 is invalid");
    code = tab("101010 1111"); rd = 0; #1; check(ce, "1111 is invalid");
    // D.x.A7 after a group that does not allow it
    code = tab("100111 0111"); rd = 0; #1; check(ce || de, "A7 after D0 is invalid");
    // right group, wrong disparity
    code = tab("100111 0100"); rd = 1; #1; check(de && !ce && d == 8'h00, "D0.0 RD- group under RD+");
    code = tab("001111 1010"); rd = 1; #1; check(de, "K28.5 RD- group under RD+");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
