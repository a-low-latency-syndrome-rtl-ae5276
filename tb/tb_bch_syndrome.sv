// tb_bch_syndrome: checks the syndrome unit against polynomial long division.
// Codewords built as m(x)*g(x) must give zero. Single and double errors must
// give the remainder of the error polynomial, which is never zero because the
// code has minimum distance 7. Random words are also compared.
module tb_bch_syndrome;
  import sdld_ref_pkg::*;
  logic [62:0] yb;
  logic [17:0] s;
  int checks = 0, failures = 0;

  bch_syndrome dut (.yb(yb), .s(s));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [62:0] encode(logic [44:0] m);
    logic [62:0] c = '0;
    for (int i = 0; i < 45; i++) if (m[i]) c ^= 63'(G) << i;
    return c;
  endfunction

  initial begin
    for (int t = 0; t < 300; t++) begin
      logic [62:0] c, e;
      int a, b;
      c = encode({$urandom, $urandom} & 45'h1F_FFFF_FFFF_FF);
      yb = c; #1;
      check(s == '0, "codeword has zero syndrome");
      a = int'($urandom_range(62));
      b = int'($urandom_range(62));
      e = (63'(1) << a) | (63'(1) << b);
      yb = c ^ e; #1;
      check(s == poly_mod_g(e), "error syndrome");
      check(s != '0, "errors detected");
      yb = {$urandom, $urandom} & 63'h7FFF_FFFF_FFFF_FFFF; #1;
      check(s == poly_mod_g(yb), "random word");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
