// tb_prf_cust_coef: self-checking test of the customized addressing
// coefficients for three module geometries: 2 x 4 (default), 4 x 2 (ReTr
// with p > q) and 4 x 8. Also checks the modular
// inverses used by the diagonals against the table of omega constants for
// p = 2, 4 and q = 2, 4, 8 (e.g. omega_{p+1} = 5 for p = 4, q = 8: 5*5 = 1 mod 8).
module tb_prf_cust_coef;
  import prf_pkg::*;

  int c0, f0, d0, c1, f1, d1, c2, f2, d2;
  bit e0, e1, e2;
  int checks = 0, failures = 0;

  tb_coef_check #(.P(2), .Q(4)) u_24 (.checks(c0), .failures(f0), .diag_cases(d0), .done(e0));
  tb_coef_check #(.P(4), .Q(2)) u_42 (.checks(c1), .failures(f1), .diag_cases(d1), .done(e1));
  tb_coef_check #(.P(4), .Q(8)) u_48 (.checks(c2), .failures(f2), .diag_cases(d2), .done(e2));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (e0 && e1 && e2);
    checks = c0 + c1 + c2 + 1;
    failures = f0 + f1 + f2;
    // omega constants for p = 2, 4 and q = 2, 4, 8, written out by hand:
    // [table][p index][q index], tables omega_{q+1}, omega_{q-1}, omega_{p+1}, omega_{p-1}
    begin
      int tab [4][2][3] = '{'{'{1, 1, 1}, '{3, 1, 1}},
                            '{'{1, 1, 1}, '{1, 3, 3}},
                            '{'{1, 3, 3}, '{1, 1, 5}},
                            '{'{1, 1, 1}, '{1, 3, 3}}};
      int pv [2] = '{2, 4};
      int qv [3] = '{2, 4, 8};
      for (int a = 0; a < 2; a++)
        for (int b = 0; b < 3; b++) begin
          int p, q;
          p = pv[a];
          q = qv[b];
          checks += 4;
          if (modinv((q + 1) % p, p) != tab[0][a][b]) failures++;
          if (modinv((q - 1) % p, p) != tab[1][a][b]) failures++;
          if (modinv((p + 1) % q, q) != tab[2][a][b]) failures++;
          if (modinv((p - 1) % q, q) != tab[3][a][b]) failures++;
        end
    end
    if (d0 == 0 || d1 == 0 || d2 == 0) begin
      failures++;
      $display("FAIL no diagonal access was exercised");
    end
    $display("diagonal cases: %0d %0d %0d", d0, d1, d2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
