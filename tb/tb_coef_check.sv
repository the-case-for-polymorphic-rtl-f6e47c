// tb_coef_check: checker used by tb_prf_cust_coef for one p x q geometry.
// Instantiates a prf_cust_coef for every module position, applies random
// conflict-free accesses of every scheme and compares c_i / c_j with a
// brute-force search: find the lane whose element the scheme assigns to
// module (k, l) and take its tile offsets. Reports its counts when done.
module tb_coef_check #(
  parameter int P = 2,
  parameter int Q = 4,
  parameter int TESTS = 3000
) (
  output int  checks,
  output int  failures,
  output int  diag_cases,
  output bit  done
);
  import prf_pkg::*;
  import tb_prf_ref_pkg::*;

  localparam int N = 128, M = 128, L = P * Q;
  localparam int CW = $clog2(P + Q + 2) + 2;

  scheme_e    scheme;
  access_e    acc;
  logic [6:0] i, j;
  logic signed [CW-1:0] ci [L];
  logic signed [CW-1:0] cj [L];

  for (genvar k = 0; k < P; k++) begin : g_k
    for (genvar l = 0; l < Q; l++) begin : g_l
      prf_cust_coef #(.N(N), .M(M), .P(P), .Q(Q), .MOD_V(k), .MOD_H(l)) dut (
        .scheme(scheme), .acc(acc), .i(i), .j(j),
        .c_i(ci[k * Q + l]), .c_j(cj[k * Q + l])
      );
    end
  end

  function automatic int fl(int a, int m);
    return (a >= 0) ? a / m : -((-a + m - 1) / m);
  endfunction

  initial begin
    checks = 0;
    failures = 0;
    diag_cases = 0;
    done = 0;
    for (int t = 0; t < TESTS; t++) begin
      int s, a, bi, bj;
      s = t % 5;
      rand_access(s, P, Q, N, M, a, bi, bj);
      scheme = scheme_e'(s);
      acc    = access_e'(a);
      i      = 7'(bi);
      j      = 7'(bj);
      #1;
      if (a == A_MDIAG || a == A_SDIAG) diag_cases++;
      for (int m = 0; m < L; m++) begin
        int found, eci, ecj;
        found = 0;
        for (int n = 0; n < L; n++) begin
          int x, y, da, db;
          coord(a, bi, bj, n, P, Q, N, M, x, y);
          if (module_of(s, x, y, P, Q) == m && found == 0) begin
            offs(a, n, P, Q, da, db);
            eci = fl(bi + da, P) - fl(bi, P);
            ecj = fl(bj + db, Q) - fl(bj, Q);
            found = 1;
          end
        end
        checks++;
        if (found == 0 || int'(ci[m]) != eci || int'(cj[m]) != ecj) begin
          failures++;
          if (failures < 10)
            $display("FAIL p=%0d q=%0d scheme %0d acc %0d (%0d,%0d) module %0d: got (%0d,%0d) want (%0d,%0d)",
                     P, Q, s, a, bi, bj, m, ci[m], cj[m], eci, ecj);
        end
      end
    end
    done = 1;
  end
endmodule
