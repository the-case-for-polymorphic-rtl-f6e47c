// tb_prf_maf: self-checking test of the module assignment function.
// For every scheme, compares select_v/select_h with the reference over the
// whole 128 x 128 matrix, checks a few hand-worked values, and checks that
// every conflict-free pattern of the scheme hits p*q distinct modules.
module tb_prf_maf;
  import prf_pkg::*;
  import tb_prf_ref_pkg::*;

  localparam int N = 128, M = 128, P = 2, Q = 4, L = P * Q;

  scheme_e    scheme;
  logic [6:0] i, j;
  logic [0:0] sv;
  logic [1:0] sh;
  int checks = 0, failures = 0;

  prf_maf #(.N(N), .M(M), .P(P), .Q(Q)) dut (
    .scheme(scheme), .i(i), .j(j), .select_v(sv), .select_h(sh)
  );

  task automatic expect_mod(int s, int x, int y, int want);
    scheme = scheme_e'(s);
    i = 7'(x);
    j = 7'(y);
    #1;
    checks++;
    if (int'(sv) * Q + int'(sh) != want) begin
      failures++;
      if (failures < 10)
        $display("FAIL scheme %0d (%0d,%0d): got %0d want %0d", s, x, y,
                 int'(sv) * Q + int'(sh), want);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // hand-worked: RoCo (5,6): v = (5 + 1) mod 2 = 0, h = (2 + 6) mod 4 = 0
    expect_mod(S_ROCO, 5, 6, 0);
    // RoCo (3,4): v = (3 + 1) mod 2 = 0, h = (1 + 4) mod 4 = 1
    expect_mod(S_ROCO, 3, 4, 1);
    // ReRo (0,4): v = 1, h = 0
    expect_mod(S_RERO, 0, 4, 4);
    // ReTr (2,1) with p < q: v = 0, h = (2 + 1) mod 4 = 3
    expect_mod(S_RETR, 2, 1, 3);
    for (int s = 0; s < 5; s++)
      for (int x = 0; x < N; x++)
        for (int y = 0; y < M; y++)
          expect_mod(s, x, y, module_of(s, x, y, P, Q));
    // conflict freedom of the reference patterns, evaluated through the DUT
    for (int s = 0; s < 5; s++)
      for (int t = 0; t < 400; t++) begin
        int acc, bi, bj, x, y;
        bit [L-1:0] seen;
        rand_access(s, P, Q, N, M, acc, bi, bj);
        if (t == 0 && s == S_ROCO) begin acc = A_RECT; bi = 4; bj = 5; end
        seen = '0;
        scheme = scheme_e'(s);
        for (int n = 0; n < L; n++) begin
          coord(acc, bi, bj, n, P, Q, N, M, x, y);
          i = 7'(x); j = 7'(y); #1;
          seen[int'(sv) * Q + int'(sh)] = 1'b1;
        end
        checks++;
        if (seen != '1) begin
          failures++;
          $display("FAIL conflict: scheme %0d acc %0d at (%0d,%0d)", s, acc, bi, bj);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
