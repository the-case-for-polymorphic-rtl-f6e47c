// tb_prf_agu: self-checking test of the address generation unit.
// Drives random block origins and every access type and compares the p*q
// lane coordinates with the reference model, including blocks that wrap at
// the matrix edge. Default sizes (128 x 128, 2 x 4 modules).
module tb_prf_agu;
  import prf_pkg::*;
  import tb_prf_ref_pkg::*;

  localparam int N = 128, M = 128, P = 2, Q = 4, L = P * Q;

  logic [6:0] i, j;
  access_e    acc;
  logic [6:0] ei [L];
  logic [6:0] ej [L];
  int checks = 0, failures = 0;

  prf_agu #(.N(N), .M(M), .P(P), .Q(Q)) dut (.i(i), .j(j), .acc(acc), .ei(ei), .ej(ej));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int a, x, y;
      a   = t % 6;
      i   = 7'($urandom_range(N - 1));
      j   = 7'($urandom_range(M - 1));
      acc = access_e'(a);
      #1;
      for (int n = 0; n < L; n++) begin
        coord(a, int'(i), int'(j), n, P, Q, N, M, x, y);
        checks++;
        if (int'(ei[n]) != x || int'(ej[n]) != y) begin
          failures++;
          if (failures < 10)
            $display("FAIL acc=%0d (%0d,%0d) lane %0d: got (%0d,%0d) want (%0d,%0d)",
                     a, i, j, n, ei[n], ej[n], x, y);
        end
      end
    end
    // one hand-worked case: secondary diagonal from (5, 2) wraps to column 127
    i = 7'd5; j = 7'd2; acc = ACC_SDIAG; #1;
    checks++;
    if (ei[3] != 7'd8 || ej[3] != 7'd127) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
