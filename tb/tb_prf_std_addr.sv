// tb_prf_std_addr: self-checking test of the standard addressing function.
// Sweeps the whole 128 x 128 matrix against the reference tile number and
// checks that (module, address) is unique for every element under RoCo.
module tb_prf_std_addr;
  import tb_prf_ref_pkg::*;

  localparam int N = 128, M = 128, P = 2, Q = 4, L = P * Q;

  logic [6:0]  i, j;
  logic [10:0] addr;
  int checks = 0, failures = 0;
  bit used [L][N * M / L];

  prf_std_addr #(.N(N), .M(M), .P(P), .Q(Q)) dut (.i(i), .j(j), .addr(addr));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (used[m, a]) used[m][a] = 1'b0;
    i = 7'd3; j = 7'd9; #1;   // tile (1, 2) -> 1 * 32 + 2
    checks++;
    if (addr != 11'd34) failures++;
    for (int x = 0; x < N; x++)
      for (int y = 0; y < M; y++) begin
        int m;
        i = 7'(x); j = 7'(y); #1;
        checks++;
        if (int'(addr) != addr_of(x, y, P, Q, M)) begin
          failures++;
          if (failures < 10) $display("FAIL (%0d,%0d): %0d", x, y, addr);
        end
        m = module_of(S_ROCO, x, y, P, Q);
        checks++;
        if (used[m][addr]) begin
          failures++;
          if (failures < 10) $display("FAIL duplicate slot for (%0d,%0d)", x, y);
        end
        used[m][addr] = 1'b1;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
