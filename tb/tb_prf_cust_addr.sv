// tb_prf_cust_addr: self-checking test of the customized addressing function.
// Random origins and coefficients (both signs) are compared with the tile
// address of the displaced element, reduced modulo the tile grid.
module tb_prf_cust_addr;
  import tb_prf_ref_pkg::*;

  localparam int N = 128, M = 128, P = 2, Q = 4;

  logic [6:0]  i, j;
  logic signed [4:0] ci, cj;
  logic [10:0] addr;
  int checks = 0, failures = 0;

  prf_cust_addr #(.N(N), .M(M), .P(P), .Q(Q)) dut (
    .i(i), .j(j), .c_i(ci), .c_j(cj), .addr(addr)
  );

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // hand-worked: (5, 9) is tile (2, 2); c = (+3, -1) -> tile (5, 1) = 161
    i = 7'd5; j = 7'd9; ci = 5'sd3; cj = -5'sd1; #1;
    checks++;
    if (addr != 11'd161) begin failures++; $display("FAIL hand case %0d", addr); end
    for (int t = 0; t < 20000; t++) begin
      int a, b, want;
      a = $urandom_range(12) - 6;
      b = $urandom_range(12) - 6;
      i = 7'($urandom_range(N - 1));
      j = 7'($urandom_range(M - 1));
      ci = 5'(a);
      cj = 5'(b);
      #1;
      want = wrap(int'(i) / P + a, N / P) * (M / Q) + wrap(int'(j) / Q + b, M / Q);
      checks++;
      if (int'(addr) != want) begin
        failures++;
        if (failures < 10) $display("FAIL (%0d,%0d) c=(%0d,%0d): %0d want %0d", i, j, a, b, addr, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
