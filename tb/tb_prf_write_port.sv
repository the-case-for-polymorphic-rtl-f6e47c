// tb_prf_write_port: self-checking test of the customized-addressing write
// path. For random conflict-free writes of every scheme, every module must
// be strobed with the word of the lane the reference scheme assigns to it,
// at the reference standard address of that element.
module tb_prf_write_port;
  import prf_pkg::*;
  import tb_prf_ref_pkg::*;

  localparam int N = 128, M = 128, P = 2, Q = 4, W = 64, L = P * Q;

  logic          clk = 0, rst_n;
  scheme_e       scheme;
  logic          we;
  logic [6:0]    i, j;
  access_e       acc;
  logic [W-1:0]  wdata     [L];
  logic          mem_we    [L];
  logic [10:0]   mem_waddr [L];
  logic [W-1:0]  mem_wdata [L];
  int checks = 0, failures = 0;

  prf_write_port #(.N(N), .M(M), .P(P), .Q(Q), .W(W)) dut (
    .clk(clk), .rst_n(rst_n), .scheme(scheme), .we(we), .i(i), .j(j), .acc(acc),
    .wdata(wdata), .mem_we(mem_we), .mem_waddr(mem_waddr), .mem_wdata(mem_wdata)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; we = 0; i = 0; j = 0; acc = ACC_ROW; scheme = SCHEME_ROCO;
    for (int n = 0; n < L; n++) wdata[n] = '0;
    @(negedge clk);
    #1;
    for (int m = 0; m < L; m++) begin
      checks++;
      if (mem_we[m]) failures++;
    end
    rst_n = 1;
    for (int t = 0; t < 10000; t++) begin
      int s, a, bi, bj;
      s = t % 5;
      rand_access(s, P, Q, N, M, a, bi, bj);
      @(negedge clk);
      scheme = scheme_e'(s);
      we = 1; i = 7'(bi); j = 7'(bj); acc = access_e'(a);
      for (int n = 0; n < L; n++) wdata[n] = {$urandom, $urandom};
      #1;
      for (int n = 0; n < L; n++) begin
        int x, y, m;
        coord(a, bi, bj, n, P, Q, N, M, x, y);
        m = module_of(s, x, y, P, Q);
        checks++;
        if (!mem_we[m] || int'(mem_waddr[m]) != addr_of(x, y, P, Q, M) ||
            mem_wdata[m] != wdata[n]) begin
          failures++;
          if (failures < 10)
            $display("FAIL scheme %0d acc %0d (%0d,%0d) lane %0d module %0d: we=%0d addr=%0d want %0d",
                     s, a, bi, bj, n, m, mem_we[m], mem_waddr[m], addr_of(x, y, P, Q, M));
        end
      end
    end
    @(negedge clk);
    we = 0;
    #1;
    checks++;
    if (mem_we[0]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
