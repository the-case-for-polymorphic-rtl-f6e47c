// tb_prf_read_port: self-checking test of the standard-addressing read path.
// A behavioural bank of p*q memories (one-cycle read) is preloaded with a
// known matrix placed by the reference scheme; random conflict-free reads
// of every scheme must return the block elements in lane order one cycle
// after the request, with rvalid.
module tb_prf_read_port;
  import prf_pkg::*;
  import tb_prf_ref_pkg::*;

  localparam int N = 128, M = 128, P = 2, Q = 4, W = 64, L = P * Q, D = N * M / L;

  logic          clk = 0, rst_n;
  scheme_e       scheme;
  logic          re;
  logic [6:0]    i, j;
  access_e       acc;
  logic          mem_re    [L];
  logic [10:0]   mem_raddr [L];
  logic [W-1:0]  mem_rdata [L];
  logic [W-1:0]  rdata     [L];
  logic          rvalid;
  logic [W-1:0]  bank [L][D];
  int checks = 0, failures = 0;

  prf_read_port #(.N(N), .M(M), .P(P), .Q(Q), .W(W)) dut (
    .clk(clk), .rst_n(rst_n), .scheme(scheme), .re(re), .i(i), .j(j), .acc(acc),
    .mem_re(mem_re), .mem_raddr(mem_raddr), .mem_rdata(mem_rdata),
    .rdata(rdata), .rvalid(rvalid)
  );

  always #5 clk = ~clk;

  // memory model: synchronous read
  always_ff @(posedge clk)
    for (int m = 0; m < L; m++)
      if (mem_re[m]) mem_rdata[m] <= bank[m][mem_raddr[m]];

  function automatic logic [W-1:0] elem(int x, int y, int s);
    return {16'(s), 16'hbeef, 16'(x), 16'(y)};
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; re = 0; i = 0; j = 0; acc = ACC_RECT; scheme = SCHEME_ROCO;
    @(negedge clk);
    @(negedge clk);
    checks++;
    if (rvalid) failures++;
    rst_n = 1;
    for (int s = 0; s < 5; s++) begin
      for (int x = 0; x < N; x++)
        for (int y = 0; y < M; y++)
          bank[module_of(s, x, y, P, Q)][addr_of(x, y, P, Q, M)] = elem(x, y, s);
      scheme = scheme_e'(s);
      for (int t = 0; t < 1000; t++) begin
        int a, bi, bj;
        rand_access(s, P, Q, N, M, a, bi, bj);
        @(negedge clk);
        checks++;
        if (rvalid) failures++;   // no read was issued in the previous cycle
        re = 1; i = 7'(bi); j = 7'(bj); acc = access_e'(a);
        @(negedge clk);
        re = 0;
        checks++;
        if (!rvalid) failures++;
        for (int n = 0; n < L; n++) begin
          int x, y;
          coord(a, bi, bj, n, P, Q, N, M, x, y);
          checks++;
          if (rdata[n] !== elem(x, y, s)) begin
            failures++;
            if (failures < 10)
              $display("FAIL scheme %0d acc %0d (%0d,%0d) lane %0d: %h", s, a, bi, bj, n, rdata[n]);
          end
        end
      end
    end
    @(negedge clk);
    checks++;
    if (rvalid) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
