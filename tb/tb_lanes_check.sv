// tb_lanes_check: end-to-end random test of one prf_top geometry, used by
// tb_prf_lanes to run the wider 128 KB configurations (16, 32 and 64 lanes).
//
// Same procedure as tb_prf_top, with the module array P x Q as parameters
// and 128 x 128 64-bit elements: for each of the five schemes the matrix is
// filled with aligned rectangles, then T cycles of random conflict-free
// traffic run on the write port and both read ports, every read being
// predicted by a reference matrix (one-cycle latency, old data on a
// same-cycle write). Each conflict-free (scheme, access) pair must occur on
// both paths, and dual reads, read-during-write, edge wrap-around and scheme
// switches are counted and required. Reports checks / failures and raises
// done when finished; the caller owns the clock and the watchdog.
module tb_lanes_check
  import prf_pkg::*;
  import tb_prf_ref_pkg::*;
#(
  parameter int P = 2,
  parameter int Q = 4,
  parameter int T = 1000  // random cycles per scheme
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output bit   done
);

  localparam int N = 128, M = 128, W = 64, NRD = 2, L = P * Q;

  logic          rst_n;
  scheme_e       memory_scheme;
  logic          wr_en;
  logic [6:0]    wr_i, wr_j;
  access_e       wr_access;
  logic [W-1:0]  prf_data_in  [L];
  logic          rd_en        [NRD];
  logic [6:0]    rd_i         [NRD];
  logic [6:0]    rd_j         [NRD];
  access_e       rd_access    [NRD];
  logic [W-1:0]  prf_data_out [NRD][L];
  logic          rd_valid     [NRD];

  logic [W-1:0]  refm [N][M];
  logic [W-1:0]  expd [NRD][L];
  bit            pend [NRD];
  int cnt_wr_pat [5][6];
  int cnt_rd_pat [5][6];
  int cnt_dual = 0, cnt_collide = 0, cnt_wrap = 0, cnt_switch = 0;
  longint cycles = 0;
  int nl = L;  // lane loop bound, a variable so that the loops stay loops

  prf_top #(.P(P), .Q(Q)) dut (
    .clk(clk), .rst_n(rst_n), .memory_scheme(memory_scheme),
    .wr_en(wr_en), .wr_i(wr_i), .wr_j(wr_j), .wr_access(wr_access), .prf_data_in(prf_data_in),
    .rd_en(rd_en), .rd_i(rd_i), .rd_j(rd_j), .rd_access(rd_access),
    .prf_data_out(prf_data_out), .rd_valid(rd_valid)
  );

  always @(posedge clk) cycles++;

  function automatic bit wraps(int a, int bi, int bj);
    int da, db;
    offs(a, L - 1, P, Q, da, db);
    if (a == A_SDIAG) return bi + da >= N || bj + db < 0;
    return bi + da >= N || bj + db >= M;
  endfunction

  // compare the outputs of the reads issued in the previous cycle
  task automatic check_reads();
    for (int r = 0; r < NRD; r++) begin
      checks++;
      if (rd_valid[r] != pend[r]) begin
        failures++;
        $display("FAIL rd_valid[%0d]=%0d want %0d", r, rd_valid[r], pend[r]);
      end
      if (pend[r])
        for (int n = 0; n < nl; n++) begin
          checks++;
          if (prf_data_out[r][n] != expd[r][n]) begin
            failures++;
            if (failures < 10)
              $display("FAIL port %0d lane %0d: %h want %h (scheme %s)", r, n,
                       prf_data_out[r][n], expd[r][n], memory_scheme.name());
          end
        end
    end
  endtask

  // one clock cycle: optional write and reads, reference updated after the
  // reads have sampled it (reads see the old contents)
  task automatic cycle(bit do_wr, int wa, int wi, int wj, bit do_rd [NRD],
                       int ra [NRD], int ri [NRD], int rj [NRD]);
    int s;
    @(negedge clk);
    check_reads();
    s = int'(memory_scheme);
    wr_en = do_wr;
    wr_i = 7'(wi); wr_j = 7'(wj); wr_access = access_e'(wa);
    for (int n = 0; n < nl; n++) prf_data_in[n] = {$urandom, $urandom};
    if (do_wr) begin
      cnt_wr_pat[s][wa]++;
      if (wraps(wa, wi, wj)) cnt_wrap++;
    end
    for (int r = 0; r < NRD; r++) begin
      rd_en[r] = do_rd[r];
      rd_i[r] = 7'(ri[r]); rd_j[r] = 7'(rj[r]); rd_access[r] = access_e'(ra[r]);
      pend[r] = do_rd[r];
      if (do_rd[r]) begin
        cnt_rd_pat[s][ra[r]]++;
        if (wraps(ra[r], ri[r], rj[r])) cnt_wrap++;
        for (int n = 0; n < nl; n++) begin
          int x, y;
          coord(ra[r], ri[r], rj[r], n, P, Q, N, M, x, y);
          expd[r][n] = refm[x][y];
        end
      end
    end
    if (do_rd[0] && do_rd[1]) cnt_dual++;
    if (do_wr) begin
      bit hitc;
      hitc = 0;
      for (int n = 0; n < nl; n++) begin
        int x, y;
        coord(wa, wi, wj, n, P, Q, N, M, x, y);
        for (int r = 0; r < NRD; r++)
          if (do_rd[r])
            for (int k = 0; k < nl; k++) begin
              int x2, y2;
              coord(ra[r], ri[r], rj[r], k, P, Q, N, M, x2, y2);
              if (x2 == x && y2 == y) hitc = 1;
            end
        refm[x][y] = prf_data_in[n];
      end
      if (hitc) cnt_collide++;
    end
  endtask

  initial begin
    bit nord [NRD];
    int z [NRD];
    checks = 0;
    failures = 0;
    done = 0;
    rst_n = 0;
    memory_scheme = SCHEME_ROCO;
    wr_en = 0; wr_i = 0; wr_j = 0; wr_access = ACC_RECT;
    for (int n = 0; n < nl; n++) prf_data_in[n] = '0;
    for (int r = 0; r < NRD; r++) begin
      rd_en[r] = 0; rd_i[r] = 0; rd_j[r] = 0; rd_access[r] = ACC_ROW; pend[r] = 0;
      nord[r] = 0; z[r] = 0;
    end
    foreach (cnt_wr_pat[s, a]) begin cnt_wr_pat[s][a] = 0; cnt_rd_pat[s][a] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 5; s++) begin
      if (s > 0) cnt_switch++;
      @(negedge clk);
      memory_scheme = scheme_e'(s);
      // fill the matrix with aligned rectangles
      for (int ti = 0; ti < N; ti += P)
        for (int tj = 0; tj < M; tj += Q)
          cycle(1, A_RECT, ti, tj, nord, z, z, z);
      // random traffic on all ports
      for (int t = 0; t < T; t++) begin
        bit dw;
        bit dr [NRD];
        int wa, wi, wj;
        int ra [NRD], ri [NRD], rj [NRD];
        rand_access(s, P, Q, N, M, wa, wi, wj);
        dw = ($urandom_range(3) != 0);
        for (int r = 0; r < NRD; r++) begin
          rand_access(s, P, Q, N, M, ra[r], ri[r], rj[r]);
          dr[r] = ($urandom_range(3) != 0);
        end
        // every tenth cycle read the block being written
        if (t % 10 == 0) begin dw = 1; dr[0] = 1; ra[0] = wa; ri[0] = wi; rj[0] = wj; end
        cycle(dw, wa, wi, wj, dr, ra, ri, rj);
      end
      cycle(0, 0, 0, 0, nord, z, z, z);
    end
    @(negedge clk);
    check_reads();
    // every conflict-free pattern must have been exercised on both paths
    for (int s = 0; s < 5; s++)
      for (int a = 0; a < 6; a++)
        if (valid(s, a, 0, 0, P, Q)) begin
          checks++;
          if (cnt_wr_pat[s][a] == 0 || cnt_rd_pat[s][a] == 0) begin
            failures++;
            $display("FAIL pattern scheme %0d access %0d never used", s, a);
          end
        end
    checks += 4;
    if (cnt_dual == 0)    begin failures++; $display("FAIL no dual read"); end
    if (cnt_collide == 0) begin failures++; $display("FAIL no read-during-write"); end
    if (cnt_wrap == 0)    begin failures++; $display("FAIL no edge wrap"); end
    if (cnt_switch == 0)  begin failures++; $display("FAIL no scheme switch"); end
    $display("%0d lanes (%0d x %0d): dual reads %0d, read-during-write %0d, edge wraps %0d, scheme switches %0d, cycles %0d",
             L, P, Q, cnt_dual, cnt_collide, cnt_wrap, cnt_switch, cycles);
    done = 1;
  end
endmodule
