// tb_prf_system: end-to-end test of both designs at their default sizes.
//
// General PRF (128 x 128 x 64 bit, 2 x 4 modules): under RoCo the whole
// matrix is written with row writes and read back as columns on both read
// ports at once (a full transposition, 2048 + 1024 accesses); then, after a
// switch to ReRo, it is rewritten with rectangles and checked with main and
// secondary diagonal reads. Meanwhile the weighted-average accelerator
// streams one 64 x 64 image and its 3968 outputs are checked. Counted
// mechanisms, each of which must occur: dual-port read, scheme switch,
// unaligned row write, diagonal read, stream output.
module tb_prf_system;
  import prf_pkg::*;

  localparam int N = 128, M = 128, L = 8, NRD = 2, W = 64, ROW = 64, IMG = 64 * 64;

  logic          clk = 0, rst_n;
  scheme_e       prf_memory_scheme;
  logic          prf_wr_en;
  logic [6:0]    prf_wr_i, prf_wr_j;
  access_e       prf_wr_access;
  logic [W-1:0]  prf_data_in  [L];
  logic          prf_rd_en    [NRD];
  logic [6:0]    prf_rd_i     [NRD];
  logic [6:0]    prf_rd_j     [NRD];
  access_e       prf_rd_access[NRD];
  logic [W-1:0]  prf_data_out [NRD][L];
  logic          prf_rd_valid [NRD];
  logic          wavg_pix_valid, wavg_k_we, wavg_out_valid;
  logic [31:0]   wavg_pix, wavg_k_wdata, wavg_out;
  logic [1:0]    wavg_k_waddr;

  int checks = 0, failures = 0;
  int n_dual = 0, n_switch = 0, n_unaligned = 0, n_diag = 0, n_stream = 0;
  int stream [$];
  bit stream_done = 0, prf_done = 0;

  prf_system dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] val(int x, int y, int tag);
    return {16'(tag), 8'h5a, 8'(x), 16'(y), 16'(x * 131 + y)};
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  // ---------------- general PRF ------------------------------------------
  initial begin
    rst_n = 0;
    prf_memory_scheme = SCHEME_ROCO;
    prf_wr_en = 0; prf_wr_i = 0; prf_wr_j = 0; prf_wr_access = ACC_ROW;
    for (int n = 0; n < L; n++) prf_data_in[n] = '0;
    for (int r = 0; r < NRD; r++) begin
      prf_rd_en[r] = 0; prf_rd_i[r] = 0; prf_rd_j[r] = 0; prf_rd_access[r] = ACC_COL;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // RoCo: row writes, each row shifted by 3 so that most are unaligned
    for (int x = 0; x < N; x++)
      for (int k = 0; k < M / L; k++) begin
        int j0;
        j0 = (3 + k * L) % M;
        prf_wr_en = 1; prf_wr_i = 7'(x); prf_wr_j = 7'(j0); prf_wr_access = ACC_ROW;
        for (int n = 0; n < L; n++) prf_data_in[n] = val(x, (j0 + n) % M, 1);
        if (j0 % 4 != 0) n_unaligned++;
        @(negedge clk);
      end
    prf_wr_en = 0;
    // column reads on both ports, checked one cycle later
    for (int c = 0; c < M; c += 2)
      for (int k = 0; k < N / L; k++) begin
        for (int r = 0; r < NRD; r++) begin
          prf_rd_en[r] = 1; prf_rd_i[r] = 7'(k * L); prf_rd_j[r] = 7'(c + r);
          prf_rd_access[r] = ACC_COL;
        end
        n_dual++;
        @(negedge clk);
        for (int r = 0; r < NRD; r++)
          for (int n = 0; n < L; n++)
            chk(prf_rd_valid[r] && prf_data_out[r][n] == val(k * L + n, c + r, 1),
                $sformatf("column read (%0d,%0d) port %0d", k * L + n, c + r, r));
      end
    for (int r = 0; r < NRD; r++) prf_rd_en[r] = 0;
    // switch to ReRo, rewrite with rectangles, read diagonals
    @(negedge clk);
    prf_memory_scheme = SCHEME_RERO;
    n_switch++;
    for (int ti = 0; ti < N; ti += 2)
      for (int tj = 0; tj < M; tj += 4) begin
        prf_wr_en = 1; prf_wr_i = 7'(ti); prf_wr_j = 7'(tj); prf_wr_access = ACC_RECT;
        for (int n = 0; n < L; n++) prf_data_in[n] = val(ti + n / 4, tj + n % 4, 2);
        @(negedge clk);
      end
    prf_wr_en = 0;
    for (int t = 0; t < 500; t++) begin
      int bi, bj;
      bi = $urandom_range(N - L);
      bj = $urandom_range(M - L) + L - 1;
      prf_rd_en[0] = 1; prf_rd_i[0] = 7'(bi); prf_rd_j[0] = 7'(bj); prf_rd_access[0] = ACC_MDIAG;
      prf_rd_en[1] = 1; prf_rd_i[1] = 7'(bi); prf_rd_j[1] = 7'(bj); prf_rd_access[1] = ACC_SDIAG;
      n_diag++;
      @(negedge clk);
      for (int n = 0; n < L; n++) begin
        chk(prf_data_out[0][n] == val(bi + n, (bj + n) % M, 2), "main diagonal");
        chk(prf_data_out[1][n] == val(bi + n, bj - n, 2), "secondary diagonal");
      end
    end
    for (int r = 0; r < NRD; r++) prf_rd_en[r] = 0;
    prf_done = 1;
  end

  // ---------------- weighted-average accelerator -------------------------
  initial begin
    wavg_pix_valid = 0; wavg_pix = 0; wavg_k_we = 0; wavg_k_waddr = 0; wavg_k_wdata = 0;
    wait (rst_n);
    for (int n = 0; n < IMG; n++) begin
      @(negedge clk);
      wavg_pix_valid = 1;
      wavg_pix = 32'($urandom_range(255));
      stream.push_back(int'(wavg_pix));
    end
    @(negedge clk);
    wavg_pix_valid = 0;
    repeat (3) @(negedge clk);
    stream_done = 1;
  end

  always @(negedge clk) if (rst_n && wavg_out_valid) begin
    int c;
    c = n_stream + ROW;
    chk(wavg_out == 32'(3 * stream[c - ROW] - stream[c] + 3 * stream[c + ROW]),
        $sformatf("stream output %0d", n_stream));
    n_stream++;
  end

  initial begin
    wait (prf_done && stream_done);
    chk(n_stream == IMG - 2 * ROW, "number of stream outputs");
    checks += 4;
    if (n_dual == 0 || n_switch == 0 || n_unaligned == 0 || n_diag == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("dual reads %0d, scheme switches %0d, unaligned rows %0d, diagonal reads %0d, stream outputs %0d",
             n_dual, n_switch, n_unaligned, n_diag, n_stream);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
