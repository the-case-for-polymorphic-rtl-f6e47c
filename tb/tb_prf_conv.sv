// tb_prf_conv: separable 2D convolution of one 32 x 32 block (HSIZE = VSIZE
// = 32, 64-bit elements) on the default PRF with the RoCo scheme, for mask
// sizes 3 x 3, 9 x 9 and 33 x 33 (radius R = 1, 4, 16).
//
// Layout in the 128 x 128 register file (rows x columns):
//   A  rows  0..31, cols 0..31+2R : input block with R zero halo columns
//   B  rows 64..95, cols 0..31+2R : row-pass result, transposed, with halos
//   C  rows 32..63, cols 0..31    : final result, original orientation
// Each pass follows the vectorized algorithm: row-wise load (row writes of
// 8), convolution where lane n computes output x+n from 2R+1 unaligned row
// reads on the two read ports (the multiply-accumulate lanes are modelled
// here), column-wise store (column writes of 8, which transposes the block),
// and a left move of the VSIZE x R halo columns with column reads/writes.
// The result is compared with a direct separable convolution, and the load,
// store and move phases must take VSIZE*HSIZE/8, VSIZE*HSIZE/8 and
// VSIZE*R/8 cycles (plus one cycle of read latency for the move), the 8-lane
// figures of the analytical estimate. The 1D reference is first checked on a
// hand-worked example (input 20, 22, ..., 38 with mask 2 5 11).
module tb_prf_conv;
  import prf_pkg::*;

  localparam int N = 128, M = 128, L = 8, NRD = 2, W = 64;
  localparam int HS = 32, VS = 32;

  logic          clk = 0, rst_n;
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
  int checks = 0, failures = 0;

  prf_top dut (
    .clk(clk), .rst_n(rst_n), .memory_scheme(memory_scheme),
    .wr_en(wr_en), .wr_i(wr_i), .wr_j(wr_j), .wr_access(wr_access), .prf_data_in(prf_data_in),
    .rd_en(rd_en), .rd_i(rd_i), .rd_j(rd_j), .rd_access(rd_access),
    .prf_data_out(prf_data_out), .rd_valid(rd_valid)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // ---- port helpers (call at a negative edge; each takes one cycle) ------
  task automatic idle();
    wr_en = 0;
    for (int r = 0; r < NRD; r++) rd_en[r] = 0;
  endtask

  task automatic put(access_e a, int i, int j, longint d [L]);
    wr_en = 1; wr_access = a; wr_i = 7'(i); wr_j = 7'(j);
    for (int n = 0; n < L; n++) prf_data_in[n] = W'(d[n]);
  endtask

  task automatic get(int port, access_e a, int i, int j);
    rd_en[port] = 1; rd_access[port] = a; rd_i[port] = 7'(i); rd_j[port] = 7'(j);
  endtask

  // ---- one convolution pass ----------------------------------------------
  // src: region with halos at rows sr.., holding VS rows of HS + 2R columns
  // dst: region written column-wise at rows dr.., column offset dc
  // returns cycle counts of the load-independent phases
  longint img   [VS][HS];
  longint mid   [VS][HS];
  longint want  [VS][HS];
  longint mask  [33];

  task automatic conv_pass(int R, int sr, int dr, int dc, output int conv_cycles,
                           output int store_cycles);
    longint rowbuf [HS + 2 * 16 + 8];
    longint res [VS][HS];
    int c0;
    conv_cycles = 0;
    // convolution: per row, read all 2R+1 shifted 8-wide windows per vector
    for (int r = 0; r < VS; r++)
      for (int x = 0; x < HS; x += L) begin
        longint acc [L];
        for (int n = 0; n < L; n++) acc[n] = 0;
        for (int t = 0; t <= 2 * R; t += 2) begin
          @(negedge clk);
          idle();
          get(0, ACC_ROW, sr + r, x + t);
          if (t + 1 <= 2 * R) get(1, ACC_ROW, sr + r, x + t + 1);
          conv_cycles++;
          @(negedge clk);
          idle();
          for (int n = 0; n < L; n++) begin
            acc[n] += mask[t] * longint'(prf_data_out[0][n]);
            if (t + 1 <= 2 * R) acc[n] += mask[t + 1] * longint'(prf_data_out[1][n]);
          end
        end
        for (int n = 0; n < L; n++) res[r][x + n] = acc[n];
      end
    // column-wise store: output row r, elements x..x+7 -> column r of dst
    c0 = 0;
    @(negedge clk);
    for (int x = 0; x < HS; x += L)
      for (int r = 0; r < VS; r++) begin
        longint d [L];
        for (int n = 0; n < L; n++) d[n] = res[r][x + n];
        put(ACC_COL, dr + x, dc + r, d);
        c0++;
        @(negedge clk);
      end
    idle();
    store_cycles = c0;
    for (int r = 0; r < VS; r++) for (int x = 0; x < HS; x++) mid[r][x] = res[r][x];
  endtask

  // zero R halo columns on both sides of a region (first-block set-up)
  task automatic zero_halos(int rows0, int R);
    longint z [L];
    for (int n = 0; n < L; n++) z[n] = 0;
    for (int r = 0; r < VS; r += L)
      for (int c = 0; c < R; c++) begin
        @(negedge clk); idle(); put(ACC_COL, rows0 + r, c, z);
        @(negedge clk); idle(); put(ACC_COL, rows0 + r, R + HS + c, z);
      end
    @(negedge clk); idle();
  endtask

  function automatic longint ref1d(longint v [], int k, int R, longint m []);
    longint s;
    s = 0;
    for (int t = -R; t <= R; t++)
      if (k + t >= 0 && k + t < v.size()) s += m[t + R] * v[k + t];
    return s;
  endfunction

  initial begin
    int masks [3] = '{1, 4, 16};
    rst_n = 0;
    memory_scheme = SCHEME_ROCO;
    wr_i = 0; wr_j = 0; wr_access = ACC_ROW;
    for (int n = 0; n < L; n++) prf_data_in[n] = '0;
    for (int r = 0; r < NRD; r++) begin rd_i[r] = 0; rd_j[r] = 0; rd_access[r] = ACC_ROW; end
    idle();
    repeat (2) @(negedge clk);
    rst_n = 1;

    // hand-worked 1D example: 450 at the 3rd input, 486 at the 4th, 262 at the last
    begin
      longint v [] = '{20, 22, 24, 26, 28, 30, 32, 34, 36, 38};
      longint m3 [] = '{2, 5, 11};
      chk(ref1d(v, 2, 1, m3) == 450, "1D example, 3rd output");
      chk(ref1d(v, 3, 1, m3) == 486, "1D example, 4th output");
      chk(ref1d(v, 9, 1, m3) == 262, "1D example, last output");
    end

    foreach (masks[mi]) begin
      int R, load_cycles, conv_c, store_c, move_cycles, conv2_c, store2_c;
      R = masks[mi];
      for (int t = 0; t <= 2 * R; t++) mask[t] = longint'((t * 7 + 3) % 11) - 5;
      for (int r = 0; r < VS; r++)
        for (int x = 0; x < HS; x++) img[r][x] = longint'($urandom_range(2000)) - 1000;
      // reference: row pass then column pass, zero halos
      for (int r = 0; r < VS; r++)
        for (int x = 0; x < HS; x++) begin
          longint s;
          s = 0;
          for (int t = -R; t <= R; t++)
            if (x + t >= 0 && x + t < HS) s += mask[t + R] * img[r][x + t];
          mid[r][x] = s;
        end
      for (int r = 0; r < VS; r++)
        for (int x = 0; x < HS; x++) begin
          longint s;
          s = 0;
          for (int t = -R; t <= R; t++)
            if (r + t >= 0 && r + t < VS) s += mask[t + R] * mid[r + t][x];
          want[r][x] = s;
        end

      zero_halos(0, R);
      zero_halos(64, R);
      // row-wise load of the block into A, 8 elements per cycle
      load_cycles = 0;
      @(negedge clk);
      for (int r = 0; r < VS; r++)
        for (int x = 0; x < HS; x += L) begin
          longint d [L];
          for (int n = 0; n < L; n++) d[n] = img[r][x + n];
          put(ACC_ROW, r, R + x, d);
          load_cycles++;
          @(negedge clk);
        end
      idle();
      // pass 1: rows of A -> B (transposed, at column offset R)
      conv_pass(R, 0, 64, R, conv_c, store_c);
      // pass 2: rows of B -> C (transposed back)
      conv_pass(R, 64, 32, 0, conv2_c, store2_c);

      // check C with aligned rectangle reads
      for (int r = 0; r < VS; r += 2)
        for (int x = 0; x < HS; x += 4) begin
          @(negedge clk); idle(); get(0, ACC_RECT, 32 + r, x);
          @(negedge clk); idle();
          for (int n = 0; n < L; n++)
            chk(longint'(prf_data_out[0][n]) == want[r + n / 4][x + n % 4],
                $sformatf("R=%0d result (%0d,%0d)", R, r + n / 4, x + n % 4));
        end

      // left move of the VSIZE x R right-most input columns of A into the
      // left halo, pipelined: column read in cycle k, column write in k+1
      move_cycles = 0;
      begin
        int nacc, k;
        nacc = (VS / L) * R;
        @(negedge clk);
        for (k = 0; k <= nacc; k++) begin
          idle();
          if (k < nacc) get(0, ACC_COL, (k % (VS / L)) * L, HS + (k / (VS / L)));
          if (k > 0) begin
            longint d [L];
            for (int n = 0; n < L; n++) d[n] = longint'(prf_data_out[0][n]);
            put(ACC_COL, ((k - 1) % (VS / L)) * L, (k - 1) / (VS / L), d);
          end
          move_cycles++;
          @(negedge clk);
        end
        idle();
      end
      // the left halo now holds input columns HS-R .. HS-1
      for (int r = 0; r < VS; r++) begin
        @(negedge clk); idle(); get(0, ACC_ROW, r, 0);
        @(negedge clk); idle();
        for (int c = 0; c < R && c < L; c++)
          chk(longint'(prf_data_out[0][c]) == img[r][HS - R + c],
              $sformatf("R=%0d halo move row %0d col %0d", R, r, c));
      end

      chk(load_cycles == VS * HS / L, "load phase cycles");
      chk(store_c == VS * HS / L && store2_c == VS * HS / L, "store phase cycles");
      chk(move_cycles == VS * R / L + 1, "move phase cycles");
      $display("mask %0dx%0d: load %0d, conv read cycles %0d + %0d, store %0d + %0d, move %0d cycles",
               2 * R + 1, 2 * R + 1, load_cycles, conv_c, conv2_c, store_c, store2_c, move_cycles);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
