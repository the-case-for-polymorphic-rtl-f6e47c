// tb_prf_wavg_accel: streams two 64 x 64 images of random pixels (with
// random input gaps) through the example accelerator. Every output must be
// 3*above - centre + 3*below for the centre pixel ROW elements behind the
// newest one, and must appear exactly two clock edges after the pixel that
// completed its window. Between the images K is rewritten to {1, 2, 1}.
module tb_prf_wavg_accel;
  localparam int W = 32, ROW = 64, IMG = 64 * 64;

  logic         clk = 0, rst_n, pix_valid, k_we;
  logic [W-1:0] pix, k_wdata, out;
  logic [1:0]   k_waddr;
  logic         out_valid;
  int           stream [$];
  int           due [$];     // cycle at which each output is expected
  int           k0 = 3, k1 = -1, k2 = 3;
  int           kk [$];      // coefficient set index used per output
  int           nout = 0, cyc = 0;
  int checks = 0, failures = 0;

  prf_wavg_accel #(.W(W), .ROW(ROW)) dut (
    .clk(clk), .rst_n(rst_n), .pix_valid(pix_valid), .pix(pix),
    .k_we(k_we), .k_waddr(k_waddr), .k_wdata(k_wdata), .out(out), .out_valid(out_valid)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker
  always @(negedge clk) if (rst_n) begin
    if (out_valid) begin
      int c, want;
      c = nout + ROW;
      if (kk[nout] == 0) want = 3 * stream[c - ROW] - stream[c] + 3 * stream[c + ROW];
      else               want = stream[c - ROW] + 2 * stream[c] + stream[c + ROW];
      checks += 2;
      if (out != W'(want)) begin
        failures++;
        if (failures < 10) $display("FAIL output %0d: %0d want %0d", nout, $signed(out), want);
      end
      if (due[nout] != cyc) begin
        failures++;
        if (failures < 10) $display("FAIL output %0d at cycle %0d, due %0d", nout, cyc, due[nout]);
      end
      nout++;
    end
  end

  task automatic send_image(int set);
    for (int n = 0; n < IMG; n++) begin
      while ($urandom_range(5) == 0) begin
        @(negedge clk); pix_valid = 0;
      end
      @(negedge clk);
      pix_valid = 1;
      pix = W'($urandom_range(4095));
      stream.push_back(int'(pix));
      if (stream.size() >= 2 * ROW + 1) begin
        due.push_back(cyc + 2);
        kk.push_back(set);
      end
    end
    @(negedge clk);
    pix_valid = 0;
  endtask

  initial begin
    rst_n = 0; pix_valid = 0; pix = 0; k_we = 0; k_waddr = 0; k_wdata = 0;
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    send_image(0);
    repeat (4) @(negedge clk);
    // new coefficients {1, 2, 1}
    k_we = 1; k_waddr = 0; k_wdata = 1; @(negedge clk);
    k_waddr = 1; k_wdata = 2; @(negedge clk);
    k_waddr = 2; k_wdata = 1; @(negedge clk);
    k_we = 0;
    send_image(1);
    repeat (4) @(negedge clk);
    checks++;
    if (nout != 2 * IMG - 2 * ROW) begin
      failures++;
      $display("FAIL %0d outputs, want %0d", nout, 2 * IMG - 2 * ROW);
    end
    $display("outputs %0d", nout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
