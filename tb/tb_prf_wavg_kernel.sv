// tb_prf_wavg_kernel: self-checking test of the example kernel: unpacks the
// 96-bit tap and coefficient words and forms k0*in0 + k1*in1 + k2*in2 with
// signed 32-bit wrap-around, one cycle after go.
module tb_prf_wavg_kernel;
  localparam int W = 32;

  logic           clk = 0, rst_n, go;
  logic [3*W-1:0] in_prf, k_prf;
  logic [W-1:0]   out;
  logic           out_valid;
  int checks = 0, failures = 0;

  prf_wavg_kernel #(.W(W)) dut (
    .clk(clk), .rst_n(rst_n), .go(go), .in_prf(in_prf), .k_prf(k_prf),
    .out(out), .out_valid(out_valid)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; go = 0; in_prf = 0; k_prf = 0;
    @(negedge clk);
    rst_n = 1;
    // hand-worked: K = {3,-1,3}, in = {10, 20, 30}: 30 - 20 + 90 = 100
    go = 1; in_prf = {32'd10, 32'd20, 32'd30}; k_prf = {32'd3, -32'sd1, 32'd3};
    @(negedge clk);
    checks++;
    if (!out_valid || out != 32'd100) begin failures++; $display("FAIL hand case %0d", out); end
    for (int t = 0; t < 3000; t++) begin
      int a, b, c, x, y, z, want;
      a = $urandom; b = $urandom; c = $urandom;
      x = int'($urandom_range(200)) - 100; y = int'($urandom_range(200)) - 100;
      z = int'($urandom_range(200)) - 100;
      go = ($urandom_range(3) != 0);
      in_prf = {a, b, c};
      k_prf = {x, y, z};
      want = x * a + y * b + z * c;
      @(negedge clk);
      checks++;
      if (out_valid != go || (go && out != want)) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d out=%0d want %0d", t, out, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
