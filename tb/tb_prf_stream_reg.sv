// tb_prf_stream_reg: self-checking test of the 129-element stream register:
// random stream with gaps, taps compared with the reference window
// {in[n-128], in[n-64], in[n]} of the newest element n, full flag checked
// against the element count, reset empties the window.
module tb_prf_stream_reg;
  localparam int W = 32, ROW = 64, SIZE = 2 * ROW + 1;

  logic          clk = 0, rst_n, in_valid;
  logic [W-1:0]  in_data;
  logic [3*W-1:0] taps;
  logic          full;
  logic [W-1:0]  hist [$];
  int checks = 0, failures = 0;

  prf_stream_reg #(.W(W), .ROW(ROW)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_data(in_data), .taps(taps), .full(full)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; in_valid = 0; in_data = 0;
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 2; round++) begin
      hist.delete();
      for (int t = 0; t < 1500; t++) begin
        in_valid = ($urandom_range(4) != 0);
        in_data  = $urandom;
        @(posedge clk);
        if (in_valid) hist.push_back(in_data);
        #1;
        checks++;
        if (full != (hist.size() >= SIZE)) begin
          failures++;
          if (failures < 10) $display("FAIL full=%0d after %0d elements", full, hist.size());
        end
        if (hist.size() >= SIZE) begin
          int n;
          n = hist.size() - 1;
          checks++;
          if (taps != {hist[n - 2 * ROW], hist[n - ROW], hist[n]}) begin
            failures++;
            if (failures < 10) $display("FAIL taps at element %0d", n);
          end
        end
        @(negedge clk);
      end
      // reset empties the register
      rst_n = 0; in_valid = 0;
      @(negedge clk);
      rst_n = 1;
      checks++;
      if (full) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
