// tb_prf_lanes: the wider PRF configurations of the 128 KB design, 16 lanes
// (2 x 8 modules), 32 lanes (4 x 8) and 64 lanes (4 x 16), each with 128 x
// 128 64-bit elements, two read ports and one write port, tested end to end
// by a tb_lanes_check instance (all five schemes, all conflict-free access
// types, random traffic against a reference matrix). The three run in
// parallel on one clock; the test ends when all are done. The geometries are
// the lane counts the document synthesizes; the random procedure is this
// testbench's own.
module tb_prf_lanes;
  logic clk = 0;
  int   c0, f0, c1, f1, c2, f2;
  bit   d0, d1, d2;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  tb_lanes_check #(.P(2), .Q(8), .T(1000)) u_16 (.clk(clk), .checks(c0), .failures(f0), .done(d0));
  tb_lanes_check #(.P(4), .Q(8), .T(1000)) u_32 (.clk(clk), .checks(c1), .failures(f1), .done(d1));
  tb_lanes_check #(.P(4), .Q(16), .T(600)) u_64 (.clk(clk), .checks(c2), .failures(f2), .done(d2));

  initial begin
    repeat (200000) @(posedge clk);
    checks = c0 + c1 + c2;
    failures = f0 + f1 + f2 + 1;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (d0 && d1 && d2);
    checks = c0 + c1 + c2;
    failures = f0 + f1 + f2;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
