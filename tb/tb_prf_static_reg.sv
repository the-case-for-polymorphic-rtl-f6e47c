// tb_prf_static_reg: self-checking test of the static coefficient register:
// reset loads K = {3, -1, 3} packed K[0] first; element writes replace one
// 32-bit field; reset restores the initial values.
module tb_prf_static_reg;
  localparam int W = 32;

  logic          clk = 0, rst_n, we;
  logic [1:0]    waddr;
  logic [W-1:0]  wdata;
  logic [3*W-1:0] coef;
  logic [W-1:0]  model [3];
  int checks = 0, failures = 0;

  prf_static_reg #(.W(W), .DEPTH(3)) dut (
    .clk(clk), .rst_n(rst_n), .we(we), .waddr(waddr), .wdata(wdata), .coef(coef)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; we = 0; waddr = 0; wdata = 0;
    @(negedge clk);
    rst_n = 1;
    checks++;
    if (coef != 96'h00000003_FFFFFFFF_00000003) begin
      failures++;
      $display("FAIL reset value %h", coef);
    end
    model[0] = 3; model[1] = 32'hFFFFFFFF; model[2] = 3;
    for (int t = 0; t < 500; t++) begin
      we = 1;
      waddr = 2'($urandom_range(2));
      wdata = $urandom;
      @(negedge clk);
      model[waddr] = wdata;
      checks++;
      if (coef != {model[0], model[1], model[2]}) begin
        failures++;
        if (failures < 10) $display("FAIL after write %0d", t);
      end
    end
    we = 0;
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    checks++;
    if (coef != 96'h00000003_FFFFFFFF_00000003) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
