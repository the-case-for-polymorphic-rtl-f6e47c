// tb_prf_sram: self-checking test of the dual-port SRAM: fills it, reads
// back with one cycle latency, checks that rdata holds while re is low and
// that a read of the word being written returns the old word.
module tb_prf_sram;
  localparam int DEPTH = 256, W = 64;

  logic         clk = 0;
  logic         we, re;
  logic [7:0]   waddr, raddr;
  logic [W-1:0] wdata, rdata;
  logic [W-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  prf_sram #(.DEPTH(DEPTH), .W(W)) dut (
    .clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .re(re), .raddr(raddr), .rdata(rdata)
  );

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = 8'(a); wdata = {$urandom, $urandom}; ref_mem[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 3000; t++) begin
      int a;
      a = $urandom_range(DEPTH - 1);
      @(negedge clk);
      re = 1; raddr = 8'(a);
      we = ($urandom_range(1) == 1);
      waddr = 8'($urandom_range(DEPTH - 1));
      if (t % 7 == 0) waddr = raddr;   // read during write of the same word
      wdata = {$urandom, $urandom};
      @(posedge clk); #1;
      chk(rdata == ref_mem[a], "read data (old value on collision)");
      if (we) ref_mem[waddr] = wdata;
    end
    // hold while re is low
    @(negedge clk); re = 1; raddr = 8'd17; we = 0;
    @(negedge clk); re = 0; raddr = 8'd18;
    @(negedge clk);
    chk(rdata == ref_mem[17], "hold while re low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
