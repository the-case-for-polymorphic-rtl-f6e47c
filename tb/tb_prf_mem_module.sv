// tb_prf_mem_module: self-checking test of one memory module (2048 words in
// eight 256-word macros, two read ports): random writes and simultaneous
// reads on both ports across all macros, compared with a reference array.
module tb_prf_mem_module;
  localparam int DEPTH = 2048, W = 64, NRD = 2;

  logic          clk = 0;
  logic          we;
  logic [10:0]   waddr;
  logic [W-1:0]  wdata;
  logic          re    [NRD];
  logic [10:0]   raddr [NRD];
  logic [W-1:0]  rdata [NRD];
  logic [W-1:0]  ref_mem [DEPTH];
  int checks = 0, failures = 0;

  prf_mem_module #(.DEPTH(DEPTH), .W(W), .NRD(NRD), .MACRO_DEPTH(256)) dut (
    .clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .re(re), .raddr(raddr), .rdata(rdata)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ra [NRD];
    we = 0; waddr = 0; wdata = 0;
    for (int r = 0; r < NRD; r++) begin re[r] = 0; raddr[r] = 0; end
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = 11'(a); wdata = {$urandom, $urandom}; ref_mem[a] = wdata;
    end
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      for (int r = 0; r < NRD; r++) begin
        ra[r] = $urandom_range(DEPTH - 1);
        re[r] = 1;
        raddr[r] = 11'(ra[r]);
      end
      we = ($urandom_range(1) == 1);
      waddr = 11'($urandom_range(DEPTH - 1));
      wdata = {$urandom, $urandom};
      @(posedge clk); #1;
      for (int r = 0; r < NRD; r++) begin
        checks++;
        if (rdata[r] != ref_mem[ra[r]]) begin
          failures++;
          if (failures < 10) $display("FAIL port %0d addr %0d", r, ra[r]);
        end
      end
      if (we) ref_mem[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
