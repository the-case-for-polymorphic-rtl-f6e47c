// tb_prf_shuffle: self-checking test of the gather (read) and scatter
// (write / address) crossbars with random permutations, plus a scatter with
// a missing and a doubly selected output to check hit and lane priority.
module tb_prf_shuffle;
  localparam int L = 8, W = 64;

  logic [W-1:0] din [L];
  logic [2:0]   sel [L];
  logic [W-1:0] gout [L];
  logic [W-1:0] sout [L];
  logic         ghit [L];
  logic         shit [L];
  int checks = 0, failures = 0;

  prf_shuffle #(.LANES(L), .W(W), .SCATTER(1'b0)) u_g (
    .shuffle_in(din), .sel(sel), .shuffle_out(gout), .hit(ghit)
  );
  prf_shuffle #(.LANES(L), .W(W), .SCATTER(1'b1)) u_s (
    .shuffle_in(din), .sel(sel), .shuffle_out(sout), .hit(shit)
  );

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int perm [L];
      for (int n = 0; n < L; n++) perm[n] = n;
      for (int n = L - 1; n > 0; n--) begin
        int r, tmp;
        r = $urandom_range(n);
        tmp = perm[n]; perm[n] = perm[r]; perm[r] = tmp;
      end
      for (int n = 0; n < L; n++) begin
        din[n] = {$urandom, $urandom};
        sel[n] = 3'(perm[n]);
      end
      #1;
      for (int n = 0; n < L; n++) begin
        chk(gout[n] == din[perm[n]] && ghit[n], "gather");
        chk(sout[perm[n]] == din[n] && shit[perm[n]], "scatter");
      end
    end
    // lanes 2 and 5 both select output 6; nobody selects output 0
    for (int n = 0; n < L; n++) begin
      din[n] = 64'(100 + n);
      sel[n] = 3'(n);
    end
    sel[0] = 3'd6;
    sel[5] = 3'd6;
    sel[6] = 3'd5;
    #1;
    chk(!shit[0], "no hit on unselected output");
    chk(shit[6] && sout[6] == 64'd100, "lowest lane wins");
    chk(sout[5] == 64'd106, "scatter to 5");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
