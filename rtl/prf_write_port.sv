// prf_write_port: the write port of the PRF parallel memory (customized
// addressing write path).
//
// The AGU expands (i, j, acc) into p*q element coordinates and one MAF per
// lane gives each element's module. The write data shuffle (a scatter
// crossbar) hands each module the word of the lane that selected it. The
// addresses need no shuffle: every module owns a prf_cust_coef instance that
// derives c_i, c_j from (i, j), the access type and its own position (k, l),
// and a prf_cust_addr instance that turns them into its address.
// Timing: combinational from the request to the module write strobes; the
// modules store the data at the next rising edge. The structure follows the
// document's customized write path; the enable handshake (no back-pressure)
// is this design's choice. The request must be conflict-free for the scheme
// (checked by assertion).
module prf_write_port
  import prf_pkg::*;
#(
  parameter int unsigned N = 128,
  parameter int unsigned M = 128,
  parameter int unsigned P = 2,
  parameter int unsigned Q = 4,
  parameter int unsigned W = 64,
  localparam int unsigned L  = P * Q,
  localparam int unsigned IW = $clog2(N),
  localparam int unsigned JW = $clog2(M),
  localparam int unsigned AW = $clog2(N * M / L),
  localparam int unsigned SW = (L > 1) ? $clog2(L) : 1,
  localparam int unsigned VW = (P > 1) ? $clog2(P) : 1,
  localparam int unsigned HW = (Q > 1) ? $clog2(Q) : 1,
  localparam int unsigned CW = $clog2(P + Q + 2) + 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  scheme_e       scheme,
  input  logic          we,
  input  logic [IW-1:0] i,
  input  logic [JW-1:0] j,
  input  access_e       acc,
  input  logic [W-1:0]  wdata     [L],   // lane order
  // to the memory modules (index = module select_v * q + select_h)
  output logic          mem_we    [L],
  output logic [AW-1:0] mem_waddr [L],
  output logic [W-1:0]  mem_wdata [L]
);

  logic [IW-1:0] ei  [L];
  logic [JW-1:0] ej  [L];
  logic [VW-1:0] sv  [L];
  logic [HW-1:0] sh  [L];
  logic [SW-1:0] sel [L];
  logic          dhit[L];

  prf_agu #(.N(N), .M(M), .P(P), .Q(Q)) u_agu (
    .i(i), .j(j), .acc(acc), .ei(ei), .ej(ej)
  );

  for (genvar n = 0; n < L; n++) begin : g_lane
    prf_maf #(.N(N), .M(M), .P(P), .Q(Q)) u_maf (
      .scheme(scheme), .i(ei[n]), .j(ej[n]), .select_v(sv[n]), .select_h(sh[n])
    );
    assign sel[n] = SW'(32'(sv[n]) * Q + 32'(sh[n]));
  end

  // write data shuffle: lane data to the modules
  prf_shuffle #(.LANES(L), .W(W), .SCATTER(1'b1)) u_data_shuffle (
    .shuffle_in(wdata), .sel(sel), .shuffle_out(mem_wdata), .hit(dhit)
  );

  // customized addressing, one coefficient unit and address unit per module
  for (genvar k = 0; k < P; k++) begin : g_row
    for (genvar l = 0; l < Q; l++) begin : g_col
      localparam int unsigned MI = k * Q + l;
      logic signed [CW-1:0] c_i, c_j;
      prf_cust_coef #(.N(N), .M(M), .P(P), .Q(Q), .MOD_V(k), .MOD_H(l)) u_coef (
        .scheme(scheme), .acc(acc), .i(i), .j(j), .c_i(c_i), .c_j(c_j)
      );
      prf_cust_addr #(.N(N), .M(M), .P(P), .Q(Q)) u_caddr (
        .i(i), .j(j), .c_i(c_i), .c_j(c_j), .addr(mem_waddr[MI])
      );
      assign mem_we[MI] = we && dhit[MI];
    end
  end

  // A request must be one of the scheme's conflict-free patterns.
  property p_conflict_free;
    @(posedge clk) disable iff (!rst_n)
      we |-> conflict_free(scheme, acc, 32'(i), 32'(j), P, Q);
  endproperty
  a_conflict_free: assert property (p_conflict_free)
    else $error("prf_write_port: access %s at (%0d,%0d) is not conflict-free under %s",
                acc.name(), i, j, scheme.name());

endmodule
