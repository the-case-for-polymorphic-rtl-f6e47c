// prf_read_port: one read port of the PRF parallel memory (standard
// addressing read path).
//
// In the request cycle the AGU expands (i, j, acc) into p*q element
// coordinates, one MAF per lane finds the module of each element and one
// standard addressing function per lane its intra-module address. The
// address shuffle (a scatter crossbar) hands each module the address of the
// lane that selected it, and all modules are read at once. The module selects
// are registered, because the memories answer one cycle later, and steer the
// read data shuffle (a gather crossbar) that puts the module outputs back in
// lane order.
// Timing: request at edge t, rdata and rvalid valid after edge t+1 (one cycle
// read latency, as the delayed select in the document's read path implies).
// rvalid is reset to 0 by rst_n (active low, synchronous); the rest of the
// handshake (a plain enable, no back-pressure) is this design's choice.
// The request must be conflict-free for the scheme (checked by assertion).
module prf_read_port
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
  localparam int unsigned HW = (Q > 1) ? $clog2(Q) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  scheme_e       scheme,
  input  logic          re,
  input  logic [IW-1:0] i,
  input  logic [JW-1:0] j,
  input  access_e       acc,
  // to / from the memory modules (index = module select_v * q + select_h)
  output logic          mem_re    [L],
  output logic [AW-1:0] mem_raddr [L],
  input  logic [W-1:0]  mem_rdata [L],
  // lane-ordered result
  output logic [W-1:0]  rdata     [L],
  output logic          rvalid
);

  logic [IW-1:0] ei   [L];
  logic [JW-1:0] ej   [L];
  logic [VW-1:0] sv   [L];
  logic [HW-1:0] sh   [L];
  logic [SW-1:0] sel  [L];
  logic [SW-1:0] sel_q[L];
  logic [AW-1:0] laddr[L];
  logic          ahit [L];
  logic          dhit [L];

  prf_agu #(.N(N), .M(M), .P(P), .Q(Q)) u_agu (
    .i(i), .j(j), .acc(acc), .ei(ei), .ej(ej)
  );

  for (genvar n = 0; n < L; n++) begin : g_lane
    prf_maf #(.N(N), .M(M), .P(P), .Q(Q)) u_maf (
      .scheme(scheme), .i(ei[n]), .j(ej[n]), .select_v(sv[n]), .select_h(sh[n])
    );
    prf_std_addr #(.N(N), .M(M), .P(P), .Q(Q)) u_addr (
      .i(ei[n]), .j(ej[n]), .addr(laddr[n])
    );
    assign sel[n] = SW'(32'(sv[n]) * Q + 32'(sh[n]));
  end

  // address shuffle: lane addresses to the modules
  prf_shuffle #(.LANES(L), .W(AW), .SCATTER(1'b1)) u_addr_shuffle (
    .shuffle_in(laddr), .sel(sel), .shuffle_out(mem_raddr), .hit(ahit)
  );

  always_comb
    for (int n = 0; n < int'(L); n++) mem_re[n] = re && ahit[n];

  // selects delayed by the memory latency
  always_ff @(posedge clk) begin
    if (!rst_n) rvalid <= 1'b0;
    else        rvalid <= re;
    if (re) sel_q <= sel;
  end

  // read data shuffle: module outputs back to lane order
  prf_shuffle #(.LANES(L), .W(W), .SCATTER(1'b0)) u_data_shuffle (
    .shuffle_in(mem_rdata), .sel(sel_q), .shuffle_out(rdata), .hit(dhit)
  );

  // A request must be one of the scheme's conflict-free patterns.
  property p_conflict_free;
    @(posedge clk) disable iff (!rst_n)
      re |-> conflict_free(scheme, acc, 32'(i), 32'(j), P, Q);
  endproperty
  a_conflict_free: assert property (p_conflict_free)
    else $error("prf_read_port: access %s at (%0d,%0d) is not conflict-free under %s",
                acc.name(), i, j, scheme.name());

endmodule
