// prf_maf: Module Assignment Function of the PRF parallel memory.
//
// Maps one element coordinate (i, j) to the memory module that holds it,
// given the parallel memory scheme selected at run time: select_v is the
// module row (0..p-1) and select_h the module column (0..q-1). The equations
// of the five schemes are listed in prf_pkg. The read and write paths use one
// instance per vector lane. Combinational.
module prf_maf
  import prf_pkg::*;
#(
  parameter int unsigned N = 128,
  parameter int unsigned M = 128,
  parameter int unsigned P = 2,
  parameter int unsigned Q = 4,
  localparam int unsigned IW = $clog2(N),
  localparam int unsigned JW = $clog2(M),
  localparam int unsigned VW = (P > 1) ? $clog2(P) : 1,
  localparam int unsigned HW = (Q > 1) ? $clog2(Q) : 1
) (
  input  scheme_e       scheme,
  input  logic [IW-1:0] i,
  input  logic [JW-1:0] j,
  output logic [VW-1:0] select_v,
  output logic [HW-1:0] select_h
);

  always_comb begin
    int unsigned v, h;
    maf(scheme, 32'(i), 32'(j), P, Q, v, h);
    select_v = VW'(v);
    select_h = HW'(h);
  end

endmodule
