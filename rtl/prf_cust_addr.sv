// prf_cust_addr: Customized Addressing Function of one memory module.
//
// Forms the intra-module address from the block origin (i, j) and the two
// coefficients of prf_cust_coef:
//   A = ((floor(i/p) + c_i) mod (N/p)) * (M/q) + ((floor(j/q) + c_j) mod (M/q))
// which equals the standard address floor(x/p)*(M/q) + floor(y/q) of the
// element (x, y) this module holds, without needing (x, y) or an address
// shuffle. The mod terms implement the wrap-around at the matrix edge, a
// choice of this design. N/p and M/q must be powers of two. Combinational.
module prf_cust_addr #(
  parameter int unsigned N = 128,
  parameter int unsigned M = 128,
  parameter int unsigned P = 2,
  parameter int unsigned Q = 4,
  localparam int unsigned IW = $clog2(N),
  localparam int unsigned JW = $clog2(M),
  localparam int unsigned CW = $clog2(P + Q + 2) + 2,
  localparam int unsigned AW = $clog2(N * M / (P * Q)),
  localparam int unsigned RW = $clog2(N / P),   // tile-row bits
  localparam int unsigned TW = $clog2(M / Q)    // tile-column bits
) (
  input  logic        [IW-1:0] i,
  input  logic        [JW-1:0] j,
  input  logic signed [CW-1:0] c_i,
  input  logic signed [CW-1:0] c_j,
  output logic        [AW-1:0] addr
);

  logic [RW-1:0] trow;
  logic [TW-1:0] tcol;

  // Two's complement addition truncated to the tile-index width is the
  // modulo reduction.
  always_comb begin
    trow = RW'(32'(i) / P) + RW'(32'(signed'(c_i)));
    tcol = TW'(32'(j) / Q) + TW'(32'(signed'(c_j)));
    addr = AW'({trow, tcol});
  end

endmodule
