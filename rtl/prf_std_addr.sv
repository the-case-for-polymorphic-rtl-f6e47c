// prf_std_addr: Standard Addressing Function of the PRF parallel memory.
//
// Computes the intra-module address of one element from its own coordinates
// (i, j): the matrix is cut into aligned p x q tiles, every scheme places the
// p*q elements of a tile in p*q different modules, and the address of all of
// them is the tile number in row-major order,
//   A(i, j) = floor(i/p) * (M/q) + floor(j/q).
// Each module therefore holds N*M/(p*q) words. The read path uses one
// instance per lane (the addresses then go through the address shuffle).
// That the address is computed per element follows the document; the
// equation is the usual one for these schemes, which the document does not
// print. Combinational.
module prf_std_addr #(
  parameter int unsigned N = 128,
  parameter int unsigned M = 128,
  parameter int unsigned P = 2,
  parameter int unsigned Q = 4,
  localparam int unsigned IW = $clog2(N),
  localparam int unsigned JW = $clog2(M),
  localparam int unsigned AW = $clog2(N * M / (P * Q))
) (
  input  logic [IW-1:0] i,
  input  logic [JW-1:0] j,
  output logic [AW-1:0] addr
);

  always_comb addr = AW'((32'(i) / P) * (M / Q) + 32'(j) / Q);

endmodule
