// prf_agu: Address Generation Unit of the PRF parallel memory.
//
// From the upper-left coordinate (i, j) of the accessed block and the access
// type, the AGU produces the coordinates of all p*q elements of the block,
// one per vector lane. Lane n maps to element (i + a, j + b) with
//   rectangle p x q       a = n / q,  b = n % q   (row-major)
//   row                   a = 0,      b = n
//   column                a = n,      b = 0
//   main diagonal         a = n,      b = n
//   secondary diagonal    a = n,      b = -n
//   transposed q x p      a = n / p,  b = n % p
// The shapes and the rectangle equation (i+alpha, j+beta) follow the
// document; the lane order inside a block and the wrap-around of coordinates
// at the matrix edge (modulo N and M) are this design's choices.
// Purely combinational; N and M must be powers of two so that the wrap is a
// plain truncation.
module prf_agu
  import prf_pkg::*;
#(
  parameter int unsigned N = 128,  // matrix rows
  parameter int unsigned M = 128,  // matrix columns
  parameter int unsigned P = 2,    // module rows
  parameter int unsigned Q = 4,    // module columns
  localparam int unsigned L  = P * Q,
  localparam int unsigned IW = $clog2(N),
  localparam int unsigned JW = $clog2(M)
) (
  input  logic [IW-1:0] i,
  input  logic [JW-1:0] j,
  input  access_e       acc,
  output logic [IW-1:0] ei [L],
  output logic [JW-1:0] ej [L]
);

  always_comb begin
    for (int unsigned n = 0; n < L; n++) begin
      int unsigned a, b;
      int unsigned sub;  // b is subtracted for the secondary diagonal
      sub = 0;
      unique case (acc)
        ACC_ROW:   begin a = 0;      b = n;     end
        ACC_COL:   begin a = n;      b = 0;     end
        ACC_MDIAG: begin a = n;      b = n;     end
        ACC_SDIAG: begin a = n;      b = 0; sub = n; end
        ACC_TRECT: begin a = n / P;  b = n % P; end
        default:   begin a = n / Q;  b = n % Q; end
      endcase
      ei[n] = IW'(32'(i) + a);
      ej[n] = JW'(32'(j) + b - sub);
    end
  end

endmodule
