// prf_cust_coef: customized addressing coefficients of one memory module.
//
// With customized addressing a memory module does not need the coordinates of
// "its" element: it receives only the block origin (i, j), the access type and
// the scheme, and, knowing its own position (k, l) in the p x q module array,
// works out which element of the block it holds. The result is expressed as
// two small signed tile offsets,
//   c_i = floor(x/p) - floor(i/p),   c_j = floor(y/q) - floor(j/q),
// where (x, y) is the element of the block that the scheme assigns to module
// (k, l). prf_cust_addr turns them into the intra-module address.
//
// Each case solves the MAF equation of the scheme for the lane offset. With
// i0 = i mod p, ib = floor(i/p), j0 = j mod q, jb = floor(j/q):
// * one coordinate follows directly from k or l (e.g. for a ReRo row the
//   column offset is (l - j0) mod q plus q*t), the other from the remaining
//   equation, giving the unknown t of a 1D access;
// * for the diagonals the remaining equation is (q+1)t = r (mod p), or with
//   q-1, p+1, p-1, and t = omega * r uses the multiplicative inverse omega
//   (the omega constants). They are derived from P and Q at elaboration.
// That the coefficients are computed per module from (i, j), (k, l) and the
// access type, and that the diagonals use these inverses, follows the
// document; the equations themselves are this design's derivation.
// For a (scheme, access) pair that is not conflict-free the outputs are
// meaningless. Combinational.
module prf_cust_coef
  import prf_pkg::*;
#(
  parameter int unsigned N = 128,
  parameter int unsigned M = 128,
  parameter int unsigned P = 2,
  parameter int unsigned Q = 4,
  parameter int unsigned MOD_V = 0,  // k, module row of this instance
  parameter int unsigned MOD_H = 0,  // l, module column of this instance
  localparam int unsigned IW = $clog2(N),
  localparam int unsigned JW = $clog2(M),
  localparam int unsigned CW = $clog2(P + Q + 2) + 2
) (
  input  scheme_e              scheme,
  input  access_e              acc,
  input  logic        [IW-1:0] i,
  input  logic        [JW-1:0] j,
  output logic signed [CW-1:0] c_i,
  output logic signed [CW-1:0] c_j
);

  localparam int PI = int'(P);
  localparam int QI = int'(Q);
  localparam int K  = int'(MOD_V);
  localparam int LL = int'(MOD_H);
  // omega constants: inverses of (q+1, p), (q-1, p), (p+1, q), (p-1, q)
  localparam int W_QP1 = int'(modinv((Q + 1) % P, P));
  localparam int W_QM1 = int'(modinv((Q - 1) % P, P));
  localparam int W_PP1 = int'(modinv((P + 1) % Q, Q));
  localparam int W_PM1 = int'(modinv((P - 1) % Q, Q));

  always_comb begin
    int ii, jj, i0, ib, j0, jb;
    int a0, c0, t, s, lam, ci, cj;
    ii = int'(i);
    jj = int'(j);
    i0 = ii % PI;
    ib = ii / PI;
    j0 = jj % QI;
    jb = jj / QI;
    ci = 0;
    cj = 0;
    a0 = 0;
    c0 = 0;
    t = 0;
    s = 0;
    lam = 0;
    unique case (scheme)
      // ---------------------------------------------------------------- ReRo
      SCHEME_RERO: begin
        unique case (acc)
          ACC_ROW: begin
            a0 = md(LL - j0, QI);
            c0 = (j0 + a0 >= QI) ? 1 : 0;
            t  = md(K - ii - jb - c0, PI);
            cj = c0 + t;
          end
          ACC_MDIAG: begin
            a0  = md(LL - j0, QI);
            c0  = (j0 + a0 >= QI) ? 1 : 0;
            t   = md(W_QP1 * md(K - ii - a0 - jb - c0, PI), PI);
            lam = a0 + QI * t;
            ci  = (i0 + lam) / PI;
            cj  = c0 + t;
          end
          ACC_SDIAG: begin
            a0  = md(j0 - LL, QI);
            c0  = (a0 > j0) ? 1 : 0;
            t   = md(W_QM1 * md(K - ii - a0 - jb + c0, PI), PI);
            lam = a0 + QI * t;
            ci  = (i0 + lam) / PI;
            cj  = -c0 - t;
          end
          default: begin  // p x q rectangle
            a0 = md(LL - j0, QI);
            cj = (j0 + a0 >= QI) ? 1 : 0;
            s  = md(K - ii - jb - cj, PI);
            ci = (i0 + s >= PI) ? 1 : 0;
          end
        endcase
      end
      // ---------------------------------------------------------------- ReCo
      SCHEME_RECO: begin
        unique case (acc)
          ACC_COL: begin
            a0 = md(K - i0, PI);
            c0 = (i0 + a0 >= PI) ? 1 : 0;
            t  = md(LL - ib - c0 - jj, QI);
            ci = c0 + t;
          end
          ACC_MDIAG: begin
            a0  = md(K - i0, PI);
            c0  = (i0 + a0 >= PI) ? 1 : 0;
            t   = md(W_PP1 * md(LL - ib - c0 - jj - a0, QI), QI);
            lam = a0 + PI * t;
            ci  = c0 + t;
            cj  = (j0 + lam) / QI;
          end
          ACC_SDIAG: begin
            a0  = md(K - i0, PI);
            c0  = (i0 + a0 >= PI) ? 1 : 0;
            t   = md(W_PM1 * md(ib + c0 + jj - a0 - LL, QI), QI);
            lam = a0 + PI * t;
            ci  = c0 + t;
            cj  = fdiv(j0 - lam, QI);
          end
          default: begin  // p x q rectangle
            a0 = md(K - i0, PI);
            ci = (i0 + a0 >= PI) ? 1 : 0;
            s  = md(LL - ib - ci - jj, QI);
            cj = (j0 + s >= QI) ? 1 : 0;
          end
        endcase
      end
      // ---------------------------------------------------------------- RoCo
      SCHEME_ROCO: begin
        unique case (acc)
          ACC_COL: begin
            a0 = md(K - ii - jb, PI);
            c0 = (i0 + a0 >= PI) ? 1 : 0;
            t  = md(LL - ib - c0 - jj, QI);
            ci = c0 + t;
          end
          ACC_RECT: begin
            if (i0 == 0) begin  // aligned on a tile row: ci = 0
              s  = md(LL - ib - jj, QI);
              cj = (j0 + s >= QI) ? 1 : 0;
            end else begin      // aligned on a tile column: cj = 0
              s  = md(K - ii - jb, PI);
              ci = (i0 + s >= PI) ? 1 : 0;
            end
          end
          default: begin  // row
            a0 = md(LL - ib - jj, QI);
            c0 = (j0 + a0 >= QI) ? 1 : 0;
            t  = md(K - ii - jb - c0, PI);
            cj = c0 + t;
          end
        endcase
      end
      // ---------------------------------------------------------------- ReTr
      SCHEME_RETR: begin
        if (PI <= QI) begin
          a0 = md(K - i0, PI);
          c0 = (i0 + a0 >= PI) ? 1 : 0;
          if (acc == ACC_TRECT) begin
            s  = md(LL - PI * (ib + c0) - jj, QI);
            ci = c0 + s / PI;
            cj = (j0 + s % PI >= QI) ? 1 : 0;
          end else begin
            s  = md(LL - PI * (ib + c0) - jj, QI);
            ci = c0;
            cj = (j0 + s >= QI) ? 1 : 0;
          end
        end else begin
          a0 = md(LL - j0, QI);
          c0 = (j0 + a0 >= QI) ? 1 : 0;
          if (acc == ACC_TRECT) begin
            s  = md(K - ii - QI * (jb + c0), PI);
            cj = c0 + s / QI;
            ci = (i0 + s % QI >= PI) ? 1 : 0;
          end else begin
            s  = md(K - ii - QI * (jb + c0), PI);
            cj = c0;
            ci = (i0 + s >= PI) ? 1 : 0;
          end
        end
      end
      // ---------------------------------------------------------------- ReO
      default: begin
        ci = (i0 + md(K - i0, PI) >= PI) ? 1 : 0;
        cj = (j0 + md(LL - j0, QI) >= QI) ? 1 : 0;
      end
    endcase
    c_i = CW'(ci);
    c_j = CW'(cj);
  end

endmodule
