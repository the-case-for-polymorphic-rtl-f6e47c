// prf_pkg: shared types and functions of the Polymorphic Register File (PRF)
// parallel memory.
//
// The PRF stores an N x M matrix of elements in p x q memory modules so that
// p*q elements of one "block" (a rectangle, a row, a column, a diagonal or a
// transposed rectangle) can be read or written in one clock cycle. Which
// blocks are conflict-free depends on the parallel memory scheme, i.e. on the
// Module Assignment Function (MAF) that maps element (i,j) to module
// (select_v, select_h):
//   ReO  (rectangle only)          v = i mod p,                 h = j mod q
//   ReRo (rectangle row)           v = (i + floor(j/q)) mod p,  h = j mod q
//   ReCo (rectangle column)        v = i mod p,                 h = (floor(i/p) + j) mod q
//   RoCo (row column)              v = (i + floor(j/q)) mod p,  h = (floor(i/p) + j) mod q
//   ReTr (rectangle, transposed)   p <= q: v = i mod p,  h = (i - i mod p + j) mod q
//                                  p >  q: v = (i + j - j mod q) mod p,  h = j mod q
// The five scheme names, the six access shapes and the conflict-free patterns
// of each scheme follow the document; the MAF equations themselves are the
// standard ones of the multi-module memory schemes the document builds on
// (it lists the schemes but does not print the equations). The numeric
// encodings of both enums are this design's choice.
package prf_pkg;

  // Parallel memory scheme, the top-level Memory_scheme input.
  typedef enum logic [2:0] {
    SCHEME_REO  = 3'd0,  // Rectangle only
    SCHEME_RERO = 3'd1,  // Rectangle Row
    SCHEME_RECO = 3'd2,  // Rectangle Column
    SCHEME_ROCO = 3'd3,  // Row Column
    SCHEME_RETR = 3'd4   // Rectangle Transposed Rectangle
  } scheme_e;

  // Shape of the accessed block (Read/write access type).
  typedef enum logic [2:0] {
    ACC_RECT  = 3'd0,  // p x q rectangle
    ACC_ROW   = 3'd1,  // 1 x p*q row
    ACC_COL   = 3'd2,  // p*q x 1 column
    ACC_MDIAG = 3'd3,  // main diagonal, (i+k, j+k)
    ACC_SDIAG = 3'd4,  // secondary diagonal, (i+k, j-k)
    ACC_TRECT = 3'd5   // q x p transposed rectangle
  } access_e;

  // Module assignment function. i and j are the element coordinates, already
  // reduced to the matrix size. Returns {select_v, select_h} through refs.
  function automatic void maf(input scheme_e scheme, input int unsigned i,
                              input int unsigned j, input int unsigned p,
                              input int unsigned q, output int unsigned v,
                              output int unsigned h);
    unique case (scheme)
      SCHEME_RERO: begin v = (i + j / q) % p;  h = j % q;           end
      SCHEME_RECO: begin v = i % p;            h = (i / p + j) % q; end
      SCHEME_ROCO: begin v = (i + j / q) % p;  h = (i / p + j) % q; end
      SCHEME_RETR: begin
        if (p <= q) begin v = i % p;                h = (i - i % p + j) % q; end
        else        begin v = (i + j - j % q) % p;  h = j % q;               end
      end
      default:     begin v = i % p;            h = j % q;           end
    endcase
  endfunction

  // True when (scheme, access) is one of the conflict-free combinations that
  // the document lists for the scheme (the co-primality conditions of the
  // diagonals and the alignment condition of the RoCo rectangle included).
  function automatic bit conflict_free(input scheme_e scheme, input access_e acc,
                                       input int unsigned i, input int unsigned j,
                                       input int unsigned p, input int unsigned q);
    bit ok;
    ok = 1'b0;
    unique case (scheme)
      SCHEME_REO:  ok = (acc == ACC_RECT);
      SCHEME_RERO: ok = (acc == ACC_RECT) || (acc == ACC_ROW) ||
                        (acc == ACC_MDIAG && gcd(p, q + 1) == 1) ||
                        (acc == ACC_SDIAG && gcd(p, q - 1) == 1);
      SCHEME_RECO: ok = (acc == ACC_RECT) || (acc == ACC_COL) ||
                        (acc == ACC_MDIAG && gcd(p + 1, q) == 1) ||
                        (acc == ACC_SDIAG && gcd(p - 1, q) == 1);
      SCHEME_ROCO: ok = (acc == ACC_ROW) || (acc == ACC_COL) ||
                        (acc == ACC_RECT && (i % p == 0 || j % q == 0));
      SCHEME_RETR: ok = (acc == ACC_RECT) ||
                        (acc == ACC_TRECT && (p % q == 0 || q % p == 0));
      default:     ok = 1'b0;
    endcase
    return ok;
  endfunction

  // Multiplicative inverse of a modulo m (the omega constants of the
  // customized addressing of diagonals); 0 when none exists.
  function automatic int unsigned modinv(input int unsigned a, input int unsigned m);
    int unsigned r;
    r = 0;
    for (int unsigned x = 0; x < m; x++)
      if (((a * x) % m) == (1 % m) && r == 0) r = x;
    return r;
  endfunction

  // Modulo with a non-negative result, for signed operands.
  function automatic int md(input int a, input int m);
    int r;
    r = a % m;
    return (r < 0) ? r + m : r;
  endfunction

  // Floor division for signed dividends and positive divisors.
  function automatic int fdiv(input int a, input int m);
    return (a >= 0) ? a / m : -((-a + m - 1) / m);
  endfunction

  function automatic int unsigned gcd(input int unsigned a, input int unsigned b);
    int unsigned x, y, t;
    x = a;
    y = b;
    for (int n = 0; n < 64 && y != 0; n++) begin
      t = x % y;
      x = y;
      y = t;
    end
    return x;
  endfunction

endpackage
