// tb_prf_ref_pkg: reference model used by the PRF testbenches.
//
// Written independently of the RTL: element coordinates of a block, module
// assignment and standard address of every scheme, the conflict-free access
// patterns of each scheme, and a brute-force search for the customized
// addressing coefficients. Module numbers are flat: select_v * q + select_h.
package tb_prf_ref_pkg;

  // access type codes (same meaning as the RTL enum values)
  localparam int A_RECT = 0, A_ROW = 1, A_COL = 2, A_MDIAG = 3, A_SDIAG = 4, A_TRECT = 5;
  // scheme codes
  localparam int S_REO = 0, S_RERO = 1, S_RECO = 2, S_ROCO = 3, S_RETR = 4;

  function automatic int wrap(int a, int m);
    int r;
    r = a % m;
    if (r < 0) r += m;
    return r;
  endfunction

  // row / column offset of lane n inside the block (before wrap-around)
  function automatic void offs(int acc, int n, int p, int q, output int a, output int b);
    case (acc)
      A_ROW:   begin a = 0;          b = n;          end
      A_COL:   begin a = n;          b = 0;          end
      A_MDIAG: begin a = n;          b = n;          end
      A_SDIAG: begin a = n;          b = -n;         end
      A_TRECT: begin a = n / p;      b = n - (n / p) * p; end
      default: begin a = n / q;      b = n - (n / q) * q; end
    endcase
  endfunction

  function automatic void coord(int acc, int i, int j, int n, int p, int q, int nn, int mm,
                                output int x, output int y);
    int a, b;
    offs(acc, n, p, q, a, b);
    x = wrap(i + a, nn);
    y = wrap(j + b, mm);
  endfunction

  // module assignment, written with explicit tile numbers
  function automatic int module_of(int s, int x, int y, int p, int q);
    int tr, tc, v, h;
    tr = x / p;          // tile row
    tc = y / q;          // tile column
    case (s)
      S_RERO: begin v = wrap(x + tc, p); h = wrap(y, q);      end
      S_RECO: begin v = wrap(x, p);      h = wrap(y + tr, q); end
      S_ROCO: begin v = wrap(x + tc, p); h = wrap(y + tr, q); end
      S_RETR: begin
        if (p <= q) begin v = wrap(x, p);          h = wrap(y + tr * p, q); end
        else        begin v = wrap(x + tc * q, p); h = wrap(y, q);          end
      end
      default: begin v = wrap(x, p); h = wrap(y, q); end
    endcase
    return v * q + h;
  endfunction

  function automatic int addr_of(int x, int y, int p, int q, int mm);
    return (x / p) * (mm / q) + (y / q);
  endfunction

  function automatic int g(int a, int b);
    while (b != 0) begin int t; t = a % b; a = b; b = t; end
    return a;
  endfunction

  // access types that are conflict-free under scheme s at origin (i, j)
  function automatic bit valid(int s, int acc, int i, int j, int p, int q);
    case (s)
      S_REO:  return acc == A_RECT;
      S_RERO: return acc == A_RECT || acc == A_ROW ||
                     (acc == A_MDIAG && g(p, q + 1) == 1) ||
                     (acc == A_SDIAG && g(p, q - 1) == 1);
      S_RECO: return acc == A_RECT || acc == A_COL ||
                     (acc == A_MDIAG && g(p + 1, q) == 1) ||
                     (acc == A_SDIAG && g(p - 1, q) == 1);
      S_ROCO: return acc == A_ROW || acc == A_COL ||
                     (acc == A_RECT && (i % p == 0 || j % q == 0));
      S_RETR: return acc == A_RECT || acc == A_TRECT;
      default: return 0;
    endcase
  endfunction

  // pick a random origin and a random access type valid under scheme s
  function automatic void rand_access(int s, int p, int q, int nn, int mm,
                                      output int acc, output int i, output int j);
    do begin
      acc = $urandom_range(5);
      i   = $urandom_range(nn - 1);
      j   = $urandom_range(mm - 1);
    end while (!valid(s, acc, i, j, p, q));
  endfunction

endpackage
