// mlt_pkg: shared types and elaboration-time arithmetic for the multiplierless
// 2-D linear transform generator.
//
// Everything here is evaluated while the design is elaborated; none of it becomes
// hardware by itself. It provides
//   * canonic-signed-digit (CSD) recoding of an integer constant (non-adjacent form:
//     digits in {-1,0,+1}, no two neighbouring digits nonzero, fewest nonzero digits),
//   * the split of a coefficient into sign * odd_part * 2^shift, which is what the
//     matrix decomposition groups coefficients by,
//   * the quantized orthonormal N-point DCT matrix used as the default coefficient set:
//       K[m][n] = round( c(m) * cos((2n+1) m pi / 2N) * 2^W ),
//       c(0) = sqrt(1/N), c(m>0) = sqrt(2/N),
//     with round() = floor(v + 0.5). W is the coefficient wordlength.
package mlt_pkg;

  // Where the coefficient matrix comes from.
  typedef enum logic [0:0] {
    COEF_DCT  = 1'b0,   // quantized orthonormal DCT, computed from M, N and W
    COEF_USER = 1'b1    // integer matrix given through a parameter
  } coef_src_e;

  // Which realization style the generator builds.
  typedef enum logic [1:0] {
    DIR_AUTO       = 2'd0,  // build whichever of the two below needs fewer adders
    DIR_HORIZONTAL = 2'd1,  // basis-row banks, then alpha*beta scaling, then rowwise sums
    DIR_VERTICAL   = 2'd2   // per-column alpha scaling, then rowwise sums
  } direction_e;

  // Widest constant handled by the CSD routines (digits 0..CSD_DIGITS-1).
  localparam int CSD_DIGITS = 34;
  // Width of a hardwired shift amount in the adder-bank parameters.
  localparam int SHW = 8;
  // Width of a signal index in the two-term extraction tables.
  localparam int SIGW = 8;

  // One term of a row in the two-term extraction: +/- signal[sig] * 2^sh.
  typedef struct packed {
    logic            nz;    // slot in use
    logic            neg;   // subtracted
    logic [SIGW-1:0] sig;   // input column (< N) or shared two-term (N + node index)
    logic [SHW-1:0]  sh;    // left shift
  } term_t;

  // A shared two-term: signal[a] + signal[b] * 2^d, or minus when sub is set.
  typedef struct packed {
    logic [SIGW-1:0] a;
    logic [SIGW-1:0] b;
    logic [SHW-1:0]  d;
    logic            sub;
  } node_t;

  // CSD digit i (-1, 0 or +1) of integer v, non-adjacent form.
  function automatic int csd_digit(input longint v, input int i);
    longint r;
    int d;
    r = v;
    d = 0;
    for (int k = 0; k <= i; k++) begin
      if (r[0]) begin
        d = (r[1] == 1'b1) ? -1 : 1;   // r mod 4 == 3 -> -1, r mod 4 == 1 -> +1
        r = r - longint'(d);
      end else begin
        d = 0;
      end
      r = r >>> 1;
    end
    return d;
  endfunction

  // Number of nonzero CSD digits of v.
  function automatic int csd_nonzeros(input longint v);
    int c;
    c = 0;
    for (int i = 0; i < CSD_DIGITS; i++)
      if (csd_digit(v, i) != 0) c++;
    return c;
  endfunction

  // Adders (adders or subtracters) a CSD shift-and-add multiplier by v needs.
  function automatic int csd_adders(input longint v);
    int c;
    c = csd_nonzeros(v);
    return (c > 1) ? c - 1 : 0;
  endfunction

  // |v| with all factors of two removed; 0 for v == 0.
  function automatic int odd_part(input int v);
    int a;
    a = (v < 0) ? -v : v;
    if (a == 0) return 0;
    while (a % 2 == 0) a = a / 2;
    return a;
  endfunction

  // Number of trailing zero bits of |v|; 0 for v == 0.
  function automatic int trailing_zeros(input int v);
    int a;
    int s;
    a = (v < 0) ? -v : v;
    s = 0;
    if (a == 0) return 0;
    while (a % 2 == 0) begin
      a = a / 2;
      s++;
    end
    return s;
  endfunction

  // Quantized orthonormal DCT-II coefficient, W fractional bits.
  function automatic int dct_coef(input int m, input int n, input int N, input int W);
    real c;
    real v;
    c = (m == 0) ? $sqrt(1.0 / N) : $sqrt(2.0 / N);
    v = c * $cos(real'((2 * n + 1) * m) * 3.14159265358979323846 / real'(2 * N));
    return int'($floor(v * (2.0 ** W) + 0.5));
  endfunction

endpackage
