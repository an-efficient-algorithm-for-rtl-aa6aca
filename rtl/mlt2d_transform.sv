// mlt2d_transform: multiplierless realization of a constant 2-D linear transform
// y = K x (K is M x N), built only from hardwired shifts and adders/subtracters.
//
// The adder network is derived from K while the design is elaborated:
//   1. Coefficient quantization. K is the orthonormal N-point DCT quantized to W
//      fractional bits (default, see mlt_pkg::dct_coef) or a user integer matrix.
//      Constants are realized in canonic signed digit (CSD) form.
//   2. Matrix decomposition, K = sum_p alpha_p K_p. Every nonzero coefficient is
//      sign * alpha * 2^s with alpha odd; the distinct alphas are the alpha_p
//      (all unique, one of them is 1 if K has a power-of-two entry) and K_p holds
//      only shifts and negations (entries 0 or +/-2^s).
//   3. Basis vector extraction. The rows k_{p,m} of all K_p are reduced to a set of
//      basis rows k_r unique up to a shift and a sign: k_{p,m} = beta * k_r with
//      beta = +/-2^b. Then, with SHARE set, two-terms (pairs of terms of a basis
//      row) that recur in several rows, as shifted and/or negated copies on the same
//      two signals, are extracted greedily, most frequent first: each becomes a new
//      shared signal (one adder) used by all those rows. Each k_r x is then the
//      pow2_adder_bank sum of its remaining terms.
//   4. Adder minimization in one of two directions:
//      horizontal - each basis output k_r x is scaled by each alpha_p it is needed
//        with, once per distinct (alpha_p, r) pair;
//      vertical   - each input x_n is scaled by each alpha_p that occurs in column n,
//        once per distinct (n, alpha_p) pair.
//      With SHARE set, every scaling is written as its CSD terms and two-terms of
//      consecutive nonzero digits that recur (in one constant or across constants on
//      the same signals) are extracted the same way as in step 3; each scaling is
//      then a pow2_adder_bank. Without SHARE each is a plain csd_const_mult.
//      This search runs only for a direction that DIR allows to be built; for the
//      other, ADDERS_H or ADDERS_V then counts it without scaling two-terms.
//      With DIR = DIR_AUTO the direction with fewer adders is built.
//   5. Rowwise sums. Each y_m is one pow2_adder_bank over the scaled signals it
//      needs, the betas (or coefficient shifts and signs) being hardwired.
// The adder counts of both directions and of the direct realization (one CSD
// multiplier per coefficient plus a row adder) are available as the localparams
// ADDERS_H, ADDERS_V, ADDERS_DIRECT and NUM_ADDERS (the one built); NSHARED is the
// number of shared two-terms between basis rows, NSHARED_SH / NSHARED_SV those inside
// the scaling constants. For the default 8-point DCT at W = 8: 200 direct, 68 built
// (6 + 6 shared two-terms), 144 in the vertical style; 84 with SHARE = 0.
//
// Interface: x holds N signed XW-bit inputs, sampled with in_valid; y holds M signed
// YW-bit outputs. YW defaults to XW + W + clog2(N) + 1, which is exact for any K whose
// entries lie in [-2^W, 2^W]; an elaboration check stops a narrower YW that could
// overflow. All internal arithmetic is modulo 2^YW, so the outputs are exact.
// Timing: the adder network is combinational; y and out_valid are registered, so a
// result appears one clock after its input and a new vector is accepted every clock.
// rst_n is an active-low asynchronous reset of the output registers.
//
// Steps 1-5, the choice of the cheaper direction and CSD follow the algorithm this
// transform generator implements, and so does the two-term extraction between basis
// rows and inside the scaling constants. Its own simplifications: the decomposition
// groups coefficients by odd part (no search for larger shared patterns), the rowwise
// sums get no two-term sharing, the extractions stop after CSE_STEPS = 16 and
// SC_STEPS = 24 shared two-terms (the remaining terms are then simply summed, so
// results stay exact), and adder banks are chains. The input width, the output
// register, the handshake and the reset are this design's choices.
module mlt2d_transform
  import mlt_pkg::*;
#(
  parameter int M   = 8,                      // outputs (rows of K)
  parameter int N   = 8,                      // inputs  (columns of K)
  parameter int W   = 8,                      // coefficient wordlength (CSD)
  parameter int XW  = 8,                      // input sample width
  parameter coef_src_e SRC = COEF_DCT,
  parameter logic [M*N-1:0][31:0] KUSER = '0, // K[m][n] at index m*N+n when SRC == COEF_USER
  parameter direction_e DIR = DIR_AUTO,
  parameter bit SHARE = 1'b1,                 // two-term extraction between basis rows
  parameter int YW  = XW + W + $clog2(N) + 1  // output width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [XW-1:0] x [N],
  output logic                 out_valid,
  output logic signed [YW-1:0] y [M]
);

  localparam int MN   = M * N;
  localparam int MAXR = MN * M;               // bound on the number of rows (p, m)

  typedef logic [MN-1:0][31:0]   mnv_t;
  typedef logic [MAXR-1:0][15:0] rv_t;

  // ---------------------------------------------------------------- 1. coefficients
  function automatic int qcoef(input int m, input int n);
    if (SRC == COEF_DCT) return dct_coef(m, n, N, W);
    return int'(KUSER[m*N+n]);
  endfunction

  // Largest possible |y_m| for any input, to check YW.
  function automatic longint max_abs_out();
    longint best;
    longint s;
    best = 0;
    for (int m = 0; m < M; m++) begin
      s = 0;
      for (int n = 0; n < N; n++) begin
        if (qcoef(m, n) < 0) s = s - longint'(qcoef(m, n));
        else                 s = s + longint'(qcoef(m, n));
      end
      if (s > best) best = s;
    end
    return best * (longint'(1) <<< (XW - 1));
  endfunction

  localparam longint MAXOUT = max_abs_out();
  if (YW < 64 && MAXOUT > (longint'(1) <<< (YW - 1)) - 1) begin : g_yw_check
    $error("mlt2d_transform: YW too small for this coefficient matrix");
  end

  // ------------------------------------------------------- 2. matrix decomposition
  // Distinct odd parts of the nonzero coefficients, in row-major order of appearance.
  function automatic mnv_t calc_alphas(input bit want_count);
    mnv_t a;
    int   np;
    bit   found;
    int   o;
    a  = '0;
    np = 0;
    for (int m = 0; m < M; m++)
      for (int n = 0; n < N; n++)
        if (qcoef(m, n) != 0) begin
          o = odd_part(qcoef(m, n));
          found = 1'b0;
          for (int k = 0; k < np; k++)
            if (int'(a[k]) == o) found = 1'b1;
          if (!found) begin
            a[np] = o;
            np++;
          end
        end
    if (want_count) begin
      a = '0;
      a[0] = np;
    end
    return a;
  endfunction

  function automatic int alpha_count();
    mnv_t t;
    t = calc_alphas(1'b1);
    return int'(t[0]);
  endfunction

  localparam mnv_t ALPHA = calc_alphas(1'b0);
  localparam int   NP    = alpha_count();
  localparam int   NP1   = (NP > 0) ? NP : 1;

  // Is coefficient (m, n) a member of sub-matrix K_p?
  function automatic bit in_kp(input int p, input int m, input int n);
    int c;
    c = qcoef(m, n);
    return (c != 0) && (odd_part(c) == int'(ALPHA[p]));
  endfunction

  function automatic int alpha_index(input int c);
    for (int k = 0; k < NP; k++)
      if (int'(ALPHA[k]) == odd_part(c)) return k;
    return 0;
  endfunction

  // ---------------------------------------------------- 3. basis vector extraction
  // Row i = p*M + m of the stacked sub-matrices.
  function automatic bit row_empty(input int i);
    for (int n = 0; n < N; n++)
      if (in_kp(i / M, i % M, n)) return 1'b0;
    return 1'b1;
  endfunction

  // beta of row i: sign of its first entry and its smallest shift.
  function automatic bit row_neg(input int i);
    for (int n = 0; n < N; n++)
      if (in_kp(i / M, i % M, n)) return qcoef(i % M, n) < 0;
    return 1'b0;
  endfunction

  function automatic int row_minsh(input int i);
    int s;
    s = 1 << 30;
    for (int n = 0; n < N; n++)
      if (in_kp(i / M, i % M, n) && trailing_zeros(qcoef(i % M, n)) < s)
        s = trailing_zeros(qcoef(i % M, n));
    return s;
  endfunction

  // Entry n of row i divided by its beta, encoded 0 (absent) or 1 + 2*neg + 4*shift.
  function automatic int canon(input int i, input int n, input bit neg0, input int sh0);
    int c;
    if (!in_kp(i / M, i % M, n)) return 0;
    c = qcoef(i % M, n);
    return 1 + (((c < 0) != neg0) ? 2 : 0) + 4 * (trailing_zeros(c) - sh0);
  endfunction

  function automatic bit rows_equiv(input int i, input int j);
    bit ni;
    bit nj;
    int si;
    int sj;
    ni = row_neg(i);
    nj = row_neg(j);
    si = row_minsh(i);
    sj = row_minsh(j);
    for (int n = 0; n < N; n++)
      if (canon(i, n, ni, si) != canon(j, n, nj, sj)) return 1'b0;
    return 1'b1;
  endfunction

  // what = 0: basis index of every row (all ones if empty);
  // what = 1: source row of every basis row; what = 2: count in entry 0.
  function automatic rv_t calc_basis(input int what);
    rv_t rb;
    rv_t src;
    int  nb;
    int  f;
    rb  = '1;
    src = '0;
    nb  = 0;
    for (int i = 0; i < NP * M; i++)
      if (!row_empty(i)) begin
        f = -1;
        for (int j = 0; j < nb; j++)
          if (f < 0 && rows_equiv(int'(src[j]), i)) f = j;
        if (f < 0) begin
          src[nb] = 16'(i);
          rb[i]   = 16'(nb);
          nb++;
        end else begin
          rb[i] = 16'(f);
        end
      end
    if (what == 0) return rb;
    if (what == 1) return src;
    rb = '0;
    rb[0] = 16'(nb);
    return rb;
  endfunction

  function automatic int basis_count();
    rv_t t;
    t = calc_basis(2);
    return int'(t[0]);
  endfunction

  localparam rv_t ROW_BASIS = calc_basis(0);
  localparam rv_t BASIS_SRC = calc_basis(1);
  localparam int  NB        = basis_count();
  localparam int  NB1       = (NB > 0) ? NB : 1;

  // Weights of basis bank r (entries of its source row divided by that row's beta).
  function automatic logic [N-1:0] bank_nz(input int r);
    logic [N-1:0] v;
    v = '0;
    for (int n = 0; n < N; n++) v[n] = in_kp(int'(BASIS_SRC[r]) / M, int'(BASIS_SRC[r]) % M, n);
    return v;
  endfunction

  function automatic logic [N-1:0] bank_neg(input int r);
    logic [N-1:0] v;
    int i;
    i = int'(BASIS_SRC[r]);
    v = '0;
    for (int n = 0; n < N; n++) v[n] = canon(i, n, row_neg(i), row_minsh(i)) % 4 == 3;
    return v;
  endfunction

  function automatic logic [N-1:0][SHW-1:0] bank_sh(input int r);
    logic [N-1:0][SHW-1:0] v;
    int i;
    i = int'(BASIS_SRC[r]);
    v = '0;
    for (int n = 0; n < N; n++)
      if (in_kp(i / M, i % M, n)) v[n] = SHW'((canon(i, n, row_neg(i), row_minsh(i)) - 1) / 4);
    return v;
  endfunction

  // ------------------------------------- 3'. two-term extraction between basis rows
  // A two-term is a pair of terms of one basis row. Two-terms of different rows match
  // when they use the same two signals with the same relative shift and sign (so one
  // is a shifted and/or negated copy of the other). Each step takes the two-term with
  // the most matches, creates the shared signal sig[a] +/- sig[b]*2^d once (one
  // adder), and puts it in place of the pair in every matching row. Steps stop when
  // no two-term matches in two or more rows, or after CSE_STEPS shared signals; the
  // terms left in a row are then summed by its bank.
  localparam int CSE_STEPS = 16;

  typedef struct packed {
    term_t [NB1-1:0][N-1:0] rows;
    node_t [CSE_STEPS-1:0]  nodes;
    logic  [7:0]            nn;
    logic                   done;
  } cse_t;

  function automatic cse_t cse_init();
    cse_t s;
    logic [N-1:0] nz;
    logic [N-1:0] ng;
    logic [N-1:0][SHW-1:0] sh;
    s = '0;
    for (int r = 0; r < NB; r++) begin
      nz = bank_nz(r);
      ng = bank_neg(r);
      sh = bank_sh(r);
      for (int n = 0; n < N; n++) begin
        s.rows[r][n].nz  = nz[n];
        s.rows[r][n].neg = ng[n];
        s.rows[r][n].sig = SIGW'(n);
        s.rows[r][n].sh  = sh[n];
      end
    end
    s.done = !SHARE;
    return s;
  endfunction

  // Slot of row r holding the second term of two-term (a, b, d, sub) whose first
  // term sits in slot ta; -1 if the row has no such match there.
  function automatic int match_at(input cse_t s, input int r, input int ta,
                                  input int b, input int d, input bit sub);
    term_t u;
    term_t v;
    u = s.rows[r][ta];
    for (int t = 0; t < N; t++) begin
      v = s.rows[r][t];
      if (t != ta && v.nz && int'(v.sig) == b && int'(v.sh) == int'(u.sh) + d &&
          (u.neg ^ v.neg) == sub)
        return t;
    end
    return -1;
  endfunction

  // Slot of row r holding signal a (each signal occurs at most once per row), or -1.
  function automatic int slot_of(input cse_t s, input int r, input int a);
    for (int t = 0; t < N; t++)
      if (s.rows[r][t].nz && int'(s.rows[r][t].sig) == a) return t;
    return -1;
  endfunction

  function automatic cse_t cse_step(input cse_t s_in);
    cse_t  s;
    term_t u;
    term_t v;
    int best;
    int cnt;
    int ta;
    int ba;
    int bb;
    int bd;
    bit bsub;
    s = s_in;
    if (s.done) return s;
    best = 1;
    ba = 0;
    bb = 0;
    bd = 0;
    bsub = 1'b0;
    // Candidates from row i are counted over rows i.. only: the first row holding
    // a two-term sees all its matches, later rows see fewer, so the maximum is exact.
    for (int i = 0; i < NB; i++)
      for (int t1 = 0; t1 < N; t1++)
        for (int t2 = 0; t2 < N; t2++) begin
          u = s.rows[i][t1];
          v = s.rows[i][t2];
          if (t1 != t2 && u.nz && v.nz &&
              (u.sh < v.sh || (u.sh == v.sh && u.sig < v.sig))) begin
            cnt = 0;
            for (int j = i; j < NB; j++) begin
              ta = slot_of(s, j, int'(u.sig));
              if (ta >= 0 && match_at(s, j, ta, int'(v.sig), int'(v.sh) - int'(u.sh), u.neg ^ v.neg) >= 0)
                cnt++;
            end
            if (cnt > best) begin
              best = cnt;
              ba = int'(u.sig);
              bb = int'(v.sig);
              bd = int'(v.sh) - int'(u.sh);
              bsub = u.neg ^ v.neg;
            end
          end
        end
    if (best < 2 || int'(s.nn) >= CSE_STEPS || N + int'(s.nn) >= (1 << SIGW)) begin
      s.done = 1'b1;
      return s;
    end
    s.nodes[s.nn].a   = SIGW'(ba);
    s.nodes[s.nn].b   = SIGW'(bb);
    s.nodes[s.nn].d   = SHW'(bd);
    s.nodes[s.nn].sub = bsub;
    for (int j = 0; j < NB; j++) begin
      int tb;
      ta = slot_of(s, j, ba);
      tb = (ta >= 0) ? match_at(s, j, ta, bb, bd, bsub) : -1;
      if (tb >= 0) begin
        s.rows[j][ta].sig = SIGW'(N + int'(s.nn));
        s.rows[j][tb]     = '0;
      end
    end
    s.nn = s.nn + 8'd1;
    return s;
  endfunction

  // One constant evaluation per step keeps each evaluation small.
  localparam cse_t CSE0  = cse_init();
  localparam cse_t CSE1  = cse_step(CSE0);
  localparam cse_t CSE2  = cse_step(CSE1);
  localparam cse_t CSE3  = cse_step(CSE2);
  localparam cse_t CSE4  = cse_step(CSE3);
  localparam cse_t CSE5  = cse_step(CSE4);
  localparam cse_t CSE6  = cse_step(CSE5);
  localparam cse_t CSE7  = cse_step(CSE6);
  localparam cse_t CSE8  = cse_step(CSE7);
  localparam cse_t CSE9  = cse_step(CSE8);
  localparam cse_t CSE10 = cse_step(CSE9);
  localparam cse_t CSE11 = cse_step(CSE10);
  localparam cse_t CSE12 = cse_step(CSE11);
  localparam cse_t CSE13 = cse_step(CSE12);
  localparam cse_t CSE14 = cse_step(CSE13);
  localparam cse_t CSE15 = cse_step(CSE14);
  localparam cse_t CSE   = cse_step(CSE15);
  localparam int   NSHARED = int'(CSE.nn);

  function automatic logic [N-1:0] cse_nz(input int r);
    logic [N-1:0] v;
    for (int t = 0; t < N; t++) v[t] = CSE.rows[r][t].nz;
    return v;
  endfunction

  function automatic logic [N-1:0] cse_neg(input int r);
    logic [N-1:0] v;
    for (int t = 0; t < N; t++) v[t] = CSE.rows[r][t].neg;
    return v;
  endfunction

  function automatic logic [N-1:0][SHW-1:0] cse_sh(input int r);
    logic [N-1:0][SHW-1:0] v;
    for (int t = 0; t < N; t++) v[t] = CSE.rows[r][t].sh;
    return v;
  endfunction

  // ------------------------------------------ 4. horizontal alpha*beta scaling pairs
  // Distinct (alpha_p, basis r) pairs. what = 0: pair index of every row;
  // what = 1: p of every pair; what = 2: r of every pair; what = 3: count in entry 0.
  function automatic rv_t calc_pairs(input int what);
    rv_t rq;
    rv_t pp;
    rv_t pr;
    int  nq;
    int  f;
    rq = '1;
    pp = '0;
    pr = '0;
    nq = 0;
    for (int i = 0; i < NP * M; i++)
      if (!row_empty(i)) begin
        f = -1;
        for (int q = 0; q < nq; q++)
          if (f < 0 && int'(pp[q]) == i / M && pr[q] == ROW_BASIS[i]) f = q;
        if (f < 0) begin
          pp[nq] = 16'(i / M);
          pr[nq] = ROW_BASIS[i];
          rq[i]  = 16'(nq);
          nq++;
        end else begin
          rq[i] = 16'(f);
        end
      end
    case (what)
      0: return rq;
      1: return pp;
      2: return pr;
      default: begin
        rq = '0;
        rq[0] = 16'(nq);
        return rq;
      end
    endcase
  endfunction

  function automatic int pair_count();
    rv_t t;
    t = calc_pairs(3);
    return int'(t[0]);
  endfunction

  localparam rv_t ROW_PAIR = calc_pairs(0);
  localparam rv_t PAIR_P   = calc_pairs(1);
  localparam rv_t PAIR_R   = calc_pairs(2);
  localparam int  NQ       = pair_count();
  localparam int  NQ1      = (NQ > 0) ? NQ : 1;

  // Rowwise bank of output m, horizontal style: input q carries alpha_p * k_r x.
  function automatic logic [NQ1-1:0] hrow_nz(input int m);
    logic [NQ1-1:0] v;
    v = '0;
    for (int p = 0; p < NP; p++)
      if (!row_empty(p * M + m)) v[int'(ROW_PAIR[p*M+m])] = 1'b1;
    return v;
  endfunction

  function automatic logic [NQ1-1:0] hrow_neg(input int m);
    logic [NQ1-1:0] v;
    v = '0;
    for (int p = 0; p < NP; p++)
      if (!row_empty(p * M + m)) v[int'(ROW_PAIR[p*M+m])] = row_neg(p * M + m);
    return v;
  endfunction

  function automatic logic [NQ1-1:0][SHW-1:0] hrow_sh(input int m);
    logic [NQ1-1:0][SHW-1:0] v;
    v = '0;
    for (int p = 0; p < NP; p++)
      if (!row_empty(p * M + m)) v[int'(ROW_PAIR[p*M+m])] = SHW'(row_minsh(p * M + m));
    return v;
  endfunction

  // ------------------------------------------------ 4'. vertical per-column scaling
  // Signal n*NP + p is alpha_p * x_n, present when column n uses alpha_p.
  function automatic bit col_uses(input int n, input int p);
    for (int m = 0; m < M; m++)
      if (in_kp(p, m, n)) return 1'b1;
    return 1'b0;
  endfunction

  function automatic logic [N*NP1-1:0] vrow_nz(input int m);
    logic [N*NP1-1:0] v;
    v = '0;
    for (int n = 0; n < N; n++)
      if (qcoef(m, n) != 0) v[n*NP1 + alpha_index(qcoef(m, n))] = 1'b1;
    return v;
  endfunction

  function automatic logic [N*NP1-1:0] vrow_neg(input int m);
    logic [N*NP1-1:0] v;
    v = '0;
    for (int n = 0; n < N; n++)
      if (qcoef(m, n) < 0) v[n*NP1 + alpha_index(qcoef(m, n))] = 1'b1;
    return v;
  endfunction

  function automatic logic [N*NP1-1:0][SHW-1:0] vrow_sh(input int m);
    logic [N*NP1-1:0][SHW-1:0] v;
    v = '0;
    for (int n = 0; n < N; n++)
      if (qcoef(m, n) != 0)
        v[n*NP1 + alpha_index(qcoef(m, n))] = SHW'(trailing_zeros(qcoef(m, n)));
    return v;
  endfunction

  // ------------------------------------ 4''. two-term sharing inside the scaling
  // Each scaling row is one constant alpha_p applied to one signal (a basis output in
  // the horizontal style, an input in the vertical style), written as its CSD digits
  // in ascending order: terms +/- signal * 2^position. Here a two-term is a pair of
  // consecutive nonzero digits; two-terms match when they apply the same signals at
  // the same distance with the same relative sign, within one row or across rows.
  // As between basis rows, the most frequent two-term becomes a shared signal (one
  // adder) and replaces its matches, until none occurs twice or SC_STEPS is reached.
  localparam int SC_STEPS = 24;

  function automatic int max_digits();
    int t;
    t = 1;
    for (int p = 0; p < NP; p++)
      if (csd_nonzeros(longint'(ALPHA[p])) > t) t = csd_nonzeros(longint'(ALPHA[p]));
    return t;
  endfunction

  localparam int TS  = max_digits();          // slots per scaling row
  localparam int NSR = (NQ1 > N * NP1) ? NQ1 : N * NP1;

  typedef struct packed {
    term_t [NSR-1:0][TS-1:0] rows;
    node_t [SC_STEPS-1:0]    nodes;
    logic  [7:0]             nn;
    logic  [15:0]            nrows;
    logic  [15:0]            nin;           // signals below nin are stage inputs
    logic                    done;
  } sc_t;

  // Row for constant alpha on signal sg.
  function automatic sc_t sc_put(input sc_t s_in, input int row, input int alpha, input int sg);
    sc_t s;
    int  t;
    s = s_in;
    t = 0;
    for (int i = 0; i < CSD_DIGITS; i++)
      if (csd_digit(longint'(alpha), i) != 0 && t < TS) begin
        s.rows[row][t].nz  = 1'b1;
        s.rows[row][t].neg = csd_digit(longint'(alpha), i) < 0;
        s.rows[row][t].sig = SIGW'(sg);
        s.rows[row][t].sh  = SHW'(i);
        t++;
      end
    return s;
  endfunction

  // Horizontal: row q is alpha_p * basis r of pair q.
  function automatic sc_t sc_init_h();
    sc_t s;
    s = '0;
    for (int q = 0; q < NQ; q++)
      s = sc_put(s, q, int'(ALPHA[PAIR_P[q]]), int'(PAIR_R[q]));
    s.nrows = 16'(NQ);
    s.nin   = 16'(NB);
    s.done  = !SHARE || DIR == DIR_VERTICAL;     // not built: no need to share
    return s;
  endfunction

  // Vertical: row n*NP1 + p is alpha_p * x_n, present when column n uses alpha_p.
  function automatic sc_t sc_init_v();
    sc_t s;
    s = '0;
    for (int n = 0; n < N; n++)
      for (int p = 0; p < NP; p++)
        if (col_uses(n, p)) s = sc_put(s, n * NP1 + p, int'(ALPHA[p]), n);
    s.nrows = 16'(N * NP1);
    s.nin   = 16'(N);
    s.done  = !SHARE || DIR == DIR_HORIZONTAL;   // not built: no need to share
    return s;
  endfunction

  // Does the consecutive pair (u, v) match two-term (a, b, d, sub)?
  function automatic bit sc_is(input term_t u, input term_t v, input int a, input int b,
                               input int d, input bit sub);
    return int'(u.sig) == a && int'(v.sig) == b && int'(v.sh) - int'(u.sh) == d &&
           (u.neg ^ v.neg) == sub;
  endfunction

  // Non-overlapping matches of a two-term in one row.
  function automatic int sc_occ(input sc_t s, input int r, input int a, input int b,
                                input int d, input bit sub);
    int c;
    int prev;
    c = 0;
    prev = -1;
    for (int t = 0; t < TS; t++)
      if (s.rows[r][t].nz) begin
        if (prev >= 0 && sc_is(s.rows[r][prev], s.rows[r][t], a, b, d, sub)) begin
          c++;
          prev = -1;
        end else begin
          prev = t;
        end
      end
    return c;
  endfunction

  function automatic sc_t sc_step(input sc_t s_in);
    sc_t   s;
    term_t u;
    term_t v;
    int best;
    int cnt;
    int prev;
    int ba;
    int bb;
    int bd;
    bit bsub;
    int nid;
    s = s_in;
    if (s.done) return s;
    best = 1;
    ba = 0;
    bb = 0;
    bd = 0;
    bsub = 1'b0;
    for (int i = 0; i < int'(s.nrows); i++) begin
      prev = -1;
      for (int t = 0; t < TS; t++)
        if (s.rows[i][t].nz) begin
          if (prev >= 0) begin
            u = s.rows[i][prev];
            v = s.rows[i][t];
            cnt = 0;
            for (int j = i; j < int'(s.nrows); j++)
              cnt += sc_occ(s, j, int'(u.sig), int'(v.sig), int'(v.sh) - int'(u.sh), u.neg ^ v.neg);
            if (cnt > best) begin
              best = cnt;
              ba = int'(u.sig);
              bb = int'(v.sig);
              bd = int'(v.sh) - int'(u.sh);
              bsub = u.neg ^ v.neg;
            end
          end
          prev = t;
        end
    end
    nid = int'(s.nin) + int'(s.nn);
    if (best < 2 || int'(s.nn) >= SC_STEPS || nid >= (1 << SIGW)) begin
      s.done = 1'b1;
      return s;
    end
    s.nodes[s.nn].a   = SIGW'(ba);
    s.nodes[s.nn].b   = SIGW'(bb);
    s.nodes[s.nn].d   = SHW'(bd);
    s.nodes[s.nn].sub = bsub;
    for (int j = 0; j < int'(s.nrows); j++) begin
      prev = -1;
      for (int t = 0; t < TS; t++)
        if (s.rows[j][t].nz) begin
          if (prev >= 0 && sc_is(s.rows[j][prev], s.rows[j][t], ba, bb, bd, bsub)) begin
            s.rows[j][prev].sig = SIGW'(nid);
            s.rows[j][t] = '0;
            prev = -1;
          end else begin
            prev = t;
          end
        end
    end
    s.nn = s.nn + 8'd1;
    return s;
  endfunction

  localparam sc_t SH0  = sc_init_h();
  localparam sc_t SH1  = sc_step(SH0);
  localparam sc_t SH2  = sc_step(SH1);
  localparam sc_t SH3  = sc_step(SH2);
  localparam sc_t SH4  = sc_step(SH3);
  localparam sc_t SH5  = sc_step(SH4);
  localparam sc_t SH6  = sc_step(SH5);
  localparam sc_t SH7  = sc_step(SH6);
  localparam sc_t SH8  = sc_step(SH7);
  localparam sc_t SH9  = sc_step(SH8);
  localparam sc_t SH10 = sc_step(SH9);
  localparam sc_t SH11 = sc_step(SH10);
  localparam sc_t SH12 = sc_step(SH11);
  localparam sc_t SH13 = sc_step(SH12);
  localparam sc_t SH14 = sc_step(SH13);
  localparam sc_t SH15 = sc_step(SH14);
  localparam sc_t SH16 = sc_step(SH15);
  localparam sc_t SH17 = sc_step(SH16);
  localparam sc_t SH18 = sc_step(SH17);
  localparam sc_t SH19 = sc_step(SH18);
  localparam sc_t SH20 = sc_step(SH19);
  localparam sc_t SH21 = sc_step(SH20);
  localparam sc_t SH22 = sc_step(SH21);
  localparam sc_t SH23 = sc_step(SH22);
  localparam sc_t SCH  = sc_step(SH23);

  localparam sc_t SV0  = sc_init_v();
  localparam sc_t SV1  = sc_step(SV0);
  localparam sc_t SV2  = sc_step(SV1);
  localparam sc_t SV3  = sc_step(SV2);
  localparam sc_t SV4  = sc_step(SV3);
  localparam sc_t SV5  = sc_step(SV4);
  localparam sc_t SV6  = sc_step(SV5);
  localparam sc_t SV7  = sc_step(SV6);
  localparam sc_t SV8  = sc_step(SV7);
  localparam sc_t SV9  = sc_step(SV8);
  localparam sc_t SV10 = sc_step(SV9);
  localparam sc_t SV11 = sc_step(SV10);
  localparam sc_t SV12 = sc_step(SV11);
  localparam sc_t SV13 = sc_step(SV12);
  localparam sc_t SV14 = sc_step(SV13);
  localparam sc_t SV15 = sc_step(SV14);
  localparam sc_t SV16 = sc_step(SV15);
  localparam sc_t SV17 = sc_step(SV16);
  localparam sc_t SV18 = sc_step(SV17);
  localparam sc_t SV19 = sc_step(SV18);
  localparam sc_t SV20 = sc_step(SV19);
  localparam sc_t SV21 = sc_step(SV20);
  localparam sc_t SV22 = sc_step(SV21);
  localparam sc_t SV23 = sc_step(SV22);
  localparam sc_t SCV  = sc_step(SV23);

  localparam int NSHARED_SH = int'(SCH.nn);   // shared two-terms, horizontal scaling
  localparam int NSHARED_SV = int'(SCV.nn);   // shared two-terms, vertical scaling

  // Adders of a scaling stage: shared two-terms plus (terms - 1) per row.
  function automatic int sc_adders(input sc_t s);
    int a;
    int k;
    a = int'(s.nn);
    for (int r = 0; r < int'(s.nrows); r++) begin
      k = 0;
      for (int t = 0; t < TS; t++)
        if (s.rows[r][t].nz) k++;
      if (k > 1) a += k - 1;
    end
    return a;
  endfunction

  function automatic logic [TS-1:0] sc_nz(input sc_t s, input int r);
    logic [TS-1:0] v;
    for (int t = 0; t < TS; t++) v[t] = s.rows[r][t].nz;
    return v;
  endfunction

  function automatic logic [TS-1:0] sc_neg(input sc_t s, input int r);
    logic [TS-1:0] v;
    for (int t = 0; t < TS; t++) v[t] = s.rows[r][t].neg;
    return v;
  endfunction

  function automatic logic [TS-1:0][SHW-1:0] sc_sh(input sc_t s, input int r);
    logic [TS-1:0][SHW-1:0] v;
    for (int t = 0; t < TS; t++) v[t] = s.rows[r][t].sh;
    return v;
  endfunction

  // -------------------------------------------------------------- adder counts
  function automatic int count_h();
    int a;
    int k;
    a = 0;
    a = NSHARED;
    for (int r = 0; r < NB; r++) a += $countones(cse_nz(r)) - 1;
    a += sc_adders(SCH);
    for (int m = 0; m < M; m++) begin
      k = $countones(hrow_nz(m));
      if (k > 1) a += k - 1;
    end
    return a;
  endfunction

  function automatic int count_v();
    int a;
    int k;
    a = 0;
    a = sc_adders(SCV);
    for (int m = 0; m < M; m++) begin
      k = $countones(vrow_nz(m));
      if (k > 1) a += k - 1;
    end
    return a;
  endfunction

  function automatic int count_direct();
    int a;
    int k;
    a = 0;
    for (int m = 0; m < M; m++) begin
      k = 0;
      for (int n = 0; n < N; n++)
        if (qcoef(m, n) != 0) begin
          a += csd_adders(longint'(qcoef(m, n)));
          k++;
        end
      if (k > 1) a += k - 1;
    end
    return a;
  endfunction

  localparam int ADDERS_H      = count_h();
  localparam int ADDERS_V      = count_v();
  localparam int ADDERS_DIRECT = count_direct();
  localparam bit USE_H         = (DIR == DIR_HORIZONTAL) ||
                                 (DIR == DIR_AUTO && ADDERS_H <= ADDERS_V);
  localparam int NUM_ADDERS    = USE_H ? ADDERS_H : ADDERS_V;

  // ----------------------------------------------------------------- datapath
  logic signed [YW-1:0] y_comb [M];

  if (USE_H) begin : g_horizontal
    logic signed [YW-1:0] basis  [NB1];   // k_r x
    logic signed [YW-1:0] scaled [NQ1];   // alpha_p * k_r x

    logic signed [YW-1:0] sig [N + NSHARED];  // inputs, then shared two-terms

    for (genvar n = 0; n < N; n++) begin : g_in
      assign sig[n] = YW'(x[n]);
    end
    for (genvar k = 0; k < NSHARED; k++) begin : g_shared
      localparam node_t ND = CSE.nodes[k];
      if (ND.sub) begin : g_sub
        assign sig[N+k] = sig[int'(ND.a)] - (sig[int'(ND.b)] <<< ND.d);
      end else begin : g_add
        assign sig[N+k] = sig[int'(ND.a)] + (sig[int'(ND.b)] <<< ND.d);
      end
    end

    for (genvar r = 0; r < NB; r++) begin : g_basis
      logic signed [YW-1:0] bank_in [N];
      for (genvar t = 0; t < N; t++) begin : g_sel
        assign bank_in[t] = CSE.rows[r][t].nz ? sig[int'(CSE.rows[r][t].sig)] : '0;
      end
      pow2_adder_bank #(
        .T(N), .IW(YW), .OW(YW),
        .NZ(cse_nz(r)), .NEG(cse_neg(r)), .SH(cse_sh(r))
      ) u_bank (
        .in(bank_in), .y(basis[r])
      );
    end
    if (NB == 0) begin : g_no_basis
      assign basis[0] = '0;
    end

    if (!SHARE) begin : g_scale_csd
      // one CSD chain per (alpha_p, basis row) pair
      for (genvar q = 0; q < NQ; q++) begin : g_scale
        csd_const_mult #(
          .IW(YW), .OW(YW), .C(int'(ALPHA[PAIR_P[q]]))
        ) u_mult (
          .x(basis[int'(PAIR_R[q])]), .y(scaled[q])
        );
      end
    end else begin : g_scale_shared
      // basis outputs, then the two-terms shared between scaling constants
      logic signed [YW-1:0] ssig [NB1 + NSHARED_SH];
      for (genvar r = 0; r < NB1; r++) begin : g_in
        assign ssig[r] = basis[r];
      end
      for (genvar k = 0; k < NSHARED_SH; k++) begin : g_shared
        localparam node_t ND = SCH.nodes[k];
        if (ND.sub) begin : g_sub
          assign ssig[NB1+k] = ssig[int'(ND.a)] - (ssig[int'(ND.b)] <<< ND.d);
        end else begin : g_add
          assign ssig[NB1+k] = ssig[int'(ND.a)] + (ssig[int'(ND.b)] <<< ND.d);
        end
      end
      for (genvar q = 0; q < NQ; q++) begin : g_scale
        logic signed [YW-1:0] row_in [TS];
        for (genvar t = 0; t < TS; t++) begin : g_sel
          assign row_in[t] = SCH.rows[q][t].nz ? ssig[int'(SCH.rows[q][t].sig)] : '0;
        end
        pow2_adder_bank #(
          .T(TS), .IW(YW), .OW(YW),
          .NZ(sc_nz(SCH, q)), .NEG(sc_neg(SCH, q)), .SH(sc_sh(SCH, q))
        ) u_scale (
          .in(row_in), .y(scaled[q])
        );
      end
    end
    if (NQ == 0) begin : g_no_scale
      assign scaled[0] = '0;
    end

    for (genvar m = 0; m < M; m++) begin : g_row
      pow2_adder_bank #(
        .T(NQ1), .IW(YW), .OW(YW),
        .NZ(hrow_nz(m)), .NEG(hrow_neg(m)), .SH(hrow_sh(m))
      ) u_rowsum (
        .in(scaled), .y(y_comb[m])
      );
    end
  end else begin : g_vertical
    logic signed [YW-1:0] vscaled [N*NP1];  // alpha_p * x_n

    if (!SHARE) begin : g_scale_csd
      for (genvar n = 0; n < N; n++) begin : g_col
        for (genvar p = 0; p < NP1; p++) begin : g_alpha
          if (p < NP && col_uses(n, p)) begin : g_used
            csd_const_mult #(
              .IW(XW), .OW(YW), .C(int'(ALPHA[p]))
            ) u_mult (
              .x(x[n]), .y(vscaled[n*NP1+p])
            );
          end else begin : g_unused
            assign vscaled[n*NP1+p] = '0;
          end
        end
      end
    end else begin : g_scale_shared
      // inputs, then the two-terms shared between scaling constants
      logic signed [YW-1:0] ssig [N + NSHARED_SV];
      for (genvar n = 0; n < N; n++) begin : g_in
        assign ssig[n] = YW'(x[n]);
      end
      for (genvar k = 0; k < NSHARED_SV; k++) begin : g_shared
        localparam node_t ND = SCV.nodes[k];
        if (ND.sub) begin : g_sub
          assign ssig[N+k] = ssig[int'(ND.a)] - (ssig[int'(ND.b)] <<< ND.d);
        end else begin : g_add
          assign ssig[N+k] = ssig[int'(ND.a)] + (ssig[int'(ND.b)] <<< ND.d);
        end
      end
      for (genvar i = 0; i < N * NP1; i++) begin : g_scale
        logic signed [YW-1:0] row_in [TS];
        for (genvar t = 0; t < TS; t++) begin : g_sel
          assign row_in[t] = SCV.rows[i][t].nz ? ssig[int'(SCV.rows[i][t].sig)] : '0;
        end
        pow2_adder_bank #(
          .T(TS), .IW(YW), .OW(YW),
          .NZ(sc_nz(SCV, i)), .NEG(sc_neg(SCV, i)), .SH(sc_sh(SCV, i))
        ) u_scale (
          .in(row_in), .y(vscaled[i])
        );
      end
    end

    for (genvar m = 0; m < M; m++) begin : g_row
      pow2_adder_bank #(
        .T(N * NP1), .IW(YW), .OW(YW),
        .NZ(vrow_nz(m)), .NEG(vrow_neg(m)), .SH(vrow_sh(m))
      ) u_rowsum (
        .in(vscaled), .y(y_comb[m])
      );
    end
  end

  // ---------------------------------------------------------- output register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int m = 0; m < M; m++) y[m] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid)
        for (int m = 0; m < M; m++) y[m] <= y_comb[m];
    end
  end

endmodule
