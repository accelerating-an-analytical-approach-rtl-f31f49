// cdo_ref_pkg: reference model for the CDO core testbenches.
//
// It computes the pool loss distribution as a dense table indexed by loss,
// P_k[l] = P_{k-1}[l]*(1-pi_k) + P_{k-1}[l-N_k]*pi_k, with each product
// rounded to nearest at FRAC_W fractional bits as the hardware does. A loss whose
// probability is zero in the table is a point the hardware never stores, so
// the table's nonzero entries must equal the hardware's points exactly. It
// also gives the expected tranche loss, min(S, max(l-A, 0)) weighted by P,
// the scenario weighting, and a small random number generator. Alongside,
// it keeps the same sums in double precision without rounding, so that
// tests can measure the hardware's numerical error.
package cdo_ref_pkg;
  import cdo_pkg::*;

  typedef longint unsigned dist_t[];
  typedef real dist_real_t[];

  function automatic longint unsigned tmul(longint unsigned a, longint unsigned b);
    return (a * b + (64'(1) << (FRAC_W - 1))) >> FRAC_W;
  endfunction

  // Add one instrument to a dense distribution.
  function automatic dist_t add_instr(dist_t d, int unsigned n, longint unsigned pd);
    dist_t r;
    longint unsigned p0;
    p0 = longint'(PROB_ONE) - pd;
    r = new[d.size() + n];
    foreach (r[l]) begin
      r[l] = 0;
      if (l < d.size()) r[l] += tmul(d[l], p0);
      if (l >= n && (l - n) < d.size()) r[l] += tmul(d[l - n], pd);
    end
    return r;
  endfunction

  function automatic dist_t empty_pool();
    dist_t d;
    d = new[1];
    d[0] = longint'(PROB_ONE);
    return d;
  endfunction

  // Number of output decisions the FIFO algorithm makes when adding an
  // instrument of notional n: every loss that either branch can reach.
  function automatic int unsigned candidates(dist_t d, int unsigned n);
    int unsigned c;
    c = 0;
    for (int l = 0; l < d.size() + n; l++) begin
      if ((l < d.size() && d[l] != 0) || (l >= n && (l - n) < d.size() && d[l - n] != 0)) c++;
    end
    return c;
  endfunction

  function automatic int unsigned nonzero(dist_t d);
    int unsigned c;
    c = 0;
    foreach (d[l]) if (d[l] != 0) c++;
    return c;
  endfunction

  function automatic longint unsigned tranche_loss(dist_t d, int unsigned a, int unsigned s);
    longint unsigned acc;
    longint unsigned x;
    acc = 0;
    foreach (d[l]) begin
      x = (l > int'(a)) ? longint'(l) - longint'(a) : 0;
      if (x > s) x = s;
      acc += x * d[l];
    end
    return acc;
  endfunction

  // The same two steps without rounding, in double precision.
  function automatic dist_real_t add_instr_real(dist_real_t d, int unsigned n, real pd);
    dist_real_t r;
    r = new[d.size() + n];
    foreach (r[l]) begin
      r[l] = 0.0;
      if (l < d.size()) r[l] += d[l] * (1.0 - pd);
      if (l >= n && (l - n) < d.size()) r[l] += d[l - n] * pd;
    end
    return r;
  endfunction

  function automatic real tranche_loss_real(dist_real_t d, int unsigned a, int unsigned s);
    real acc, x;
    acc = 0.0;
    foreach (d[l]) begin
      x = (l > int'(a)) ? real'(l - int'(a)) : 0.0;
      if (x > real'(s)) x = real'(s);
      acc += x * d[l];
    end
    return acc;
  endfunction

  function automatic longint unsigned weigh(longint unsigned loss, longint unsigned w);
    // loss < 2^40, w <= 2^24: the product fits in 64 bits
    return (loss * w) >> FRAC_W;
  endfunction

  // xorshift32, so that data does not depend on the simulator's $urandom
  function automatic int unsigned rng(ref int unsigned s);
    s ^= s << 13;
    s ^= s >> 17;
    s ^= s << 5;
    return s;
  endfunction

  // Build the host words for one time step and the words the core must
  // return, and in exact[] the weighted tranche totals in double precision
  // without rounding (loss units), for measuring numerical error.
  // Tranche t covers [A_t, A_t + S_t): the tranches tile the range from 0
  // up to about the pool's mean loss. Default probabilities are uniform in [0, 1]
  // and notionals uniform in [1, maxn], as in the document's test data.
  function automatic void make_step(ref int unsigned seed, input int nt, input int nscen,
                                    input int ninstr, input int maxn,
                                    ref word_t prog[$], ref word_t result[$],
                                    ref longint unsigned cand_cycles, ref real exact[]);
    longint unsigned tot[];
    int unsigned a[], sz[];
    int span;
    exact = new[nt];
    foreach (exact[t]) exact[t] = 0.0;
    tot = new[nt];
    a   = new[nt];
    sz  = new[nt];
    span = (ninstr * (maxn + 1)) / (2 * nt) + 1;
    for (int t = 0; t < nt; t++) begin
      a[t]  = t * span + (rng(seed) % 3);
      sz[t] = span + (rng(seed) % 3);
      tot[t] = 0;
      prog.push_back(make_word(OP_ATTACH, 1'b0, 5'(t), 25'(a[t])));
      prog.push_back(make_word(OP_SIZE,   1'b0, 5'(t), 25'(sz[t])));
    end
    for (int sc = 0; sc < nscen; sc++) begin
      dist_t d;
      real   dr[];
      longint unsigned w;
      w = rng(seed) % (longint'(PROB_ONE) + 1);
      prog.push_back(make_word(OP_WEIGHT, sc == nscen - 1, 5'd0, 25'(w)));
      d = empty_pool();
      dr = new[1];
      dr[0] = 1.0;
      for (int k = 0; k < ninstr; k++) begin
        int unsigned n;
        longint unsigned pd;
        n  = 1 + rng(seed) % maxn;
        pd = rng(seed) % (longint'(PROB_ONE) + 1);
        prog.push_back(make_word(OP_NOTIONAL, 1'b0, 5'd0, 25'(n)));
        prog.push_back(make_word(OP_PROB, k == ninstr - 1, 5'd0, 25'(pd)));
        cand_cycles += candidates(d, n);
        d = add_instr(d, n, pd);
        dr = add_instr_real(dr, n, real'(pd) / real'(PROB_ONE));
      end
      for (int t = 0; t < nt; t++) begin
        tot[t] += weigh(tranche_loss(d, a[t], sz[t]), w);
        exact[t] += tranche_loss_real(dr, a[t], sz[t]) * real'(w) / real'(PROB_ONE);
      end
    end
    for (int t = 0; t < nt; t++) begin
      result.push_back(tot[t][63:32]);
      result.push_back(tot[t][31:0]);
    end
  endfunction

endpackage
