// turbo_ref_pkg: behavioural reference of the parallel decodable turbo code
// used by the testbenches: RSC encoder, the bank interleaver mapping,
// the observation quantiser and a plain (not centre-to-top) fixed-point BCJR
// decoder with the same saturating arithmetic as the hardware, plus the
// two-cluster iterative decoder. Everything is written with ints, loops and
// full forward/backward passes, independently of the RTL structure.
package turbo_ref_pkg;
  localparam int NB    = 4;
  localparam int INFO  = 40;
  localparam int ST    = 42;
  localparam int KBITS = 6;
  localparam int PINF  = (1 << (KBITS - 1)) - 1;
  localparam int MINF  = -PINF;

  typedef int vec_t [ST];
  typedef int obs_d_t [NB][ST+2];
  typedef int obs_p_t [NB][ST];
  typedef int nat_t [NB][INFO];

  function automatic int sat_add(int a, int b);
    if (a >= PINF || b >= PINF) return PINF;
    if (a <= MINF || b <= MINF) return MINF;
    if (a + b >= PINF) return PINF;
    if (a + b <= MINF) return MINF;
    return a + b;
  endfunction
  function automatic int neg(int a);
    return (a <= MINF) ? PINF : -a;
  endfunction
  function automatic int sat_sub(int a, int b);
    return sat_add(a, neg(b));
  endfunction
  function automatic int corr(int d, int q_code, bit logmap);
    real q;
    if (!logmap || d >= 8) return 0;
    q = (q_code == 0) ? 1.0 / 32.0 : real'(q_code) / 32.0;
    return int'($floor($ln(1.0 + $exp(-real'(d) * q)) / q));
  endfunction
  function automatic int mstar(int a, int b, int q_code, bit logmap);
    int m, d;
    m = (a > b) ? a : b;
    d = (a > b) ? a - b : b - a;
    return sat_add(m, corr(d, q_code, logmap));
  endfunction
  function automatic int nxt(int s, int u);
    int r1, r2;
    r1 = (s >> 1) & 1; r2 = s & 1;
    return ((u ^ r1 ^ r2) << 1) | r1;
  endfunction
  function automatic int par(int s, int u);
    int r1, r2;
    r1 = (s >> 1) & 1; r2 = s & 1;
    return u ^ r1;
  endfunction
  function automatic int gam(int qs, int qp, int la, int u, int p);
    int t;
    t = (u == 0) ? sat_add(la, qs) : neg(qs);
    return (p == 0) ? sat_add(t, qp) : sat_sub(t, qp);
  endfunction

  // Interleaver: lower sequence j, step t -> bank (j+t)%NB, address pi(b,t)
  function automatic int il_bank(int j, int t);
    return (j + t) % NB;
  endfunction
  function automatic int il_addr(int j, int t);
    return int'(turbo_pkg::pi_of(il_bank(j, t), t));
  endfunction

  // One terminated block, full forward and backward recursions.
  task automatic bcjr(input vec_t qs, input vec_t qp, input vec_t la,
                      input int q_code, input bit logmap,
                      output vec_t ll, output vec_t le);
    int al [ST+1][4], be [ST+1][4];
    int nw [4], mx, t0, t1, t [2][4];
    for (int s = 0; s < 4; s++) begin
      al[0][s]  = (s == 0) ? 0 : MINF;
      be[ST][s] = (s == 0) ? 0 : MINF;
    end
    for (int l = 0; l < ST; l++) begin
      for (int s = 0; s < 4; s++) nw[s] = -1000;
      for (int sp = 0; sp < 4; sp++)
        for (int u = 0; u < 2; u++) begin
          int c, ns;
          ns = nxt(sp, u);
          c  = sat_add(al[l][sp], gam(qs[l], qp[l], la[l], u, par(sp, u)));
          nw[ns] = (nw[ns] == -1000) ? c : mstar(nw[ns], c, q_code, logmap);
        end
      mx = nw[0];
      for (int s = 1; s < 4; s++) if (nw[s] > mx) mx = nw[s];
      for (int s = 0; s < 4; s++) al[l+1][s] = (nw[s] - mx < MINF) ? MINF : nw[s] - mx;
    end
    for (int l = ST - 1; l >= 0; l--) begin
      for (int sp = 0; sp < 4; sp++) begin
        t0 = sat_add(be[l+1][nxt(sp, 0)], gam(qs[l], qp[l], la[l], 0, par(sp, 0)));
        t1 = sat_add(be[l+1][nxt(sp, 1)], gam(qs[l], qp[l], la[l], 1, par(sp, 1)));
        nw[sp] = mstar(t0, t1, q_code, logmap);
      end
      mx = nw[0];
      for (int s = 1; s < 4; s++) if (nw[s] > mx) mx = nw[s];
      for (int s = 0; s < 4; s++) be[l][s] = (nw[s] - mx < MINF) ? MINF : nw[s] - mx;
    end
    for (int l = 0; l < ST; l++) begin
      int m0, m1, e0, e1, te [2][4];
      for (int sp = 0; sp < 4; sp++)
        for (int u = 0; u < 2; u++) begin
          t[u][sp] = sat_add(sat_add(al[l][sp], gam(qs[l], qp[l], la[l], u, par(sp, u))),
                             be[l+1][nxt(sp, u)]);
          te[u][sp] = sat_add(sat_add(al[l][sp], (par(sp, u) != 0) ? neg(qp[l]) : qp[l]),
                              be[l+1][nxt(sp, u)]);
        end
      e0 = mstar(mstar(te[0][0], te[0][1], q_code, logmap),
                 mstar(te[0][2], te[0][3], q_code, logmap), q_code, logmap);
      e1 = mstar(mstar(te[1][0], te[1][1], q_code, logmap),
                 mstar(te[1][2], te[1][3], q_code, logmap), q_code, logmap);
      m0 = mstar(mstar(t[0][0], t[0][1], q_code, logmap),
                 mstar(t[0][2], t[0][3], q_code, logmap), q_code, logmap);
      m1 = mstar(mstar(t[1][0], t[1][1], q_code, logmap),
                 mstar(t[1][2], t[1][3], q_code, logmap), q_code, logmap);
      ll[l] = sat_sub(m0, m1);
      le[l] = sat_sub(e0, e1);   // parity-only terms: LL - La - 2Qs
    end
  endtask

  // Iterative decoding of a packet; returns the final LL in natural order.
  task automatic turbo_decode(input obs_d_t d, input obs_p_t p1, input obs_p_t p2,
                              input int iters, input int q_code, input bit logmap,
                              output nat_t llo);
    nat_t la_n, le_n;
    vec_t qs, qp, la, ll, le;
    for (int j = 0; j < NB; j++) for (int t = 0; t < INFO; t++) la_n[j][t] = 0;
    for (int it = 0; it < iters; it++) begin
      for (int j = 0; j < NB; j++) begin
        for (int l = 0; l < ST; l++) begin
          qs[l] = d[j][l]; qp[l] = p1[j][l];
          la[l] = (l < INFO) ? la_n[j][l] : 0;
        end
        bcjr(qs, qp, la, q_code, logmap, ll, le);
        for (int l = 0; l < INFO; l++) begin le_n[j][l] = le[l]; llo[j][l] = ll[l]; end
      end
      for (int j = 0; j < NB; j++) begin
        for (int l = 0; l < ST; l++) begin
          qp[l] = p2[j][l];
          if (l < INFO) begin
            qs[l] = d[il_bank(j, l)][il_addr(j, l)];
            la[l] = le_n[il_bank(j, l)][il_addr(j, l)];
          end else begin
            qs[l] = d[j][l + 2];
            la[l] = 0;
          end
        end
        bcjr(qs, qp, la, q_code, logmap, ll, le);
        for (int l = 0; l < INFO; l++) begin
          la_n[il_bank(j, l)][il_addr(j, l)] = le[l];
          llo[il_bank(j, l)][il_addr(j, l)]  = ll[l];
        end
      end
    end
  endtask

  // Approximately Gaussian integer noise with standard deviation sd.
  function automatic int gauss(int sd);
    longint acc = 0;
    for (int i = 0; i < 12; i++) acc += longint'($urandom_range(0, 4095));
    return int'(((acc - 12 * 4095 / 2) * sd) / 4096);
  endfunction

  // Quantiser model: floor(y * floor(nm*2^10/max) / 2^10), limited to +-nm
  function automatic int quant(int y, int nm, int mx);
    longint sc, pr;
    int q;
    sc = (mx == 0) ? 0 : (longint'(nm) * 1024) / longint'(mx);
    pr = longint'(y) * sc;
    q  = int'(pr >>> 10);
    if (q > nm) q = nm;
    if (q < -nm) q = -nm;
    return q;
  endfunction
endpackage
