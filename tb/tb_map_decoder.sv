// tb_map_decoder: self-checking test of the centre-to-top SISO decoder.
//
// For a number of random blocks the testbench encodes 40 random bits plus two
// termination bits with its own model of the RSC code, maps them to noisy
// quantised observations and random a priori values, and feeds the blocks to
// two decoders, one max-log-MAP and one log-MAP. A reference written here
// (plain full-length forward pass, full backward pass, then LL, using its
// own saturating arithmetic and its own max* with the correction formula)
// gives the expected LL and extrinsic value of every step. Checks:
//   * every LL and Le value of both decoders, bit exact;
//   * each step index is produced exactly once per block;
//   * timing: the first results leave 4 cycles after input cycle 21 and the
//     last 4 cycles after input cycle 41, i.e. a block takes 46 cycles;
//   * saturation of the metrics happens at least once (large a priori values
//     in some blocks).
module tb_map_decoder;
  localparam int K      = 6;
  localparam int STEPS  = 42;
  localparam int NBLK   = 40;
  localparam int PINF   = (1 << (K - 1)) - 1;
  localparam int MINF   = -PINF;
  localparam int QCODE  = 24;   // q = 0.75

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ------------------------------------------------------------- stimulus
  logic        in_valid = 1'b0, in_first = 1'b0;
  logic signed [K-1:0] f_sys, f_par, f_la, b_sys, b_par, b_la;
  logic        ov [2];
  logic [5:0]  ofi [2], obi [2];
  logic signed [K-1:0] ofle [2], oble [2], ofll [2], obll [2];

  map_decoder #(.LOG_MAP(1'b0)) dut0 (
    .clk, .rst_n, .q_code(8'(QCODE)), .in_valid, .in_first,
    .f_sys, .f_par, .f_la, .b_sys, .b_par, .b_la,
    .out_valid(ov[0]), .out_f_idx(ofi[0]), .out_b_idx(obi[0]),
    .out_f_le(ofle[0]), .out_b_le(oble[0]), .out_f_ll(ofll[0]), .out_b_ll(obll[0]));

  map_decoder #(.LOG_MAP(1'b1)) dut1 (
    .clk, .rst_n, .q_code(8'(QCODE)), .in_valid, .in_first,
    .f_sys, .f_par, .f_la, .b_sys, .b_par, .b_la,
    .out_valid(ov[1]), .out_f_idx(ofi[1]), .out_b_idx(obi[1]),
    .out_f_le(ofle[1]), .out_b_le(oble[1]), .out_f_ll(ofll[1]), .out_b_ll(obll[1]));

  // ----------------------------------------------------- reference model
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
  function automatic int corr(int d, bit logmap);
    real q;
    int  v;
    if (!logmap || d >= 8) return 0;
    q = real'(QCODE) / 32.0;
    v = int'($floor($ln(1.0 + $exp(-real'(d) * q)) / q));
    return v;
  endfunction
  function automatic int mstar(int a, int b, bit logmap);
    int m, d;
    m = (a > b) ? a : b;
    d = (a > b) ? a - b : b - a;
    return sat_add(m, corr(d, logmap));
  endfunction
  // RSC: state {r1,r2}; a = u^r1^r2; parity = a^r2; next = {a, r1}
  function automatic int nxt(int s, int u);
    int r1, r2, a;
    r1 = (s >> 1) & 1; r2 = s & 1; a = u ^ r1 ^ r2;
    return (a << 1) | r1;
  endfunction
  function automatic int par(int s, int u);
    int r1, r2;
    r1 = (s >> 1) & 1; r2 = s & 1;
    return (u ^ r1 ^ r2) ^ r2;
  endfunction
  function automatic int gam(int qs, int qp, int la, int u, int p);
    int t;
    t = (u == 0) ? sat_add(la, qs) : neg(qs);
    return (p == 0) ? sat_add(t, qp) : sat_sub(t, qp);
  endfunction

  int qs [STEPS], qp [STEPS], la [STEPS];
  int exp_ll [2][STEPS], exp_le [2][STEPS];
  int sat_events = 0;

  task automatic reference(bit logmap);
    int al [STEPS+1][4], be [STEPS+1][4];
    int nw [4], mx, t0, t1, t [2][4];
    for (int s = 0; s < 4; s++) begin
      al[0][s] = (s == 0) ? 0 : MINF;
      be[STEPS][s] = (s == 0) ? 0 : MINF;
    end
    for (int l = 0; l < STEPS; l++) begin
      for (int s = 0; s < 4; s++) nw[s] = -1000;
      for (int sp = 0; sp < 4; sp++)
        for (int u = 0; u < 2; u++) begin
          int c, ns;
          ns = nxt(sp, u);
          c  = sat_add(al[l][sp], gam(qs[l], qp[l], la[l], u, par(sp, u)));
          nw[ns] = (nw[ns] == -1000) ? c : mstar(nw[ns], c, logmap);
        end
      mx = nw[0];
      for (int s = 1; s < 4; s++) if (nw[s] > mx) mx = nw[s];
      for (int s = 0; s < 4; s++) al[l+1][s] = (nw[s] - mx < MINF) ? MINF : nw[s] - mx;
    end
    for (int l = STEPS - 1; l >= 0; l--) begin
      for (int sp = 0; sp < 4; sp++) begin
        t0 = sat_add(be[l+1][nxt(sp, 0)], gam(qs[l], qp[l], la[l], 0, par(sp, 0)));
        t1 = sat_add(be[l+1][nxt(sp, 1)], gam(qs[l], qp[l], la[l], 1, par(sp, 1)));
        nw[sp] = mstar(t0, t1, logmap);
      end
      mx = nw[0];
      for (int s = 1; s < 4; s++) if (nw[s] > mx) mx = nw[s];
      for (int s = 0; s < 4; s++) be[l][s] = (nw[s] - mx < MINF) ? MINF : nw[s] - mx;
    end
    for (int l = 0; l < STEPS; l++) begin
      int m0, m1, ll, e0, e1, te [2][4];
      for (int sp = 0; sp < 4; sp++)
        for (int u = 0; u < 2; u++) begin
          t[u][sp] = sat_add(sat_add(al[l][sp], gam(qs[l], qp[l], la[l], u, par(sp, u))),
                             be[l+1][nxt(sp, u)]);
          te[u][sp] = sat_add(sat_add(al[l][sp], (par(sp, u) != 0) ? neg(qp[l]) : qp[l]),
                              be[l+1][nxt(sp, u)]);
        end
      e0 = mstar(mstar(te[0][0], te[0][1], logmap), mstar(te[0][2], te[0][3], logmap), logmap);
      e1 = mstar(mstar(te[1][0], te[1][1], logmap), mstar(te[1][2], te[1][3], logmap), logmap);
      m0 = mstar(mstar(t[0][0], t[0][1], logmap), mstar(t[0][2], t[0][3], logmap), logmap);
      m1 = mstar(mstar(t[1][0], t[1][1], logmap), mstar(t[1][2], t[1][3], logmap), logmap);
      ll = sat_sub(m0, m1);
      if (ll == PINF || ll == MINF) sat_events++;
      exp_ll[logmap][l] = ll;
      exp_le[logmap][l] = sat_sub(e0, e1);
    end
  endtask

  function automatic int gauss(int sd10);  // approx N(0, (sd10/10)^2) * 1
    int acc = 0;
    for (int i = 0; i < 12; i++) acc += int'($urandom_range(0, 1000));
    return ((acc - 6000) * sd10) / 10000;
  endfunction

  function automatic int clamp(int v, int lim);
    return (v > lim) ? lim : ((v < -lim) ? -lim : v);
  endfunction

  // ------------------------------------------------------------ checking
  int seen [2][STEPS];
  int cyc = 0, c21_cycle = 0, last_out_cycle [2];
  int cur_blk = 0;
  always @(posedge clk) cyc <= cyc + 1;

  for (genvar gd = 0; gd < 2; gd++) begin : g_chk
    always @(posedge clk) begin
      if (ov[gd]) begin
        int fi, bi;
        fi = int'(ofi[gd]); bi = int'(obi[gd]);
        checks += 4;
        if (int'(ofll[gd]) != exp_ll[gd][fi] || int'(ofle[gd]) != exp_le[gd][fi]) begin
          failures++;
          $display("blk %0d dec%0d step %0d LL %0d/%0d Le %0d/%0d", cur_blk, gd, fi, ofll[gd], exp_ll[gd][fi],
                   ofle[gd], exp_le[gd][fi]);
        end
        if (int'(obll[gd]) != exp_ll[gd][bi] || int'(oble[gd]) != exp_le[gd][bi]) begin
          failures++;
          $display("dec%0d step %0d LL %0d/%0d Le %0d/%0d", gd, bi, obll[gd], exp_ll[gd][bi],
                   oble[gd], exp_le[gd][bi]);
        end
        if (fi + bi != STEPS - 1) failures++;
        seen[gd][fi]++;
        seen[gd][bi]++;
        last_out_cycle[gd] = cyc;
      end
    end
  end

  initial begin : main
    int bits [STEPS];
    int s, A, sd, lamax, first_out;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int blk = 0; blk < NBLK; blk++) begin
      // encode
      s = 0;
      for (int l = 0; l < STEPS; l++) begin
        bits[l] = (l < STEPS - 2) ? int'($urandom_range(0, 1)) : (((s >> 1) ^ s) & 1);
        A  = 8;
        sd = (blk % 4 == 0) ? 0 : 30 + 10 * (blk % 3);
        qs[l] = clamp(((bits[l] != 0) ? -A : A) + gauss(sd), PINF);
        qp[l] = clamp(((par(s, bits[l]) != 0) ? -A : A) + gauss(sd), PINF);
        lamax = (blk % 5 == 4) ? 31 : 12;
        la[l] = (l < STEPS - 2) ? int'($urandom_range(0, 2 * lamax)) - lamax : 0;
        s = nxt(s, bits[l]);
      end
      if (s != 0) begin failures++; $display("encoder not terminated"); end
      cur_blk = blk;
      reference(1'b0);
      reference(1'b1);
      for (int d = 0; d < 2; d++) for (int l = 0; l < STEPS; l++) seen[d][l] = 0;
      // feed
      for (int c = 0; c < STEPS; c++) begin
        @(negedge clk);
        in_valid = 1'b1; in_first = (c == 0);
        f_sys = K'(qs[c]); f_par = K'(qp[c]); f_la = K'(la[c]);
        b_sys = K'(qs[STEPS-1-c]); b_par = K'(qp[STEPS-1-c]); b_la = K'(la[STEPS-1-c]);
        if (c == 21) c21_cycle = cyc;
      end
      @(negedge clk);
      in_valid = 1'b0; in_first = 1'b0;
      repeat (6) @(negedge clk);
      for (int d = 0; d < 2; d++) begin
        for (int l = 0; l < STEPS; l++) begin
          checks++;
          if (seen[d][l] != 1) begin failures++; $display("dec%0d step %0d seen %0d", d, l, seen[d][l]); end
        end
        // last output sampled at the clock edge 4 cycles after input cycle 41
        checks++;
        if (last_out_cycle[d] - c21_cycle != 20 + 4) begin
          failures++;
          $display("timing: last output %0d cycles after input cycle 21", last_out_cycle[d] - c21_cycle);
        end
      end
      first_out = 0;
    end
    checks++;
    if (sat_events == 0) begin failures++; $display("saturation never exercised"); end
    $display("saturation events in LL: %0d", sat_events);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
