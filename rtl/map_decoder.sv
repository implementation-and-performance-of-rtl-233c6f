// map_decoder: soft-in soft-out BCJR decoder for one terminated block of
// STEPS = 42 trellis steps (40 information bits + 2 termination bits) of the
// 4-state RSC code, using the centre-to-top (CTT) schedule and the pipelined
// "Architecture-B" datapath.
//
// Schedule (CTT). The forward (alpha) and backward (beta) recursions run at
// the same time, one trellis step each per cycle. Input cycle c (0..41)
// delivers the observations of step c for the forward recursion and of step
// 41-c for the backward one. During the first HALF = 21 cycles only the node
// metrics are computed and alpha_0..alpha_20 and beta_42..beta_22 are stored
// in two small memories (one word of 4 metrics per step). From cycle 21 on
// both recursions meet the stored metrics of the other half: each cycle gives
// LL(u_c) (forward side: live alpha_c, stored beta_{c+1}) and LL(u_{41-c})
// (backward side: stored alpha_{41-c}, live beta_{42-c}). Both stored values
// sit at the same address 41-c, so each memory needs one read per cycle, and
// only half of the metrics are ever stored.
//
// Arithmetic. Branch metric for input bit u, parity bit p (x = 1 - 2b):
//   gamma = [u = 0]*La (+) x_u*Qs (+) x_p*Qp
// which is the usual La*u/2 + Lc/2 y.v shifted by a constant per step. All
// additions are the saturating clipsum (+) / clipsub (-) of turbo_pkg. After
// each recursion step the largest new metric is subtracted from all four
// (normalisation, a plain difference limited at -inf: normsub), so the best
// state always holds exactly 0, even when it had saturated at +inf. The initial and final
// states are 0 (trellis termination):
//   alpha_0 = beta_42 = {0, -inf, -inf, -inf}.
// LL(u) = max*_{u=0}(alpha (+) gamma (+) beta) (-) max*_{u=1}(...). The
// extrinsic value Le = LL - La - 2*Qs is formed the same way with the parity
// part x_p*Qp of gamma only, Le = max*_{u=0}(alpha (+) x_p*Qp (+) beta) (-)
// max*_{u=1}(...), which is equal in exact arithmetic (La + 2*Qs is common to
// all u = 0 terms). Subtracting La from a saturated LL instead would flip
// the sign: with the clipsum rules -inf (-) -inf = -inf (+) +inf = +inf.
//
// Pipeline (Architecture-B), four register stages after the input cycle:
// (1) branch metrics, recursion and normalisation, with the metric memory
// read; (2) the three-term sums and the max* trees of LL and Le; (3) the
// final differences LL and Le; (4) the output register. The published split
// has a separate extrinsic cycle after LL; here Le is formed in parallel
// with LL (see above), which keeps the same 4-cycle latency. An output pair
// therefore leaves 4 cycles after its input cycle, and a block of 42 steps
// occupies the
// decoder for 46 cycles. Input cycles must be consecutive.
//
// Interface
//   in_valid/in_first: in_first marks input cycle 0 and restarts the block;
//                      in_valid must then stay high for STEPS cycles.
//   f_*: observations and a priori value for step c; b_*: for step 41-c.
//   out_valid with out_f_idx/out_b_idx: the step indices of the two results.
//   q_code: quantisation step for the log-MAP correction table (unused when
//           LOG_MAP = 0).
// The algorithm, schedule and pipeline split follow the published design; the
// exact branch metric form, the parity-only Le and the handshake are this
// design's choices.
module map_decoder
  import turbo_pkg::*;
#(
  parameter bit LOG_MAP = 1'b0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] q_code,
  input  logic       in_valid,
  input  logic       in_first,
  input  metric_t    f_sys, f_par, f_la,
  input  metric_t    b_sys, b_par, b_la,
  output logic       out_valid,
  output step_t      out_f_idx, out_b_idx,
  output metric_t    out_f_le, out_b_le,
  output metric_t    out_f_ll, out_b_ll
);

  typedef metric_t gam_t [2][2];   // [u][p]

  function automatic gam_t branch(metric_t qs, metric_t qp, metric_t la);
    gam_t g;
    g[0][0] = clipsum(clipsum(la, qs), qp);
    g[0][1] = clipsub(clipsum(la, qs), qp);
    g[1][0] = clipsum(cneg(qs), qp);
    g[1][1] = clipsub(cneg(qs), qp);
    return g;
  endfunction

  // ------------------------------------------------------------- stage 0
  localparam int CW = $clog2(STEPS);
  localparam int HW = $clog2(HALF);
  logic [CW-1:0] cnt;
  logic          run;             // within a block (after in_first)
  metric_vec_t   alpha_q, beta_q;
  metric_vec_t   alpha_cur, beta_cur;
  gam_t          gf, gb;
  metric_t       a_new [NSTATE], b_new [NSTATE];
  metric_t       a_nrm [NSTATE], b_nrm [NSTATE];
  metric_t       a_max, b_max;
  logic [CW-1:0] c_now;

  assign c_now = in_first ? '0 : cnt;

  always_comb begin
    for (int s = 0; s < NSTATE; s++) begin
      alpha_cur[s] = in_first ? ((s == 0) ? metric_t'(0) : MINUS_INF) : alpha_q[s];
      beta_cur[s]  = in_first ? ((s == 0) ? metric_t'(0) : MINUS_INF) : beta_q[s];
    end
    gf = branch(f_sys, f_par, f_la);
    gb = branch(b_sys, b_par, b_la);
  end

  // Recursions: each new state has two predecessors, each old state two
  // successors; a max* unit per state and direction.
  for (genvar gs = 0; gs < NSTATE; gs++) begin : g_rec
    // forward: predecessors {s[0], r} with input u = s[1]^s[0]^r
    localparam logic [1:0] S   = 2'(gs);
    localparam logic [1:0] PA0 = {S[0], 1'b0};
    localparam logic [1:0] PA1 = {S[0], 1'b1};
    localparam logic       UA0 = S[1] ^ S[0];
    localparam logic       UA1 = S[1] ^ S[0] ^ 1'b1;
    localparam logic       PPA0 = rsc_par(PA0, UA0);
    localparam logic       PPA1 = rsc_par(PA1, UA1);
    // backward: successors for u = 0 and u = 1
    localparam logic [1:0] NB0 = rsc_next(S, 1'b0);
    localparam logic [1:0] NB1 = rsc_next(S, 1'b1);
    localparam logic       PB0 = rsc_par(S, 1'b0);
    localparam logic       PB1 = rsc_par(S, 1'b1);

    metric_t ca0, ca1, cb0, cb1;
    assign ca0 = clipsum(alpha_cur[PA0], gf[UA0][PPA0]);
    assign ca1 = clipsum(alpha_cur[PA1], gf[UA1][PPA1]);
    assign cb0 = clipsum(beta_cur[NB0], gb[0][PB0]);
    assign cb1 = clipsum(beta_cur[NB1], gb[1][PB1]);

    maxstar #(.LOG_MAP(LOG_MAP)) u_ma (.a(ca0), .b(ca1), .q_code(q_code), .y(a_new[gs]));
    maxstar #(.LOG_MAP(LOG_MAP)) u_mb (.a(cb0), .b(cb1), .q_code(q_code), .y(b_new[gs]));
  end

  // Normalisation to the largest state metric.
  always_comb begin
    a_max = mmax(mmax(a_new[0], a_new[1]), mmax(a_new[2], a_new[3]));
    b_max = mmax(mmax(b_new[0], b_new[1]), mmax(b_new[2], b_new[3]));
    for (int s = 0; s < NSTATE; s++) begin
      a_nrm[s] = normsub(a_new[s], a_max);
      b_nrm[s] = normsub(b_new[s], b_max);
    end
  end

  // Metric memories of the first half (alpha_c and beta_{42-c} at address c).
  metric_vec_t amem [HALF];
  metric_vec_t bmem [HALF];
  metric_vec_t am_rd, bm_rd;
  logic        phase2;
  assign phase2 = (c_now >= CW'(HALF));

  always_ff @(posedge clk) begin
    if (in_valid) begin
      alpha_q <= a_nrm;
      beta_q  <= b_nrm;
      if (!phase2) begin
        amem[HW'(c_now)] <= alpha_cur;
        bmem[HW'(c_now)] <= beta_cur;
      end else begin
        am_rd <= amem[HW'(CW'(STEPS - 1) - c_now)];
        bm_rd <= bmem[HW'(CW'(STEPS - 1) - c_now)];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      run <= 1'b0;
    end else if (in_valid) begin
      if (c_now == CW'(STEPS - 1)) begin
        cnt <= '0;
        run <= 1'b0;
      end else begin
        cnt <= c_now + 1'b1;
        run <= 1'b1;
      end
    end
  end

  // Stage 1 input registers.
  logic        v1;
  step_t       fi1, bi1;
  metric_vec_t alpha1, beta1;
  gam_t        gf1, gb1;
  metric_t     qpf1, qpb1;

  always_ff @(posedge clk) begin
    alpha1 <= alpha_cur;
    beta1  <= beta_cur;
    gf1    <= gf;
    gb1    <= gb;
    qpf1   <= f_par;
    qpb1   <= b_par;
    fi1    <= step_t'(c_now);
    bi1    <= step_t'(CW'(STEPS - 1) - c_now);
  end

  // ------------------------------------------------------------- stage 1
  // Sums alpha (+) gamma (+) beta per transition, max* over u = 0 / u = 1.
  // The same sums with the parity part of gamma only give Le.
  metric_t tf [2][NSTATE], tb [2][NSTATE];   // [u][s']
  metric_t ef [2][NSTATE], eb [2][NSTATE];
  always_comb begin
    for (int s = 0; s < NSTATE; s++) begin
      for (int u = 0; u < 2; u++) begin
        logic [1:0] sp, ns;
        logic       p;
        sp = 2'(s);
        ns = rsc_next(sp, u[0]);
        p  = rsc_par(sp, u[0]);
        tf[u][s] = clipsum(clipsum(alpha1[s], gf1[u][p]), bm_rd[ns]);
        tb[u][s] = clipsum(clipsum(am_rd[s], gb1[u][p]), beta1[ns]);
        ef[u][s] = clipsum(clipsum(alpha1[s], p ? cneg(qpf1) : qpf1), bm_rd[ns]);
        eb[u][s] = clipsum(clipsum(am_rd[s], p ? cneg(qpb1) : qpb1), beta1[ns]);
      end
    end
  end

  metric_t mf [2], mb [2], nf [2], nb [2];
  for (genvar gu = 0; gu < 2; gu++) begin : g_ll
    metric_t f01, f23, b01, b23, e01, e23, c01, c23;
    maxstar #(.LOG_MAP(LOG_MAP)) u_f0 (.a(tf[gu][0]), .b(tf[gu][1]), .q_code(q_code), .y(f01));
    maxstar #(.LOG_MAP(LOG_MAP)) u_f1 (.a(tf[gu][2]), .b(tf[gu][3]), .q_code(q_code), .y(f23));
    maxstar #(.LOG_MAP(LOG_MAP)) u_f2 (.a(f01),       .b(f23),       .q_code(q_code), .y(mf[gu]));
    maxstar #(.LOG_MAP(LOG_MAP)) u_b0 (.a(tb[gu][0]), .b(tb[gu][1]), .q_code(q_code), .y(b01));
    maxstar #(.LOG_MAP(LOG_MAP)) u_b1 (.a(tb[gu][2]), .b(tb[gu][3]), .q_code(q_code), .y(b23));
    maxstar #(.LOG_MAP(LOG_MAP)) u_b2 (.a(b01),       .b(b23),       .q_code(q_code), .y(mb[gu]));
    maxstar #(.LOG_MAP(LOG_MAP)) u_e0 (.a(ef[gu][0]), .b(ef[gu][1]), .q_code(q_code), .y(e01));
    maxstar #(.LOG_MAP(LOG_MAP)) u_e1 (.a(ef[gu][2]), .b(ef[gu][3]), .q_code(q_code), .y(e23));
    maxstar #(.LOG_MAP(LOG_MAP)) u_e2 (.a(e01),       .b(e23),       .q_code(q_code), .y(nf[gu]));
    maxstar #(.LOG_MAP(LOG_MAP)) u_c0 (.a(eb[gu][0]), .b(eb[gu][1]), .q_code(q_code), .y(c01));
    maxstar #(.LOG_MAP(LOG_MAP)) u_c1 (.a(eb[gu][2]), .b(eb[gu][3]), .q_code(q_code), .y(c23));
    maxstar #(.LOG_MAP(LOG_MAP)) u_c2 (.a(c01),       .b(c23),       .q_code(q_code), .y(nb[gu]));
  end

  // Stage 2..4 registers.
  logic    v2, v3, v4;
  step_t   fi2, bi2, fi3, bi3;
  metric_t mf2 [2], mb2 [2], nf2 [2], nb2 [2];
  metric_t llf3, llb3, lef3, leb3;

  always_ff @(posedge clk) begin
    // stage 1 -> 2
    mf2  <= mf;   mb2  <= mb;
    nf2  <= nf;   nb2  <= nb;
    fi2  <= fi1;  bi2  <= bi1;
    // stage 2 -> 3: LL
    llf3 <= clipsub(mf2[0], mf2[1]);
    llb3 <= clipsub(mb2[0], mb2[1]);
    lef3 <= clipsub(nf2[0], nf2[1]);
    leb3 <= clipsub(nb2[0], nb2[1]);
    fi3  <= fi2;  bi3  <= bi2;
    // stage 3 -> 4: extrinsic value, output register
    out_f_le  <= lef3;
    out_b_le  <= leb3;
    out_f_ll  <= llf3;
    out_b_ll  <= llb3;
    out_f_idx <= fi3;
    out_b_idx <= bi3;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; v3 <= 1'b0; v4 <= 1'b0;
    end else begin
      v1 <= in_valid && phase2;
      v2 <= v1;
      v3 <= v2;
      v4 <= v3;
    end
  end
  assign out_valid = v4;

  // The block must be fed without gaps once started.
  a_no_gap: assert property (@(posedge clk) disable iff (!rst_n)
                             run |-> in_valid);

endmodule
