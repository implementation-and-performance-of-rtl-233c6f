// turbo_pkg: types, constants and arithmetic shared by the parallel decodable
// turbo code (PDTC) encoder and decoder.
//
// Contents
//   * Block sizes: N_DEC parallel component decoders per cluster, each handling
//     INFO_LEN information bits plus TAIL termination bits (STEPS trellis steps).
//   * metric_t: a K-bit signed metric. All probabilities of the decoder (channel
//     observations, branch/node metrics, a priori, extrinsic and a posteriori
//     values) share this one width and quantisation step.
//   * clipsum / clipsub: saturating addition/subtraction closed over the
//     symmetric set [-(2^(K-1)-1), 2^(K-1)-1] (plus_inf / minus_inf).
//   * The 4-state recursive systematic convolutional (RSC) trellis used by
//     both constituent encoders, feedback 1+D+D^2 and feedforward 1+D^2
//     (octal 7/5). The constituent code is this design's choice; the sizes
//     (2 termination bits, i.e. memory 2) follow the published design.
//   * The bank interleaver tables PI[b][t]: four S-random permutations of
//     length 40 with spread S = 5, one per memory bank. They were drawn once at
//     random with the usual S-random rule (each new entry differs by more than
//     S from each of the previous S entries) and are fixed constants here.
//
// Bit/sign conventions: bit b is sent as x = 1 - 2b (bit 0 -> +1). A metric
// L = ln P(b=0)/P(b=1), so L > 0 decides bit 0.
// S_RANDOM records the spread of the fixed tables; no circuit uses it, so
// lint reports it unused.
package turbo_pkg;

  // ---------------------------------------------------------------- sizes
  parameter int N_DEC    = 4;                 // decoders per cluster
  parameter int INFO_LEN = 40;                // information bits per decoder
  parameter int TAIL     = 2;                 // termination bits (RSC memory)
  parameter int STEPS    = INFO_LEN + TAIL;   // trellis steps per decoder
  parameter int HALF     = STEPS / 2;         // centre of the block
  parameter int K        = 6;                 // metric width in bits
  parameter int NSTATE   = 4;                 // RSC states
  parameter int ITER     = 4;                 // decoding iterations
  parameter int S_RANDOM = 5;                 // spread of the bank interleavers

  // Observation memory layout per bank: d holds 40 info + 2 upper tail
  // systematic values + 2 lower tail systematic values.
  parameter int D_DEPTH  = STEPS + TAIL;      // 44
  parameter int P_DEPTH  = STEPS;             // 42
  parameter int PKT_LEN  = N_DEC * (D_DEPTH + 2 * P_DEPTH); // 512 symbols

  localparam int BANK_W  = $clog2(N_DEC);
  localparam int STEP_W  = $clog2(STEPS + TAIL);
  localparam int PI_W    = $clog2(INFO_LEN);

  typedef logic signed [K-1:0]  metric_t;
  typedef logic [BANK_W-1:0]    bank_t;
  typedef logic [STEP_W-1:0]    step_t;
  typedef metric_t              metric_vec_t [NSTATE];

  localparam metric_t PLUS_INF  = metric_t'((1 <<< (K - 1)) - 1);
  localparam metric_t MINUS_INF = metric_t'(-((1 <<< (K - 1)) - 1));

  // Observation kinds, used for addressing the observation memories.
  typedef enum logic [1:0] {OBS_D = 2'd0, OBS_P1 = 2'd1, OBS_P2 = 2'd2} obs_kind_e;

  // ------------------------------------------------- saturating arithmetic
  // clipsum: saturate when an operand is already at an infinity, otherwise
  // add and saturate the result to the symmetric range.
  function automatic metric_t clipsum(metric_t a, metric_t b);
    logic signed [K:0] s;
    logic signed [K:0] pinf, minf;
    s    = (K+1)'(a) + (K+1)'(b);
    pinf = (K+1)'(PLUS_INF);
    minf = (K+1)'(MINUS_INF);
    if (a >= PLUS_INF || b >= PLUS_INF)        return PLUS_INF;
    else if (a <= MINUS_INF || b <= MINUS_INF) return MINUS_INF;
    else if (s >= pinf)                        return PLUS_INF;
    else if (s <= minf)                        return MINUS_INF;
    else                                       return s[K-1:0];
  endfunction

  // Negation inside the symmetric set (the most negative code never occurs
  // as a result of clipsum, but an input word could hold it).
  function automatic metric_t cneg(metric_t a);
    if (a <= MINUS_INF) return PLUS_INF;
    return -a;
  endfunction

  // clipsubtract: a (-) b = a (+) (-b)
  function automatic metric_t clipsub(metric_t a, metric_t b);
    return clipsum(a, cneg(b));
  endfunction

  // Node metric normalisation: the plain difference a - m, limited below at
  // minus_inf. Applied with m = the largest of the new metrics, so the best
  // state always becomes exactly 0, also when m itself is saturated.
  function automatic metric_t normsub(metric_t a, metric_t m);
    logic signed [K:0] d;
    d = (K+1)'(a) - (K+1)'(m);
    if (d <= (K+1)'(MINUS_INF)) return MINUS_INF;
    return d[K-1:0];
  endfunction

  function automatic metric_t mmax(metric_t a, metric_t b);
    return (a > b) ? a : b;
  endfunction

  // ------------------------------------------------------------ RSC trellis
  // State s = {r1, r2}: r1 is the newest register bit. For input bit u the
  // feedback is a = u ^ r1 ^ r2, the parity p = a ^ r2, next state {a, r1}.
  function automatic logic [1:0] rsc_next(logic [1:0] s, logic u);
    logic a;
    a = u ^ s[1] ^ s[0];
    return {a, s[1]};
  endfunction

  function automatic logic rsc_par(logic [1:0] s, logic u);
    logic a;
    a = u ^ s[1] ^ s[0];
    return a ^ s[0];
  endfunction

  // Input bit that drives the feedback to zero (used for termination).
  function automatic logic rsc_term_bit(logic [1:0] s);
    return s[1] ^ s[0];
  endfunction

  // ------------------------------------------------------ bank interleavers
  typedef logic [PI_W-1:0] pi_t;
  typedef int unsigned pi_table_t [4][40];
  localparam pi_table_t PI_TABLE = '{
    '{19, 31, 39,  6, 25, 12, 18, 32, 38,  5, 24, 11, 17, 30, 37,  4, 23, 10, 16, 29,
      36,  3, 22,  9, 15, 28, 34,  2, 21,  8, 14, 27, 35,  0, 20,  7, 13, 26, 33,  1},
    '{14,  8, 31, 24, 37,  2, 17, 10, 30, 23, 36,  3, 16,  9, 29, 22, 35,  1, 15,  7,
      28, 21, 34,  0, 13,  6, 27, 20, 33, 39, 12,  5, 26, 18, 32, 38, 11,  4, 25, 19},
    '{10,  1, 22, 35, 29, 16,  9,  3, 23, 36, 30, 17, 11,  4, 24, 37, 31, 18, 12,  6,
      25, 38, 32, 19, 13,  5, 26, 39, 33, 20, 14,  2, 27,  8, 34, 21, 15,  0, 28,  7},
    '{29,  9, 36, 16, 23,  3, 30, 10, 37, 17, 24,  4, 31, 11, 38, 18, 25,  5, 32, 12,
      39, 19, 26,  6,  0, 13, 33, 20, 27,  7,  1, 14, 34, 21, 28,  8,  2, 15, 35, 22}
  };

  // Interleaver entry for bank b, step t. For sizes other than the 4 x 40
  // default the tables are not defined; a plain bank-specific rotation keeps
  // the design elaborating (documented in the README).
  function automatic int unsigned pi_of(int unsigned b, int unsigned t);
    if (N_DEC == 4 && INFO_LEN == 40) return PI_TABLE[b % 4][t % 40];
    return (t * 7 + b * 3) % INFO_LEN;
  endfunction

endpackage
