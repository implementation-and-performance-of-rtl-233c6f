// maxstar: the max* operator of the log-domain BCJR algorithm,
//   max*(a, b) = ln(e^a + e^b) = max(a, b) + ln(1 + e^-|a-b|).
//
// LOG_MAP = 0 (max-log-MAP, the default of this design): the correction term
// is dropped and the unit is a plain comparator/multiplexer.
// LOG_MAP = 1 (log-MAP): the correction term comes from a table
//   LUT(i) = floor( ln(1 + e^(-i*q)) / q ),
// where i = |a - b| in quantisation steps and q is the quantisation step of
// the observations, given as an 8-bit code with 3 integer and 5 fractional
// bits (q = q_code / 32). The table for every q code is computed at
// elaboration from that formula, so the unit is one multiplexer selected by
// q_code and |a - b|, followed by a saturating add. Differences of LUT_LEN or
// more use a correction of 0. q_code = 0 is treated as the smallest step 1/32.
//
// Purely combinational. The formula and the q format follow the published
// design; the table length LUT_LEN is this design's choice.
module maxstar
  import turbo_pkg::*;
#(
  parameter bit LOG_MAP = 1'b0,
  parameter int LUT_LEN = 8
) (
  input  metric_t    a,
  input  metric_t    b,
  input  logic [7:0] q_code,
  output metric_t    y
);

  typedef logic [K-2:0] corr_t;

  // One table entry, evaluated at elaboration.
  function automatic corr_t corr_entry(int qc, int i);
    real q, v;
    int  iv;
    q  = (qc == 0) ? (1.0 / 32.0) : (real'(qc) / 32.0);
    v  = $ln(1.0 + $exp(-(real'(i)) * q)) / q;
    iv = int'($floor(v));
    if (iv > (1 << (K - 1)) - 1) iv = (1 << (K - 1)) - 1;
    return corr_t'(iv);
  endfunction

  metric_t mx;
  assign mx = mmax(a, b);

  if (LOG_MAP) begin : g_logmap
    corr_t CORR [256][LUT_LEN];
    for (genvar gq = 0; gq < 256; gq++) begin : g_q
      for (genvar gi = 0; gi < LUT_LEN; gi++) begin : g_i
        localparam corr_t ENTRY = corr_entry(gq, gi);
        assign CORR[gq][gi] = ENTRY;
      end
    end
    logic signed [K:0] diff;
    logic [K:0]        adiff;
    metric_t           corr;
    always_comb begin
      diff  = {a[K-1], a} - {b[K-1], b};
      adiff = diff[K] ? (K+1)'(-diff) : diff;
      if (adiff < (K+1)'(LUT_LEN)) corr = metric_t'({1'b0, CORR[q_code][adiff[$clog2(LUT_LEN)-1:0]]});
      else                         corr = '0;
      y = clipsum(mx, corr);
    end
  end else begin : g_maxlog
    logic unused_q;
    assign unused_q = ^q_code;
    assign y = mx;
  end

endmodule
