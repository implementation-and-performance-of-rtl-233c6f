// tb_turbo_pkg: self-checking test of the shared arithmetic and trellis of
// turbo_pkg.
//
// * clipsum against the five rules of the saturating sum, in their order
//   (an operand at plus_inf wins over one at minus_inf), for all 64 x 64
//   pairs of K = 6 bit codes; clipsub as a (+) (-b); cneg; mmax.
// * normsub: a - m limited below at minus_inf, and the largest of four
//   metrics becomes exactly 0 after normalisation.
// * RSC trellis against a shift-register model of the 7/5 code: next state
//   and parity for all states and inputs; two termination bits drive every
//   state to 0.
// * pi_of: each of the N bank tables is a permutation of 0..39.
// Pure functions: no clock; the watchdog is a time limit.
module tb_turbo_pkg;
  import turbo_pkg::*;

  int checks = 0, failures = 0;

  function automatic int rule_sum(int a, int b);
    if (a >= 31 || b >= 31) return 31;
    if (a <= -31 || b <= -31) return -31;
    if (a + b >= 31) return 31;
    if (a + b <= -31) return -31;
    return a + b;
  endfunction

  initial begin
    int e, hit [INFO_LEN];
    metric_t m [4];
    logic [1:0] s;
    for (int a = -32; a <= 31; a++)
      for (int b = -32; b <= 31; b++) begin
        checks += 4;
        e = rule_sum(a, b);
        if (int'(clipsum(metric_t'(a), metric_t'(b))) != e) begin
          failures++; if (failures < 10) $display("clipsum(%0d,%0d) = %0d, expected %0d", a, b, clipsum(metric_t'(a), metric_t'(b)), e);
        end
        e = rule_sum(a, (b <= -31) ? 31 : -b);
        if (int'(clipsub(metric_t'(a), metric_t'(b))) != e) begin
          failures++; if (failures < 10) $display("clipsub(%0d,%0d) = %0d", a, b, clipsub(metric_t'(a), metric_t'(b)));
        end
        if (int'(mmax(metric_t'(a), metric_t'(b))) != ((a > b) ? a : b)) begin
          failures++; $display("mmax(%0d,%0d)", a, b);
        end
        if (b >= a) begin
          e = (a - b <= -31) ? -31 : a - b;
          if (int'(normsub(metric_t'(a), metric_t'(b))) != e) begin
            failures++; if (failures < 10) $display("normsub(%0d,%0d) = %0d", a, b, normsub(metric_t'(a), metric_t'(b)));
          end
        end else checks--;
      end
    for (int a = -31; a <= 31; a++) begin
      checks++;
      if (int'(cneg(metric_t'(a))) != -a) begin failures++; $display("cneg(%0d)", a); end
    end
    checks++;
    if (cneg(metric_t'(-32)) != PLUS_INF) begin failures++; $display("cneg(-32)"); end
    // normalisation of random vectors
    for (int n = 0; n < 1000; n++) begin
      metric_t mx;
      for (int i = 0; i < 4; i++) m[i] = metric_t'($urandom_range(0, 62) - 31);
      mx = mmax(mmax(m[0], m[1]), mmax(m[2], m[3]));
      e = -100;
      for (int i = 0; i < 4; i++) if (int'(normsub(m[i], mx)) > e) e = int'(normsub(m[i], mx));
      checks++;
      if (e != 0) begin failures++; $display("normalised maximum %0d", e); end
    end
    // trellis: registers r1 (newest), r2; feedback 1+D+D^2, forward 1+D^2
    for (int st = 0; st < 4; st++)
      for (int u = 0; u < 2; u++) begin
        int r1, r2, fb;
        r1 = (st >> 1) & 1; r2 = st & 1;
        fb = u ^ r1 ^ r2;
        checks += 2;
        if (int'(rsc_next(2'(st), u[0])) != ((fb << 1) | r1)) begin failures++; $display("next(%0d,%0d)", st, u); end
        if (int'(rsc_par(2'(st), u[0])) != (fb ^ r2)) begin failures++; $display("par(%0d,%0d)", st, u); end
      end
    for (int st = 0; st < 4; st++) begin
      s = 2'(st);
      for (int k = 0; k < TAIL; k++) s = rsc_next(s, rsc_term_bit(s));
      checks++;
      if (s != 2'b00) begin failures++; $display("state %0d not terminated", st); end
    end
    for (int b = 0; b < N_DEC; b++) begin
      for (int t = 0; t < INFO_LEN; t++) hit[t] = 0;
      for (int t = 0; t < INFO_LEN; t++) hit[pi_of(b, t)]++;
      for (int t = 0; t < INFO_LEN; t++) begin
        checks++;
        if (hit[t] != 1) begin failures++; $display("bank %0d table: %0d appears %0d times", b, t, hit[t]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
