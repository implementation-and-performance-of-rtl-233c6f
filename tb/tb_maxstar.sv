// tb_maxstar: self-checking test of the max* unit in both modes.
//
// Two instances, LOG_MAP = 0 (max-log-MAP: y = max(a, b)) and LOG_MAP = 1
// (log-MAP: y = max(a, b) (+) LUT(|a - b|) with the 8-entry table
// floor(ln(1 + exp(-i q)) / q) for the quantisation step q = q_code / 32).
// All metric pairs of the restricted set [-31, 31] are applied for a set of
// q codes, including the extremes, and compared with a real-valued model.
// Also counted: the correction is non-zero at least once (so the table is
// active) and the result saturates at plus_inf at least once. The unit is
// combinational: results are sampled 1 ns after the inputs change.
module tb_maxstar;
  import turbo_pkg::*;

  int checks = 0, failures = 0, n_corr = 0, n_sat = 0;
  metric_t    a, b, y0, y1;
  logic [7:0] qc;

  maxstar #(.LOG_MAP(1'b0)) u_ml (.a, .b, .q_code(qc), .y(y0));
  maxstar #(.LOG_MAP(1'b1)) u_lm (.a, .b, .q_code(qc), .y(y1));

  function automatic int exp_corr(int d, int q_code);
    real q;
    int c;
    if (d >= 8) return 0;
    q = (q_code == 0) ? 1.0 / 32.0 : real'(q_code) / 32.0;
    c = int'($floor($ln(1.0 + $exp(-real'(d) * q)) / q));
    return (c > 31) ? 31 : c;
  endfunction

  initial begin
    automatic int qlist [6] = '{0, 1, 8, 32, 100, 255};
    int m, d, e;
    foreach (qlist[n]) begin
      qc = 8'(qlist[n]);
      for (int ia = -31; ia <= 31; ia++)
        for (int ib = -31; ib <= 31; ib++) begin
          a = metric_t'(ia); b = metric_t'(ib);
          #1;
          m = (ia > ib) ? ia : ib;
          d = (ia > ib) ? ia - ib : ib - ia;
          // clipsum rules: an operand at +-inf decides first
          e = (m >= 31) ? 31 : (m <= -31) ? -31 :
              ((m + exp_corr(d, qlist[n]) >= 31) ? 31 : m + exp_corr(d, qlist[n]));
          if (exp_corr(d, qlist[n]) > 0) n_corr++;
          if (e == 31 && m < 31) n_sat++;
          checks += 2;
          if (int'(y0) != m) begin
            failures++;
            if (failures < 10) $display("max-log: max(%0d,%0d) = %0d", ia, ib, y0);
          end
          if (int'(y1) != e) begin
            failures++;
            if (failures < 10) $display("log-MAP q=%0d: max*(%0d,%0d) = %0d, expected %0d", qlist[n], ia, ib, y1, e);
          end
        end
    end
    checks += 2;
    if (n_corr == 0) begin failures++; $display("correction never active"); end
    if (n_sat == 0)  begin failures++; $display("correction never saturated"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
