// tb_pdtc_encoder: self-checking test of the PDTC encoder.
//
// Six packets of random information bits (one all-zero, one all-one) are
// loaded and encoded; every coded bit of every bank and step is compared with
// a behavioural model: upper RSC encoder j codes bank j in order, lower
// encoder j codes the bit at bank (j+t) mod N, address pi_b(t); both are
// terminated to state 0, which is also checked on the model's own states.
// Timing checked: out_valid is high for exactly STEPS consecutive cycles
// with out_step = 0..41, the first output comes 3 cycles after the cycle in
// which start is sampled, done marks the last step, busy covers the run.
module tb_pdtc_encoder;
  import turbo_pkg::*;
  import turbo_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic  in_wr_en = 0, in_wr_bit = 0, start = 0;
  bank_t in_wr_bank = '0;
  step_t in_wr_addr = '0;
  logic  busy, out_valid, done;
  step_t out_step;
  logic  out_sys [N_DEC], out_p1 [N_DEC], out_p2 [N_DEC], out_sys2 [N_DEC];

  pdtc_encoder dut (.*);

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    int info [N_DEC][INFO_LEN];
    int cs [N_DEC][STEPS], c1 [N_DEC][STEPS], c2 [N_DEC][STEPS], cs2 [N_DEC][STEPS];
    int su, sl, u, ul, t0, nv;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 6; p++) begin
      for (int j = 0; j < N_DEC; j++)
        for (int t = 0; t < INFO_LEN; t++)
          info[j][t] = (p == 0) ? 0 : (p == 1) ? 1 : int'($urandom_range(0, 1));
      for (int j = 0; j < N_DEC; j++) begin
        su = 0; sl = 0;
        for (int t = 0; t < STEPS; t++) begin
          u  = (t < INFO_LEN) ? info[j][t] : (((su >> 1) ^ su) & 1);
          ul = (t < INFO_LEN) ? info[il_bank(j, t)][il_addr(j, t)] : (((sl >> 1) ^ sl) & 1);
          cs[j][t] = u; c1[j][t] = par(su, u); c2[j][t] = par(sl, ul); cs2[j][t] = ul;
          su = nxt(su, u); sl = nxt(sl, ul);
        end
        checks++;
        if (su != 0 || sl != 0) begin failures++; $display("model not terminated"); end
      end
      for (int j = 0; j < N_DEC; j++)
        for (int t = 0; t < INFO_LEN; t++) begin
          @(negedge clk);
          in_wr_en = 1; in_wr_bank = bank_t'(j); in_wr_addr = step_t'(t); in_wr_bit = info[j][t][0];
        end
      @(negedge clk); in_wr_en = 0; start = 1;
      @(negedge clk); start = 0; t0 = cyc;     // start sampled at the edge just passed
      checks++;
      if (!busy) begin failures++; $display("busy not set after start"); end
      nv = 0;
      for (int t = 0; t < STEPS; t++) begin
        if (t == 0) while (!out_valid && cyc - t0 < 20) @(negedge clk);
        if (t == 0) begin
          checks++;
          if (cyc - t0 != 3) begin failures++; $display("first output %0d cycles after start", cyc - t0); end
        end
        checks++;
        if (!out_valid || int'(out_step) != t) begin
          failures++; $display("pkt %0d: step %0d missing (valid %0b step %0d)", p, t, out_valid, out_step);
        end
        checks++;
        if (done != (t == STEPS - 1)) begin failures++; $display("done at step %0d", t); end
        for (int j = 0; j < N_DEC; j++) begin
          checks++;
          if (int'(out_sys[j]) != cs[j][t] || int'(out_p1[j]) != c1[j][t] ||
              int'(out_p2[j]) != c2[j][t] || (t >= INFO_LEN && int'(out_sys2[j]) != cs2[j][t])) begin
            failures++;
            if (failures < 10) $display("pkt %0d bank %0d step %0d: %0b%0b%0b%0b expected %0d%0d%0d%0d", p, j, t,
                                        out_sys[j], out_p1[j], out_p2[j], out_sys2[j], cs[j][t], c1[j][t], c2[j][t], cs2[j][t]);
          end
        end
        nv++;
        @(negedge clk);
      end
      checks += 2;
      if (out_valid) begin failures++; $display("out_valid after the last step"); end
      repeat (3) @(posedge clk);
      if (busy) begin failures++; $display("busy after the run"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
