// tb_pdtc_interleaver: self-checking test of the bank interleaver.
//
// Checked for every step t of both directions, one cycle after t is applied:
//   natural mode:     every bank address is t, rotation 0;
//   interleaved mode: bank b gives pi_b(t), rotation t mod N (decoder j
//                     reads bank (j + t) mod N);
//   termination steps (t >= 40): address t (natural) or t + 2 (the lower
//                     encoder's termination values), rotation 0, tail flag.
// Over a whole interleaved run the (bank, address) pairs read by the N
// decoders must cover all 160 information bits exactly once (the mapping is
// a permutation) and in every step the N decoders must use N different banks
// (collision-free). Each bank table must be S-random: steps closer than S
// are mapped at least S apart.
module tb_pdtc_interleaver;
  import turbo_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic  mode_il = 1'b0;
  step_t t_f = '0, t_b = '0;
  step_t addr_f [N_DEC], addr_b [N_DEC];
  bank_t rot_f, rot_b;
  logic  tail_f, tail_b;

  pdtc_interleaver dut (.*);

  int tab [N_DEC][INFO_LEN];
  int hit [N_DEC][INFO_LEN];

  task automatic check_dir(int t, int m, step_t a [N_DEC], bank_t r, logic tl, string dir);
    int ea, er;
    for (int b = 0; b < N_DEC; b++) begin
      if (t >= INFO_LEN)  ea = (m != 0) ? t + TAIL : t;
      else if (m != 0)        ea = tab[b][t];
      else                ea = t;
      checks++;
      if (int'(a[b]) != ea) begin
        failures++;
        if (failures < 10) $display("%s mode %0d t %0d bank %0d: addr %0d, expected %0d", dir, m, t, b, a[b], ea);
      end
    end
    er = ((m != 0) && t < INFO_LEN) ? t % N_DEC : 0;
    checks += 2;
    if (int'(r) != er) begin failures++; $display("%s mode %0d t %0d: rot %0d", dir, m, t, r); end
    if (tl != (t >= INFO_LEN)) begin failures++; $display("%s t %0d: tail flag", dir, t); end
  endtask

  initial begin
    int bank, ok;
    for (int b = 0; b < N_DEC; b++)
      for (int t = 0; t < INFO_LEN; t++) begin
        tab[b][t] = int'(pi_of(b, t));
        hit[b][t] = 0;
      end
    // table properties
    for (int b = 0; b < N_DEC; b++)
      for (int t1 = 0; t1 < INFO_LEN; t1++)
        for (int t2 = t1 + 1; t2 < INFO_LEN; t2++) begin
          checks++;
          if (tab[b][t1] == tab[b][t2]) begin failures++; $display("bank %0d table repeats", b); end
          if (t2 - t1 < S_RANDOM) begin
            checks++;
            if ((tab[b][t1] > tab[b][t2] ? tab[b][t1] - tab[b][t2] : tab[b][t2] - tab[b][t1]) < S_RANDOM) begin
              failures++; $display("bank %0d not S-random at %0d,%0d", b, t1, t2);
            end
          end
        end
    for (int m = 0; m < 2; m++)
      for (int t = 0; t < STEPS; t++) begin
        @(negedge clk);
        mode_il = m[0]; t_f = step_t'(t); t_b = step_t'(STEPS - 1 - t);
        @(negedge clk);
        check_dir(t, m, addr_f, rot_f, tail_f, "fwd");
        check_dir(STEPS - 1 - t, m, addr_b, rot_b, tail_b, "bwd");
        if (m == 1 && t < INFO_LEN) begin
          ok = 1;
          for (int j = 0; j < N_DEC; j++) begin
            bank = (j + int'(rot_f)) % N_DEC;
            hit[bank][int'(addr_f[bank])]++;
            for (int j2 = 0; j2 < j; j2++) if ((j2 + int'(rot_f)) % N_DEC == bank) ok = 0;
          end
          checks++;
          if (ok == 0) begin failures++; $display("bank collision at step %0d", t); end
        end
      end
    for (int b = 0; b < N_DEC; b++)
      for (int a = 0; a < INFO_LEN; a++) begin
        checks++;
        if (hit[b][a] != 1) begin failures++; $display("bit (%0d,%0d) read %0d times", b, a, hit[b][a]); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
