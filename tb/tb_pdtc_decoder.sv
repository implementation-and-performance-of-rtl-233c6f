// tb_pdtc_decoder: self-checking test of the PDTC decoder core (observation
// buffer, interleaver, four CTT MAP decoders, LL memories, controller).
//
// Two instances get the same quantised packets: the default max-log-MAP
// decoder and a log-MAP one (q_code 20, i.e. q = 0.625). Packets are coded by
// the reference encoder, sent over BPSK with Gaussian noise, quantised by the
// reference quantiser (NormMax 10) and written straight into the decoder's
// observation buffer. Each packet's 160 final LL values must equal those of
// the reference iterative decoder (plain full-length BCJR, same arithmetic,
// same interleaver) bit for bit, and the low-noise packets must decode
// without error.
// Timing: busy lasts exactly 2 * ITER * (STEPS + 6) = 384 cycles per packet.
// Mechanisms counted (each must occur): a packet written while the
// previous one is decoded (ping-pong), load_ready low because both copies
// are full, and bit errors of the channel corrected by the decoder.
module tb_pdtc_decoder;
  import turbo_pkg::*;
  import turbo_ref_pkg::*;

  localparam int NPKT = 6;
  localparam int A    = 200;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic      wr_en = 0, load_done = 0, res_ack = 0;
  obs_kind_e wr_kind = OBS_D;
  bank_t     wr_bank = '0, res_bank = '0;
  step_t     wr_addr = '0, res_addr = '0;
  metric_t   wr_data = '0;
  logic      load_ready [2], busy [2], done [2], res_valid [2], res_bit [2];
  metric_t   res_ll [2];

  pdtc_decoder u_ml (
    .clk, .rst_n, .q_code(8'd20), .wr_en, .wr_kind, .wr_bank, .wr_addr, .wr_data,
    .load_done, .load_ready(load_ready[0]), .busy(busy[0]), .done(done[0]),
    .res_valid(res_valid[0]), .res_ack, .res_bank, .res_addr, .res_ll(res_ll[0]),
    .res_bit(res_bit[0]));
  pdtc_decoder #(.LOG_MAP(1'b1)) u_lm (
    .clk, .rst_n, .q_code(8'd20), .wr_en, .wr_kind, .wr_bank, .wr_addr, .wr_data,
    .load_done, .load_ready(load_ready[1]), .busy(busy[1]), .done(done[1]),
    .res_valid(res_valid[1]), .res_ack, .res_bank, .res_addr, .res_ll(res_ll[1]),
    .res_bit(res_bit[1]));

  int cyc = 0, n_pp = 0, n_full = 0, n_corr = 0, n_lat = 0;
  int bstart [2];
  logic bq [2] = '{0, 0};
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (wr_en && busy[0]) n_pp++;
    if (!load_ready[0]) n_full++;
    for (int i = 0; i < 2; i++) begin
      bq[i] <= busy[i];
      if (busy[i] && !bq[i]) bstart[i] = cyc;
      if (done[i]) begin
        checks++;
        if (cyc - bstart[i] + 1 != 2 * ITER * (STEPS + 6)) begin
          failures++; $display("dec %0d: busy for %0d cycles", i, cyc - bstart[i] + 1);
        end else n_lat++;
      end
    end
  end

  int info [NPKT][N_DEC][INFO_LEN];
  turbo_ref_pkg::obs_d_t dq [NPKT];
  turbo_ref_pkg::obs_p_t p1q [NPKT], p2q [NPKT];
  int sd_of [NPKT], ch_err [NPKT];

  task automatic make_packet(int p);
    int raw_d [N_DEC][D_DEPTH], raw_1 [N_DEC][STEPS], raw_2 [N_DEC][STEPS];
    int su, sl, u, ul, sd, mx, v;
    sd = (p < 2) ? 40 : (p % 2 == 0) ? 150 : 190;
    sd_of[p] = sd; ch_err[p] = 0;
    for (int j = 0; j < N_DEC; j++)
      for (int t = 0; t < INFO_LEN; t++) info[p][j][t] = int'($urandom_range(0, 1));
    mx = 0;
    for (int j = 0; j < N_DEC; j++) begin
      su = 0; sl = 0;
      for (int t = 0; t < STEPS; t++) begin
        u  = (t < INFO_LEN) ? info[p][j][t] : (((su >> 1) ^ su) & 1);
        ul = (t < INFO_LEN) ? info[p][il_bank(j, t)][il_addr(j, t)] : (((sl >> 1) ^ sl) & 1);
        raw_d[j][t] = ((u != 0) ? -A : A) + gauss(sd);
        if (t < INFO_LEN && ((raw_d[j][t] < 0) != (u == 1))) ch_err[p]++;
        if (t >= INFO_LEN) raw_d[j][t + TAIL] = ((ul != 0) ? -A : A) + gauss(sd);
        raw_1[j][t] = ((par(su, u) != 0) ? -A : A) + gauss(sd);
        raw_2[j][t] = ((par(sl, ul) != 0) ? -A : A) + gauss(sd);
        su = nxt(su, u); sl = nxt(sl, ul);
      end
    end
    for (int j = 0; j < N_DEC; j++) begin
      for (int t = 0; t < D_DEPTH; t++) begin v = raw_d[j][t] < 0 ? -raw_d[j][t] : raw_d[j][t]; if (v > mx) mx = v; end
      for (int t = 0; t < STEPS; t++) begin
        v = raw_1[j][t] < 0 ? -raw_1[j][t] : raw_1[j][t]; if (v > mx) mx = v;
        v = raw_2[j][t] < 0 ? -raw_2[j][t] : raw_2[j][t]; if (v > mx) mx = v;
      end
    end
    for (int j = 0; j < N_DEC; j++) begin
      for (int t = 0; t < D_DEPTH; t++) dq[p][j][t] = quant(raw_d[j][t], 10, mx);
      for (int t = 0; t < STEPS; t++) begin
        p1q[p][j][t] = quant(raw_1[j][t], 10, mx);
        p2q[p][j][t] = quant(raw_2[j][t], 10, mx);
      end
    end
  endtask

  task automatic send_packet(int p);
    while (!load_ready[0]) @(negedge clk);
    for (int j = 0; j < N_DEC; j++) begin
      for (int t = 0; t < D_DEPTH; t++) begin
        wr_en = 1; wr_kind = OBS_D; wr_bank = bank_t'(j); wr_addr = step_t'(t);
        wr_data = metric_t'(dq[p][j][t]); @(negedge clk);
      end
      for (int t = 0; t < STEPS; t++) begin
        wr_en = 1; wr_kind = OBS_P1; wr_bank = bank_t'(j); wr_addr = step_t'(t);
        wr_data = metric_t'(p1q[p][j][t]); @(negedge clk);
      end
      for (int t = 0; t < STEPS; t++) begin
        wr_en = 1; wr_kind = OBS_P2; wr_bank = bank_t'(j); wr_addr = step_t'(t);
        wr_data = metric_t'(p2q[p][j][t]); @(negedge clk);
      end
    end
    wr_en = 0; load_done = 1; @(negedge clk); load_done = 0; @(negedge clk);
  endtask

  initial begin : writer
    for (int p = 0; p < NPKT; p++) make_packet(p);
    wait (rst_n);
    @(negedge clk);
    for (int p = 0; p < NPKT; p++) send_packet(p);
  end

  initial begin : check_proc
    turbo_ref_pkg::nat_t llr [2];
    int errs;
    repeat (3) @(posedge clk);
    rst_n = 1;
    #1;
    for (int p = 0; p < NPKT; p++) begin
      turbo_decode(dq[p], p1q[p], p2q[p], ITER, 20, 1'b0, llr[0]);
      turbo_decode(dq[p], p1q[p], p2q[p], ITER, 20, 1'b1, llr[1]);
      while (!(res_valid[0] && res_valid[1])) @(negedge clk);
      if (p == 0) repeat (700) @(negedge clk);     // let the buffer fill up
      errs = 0;
      for (int j = 0; j < N_DEC; j++)
        for (int t = 0; t < INFO_LEN; t++) begin
          res_bank = bank_t'(j); res_addr = step_t'(t);
          @(negedge clk);
          for (int i = 0; i < 2; i++) begin
            checks++;
            if (int'(res_ll[i]) != llr[i][j][t]) begin
              failures++;
              if (failures < 20) $display("dec %0d pkt %0d LL[%0d][%0d] = %0d, expected %0d", i, p, j, t, res_ll[i], llr[i][j][t]);
            end
          end
          if (int'(res_bit[0]) != info[p][j][t]) errs++;
        end
      if (ch_err[p] > errs) n_corr += ch_err[p] - errs;
      $display("packet %0d: noise sd %0d, channel errors %0d, decoded errors %0d", p, sd_of[p], ch_err[p], errs);
      if (sd_of[p] <= 40) begin checks++; if (errs != 0) failures++; end
      res_ack = 1; @(negedge clk); res_ack = 0;
    end
    $display("ping-pong %0d, buffer full %0d, corrected %0d, latency ok %0d", n_pp, n_full, n_corr, n_lat);
    checks += 4;
    if (n_pp == 0)   begin failures++; $display("no ping-pong"); end
    if (n_full == 0) begin failures++; $display("buffer never full"); end
    if (n_corr == 0) begin failures++; $display("nothing corrected"); end
    if (n_lat != 2 * NPKT) begin failures++; $display("latency checked %0d times", n_lat); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
