// tb_turbo_top: end-to-end test of the PDTC transmitter/receiver at its
// default sizes (4 decoders x 40 bits, K = 6, 4 iterations, max-log-MAP).
//
// For each packet: random 160 information bits are loaded into the encoder and
// coded; every coded bit is compared with the reference encoder. The coded
// bits are mapped to BPSK (bit 0 -> +A), Gaussian noise is added and the 512
// raw samples are streamed, in packet order, into the receiver. The
// reference quantises the same samples and decodes them with a plain
// full-length BCJR in the same fixed-point arithmetic; every one of the 160
// final LL values read back from the decoder must match, and for the packets
// with little noise the hard decisions must equal the information bits.
// Packet noise runs from none to about Eb/N0 = 2.6 dB.
//
// Also checked: the decoding latency is 2 * 4 * 48 = 384 cycles per packet.
// Mechanisms counted (each must occur): a packet received while the
// previous one is being decoded (ping-pong), the receiver stalled because
// both observation copies are full, a decoded packet waiting for its result
// to be collected, saturated LL values, and bit errors corrected by the
// iterations (hard decisions of the channel alone wrong, decoder right).
module tb_turbo_top;
  import turbo_pkg::*;
  import turbo_ref_pkg::*;

  localparam int NPKT = 8;
  localparam int A    = 200;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic  enc_wr_en = 0, enc_wr_bit = 0, enc_start = 0;
  bank_t enc_wr_bank = '0;
  step_t enc_wr_addr = '0;
  logic  enc_busy, enc_out_valid, enc_done;
  step_t enc_out_step;
  logic  enc_out_sys [N_DEC], enc_out_p1 [N_DEC], enc_out_p2 [N_DEC], enc_out_sys2 [N_DEC];
  logic [K-2:0] norm_max = 5'd10;
  logic [5:0]   snr_idx = 6'd30;
  logic         rx_valid = 0, rx_ready;
  logic signed [11:0] rx_sample = '0;
  logic    dec_busy, dec_done, res_valid, res_ack = 0, res_bit;
  bank_t   res_bank = '0;
  step_t   res_addr = '0;
  metric_t res_ll;

  turbo_top dut (.*);

  // ------------------------------------------------------------ counters
  int cyc = 0;
  int n_pingpong = 0, n_rx_stall = 0, n_res_wait = 0, n_sat = 0, n_corrected = 0;
  int busy_start = 0, n_lat_ok = 0;
  logic busy_q = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    busy_q <= dec_busy;
    if (rx_valid && rx_ready && dec_busy) n_pingpong++;
    if (rx_valid && !rx_ready && dut.u_quant.state == dut.u_quant.S_WAIT) n_rx_stall++;
    if (dut.u_dec.dec_avail && res_valid && !dec_busy) n_res_wait++;
    if (dec_busy && !busy_q) busy_start = cyc;
    if (dec_done) begin
      checks++;
      // done is the last busy cycle: busy for 384 cycles
      if (cyc - busy_start + 1 != 2 * ITER * (STEPS + 6)) begin
        failures++;
        $display("latency %0d cycles", cyc - busy_start + 1);
      end else n_lat_ok++;
    end
  end

  // --------------------------------------------------------- packet data
  int info [NPKT][N_DEC][INFO_LEN];
  int raw  [NPKT][PKT_LEN];
  int sd_of [NPKT];

  task automatic make_packet(int p);
    int cs [N_DEC][STEPS], c1 [N_DEC][STEPS], c2 [N_DEC][STEPS], cs2 [N_DEC][STEPS];
    int su, sl, u, ul, idx, sd;
    for (int j = 0; j < N_DEC; j++)
      for (int t = 0; t < INFO_LEN; t++) info[p][j][t] = int'($urandom_range(0, 1));
    for (int j = 0; j < N_DEC; j++) begin
      su = 0; sl = 0;
      for (int t = 0; t < STEPS; t++) begin
        u  = (t < INFO_LEN) ? info[p][j][t] : (((su >> 1) ^ su) & 1);
        ul = (t < INFO_LEN) ? info[p][il_bank(j, t)][il_addr(j, t)] : (((sl >> 1) ^ sl) & 1);
        cs[j][t] = u; c1[j][t] = par(su, u); c2[j][t] = par(sl, ul); cs2[j][t] = ul;
        su = nxt(su, u); sl = nxt(sl, ul);
      end
    end
    // load the encoder and compare its output
    for (int j = 0; j < N_DEC; j++)
      for (int t = 0; t < INFO_LEN; t++) begin
        @(negedge clk);
        enc_wr_en = 1; enc_wr_bank = bank_t'(j); enc_wr_addr = step_t'(t); enc_wr_bit = info[p][j][t][0];
      end
    @(negedge clk); enc_wr_en = 0; enc_start = 1;
    @(negedge clk); enc_start = 0;
    for (int t = 0; t < STEPS; t++) begin
      while (!enc_out_valid) @(posedge clk);
      for (int j = 0; j < N_DEC; j++) begin
        checks++;
        if (int'(enc_out_step) != t || int'(enc_out_sys[j]) != cs[j][t] ||
            int'(enc_out_p1[j]) != c1[j][t] || int'(enc_out_p2[j]) != c2[j][t] ||
            (t >= INFO_LEN && int'(enc_out_sys2[j]) != cs2[j][t])) begin
          failures++;
          $display("encoder mismatch pkt %0d bank %0d step %0d", p, j, t);
        end
      end
      @(posedge clk);
    end
    // channel: noise level per packet
    sd = (p == 0) ? 0 : (p == 1) ? 60 : (p % 2 == 0) ? 150 : 190;
    for (int j = 0; j < N_DEC; j++) begin
      idx = j * (D_DEPTH + 2 * P_DEPTH);
      for (int t = 0; t < STEPS; t++)  raw[p][idx + t] = ((cs[j][t] != 0) ? -A : A) + gauss(sd);
      for (int t = 0; t < TAIL; t++)   raw[p][idx + STEPS + t] = ((cs2[j][INFO_LEN + t] != 0) ? -A : A) + gauss(sd);
      for (int t = 0; t < STEPS; t++)  raw[p][idx + D_DEPTH + t] = ((c1[j][t] != 0) ? -A : A) + gauss(sd);
      for (int t = 0; t < STEPS; t++)  raw[p][idx + D_DEPTH + P_DEPTH + t] = ((c2[j][t] != 0) ? -A : A) + gauss(sd);
    end
    for (int i = 0; i < PKT_LEN; i++) begin
      if (raw[p][i] > 2047) raw[p][i] = 2047;
      if (raw[p][i] < -2047) raw[p][i] = -2047;
    end
    sd_of[p] = sd;
  endtask

  // ------------------------------------------------------------ receiver
  int nm_of [NPKT];
  initial begin : rx_proc
    wait (rst_n);
    for (int p = 0; p < NPKT; p++) begin
      wait (sd_of[p] >= 0);
      @(negedge clk);
      for (int i = 0; i < PKT_LEN; i++) begin
        rx_valid = 1; rx_sample = 12'(raw[p][i]);
        @(posedge clk);
        while (!rx_ready) @(posedge clk);
        @(negedge clk);
      end
      rx_valid = 0;
      // present the next packet at once, so that the receiver has to wait
    end
  end

  // -------------------------------------------------------------- checker
  initial begin : main
    turbo_ref_pkg::obs_d_t d; turbo_ref_pkg::obs_p_t p1, p2; turbo_ref_pkg::nat_t llr;
    int mx, idx, errs, ch_errs;
    for (int p = 0; p < NPKT; p++) sd_of[p] = -1;
    for (int p = 0; p < NPKT; p++) nm_of[p] = 10;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < NPKT; p++) make_packet(p);
    for (int p = 0; p < NPKT; p++) begin
      // reference quantisation and decoding
      mx = 0;
      for (int i = 0; i < PKT_LEN; i++) if ((raw[p][i] < 0 ? -raw[p][i] : raw[p][i]) > mx)
        mx = (raw[p][i] < 0 ? -raw[p][i] : raw[p][i]);
      ch_errs = 0;
      for (int j = 0; j < N_DEC; j++) begin
        idx = j * (D_DEPTH + 2 * P_DEPTH);
        for (int t = 0; t < D_DEPTH; t++) d[j][t]  = quant(raw[p][idx + t], 10, mx);
        for (int t = 0; t < STEPS; t++)   p1[j][t] = quant(raw[p][idx + D_DEPTH + t], 10, mx);
        for (int t = 0; t < STEPS; t++)   p2[j][t] = quant(raw[p][idx + D_DEPTH + P_DEPTH + t], 10, mx);
        for (int t = 0; t < INFO_LEN; t++) if ((raw[p][idx + t] < 0) != (info[p][j][t] == 1)) ch_errs++;
      end
      turbo_decode(d, p1, p2, ITER, 0, 1'b0, llr);
      // wait for the hardware result; let it wait for collection once
      while (!res_valid) @(posedge clk);
      if (p == 1) repeat (2000) @(posedge clk);
      errs = 0;
      for (int j = 0; j < N_DEC; j++)
        for (int t = 0; t < INFO_LEN; t++) begin
          @(negedge clk);
          res_bank = bank_t'(j); res_addr = step_t'(t);
          @(negedge clk);
          checks++;
          if (int'(res_ll) != llr[j][t]) begin
            failures++;
            if (failures < 20) $display("pkt %0d LL[%0d][%0d] = %0d, expected %0d", p, j, t, res_ll, llr[j][t]);
          end
          if (int'(res_bit) != info[p][j][t]) errs++;
          if (res_ll == PLUS_INF || res_ll == MINUS_INF) n_sat++;
        end
      if (ch_errs > errs) n_corrected += ch_errs - errs;
      $display("packet %0d: noise sd %0d, channel bit errors %0d, decoded bit errors %0d",
               p, sd_of[p], ch_errs, errs);
      if (sd_of[p] <= 60) begin
        checks++;
        if (errs != 0) failures++;
      end
      @(negedge clk); res_ack = 1;
      @(negedge clk); res_ack = 0;
    end
    $display("ping-pong %0d, rx stall %0d, result wait %0d, saturated LL %0d, corrected %0d, latency ok %0d",
             n_pingpong, n_rx_stall, n_res_wait, n_sat, n_corrected, n_lat_ok);
    checks += 6;
    if (n_pingpong == 0)  begin failures++; $display("no packet received during decoding"); end
    if (n_rx_stall == 0)  begin failures++; $display("receiver never stalled"); end
    if (n_res_wait == 0)  begin failures++; $display("no decoded packet waited"); end
    if (n_sat == 0)       begin failures++; $display("no saturated LL"); end
    if (n_corrected == 0) begin failures++; $display("no corrected errors"); end
    if (n_lat_ok != NPKT) begin failures++; $display("latency checked %0d times", n_lat_ok); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
