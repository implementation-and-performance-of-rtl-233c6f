// tb_obs_quantiser: self-checking test of the receiver quantiser.
//
// Five packets of 512 raw samples (small and large signal levels, one with
// a full-scale sample, one all zero) are streamed in with random gaps on
// in_valid. For each, every write to the observation buffer is compared with
// the model Q = floor(y * floor(NormMax * 2^10 / ObsMax) / 2^10), limited to
// +-NormMax, and with the packet layout (per bank 44 d, 42 p1, 42 p2 values,
// bank 0 first): each (kind, bank, address) must be written exactly once,
// and load_done must pulse once after the last write. NormMax is changed
// between packets (10, 15, 7). out_ready is held low for a while on one
// packet: no write may happen and in_ready must stay low. Timing checked
// with out_ready high: load_done comes (F + K - 1) + PKT_LEN + 4 cycles
// after the last sample is accepted (divider, wait state, one write per
// cycle, output register and the done cycle). The largest magnitude must
// come within 1 of +-NormMax in every non-zero packet (the scale is a
// floored reciprocal).
module tb_obs_quantiser;
  import turbo_pkg::*;
  import turbo_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [K-2:0]       norm_max = 5'd10;
  logic               in_valid = 0, out_ready = 1;
  logic signed [11:0] in_sample = '0;
  logic               in_ready, wr_en, load_done;
  obs_kind_e          wr_kind;
  bank_t              wr_bank;
  step_t              wr_addr;
  metric_t            wr_data;

  obs_quantiser dut (.*);

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int raw [PKT_LEN];
  int got [PKT_LEN];
  int seen [PKT_LEN];
  int n_done, t_last, t_done, n_ext, blocked_writes;

  // collect buffer writes
  always @(negedge clk) begin
    int i;
    if (wr_en) begin
      i = int'(wr_bank) * (D_DEPTH + 2 * P_DEPTH) +
          ((wr_kind == OBS_D) ? int'(wr_addr) :
           (wr_kind == OBS_P1) ? D_DEPTH + int'(wr_addr) : D_DEPTH + P_DEPTH + int'(wr_addr));
      if (i < PKT_LEN) begin got[i] = int'(wr_data); seen[i]++; end
      if (!out_ready) blocked_writes++;
    end
    if (load_done) begin n_done++; t_done = cyc; end
  end

  initial begin
    int amp, mx, e, nm;
    blocked_writes = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 5; p++) begin
      nm = (p == 1) ? 15 : (p == 3) ? 7 : 10;
      amp = (p == 0) ? 200 : (p == 1) ? 2000 : (p == 2) ? 30 : (p == 3) ? 700 : 0;
      for (int i = 0; i < PKT_LEN; i++) begin
        raw[i] = (amp == 0) ? 0 : int'($urandom_range(0, 2 * amp)) - amp;
        got[i] = 99; seen[i] = 0;
      end
      if (p == 1) raw[77] = -2047;
      n_done = 0;
      @(negedge clk); norm_max = 5'(nm);
      for (int i = 0; i < PKT_LEN; i++) begin
        while ($urandom_range(0, 4) == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1; in_sample = 12'(raw[i]);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        t_last = cyc;
        @(negedge clk);
      end
      in_valid = 0;
      if (p == 2) begin
        out_ready = 0;
        repeat (100) begin
          @(negedge clk);
          checks++;
          if (in_ready) begin failures++; $display("in_ready while waiting"); end
        end
        out_ready = 1;
      end
      while (n_done == 0 && cyc - t_last < 3000) @(negedge clk);
      repeat (5) @(negedge clk);
      // compare
      mx = 0;
      for (int i = 0; i < PKT_LEN; i++) if ((raw[i] < 0 ? -raw[i] : raw[i]) > mx) mx = raw[i] < 0 ? -raw[i] : raw[i];
      n_ext = 0;
      for (int i = 0; i < PKT_LEN; i++) begin
        e = quant(raw[i], nm, mx);
        if (e >= nm - 1 || e <= 1 - nm) n_ext++;   // floor of the reciprocal may lose 1
        checks++;
        if (seen[i] != 1 || got[i] != e) begin
          failures++;
          if (failures < 10) $display("pkt %0d sample %0d (%0d): written %0d times, %0d, expected %0d", p, i, raw[i], seen[i], got[i], e);
        end
      end
      checks += 2;
      if (n_done != 1) begin failures++; $display("pkt %0d: load_done pulsed %0d times", p, n_done); end
      if (amp != 0 && n_ext == 0) begin failures++; $display("pkt %0d: maximum not mapped to NormMax", p); end
      if (p != 2) begin
        checks++;
        if (t_done - t_last != (F_BITS + K - 1) + PKT_LEN + 4) begin
          failures++; $display("pkt %0d: load_done %0d cycles after the last sample", p, t_done - t_last);
        end
      end
    end
    checks++;
    if (blocked_writes != 0) begin failures++; $display("%0d writes while out_ready low", blocked_writes); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  localparam int F_BITS = 10;

  initial begin
    repeat (50000) @(posedge clk);
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
