// tb_obs_buffer: self-checking test of the ping-pong observation buffer.
//
// Sequence: packet 0 is written into the free copy and closed with
// load_done; dec_avail must rise; the decoder takes it; packet 1 is written
// into the other copy while packet 0 is being read (ping-pong); with both
// copies full load_ready must be low; after dec_release the buffer must
// offer packet 1 and, once taken, the first copy becomes free again. Reads
// are checked for data, for the one-cycle read latency (address at one
// edge, data after the next), for the separate forward/backward ports, for
// per-bank addresses of d and for the p1/p2 selection (p_sel applies to the
// output of the current cycle). Three packets in all.
module tb_obs_buffer;
  import turbo_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic      wr_en = 0, load_done = 0, dec_take = 0, dec_release = 0, p_sel = 0;
  obs_kind_e wr_kind = OBS_D;
  bank_t     wr_bank = '0;
  step_t     wr_addr = '0;
  metric_t   wr_data = '0;
  logic      load_ready, dec_avail;
  step_t     d_addr_f [N_DEC], d_addr_b [N_DEC];
  step_t     p_addr_f = '0, p_addr_b = '0;
  metric_t   d_f [N_DEC], d_b [N_DEC], p_f [N_DEC], p_b [N_DEC];

  obs_buffer dut (.*);

  int dv [3][N_DEC][D_DEPTH], p1v [3][N_DEC][P_DEPTH], p2v [3][N_DEC][P_DEPTH];

  task automatic expect1(logic got, logic want, string what);
    checks++;
    if (got !== want) begin failures++; $display("%s is %0b", what, got); end
  endtask

  task automatic write_pkt(int p);
    for (int b = 0; b < N_DEC; b++) begin
      for (int a = 0; a < D_DEPTH; a++) begin
        @(negedge clk); wr_en = 1; wr_kind = OBS_D; wr_bank = bank_t'(b); wr_addr = step_t'(a);
        wr_data = metric_t'(dv[p][b][a]);
      end
      for (int a = 0; a < P_DEPTH; a++) begin
        @(negedge clk); wr_en = 1; wr_kind = OBS_P1; wr_bank = bank_t'(b); wr_addr = step_t'(a);
        wr_data = metric_t'(p1v[p][b][a]);
      end
      for (int a = 0; a < P_DEPTH; a++) begin
        @(negedge clk); wr_en = 1; wr_kind = OBS_P2; wr_bank = bank_t'(b); wr_addr = step_t'(a);
        wr_data = metric_t'(p2v[p][b][a]);
      end
    end
    @(negedge clk); wr_en = 0; load_done = 1;
    @(negedge clk); load_done = 0;
  endtask

  // read one whole packet with random d addresses, both p selections
  task automatic read_pkt(int p);
    int af [N_DEC], ab [N_DEC], pf, pb;
    for (int n = 0; n < 2 * STEPS; n++) begin
      @(negedge clk);
      for (int b = 0; b < N_DEC; b++) begin
        af[b] = $urandom_range(0, D_DEPTH - 1); ab[b] = $urandom_range(0, D_DEPTH - 1);
        d_addr_f[b] = step_t'(af[b]); d_addr_b[b] = step_t'(ab[b]);
      end
      pf = n % STEPS; pb = STEPS - 1 - pf;
      p_addr_f = step_t'(pf); p_addr_b = step_t'(pb);
      @(negedge clk);
      p_sel = (n >= STEPS);
      #1;
      for (int b = 0; b < N_DEC; b++) begin
        checks += 4;
        if (int'(d_f[b]) != dv[p][b][af[b]] || int'(d_b[b]) != dv[p][b][ab[b]]) begin
          failures++; if (failures < 10) $display("pkt %0d bank %0d d mismatch", p, b);
        end
        if (int'(p_f[b]) != (p_sel ? p2v[p][b][pf] : p1v[p][b][pf])) begin
          failures++; if (failures < 10) $display("pkt %0d bank %0d p_f mismatch sel %0b", p, b, p_sel);
        end
        if (int'(p_b[b]) != (p_sel ? p2v[p][b][pb] : p1v[p][b][pb])) begin
          failures++; if (failures < 10) $display("pkt %0d bank %0d p_b mismatch", p, b);
        end
      end
    end
  endtask

  initial begin
    for (int p = 0; p < 3; p++)
      for (int b = 0; b < N_DEC; b++) begin
        for (int a = 0; a < D_DEPTH; a++) dv[p][b][a] = $urandom_range(0, 62) - 31;
        for (int a = 0; a < P_DEPTH; a++) begin
          p1v[p][b][a] = $urandom_range(0, 62) - 31;
          p2v[p][b][a] = $urandom_range(0, 62) - 31;
        end
      end
    for (int b = 0; b < N_DEC; b++) begin d_addr_f[b] = '0; d_addr_b[b] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    expect1(load_ready, 1, "load_ready after reset");
    expect1(dec_avail, 0, "dec_avail after reset");
    write_pkt(0);
    expect1(dec_avail, 1, "dec_avail after packet 0");
    expect1(load_ready, 1, "load_ready with one copy full");
    dec_take = 1; @(negedge clk); dec_take = 0;
    expect1(dec_avail, 0, "dec_avail while busy");
    // ping-pong: packet 1 is written while packet 0 is read
    fork
      write_pkt(1);
      read_pkt(0);
    join
    expect1(load_ready, 0, "load_ready with both copies full");
    expect1(dec_avail, 0, "dec_avail while busy (both full)");
    read_pkt(0);                          // packet 0 still intact
    dec_release = 1; @(negedge clk); dec_release = 0;
    expect1(dec_avail, 1, "dec_avail for packet 1");
    expect1(load_ready, 1, "load_ready after release");
    dec_take = 1; @(negedge clk); dec_take = 0;
    read_pkt(1);
    write_pkt(2);
    read_pkt(1);                          // writing copy 0 leaves copy 1 alone
    dec_release = 1; @(negedge clk); dec_release = 0;
    expect1(dec_avail, 1, "dec_avail for packet 2");
    dec_take = 1; @(negedge clk); dec_take = 0;
    read_pkt(2);
    dec_release = 1; @(negedge clk); dec_release = 0;
    expect1(dec_avail, 0, "dec_avail when empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
