// tb_pdtc_controller: self-checking test of the decoder schedule.
//
// After start the controller must run 2 * ITER cluster runs of STEPS + 6 =
// 48 cycles: in each, steps 0..41 are issued on consecutive cycles, then 6
// idle cycles follow; mode_il alternates natural / interleaved, zero_la is
// high only in the first run; done pulses once, in the last busy cycle, so
// busy lasts 2 * ITER * 48 = 384 cycles (the pipelined architecture's
// (D/N + 6) * 2I). A start while busy must be ignored; a start held high
// through done is taken in the one idle cycle after it.
module tb_pdtc_controller;
  import turbo_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic  start = 0, busy, issue_valid, mode_il, zero_la, done;
  step_t issue_step;

  pdtc_controller dut (.*);

  // Called at the first busy cycle (cycle 0, already checked by the caller);
  // checks cycles 1 .. 2*ITER*48-1 of the packet.
  task automatic run_packet(bit hold_start);
    int h, c;
    for (int n = 1; n < 2 * ITER * (STEPS + 6); n++) begin
      h = n / (STEPS + 6); c = n % (STEPS + 6);
      @(negedge clk);
      if (h == 3 && c == 5) start = 1;            // ignored while busy
      if (h == 3 && c == 6) start = 0;
      if (hold_start && h == 2 * ITER - 1 && c == STEPS + 5) start = 1;
      checks += 5;
      if (!busy) begin failures++; $display("run %0d cycle %0d: not busy", h, c); end
      if (issue_valid != (c < STEPS) || (c < STEPS && int'(issue_step) != c)) begin
        failures++; $display("run %0d cycle %0d: issue %0b step %0d", h, c, issue_valid, issue_step);
      end
      if (mode_il != h[0]) begin failures++; $display("run %0d: mode %0b", h, mode_il); end
      if (zero_la != (h == 0)) begin failures++; $display("run %0d: zero_la %0b", h, zero_la); end
      if (done != (h == 2 * ITER - 1 && c == STEPS + 5)) begin failures++; $display("run %0d cycle %0d: done %0b", h, c, done); end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    checks++;
    if (busy || issue_valid || done) begin failures++; $display("active before start"); end
    start = 1; @(negedge clk); start = 0;
    checks++;
    if (!busy || !issue_valid || issue_step != '0 || !zero_la) begin failures++; $display("cycle 0 wrong"); end
    run_packet(1);
    // start was high during done: it is taken in the idle cycle after done
    @(negedge clk);
    checks++;
    if (busy || issue_valid) begin failures++; $display("no idle cycle after done"); end
    @(negedge clk); start = 0;
    checks++;
    if (!busy || !issue_valid || issue_step != '0 || !zero_la) begin failures++; $display("back-to-back start failed"); end
    run_packet(0);
    @(negedge clk);
    checks++;
    if (busy || issue_valid || done) begin failures++; $display("still busy after the packet"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
