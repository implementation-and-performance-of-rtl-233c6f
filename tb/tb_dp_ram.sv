// tb_dp_ram: self-checking test of the two-port synchronous RAM used for
// the observation, a priori, extrinsic and LL memories.
//
// Random traffic on both ports (no two writes to one address in one cycle)
// is compared with a model: a read returns, one clock after the address, the
// word stored before that edge (read-old-data), and writes from either port
// are seen by both. Cycle timing is checked by comparing the data exactly
// one cycle after each enabled read. Counted and required: reads of a word
// written by the other port, and reads with en low keeping the old output.
module tb_dp_ram;
  localparam int W = 6, D = 44, AW = $clog2(D);

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_cross = 0, n_hold = 0;

  logic          a_en = 0, a_we = 0, b_en = 0, b_we = 0;
  logic [AW-1:0] a_addr = '0, b_addr = '0;
  logic [W-1:0]  a_wdata = '0, b_wdata = '0, a_rdata, b_rdata;

  dp_ram #(.WIDTH(W), .DEPTH(D)) dut (.*);

  int model [D];
  int who [D];            // last writer: 0 = A, 1 = B
  int exp_a, exp_b, xa, xb;
  logic chk_a, chk_b, a_read = 0;   // a_read: port A has made a checked read

  initial begin
    for (int i = 0; i < D; i++) begin model[i] = 0; who[i] = 0; end
    // initialise every word through port A
    for (int i = 0; i < D; i++) begin
      @(negedge clk); a_en = 1; a_we = 1; a_addr = AW'(i); a_wdata = '0;
    end
    @(negedge clk); a_en = 0; a_we = 0;
    chk_a = 0; chk_b = 0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      // outputs of the previous edge
      if (chk_a) begin
        checks++;
        if (int'(a_rdata) != exp_a) begin failures++; if (failures < 10) $display("A read %0d, expected %0d", a_rdata, exp_a); end
        if (xa != 0) n_cross++;
      end else if (a_read) begin
        checks++;
        if (int'(a_rdata) != exp_a) begin failures++; $display("A output changed while disabled"); end
        else n_hold++;
      end
      if (chk_b) begin
        checks++;
        if (int'(b_rdata) != exp_b) begin failures++; if (failures < 10) $display("B read %0d, expected %0d", b_rdata, exp_b); end
        if (xb != 0) n_cross++;
      end
      a_en = ($urandom_range(0, 3) != 0); b_en = ($urandom_range(0, 3) != 0);
      a_we = a_en && ($urandom_range(0, 1) == 1);
      b_we = b_en && ($urandom_range(0, 1) == 1);
      a_addr = AW'($urandom_range(0, D - 1)); b_addr = AW'($urandom_range(0, D - 1));
      if (a_we && b_we && a_addr == b_addr) b_we = 0;
      a_wdata = W'($urandom); b_wdata = W'($urandom);
      chk_a = a_en; chk_b = b_en;
      if (a_en) a_read = 1;
      if (a_en) begin exp_a = model[a_addr]; xa = int'(who[a_addr] == 1); end
      if (b_en) begin exp_b = model[b_addr]; xb = int'(who[b_addr] == 0); end
      if (a_we) begin model[a_addr] = int'(a_wdata); who[a_addr] = 0; end
      if (b_we) begin model[b_addr] = int'(b_wdata); who[b_addr] = 1; end
    end
    checks += 2;
    if (n_cross == 0) begin failures++; $display("no cross-port read"); end
    if (n_hold == 0)  begin failures++; $display("no disabled-read hold"); end
    $display("cross-port reads %0d, holds %0d", n_cross, n_hold);
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
