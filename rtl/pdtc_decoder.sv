// pdtc_decoder: parallel decodable turbo code (PDTC) decoder.
//
// A packet of N_DEC * INFO_LEN = 160 information bits was encoded by N_DEC
// upper and N_DEC lower terminated RSC encoders, the lower ones fed through
// the collision-free bank interleaver. The decoder runs N_DEC centre-to-top
// MAP decoders side by side. Each iteration has two cluster runs: first the
// decoders work on natural-order data and upper parity, then, reusing the
// same hardware, on interleaved data and lower parity; only the memories they
// read and write change. Extrinsic values of one run are the a priori values
// of the next.
//
// Memories (3N for observations, doubled for ping-pong, plus 3N for
// log-likelihood values, plus the N interleaver tables):
//   obs_buffer   d, p1, p2 per bank, two copies
//   la_mem[b]    a priori values in natural order, written by cluster run 2
//   le_mem[b]    extrinsic values in natural order, written by cluster run 1
//   ll_mem[b]    a posteriori LL values, overwritten by every cluster run
// Every memory is a dual-port RAM: the forward side of the decoders uses
// port A and the backward side port B. Cluster run 1 reads la_mem and writes
// le_mem, cluster run 2 reads le_mem and writes la_mem, both through the
// interleaver, so all of them stay in natural order.
//
// Pipeline of one step index k (cycle numbers relative to its issue):
//   k     controller issues step k (forward) and STEPS-1-k (backward)
//   k+1   interleaver table read: bank addresses and rotation
//   k+2   memory data, rotated to the decoders: decoder input cycle
//   k+6   decoder output (for k >= 21), rotated back, written
// A cluster run is STEPS + 6 = 48 cycles and a packet 2 * ITER * 48 = 384
// cycles. The a priori input is forced to 0 in the first run and at the
// termination steps.
//
// Host interface: observations are written with wr_* and closed with
// load_done (see obs_buffer). Decoding starts by itself when a packet is
// stored and the previous result has been collected. done pulses when it
// ends; res_valid then stays high until res_ack. While res_valid, reading
// bit (res_bank, res_addr) returns res_ll and the hard decision res_bit
// (1 for LL < 0) one cycle later.
//
// Structure, memory organisation, schedule and latency follow the published
// design (Architecture-B); the handshakes and the exact address pipeline are
// this design's own.
// Lint notes: the LL memories' port A read output is left open (only port B
// is read, by the host); rst_n also appears in the assertions' disable
// condition, which lint reports as a synchronous use of the reset.
module pdtc_decoder
  import turbo_pkg::*;
#(
  parameter bit LOG_MAP    = 1'b0,
  parameter int ITERATIONS = ITER
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] q_code,
  // observation loading
  input  logic       wr_en,
  input  obs_kind_e  wr_kind,
  input  bank_t      wr_bank,
  input  step_t      wr_addr,
  input  metric_t    wr_data,
  input  logic       load_done,
  output logic       load_ready,
  // results
  output logic       busy,
  output logic       done,
  output logic       res_valid,
  input  logic       res_ack,
  input  bank_t      res_bank,
  input  step_t      res_addr,
  output metric_t    res_ll,
  output logic       res_bit
);

  localparam int LW = $clog2(INFO_LEN);
  localparam int DL = 5;                 // delay from interleaver output to write

  // ------------------------------------------------------------ control
  logic  dec_avail, start;
  logic  issue_valid, mode_il, zero_la;
  step_t issue_step;

  assign start = dec_avail && !busy && !res_valid;

  pdtc_controller #(.ITERATIONS(ITERATIONS)) u_ctrl (
    .clk, .rst_n, .start, .busy, .issue_valid, .issue_step, .mode_il,
    .zero_la, .done);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       res_valid <= 1'b0;
    else if (done)    res_valid <= 1'b1;
    else if (res_ack) res_valid <= 1'b0;
  end

  // ------------------------------------------------ address stage (k+1)
  step_t t_f, t_b;
  assign t_f = issue_step;
  assign t_b = step_t'(STEPS - 1) - issue_step;

  step_t il_af [N_DEC], il_ab [N_DEC];
  bank_t rot_f, rot_b;
  logic  tail_f, tail_b;

  pdtc_interleaver u_il (
    .clk, .mode_il, .t_f, .t_b,
    .addr_f(il_af), .addr_b(il_ab), .rot_f, .rot_b, .tail_f, .tail_b);

  logic  v1, first1, mode1, zero1;
  step_t pa_f1, pa_b1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v1 <= 1'b0;
    else        v1 <= issue_valid;
  end
  always_ff @(posedge clk) begin
    first1 <= issue_valid && (issue_step == '0);
    mode1  <= mode_il;
    zero1  <= zero_la;
    pa_f1  <= t_f;
    pa_b1  <= t_b;
  end

  // --------------------------------------------------- data stage (k+2)
  metric_t d_f [N_DEC], d_b [N_DEC], p_f [N_DEC], p_b [N_DEC];
  logic    v2, first2, mode2, zero2, tail_f2, tail_b2;
  bank_t   rot_f2, rot_b2;

  obs_buffer u_obs (
    .clk, .rst_n, .wr_en, .wr_kind, .wr_bank, .wr_addr, .wr_data, .load_done,
    .load_ready, .dec_avail, .dec_take(start), .dec_release(done),
    .p_sel(mode2), .d_addr_f(il_af), .d_addr_b(il_ab),
    .p_addr_f(pa_f1), .p_addr_b(pa_b1), .d_f, .d_b, .p_f, .p_b);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v2 <= 1'b0;
    else        v2 <= v1;
  end
  always_ff @(posedge clk) begin
    first2  <= first1;
    mode2   <= mode1;
    zero2   <= zero1;
    rot_f2  <= rot_f;
    rot_b2  <= rot_b;
    tail_f2 <= tail_f;
    tail_b2 <= tail_b;
  end

  // --------------------------------------------- write delay (k+2..k+6)
  step_t wa_f [DL][N_DEC], wa_b [DL][N_DEC];
  bank_t wr_f [DL], wr_b [DL];
  logic  wt_f [DL], wt_b [DL], wm [DL];
  always_ff @(posedge clk) begin
    wa_f[0] <= il_af;  wa_b[0] <= il_ab;
    wr_f[0] <= rot_f;  wr_b[0] <= rot_b;
    wt_f[0] <= tail_f; wt_b[0] <= tail_b;
    wm[0]   <= mode1;
    for (int i = 1; i < DL; i++) begin
      wa_f[i] <= wa_f[i-1]; wa_b[i] <= wa_b[i-1];
      wr_f[i] <= wr_f[i-1]; wr_b[i] <= wr_b[i-1];
      wt_f[i] <= wt_f[i-1]; wt_b[i] <= wt_b[i-1];
      wm[i]   <= wm[i-1];
    end
  end
  // stage k+6 values
  step_t w_af [N_DEC], w_ab [N_DEC];
  bank_t w_rf, w_rb;
  logic  w_tf, w_tb, w_mode;
  assign w_af   = wa_f[DL-1];
  assign w_ab   = wa_b[DL-1];
  assign w_rf   = wr_f[DL-1];
  assign w_rb   = wr_b[DL-1];
  assign w_tf   = wt_f[DL-1];
  assign w_tb   = wt_b[DL-1];
  assign w_mode = wm[DL-1];

  // ------------------------------------------------- LL value memories
  metric_t la_rf [N_DEC], la_rb [N_DEC], le_rf [N_DEC], le_rb [N_DEC];
  metric_t ll_rb [N_DEC];
  metric_t dle_f [N_DEC], dle_b [N_DEC], dll_f [N_DEC], dll_b [N_DEC];
  logic    dout_v [N_DEC];
  step_t   dout_fi [N_DEC], dout_bi [N_DEC];

  for (genvar gb = 0; gb < N_DEC; gb++) begin : g_llmem
    // values written into bank gb come from decoder (gb - rot) mod N
    localparam bank_t B = bank_t'(gb);
    bank_t   src_f, src_b;
    metric_t wle_f, wle_b, wll_f, wll_b;
    logic    wen_f, wen_b;
    assign src_f = B - w_rf;
    assign src_b = B - w_rb;
    assign wle_f = dle_f[src_f];
    assign wle_b = dle_b[src_b];
    assign wll_f = dll_f[src_f];
    assign wll_b = dll_b[src_b];
    assign wen_f = dout_v[0] && !w_tf;
    assign wen_b = dout_v[0] && !w_tb;

    // a priori values: read in run 1, written in run 2
    dp_ram #(.WIDTH(K), .DEPTH(INFO_LEN)) u_la (
      .clk,
      .a_en(1'b1), .a_we(wen_f && w_mode),
      .a_addr((wen_f && w_mode) ? LW'(w_af[gb]) : LW'(il_af[gb])),
      .a_wdata(wle_f), .a_rdata(la_rf[gb]),
      .b_en(1'b1), .b_we(wen_b && w_mode),
      .b_addr((wen_b && w_mode) ? LW'(w_ab[gb]) : LW'(il_ab[gb])),
      .b_wdata(wle_b), .b_rdata(la_rb[gb]));

    // extrinsic values: written in run 1, read in run 2
    dp_ram #(.WIDTH(K), .DEPTH(INFO_LEN)) u_le (
      .clk,
      .a_en(1'b1), .a_we(wen_f && !w_mode),
      .a_addr((wen_f && !w_mode) ? LW'(w_af[gb]) : LW'(il_af[gb])),
      .a_wdata(wle_f), .a_rdata(le_rf[gb]),
      .b_en(1'b1), .b_we(wen_b && !w_mode),
      .b_addr((wen_b && !w_mode) ? LW'(w_ab[gb]) : LW'(il_ab[gb])),
      .b_wdata(wle_b), .b_rdata(le_rb[gb]));

    // a posteriori values: written by every run, read by the host when idle
    dp_ram #(.WIDTH(K), .DEPTH(INFO_LEN)) u_ll (
      .clk,
      .a_en(1'b1), .a_we(wen_f), .a_addr(LW'(w_af[gb])),
      .a_wdata(wll_f), .a_rdata(),
      .b_en(1'b1), .b_we(wen_b),
      .b_addr(wen_b ? LW'(w_ab[gb]) : LW'(res_addr)),
      .b_wdata(wll_b), .b_rdata(ll_rb[gb]));
  end

  bank_t res_bank_q;
  always_ff @(posedge clk) res_bank_q <= res_bank;
  assign res_ll  = ll_rb[res_bank_q];
  assign res_bit = res_ll[K-1];

  // ------------------------------------------------ component decoders
  for (genvar gj = 0; gj < N_DEC; gj++) begin : g_dec
    localparam bank_t J = bank_t'(gj);
    bank_t   sb_f, sb_b;
    metric_t la_f, la_b;
    assign sb_f = J + rot_f2;
    assign sb_b = J + rot_b2;
    assign la_f = (zero2 || tail_f2) ? metric_t'(0) : (mode2 ? le_rf[sb_f] : la_rf[sb_f]);
    assign la_b = (zero2 || tail_b2) ? metric_t'(0) : (mode2 ? le_rb[sb_b] : la_rb[sb_b]);

    map_decoder #(.LOG_MAP(LOG_MAP)) u_map (
      .clk, .rst_n, .q_code,
      .in_valid(v2), .in_first(first2),
      .f_sys(d_f[sb_f]), .f_par(p_f[gj]), .f_la(la_f),
      .b_sys(d_b[sb_b]), .b_par(p_b[gj]), .b_la(la_b),
      .out_valid(dout_v[gj]), .out_f_idx(dout_fi[gj]), .out_b_idx(dout_bi[gj]),
      .out_f_le(dle_f[gj]), .out_b_le(dle_b[gj]),
      .out_f_ll(dll_f[gj]), .out_b_ll(dll_b[gj]));
  end

  // The output step index travels with the data; it must match the address
  // pipeline (checked, not used for addressing).
  a_idx_align: assert property (@(posedge clk) disable iff (!rst_n)
    dout_v[0] |-> (dout_fi[0] + dout_bi[0] == step_t'(STEPS - 1)));

endmodule
