// pdtc_encoder: parallel decodable turbo code encoder.
//
// The 160 information bits of a packet sit in N_DEC banks of INFO_LEN bits
// (bank j feeds encoder j). N_DEC upper RSC encoders code bank j in natural
// order; N_DEC lower RSC encoders code the interleaved sequence, encoder j
// taking at step t the bit at bank (j + t) mod N_DEC, address PI[b][t] of
// the collision-free interleaver (pdtc_interleaver). After INFO_LEN steps
// each of the 2*N_DEC encoders is driven to state 0 with TAIL termination
// bits. Per bank and step the encoder emits the systematic bit and the upper
// parity bit, the lower parity bit and, at termination steps, the lower
// encoder's own termination (systematic) bit: 40*3 + 2*4 = 128 coded bits per
// bank, 512 per packet, a code rate slightly below 1/3.
//
// Interface: info bits are written with in_wr_* while idle; start begins
// encoding; for STEPS consecutive cycles out_valid is high with out_step
// = 0..41 and one set of outputs per bank; done pulses with the last one.
// Each step is output 3 cycles after it is issued (interleaver table read,
// memory read, encoder register).
// The structure follows the published encoder; the constituent code (7/5
// RSC) and the interface are this design's choices.
module pdtc_encoder
  import turbo_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_wr_en,
  input  bank_t in_wr_bank,
  input  step_t in_wr_addr,
  input  logic  in_wr_bit,
  input  logic  start,
  output logic  busy,
  output logic  out_valid,
  output step_t out_step,
  output logic  out_sys  [N_DEC],   // systematic bit (upper tail at t >= 40)
  output logic  out_p1   [N_DEC],   // upper parity
  output logic  out_p2   [N_DEC],   // lower parity
  output logic  out_sys2 [N_DEC],   // lower termination bit (t >= 40 only)
  output logic  done
);

  localparam int LW = $clog2(INFO_LEN);

  // ------------------------------------------------------- step counter
  step_t t;
  logic  run;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0;
      t   <= '0;
    end else if (!run) begin
      if (start) begin
        run <= 1'b1;
        t   <= '0;
      end
    end else if (t == step_t'(STEPS - 1)) begin
      run <= 1'b0;
    end else begin
      t <= t + 1'b1;
    end
  end

  // ------------------------------------------------ interleaver, memories
  step_t il_a [N_DEC], il_unused [N_DEC];
  bank_t rot, rot_unused;
  logic  tail, tail_unused;

  pdtc_interleaver u_il (
    .clk, .mode_il(1'b1), .t_f(t), .t_b(t),
    .addr_f(il_a), .addr_b(il_unused), .rot_f(rot), .rot_b(rot_unused),
    .tail_f(tail), .tail_b(tail_unused));

  logic  v1, v2, v3;
  step_t t1, t2;
  bank_t rot2;
  logic  tail2;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; v3 <= 1'b0;
    end else begin
      v1 <= run; v2 <= v1; v3 <= v2;
    end
  end
  always_ff @(posedge clk) begin
    t1 <= t;  t2 <= t1;  rot2 <= rot;  tail2 <= tail;
  end

  logic bit_nat [N_DEC], bit_il [N_DEC];
  for (genvar gb = 0; gb < N_DEC; gb++) begin : g_mem
    logic wr_here;
    assign wr_here = in_wr_en && !busy && (in_wr_bank == bank_t'(gb));
    dp_ram #(.WIDTH(1), .DEPTH(INFO_LEN)) u_info (
      .clk,
      .a_en(1'b1), .a_we(wr_here), .a_addr(wr_here ? LW'(in_wr_addr) : LW'(t1)),
      .a_wdata(in_wr_bit), .a_rdata(bit_nat[gb]),
      .b_en(1'b1), .b_we(1'b0), .b_addr(LW'(il_a[gb])), .b_wdata(1'b0),
      .b_rdata(bit_il[gb]));
  end

  // --------------------------------------------------------- RSC coders
  logic [1:0] st_up [N_DEC], st_lo [N_DEC];
  for (genvar gj = 0; gj < N_DEC; gj++) begin : g_enc
    localparam bank_t J = bank_t'(gj);
    logic u_up, u_lo;
    bank_t src;
    assign src  = J + rot2;
    assign u_up = tail2 ? rsc_term_bit(st_up[gj]) : bit_nat[gj];
    assign u_lo = tail2 ? rsc_term_bit(st_lo[gj]) : bit_il[src];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        st_up[gj] <= '0;
        st_lo[gj] <= '0;
      end else if (v2) begin
        st_up[gj] <= rsc_next(st_up[gj], u_up);
        st_lo[gj] <= rsc_next(st_lo[gj], u_lo);
      end
    end
    always_ff @(posedge clk) begin
      out_sys[gj]  <= u_up;
      out_p1[gj]   <= rsc_par(st_up[gj], u_up);
      out_p2[gj]   <= rsc_par(st_lo[gj], u_lo);
      out_sys2[gj] <= tail2 ? u_lo : 1'b0;
    end
  end

  always_ff @(posedge clk) out_step <= t2;

  assign busy      = run || v1 || v2 || v3;
  assign out_valid = v3;
  assign done      = v3 && (out_step == step_t'(STEPS - 1));

endmodule
