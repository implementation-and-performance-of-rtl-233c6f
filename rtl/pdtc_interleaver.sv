// pdtc_interleaver: address generator of the collision-free (row-column
// S-random) interleaver of the parallel decodable turbo code.
//
// The information bits are held in N_DEC memory banks of INFO_LEN words;
// word t of bank b is natural-order bit (b, t). The interleaved sequence
// seen by lower decoder / encoder j at step t is
//     bank  b = (j + t) mod N_DEC,   address = PI[b][t],
// where PI[b] is the S-random permutation stored for bank b. At every step
// the N_DEC decoders touch N_DEC different banks (a rotation by t mod N_DEC),
// so the memories never collide, and the map (j, t) -> (b, PI[b][t]) is a
// permutation of the whole packet because each PI[b] is one. In natural order
// (first cluster / upper encoder) decoder j reads bank j at address t.
//
// Steps t >= INFO_LEN are termination steps: they are never interleaved, the
// rotation is 0 and the address is t in natural mode and t + TAIL in
// interleaved mode (the lower code's termination bits are kept after the
// upper ones in the systematic memory).
//
// Two independent lookups per cycle (port f for the forward side step, port b
// for the backward side step of the centre-to-top schedule), each with one
// cycle of latency: a table read per bank and port, registered, like a
// dual-port block RAM holding the tables (N_DEC table memories).
//
// The interleaver family, the per-bank tables and their size and spread follow
// the published design; the exact bank rotation rule and the table contents
// are this design's own.
module pdtc_interleaver
  import turbo_pkg::*;
(
  input  logic  clk,
  input  logic  mode_il,                 // 1: interleaved order
  input  step_t t_f,
  input  step_t t_b,
  output step_t addr_f [N_DEC],          // per bank, one cycle later
  output step_t addr_b [N_DEC],
  output bank_t rot_f,                   // decoder j <-> bank (j + rot) mod N
  output bank_t rot_b,
  output logic  tail_f,                  // step is a termination step
  output logic  tail_b
);

  // Table memories, one per bank.
  pi_t tab [N_DEC][INFO_LEN];
  for (genvar gb = 0; gb < N_DEC; gb++) begin : g_bank
    for (genvar gt = 0; gt < INFO_LEN; gt++) begin : g_t
      localparam pi_t E = pi_t'(pi_of(gb, gt));
      assign tab[gb][gt] = E;
    end
  end

  function automatic step_t tail_addr(step_t t, logic il);
    return il ? step_t'(t + step_t'(TAIL)) : t;
  endfunction

  always_ff @(posedge clk) begin
    for (int b = 0; b < N_DEC; b++) begin
      if (t_f >= step_t'(INFO_LEN))      addr_f[b] <= tail_addr(t_f, mode_il);
      else if (mode_il)                  addr_f[b] <= step_t'(tab[b][PI_W'(t_f)]);
      else                               addr_f[b] <= t_f;
      if (t_b >= step_t'(INFO_LEN))      addr_b[b] <= tail_addr(t_b, mode_il);
      else if (mode_il)                  addr_b[b] <= step_t'(tab[b][PI_W'(t_b)]);
      else                               addr_b[b] <= t_b;
    end
    rot_f  <= (mode_il && t_f < step_t'(INFO_LEN)) ? bank_t'(t_f % step_t'(N_DEC)) : '0;
    rot_b  <= (mode_il && t_b < step_t'(INFO_LEN)) ? bank_t'(t_b % step_t'(N_DEC)) : '0;
    tail_f <= (t_f >= step_t'(INFO_LEN));
    tail_b <= (t_b >= step_t'(INFO_LEN));
  end

endmodule
