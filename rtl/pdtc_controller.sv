// pdtc_controller: schedule of the parallel decodable turbo decoder.
//
// One iteration is two half-iterations ("cluster runs"): the first runs the
// N_DEC component decoders on the natural-order data with parity p1, the
// second on the interleaved data with parity p2. Each cluster run lasts
// HALF_LEN = STEPS + 6 cycles: STEPS cycles in which a step index is issued
// to the memories, 2 cycles of address and memory latency (interleaver table
// read, data read) and 4 cycles of decoder pipeline before the last
// extrinsic value is written. A packet therefore takes
//     ITER * 2 * (STEPS + 6) cycles  (384 for 42 steps and 4 iterations)
// from start to done, which is the Architecture-B latency formula
// tau = (D/N + 6) * 2I with the 42 trellis steps of each decoder in place of
// D/N. The next cluster run starts only after the last write of the previous
// one, since centre-to-top decoding reads first the values that were written
// last.
//
// Interface: start (one cycle, ignored while busy) begins a packet; issue_*
// drive the address path; zero_la is high in the first cluster run of the
// first iteration (no a priori values yet); done pulses in the last cycle.
// The iteration count and the cluster structure follow the published design.
module pdtc_controller
  import turbo_pkg::*;
#(
  parameter int ITERATIONS = ITER,
  parameter int HALF_LEN   = STEPS + 6
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  output logic  busy,
  output logic  issue_valid,
  output step_t issue_step,
  output logic  mode_il,
  output logic  zero_la,
  output logic  done
);

  localparam int KW = $clog2(HALF_LEN);
  localparam int IW = (ITERATIONS > 1) ? $clog2(ITERATIONS) : 1;

  logic [KW-1:0] k;
  logic          half;
  logic [IW-1:0] it;
  logic          last;

  assign last = busy && (k == KW'(HALF_LEN - 1)) && half && (it == IW'(ITERATIONS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      k    <= '0;
      half <= 1'b0;
      it   <= '0;
    end else if (!busy) begin
      if (start) begin
        busy <= 1'b1;
        k    <= '0;
        half <= 1'b0;
        it   <= '0;
      end
    end else if (k == KW'(HALF_LEN - 1)) begin
      k    <= '0;
      half <= ~half;
      if (half) it <= it + 1'b1;
      if (last) busy <= 1'b0;
    end else begin
      k <= k + 1'b1;
    end
  end

  assign issue_valid = busy && (k < KW'(STEPS));
  assign issue_step  = step_t'(k);
  assign mode_il     = half;
  assign zero_la     = (it == '0) && !half;
  assign done        = last;

endmodule
