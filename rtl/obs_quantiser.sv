// obs_quantiser: receiver front end that turns one packet of raw channel
// samples into the K-bit observations of the decoder.
//
// The quantisation divides each matched-filter sample by a step chosen per
// packet so that the packet's largest magnitude, ObsMax, maps onto NormMax:
//     Q_k = floor( y_k * NormMax / ObsMax ),  limited to [-NormMax, NormMax].
// So the decoder input always spans the set {-NormMax .. NormMax}, whatever
// the signal level, and NormMax (a run-time input, at most 2^(K-1)-1) sets the
// trade-off between saturation and resolution.
//
// Operation, one packet at a time:
//   RX    PKT_LEN samples are accepted (in_valid/in_ready) and kept in a raw
//         sample memory while the largest magnitude is tracked.
//   DIV   scale = floor(NormMax * 2^F / ObsMax) by a restoring divider, one
//         quotient bit per cycle.
//   WAIT  until the observation buffer has a free copy (out_ready).
//   TX    each sample is read back, multiplied by scale, shifted right by F
//         (floor), limited and written to the observation buffer with its
//         kind, bank and address; then load_done is pulsed.
// Samples arrive in packet order: per bank 44 systematic values (40 data,
// 2 upper and 2 lower termination values), then 42 upper parity and 42 lower
// parity values; bank 0 first.
// Timing: one sample per cycle in; load_done follows the last accepted
// sample by (K - 1 + F) + PKT_LEN + 4 cycles when out_ready is high (divider,
// wait state, one buffer write per cycle, output register, done cycle).
// Normalising to the packet maximum follows the published design; the
// two-pass structure, the reciprocal and the sample format are this design's.
// Port B of the raw-sample RAM is not needed; its read output is left open
// (lint reports the empty pin).
module obs_quantiser
  import turbo_pkg::*;
#(
  parameter int RAW_W = 12,     // raw sample width (signed)
  parameter int F     = 10      // fraction bits of the scale factor
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [K-2:0]            norm_max,
  input  logic                    in_valid,
  input  logic signed [RAW_W-1:0] in_sample,
  output logic                    in_ready,
  input  logic                    out_ready,
  output logic                    wr_en,
  output obs_kind_e               wr_kind,
  output bank_t                   wr_bank,
  output step_t                   wr_addr,
  output metric_t                 wr_data,
  output logic                    load_done
);

  localparam int PER_BANK = D_DEPTH + 2 * P_DEPTH;     // 128
  localparam int IW       = $clog2(PKT_LEN);
  localparam int NW       = K - 1 + F;                 // numerator width
  localparam int SW       = NW;                        // scale width

  typedef enum logic [2:0] {S_RX, S_DIV, S_WAIT, S_TX, S_DONE} state_e;
  state_e state;

  logic [IW-1:0]    idx;
  logic [RAW_W-1:0] obs_max;
  logic [RAW_W-1:0] mag;
  assign mag = in_sample[RAW_W-1] ? RAW_W'(-in_sample) : RAW_W'(in_sample);

  // divider
  logic [NW-1:0]    num;
  logic [RAW_W-1:0] rem;             // always below obs_max
  logic [SW-1:0]    scale;
  logic [$clog2(NW+1)-1:0] dcnt;
  logic [RAW_W:0]   rem_sh;
  assign rem_sh = {rem, num[NW-1]};

  // raw sample memory
  logic [RAW_W-1:0] raw_rd;
  logic             tx_v;
  logic [IW-1:0]    tx_idx;

  dp_ram #(.WIDTH(RAW_W), .DEPTH(PKT_LEN)) u_raw (
    .clk,
    .a_en(1'b1), .a_we(state == S_RX && in_valid), .a_addr(idx),
    .a_wdata(in_sample), .a_rdata(raw_rd),
    .b_en(1'b0), .b_we(1'b0), .b_addr('0), .b_wdata('0), .b_rdata());

  assign in_ready = (state == S_RX);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_RX;
      idx     <= '0;
      obs_max <= '0;
      num     <= '0;
      rem     <= '0;
      scale   <= '0;
      dcnt    <= '0;
      tx_v    <= 1'b0;
      tx_idx  <= '0;
    end else begin
      tx_v <= 1'b0;
      unique case (state)
        S_RX: if (in_valid) begin
          if (mag > obs_max) obs_max <= mag;
          if (idx == IW'(PKT_LEN - 1)) begin
            idx   <= '0;
            state <= S_DIV;
            num   <= NW'({norm_max, F'(0)});
            rem   <= '0;
            scale <= '0;
            dcnt  <= '0;
          end else begin
            idx <= idx + 1'b1;
          end
        end
        S_DIV: begin
          // one restoring division step per cycle
          if (rem_sh >= {1'b0, obs_max}) begin
            rem   <= RAW_W'(rem_sh - {1'b0, obs_max});
            scale <= {scale[SW-2:0], 1'b1};
          end else begin
            rem   <= rem_sh[RAW_W-1:0];
            scale <= {scale[SW-2:0], 1'b0};
          end
          num  <= {num[NW-2:0], 1'b0};
          dcnt <= dcnt + 1'b1;
          if (dcnt == ($clog2(NW+1))'(NW - 1)) begin
            state <= S_WAIT;
            if (obs_max == '0) scale <= '0;
          end
        end
        S_WAIT: if (out_ready) state <= S_TX;
        S_TX: begin
          tx_v   <= 1'b1;
          tx_idx <= idx;
          if (idx == IW'(PKT_LEN - 1)) begin
            idx   <= '0;
            state <= S_DONE;
          end else begin
            idx <= idx + 1'b1;
          end
        end
        S_DONE: if (!tx_v) begin
          state   <= S_RX;
          obs_max <= '0;
        end
        default: state <= S_RX;
      endcase
    end
  end

  // Quantisation of the sample read in the previous cycle.
  logic signed [RAW_W+SW:0] prod;
  logic signed [RAW_W+SW:0] qv;
  logic signed [RAW_W+SW:0] lim;
  logic [IW-1:0]            r;
  always_comb begin
    prod = (RAW_W+SW+1)'(signed'(raw_rd)) * signed'({1'b0, scale});
    qv   = prod >>> F;
    lim  = (RAW_W+SW+1)'({1'b0, norm_max});
    if (qv > lim)       qv = lim;
    else if (qv < -lim) qv = -lim;
    r    = tx_idx % IW'(PER_BANK);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_en     <= 1'b0;
      load_done <= 1'b0;
    end else begin
      wr_en     <= tx_v;
      load_done <= (state == S_DONE) && !tx_v;
    end
  end

  always_ff @(posedge clk) begin
    wr_data <= metric_t'(qv);
    wr_bank <= bank_t'(tx_idx / IW'(PER_BANK));
    if (r < IW'(D_DEPTH)) begin
      wr_kind <= OBS_D;
      wr_addr <= step_t'(r);
    end else if (r < IW'(D_DEPTH + P_DEPTH)) begin
      wr_kind <= OBS_P1;
      wr_addr <= step_t'(r - IW'(D_DEPTH));
    end else begin
      wr_kind <= OBS_P2;
      wr_addr <= step_t'(r - IW'(D_DEPTH + P_DEPTH));
    end
  end

endmodule
