// obs_buffer: ping-pong store of the quantised channel observations of the
// parallel decodable turbo decoder.
//
// Each of the two copies holds, per bank j (one bank per component decoder),
// three memories: d (systematic, D_DEPTH words: 40 information values, the two
// upper termination values, then the two lower termination values), p1
// (upper parity, P_DEPTH words) and p2 (lower, interleaved parity, P_DEPTH
// words), i.e. 3*N_DEC memory blocks per copy.
//
// One copy is written by the receiver while the decoder reads the other, so
// a new packet can arrive during decoding. Copy control:
//   * wr_* writes go to the copy selected by the internal write pointer;
//     load_ready says that copy is free. load_done marks it full and moves the
//     write pointer to the other copy.
//   * dec_avail says the copy at the read pointer is full. dec_take starts its
//     use by the decoder; dec_release frees it and moves the read pointer.
//     Packets are therefore decoded in arrival order.
// Read side: two read ports (f and b) per memory, addressed per bank; data one
// cycle after the address. The parity read selects p1 or p2 (p_sel).
// Port A of each memory is the write port of the filling copy and the f read
// port of the decoding copy; port B is the b read port.
// The memory organisation and the ping-pong scheme follow the published
// design; the load handshake is this design's choice.
module obs_buffer
  import turbo_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  // receiver side
  input  logic      wr_en,
  input  obs_kind_e wr_kind,
  input  bank_t     wr_bank,
  input  step_t     wr_addr,
  input  metric_t   wr_data,
  input  logic      load_done,
  output logic      load_ready,
  // decoder side
  output logic      dec_avail,
  input  logic      dec_take,
  input  logic      dec_release,
  input  logic      p_sel,                 // 0: p1, 1: p2
  input  step_t     d_addr_f [N_DEC],
  input  step_t     d_addr_b [N_DEC],
  input  step_t     p_addr_f,              // same address in every bank
  input  step_t     p_addr_b,
  output metric_t   d_f [N_DEC],
  output metric_t   d_b [N_DEC],
  output metric_t   p_f [N_DEC],
  output metric_t   p_b [N_DEC]
);

  logic       wptr, rptr;
  logic [1:0] full;
  logic       busy;      // read copy in use by the decoder

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= 1'b0;
      rptr <= 1'b0;
      full <= '0;
      busy <= 1'b0;
    end else begin
      if (load_done && !full[wptr]) begin
        full[wptr] <= 1'b1;
        wptr       <= ~wptr;
      end
      if (dec_take && dec_avail) busy <= 1'b1;
      if (dec_release && busy) begin
        busy       <= 1'b0;
        full[rptr] <= 1'b0;
        rptr       <= ~rptr;
      end
    end
  end

  assign load_ready = !full[wptr];
  assign dec_avail  = full[rptr] && !busy;

  localparam int DAW = $clog2(D_DEPTH);
  localparam int PAW = $clog2(P_DEPTH);

  metric_t d_fo [2][N_DEC], d_bo [2][N_DEC];
  metric_t p1_fo [2][N_DEC], p1_bo [2][N_DEC];
  metric_t p2_fo [2][N_DEC], p2_bo [2][N_DEC];

  for (genvar gc = 0; gc < 2; gc++) begin : g_copy
    logic filling;
    assign filling = (wptr == 1'(gc)) && !full[gc];
    for (genvar gb = 0; gb < N_DEC; gb++) begin : g_bank
      logic wr_here;
      assign wr_here = filling && wr_en && (wr_bank == bank_t'(gb));

      dp_ram #(.WIDTH(K), .DEPTH(D_DEPTH)) u_d (
        .clk,
        .a_en(1'b1), .a_we(wr_here && wr_kind == OBS_D),
        .a_addr(filling ? DAW'(wr_addr) : DAW'(d_addr_f[gb])), .a_wdata(wr_data),
        .a_rdata(d_fo[gc][gb]),
        .b_en(1'b1), .b_we(1'b0), .b_addr(DAW'(d_addr_b[gb])), .b_wdata('0),
        .b_rdata(d_bo[gc][gb]));

      dp_ram #(.WIDTH(K), .DEPTH(P_DEPTH)) u_p1 (
        .clk,
        .a_en(1'b1), .a_we(wr_here && wr_kind == OBS_P1),
        .a_addr(filling ? PAW'(wr_addr) : PAW'(p_addr_f)), .a_wdata(wr_data),
        .a_rdata(p1_fo[gc][gb]),
        .b_en(1'b1), .b_we(1'b0), .b_addr(PAW'(p_addr_b)), .b_wdata('0),
        .b_rdata(p1_bo[gc][gb]));

      dp_ram #(.WIDTH(K), .DEPTH(P_DEPTH)) u_p2 (
        .clk,
        .a_en(1'b1), .a_we(wr_here && wr_kind == OBS_P2),
        .a_addr(filling ? PAW'(wr_addr) : PAW'(p_addr_f)), .a_wdata(wr_data),
        .a_rdata(p2_fo[gc][gb]),
        .b_en(1'b1), .b_we(1'b0), .b_addr(PAW'(p_addr_b)), .b_wdata('0),
        .b_rdata(p2_bo[gc][gb]));
    end
  end

  // Output selection; the read pointer is stable while the decoder runs.
  logic rsel_q;
  always_ff @(posedge clk) rsel_q <= rptr;

  always_comb begin
    for (int b = 0; b < N_DEC; b++) begin
      d_f[b] = d_fo[rsel_q][b];
      d_b[b] = d_bo[rsel_q][b];
      p_f[b] = p_sel ? p2_fo[rsel_q][b] : p1_fo[rsel_q][b];
      p_b[b] = p_sel ? p2_bo[rsel_q][b] : p1_bo[rsel_q][b];
    end
  end

  a_no_write_when_full: assert property (@(posedge clk) disable iff (!rst_n)
                                         wr_en |-> load_ready);

endmodule
