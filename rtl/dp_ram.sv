// dp_ram: true dual-port synchronous RAM, the block-RAM model used for every
// memory of the decoder (observations, a priori / extrinsic / a posteriori
// values, interleaver tables in the encoder). Each port reads or writes one
// word per cycle; a read returns the word one cycle after the address
// (registered output, like an FPGA block RAM). Writing the same address from
// both ports in one cycle is not allowed (checked by an assertion); a read of
// an address written in the same cycle returns the old word.
module dp_ram #(
  parameter int WIDTH = 6,
  parameter int DEPTH = 44,
  localparam int AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             a_en,
  input  logic             a_we,
  input  logic [AW-1:0]    a_addr,
  input  logic [WIDTH-1:0] a_wdata,
  output logic [WIDTH-1:0] a_rdata,
  input  logic             b_en,
  input  logic             b_we,
  input  logic [AW-1:0]    b_addr,
  input  logic [WIDTH-1:0] b_wdata,
  output logic [WIDTH-1:0] b_rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) mem[a_addr] <= a_wdata;
      a_rdata <= mem[a_addr];
    end
  end

  always_ff @(posedge clk) begin
    if (b_en) begin
      if (b_we) mem[b_addr] <= b_wdata;
      b_rdata <= mem[b_addr];
    end
  end

  a_no_double_write: assert property (@(posedge clk)
    !(a_en && a_we && b_en && b_we && a_addr == b_addr));

endmodule
