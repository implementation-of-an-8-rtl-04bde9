// weights_cache: on-chip store of every weight of the network.
//
// ROWS rows of nine 8-bit weights, one partition per kernel tap, so a whole
// 3x3 kernel is read in one access.  3x3 layers hold one kernel per row;
// 1x1 layers pack nine consecutive weights per row.  Dual-port: port A reads
// or writes a row (writes come from the one-time load at power-up), port B
// only reads.  Read data is registered: it appears one cycle after en=1.
module weights_cache
  import cnn_pkg::*;
#(
  parameter int unsigned ROWS = 199366,
  localparam int unsigned AW = $clog2(ROWS)
) (
  input  logic          clk,
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  wrow_t         a_wdata,
  output wrow_t         a_rdata,
  input  logic          b_en,
  input  logic [AW-1:0] b_addr,
  output wrow_t         b_rdata
);

  wrow_t mem [ROWS];

  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) mem[a_addr] <= a_wdata;
      else      a_rdata     <= mem[a_addr];
    end
  end

  always_ff @(posedge clk) begin
    if (b_en) b_rdata <= mem[b_addr];
  end

endmodule
