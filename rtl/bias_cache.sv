// bias_cache: on-chip store of the biases, one 8-bit entry per output
// channel of every layer, layers one after another.
//
// Single port: a write (en=1, we=1) stores wdata; a read (en=1, we=0)
// returns the entry on rdata one cycle later.
module bias_cache
  import cnn_pkg::*;
#(
  parameter int unsigned ENTRIES = 3456,
  localparam int unsigned AW = $clog2(ENTRIES)
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  act_t          wdata,
  output act_t          rdata
);

  act_t mem [ENTRIES];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
