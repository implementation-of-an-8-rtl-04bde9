// fm_cache: feature-map cache, the on-chip store of one activation volume.
//
// Organised as DEPTH rows of eight 8-bit pixels.  Each column (lane) of a
// row is a separate partition with its own write enable, so one access
// moves a whole 8-pixel block row and a write can update any subset of its
// pixels.  An 8x8 block occupies eight consecutive rows; blocks of a channel
// follow each other in raster order, channels follow each other (the layout
// of the original design's cache, partitioned by column into 8 banks).
//
// Two independent ports (true dual-port block RAM).  Each port reads or
// writes one row per cycle; read data appears on rdata one cycle after
// en=1, we=0 (registered output).  A port's write updates the lanes whose
// be bit is set.  Writing the same row from both ports in one cycle is not
// allowed (checked by an assertion).
module fm_cache
  import cnn_pkg::*;
#(
  parameter int unsigned DEPTH = 131072,          // rows of 8 pixels
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic          clk,
  // port A
  input  logic          a_en,
  input  logic          a_we,
  input  logic [7:0]    a_be,
  input  logic [AW-1:0] a_addr,
  input  fm_row_t       a_wdata,
  output fm_row_t       a_rdata,
  // port B
  input  logic          b_en,
  input  logic          b_we,
  input  logic [7:0]    b_be,
  input  logic [AW-1:0] b_addr,
  input  fm_row_t       b_wdata,
  output fm_row_t       b_rdata
);

  fm_row_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) begin
        for (int c = 0; c < BLK; c++) if (a_be[c]) mem[a_addr][c] <= a_wdata[c];
      end else begin
        a_rdata <= mem[a_addr];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (b_en) begin
      if (b_we) begin
        for (int c = 0; c < BLK; c++) if (b_be[c]) mem[b_addr][c] <= b_wdata[c];
      end else begin
        b_rdata <= mem[b_addr];
      end
    end
  end

  a_no_write_collision: assert property (@(posedge clk)
    !(a_en && a_we && b_en && b_we && a_addr == b_addr && (a_be & b_be) != 0));

endmodule
