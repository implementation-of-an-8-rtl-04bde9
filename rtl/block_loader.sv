// block_loader: fills the 10x10 input register array with one padded block.
//
// The 8x8 block (bx, by) of channel ch goes to the centre of the array; the
// one-pixel border around it is taken from the neighbouring blocks of the
// same channel (the row above, the row below, the column to the left and to
// the right, corners from the diagonal blocks) or set to zero where the
// block lies on the edge of the feature map.  This is the padding rule of
// the accelerator; it keeps a 3x3 convolution's output the size of its
// input.
//
// The array is filled from 30 cache rows: for each of the 10 padded rows,
// the row of the left neighbour (its lane 7 gives column 0), of the block
// itself (columns 1..8) and of the right neighbour (its lane 0 gives column
// 9).  Both cache ports are used, two rows per cycle, so a load takes 15
// issue cycles plus one cycle of read latency; done pulses when the array
// is complete.  Rows that would lie outside the map are not read and give
// zeros.  Reading all three neighbours for every padded row, and the issue
// order, are this implementation's choices.
module block_loader
  import cnn_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [9:0]  ch,
  input  logic [4:0]  bx,
  input  logic [4:0]  by,
  input  logic [2:0]  lg_bps,      // log2 blocks per side of the map
  // two read ports of the feature-map cache (1-cycle latency)
  output logic        a_en,
  output logic [16:0] a_addr,
  input  fm_row_t     a_rdata,
  output logic        b_en,
  output logic [16:0] b_addr,
  input  fm_row_t     b_rdata,
  output logic        busy,
  output logic        done,
  output act_t        blk [10][10]
);

  typedef struct packed {
    logic       valid;   // a row was read (inside the map)
    logic [3:0] pr;      // padded row 0..9
    logic [1:0] sd;      // 0 left, 1 centre, 2 right
  } item_t;

  logic [3:0] step;      // issue cycle 0..14
  logic       issuing;
  logic       resp;      // response cycle active
  item_t      ia, ib, ra, rb;
  logic [16:0] addr_a_c, addr_b_c;
  logic [4:0]  last_b;

  assign last_b = 5'((1 << lg_bps) - 1);

  function automatic item_t mk_item(logic [4:0] k, logic [4:0] x, logic [4:0] y,
                                    logic [4:0] lastb, output logic [16:0] addr,
                                    input logic [9:0] c, input logic [2:0] lg);
    item_t it;
    logic [4:0] yy, xx;
    logic [2:0] r;
    logic ok;
    it.pr = 4'(k / 5'd3);
    it.sd = 2'(k % 5'd3);
    ok = 1'b1;
    yy = y; xx = x; r = 3'(it.pr - 4'd1);
    if (it.pr == 4'd0) begin ok &= (y != 0);     yy = y - 5'd1; r = 3'd7; end
    if (it.pr == 4'd9) begin ok &= (y != lastb); yy = y + 5'd1; r = 3'd0; end
    if (it.sd == 2'd0) begin ok &= (x != 0);     xx = x - 5'd1; end
    if (it.sd == 2'd2) begin ok &= (x != lastb); xx = x + 5'd1; end
    it.valid = ok;
    addr = fm_row_addr(c, xx, yy, r, lg);
    return it;
  endfunction

  always_comb begin
    ia = mk_item(5'(2 * step),     bx, by, last_b, addr_a_c, ch, lg_bps);
    ib = mk_item(5'(2 * step + 1), bx, by, last_b, addr_b_c, ch, lg_bps);
    a_en   = issuing && ia.valid;
    b_en   = issuing && ib.valid;
    a_addr = addr_a_c;
    b_addr = addr_b_c;
  end

  assign busy = issuing || resp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issuing <= 1'b0;
      resp    <= 1'b0;
      done    <= 1'b0;
      step    <= '0;
      ra      <= '0;
      rb      <= '0;
    end else begin
      done <= 1'b0;
      resp <= issuing;
      if (issuing) begin
        ra <= ia;
        rb <= ib;
      end
      if (start && !busy) begin
        issuing <= 1'b1;
        step    <= '0;
      end else if (issuing) begin
        step <= step + 4'd1;
        if (step == 4'd14) issuing <= 1'b0;
      end
      if (resp && !issuing) done <= 1'b1;
    end
  end

  // write the returned rows into the register array
  always_ff @(posedge clk) begin
    if (resp) begin
      if (ra.sd == 2'd0)      blk[ra.pr][0] <= ra.valid ? a_rdata[7] : '0;
      else if (ra.sd == 2'd2) blk[ra.pr][9] <= ra.valid ? a_rdata[0] : '0;
      else for (int c = 0; c < BLK; c++) blk[ra.pr][c+1] <= ra.valid ? a_rdata[c] : '0;
      if (rb.sd == 2'd0)      blk[rb.pr][0] <= rb.valid ? b_rdata[7] : '0;
      else if (rb.sd == 2'd2) blk[rb.pr][9] <= rb.valid ? b_rdata[0] : '0;
      else for (int c = 0; c < BLK; c++) blk[rb.pr][c+1] <= rb.valid ? b_rdata[c] : '0;
    end
  end

endmodule
