// mem_ctrl: memory controller, the address arithmetic of the accelerator.
//
// Given the current layer definition and loop position (input channel ci,
// block (bx, by) of the input map, first output channel co0 of the group of
// output channels in flight, core index k and output row) it returns the
// cache offsets the datapath needs:
//  * w_row_a/w_row_b: the two weight-cache rows to read in kernel-fetch
//    step kstep.  A 3x3 kernel for (ci, co) is one row, w_row_base +
//    ci*CHout + co, and step s reads the kernels of cores 2s and 2s+1.  1x1
//    weights are packed nine per row at element ci*CHout + co, so the group
//    lies in rows e/9 and e/9+1 and w_lane gives the partition of core 0.
//  * bias_addr: b_base + co for core k (biases are per layer, not per
//    concatenated channel).
//  * dst_addr/dst_mask: the output-cache row and lanes written for a row of
//    the core's result.  With stride 1 result row y goes to row y of the
//    same block of output channel ch_base+co.  With stride 2 only even
//    result rows and columns are kept: the 4x4 result lands in quadrant
//    (bx&1, by&1) of output block (bx>>1, by>>1), rows (by&1)*4 + y/2.
// Purely combinational.  Block geometry and weight layout follow the
// accelerator's cache organisation; the ordering of kernels in the weight
// cache (ci-major) is this implementation's choice.
module mem_ctrl
  import cnn_pkg::*;
(
  input  layer_def_t  def,
  input  logic [9:0]  ci,
  input  logic [9:0]  co0,
  input  logic [4:0]  bx,
  input  logic [4:0]  by,
  input  logic [2:0]  kstep,
  input  logic [3:0]  k,
  input  logic [2:0]  y,        // result row
  output logic [17:0] w_row_a,
  output logic [17:0] w_row_b,
  output logic [3:0]  w_lane,
  output logic [11:0] bias_addr,
  output logic [16:0] dst_addr,
  output logic [7:0]  dst_mask
);

  logic [19:0] e;
  logic [9:0]  co_k, ch_o;
  logic [2:0]  lg_out, drow;
  logic [4:0]  obx, oby;

  always_comb begin
    e = 20'(ci) * 20'(def.net.ch_out) + 20'(co0);
    if (def.net.k3) begin
      w_row_a = def.w_row_base + 18'(e) + 18'({kstep, 1'b0});
      w_row_b = w_row_a + 18'd1;
      w_lane  = '0;
    end else begin
      w_row_a = def.w_row_base + 18'(e / 20'd9);
      w_row_b = w_row_a + 18'd1;
      w_lane  = 4'(e % 20'd9);
    end

    co_k      = co0 + 10'(k);
    ch_o      = def.ch_base + co_k;
    bias_addr = def.b_base + 12'(co_k);

    if (def.net.stride2) begin
      lg_out   = def.net.lg_bps - 3'd1;
      obx      = bx >> 1;
      oby      = by >> 1;
      drow     = {by[0], y[2:1]};
      dst_mask = bx[0] ? 8'hF0 : 8'h0F;
    end else begin
      lg_out   = def.net.lg_bps;
      obx      = bx;
      oby      = by;
      drow     = y;
      dst_mask = 8'hFF;
    end
    dst_addr = fm_row_addr(ch_o, obx, oby, drow, lg_out);
  end

endmodule
