// conv_core: one convolution core (one output channel at a time).
//
// Holds a 3x3 kernel register array and an 8x8 output register array of
// ACC_W-bit results.  The padded 10x10 input block is shared by all cores
// and comes in on blk.  After start, the core slides the 3x3 window over
// the block one output row per cycle: eight conv_unit MACs work side by
// side on the eight pixels of row y, each on the window blk[y..y+2][x..x+2]
// (the local receptive field).  A block therefore takes 8 cycles; done
// pulses in the cycle after the last row is written, and out is stable until
// the next start.  k_load copies k_in into the kernel registers.
//
// A 1x1 kernel is handled by loading it as the centre tap of an otherwise
// zero 3x3 kernel.  Eight pixels per cycle follows the original design's unrolled
// inner convolution loop; the exact row-per-cycle schedule is this
// implementation's choice.
module conv_core
  import cnn_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    k_load,
  input  kernel_t k_in,
  input  act_t    blk [10][10],
  input  logic    start,
  output logic    busy,
  output logic    done,
  output acc_t    out [BLK][BLK]
);

  kernel_t    kernel;
  logic [2:0] row;
  kernel_t    lrf [BLK];
  acc_t       row_res [BLK];

  always_comb begin
    for (int x = 0; x < BLK; x++)
      for (int ky = 0; ky < 3; ky++)
        for (int kx = 0; kx < 3; kx++)
          lrf[x][ky*3+kx] = blk[int'(row)+ky][x+kx];
  end

  for (genvar x = 0; x < BLK; x++) begin : g_mac
    conv_unit u_mac (.window(lrf[x]), .kernel(kernel), .sum(row_res[x]));
  end

  always_ff @(posedge clk) begin
    if (k_load) kernel <= k_in;
    if (busy) out[row] <= row_res;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      row  <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        row  <= '0;
      end else if (busy) begin
        row <= row + 3'd1;
        if (row == 3'd7) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
