// avg_pool_argmax: final average pooling and classification.
//
// After the last convolution the feature-map cache holds NCH channels of a
// single 8x8 block each (channel c in rows 8c..8c+7).  The unit reads these
// rows through one cache read port, one row per cycle, sums the 64 pixels of
// every channel and keeps the channel with the largest sum.  The sum is 64
// times the channel average, so comparing sums compares averages exactly;
// the first channel wins a tie.  class_idx is that channel's index and
// best_sum its pixel sum (average = best_sum / 64).
//
// Timing: start, then NCH*8 read cycles plus one cycle of read latency;
// done pulses for one cycle when class_idx is valid (NCH*8 + 2 cycles after
// start).  class_idx and best_sum hold until the next start.
module avg_pool_argmax
  import cnn_pkg::*;
#(
  parameter int unsigned NCH = 32,
  localparam int unsigned CW = $clog2(NCH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              rd_en,
  output logic [16:0]       rd_addr,
  input  fm_row_t           rd_data,
  output logic              busy,
  output logic              done,
  output logic [CW-1:0]     class_idx,
  output logic signed [15:0] best_sum
);

  localparam int unsigned NROWS = NCH * BLK;

  logic [CW+2:0]      rcnt;          // rows issued
  logic               reading, resp;
  logic [CW+2:0]      resp_row;      // row whose data is on rd_data
  logic signed [15:0] acc, row_sum, ch_sum;

  assign rd_en   = reading;
  assign rd_addr = 17'(rcnt);
  assign busy    = reading || resp;

  always_comb begin
    row_sum = '0;
    for (int c = 0; c < BLK; c++) row_sum += 16'(rd_data[c]);
    ch_sum = acc + row_sum;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reading   <= 1'b0;
      resp      <= 1'b0;
      done      <= 1'b0;
      rcnt      <= '0;
      resp_row  <= '0;
      acc       <= '0;
      class_idx <= '0;
      best_sum  <= '0;
    end else begin
      done <= 1'b0;
      resp <= reading;
      resp_row <= rcnt;
      if (start && !busy) begin
        reading <= 1'b1;
        rcnt    <= '0;
        acc     <= '0;
      end else if (reading) begin
        rcnt <= rcnt + 1'b1;
        if (rcnt == (CW+3)'(NROWS - 1)) reading <= 1'b0;
      end
      if (resp) begin
        if (resp_row[2:0] == 3'd7) begin
          acc <= '0;
          if (resp_row[CW+2:3] == '0 || ch_sum > best_sum) begin
            best_sum  <= ch_sum;
            class_idx <= resp_row[CW+2:3];
          end
          if (resp_row == (CW+3)'(NROWS - 1)) done <= 1'b1;
        end else begin
          acc <= ch_sum;
        end
      end
    end
  end

endmodule
