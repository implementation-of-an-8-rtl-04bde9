// alu_row: arithmetic logic unit, applied to one 8-pixel row of a block.
//
// Output channel values are built up over the input channels: for each
// input channel the convolution result is added to the partial sum already
// stored in the output feature-map cache, and after the last input channel
// the bias is added and ReLU applied.  All three operands have their own
// fractional length: the convolution result fl_in+fl_w, the stored partial
// sum fl_out, the bias fl_w.  They are aligned to the common fractional
// length fl_w + max(fl_in,0), which is at least as fine as each of them, so
// the alignment shifts are all left shifts (this includes the zero extension
// of values with a negative fractional length) and lose nothing.  The sum is
// then brought to fl_out by an arithmetic right shift with round to nearest
// (ties towards +infinity: add half an LSB, then shift) and saturated to
// [-128, +127].
//
// first: no stored partial sum yet (first input channel), stored is ignored.
// last:  last input channel, add bias and apply ReLU.
// Purely combinational.  sat and relu report, per row, whether any lane was
// saturated or zeroed by ReLU.  The single final rounding per input channel
// and the common alignment format are this implementation's choices.
module alu_row
  import cnn_pkg::*;
(
  input  acc_t    conv [BLK],
  input  fm_row_t stored,
  input  act_t    bias,
  input  fl_t     fl_in,
  input  fl_t     fl_w,
  input  fl_t     fl_out,
  input  logic    first,
  input  logic    last,
  output fm_row_t res,
  output logic    sat,
  output logic    relu
);

  localparam int IW = 48;
  typedef logic signed [IW-1:0] wide_t;

  int    sh_conv, sh_stored, sh_bias, sh_out;
  wide_t sum, half, q;

  always_comb begin
    sh_conv   = (fl_in < 0) ? -int'(fl_in) : 0;
    sh_bias   = (fl_in > 0) ?  int'(fl_in) : 0;
    sh_stored = int'(fl_w) + sh_bias - int'(fl_out);
    sh_out    = sh_stored;
    sat  = 1'b0;
    relu = 1'b0;
    res  = '0;
    for (int c = 0; c < BLK; c++) begin
      sum = wide_t'(conv[c]) <<< sh_conv;
      if (!first) sum += wide_t'(stored[c]) <<< sh_stored;
      if (last)   sum += wide_t'(bias) <<< sh_bias;
      half = (sh_out > 0) ? (wide_t'(1) <<< (sh_out - 1)) : '0;
      q    = (sum + half) >>> sh_out;
      if (last && q < 0) begin
        q    = '0;
        relu = 1'b1;
      end
      if (q > 127) begin
        res[c] = 8'sd127;
        sat    = 1'b1;
      end else if (q < -128) begin
        res[c] = -8'sd128;
        sat    = 1'b1;
      end else begin
        res[c] = act_t'(q);
      end
    end
  end

endmodule
