// conv_unit: multiply-accumulate unit of the convolution core.
//
// Nine 8x8-bit signed multipliers form the element-wise product of a 3x3
// convolution window (local receptive field) and a 3x3 kernel in parallel;
// a four-level adder tree sums the nine products.  The kernel is stored
// already flipped, so the unit computes a plain sum of products.  Purely
// combinational; the result has the fractional length fl_in + fl_w of the
// operands and needs at most 20 bits, returned sign-extended to ACC_W.
module conv_unit
  import cnn_pkg::*;
(
  input  kernel_t window,   // taps a1..a9, index ky*3+kx
  input  kernel_t kernel,   // weights w1..w9, same order
  output acc_t    sum
);

  logic signed [15:0] prod [KTAPS];
  logic signed [16:0] s1 [4];
  logic signed [17:0] s2 [2];
  logic signed [18:0] s3;

  always_comb begin
    for (int t = 0; t < KTAPS; t++) prod[t] = window[t] * kernel[t];
    for (int t = 0; t < 4; t++) s1[t] = 17'(prod[2*t]) + 17'(prod[2*t+1]);
    for (int t = 0; t < 2; t++) s2[t] = 18'(s1[2*t]) + 18'(s1[2*t+1]);
    s3  = 19'(s2[0]) + 19'(s2[1]);
    sum = ACC_W'(s3) + ACC_W'(prod[8]);
  end

endmodule
