// tb_alu_row: checks the arithmetic logic unit against a model in real
// arithmetic: the exact value conv*2^-(fl_in+fl_w) + stored*2^-fl_out +
// bias*2^-fl_w is scaled to fl_out, rounded half up, ReLU'd on the last
// input channel and clipped to [-128, 127].  Uses the fractional lengths of
// every layer of the network plus random ones, and checks that saturation
// and ReLU are both reported.
module tb_alu_row;
  import cnn_pkg::*;
  acc_t    conv [BLK];
  fm_row_t stored, res;
  act_t    bias;
  fl_t     fl_in, fl_w, fl_out;
  logic    first, last, sat, relu;
  int checks = 0, failures = 0, n_sat = 0, n_relu = 0;

  alu_row dut (.*);

  function automatic real p2(int e);
    real r;
    r = 1.0;
    for (int i = 0; i < e; i++) r = r * 2.0;
    for (int i = 0; i > e; i--) r = r / 2.0;
    return r;
  endfunction

  initial begin
    for (int n = 0; n < 20000; n++) begin
      int l;
      bit any_sat, any_relu;
      l = n % N_LAYERS;
      fl_in = NET[l].fl_in; fl_w = NET[l].fl_w; fl_out = NET[l].fl_out;
      first = $urandom_range(1, 0);
      last  = $urandom_range(1, 0);
      bias  = act_t'($urandom);
      stored = fm_row_t'({$urandom, $urandom});
      for (int c = 0; c < BLK; c++) begin
        int mag;
        mag = 1 << $urandom_range(19, 4);
        conv[c] = acc_t'(int'($urandom_range(2 * mag, 0)) - mag);
      end
      #1;
      any_sat = 0; any_relu = 0;
      for (int c = 0; c < BLK; c++) begin
        real v, q;
        int  e;
        v = real'(conv[c]) * p2(-(int'(fl_in) + int'(fl_w)));
        if (!first) v += real'(stored[c]) * p2(-int'(fl_out));
        if (last)   v += real'(bias) * p2(-int'(fl_w));
        q = $floor(v * p2(int'(fl_out)) + 0.5);
        if (last && q < 0) begin q = 0; any_relu = 1; end
        if (q > 127.0) begin q = 127; any_sat = 1; end
        if (q < -128.0) begin q = -128; any_sat = 1; end
        e = int'(q);
        checks++;
        if (int'(res[c]) != e) begin
          failures++;
          if (failures < 10)
            $display("FAIL n=%0d lane %0d fl=(%0d,%0d,%0d) conv=%0d st=%0d b=%0d f=%0d l=%0d got %0d exp %0d",
                     n, c, fl_in, fl_w, fl_out, conv[c], stored[c], bias, first, last, res[c], e);
        end
      end
      checks++;
      if (sat != any_sat || relu != any_relu) begin
        failures++;
        $display("FAIL n=%0d flags sat=%0d/%0d relu=%0d/%0d", n, sat, any_sat, relu, any_relu);
      end
      n_sat += any_sat; n_relu += any_relu;
    end
    checks++;
    if (n_sat == 0 || n_relu == 0) failures++;
    $display("saturating rows %0d, relu rows %0d", n_sat, n_relu);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
