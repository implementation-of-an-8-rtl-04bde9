// tb_cnn_accel: end-to-end test of the accelerator at its default sizes.
//
// Generates random weights, biases and two random 3x256x256 images, streams
// them into the accelerator, and compares against a reference model written
// pixel by pixel (no blocks, no padding buffers): for every layer, output
// channel and pixel it sums the products over the kernel window with zero
// outside the map, then folds in each input channel in turn exactly as the
// arithmetic unit is specified (align, add the stored 8-bit partial sum,
// add bias and ReLU on the last input channel, round half up, saturate).
//
// Checks: the whole conv10 output volume, the whole fire9 expand output
// volume (left in the other cache), the class index of both images, and that
// the second start loads only the image.  Counts the mechanisms the design
// has -- stride-2 layers, 1x1 layers, fire concatenation, zero padding and
// neighbour padding, saturation, ReLU, skipped weight reload, pooling -- and
// fails if one never happened.  Weight magnitudes are chosen per layer so
// activations neither die out nor all saturate.
module tb_cnn_accel;
  import cnn_pkg::*;

  localparam int unsigned W_ROWS   = 199366;
  localparam int unsigned N_BIAS   = 3456;
  localparam int unsigned IMG_ROWS = 24576;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0;
  logic        ld_valid = 1'b0;
  logic        ld_ready;
  logic [71:0] ld_data = '0;
  logic        busy, done;
  logic [4:0]  class_idx;

  cnn_accel dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ------------------------------------------------------------ stimulus
  byte wmem [W_ROWS][9];
  byte bmem [N_BIAS];
  byte img  [2][3*256*256];        // (c*256 + y)*256 + x

  // layer table copied into plain integers
  int L_cin [N_LAYERS], L_cout [N_LAYERS], L_H [N_LAYERS], L_s [N_LAYERS];
  int L_k3 [N_LAYERS], L_fli [N_LAYERS], L_flw [N_LAYERS], L_flo [N_LAYERS];
  int L_wbase [N_LAYERS], L_ex3 [N_LAYERS + 1], L_wrows [N_LAYERS];

  task automatic init_table();
    int wb;
    wb = 0;
    for (int l = 0; l < N_LAYERS; l++) begin
      L_cin[l]  = int'(NET[l].ch_in);
      L_cout[l] = int'(NET[l].ch_out);
      L_H[l]    = 8 << NET[l].lg_bps;
      L_s[l]    = NET[l].stride2 ? 2 : 1;
      L_k3[l]   = NET[l].k3 ? 1 : 0;
      L_fli[l]  = int'(NET[l].fl_in);
      L_flw[l]  = int'(NET[l].fl_w);
      L_flo[l]  = int'(NET[l].fl_out);
      L_wrows[l] = L_k3[l] ? L_cin[l] * L_cout[l] : (L_cin[l] * L_cout[l] + 8) / 9;
      L_wbase[l] = wb;
      wb += L_wrows[l];
      // second branch of a fire module: 3x3 after a 1x1 of the same shape
      L_ex3[l]  = (l > 0 && L_k3[l] == 1 && L_s[l] == 1 && L_k3[l-1] == 0 &&
                   L_cin[l] == L_cin[l-1] && L_cout[l] == L_cout[l-1]) ? 1 : 0;
    end
    L_ex3[N_LAYERS] = 0;
  endtask

  function automatic int w_at(int l, int ci, int co, int t);
    int e;
    e = ci * L_cout[l] + co;
    if (L_k3[l] != 0) return int'(wmem[L_wbase[l] + e][t]);
    return (t == 4) ? int'(wmem[L_wbase[l] + e / 9][e % 9]) : 0;
  endfunction

  task automatic gen_params();
    int row;
    row = 0;
    for (int l = 0; l < N_LAYERS; l++) begin
      real s, n, a;
      int  amp, nr, e;
      e  = L_fli[l] + L_flw[l] - L_flo[l];
      s  = real'(longint'(1) << e);
      n  = real'(L_cin[l] * (L_k3[l] != 0 ? 9 : 1));
      a  = 70.0 * s / (25.0 * $sqrt(n));
      amp = (a < 1.0) ? 1 : (a > 127.0) ? 127 : int'(a);
      nr = L_wrows[l];
      for (int r = 0; r < nr; r++)
        for (int t = 0; t < 9; t++)
          wmem[row + r][t] = byte'(int'($urandom_range(2 * amp, 0)) - amp);
      row += nr;
    end
    for (int b = 0; b < N_BIAS; b++) bmem[b] = byte'(int'($urandom_range(60, 0)) - 20);
    for (int i = 0; i < 2; i++)
      for (int p = 0; p < 3*256*256; p++) img[i][p] = byte'($urandom_range(127, 0));
  endtask

  // ------------------------------------------------------------ reference
  function automatic int rnd_sat(longint v, int sh, bit relu);
    longint q;
    q = (sh > 0) ? ((v + (64'sd1 <<< (sh - 1))) >>> sh) : v;
    if (relu && q < 0) q = 0;
    if (q > 127) q = 127;
    if (q < -128) q = -128;
    return int'(q);
  endfunction

  byte fin [];    // current layer input, (c*H + y)*W + x
  byte fout [];
  byte f9 [];     // fire9 expand output (concatenated)
  byte c10 [];    // conv10 output

  task automatic reference(int im, output int cls);
    byte prev_in [];
    int  H, Ho, s, cin, cout, base, bias_base, shc, shb, shs;
    longint acc;
    bit  ex3;
    fin = new[3*256*256];
    foreach (img[im][p]) fin[p] = img[im][p];
    bias_base = 0;
    for (int l = 0; l < N_LAYERS; l++) begin
      H    = L_H[l];
      s    = L_s[l];
      Ho   = H / s;
      cin  = L_cin[l];
      cout = L_cout[l];
      ex3  = L_ex3[l] != 0;
      shc  = (L_fli[l] < 0) ? -L_fli[l] : 0;
      shb  = (L_fli[l] > 0) ?  L_fli[l] : 0;
      shs  = L_flw[l] + shb - L_flo[l];
      if (ex3) begin
        fin  = prev_in;
        base = cout;
      end else begin
        base = 0;
        fout = new[((L_ex3[l + 1] != 0) ? 2 * cout : cout) * Ho * Ho];
      end
      for (int co = 0; co < cout; co++)
        for (int oy = 0; oy < Ho; oy++)
          for (int ox = 0; ox < Ho; ox++) begin
            int part;
            part = 0;
            for (int ci = 0; ci < cin; ci++) begin
              acc = 0;
              for (int t = 0; t < 9; t++) begin
                int iy, ix;
                iy = s * oy + t / 3 - 1;
                ix = s * ox + t % 3 - 1;
                if (iy >= 0 && iy < H && ix >= 0 && ix < H)
                  acc += longint'(fin[(ci * H + iy) * H + ix]) * w_at(l, ci, co, t);
              end
              acc = acc <<< shc;
              if (ci > 0) acc += longint'(part) <<< shs;
              if (ci == cin - 1) acc += longint'(bmem[bias_base + co]) <<< shb;
              part = rnd_sat(acc, shs, ci == cin - 1);
            end
            fout[((base + co) * Ho + oy) * Ho + ox] = byte'(part);
          end
      bias_base += cout;
      prev_in = fin;
      if (L_ex3[l + 1] == 0) begin
        fin = fout;
        if (l == 24) f9 = fout;
      end
    end
    c10 = fin;
    begin
      int best, sum;
      best = 0; cls = 0;
      for (int c = 0; c < 32; c++) begin
        sum = 0;
        for (int p = 0; p < 64; p++) sum += int'(c10[c * 64 + p]);
        if (c == 0 || sum > best) begin best = sum; cls = c; end
      end
    end
  endtask

  // ------------------------------------------------------------ driving
  int words_sent;

  // called at a falling edge; the word is taken at the next rising edge
  // at which ld_ready is high
  task automatic send(logic [71:0] d);
    ld_valid = 1'b1;
    ld_data  = d;
    while (!ld_ready) @(negedge clk);
    @(negedge clk);
    words_sent++;
  endtask

  task automatic run_image(int im, bit with_params);
    logic [71:0] w;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    if (with_params) begin
      for (int r = 0; r < W_ROWS; r++) begin
        for (int t = 0; t < 9; t++) w[8*t +: 8] = wmem[r][t];
        send(w);
      end
      for (int b = 0; b < N_BIAS; b++) send({64'd0, bmem[b]});
    end
    for (int c = 0; c < 3; c++)
      for (int by = 0; by < 32; by++)
        for (int bx = 0; bx < 32; bx++)
          for (int r = 0; r < 8; r++) begin
            w = '0;
            for (int x = 0; x < 8; x++)
              w[8*x +: 8] = img[im][(c * 256 + by * 8 + r) * 256 + bx * 8 + x];
            send(w);
          end
    ld_valid = 1'b0;
  endtask

  // ------------------------------------------------------------ mechanisms
  int n_stride2, n_1x1, n_concat, n_padzero, n_padnbr, n_sat, n_relu, n_pool;
  int n_skipload;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_main.state == dut.u_main.S_LAYER) begin
      if (dut.def.net.stride2) n_stride2++;
      if (!dut.def.net.k3) n_1x1++;
      if (dut.def.ch_base != 0) n_concat++;
    end
    if (dut.u_loader.issuing) begin
      if (dut.u_loader.ia.valid && dut.u_loader.ia.sd != 1) n_padnbr++;
      if (!dut.u_loader.ia.valid) n_padzero++;
    end
    if (dut.u_main.ev_sat)  n_sat++;
    if (dut.u_main.ev_relu) n_relu++;
    if (dut.u_main.pool_start) n_pool++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic compare_volumes();
    int bad;
    // conv10 output: 32 channels, one 8x8 block each, in cache 0
    bad = 0;
    for (int c = 0; c < 32; c++)
      for (int y = 0; y < 8; y++)
        for (int x = 0; x < 8; x++)
          if (dut.u_fm0.mem[c * 8 + y][x] !== c10[(c * 8 + y) * 8 + x]) bad++;
    check(bad == 0, $sformatf("conv10 volume: %0d pixels differ", bad));
    // fire9 expand output: 736 channels of 8x8, in cache 1
    bad = 0;
    for (int c = 0; c < 736; c++)
      for (int y = 0; y < 8; y++)
        for (int x = 0; x < 8; x++)
          if (dut.u_fm1.mem[c * 8 + y][x] !== f9[(c * 8 + y) * 8 + x]) bad++;
    check(bad == 0, $sformatf("fire9 expand volume: %0d pixels differ", bad));
  endtask

  longint t0;
  int cls_exp;

  initial begin
    init_table();
    gen_params();
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    for (int im = 0; im < 2; im++) begin
      words_sent = 0;
      t0 = $time;
      fork
        run_image(im, im == 0);
        reference(im, cls_exp);
      join
      wait (done);
      $display("image %0d: class %0d (expected %0d), %0d load words, %0d cycles",
               im, class_idx, cls_exp, words_sent, ($time - t0) / 10);
      check(class_idx == 5'(cls_exp), "class index");
      compare_volumes();
      if (im == 1) begin
        check(words_sent == IMG_ROWS, "second start loads the image only");
        if (words_sent == IMG_ROWS) n_skipload++;
      end
      @(posedge clk);
    end

    $display("mechanisms: stride2 layers %0d, 1x1 layers %0d, concat %0d, zero pad %0d, neighbour pad %0d, saturated rows %0d, relu rows %0d, pooling %0d, reload skipped %0d",
             n_stride2, n_1x1, n_concat, n_padzero, n_padnbr, n_sat, n_relu, n_pool, n_skipload);
    check(n_stride2 > 0, "stride-2 layer ran");
    check(n_1x1 > 0, "1x1 layer ran");
    check(n_concat > 0, "fire concatenation ran");
    check(n_padzero > 0, "zero padding happened");
    check(n_padnbr > 0, "neighbour padding happened");
    check(n_sat > 0, "saturation happened");
    check(n_relu > 0, "ReLU zeroing happened");
    check(n_pool > 0, "pooling ran");
    check(n_skipload > 0, "weight reload skipped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
