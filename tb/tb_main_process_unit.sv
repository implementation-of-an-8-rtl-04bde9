// tb_main_process_unit: runs the controller through two whole inferences
// with simple stand-ins for the datapath around it (block loader, cores and
// caches answer after fixed latencies), and counts what it asks for.
//
// Checks: every weight row, bias and image row of the load stream is
// accepted and written once; the second start skips straight to the image;
// the number of block loads is the sum over layers of input channels times
// blocks, the number of core runs that times the output-channel groups of
// NCORE; pooling reads the 32 class channels and picks the class whose
// channel holds the largest values; and the cycle count of one inference
// (loads excluded) is within 10 % of the 22.2 M cycles that 222 ms at
// 100 MHz comes to.
module tb_main_process_unit;
  import cnn_pkg::*;
  localparam int unsigned NCORE = 8, W_ROWS = 199366, N_BIAS = 3456, IMG_ROWS = 24576;
  localparam int TARGET = 7;

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [4:0] class_idx, layer_idx;
  logic ld_valid = 0, ld_ready;
  logic [71:0] ld_data = '0;
  layer_def_t def;
  logic w_a_en, w_a_we, w_b_en, b_en, b_we, in_sel, pool_rd_en, o_a_en, o_b_en;
  logic [17:0] w_a_addr, w_b_addr;
  wrow_t w_a_wdata, w_a_rdata, w_b_rdata;
  logic [11:0] b_addr;
  act_t b_wdata, b_rdata;
  logic [16:0] pool_rd_addr, o_a_addr, o_b_addr;
  fm_row_t pool_rd_data, o_a_rdata, o_b_wdata;
  logic [7:0] o_b_be;
  logic ld_blk_start, ld_blk_done = 0;
  logic [9:0] blk_ch;
  logic [4:0] blk_bx, blk_by;
  logic [2:0] blk_lg_bps;
  logic [NCORE-1:0] k_load;
  kernel_t k_in [NCORE];
  logic conv_start, conv_done = 0;
  acc_t core_out [NCORE][BLK][BLK];
  logic ev_sat, ev_relu;

  main_process_unit #(.NCORE(NCORE), .W_ROWS(W_ROWS), .N_BIAS(N_BIAS), .IMG_ROWS(IMG_ROWS)) dut (.*);
  layer_def_rom u_rom (.clk, .idx(layer_idx), .def);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  // stand-ins: fixed-latency loader and cores, zero data, pooling source
  int ld_cnt = 0, cv_cnt = 0;
  always_ff @(posedge clk) begin
    if (ld_blk_start) ld_cnt <= 17; else if (ld_cnt != 0) ld_cnt <= ld_cnt - 1;
    ld_blk_done <= (ld_cnt == 2);
    if (conv_start) cv_cnt <= 9; else if (cv_cnt != 0) cv_cnt <= cv_cnt - 1;
    conv_done <= (cv_cnt == 2);
    w_a_rdata <= '{default: '0};
    w_b_rdata <= '{default: '0};
    b_rdata   <= '0;
    o_a_rdata <= '{default: '0};
    for (int x = 0; x < 8; x++)
      pool_rd_data[x] <= (int'(pool_rd_addr) / 8 == TARGET) ? 8'sd90 : act_t'(int'(pool_rd_addr % 7) - 3);
  end
  always_comb
    for (int c = 0; c < NCORE; c++) core_out[c] = '{default: '{default: '0}};

  // counters
  longint n_wwr, n_bwr, n_imgwr, n_blk, n_conv, n_pool_rd;
  always_ff @(posedge clk) if (rst_n) begin
    if (w_a_en && w_a_we) n_wwr++;
    if (b_en && b_we) n_bwr++;
    if (o_b_en && ld_ready && ld_valid) n_imgwr++;
    if (ld_blk_start) n_blk++;
    if (conv_start) n_conv++;
    if (pool_rd_en) n_pool_rd++;
  end

  task automatic send(logic [71:0] d);
    ld_valid = 1; ld_data = d;
    while (!ld_ready) @(negedge clk);
    @(negedge clk);
  endtask

  longint exp_blk, exp_conv, t_run;
  int CI [26] = '{3,64,16,16,128,16,16,128,32,32,256,32,32,256,64,64,512,64,64,384,112,112,512,112,112,736};
  int CO [26] = '{64,16,64,64,16,64,64,32,128,128,32,128,128,64,256,256,64,192,192,112,256,256,112,368,368,32};
  int SZ [26] = '{256,128,64,64,64,64,64,64,32,32,32,32,32,32,16,16,16,16,16,16,8,8,8,8,8,8};

  initial begin
    exp_blk = 0; exp_conv = 0;
    for (int l = 0; l < 26; l++) begin
      longint b;
      b = longint'(CI[l]) * (SZ[l] / 8) * (SZ[l] / 8);
      exp_blk += b;
      exp_conv += b * (CO[l] / NCORE);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int im = 0; im < 2; im++) begin
      longint t0;
      n_wwr = 0; n_bwr = 0; n_imgwr = 0; n_blk = 0; n_conv = 0; n_pool_rd = 0;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      if (im == 0) begin
        for (int r = 0; r < W_ROWS; r++) send(72'(r));
        for (int b = 0; b < N_BIAS; b++) send(72'(b));
      end
      for (int r = 0; r < IMG_ROWS; r++) send(72'(r));
      ld_valid = 0;
      t0 = longint'($time / 10);
      while (!done) @(negedge clk);
      t_run = longint'($time / 10) - t0;
      $display("image %0d: %0d cycles after load, %0d block loads, %0d core runs, class %0d",
               im, t_run, n_blk, n_conv, class_idx);
      chk(n_wwr == (im == 0 ? W_ROWS : 0), "weight rows written");
      chk(n_bwr == (im == 0 ? N_BIAS : 0), "biases written");
      chk(n_imgwr == IMG_ROWS, "image rows written");
      chk(n_blk == exp_blk, $sformatf("block loads %0d expected %0d", n_blk, exp_blk));
      chk(n_conv == exp_conv, $sformatf("core runs %0d expected %0d", n_conv, exp_conv));
      chk(n_pool_rd == 32 * 8, "pooling reads");
      chk(class_idx == 5'(TARGET), "class index");
      chk(t_run > 19_980_000 && t_run < 24_420_000, "inference latency within 10 % of 22.2 M cycles");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
