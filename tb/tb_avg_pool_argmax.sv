// tb_avg_pool_argmax: fills a model of the last feature map (32 channels of
// 8x8) with random non-negative pixels, runs the pooling unit and checks the
// winning channel and its pixel sum against a direct computation, including
// a tie (the lower channel must win).  Checks the NCH*8+2 cycle latency.
module tb_avg_pool_argmax;
  import cnn_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, rd_en, busy, done;
  logic [16:0] rd_addr;
  fm_row_t rd_data;
  logic [4:0] class_idx;
  logic signed [15:0] best_sum;
  int checks = 0, failures = 0;
  fm_row_t mem [256];

  avg_pool_argmax #(.NCH(32)) dut (.*);
  always #5 clk = ~clk;
  always_ff @(posedge clk) if (rd_en) rd_data <= mem[rd_addr[7:0]];

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 40; n++) begin
      int best, bi, cyc, s;
      for (int r = 0; r < 256; r++)
        for (int c = 0; c < 8; c++) mem[r][c] = act_t'($urandom_range(127, 0));
      if (n == 1) for (int r = 0; r < 256; r++) mem[r] = '0;          // all tie
      if (n == 2) begin                                               // tie of two
        for (int r = 0; r < 256; r++) mem[r] = '0;
        mem[5 * 8 + 3][2] = 9; mem[20 * 8][7] = 9;
      end
      best = -1; bi = 0;
      for (int ch = 0; ch < 32; ch++) begin
        s = 0;
        for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++) s += int'(mem[ch * 8 + r][c]);
        if (s > best) begin best = s; bi = ch; end
      end
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks += 3;
      if (cyc != 32 * 8 + 2) begin failures++; $display("FAIL latency %0d", cyc); end
      if (int'(class_idx) != bi) begin failures++; $display("FAIL n=%0d class %0d exp %0d", n, class_idx, bi); end
      if (int'(best_sum) != best) begin failures++; $display("FAIL n=%0d sum %0d exp %0d", n, best_sum, best); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
