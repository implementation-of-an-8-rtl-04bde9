// tb_conv_core: loads random 10x10 blocks and kernels, runs the core and
// compares all 64 results with a direct 3x3 correlation; checks that a
// block takes 8 cycles (one output row per cycle).
module tb_conv_core;
  import cnn_pkg::*;
  logic    clk = 0, rst_n = 0, k_load = 0, start = 0, busy, done;
  kernel_t k_in;
  act_t    blk [10][10];
  acc_t    out [BLK][BLK];
  kernel_t kk;
  int checks = 0, failures = 0;

  conv_core dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 50; n++) begin
      int cyc;
      for (int t = 0; t < 9; t++) k_in[t] = act_t'($urandom);
      if (n == 0) for (int t = 0; t < 9; t++) k_in[t] = -128;
      for (int y = 0; y < 10; y++) for (int x = 0; x < 10; x++)
        blk[y][x] = (n == 0) ? -128 : act_t'($urandom);
      kk = k_in;
      k_load = 1;
      @(negedge clk);
      k_load = 0;
      k_in = '0;           // the core must keep the loaded kernel
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != 9) begin
        failures++;
        $display("FAIL latency %0d cycles from start to done, expected 9", cyc);
      end
      for (int y = 0; y < 8; y++) for (int x = 0; x < 8; x++) begin
        int e;
        e = 0;
        for (int ky = 0; ky < 3; ky++) for (int kx = 0; kx < 3; kx++)
          e += int'(blk[y+ky][x+kx]) * int'(kk[ky*3+kx]);
        checks++;
        if (int'(out[y][x]) != e) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d (%0d,%0d) got %0d exp %0d", n, y, x, out[y][x], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
