// tb_block_loader: fills a feature-map model with random pixels, loads
// random blocks of random channels for every map size, and checks all 100
// entries of the padded block: the block itself in the centre, neighbour
// pixels on the border, zeros where the border falls outside the map.
// Also checks the load time (15 issue cycles + 1 latency cycle).
module tb_block_loader;
  import cnn_pkg::*;
  logic        clk = 0, rst_n = 0, start = 0;
  logic [9:0]  ch;
  logic [4:0]  bx, by;
  logic [2:0]  lg_bps;
  logic        a_en, b_en, busy, done;
  logic [16:0] a_addr, b_addr;
  fm_row_t     a_rdata, b_rdata;
  act_t        blk [10][10];
  int checks = 0, failures = 0, n_zero = 0, n_nbr = 0;

  localparam int ROWS = 1 << 16;
  fm_row_t mem [ROWS];

  block_loader dut (.*);
  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (a_en) a_rdata <= mem[a_addr[15:0]];
    if (b_en) b_rdata <= mem[b_addr[15:0]];
  end

  // pixel (x, y) of channel c in a map of S x S pixels; zero outside
  function automatic int pix(int c, int x, int y, int S);
    int bps, row;
    if (x < 0 || y < 0 || x >= S || y >= S) return 0;
    bps = S / 8;
    row = ((c * bps + y / 8) * bps + x / 8) * 8 + y % 8;
    return int'(mem[row][x % 8]);
  endfunction

  initial begin
    for (int r = 0; r < ROWS; r++) mem[r] = fm_row_t'({$urandom, $urandom});
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      int S, cyc, bps;
      lg_bps = 3'($urandom_range(5, 0));
      bps = 1 << lg_bps;
      S  = 8 * bps;
      ch = 10'($urandom_range(ROWS / (S * S / 8) - 1, 0));
      if (ch > 10'd1023) ch = 0;
      bx = 5'($urandom_range(bps - 1, 0));
      by = 5'($urandom_range(bps - 1, 0));
      if (n % 4 == 0) begin bx = 0; by = 5'(bps - 1); end
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != 17) begin failures++; $display("FAIL load took %0d cycles", cyc); end
      for (int py = 0; py < 10; py++)
        for (int px = 0; px < 10; px++) begin
          int ix, iy, e;
          ix = int'(bx) * 8 + px - 1;
          iy = int'(by) * 8 + py - 1;
          e = pix(int'(ch), ix, iy, S);
          if (py == 0 || py == 9 || px == 0 || px == 9) begin
            if (ix < 0 || iy < 0 || ix >= S || iy >= S) n_zero++; else n_nbr++;
          end
          checks++;
          if (int'(blk[py][px]) != e) begin
            failures++;
            if (failures < 10) $display("FAIL n=%0d S=%0d ch=%0d b=(%0d,%0d) [%0d][%0d] got %0d exp %0d",
                                        n, S, ch, bx, by, py, px, blk[py][px], e);
          end
        end
    end
    checks++;
    if (n_zero == 0 || n_nbr == 0) failures++;
    $display("border pixels: %0d zero padding, %0d from neighbours", n_zero, n_nbr);
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
