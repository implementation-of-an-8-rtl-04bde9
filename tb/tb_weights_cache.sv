// tb_weights_cache: writes random 9-weight rows through port A of a small
// weights cache, then reads them back on both ports (one-cycle latency).
module tb_weights_cache;
  import cnn_pkg::*;
  localparam int R = 100;
  logic clk = 0, a_en = 0, a_we = 0, b_en = 0;
  logic [6:0] a_addr, b_addr;
  wrow_t a_wdata, a_rdata, b_rdata;
  wrow_t model [R];
  int checks = 0, failures = 0;

  weights_cache #(.ROWS(R)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int r = 0; r < R; r++) begin
      @(negedge clk);
      a_en = 1; a_we = 1; a_addr = 7'(r);
      a_wdata = wrow_t'({$urandom, $urandom, $urandom});
      model[r] = a_wdata;
    end
    for (int n = 0; n < 1000; n++) begin
      int ra, rb;
      @(negedge clk);
      ra = $urandom_range(R - 1, 0); rb = $urandom_range(R - 1, 0);
      a_en = 1; a_we = 0; a_addr = 7'(ra);
      b_en = 1; b_addr = 7'(rb);
      @(negedge clk);
      a_en = 0; b_en = 0;
      checks += 2;
      if (a_rdata != model[ra]) begin failures++; $display("FAIL A row %0d", ra); end
      if (b_rdata != model[rb]) begin failures++; $display("FAIL B row %0d", rb); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
