// tb_fm_cache: random reads and lane-masked writes on both ports of a small
// feature-map cache, compared with a model array; checks the one-cycle read
// latency and that unmasked lanes keep their contents.
module tb_fm_cache;
  import cnn_pkg::*;
  localparam int D = 64;
  logic clk = 0;
  logic a_en = 0, a_we = 0, b_en = 0, b_we = 0;
  logic [7:0] a_be, b_be;
  logic [5:0] a_addr, b_addr;
  fm_row_t a_wdata, b_wdata, a_rdata, b_rdata;
  fm_row_t model [D];
  int checks = 0, failures = 0;

  fm_cache #(.DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    // initialise through both ports
    for (int r = 0; r < D; r += 2) begin
      @(negedge clk);
      a_en = 1; a_we = 1; a_be = 8'hFF; a_addr = 6'(r); a_wdata = fm_row_t'({$urandom, $urandom});
      b_en = 1; b_we = 1; b_be = 8'hFF; b_addr = 6'(r + 1); b_wdata = fm_row_t'({$urandom, $urandom});
      model[r] = a_wdata; model[r + 1] = b_wdata;
    end
    for (int n = 0; n < 3000; n++) begin
      fm_row_t ea, eb;
      bit ra, rb;
      @(negedge clk);
      a_en = 1; b_en = 1;
      a_we = $urandom_range(1, 0); b_we = $urandom_range(1, 0);
      a_addr = 6'($urandom); b_addr = 6'($urandom);
      if (a_we && b_we && a_addr == b_addr) b_addr = a_addr + 6'd1;
      a_be = 8'($urandom); b_be = 8'($urandom);
      a_wdata = fm_row_t'({$urandom, $urandom}); b_wdata = fm_row_t'({$urandom, $urandom});
      ra = !a_we; rb = !b_we;
      ea = model[a_addr]; eb = model[b_addr];
      if (a_we) for (int c = 0; c < 8; c++) if (a_be[c]) model[a_addr][c] = a_wdata[c];
      if (b_we) for (int c = 0; c < 8; c++) if (b_be[c]) model[b_addr][c] = b_wdata[c];
      @(negedge clk);
      a_en = 0; b_en = 0;
      if (ra) begin checks++; if (a_rdata != ea) begin failures++; $display("FAIL port A read"); end end
      if (rb) begin checks++; if (b_rdata != eb) begin failures++; $display("FAIL port B read"); end end
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
