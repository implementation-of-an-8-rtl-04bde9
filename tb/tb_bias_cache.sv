// tb_bias_cache: writes random biases into every entry, reads them back in
// random order and checks the one-cycle read latency.
module tb_bias_cache;
  import cnn_pkg::*;
  localparam int E = 3456;
  logic clk = 0, en = 0, we = 0;
  logic [11:0] addr;
  act_t wdata, rdata;
  act_t model [E];
  int checks = 0, failures = 0;

  bias_cache #(.ENTRIES(E)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < E; i++) begin
      @(negedge clk);
      en = 1; we = 1; addr = 12'(i); wdata = act_t'($urandom); model[i] = wdata;
    end
    for (int n = 0; n < 2000; n++) begin
      int i;
      @(negedge clk);
      i = $urandom_range(E - 1, 0);
      en = 1; we = 0; addr = 12'(i);
      @(negedge clk);
      en = 0;
      checks++;
      if (rdata != model[i]) begin failures++; $display("FAIL entry %0d", i); end
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
