// tb_layer_def_rom: reads every entry of the layer ROM and checks it against
// the network table typed in independently here (channels, map size, kernel,
// stride, fractional lengths), the ping-pong buffer sequence, the fire
// concatenation offsets and the memory bases, whose totals must be the
// 199,366 weight rows and 3,456 biases of the on-chip caches.
module tb_layer_def_rom;
  import cnn_pkg::*;
  logic clk = 0;
  logic [4:0] idx;
  layer_def_t def;
  int checks = 0, failures = 0;

  layer_def_rom dut (.*);
  always #5 clk = ~clk;

  //                cin  cout  px k s  fi fw fo
  int T [26][8] = '{
    '{  3,  64, 256, 3, 2,  0, 7, -2}, '{ 64,  16, 128, 3, 2, -2, 6, -4},
    '{ 16,  64,  64, 1, 1, -4, 6, -4}, '{ 16,  64,  64, 3, 1, -4, 7, -4},
    '{128,  16,  64, 1, 1, -4, 6, -6}, '{ 16,  64,  64, 1, 1, -6, 7, -5},
    '{ 16,  64,  64, 3, 1, -6, 7, -5}, '{128,  32,  64, 3, 2, -5, 8, -7},
    '{ 32, 128,  32, 1, 1, -7, 7, -6}, '{ 32, 128,  32, 3, 1, -7, 8, -6},
    '{256,  32,  32, 1, 1, -6, 7, -7}, '{ 32, 128,  32, 1, 1, -7, 7, -6},
    '{ 32, 128,  32, 3, 1, -7, 7, -6}, '{256,  64,  32, 3, 2, -6, 8, -7},
    '{ 64, 256,  16, 1, 1, -7, 7, -6}, '{ 64, 256,  16, 3, 1, -7, 8, -6},
    '{512,  64,  16, 1, 1, -6, 7, -7}, '{ 64, 192,  16, 1, 1, -7, 8, -5},
    '{ 64, 192,  16, 3, 1, -7, 8, -5}, '{384, 112,  16, 3, 2, -5, 8, -6},
    '{112, 256,   8, 1, 1, -6, 8, -4}, '{112, 256,   8, 3, 1, -6, 8, -4},
    '{512, 112,   8, 1, 1, -4, 8, -4}, '{112, 368,   8, 1, 1, -4, 8, -2},
    '{112, 368,   8, 3, 1, -4, 9, -2}, '{736,  32,   8, 1, 1, -2, 9, -1}
  };
  // buffer read by each layer: image in 0; squeeze/conv1/conv10 swap, the
  // two expand branches read the same buffer
  int SRC [26] = '{0,1,0,0,1,0,0,1,0,0,1,0,0,1,0,0,1,0,0,1,0,0,1,0,0,1};

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    int wb, bb;
    wb = 0; bb = 0;
    for (int l = 0; l < 26; l++) begin
      int n;
      @(negedge clk);
      idx = 5'(l);
      @(negedge clk);
      chk(int'(def.net.ch_in) == T[l][0] && int'(def.net.ch_out) == T[l][1], $sformatf("L%0d channels", l));
      chk((8 << def.net.lg_bps) == T[l][2], $sformatf("L%0d size", l));
      chk(def.net.k3 == (T[l][3] == 3) && def.net.stride2 == (T[l][4] == 2), $sformatf("L%0d kernel/stride", l));
      chk(int'(def.net.fl_in) == T[l][5] && int'(def.net.fl_w) == T[l][6] && int'(def.net.fl_out) == T[l][7],
          $sformatf("L%0d fractional lengths", l));
      chk(int'(def.src_buf) == SRC[l], $sformatf("L%0d source buffer", l));
      chk(int'(def.ch_base) == ((l >= 3 && (l % 3) == 0 && l <= 24) ? T[l][1] : 0), $sformatf("L%0d concat offset", l));
      chk(int'(def.w_row_base) == wb && int'(def.b_base) == bb, $sformatf("L%0d bases", l));
      n = T[l][0] * T[l][1];
      wb += (T[l][3] == 3) ? n : (n + 8) / 9;
      bb += T[l][1];
    end
    chk(wb == 199366, "total weight rows");
    chk(bb == 3456, "total biases");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
