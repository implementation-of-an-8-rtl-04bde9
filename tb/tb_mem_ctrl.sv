// tb_mem_ctrl: drives the memory controller with random loop positions in
// every layer and checks each offset against the cache layout worked out
// pixel-wise: weight rows and partitions, bias entries, destination row and
// lane mask (including the stride-2 quadrant placement).
module tb_mem_ctrl;
  import cnn_pkg::*;
  layer_def_t  def;
  logic [9:0]  ci, co0;
  logic [4:0]  bx, by;
  logic [2:0]  kstep, y;
  logic [3:0]  k;
  logic [17:0] w_row_a, w_row_b;
  logic [3:0]  w_lane;
  logic [11:0] bias_addr;
  logic [16:0] dst_addr;
  logic [7:0]  dst_mask;
  int checks = 0, failures = 0;

  mem_ctrl dut (.*);

  int wbase [N_LAYERS], bbase [N_LAYERS];

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    // bases: layers laid out one after another (weights whole rows per layer)
    wbase[0] = 0; bbase[0] = 0;
    for (int l = 1; l < N_LAYERS; l++) begin
      int n;
      n = int'(NET[l-1].ch_in) * int'(NET[l-1].ch_out);
      wbase[l] = wbase[l-1] + (NET[l-1].k3 ? n : (n + 8) / 9);
      bbase[l] = bbase[l-1] + int'(NET[l-1].ch_out);
    end
    for (int n = 0; n < 20000; n++) begin
      int l, cin, cout, bps, e, co, oc, px, py, ox, oy, obps, row, lane, cb;
      l = n % N_LAYERS;
      def = layer_def(l);
      cin = int'(NET[l].ch_in); cout = int'(NET[l].ch_out);
      bps = 1 << NET[l].lg_bps;
      ci  = 10'($urandom_range(cin - 1, 0));
      co0 = 10'(8 * $urandom_range(cout / 8 - 1, 0));
      bx  = 5'($urandom_range(bps - 1, 0));
      by  = 5'($urandom_range(bps - 1, 0));
      kstep = 3'($urandom_range(3, 0));
      k   = 4'($urandom_range(7, 0));
      y   = NET[l].stride2 ? 3'(2 * $urandom_range(3, 0)) : 3'($urandom_range(7, 0));
      #1;
      e = int'(ci) * cout + int'(co0);
      if (NET[l].k3) begin
        chk(int'(w_row_a) == wbase[l] + e + 2 * int'(kstep), "w_row_a 3x3");
        chk(int'(w_row_b) == wbase[l] + e + 2 * int'(kstep) + 1, "w_row_b 3x3");
      end else begin
        chk(int'(w_row_a) == wbase[l] + e / 9 && int'(w_lane) == e % 9, "w_row_a/lane 1x1");
        chk(int'(w_row_b) == wbase[l] + e / 9 + 1, "w_row_b 1x1");
      end
      co = int'(co0) + int'(k);
      chk(int'(bias_addr) == bbase[l] + co, "bias");
      // pixel of the result row: first result pixel of the row
      cb = (l > 0 && NET[l].k3 && !NET[l].k3 == 0 && !NET[l-1].k3 && !NET[l].stride2 &&
            NET[l].ch_in == NET[l-1].ch_in && NET[l].ch_out == NET[l-1].ch_out) ? cout : 0;
      oc = cb + co;
      px = int'(bx) * 8; py = int'(by) * 8 + int'(y);
      if (NET[l].stride2) begin
        ox = px / 2; oy = py / 2; obps = bps / 2;
      end else begin
        ox = px; oy = py; obps = bps;
      end
      row  = ((oc * obps + oy / 8) * obps + ox / 8) * 8 + oy % 8;
      lane = ox % 8;
      chk(int'(dst_addr) == row, $sformatf("dst_addr l=%0d got %0d exp %0d", l, dst_addr, row));
      chk(dst_mask == (NET[l].stride2 ? (8'hF << lane) : 8'hFF), "dst_mask");
    end
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
