// tb_conv_unit: checks the 3x3 multiply-accumulate unit against a direct
// sum of products on random and extreme operands.
module tb_conv_unit;
  import cnn_pkg::*;
  kernel_t win, ker;
  acc_t    sum;
  int checks = 0, failures = 0;

  conv_unit dut (.window(win), .kernel(ker), .sum(sum));

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int exp_v;
      exp_v = 0;
      for (int t = 0; t < 9; t++) begin
        case (n)
          0: begin win[t] = -128; ker[t] = -128; end
          1: begin win[t] = 127;  ker[t] = -128; end
          default: begin win[t] = act_t'($urandom); ker[t] = act_t'($urandom); end
        endcase
        exp_v += int'(win[t]) * int'(ker[t]);
      end
      #1;
      checks++;
      if (int'(sum) != exp_v) begin
        failures++;
        $display("FAIL n=%0d got %0d exp %0d", n, sum, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
