// tb_relu_pred: self-checking test of relu_pred with NO=6. Random approximate
// sums (biased towards -1, 0, +1 and the extremes) and random valid; one cycle
// later every unit must be enabled exactly when its sum is > 0 and the window
// is valid, and the NO-OP count must match.
module tb_relu_pred;
  import cnn_pkg::*;
  localparam int NO = 6;

  logic clk = 0, rst_n = 0;
  logic in_valid;
  acc_t in_sum [NO];
  logic out_valid;
  logic [NO-1:0] out_en;
  logic [$clog2(NO+1)-1:0] out_noops;

  int checks = 0, failures = 0;
  logic exp_v;
  logic [NO-1:0] exp_en;
  int exp_n;

  relu_pred #(.NO(NO)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0;
    for (int o = 0; o < NO; o++) in_sum[o] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      exp_v = in_valid;
      exp_n = 0;
      for (int o = 0; o < NO; o++) begin
        case ($urandom_range(0, 5))
          0: in_sum[o] = 0;
          1: in_sum[o] = 1;
          2: in_sum[o] = -1;
          3: in_sum[o] = 32'h8000_0000;
          4: in_sum[o] = 32'h7fff_ffff;
          default: in_sum[o] = acc_t'($urandom);
        endcase
        exp_en[o] = in_valid && (in_sum[o] > 0);
        if (in_valid && !(in_sum[o] > 0)) exp_n++;
      end
      @(negedge clk);
      checks++;
      if (out_valid !== exp_v || out_en !== exp_en || int'(out_noops) != exp_n) begin
        failures++;
        $display("n=%0d got v%0b en%b noops%0d exp v%0b en%b noops%0d", n, out_valid, out_en,
                 out_noops, exp_v, exp_en, exp_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
