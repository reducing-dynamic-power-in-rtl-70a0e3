// tb_approx_conv: self-checking test of approx_conv (NI=4, KC=3, NL=2,
// E=5). The testbench maps every exact weight to its power-of-two level on
// its own (nearest of 0, +-32, +-16, ties to the smaller magnitude) and
// checks the bias plus the sum of level * pixel, one cycle after each window.
module tb_approx_conv;
  import cnn_pkg::*;
  localparam int NI = 4, KC = 3, LAYER = 4, OUT_IDX = 5, NL = 2, E = 5;

  logic clk = 0, rst_n = 0;
  logic in_valid;
  act_t [KC-1:0][KC-1:0][NI-1:0] in_win;
  logic out_valid;
  acc_t out_sum;

  int checks = 0, failures = 0, cycle = 0;
  int exp_q[$];
  int due_q[$];
  int lvl [KC][KC][NI];
  int n_zero = 0, n_pos = 0, n_neg = 0;

  approx_conv #(.NI(NI), .KC(KC), .LAYER(LAYER), .OUT_IDX(OUT_IDX), .NL(NL), .E(E)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int e, d;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
      end else begin
        e = exp_q.pop_front();
        d = due_q.pop_front();
        if (int'(out_sum) != e || cycle != d) begin
          failures++;
          $display("got %0d at %0d, expected %0d at %0d", out_sum, cycle, e, d);
        end
      end
    end
  end

  initial begin
    // Independent level mapping: candidate magnitudes 0, 16, 32.
    for (int ky = 0; ky < KC; ky++)
      for (int kx = 0; kx < KC; kx++)
        for (int c = 0; c < NI; c++) begin
          int w, m, l;
          w = conv_weight(LAYER, OUT_IDX, c, ky, kx);
          m = (w < 0) ? -w : w;
          if (m <= 8) l = 0;
          else if (m <= 24) l = 16;
          else l = 32;
          lvl[ky][kx][c] = (w < 0) ? -l : l;
          if (l == 0) n_zero++;
          else if (w < 0) n_neg++;
          else n_pos++;
        end
    in_valid = 0; in_win = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      int s;
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      s = conv_bias(LAYER, OUT_IDX);
      for (int ky = 0; ky < KC; ky++)
        for (int kx = 0; kx < KC; kx++)
          for (int c = 0; c < NI; c++) begin
            in_win[ky][kx][c] = act_t'($urandom);
            s += lvl[ky][kx][c] * int'(in_win[ky][kx][c]);
          end
      if (in_valid) begin
        exp_q.push_back(s);
        due_q.push_back(cycle + 1);
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (4) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || n_zero == 0 || n_pos == 0 || n_neg == 0) begin
      failures++;
      $display("left %0d, levels zero/pos/neg %0d/%0d/%0d", exp_q.size(), n_zero, n_pos, n_neg);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
