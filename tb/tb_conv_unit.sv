// tb_conv_unit: self-checking test of conv_unit (NI=3, KC=3, SHIFT=6).
// Random windows, random gaps and random NO-OP commands. The expected output
// is computed in the testbench from the same weight set: bias plus the sum of
// weight * pixel, shifted right by SHIFT and saturated to int8, or 0 for a
// NO-OP window. Each result must appear exactly two cycles after its window.
// Saturation in both directions and NO-OPs must each occur.
module tb_conv_unit;
  import cnn_pkg::*;
  localparam int NI = 3, KC = 3, LAYER = 7, OUT_IDX = 2, SHIFT = 6;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_en;
  act_t [KC-1:0][KC-1:0][NI-1:0] in_win;
  logic out_valid;
  act_t out_act;

  int checks = 0, failures = 0, cycle = 0;
  int n_noop = 0, n_sat_hi = 0, n_sat_lo = 0;
  int exp_q[$];
  int due_q[$];

  conv_unit #(.NI(NI), .KC(KC), .LAYER(LAYER), .OUT_IDX(OUT_IDX), .SHIFT(SHIFT)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int reference(input act_t [KC-1:0][KC-1:0][NI-1:0] w, input bit en);
    longint s;
    if (!en) return 0;
    s = conv_bias(LAYER, OUT_IDX);
    for (int ky = 0; ky < KC; ky++)
      for (int kx = 0; kx < KC; kx++)
        for (int c = 0; c < NI; c++)
          s += longint'(conv_weight(LAYER, OUT_IDX, c, ky, kx)) * longint'(w[ky][kx][c]);
    s = s >>> SHIFT;
    if (s > 127) s = 127;
    if (s < -128) s = -128;
    return int'(s);
  endfunction

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int e, d;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("unexpected output");
      end else begin
        e = exp_q.pop_front();
        d = due_q.pop_front();
        if (int'(out_act) != e || cycle != d) begin
          failures++;
          $display("got %0d at %0d, expected %0d at %0d", out_act, cycle, e, d);
        end
      end
    end
  end

  initial begin
    in_valid = 0; in_en = 0; in_win = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      int mode, e;
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      in_en = ($urandom_range(0, 2) != 0);
      mode = $urandom_range(0, 3);
      for (int ky = 0; ky < KC; ky++)
        for (int kx = 0; kx < KC; kx++)
          for (int c = 0; c < NI; c++)
            case (mode)
              0: in_win[ky][kx][c] = act_t'(conv_weight(LAYER, OUT_IDX, c, ky, kx) >= 0 ? 127 : -128);
              1: in_win[ky][kx][c] = act_t'(conv_weight(LAYER, OUT_IDX, c, ky, kx) >= 0 ? -128 : 127);
              default: in_win[ky][kx][c] = act_t'($urandom);
            endcase
      if (in_valid) begin
        e = reference(in_win, in_en);
        exp_q.push_back(e);
        due_q.push_back(cycle + 2);
        if (!in_en) n_noop++;
        else if (e == 127) n_sat_hi++;
        else if (e == -128) n_sat_lo++;
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || n_noop == 0 || n_sat_hi == 0 || n_sat_lo == 0) begin
      failures++;
      $display("left %0d noop %0d sat %0d/%0d", exp_q.size(), n_noop, n_sat_hi, n_sat_lo);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
