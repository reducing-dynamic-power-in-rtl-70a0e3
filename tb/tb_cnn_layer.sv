// tb_cnn_layer: self-checking test of cnn_layer at a reduced size (NI=2,
// NO=4, KC=3, 8x8 input, 2x2/2 pool), with and without ReLU prediction
// (NL=2). Two frames with random gaps go into both instances; every pooled
// output is compared with tb_ref_pkg::layer_ref. The NO-OP counts reported by
// the predicting layer must match the reference, NO-OPs, enabled windows and
// false positives cleared by ReLU must all occur, and the last output of a
// frame must come 6 (plain) / 8 (predicting) cycles after the last pixel.
module tb_cnn_layer;
  import cnn_pkg::*;
  import tb_ref_pkg::*;
  localparam int NI = 2, NO = 4, KC = 3, W = 8, H = 8, KP = 2, SP = 2;
  localparam int LAYER = 3, SHIFT = 5, NL = 2, FRAMES = 2;
  localparam int WO = (W - KC + 1 - KP) / SP + 1;
  localparam int HO = (H - KC + 1 - KP) / SP + 1;

  logic clk = 0, rst_n = 0;
  logic in_valid;
  act_t [NI-1:0] in_pix;
  logic pv, av, psv, asv;
  act_t [NO-1:0] pp, ap;
  logic [$clog2(NO+1)-1:0] pn, an;

  int checks = 0, failures = 0, cycle = 0;
  int img [FRAMES][];
  int refp [FRAMES][];
  int refa [FRAMES][];
  stats_t stp, sta;
  int np = 0, na = 0, hw_noops = 0, hw_windows = 0, last_pix_cycle = 0, last_a = 0, last_p = 0;

  cnn_layer #(.NI(NI), .NO(NO), .KC(KC), .W(W), .H(H), .KP(KP), .SP(SP), .LAYER(LAYER),
              .SHIFT(SHIFT), .APPROX(1'b0), .NL(NL)) dut_plain (
    .clk, .rst_n, .in_valid, .in_pix, .out_valid(pv), .out_pix(pp),
    .stat_valid(psv), .stat_noops(pn));
  cnn_layer #(.NI(NI), .NO(NO), .KC(KC), .W(W), .H(H), .KP(KP), .SP(SP), .LAYER(LAYER),
              .SHIFT(SHIFT), .APPROX(1'b1), .NL(NL)) dut_pred (
    .clk, .rst_n, .in_valid, .in_pix, .out_valid(av), .out_pix(ap),
    .stat_valid(asv), .stat_noops(an));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (pv) begin
        int f, k;
        f = np / (WO * HO);
        k = np % (WO * HO);
        for (int o = 0; o < NO; o++) begin
          checks++;
          if (f >= FRAMES || int'(pp[o]) != refp[f][k * NO + o]) begin
            failures++;
            $display("plain f%0d k%0d o%0d got %0d", f, k, o, pp[o]);
          end
        end
        np++;
        last_p = cycle;
      end
      if (av) begin
        int f, k;
        f = na / (WO * HO);
        k = na % (WO * HO);
        for (int o = 0; o < NO; o++) begin
          checks++;
          if (f >= FRAMES || int'(ap[o]) != refa[f][k * NO + o]) begin
            failures++;
            $display("pred f%0d k%0d o%0d got %0d exp %0d", f, k, o, ap[o], refa[f][k * NO + o]);
          end
        end
        na++;
        last_a = cycle;
      end
      if (asv) begin
        hw_windows++;
        hw_noops += int'(an);
      end
      if (psv && pn != 0) begin
        failures++;
        $display("plain layer reported NO-OPs");
      end
    end
  end

  initial begin
    stp = '{default: 0};
    sta = '{default: 0};
    for (int f = 0; f < FRAMES; f++) begin
      img[f] = new[H * W * NI];
      foreach (img[f][i]) img[f][i] = $urandom_range(0, 127);
      layer_ref(img[f], NI, NO, KC, W, H, KP, SP, LAYER, SHIFT, 1'b0, NL, refp[f], stp);
      layer_ref(img[f], NI, NO, KC, W, H, KP, SP, LAYER, SHIFT, 1'b1, NL, refa[f], sta);
    end
    in_valid = 0; in_pix = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < FRAMES; f++)
      for (int p = 0; p < H * W; p++) begin
        while ($urandom_range(0, 3) == 0) begin
          @(negedge clk);
          in_valid = 0;
        end
        @(negedge clk);
        in_valid = 1;
        for (int i = 0; i < NI; i++) in_pix[i] = act_t'(img[f][p * NI + i]);
        last_pix_cycle = cycle;
      end
    @(negedge clk);
    in_valid = 0;
    repeat (20) @(posedge clk);
    $display("windows %0d noops %0d false_pos %0d missed %0d (hw windows %0d noops %0d)",
             sta.windows, sta.noops, sta.false_pos, sta.missed, hw_windows, hw_noops);
    checks++;
    if (np != FRAMES * WO * HO || na != FRAMES * WO * HO) begin
      failures++;
      $display("output counts %0d %0d", np, na);
    end
    checks++;
    if (hw_windows != sta.windows || hw_noops != sta.noops) begin
      failures++;
      $display("NO-OP statistics differ");
    end
    checks++;
    if (sta.noops == 0 || sta.noops == sta.windows * NO || sta.false_pos == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    checks++;
    if (last_p != last_pix_cycle + 6 || last_a != last_pix_cycle + 8) begin
      failures++;
      $display("latency: last pixel %0d, plain %0d, pred %0d", last_pix_cycle, last_p, last_a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
