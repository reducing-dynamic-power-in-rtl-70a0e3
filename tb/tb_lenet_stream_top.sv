// tb_lenet_stream_top: end-to-end test of the LeNet streaming accelerator at
// its default (full) size: 28x28 input, 20 and 50 maps, prediction in layer
// 2 with one power-of-two level. Three synthetic digit-like 28x28 images
// (strokes of bright pixels on a dark background) are streamed, the first two
// back to back at one pixel per cycle, the third after a pause and with
// random gaps. Every 4x4x50 output is compared with the frame-level reference
// of tb_ref_pkg (layer 1 exact, layer 2 with prediction). Also checked: the
// NO-OP count per frame against the reference, that NO-OPs, computed windows
// and ReLU-cleared false positives all occur, and that the last output of a
// frame leaves 14 cycles (6 + 8) after its last pixel.
module tb_lenet_stream_top;
  import cnn_pkg::*;
  import tb_ref_pkg::*;
  localparam int FRAMES = 3;
  localparam int C1 = 20, C2 = 50, NOUT = 16;

  logic clk = 0, rst_n = 0;
  logic in_valid;
  act_t in_pix;
  logic out_valid;
  act_t [C2-1:0] out_pix;
  logic l1_stat_valid, l2_stat_valid;
  logic [$clog2(C1+1)-1:0] l1_stat_noops;
  logic [$clog2(C2+1)-1:0] l2_stat_noops;

  int checks = 0, failures = 0, cycle = 0;
  int img [FRAMES][];
  int mid [FRAMES][];
  int res [FRAMES][];
  stats_t st1, st2;
  int nout = 0, hw_noops = 0, hw_win2 = 0, hw_win1 = 0;
  int last_pix [FRAMES];
  int last_out [FRAMES];

  lenet_stream_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (out_valid) begin
        int f, k;
        f = nout / NOUT;
        k = nout % NOUT;
        for (int o = 0; o < C2; o++) begin
          checks++;
          if (f >= FRAMES || int'(out_pix[o]) != res[f][k * C2 + o]) begin
            failures++;
            if (f < FRAMES)
              $display("f%0d k%0d map %0d got %0d exp %0d", f, k, o, out_pix[o], res[f][k * C2 + o]);
          end
        end
        if (f < FRAMES) last_out[f] = cycle;
        nout++;
      end
      if (l2_stat_valid) begin
        hw_win2++;
        hw_noops += int'(l2_stat_noops);
      end
      if (l1_stat_valid) begin
        hw_win1++;
        if (l1_stat_noops != 0) begin
          failures++;
          $display("layer 1 must not skip work");
        end
      end
    end
  end

  // Digit-like image: a few thick strokes and a ring, values 90..127, rest 0..8.
  task automatic make_image(output int im[]);
    int cx, cy, rad;
    im = new[28 * 28];
    foreach (im[i]) im[i] = $urandom_range(0, 8);
    cx = $urandom_range(10, 17);
    cy = $urandom_range(10, 17);
    rad = $urandom_range(5, 8);
    for (int r = 0; r < 28; r++)
      for (int c = 0; c < 28; c++) begin
        int d2;
        d2 = (r - cy) * (r - cy) + (c - cx) * (c - cx);
        if (d2 >= (rad - 1) * (rad - 1) && d2 <= (rad + 1) * (rad + 1))
          im[r * 28 + c] = $urandom_range(90, 127);
      end
    for (int s = 0; s < 2; s++) begin
      int c0, dc;
      c0 = $urandom_range(6, 21);
      dc = $urandom_range(0, 2) - 1;
      for (int r = 4; r < 24; r++)
        for (int t = 0; t < 3; t++) begin
          int c;
          c = c0 + (dc * (r - 4)) / 3 + t;
          if (c >= 0 && c < 28) im[r * 28 + c] = $urandom_range(90, 127);
        end
    end
  endtask

  initial begin
    st1 = '{default: 0};
    st2 = '{default: 0};
    for (int f = 0; f < FRAMES; f++) begin
      make_image(img[f]);
      layer_ref(img[f], 1, C1, 5, 28, 28, 2, 2, 1, 8, 1'b0, 1, mid[f], st1);
      layer_ref(mid[f], C1, C2, 5, 12, 12, 2, 2, 2, 9, 1'b1, 1, res[f], st2);
    end
    in_valid = 0; in_pix = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < FRAMES; f++) begin
      if (f == 2) begin
        @(negedge clk);
        in_valid = 0;
        repeat (50) @(negedge clk);
      end
      for (int p = 0; p < 28 * 28; p++) begin
        if (f == 2)
          while ($urandom_range(0, 3) == 0) begin
            @(negedge clk);
            in_valid = 0;
          end
        @(negedge clk);
        in_valid = 1;
        in_pix = act_t'(img[f][p]);
        last_pix[f] = cycle;
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (40) @(posedge clk);
    $display("layer 2: windows %0d NO-OPs %0d false positives %0d missed %0d true negatives %0d",
             st2.windows, st2.noops, st2.false_pos, st2.missed, st2.true_neg);
    $display("hardware: layer 1 windows %0d, layer 2 windows %0d, NO-OPs %0d (%0d%% of CONV evaluations)",
             hw_win1, hw_win2, hw_noops, hw_noops * 100 / (hw_win2 * C2));
    checks++;
    if (nout != FRAMES * NOUT) begin
      failures++;
      $display("output count %0d", nout);
    end
    checks++;
    if (hw_win2 != st2.windows || hw_noops != st2.noops || hw_win1 != st1.windows) begin
      failures++;
      $display("window / NO-OP statistics differ");
    end
    checks++;
    if (st2.noops == 0 || st2.noops == st2.windows * C2 || st2.false_pos == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    for (int f = 0; f < FRAMES; f++) begin
      checks++;
      if (last_out[f] != last_pix[f] + 14) begin
        failures++;
        $display("frame %0d: last pixel %0d, last output %0d", f, last_pix[f], last_out[f]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
