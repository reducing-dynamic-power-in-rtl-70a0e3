// tb_line_buffer: self-checking test of line_buffer with NI=2, KC=3, W=6,
// H=5. Streams two frames with random gaps; every window must equal the
// neighbourhood taken from the stored image at the raster position of the
// pixel that closed it, must appear exactly one cycle after that pixel, and
// each frame must yield (H-KC+1)*(W-KC+1) windows.
module tb_line_buffer;
  import cnn_pkg::*;
  localparam int NI = 2, KC = 3, W = 6, H = 5;
  localparam int FRAMES = 2;

  logic clk = 0, rst_n = 0;
  logic in_valid;
  act_t [NI-1:0] in_pix;
  logic out_valid;
  act_t [KC-1:0][KC-1:0][NI-1:0] out_win;

  int checks = 0, failures = 0;
  act_t img [FRAMES][H][W][NI];
  int exp_r, exp_c, exp_f, nwin;
  int cycle;
  int close_q[$];

  line_buffer #(.NI(NI), .KC(KC), .W(W), .H(H)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (4000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Checker: windows arrive in raster order of their bottom-right pixel.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (close_q.size() == 0 || cycle != close_q.pop_front() + 1) begin
        failures++;
        $display("latency error at window %0d", nwin);
      end
      for (int ky = 0; ky < KC; ky++)
        for (int kx = 0; kx < KC; kx++)
          for (int c = 0; c < NI; c++)
            if (out_win[ky][kx][c] !== img[exp_f][exp_r-KC+1+ky][exp_c-KC+1+kx][c]) begin
              failures++;
              $display("window f%0d r%0d c%0d [%0d][%0d][%0d] got %0d exp %0d", exp_f, exp_r, exp_c,
                       ky, kx, c, out_win[ky][kx][c], img[exp_f][exp_r-KC+1+ky][exp_c-KC+1+kx][c]);
            end
      nwin++;
      exp_c++;
      if (exp_c == W) begin
        exp_c = KC - 1;
        exp_r++;
        if (exp_r == H) begin
          exp_r = KC - 1;
          exp_f++;
        end
      end
    end
  end

  initial begin
    cycle = 0;
    nwin = 0;
    exp_r = KC - 1; exp_c = KC - 1; exp_f = 0;
    in_valid = 0;
    in_pix = '0;
    for (int f = 0; f < FRAMES; f++)
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++)
          for (int ch = 0; ch < NI; ch++) img[f][r][c][ch] = act_t'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < FRAMES; f++)
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) begin
          while ($urandom_range(0, 3) == 0) begin
            @(negedge clk);
            in_valid = 0;
            in_pix = act_t'($urandom);
          end
          @(negedge clk);
          in_valid = 1;
          for (int ch = 0; ch < NI; ch++) in_pix[ch] = img[f][r][c][ch];
          if (r >= KC - 1 && c >= KC - 1) close_q.push_back(cycle);
        end
    @(negedge clk);
    in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (nwin != FRAMES * (H - KC + 1) * (W - KC + 1)) begin
      failures++;
      $display("window count %0d", nwin);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
