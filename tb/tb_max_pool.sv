// tb_max_pool: self-checking test of max_pool in two shapes, 2x2 stride 2
// on 6x6 (the LeNet shape) and 3x3 stride 2 on 7x7 (overlapping windows),
// each with N=2 maps. Two frames of random signed pixels with random gaps go
// in; the pooled outputs must match maxima computed from the stored frames,
// in raster order, each two cycles after the pixel that closes its window,
// with ((H-KP)/SP+1)^2 outputs per frame.
module tb_max_pool;
  import cnn_pkg::*;
  localparam int N = 2, FRAMES = 2;
  localparam int KPA = 2, SPA = 2, WA = 6;
  localparam int KPB = 3, SPB = 2, WB = 7;
  localparam int OA = (WA - KPA) / SPA + 1;
  localparam int OB = (WB - KPB) / SPB + 1;

  logic clk = 0, rst_n = 0;
  logic va, vb;
  act_t [N-1:0] pa, pb;
  logic oav, obv;
  act_t [N-1:0] oap, obp;

  int checks = 0, failures = 0, cycle = 0;
  act_t imga [FRAMES][WA][WA][N];
  act_t imgb [FRAMES][WB][WB][N];
  int qa[$], qb[$];      // expected values, packed as map0 + 256*map1
  int ta[$], tb[$];      // expected cycles

  max_pool #(.N(N), .KP(KPA), .SP(SPA), .W(WA), .H(WA)) dut_a (
    .clk, .rst_n, .in_valid(va), .in_pix(pa), .out_valid(oav), .out_pix(oap));
  max_pool #(.N(N), .KP(KPB), .SP(SPB), .W(WB), .H(WB)) dut_b (
    .clk, .rst_n, .in_valid(vb), .in_pix(pb), .out_valid(obv), .out_pix(obp));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int pack(input act_t [N-1:0] p);
    return int'(p[0]) + 256 * int'(p[1]);
  endfunction

  always @(posedge clk) begin
    if (rst_n && oav) begin
      checks++;
      if (qa.size() == 0 || pack(oap) != qa.pop_front() || cycle != ta.pop_front()) begin
        failures++;
        $display("A mismatch at cycle %0d", cycle);
      end
    end
    if (rst_n && obv) begin
      checks++;
      if (qb.size() == 0 || pack(obp) != qb.pop_front() || cycle != tb.pop_front()) begin
        failures++;
        $display("B mismatch at cycle %0d", cycle);
      end
    end
  end

  // Drives one shape; a and b run one after the other.
  task automatic drive_a();
    for (int f = 0; f < FRAMES; f++)
      for (int r = 0; r < WA; r++)
        for (int c = 0; c < WA; c++) begin
          while ($urandom_range(0, 2) == 0) begin
            @(negedge clk);
            va = 0;
          end
          @(negedge clk);
          va = 1;
          for (int i = 0; i < N; i++) pa[i] = imga[f][r][c][i];
          if (r >= KPA - 1 && (r - KPA + 1) % SPA == 0 && c >= KPA - 1 && (c - KPA + 1) % SPA == 0) begin
            act_t [N-1:0] m;
            for (int i = 0; i < N; i++) begin
              m[i] = -128;
              for (int y = r - KPA + 1; y <= r; y++)
                for (int x = c - KPA + 1; x <= c; x++)
                  if (imga[f][y][x][i] > m[i]) m[i] = imga[f][y][x][i];
            end
            qa.push_back(pack(m));
            ta.push_back(cycle + 2);
          end
        end
    @(negedge clk);
    va = 0;
  endtask

  task automatic drive_b();
    for (int f = 0; f < FRAMES; f++)
      for (int r = 0; r < WB; r++)
        for (int c = 0; c < WB; c++) begin
          while ($urandom_range(0, 2) == 0) begin
            @(negedge clk);
            vb = 0;
          end
          @(negedge clk);
          vb = 1;
          for (int i = 0; i < N; i++) pb[i] = imgb[f][r][c][i];
          if (r >= KPB - 1 && (r - KPB + 1) % SPB == 0 && c >= KPB - 1 && (c - KPB + 1) % SPB == 0) begin
            act_t [N-1:0] m;
            for (int i = 0; i < N; i++) begin
              m[i] = -128;
              for (int y = r - KPB + 1; y <= r; y++)
                for (int x = c - KPB + 1; x <= c; x++)
                  if (imgb[f][y][x][i] > m[i]) m[i] = imgb[f][y][x][i];
            end
            qb.push_back(pack(m));
            tb.push_back(cycle + 2);
          end
        end
    @(negedge clk);
    vb = 0;
  endtask

  initial begin
    int na, nb;
    va = 0; vb = 0; pa = '0; pb = '0;
    for (int f = 0; f < FRAMES; f++) begin
      for (int r = 0; r < WA; r++) for (int c = 0; c < WA; c++) for (int i = 0; i < N; i++)
        imga[f][r][c][i] = act_t'($urandom);
      for (int r = 0; r < WB; r++) for (int c = 0; c < WB; c++) for (int i = 0; i < N; i++)
        imgb[f][r][c][i] = act_t'($urandom);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    drive_a();
    drive_b();
    repeat (5) @(posedge clk);
    checks++;
    if (qa.size() != 0 || qb.size() != 0) begin
      failures++;
      $display("missing outputs %0d %0d", qa.size(), qb.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $display("expected %0d checks",
             FRAMES * (OA * OA + OB * OB) + 1);
    $finish;
  end
endmodule
