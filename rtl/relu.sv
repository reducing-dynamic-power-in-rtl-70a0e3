// relu: rectified linear unit on a stream of N pixels. Each pixel is
// multiplexed to zero when its sign bit is set, f(x) = max(0, x). In a layer
// with ReLU prediction it also removes the false positives, windows predicted
// positive whose exact value turns out negative. One register stage: out_* is
// in_* of the previous cycle.
module relu
  import cnn_pkg::*;
#(
  parameter int N = 20  // pixels per stream beat
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  act_t [N-1:0] in_pix,
  output logic         out_valid,
  output act_t [N-1:0] out_pix
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pix   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid)
        for (int i = 0; i < N; i++) out_pix[i] <= in_pix[i][ACT_W-1] ? '0 : in_pix[i];
    end
  end

endmodule
