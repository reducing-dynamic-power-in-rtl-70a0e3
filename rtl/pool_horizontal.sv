// pool_horizontal: second half of the streaming max pool. Takes the
// vertical maxima, W per row, keeps the previous KP-1 inputs of every map and,
// on each input that closes a pooling window horizontally (col >= KP-1 and
// (col-(KP-1)) a multiple of SP), outputs the maximum of that input and the
// KP-1 before it. One register stage.
module pool_horizontal
  import cnn_pkg::*;
#(
  parameter int N  = 20,  // maps per stream beat
  parameter int KP = 2,   // pool kernel size
  parameter int SP = 2,   // pool stride
  parameter int W  = 24   // input row length
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  act_t [N-1:0] in_pix,
  output logic         out_valid,
  output act_t [N-1:0] out_pix
);

  localparam int LEN = (KP > 1) ? KP - 1 : 1;

  act_t [N-1:0] prev [LEN];
  logic [$clog2(W)-1:0] col;
  logic fire;
  act_t [N-1:0] hmax;

  assign fire = in_valid && (int'(col) >= KP - 1) && ((int'(col) - (KP - 1)) % SP == 0);

  always_comb begin
    for (int c = 0; c < N; c++) begin
      hmax[c] = in_pix[c];
      for (int k = 0; k < KP - 1; k++)
        if ($signed(prev[k][c]) > $signed(hmax[c])) hmax[c] = prev[k][c];
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      prev[0] <= in_pix;
      for (int j = 1; j < LEN; j++) prev[j] <= prev[j-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col       <= '0;
      out_valid <= 1'b0;
      out_pix   <= '0;
    end else begin
      out_valid <= fire;
      if (fire) out_pix <= hmax;
      if (in_valid) col <= (int'(col) == W - 1) ? '0 : col + 1'b1;
    end
  end

endmodule
