// pool_vertical: first half of the streaming max pool. Takes a raster stream
// of N maps, W wide and H high, keeps the previous KP-1 rows of every map in
// a register row buffer, and on each pixel of a row that closes a pooling
// window vertically (row >= KP-1 and (row-(KP-1)) a multiple of SP) outputs
// the maximum of that pixel and the pixels above it in the same column. The
// output stream therefore has W pixels in each of (H-KP)/SP+1 rows.
// One register stage; the row buffer shifts on every valid input.
module pool_vertical
  import cnn_pkg::*;
#(
  parameter int N  = 20,  // maps per stream beat
  parameter int KP = 2,   // pool kernel size
  parameter int SP = 2,   // pool stride
  parameter int W  = 24,  // input width
  parameter int H  = 24   // input height
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  act_t [N-1:0] in_pix,
  output logic         out_valid,
  output act_t [N-1:0] out_pix
);

  localparam int LEN = (KP - 1) * W;

  act_t [N-1:0] rows [LEN];
  logic [$clog2(W)-1:0] col;
  logic [$clog2(H)-1:0] row;
  logic fire;
  act_t [N-1:0] vmax;

  assign fire = in_valid && (int'(row) >= KP - 1) && ((int'(row) - (KP - 1)) % SP == 0);

  always_comb begin
    for (int c = 0; c < N; c++) begin
      vmax[c] = in_pix[c];
      for (int r = 1; r < KP; r++)
        if ($signed(rows[r*W-1][c]) > $signed(vmax[c])) vmax[c] = rows[r*W-1][c];
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      rows[0] <= in_pix;
      for (int j = 1; j < LEN; j++) rows[j] <= rows[j-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col       <= '0;
      row       <= '0;
      out_valid <= 1'b0;
      out_pix   <= '0;
    end else begin
      out_valid <= fire;
      if (fire) out_pix <= vmax;
      if (in_valid) begin
        if (int'(col) == W - 1) begin
          col <= '0;
          row <= (int'(row) == H - 1) ? '0 : row + 1'b1;
        end else begin
          col <= col + 1'b1;
        end
      end
    end
  end

endmodule
