// line_buffer: turns a raster-scan pixel stream of NI feature maps into a
// KC x KC x NI convolution neighbourhood per accepted pixel.
//
// Each feature map has its own register shift chain of (KC-1)*W + KC
// entries: KC-1 row buffers of W pixels, which is what the design calls for,
// plus the KC registers of the newest window row. The chain shifts by one on
// every valid input pixel. The window is read from fixed taps:
// win[ky][kx] = chain[(KC-1-ky)*W + (KC-1-kx)], so ky = 0 is the oldest
// (top) row and kx = 0 the leftmost column. Row and column counters follow the
// raster position of the incoming pixel; a window is flagged valid only when
// that pixel closes a complete neighbourhood (row >= KC-1 and col >= KC-1),
// i.e. (H-KC+1) x (W-KC+1) windows per frame, with no padding. Counters wrap
// at the frame end, so frames may follow each other back to back.
//
// Timing: out_valid/out_win appear one clock after the pixel that completes
// the window. The stream has no back-pressure: a pixel is taken whenever
// in_valid is high, and gaps between pixels are allowed.
module line_buffer
  import cnn_pkg::*;
#(
  parameter int NI = 1,   // number of input feature maps
  parameter int KC = 5,   // convolution kernel size
  parameter int W  = 28,  // feature map width
  parameter int H  = 28   // feature map height
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  act_t [NI-1:0]                 in_pix,
  output logic                          out_valid,
  output act_t [KC-1:0][KC-1:0][NI-1:0] out_win
);

  localparam int LEN = (KC - 1) * W + KC;

  act_t [NI-1:0] chain [LEN];
  logic [$clog2(W)-1:0] col;
  logic [$clog2(H)-1:0] row;

  always_ff @(posedge clk) begin
    if (in_valid) begin
      chain[0] <= in_pix;
      for (int j = 1; j < LEN; j++) chain[j] <= chain[j-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col       <= '0;
      row       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid && (int'(row) >= KC - 1) && (int'(col) >= KC - 1);
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

  always_comb begin
    for (int ky = 0; ky < KC; ky++)
      for (int kx = 0; kx < KC; kx++)
        out_win[ky][kx] = chain[(KC - 1 - ky) * W + (KC - 1 - kx)];
  end

endmodule
