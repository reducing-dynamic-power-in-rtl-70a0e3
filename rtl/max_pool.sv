// max_pool: streaming KP x KP max pooling with stride SP on N maps of
// W x H pixels, decomposed into a vertical unit (pool_vertical, buffers KP-1
// rows and outputs column maxima) followed by a horizontal unit
// (pool_horizontal, buffers KP-1 inputs and outputs row maxima). Output:
// ((H-KP)/SP+1) x ((W-KP)/SP+1) pixels per frame in raster order.
// Latency: two cycles from the input that closes a window to out_valid.
module max_pool
  import cnn_pkg::*;
#(
  parameter int N  = 20,
  parameter int KP = 2,
  parameter int SP = 2,
  parameter int W  = 24,
  parameter int H  = 24
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  act_t [N-1:0] in_pix,
  output logic         out_valid,
  output act_t [N-1:0] out_pix
);

  logic         v_valid;
  act_t [N-1:0] v_pix;

  pool_vertical #(.N(N), .KP(KP), .SP(SP), .W(W), .H(H)) u_vert (
    .clk, .rst_n, .in_valid, .in_pix,
    .out_valid(v_valid), .out_pix(v_pix)
  );

  pool_horizontal #(.N(N), .KP(KP), .SP(SP), .W(W)) u_horz (
    .clk, .rst_n, .in_valid(v_valid), .in_pix(v_pix),
    .out_valid, .out_pix
  );

endmodule
