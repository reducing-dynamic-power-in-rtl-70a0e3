// lenet_stream_top: streaming accelerator for the convolutional part of
// LeNet (MNIST), with ReLU prediction in the configuration that gave the
// largest power saving: the first layer is computed exactly, the second layer
// predicts the sign of every activation with a one-level power-of-two
// approximation (weights in {0, +-2^E}, 2-bit codes) and skips the exact
// convolution of the maps predicted non-positive.
//
//   in (28x28x1) -> layer 1: CONV 5x5, 20 maps -> ReLU -> MAX 2x2/2 (12x12x20)
//                -> layer 2: CONV 5x5, 50 maps -> ReLU -> MAX 2x2/2 (4x4x50)
//
// The fully connected layers are not part of the accelerator. Both layers run
// concurrently: layer 2 starts as soon as layer 1 has delivered five rows of
// its pooled output. The input is one int8 pixel per valid cycle in raster
// order, with no back-pressure; frames may follow back to back. The output is
// one 50-map pixel per out_valid, 16 per frame in raster order.
//
// L1_APPROX/L1_NL and L2_APPROX/L2_NL select other configurations: both
// layers approximated with two levels is the other evaluated setting; both
// APPROX = 0 is the plain accelerator without prediction.
// The l*_stat_* outputs report, for each window issued to a layer's CONV
// units, how many units received a NO-OP.
module lenet_stream_top
  import cnn_pkg::*;
#(
  parameter int IMG_W     = 28,
  parameter int IMG_H     = 28,
  parameter int C1        = 20,   // layer 1 output maps
  parameter int C2        = 50,   // layer 2 output maps
  parameter int KC        = 5,
  parameter int KP        = 2,
  parameter int SP        = 2,
  parameter int L1_SHIFT  = 8,
  parameter int L2_SHIFT  = 9,
  parameter bit L1_APPROX = 1'b0,
  parameter int L1_NL     = 2,
  parameter bit L2_APPROX = 1'b1,
  parameter int L2_NL     = 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  act_t                    in_pix,
  output logic                    out_valid,
  output act_t [C2-1:0]           out_pix,
  output logic                    l1_stat_valid,
  output logic [$clog2(C1+1)-1:0] l1_stat_noops,
  output logic                    l2_stat_valid,
  output logic [$clog2(C2+1)-1:0] l2_stat_noops
);

  localparam int W1 = (IMG_W - KC + 1 - KP) / SP + 1;
  localparam int H1 = (IMG_H - KC + 1 - KP) / SP + 1;

  logic          l1_valid;
  act_t [C1-1:0] l1_pix;

  cnn_layer #(
    .NI(1), .NO(C1), .KC(KC), .W(IMG_W), .H(IMG_H), .KP(KP), .SP(SP),
    .LAYER(1), .SHIFT(L1_SHIFT), .APPROX(L1_APPROX), .NL(L1_NL)
  ) u_layer1 (
    .clk, .rst_n, .in_valid, .in_pix(in_pix),
    .out_valid(l1_valid), .out_pix(l1_pix),
    .stat_valid(l1_stat_valid), .stat_noops(l1_stat_noops)
  );

  cnn_layer #(
    .NI(C1), .NO(C2), .KC(KC), .W(W1), .H(H1), .KP(KP), .SP(SP),
    .LAYER(2), .SHIFT(L2_SHIFT), .APPROX(L2_APPROX), .NL(L2_NL)
  ) u_layer2 (
    .clk, .rst_n, .in_valid(l1_valid), .in_pix(l1_pix),
    .out_valid, .out_pix,
    .stat_valid(l2_stat_valid), .stat_noops(l2_stat_noops)
  );

endmodule
