// cnn_layer: one streaming CONV-ReLU-MAX layer.
//
// The layer consumes a raster-scan stream of NI maps (W x H) and produces a
// raster-scan stream of NO pooled maps. A line buffer forms a KC x KC x NI
// window per pixel; NO conv_unit instances (one per output map, all in
// parallel) compute the convolution; relu and max_pool follow. Each layer
// starts working as soon as its line buffer holds a full window, so all layers
// of a network run concurrently on one image.
//
// APPROX = 0 builds the plain layer. APPROX = 1 adds ReLU prediction: a
// second line buffer feeds NO approx_conv units (power-of-two weights,
// NL levels), relu_pred turns the signs of their sums into per-unit enable /
// NO-OP commands, and a pixel_delay_buffer delays the stream into the exact
// CONV line buffer by the DELAY = 2 cycles that ApproxConv + ReLUPred take,
// so window and command meet at the CONV units. Maps predicted non-positive
// are not computed and come out as 0; ReLU removes false positives. Giving
// the predictor its own line buffer (rather than delaying the window) is this
// design's reading of the structure.
//
// Statistics: stat_valid pulses with each window issued to the CONV units,
// stat_noops gives how many of the NO units were told NO-OP for it.
// Latency (pixel closing a window -> pooled output closing a pool window):
// 6 cycles plain, 8 cycles with prediction.
module cnn_layer
  import cnn_pkg::*;
#(
  parameter int NI     = 1,   // input maps
  parameter int NO     = 20,  // output maps
  parameter int KC     = 5,   // convolution kernel
  parameter int W      = 28,  // input width
  parameter int H      = 28,  // input height
  parameter int KP     = 2,   // pool kernel
  parameter int SP     = 2,   // pool stride
  parameter int LAYER  = 1,   // selects the weight set
  parameter int SHIFT  = 8,   // requantisation shift of the CONV units
  parameter bit APPROX = 1'b0,// 1: add ApproxConv/ReLUPred/delay buffer
  parameter int NL     = 1    // ApproxConv power-of-two levels
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  act_t [NI-1:0]           in_pix,
  output logic                    out_valid,
  output act_t [NO-1:0]           out_pix,
  output logic                    stat_valid,
  output logic [$clog2(NO+1)-1:0] stat_noops
);

  localparam int WC    = W - KC + 1;  // conv output width
  localparam int HC    = H - KC + 1;  // conv output height
  localparam int DELAY = 2;           // ApproxConv (1) + ReLUPred (1)

  logic                          cv_in_valid;
  act_t [NI-1:0]                 cv_in_pix;
  logic                          win_valid;
  act_t [KC-1:0][KC-1:0][NI-1:0] win;
  logic [NO-1:0]                 en;
  logic [NO-1:0]                 conv_valid;
  act_t [NO-1:0]                 conv_act;
  logic                          relu_valid;
  act_t [NO-1:0]                 relu_pix;

  if (APPROX) begin : g_pred
    localparam int E = w99_exponent(LAYER, NO, NI, KC);

    logic                          a_valid;
    act_t [KC-1:0][KC-1:0][NI-1:0] a_win;
    logic [NO-1:0]                 s_valid;
    acc_t                          s_sum [NO];
    logic                          p_valid;
    logic [$clog2(NO+1)-1:0]       p_noops;

    line_buffer #(.NI(NI), .KC(KC), .W(W), .H(H)) u_lb_approx (
      .clk, .rst_n, .in_valid, .in_pix,
      .out_valid(a_valid), .out_win(a_win)
    );

    for (genvar o = 0; o < NO; o++) begin : g_ac
      approx_conv #(.NI(NI), .KC(KC), .LAYER(LAYER), .OUT_IDX(o), .NL(NL), .E(E)) u_ac (
        .clk, .rst_n, .in_valid(a_valid), .in_win(a_win),
        .out_valid(s_valid[o]), .out_sum(s_sum[o])
      );
    end

    relu_pred #(.NO(NO)) u_pred (
      .clk, .rst_n, .in_valid(s_valid[0]), .in_sum(s_sum),
      .out_valid(p_valid), .out_en(en), .out_noops(p_noops)
    );

    pixel_delay_buffer #(.NI(NI), .DEPTH(DELAY)) u_delay (
      .clk, .rst_n, .in_valid, .in_pix,
      .out_valid(cv_in_valid), .out_pix(cv_in_pix)
    );

    assign stat_noops = p_noops;

    // The command must arrive together with the window it belongs to.
    assert property (@(posedge clk) disable iff (!rst_n) p_valid == win_valid)
      else $error("cnn_layer: prediction and CONV window out of step");
  end else begin : g_plain
    assign en          = '1;
    assign cv_in_valid = in_valid;
    assign cv_in_pix   = in_pix;
    assign stat_noops  = '0;
  end

  assign stat_valid = win_valid;

  line_buffer #(.NI(NI), .KC(KC), .W(W), .H(H)) u_lb (
    .clk, .rst_n, .in_valid(cv_in_valid), .in_pix(cv_in_pix),
    .out_valid(win_valid), .out_win(win)
  );

  for (genvar o = 0; o < NO; o++) begin : g_cu
    conv_unit #(.NI(NI), .KC(KC), .LAYER(LAYER), .OUT_IDX(o), .SHIFT(SHIFT)) u_cu (
      .clk, .rst_n, .in_valid(win_valid), .in_en(en[o]), .in_win(win),
      .out_valid(conv_valid[o]), .out_act(conv_act[o])
    );
  end

  relu #(.N(NO)) u_relu (
    .clk, .rst_n, .in_valid(conv_valid[0]), .in_pix(conv_act),
    .out_valid(relu_valid), .out_pix(relu_pix)
  );

  max_pool #(.N(NO), .KP(KP), .SP(SP), .W(WC), .H(HC)) u_pool (
    .clk, .rst_n, .in_valid(relu_valid), .in_pix(relu_pix),
    .out_valid, .out_pix
  );

endmodule
