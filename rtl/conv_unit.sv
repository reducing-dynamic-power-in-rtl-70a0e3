// conv_unit: fully unrolled convolution for one output feature map.
//
// KC*KC*NI parallel multipliers, each with its trained weight hard-coded as
// an elaboration-time constant (cnn_pkg::conv_weight), feed a binary adder
// tree together with the map's bias. The sum is rescaled to int8 by an
// arithmetic right shift of SHIFT bits with saturation; the result is the
// pre-activation value (ReLU follows in its own unit).
//
// Power gating: in_en is the NO-OP command from the ReLU predictor (tie it
// high in a layer without prediction). Stage 1 captures the window only when
// in_valid && in_en, so for a NO-OP the multipliers and adders see no
// toggling inputs; this register enable is the clock-enable form of the
// clock gating used on FPGAs. Stage 2 registers the result, and for a NO-OP
// window it outputs 0, the value assigned to activations predicted negative.
//
// Timing: two cycles from an in_valid window to out_valid; one window per
// cycle. The shift/saturate rescaling is this design's choice of
// requantisation (not specified beyond "8-bit integer precision").
module conv_unit
  import cnn_pkg::*;
#(
  parameter int NI      = 1,  // input feature maps
  parameter int KC      = 5,  // kernel size
  parameter int LAYER   = 1,  // layer number, selects the weight set
  parameter int OUT_IDX = 0,  // output feature map index, selects the filter
  parameter int SHIFT   = 8   // requantisation right shift
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  logic                          in_en,
  input  act_t [KC-1:0][KC-1:0][NI-1:0] in_win,
  output logic                          out_valid,
  output act_t                          out_act
);

  localparam int N    = KC * KC * NI;
  localparam int BIAS = conv_bias(LAYER, OUT_IDX);

  act_t [KC-1:0][KC-1:0][NI-1:0] win_q;
  logic v1, g1;
  acc_t prod [N];
  acc_t node [2*N-1];

  // Stage 1: operand register, gated by the NO-OP command.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0;
      g1 <= 1'b0;
    end else begin
      v1 <= in_valid;
      g1 <= in_valid && in_en;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_en) win_q <= in_win;
  end

  // Constant-coefficient multipliers.
  for (genvar ky = 0; ky < KC; ky++) begin : g_ky
    for (genvar kx = 0; kx < KC; kx++) begin : g_kx
      for (genvar ci = 0; ci < NI; ci++) begin : g_ci
        localparam int WGT = conv_weight(LAYER, OUT_IDX, ci, ky, kx);
        assign prod[(ky*KC + kx)*NI + ci] = acc_t'($signed(win_q[ky][kx][ci])) * acc_t'(WGT);
      end
    end
  end

  // Adder tree, stored as a heap: leaves at N-1 .. 2N-2, node j sums its
  // children 2j+1 and 2j+2.
  always_comb begin
    for (int i = 0; i < N; i++) node[N-1+i] = prod[i];
    for (int j = N - 2; j >= 0; j--) node[j] = node[2*j+1] + node[2*j+2];
  end

  // Stage 2: bias, rescale, output register; NO-OP windows give 0.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_act   <= '0;
    end else begin
      out_valid <= v1;
      if (v1) out_act <= g1 ? sat_act((node[0] + acc_t'(BIAS)) >>> SHIFT) : '0;
    end
  end

endmodule
