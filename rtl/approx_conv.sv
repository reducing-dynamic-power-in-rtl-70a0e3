// approx_conv: lightweight approximate convolution for one output map.
//
// Same shape as conv_unit (KC*KC*NI terms, adder tree, same bias) but every
// weight is replaced by its power-of-two approximation, so each multiplier
// becomes a constant shift: the term is 0, +(x << s) or -(x << s). The
// approximate weight of each position is found at elaboration time from the
// exact weight (cnn_pkg::approx_code, nearest of NL power-of-two levels below
// 2^E, E from the layer's 99th-percentile weight) and kept as the packed code
// the mapping procedure produces; the shift and sign are decoded from that
// code. With constant codes, synthesis reduces each shift to wiring.
//
// The output is the raw approximate accumulator (bias included, no rescaling),
// since only its sign is used. Using the exact bias in the approximation is
// this design's choice. Timing: one cycle from an in_valid window to
// out_valid; one window per cycle.
module approx_conv
  import cnn_pkg::*;
#(
  parameter int NI      = 1,  // input feature maps
  parameter int KC      = 5,  // kernel size
  parameter int LAYER   = 2,  // layer number, selects the weight set
  parameter int OUT_IDX = 0,  // output feature map index
  parameter int NL      = 1,  // number of power-of-two levels
  parameter int E       = 5   // exponent of the largest level (2^E)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  act_t [KC-1:0][KC-1:0][NI-1:0] in_win,
  output logic                          out_valid,
  output acc_t                          out_sum
);

  localparam int N    = KC * KC * NI;
  localparam int CW   = approx_code_w(NL);
  localparam int BIAS = conv_bias(LAYER, OUT_IDX);

  acc_t term [N];
  acc_t node [2*N-1];

  for (genvar ky = 0; ky < KC; ky++) begin : g_ky
    for (genvar kx = 0; kx < KC; kx++) begin : g_kx
      for (genvar ci = 0; ci < NI; ci++) begin : g_ci
        localparam logic [CW-1:0] CODE =
          CW'(approx_code(conv_weight(LAYER, OUT_IDX, ci, ky, kx), E, NL));
        localparam bit ZERO = (CODE == 0);
        localparam bit NEG  = (int'(CODE) > NL);
        localparam int LVL  = NEG ? int'(CODE) - NL : int'(CODE);
        localparam int SH   = ZERO ? 0 : E - LVL + 1;
        if (ZERO) begin : g_zero
          assign term[(ky*KC + kx)*NI + ci] = '0;
        end else if (NEG) begin : g_neg
          assign term[(ky*KC + kx)*NI + ci] = -(acc_t'($signed(in_win[ky][kx][ci])) <<< SH);
        end else begin : g_pos
          assign term[(ky*KC + kx)*NI + ci] = acc_t'($signed(in_win[ky][kx][ci])) <<< SH;
        end
      end
    end
  end

  always_comb begin
    for (int i = 0; i < N; i++) node[N-1+i] = term[i];
    for (int j = N - 2; j >= 0; j--) node[j] = node[2*j+1] + node[2*j+2];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_sum   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_sum <= node[0] + acc_t'(BIAS);
    end
  end

  // The smallest level must still be an integer weight.
  initial assert (E - NL + 1 >= 0)
    else $error("approx_conv: levels below 2^0 are not representable (E=%0d NL=%0d)", E, NL);

endmodule
