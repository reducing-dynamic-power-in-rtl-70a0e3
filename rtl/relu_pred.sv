// relu_pred: ReLU predictor. An extension of the ReLU unit that, instead of
// zeroing pixels, turns the sign of each approximate activation into a
// command for the matching exact CONV unit: out_en[o] = 1 (compute) when the
// approximate sum of map o is strictly positive, 0 (NO-OP) otherwise. A zero
// prediction is treated as a NO-OP because ReLU maps it to 0 anyway (this
// design's choice). NO-OPs are also issued for cycles without a valid window.
//
// out_noops counts the NO-OP commands of the current valid window, for power
// statistics. Timing: one register stage, out_* one cycle after in_*.
module relu_pred
  import cnn_pkg::*;
#(
  parameter int NO = 50  // number of output feature maps / CONV units
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  acc_t                   in_sum [NO],
  output logic                   out_valid,
  output logic [NO-1:0]          out_en,
  output logic [$clog2(NO+1)-1:0] out_noops
);

  logic [NO-1:0] en_d;
  logic [$clog2(NO+1)-1:0] cnt_d;

  always_comb begin
    cnt_d = '0;
    for (int o = 0; o < NO; o++) begin
      en_d[o] = in_valid && !in_sum[o][ACC_W-1] && (in_sum[o] != '0);
      if (in_valid && !en_d[o]) cnt_d = cnt_d + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_en    <= '0;
      out_noops <= '0;
    end else begin
      out_valid <= in_valid;
      out_en    <= en_d;
      out_noops <= cnt_d;
    end
  end

endmodule
