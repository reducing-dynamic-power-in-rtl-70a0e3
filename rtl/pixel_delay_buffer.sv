// pixel_delay_buffer: synchronisation buffer in front of the exact CONV path
// of a layer with ReLU prediction.
//
// The ApproxConv unit and the ReLUPred unit need DEPTH clock cycles to turn a
// convolution window into a NO-OP decision. This buffer delays the layer's
// input pixel stream (valid flag and NI pixels) by the same DEPTH cycles, so
// the exact CONV path, which has its own line buffer behind this one, sees
// each window exactly when its prediction is ready. It is a plain register
// pipeline clocked every cycle (not only on valid pixels), so gaps in the
// stream are delayed unchanged and the alignment holds for any input pattern.
// Only the valid flags are reset.
module pixel_delay_buffer
  import cnn_pkg::*;
#(
  parameter int NI    = 1,  // pixels per stream beat
  parameter int DEPTH = 2   // delay in clock cycles (>= 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  act_t [NI-1:0] in_pix,
  output logic          out_valid,
  output act_t [NI-1:0] out_pix
);

  logic          v_q [DEPTH];
  act_t [NI-1:0] p_q [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int d = 0; d < DEPTH; d++) v_q[d] <= 1'b0;
    end else begin
      v_q[0] <= in_valid;
      for (int d = 1; d < DEPTH; d++) v_q[d] <= v_q[d-1];
    end
  end

  always_ff @(posedge clk) begin
    p_q[0] <= in_pix;
    for (int d = 1; d < DEPTH; d++) p_q[d] <= p_q[d-1];
  end

  assign out_valid = v_q[DEPTH-1];
  assign out_pix   = p_q[DEPTH-1];

endmodule
