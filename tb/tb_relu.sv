// tb_relu: self-checking test of relu with N=4: random pixels including
// -128, -1, 0 and 127; one cycle later negative pixels must be 0 and the
// others unchanged.
module tb_relu;
  import cnn_pkg::*;
  localparam int N = 4;

  logic clk = 0, rst_n = 0;
  logic in_valid;
  act_t [N-1:0] in_pix;
  logic out_valid;
  act_t [N-1:0] out_pix;

  int checks = 0, failures = 0;
  logic ev;
  act_t [N-1:0] ep;

  relu #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_pix = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      in_valid = 1'b1;
      for (int i = 0; i < N; i++) begin
        case ($urandom_range(0, 4))
          0: in_pix[i] = -128;
          1: in_pix[i] = -1;
          2: in_pix[i] = 0;
          3: in_pix[i] = 127;
          default: in_pix[i] = act_t'($urandom);
        endcase
        ep[i] = (int'(in_pix[i]) < 0) ? act_t'(0) : in_pix[i];
      end
      @(negedge clk);
      checks++;
      if (!out_valid || out_pix !== ep) begin
        failures++;
        $display("got %h exp %h", out_pix, ep);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
