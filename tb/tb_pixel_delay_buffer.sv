// tb_pixel_delay_buffer: self-checking test of pixel_delay_buffer with NI=2
// and DEPTH=3. A random stream with random gaps goes in; the output must be
// the input of exactly DEPTH cycles earlier, valid flag included.
module tb_pixel_delay_buffer;
  import cnn_pkg::*;
  localparam int NI = 2, DEPTH = 3;

  logic clk = 0, rst_n = 0;
  logic in_valid;
  act_t [NI-1:0] in_pix;
  logic out_valid;
  act_t [NI-1:0] out_pix;

  int checks = 0, failures = 0;
  logic hv [$];
  act_t [NI-1:0] hp [$];

  pixel_delay_buffer #(.NI(NI), .DEPTH(DEPTH)) dut (.*);

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
    @(negedge clk);
    rst_n = 1;
    // Output in cycle t+DEPTH is the input of cycle t; the check runs one
    // cycle after each input, so DEPTH-1 idle beats lead the history.
    for (int d = 0; d < DEPTH - 1; d++) begin
      hv.push_back(1'b0);
      hp.push_back('0);
    end
    for (int n = 0; n < 500; n++) begin
      in_valid = $urandom_range(0, 1);
      in_pix = {act_t'($urandom), act_t'($urandom)};
      hv.push_back(in_valid);
      hp.push_back(in_pix);
      @(negedge clk);
      begin
        logic v;
        act_t [NI-1:0] p;
        v = hv.pop_front();
        p = hp.pop_front();
        checks++;
        if (out_valid !== v || (v && out_pix !== p)) begin
          failures++;
          $display("n=%0d got %0b %h exp %0b %h", n, out_valid, out_pix, v, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
