// Testbench of conv_kernel: random 3x3 windows and weights, one element per
// clock with random gaps; the result must equal the dot product and appear
// one clock after the last element; the accumulator restarts on first.
module tb_conv_kernel;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  localparam int K = 3;
  logic [K*K*8-1:0] win;
  logic [3:0] idx;
  logic mac_en, first, last, res_valid;
  logic signed [7:0] w;
  logic signed [23:0] res;
  int checks = 0, failures = 0;

  conv_kernel #(.K(K), .D_WIDTH(8), .W_WIDTH(8), .MACC_WIDTH(24)) dut (.*);

  initial begin
    mac_en = 0; first = 0; last = 0; idx = 0; w = 0; win = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 100; t++) begin
      int wt[K*K], s;
      s = 0;
      for (int i = 0; i < K*K; i++) begin
        win[i*8 +: 8] = 8'($urandom);
        wt[i] = int'($urandom_range(0, 255)) - 128;
        s += int'(signed'(win[i*8 +: 8])) * wt[i];
      end
      for (int i = 0; i < K*K; i++) begin
        while ($urandom_range(0, 3) == 0) begin mac_en = 0; first = 0; last = 0; @(negedge clk); end
        mac_en = 1; idx = 4'(i); w = 8'(wt[i]); first = (i == 0); last = (i == K*K-1);
        @(negedge clk);
        if (i < K*K - 1) begin checks++; if (res_valid) failures++; end
      end
      mac_en = 0; first = 0; last = 0;
      checks++;
      if (!res_valid || res != s) begin
        failures++;
        $display("window %0d: got %0d valid %0d expected %0d", t, res, res_valid, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
