// Testbench of coarse_layer: (a) 3x3 filters, stride 1, padding 1, 2 -> 3
// maps with 2x2/2 max pooling; (b) 3x3 filters, stride 2, no padding, no
// pooling; both over two frames with weights reloaded per frame and the first
// weights sent late. Checks every output and that the weight stall happened.
module tb_coarse_layer;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int c0, f0, s0, c1, f1, s1;
  bit d0, d1;

  coarse_check #(.K(3), .STRIDE(1), .PAD(1), .IN_DIM(6), .FP(2), .LP(3), .POOL(1)) u_a
    (.clk, .rst, .checks(c0), .failures(f0), .stall_cycles(s0), .done(d0));
  coarse_check #(.K(3), .STRIDE(2), .PAD(0), .IN_DIM(9), .FP(3), .LP(2), .POOL(0), .DMA(32)) u_b
    (.clk, .rst, .checks(c1), .failures(f1), .stall_cycles(s1), .done(d1));

  initial begin
    int checks, failures;
    repeat (3) @(posedge clk);
    rst = 0;
    wait (d0 && d1);
    checks = c0 + c1 + 1;
    failures = f0 + f1 + ((s0 > 0 && s1 > 0) ? 0 : 1);
    $display("weight stall cycles: %0d %0d", s0, s1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1 + 1);
    $finish;
  end
endmodule
