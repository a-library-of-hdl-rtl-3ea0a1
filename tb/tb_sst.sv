// Testbench of sst: 2D Jacobi and 2D Heat with random flow control, a 2D
// Jacobi run at full rate checking one word per clock, 1D Heat and 3D Jacobi.
// Every output element is compared with the reference model.
module tb_sst;
  import stencil_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  localparam int N = 5;
  int  c [N], f [N];
  bit  d [N];

  sst_check #(.DIM(2), .KIND(JACOBI), .COLS(16), .ROWS(6))  u0 (.clk, .rst, .checks(c[0]), .failures(f[0]), .done(d[0]));
  sst_check #(.DIM(2), .KIND(HEAT),   .COLS(12), .ROWS(5))  u1 (.clk, .rst, .checks(c[1]), .failures(f[1]), .done(d[1]));
  sst_check #(.DIM(2), .KIND(JACOBI), .COLS(16), .ROWS(8), .RANDOM_FLOW(0)) u2 (.clk, .rst, .checks(c[2]), .failures(f[2]), .done(d[2]));
  sst_check #(.DIM(1), .KIND(HEAT),   .COLS(40), .ROWS(1))  u3 (.clk, .rst, .checks(c[3]), .failures(f[3]), .done(d[3]));
  sst_check #(.DIM(3), .KIND(JACOBI), .COLS(12), .ROWS(5), .PLANES(4)) u4 (.clk, .rst, .checks(c[4]), .failures(f[4]), .done(d[4]));

  int checks, failures;
  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    wait (d[0] && d[1] && d[2] && d[3] && d[4]);
    checks = 0; failures = 0;
    for (int i = 0; i < N; i++) begin checks += c[i]; failures += f[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    checks = 0; failures = 1;
    for (int i = 0; i < N; i++) begin checks += c[i]; failures += f[i]; end
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
