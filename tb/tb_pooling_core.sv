// Testbench of pooling_core: two instances (max and min pooling, 3x3 windows,
// stride 2, two maps of 9x9) take the same input stream in lockstep, two
// frames, with random input gaps and random output back-pressure. Every
// result is compared with a reference pooling of the frame.
module tb_pooling_core;
  import stencil_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  localparam int LP = 2, K = 3, S = 2, D = 9, OD = (D - K) / S + 1, FR = 2;
  logic v, out_ready;
  logic [LP*8-1:0] in_data;
  logic rdy_a, rdy_b, ov_a, ov_b;
  logic [LP*8-1:0] od_a, od_b;
  int checks = 0, failures = 0, n_a = 0, n_b = 0;
  byte img[FR][LP][D][D];

  pooling_core #(.LAYER_PARAL(LP), .D_WIDTH(8), .K(K), .STRIDE(S), .DIM(D), .POOL_TYPE(POOL_MAX)) u_max (
    .clk, .rst, .in_valid(v && rdy_b), .in_ready(rdy_a), .in_data,
    .out_valid(ov_a), .out_ready, .out_data(od_a));
  pooling_core #(.LAYER_PARAL(LP), .D_WIDTH(8), .K(K), .STRIDE(S), .DIM(D), .POOL_TYPE(POOL_MIN)) u_min (
    .clk, .rst, .in_valid(v && rdy_a), .in_ready(rdy_b), .in_data,
    .out_valid(ov_b), .out_ready, .out_data(od_b));

  function automatic byte ref_pool(input int fr, input int m, input int r, input int c, input bit mn);
    byte b;
    b = img[fr][m][r*S][c*S];
    for (int i = 0; i < K; i++)
      for (int j = 0; j < K; j++)
        if (mn ? img[fr][m][r*S+i][c*S+j] < b : img[fr][m][r*S+i][c*S+j] > b) b = img[fr][m][r*S+i][c*S+j];
    return b;
  endfunction

  initial begin
    foreach (img[f, m, r, c]) img[f][m][r][c] = byte'($urandom);
    v = 0; in_data = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int f = 0; f < FR; f++)
      for (int p = 0; p < D*D; p++) begin
        while ($urandom_range(0, 3) == 0) begin v = 0; @(negedge clk); end
        v = 1;
        for (int m = 0; m < LP; m++) in_data[m*8 +: 8] = img[f][m][p / D][p % D];
        @(posedge clk);
        while (!(rdy_a && rdy_b)) @(posedge clk);
        @(negedge clk);
        v = 0;
      end
  end
  always @(posedge clk) out_ready <= $urandom_range(0, 2) != 0;
  always @(posedge clk) if (!rst) begin
    if (ov_a && out_ready) begin
      for (int m = 0; m < LP; m++) begin
        checks++;
        if (signed'(od_a[m*8 +: 8]) != ref_pool(n_a / (OD*OD), m, (n_a % (OD*OD)) / OD, n_a % OD, 0)) begin
          failures++; $display("max result %0d map %0d wrong", n_a, m);
        end
      end
      n_a++;
    end
    if (ov_b && out_ready) begin
      for (int m = 0; m < LP; m++) begin
        checks++;
        if (signed'(od_b[m*8 +: 8]) != ref_pool(n_b / (OD*OD), m, (n_b % (OD*OD)) / OD, n_b % OD, 1)) begin
          failures++; $display("min result %0d map %0d wrong", n_b, m);
        end
      end
      n_b++;
    end
    if (n_a == FR*OD*OD && n_b == FR*OD*OD) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
  initial begin
    repeat (10000) @(posedge clk);
    $display("results %0d %0d of %0d", n_a, n_b, FR*OD*OD);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
