// Testbench of cnn_line_buffer: 3x3 windows with stride 2 over a 7x7 map,
// two frames, random input gaps and random hold times; every held window is
// compared with the map and the number of windows per frame is checked.
module tb_cnn_line_buffer;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  localparam int K = 3, S = 2, D = 7, OD = (D - K) / S + 1;
  logic in_valid, in_ready, win_valid, win_done;
  logic [15:0] in_data;
  logic [K*K*16-1:0] win;
  int checks = 0, failures = 0, nwin = 0;

  cnn_line_buffer #(.K(K), .STRIDE(S), .DIM(D), .WIDTH(16)) dut (.*);

  function automatic logic [15:0] val(input int f, input int r, input int c);
    return 16'(f * 1000 + r * 31 + c);
  endfunction

  initial begin
    in_valid = 0; in_data = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int f = 0; f < 2; f++)
      for (int p = 0; p < D*D; p++) begin
        while ($urandom_range(0, 2) == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1; in_data = val(f, p / D, p % D);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        @(negedge clk);
        in_valid = 0;
      end
  end
  // consumer: checks each window, holds it a random time
  initial begin
    win_done = 0;
    for (int n = 0; n < 2 * OD * OD; n++) begin
      int f, wr, wc;
      @(negedge clk);
      while (!win_valid) @(negedge clk);
      f = n / (OD*OD); wr = (n % (OD*OD)) / OD; wc = n % OD;
      for (int i = 0; i < K; i++)
        for (int j = 0; j < K; j++) begin
          checks++;
          if (win[(i*K + j)*16 +: 16] != val(f, wr*S + i, wc*S + j)) begin
            failures++;
            $display("window %0d (%0d,%0d) elem %0d,%0d", n, wr, wc, i, j);
          end
        end
      repeat ($urandom_range(0, 4)) @(negedge clk);
      win_done = 1;
      @(negedge clk);
      win_done = 0;
      nwin++;
    end
    repeat (20) @(negedge clk);
    checks++;
    if (win_valid) begin failures++; $display("extra window"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
