// Testbench of isl_accelerator: a chain of 4 Jacobi-2D engines on a 16x8
// array, three arrays (two back to back, one after a gap) with random flow
// control; output compared with four reference timesteps. A fourth array is
// run at full rate and must stream one word per clock.
module tb_isl_accelerator;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  localparam int CH = 4, COLS = 16, ROWS = 8, L = 4, TOT = COLS * ROWS, WPA = TOT / L, NA = 4;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [L*32-1:0] in_data, out_data;
  int checks = 0, failures = 0;

  isl_accelerator #(.CHAIN_LENGTH(CH), .DIM(2), .LANES(L), .COLS(COLS), .ROWS(ROWS)) dut (.*);

  int src [NA][];
  int exp_arr [NA][];
  int cyc = 0, t0, t1;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    for (int n = 0; n < NA; n++) begin
      int a[], b[];
      src[n] = new[TOT];
      foreach (src[n][i]) src[n][i] = int'($urandom_range(0, 1 << 20));
      a = src[n];
      for (int s = 0; s < CH; s++) begin
        isl_ref_pkg::step(2, 0, 16, COLS, ROWS, 1, a, b);
        a = b;
      end
      exp_arr[n] = a;
    end
    in_valid = 0; in_data = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < NA; n++) begin
      if (n == 2) repeat (400) @(negedge clk);
      if (n == 3) wait (cnt_out == 3 * WPA);
      for (int w = 0; w < WPA; w++) begin
        if (n < 3) while ($urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1;
        for (int l = 0; l < L; l++) in_data[l*32 +: 32] = src[n][w*L + l];
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        @(negedge clk);
      end
      in_valid = 0;
    end
  end

  int cnt_out = 0;
  always @(negedge clk) out_ready <= (cnt_out >= 3 * WPA) ? 1'b1 : ($urandom_range(0, 3) != 0);
  always @(posedge clk) begin
    if (!rst && out_valid && out_ready) begin
      int n, w;
      n = cnt_out / WPA; w = cnt_out % WPA;
      if (n == 3 && w == 0) t0 = cyc;
      if (n == 3 && w == WPA - 1) t1 = cyc;
      for (int l = 0; l < L; l++) begin
        checks++;
        if (int'(out_data[l*32 +: 32]) != exp_arr[n][w*L + l]) begin
          failures++;
          if (failures < 5) $display("array %0d word %0d lane %0d: %0d vs %0d", n, w, l,
                                     int'(out_data[l*32 +: 32]), exp_arr[n][w*L + l]);
        end
      end
      cnt_out <= cnt_out + 1;
      if (cnt_out == NA * WPA - 1) begin
        checks++;
        if (t1 - t0 != WPA - 1) begin
          failures++;
          $display("full-rate array took %0d cycles for %0d words", t1 - t0 + 1, WPA);
        end
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
