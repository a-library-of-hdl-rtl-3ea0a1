// Testbench of cnn_mem_subsystem: 3x3 windows, stride 1, padding 1 over two
// 4x4 maps in parallel. Checks each window (with zero padding), that idx steps
// 0..8 on consecutive clocks (K*K clocks per window), first/last flags, the
// stall while weights_ready is low, and frame_done after the last window.
module tb_cnn_mem_subsystem;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  localparam int K = 3, S = 1, P = 1, D = 4, FP = 2, PD = D + 2*P, OD = (PD - K) / S + 1;
  logic in_valid, in_ready, weights_ready, out_room, mac_en, first, last, frame_done, stalled;
  logic [FP*8-1:0] in_data;
  logic [K*K*FP*8-1:0] win;
  logic [$clog2(K*K)-1:0] idx;
  int checks = 0, failures = 0, nstall = 0;

  cnn_mem_subsystem #(.K(K), .STRIDE(S), .PAD(P), .IN_DIM(D), .FM_PARAL(FP), .D_WIDTH(8)) dut (.*);

  function automatic int val(input int f, input int r, input int c);
    if (r < 0 || c < 0 || r >= D || c >= D) return 0;
    return f * 50 + r * D + c + 1;
  endfunction

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    in_valid = 0; in_data = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int p = 0; p < D*D; p++) begin
      in_valid = 1;
      for (int f = 0; f < FP; f++) in_data[f*8 +: 8] = 8'(val(f, p / D, p % D));
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
    end
    in_valid = 0;
  end
  always @(posedge clk) out_room <= $urandom_range(0, 3) != 0;
  initial begin
    weights_ready = 0;
    repeat (60) @(posedge clk);      // weights late: must stall first
    weights_ready <= 1;
  end
  always @(posedge clk) if (stalled) nstall++;

  initial begin
    for (int n = 0; n < OD*OD; n++) begin
      int wr, wc;
      if (n == 0) @(negedge clk);
      while (!mac_en) @(negedge clk);
      wr = n / OD; wc = n % OD;
      for (int i = 0; i < K*K; i++) begin
        chk(mac_en && idx == i, $sformatf("idx sequence one per clock n=%0d i=%0d idx=%0d en=%0d", n, i, idx, mac_en));
        chk(first == (i == 0) && last == (i == K*K-1), "first/last");
        for (int f = 0; f < FP; f++)
          chk(win[(i*FP + f)*8 +: 8] == 8'(val(f, wr*S + i/K - P, wc*S + i%K - P)), "window element");
        chk(frame_done == (i == K*K-1 && n == OD*OD-1), "frame_done");
        @(negedge clk);
      end
    end
    chk(nstall > 0, "weights stall seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
