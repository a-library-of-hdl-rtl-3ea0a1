// Testbench of weights_engine: three weight sets (3x3 windows, 2 input maps,
// 3 output maps, 64-bit beats so the last beat is partly used) are streamed
// with random gaps. Checks loaded, that beats are refused while loaded, and
// every weight read back through idx for every MACC; consume frees the store.
module tb_weights_engine;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  localparam int K = 3, FP = 2, LP = 3, DW = 64, N = LP*FP*K*K, PB = DW/8, NB = (N + PB - 1) / PB;
  logic w_valid, w_ready, loaded, consume;
  logic [DW-1:0] w_data;
  logic [3:0] idx;
  logic [LP*FP*8-1:0] w_out;
  int checks = 0, failures = 0;
  byte wt[N];

  weights_engine #(.K(K), .FM_PARAL(FP), .LAYER_PARAL(LP), .W_WIDTH(8), .DMA_WIDTH(DW)) dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    w_valid = 0; w_data = 0; consume = 0; idx = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int set = 0; set < 3; set++) begin
      foreach (wt[i]) wt[i] = byte'($urandom);
      chk(w_ready && !loaded, "empty store accepts beats");
      for (int b = 0; b < NB; b++) begin
        while ($urandom_range(0, 2) == 0) begin w_valid = 0; @(negedge clk); end
        for (int j = 0; j < PB; j++) w_data[j*8 +: 8] = (b*PB + j < N) ? wt[b*PB + j] : 8'($urandom);
        w_valid = 1;
        chk(!loaded, "loaded only after the last beat");
        @(negedge clk);
      end
      w_valid = 1; w_data = '1;           // extra beat must be refused
      chk(loaded && !w_ready, "loaded, further beats refused");
      @(negedge clk);
      w_valid = 0;
      for (int i = 0; i < K*K; i++) begin
        idx = 4'(i);
        #1;
        for (int m = 0; m < LP*FP; m++)
          chk(w_out[m*8 +: 8] == wt[m*K*K + i], $sformatf("set %0d macc %0d elem %0d", set, m, i));
      end
      @(negedge clk);
      consume = 1;
      @(negedge clk);
      consume = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
