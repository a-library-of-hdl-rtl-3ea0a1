// Testbench of accumulation_core: 5 input maps per output (three tree levels
// with groups of 2), 4 output maps, random signed 24-bit kernel results with
// random valid gaps. Each sum is compared in order and the latency of every
// result must be the number of tree levels.
module tb_accumulation_core;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  localparam int FP = 5, LP = 4, LEV = 3;
  logic in_valid, out_valid;
  logic [LP*FP*24-1:0] in;
  logic [LP*32-1:0] out;
  int checks = 0, failures = 0, sent = 0, got = 0;
  int exp_q[$];
  int vld_hist[$];

  accumulation_core #(.FM_PARAL(FP), .LAYER_PARAL(LP), .D_WIDTH_IN(24), .ACC_WIDTH(32),
                      .D_WIDTH_OUT(32), .KERNEL_GROUP(2)) dut (.*);

  initial begin
    in_valid = 0; in = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    repeat (300) begin
      int e[LP];
      in_valid = $urandom_range(0, 2) != 0;
      for (int o = 0; o < LP; o++) begin
        e[o] = 0;
        for (int f = 0; f < FP; f++) begin
          in[(o*FP + f)*24 +: 24] = 24'($urandom);
          e[o] += int'(signed'(in[(o*FP + f)*24 +: 24]));
        end
      end
      if (in_valid) begin foreach (e[o]) exp_q.push_back(e[o]); sent++; end
      vld_hist.push_back(in_valid);
      @(negedge clk);
    end
    in_valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (got != sent) begin failures++; $display("got %0d results of %0d", got, sent); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  int cyc = 0;
  always @(posedge clk) if (!rst) begin
    if (out_valid) begin
      int e[LP];
      got++;
      checks++;
      if (cyc < LEV || vld_hist[cyc - LEV] != 1) begin failures++; $display("latency wrong at %0d", cyc); end
      foreach (e[o]) e[o] = exp_q.pop_front();
      for (int o = 0; o < LP; o++) begin
        checks++;
        if (signed'(out[o*32 +: 32]) != e[o]) begin
          failures++; $display("result %0d map %0d: %0d vs %0d", got, o, signed'(out[o*32 +: 32]), e[o]);
        end
      end
    end
    cyc++;
  end
  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
