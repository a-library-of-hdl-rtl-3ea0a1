// Testbench of requant_core: random accumulations, biases and shifts on 4
// maps; compares with a reference of bias add, ReLU, round-half-up shift and
// saturation to 0..127, one clock after the input.
module tb_requant_core;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  localparam int LP = 4;
  logic [LP*32-1:0] bias, in;
  logic [4:0] shift;
  logic in_valid, out_valid;
  logic [LP*8-1:0] out;
  int checks = 0, failures = 0;

  requant_core #(.LAYER_PARAL(LP), .ACC_WIDTH(32), .D_WIDTH(8)) dut (.*);

  function automatic int rq(input longint x, input int s);
    longint r;
    if (x < 0) x = 0;
    r = (s == 0) ? x : ((x + (64'sd1 << (s - 1))) >>> s);
    return (r > 127) ? 127 : int'(r);
  endfunction

  initial begin
    in_valid = 0; in = 0; bias = 0; shift = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    repeat (400) begin
      int e[LP];
      bit v;
      v = $urandom_range(0, 3) != 0;
      in_valid = v;
      shift = 5'($urandom_range(0, 14));
      for (int o = 0; o < LP; o++) begin
        in[o*32 +: 32] = 32'(int'($urandom_range(0, 1 << 17)) - (1 << 16));
        bias[o*32 +: 32] = 32'(int'($urandom_range(0, 4096)) - 2048);
        e[o] = rq(longint'(signed'(in[o*32 +: 32])) + longint'(signed'(bias[o*32 +: 32])), shift);
      end
      @(negedge clk);
      checks++;
      if (out_valid != v) failures++;
      if (v)
        for (int o = 0; o < LP; o++) begin
          checks++;
          if (out[o*8 +: 8] != 8'(e[o])) begin
            failures++; $display("map %0d: %0d vs %0d", o, out[o*8 +: 8], e[o]);
          end
        end
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
