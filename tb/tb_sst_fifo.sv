// Testbench of sst_fifo: random pushes and pops against a queue model,
// including push+pop when full; checks data order, count, full and empty.
module tb_sst_fifo;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  localparam int DEPTH = 5;
  logic push, pop, full, empty;
  logic [15:0] din, dout;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [15:0] q[$];

  sst_fifo #(.WIDTH(16), .DEPTH(DEPTH)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    push = 0; pop = 0; din = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      chk(count == q.size(), "count");
      chk(full == (q.size() == DEPTH), "full");
      chk(empty == (q.size() == 0), "empty");
      if (q.size() > 0) chk(dout == q[0], "head");
      pop  = (q.size() > 0) && ($urandom_range(0, 2) != 0);
      push = (q.size() < DEPTH || pop) && ($urandom_range(0, 2) != 0);
      if (i > 1500) begin pop = (q.size() > 0); push = 1; end  // run full with push+pop
      din  = 16'($urandom);
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(din);
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
