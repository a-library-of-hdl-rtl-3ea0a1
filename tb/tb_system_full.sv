// Full-size testbench of stencil_system_top with every parameter at its
// default: a 48-engine Jacobi-2D chain on a 1024x1024 array in link loopback
// (1000-word host packets, so the last packet is completed by the watchdog),
// and the first AlexNet stage (227x227x3 input, 96 11x11 filters, stride 4,
// 3x3/2 max pooling to 27x27x96). See system_tb_body.svh.
module tb_system_full;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  localparam int CH = 48, COLS_ = 1024, ROWS_ = 1024, L_ = 4, LINKW = 512, PKT = 1000;
  localparam int CK = 11, CS = 4, CP = 0, CDIM_IN = 227, CFP = 3, CLP = 96, CDMA = 512;

  stencil_system_top dut (.*);

  `include "system_tb_body.svh"

  initial begin
    repeat (3000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
