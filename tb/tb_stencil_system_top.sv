// End-to-end testbench of stencil_system_top at reduced size: a 2-engine
// Jacobi-2D chain on a 16x6 array in link loopback with 10-word host packets,
// and a 3x3 / stride 2 / pad 1 CNN stage (2 -> 3 maps, 12x12 input, 3x3/2
// pooling). See system_tb_body.svh for what is checked and counted.
module tb_stencil_system_top;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  localparam int CH = 2, COLS_ = 16, ROWS_ = 6, L_ = 4, LINKW = 512, PKT = 10;
  localparam int CK = 3, CS = 2, CP = 1, CDIM_IN = 12, CFP = 2, CLP = 3, CDMA = 64;

  stencil_system_top #(
    .CHAIN_LENGTH(CH), .COLS(COLS_), .ROWS(ROWS_), .LANES(L_), .LINK_W(LINKW), .WDOG_TIMEOUT(30),
    .CNN_K(CK), .CNN_STRIDE(CS), .CNN_PAD(CP), .CNN_IN_DIM(CDIM_IN), .FM_PARAL(CFP),
    .LAYER_PARAL(CLP), .DMA_WIDTH(CDMA), .CNN_POOL(1'b1)
  ) dut (.*);

  `include "system_tb_body.svh"

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
