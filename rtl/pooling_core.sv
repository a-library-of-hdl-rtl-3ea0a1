// pooling_core: max (or min) pooling of LAYER_PARAL output maps.
//
// Uses the same FIFO-chain line buffer as the convolution: the requantised
// maps stream in, and for every pooling window (K x K, step STRIDE) the chain
// is frozen while one comparator per map scans the K*K elements, one per
// clock, keeping the largest (POOL_MAX) or smallest (POOL_MIN) value. No
// multiplier is needed.
//
// Interface: in_*/out_* valid/ready streams of LAYER_PARAL*D_WIDTH bits, map o
// at [o*D_WIDTH +: D_WIDTH], signed elements. Timing: K*K clocks per window;
// the result is registered and the window is held while out_ready is low.
// The structure follows the document; window size, stride and the handshake
// are this design's choice (AlexNet uses 3x3 windows with stride 2).
module pooling_core
  import stencil_pkg::*;
#(
  parameter int unsigned LAYER_PARAL = 96,
  parameter int unsigned D_WIDTH     = 8,
  parameter int unsigned K           = 3,
  parameter int unsigned STRIDE      = 2,
  parameter int unsigned DIM         = 55,
  parameter pool_type_e  POOL_TYPE   = POOL_MAX
) (
  input  logic                           clk,
  input  logic                           rst,
  input  logic                           in_valid,
  output logic                           in_ready,
  input  logic [LAYER_PARAL*D_WIDTH-1:0] in_data,
  output logic                           out_valid,
  input  logic                           out_ready,
  output logic [LAYER_PARAL*D_WIDTH-1:0] out_data
);
  localparam int unsigned WW = LAYER_PARAL * D_WIDTH;
  localparam int unsigned IW = $clog2(K * K);

  logic              win_valid, win_done, step, lastel;
  logic [K*K*WW-1:0] win;
  logic [IW-1:0]     idx;
  logic signed [D_WIDTH-1:0] best [LAYER_PARAL];

  cnn_line_buffer #(.K(K), .STRIDE(STRIDE), .DIM(DIM), .WIDTH(WW)) u_lb (
    .clk, .rst, .in_valid, .in_ready, .in_data, .win_valid, .win, .win_done
  );

  assign lastel   = (idx == IW'(K * K - 1));
  assign step     = win_valid && (!lastel || !out_valid || out_ready);
  assign win_done = step && lastel;

  always_ff @(posedge clk) begin
    if (rst) begin
      idx       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      for (int o = 0; o < LAYER_PARAL; o++) best[o] <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (step) begin
        idx <= lastel ? '0 : idx + 1'b1;
        for (int o = 0; o < LAYER_PARAL; o++) begin
          logic signed [D_WIDTH-1:0] x, b;
          x = signed'(win[idx*WW + o*D_WIDTH +: D_WIDTH]);
          if (idx == '0) b = x;
          else if (POOL_TYPE == POOL_MAX) b = (x > best[o]) ? x : best[o];
          else b = (x < best[o]) ? x : best[o];
          best[o] <= b;
          if (lastel) out_data[o*D_WIDTH +: D_WIDTH] <= b;
        end
        if (lastel) out_valid <= 1'b1;
      end
    end
  end
endmodule
