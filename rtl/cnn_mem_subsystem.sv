// cnn_mem_subsystem: Memory Subsystem of the Convolutional Core.
//
// Streams FM_PARAL input feature maps in parallel (one D_WIDTH element of each
// per word), surrounds them with PAD rows/columns of zeros, and buffers them in
// a cnn_line_buffer so that a whole KxK window of all maps is visible at once.
// For every window that produces an output (stride STRIDE) it runs the
// time-sharing sequence: the element index idx steps 0..K*K-1, one per clock,
// while the FIFO chain is frozen, so each convolution kernel can use a single
// multiplier. Windows skipped by the stride pass at full rate.
//
// The sequence starts only when weights_ready (the weights engine has loaded
// the current set) and out_room (the downstream cores can take a result) are
// high; otherwise the subsystem stalls. frame_done pulses with the last element
// of the last window of a map, telling the weights engine that its set may be
// replaced.
//
// Interface: in_* valid/ready stream of FM_PARAL*D_WIDTH bits (map 0 in the low
// bits); win is the held window; mac_en, idx, first, last drive the kernels.
// Timing: K*K clocks per output window; a new input word per clock otherwise.
// Padding position and the flow control signals are this design's choice.
module cnn_mem_subsystem #(
  parameter int unsigned K        = 11,
  parameter int unsigned STRIDE   = 4,
  parameter int unsigned PAD      = 0,
  parameter int unsigned IN_DIM   = 227,
  parameter int unsigned FM_PARAL = 3,
  parameter int unsigned D_WIDTH  = 8
) (
  input  logic                            clk,
  input  logic                            rst,
  input  logic                            in_valid,
  output logic                            in_ready,
  input  logic [FM_PARAL*D_WIDTH-1:0]     in_data,
  input  logic                            weights_ready,
  input  logic                            out_room,
  output logic [K*K*FM_PARAL*D_WIDTH-1:0] win,
  output logic                            mac_en,
  output logic [$clog2(K*K)-1:0]          idx,
  output logic                            first,
  output logic                            last,
  output logic                            frame_done,
  output logic                            stalled
);
  localparam int unsigned PD    = IN_DIM + 2 * PAD;
  localparam int unsigned ODIM  = (PD - K) / STRIDE + 1;
  localparam int unsigned NWIN  = ODIM * ODIM;
  localparam int unsigned WW    = FM_PARAL * D_WIDTH;
  localparam int unsigned PWID  = $clog2(PD + 1);
  localparam int unsigned IW    = $clog2(K * K);

  // ---------------------------------------------------------------- padding
  logic [PWID-1:0] pr, pc;
  logic            on_pad, lb_valid, lb_ready;
  logic [WW-1:0]   lb_data;

  assign on_pad   = (pr < PWID'(PAD)) || (pr >= PWID'(PAD + IN_DIM)) ||
                    (pc < PWID'(PAD)) || (pc >= PWID'(PAD + IN_DIM));
  assign lb_valid = on_pad || in_valid;
  assign lb_data  = on_pad ? '0 : in_data;
  assign in_ready = !on_pad && lb_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      pr <= '0;
      pc <= '0;
    end else if (lb_valid && lb_ready) begin
      if (pc == PWID'(PD - 1)) begin
        pc <= '0;
        pr <= (pr == PWID'(PD - 1)) ? '0 : pr + 1'b1;
      end else begin
        pc <= pc + 1'b1;
      end
    end
  end

  // ---------------------------------------------------------------- buffer
  logic win_valid, win_done;

  cnn_line_buffer #(.K(K), .STRIDE(STRIDE), .DIM(PD), .WIDTH(WW)) u_lb (
    .clk, .rst, .in_valid(lb_valid), .in_ready(lb_ready), .in_data(lb_data),
    .win_valid, .win, .win_done
  );

  // ---------------------------------------------------------------- time sharing
  logic [$clog2(NWIN+1)-1:0] wcnt;
  logic                      busy;

  assign mac_en   = win_valid && (busy || (weights_ready && out_room));
  assign first    = mac_en && (idx == '0);
  assign last     = mac_en && (idx == IW'(K * K - 1));
  assign win_done = last;
  assign stalled  = win_valid && !busy && !(weights_ready && out_room);
  assign frame_done = last && (wcnt == ($clog2(NWIN+1))'(NWIN - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      idx  <= '0;
      busy <= 1'b0;
      wcnt <= '0;
    end else if (mac_en) begin
      if (last) begin
        idx  <= '0;
        busy <= 1'b0;
        wcnt <= frame_done ? '0 : wcnt + 1'b1;
      end else begin
        idx  <= idx + 1'b1;
        busy <= 1'b1;
      end
    end
  end
endmodule
