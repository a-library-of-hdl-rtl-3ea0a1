// cnn_line_buffer: FIFO-chain line buffer presenting a KxK window.
//
// A feature map of DIM x DIM elements (WIDTH bits each, e.g. several maps side
// by side) streams in row by row. The newest element enters the bottom-right
// corner of a KxK register window; each window row shifts left and its oldest
// element falls into a row FIFO of DIM-K elements whose output enters the row
// above. The chain is thus a delay line of K-1 rows plus K elements and holds
// exactly the rows a window needs, as in the SST memory partitioning.
//
// Position counters tell whether the window now held is one to be computed:
// its bottom-right element is at row, column >= K-1 and both are a multiple of
// STRIDE past K-1. Such a window is held (win_valid, in_ready low: the chain is
// frozen) until the consumer pulses win_done; all other windows are skipped at
// one element per clock, which is how a stride larger than one is handled.
//
// Interface: in_valid/in_ready/in_data stream; win[(r*K+c)*WIDTH +: WIDTH] is
// row r (0 = top), column c (0 = left) of the window. Timing: when win_done
// comes with in_valid, the chain shifts in the same clock, so a stride-1
// consumer that needs N cycles per window sees a new window every N cycles.
// Structure follows the document; handshake and counters are this design's
// choice.
module cnn_line_buffer #(
  parameter int unsigned K      = 11,
  parameter int unsigned STRIDE = 4,
  parameter int unsigned DIM    = 227,
  parameter int unsigned WIDTH  = 24
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic [WIDTH-1:0]       in_data,
  output logic                   win_valid,
  output logic [K*K*WIDTH-1:0]   win,
  input  logic                   win_done
);
  localparam int unsigned FD = DIM - K;          // row FIFO depth
  localparam int unsigned PW = $clog2(DIM + 1);
  localparam int unsigned SW = $clog2(STRIDE + 1);

  logic [WIDTH-1:0] w [K][K];
  logic             shift;
  logic [PW-1:0]    col, row;      // position of the next element
  logic [SW-1:0]    cph, rph;      // stride phase of the next element's col/row
  logic [WIDTH-1:0] row_in [K];    // element entering each row's right end

  assign in_ready = !win_valid || win_done;
  assign shift    = in_valid && in_ready;
  assign row_in[K-1] = in_data;

  always_ff @(posedge clk) begin
    if (shift) begin
      for (int r = 0; r < K; r++) begin
        for (int c = 0; c < K - 1; c++) w[r][c] <= w[r][c+1];
        w[r][K-1] <= row_in[r];
      end
    end
  end

  for (genvar r = 0; r < K - 1; r++) begin : g_row
    if (FD == 0) begin : g_direct
      assign row_in[r] = w[r+1][0];
    end else begin : g_fifo
      logic [$clog2(FD+1)-1:0] cnt;
      logic full, empty;
      sst_fifo #(.WIDTH(WIDTH), .DEPTH(FD)) u_fifo (
        .clk, .rst, .push(shift), .din(w[r+1][0]),
        .pop(shift && full), .dout(row_in[r]), .count(cnt), .full, .empty
      );
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      col <= '0; row <= '0; cph <= '0; rph <= '0;
      win_valid <= 1'b0;
    end else begin
      if (win_done) win_valid <= 1'b0;
      if (shift) begin
        // The element now entering is at (row, col).
        win_valid <= (row >= PW'(K - 1)) && (col >= PW'(K - 1)) &&
                     (rph == '0) && (cph == '0);
        if (col >= PW'(K - 1)) cph <= (cph == SW'(STRIDE - 1)) ? '0 : cph + 1'b1;
        if (col == PW'(DIM - 1)) begin
          col <= '0;
          cph <= '0;
          if (row >= PW'(K - 1)) rph <= (rph == SW'(STRIDE - 1)) ? '0 : rph + 1'b1;
          if (row == PW'(DIM - 1)) begin
            row <= '0;
            rph <= '0;
          end else begin
            row <= row + 1'b1;
          end
        end else begin
          col <= col + 1'b1;
        end
      end
    end
  end

  always_comb begin
    for (int r = 0; r < K; r++)
      for (int c = 0; c < K; c++)
        win[(r*K + c)*WIDTH +: WIDTH] = w[r][c];
  end

  a_done_only_when_held: assert property (@(posedge clk) disable iff (rst) win_done |-> win_valid);
endmodule
