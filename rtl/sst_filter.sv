// sst_filter: one filter of a Streaming Stencil Timestep (SST) channel.
//
// The input array streams through a chain of filters, LANES consecutive
// elements per word. Each filter holds one word, hands it to the next stage of
// the chain on every advance, and offers it to the processing elements. It
// keeps its own counters of the spatial position (word column, row, plane) of
// the word it holds and raises dom when that word belongs to its data domain:
// the word sits DROW rows and DPLANE planes away from a centre word whose row
// and plane are both interior (not on the array border). Columns are judged per
// lane by the SST on the centre filter's position.
//
// Interface: adv moves the chain; in_valid marks a real word (an empty slot is
// pushed only between arrays while the chain drains). Positions count valid
// words only and wrap at the end of each array.
// Timing: the held word and its position update on the clock after adv.
// The filter/counter structure follows the SST description; the exact domain
// conditions and reset are this design's choice.
module sst_filter #(
  parameter int unsigned DIM     = 2,
  parameter int unsigned LANES   = 4,
  parameter int unsigned D_WIDTH = 32,
  parameter int unsigned COLS    = 1024,
  parameter int unsigned ROWS    = 1024,
  parameter int unsigned PLANES  = 1,
  parameter int          DROW    = 0,
  parameter int          DPLANE  = 0
) (
  input  logic                                clk,
  input  logic                                rst,
  input  logic                                adv,
  input  logic                                in_valid,
  input  logic [LANES*D_WIDTH-1:0]            in_data,
  output logic                                q_valid,
  output logic [LANES*D_WIDTH-1:0]            q_data,
  output logic [$clog2(COLS/LANES+1)-1:0]     q_col,
  output logic [$clog2(ROWS+1)-1:0]           q_row,
  output logic [$clog2(PLANES+1)-1:0]         q_plane,
  output logic                                dom
);
  localparam int unsigned WPR = COLS / LANES;  // words per row
  localparam int unsigned CW  = $clog2(WPR + 1);
  localparam int unsigned RW  = $clog2(ROWS + 1);
  localparam int unsigned PW  = $clog2(PLANES + 1);

  logic [CW-1:0] n_col;
  logic [RW-1:0] n_row;
  logic [PW-1:0] n_plane;

  always_ff @(posedge clk) begin
    if (rst) begin
      q_valid <= 1'b0;
      q_data  <= '0;
      q_col   <= '0;
      q_row   <= '0;
      q_plane <= '0;
      n_col   <= '0;
      n_row   <= '0;
      n_plane <= '0;
    end else if (adv) begin
      q_valid <= in_valid;
      q_data  <= in_data;
      if (in_valid) begin
        q_col   <= n_col;
        q_row   <= n_row;
        q_plane <= n_plane;
        if (n_col == CW'(WPR - 1)) begin
          n_col <= '0;
          if (n_row == RW'(ROWS - 1)) begin
            n_row   <= '0;
            n_plane <= (n_plane == PW'(PLANES - 1)) ? '0 : n_plane + 1'b1;
          end else begin
            n_row <= n_row + 1'b1;
          end
        end else begin
          n_col <= n_col + 1'b1;
        end
      end
    end
  end

  // Domain test: centre row = q_row - DROW must lie in 1 .. ROWS-2 (2D/3D),
  // centre plane = q_plane - DPLANE in 1 .. PLANES-2 (3D).
  always_comb begin
    int r, p;
    logic ok;
    r  = int'(q_row) - DROW;
    p  = int'(q_plane) - DPLANE;
    ok = q_valid;
    if (DIM >= 2 && (r < 1 || r > int'(ROWS) - 2))   ok = 1'b0;
    if (DIM >= 3 && (p < 1 || p > int'(PLANES) - 2)) ok = 1'b0;
    dom = ok;
  end
endmodule
