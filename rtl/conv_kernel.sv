// conv_kernel: time-shared convolution kernel (one MACC per convolution).
//
// While the memory subsystem holds a KxK window, a multiplexer picks window
// element idx on each clock; the MACC multiplies it by the weight for that
// element and accumulates. On the first element the accumulator restarts, on
// the last (after K*K clocks) the complete sum is put out and the next window
// starts from zero. One multiplier thus computes a whole KxK convolution.
//
// Interface: win holds the K*K elements of one input map (element i at
// [i*D_WIDTH +: D_WIDTH]); w is the weight of element idx; signed data and
// weights. Timing: res_valid pulses one clock after last.
// Mux + MACC time sharing follows the document; signed arithmetic and
// MACC_WIDTH are this design's choice.
module conv_kernel #(
  parameter int unsigned K          = 11,
  parameter int unsigned D_WIDTH    = 8,
  parameter int unsigned W_WIDTH    = 8,
  parameter int unsigned MACC_WIDTH = 24
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic [K*K*D_WIDTH-1:0]        win,
  input  logic [$clog2(K*K)-1:0]        idx,
  input  logic                          mac_en,
  input  logic                          first,
  input  logic                          last,
  input  logic signed [W_WIDTH-1:0]     w,
  output logic                          res_valid,
  output logic signed [MACC_WIDTH-1:0]  res
);
  logic signed [D_WIDTH-1:0]             x;
  logic signed [D_WIDTH+W_WIDTH-1:0]     prod;
  logic signed [MACC_WIDTH-1:0]          acc, nxt;

  assign x    = signed'(win[idx*D_WIDTH +: D_WIDTH]);
  assign prod = x * w;
  assign nxt  = (first ? '0 : acc) + MACC_WIDTH'(prod);

  always_ff @(posedge clk) begin
    if (rst) begin
      acc       <= '0;
      res       <= '0;
      res_valid <= 1'b0;
    end else begin
      res_valid <= mac_en && last;
      if (mac_en) begin
        acc <= nxt;
        if (last) res <= nxt;
      end
    end
  end
endmodule
