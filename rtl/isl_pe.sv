// isl_pe: fully pipelined ISL processing element.
//
// Computes one stencil update per advance from the centre value and its 2*DIM
// cross neighbours, in signed fixed point with FRAC fraction bits:
//   JACOBI: (c + sum of neighbours) / (2*DIM+1), the division done as a
//           multiplication by round(2^FRAC / (2*DIM+1)) and a shift;
//   HEAT:   DIM=1: 0.125*(e - 2c + w)
//           DIM>=2: 0.125*(sum over axes of (n - 2c + s)) + c
//           (0.125 and 2.0 are exact shifts).
// nb packs the operands as {plane+1, plane-1, row+1, row-1, col+1, col-1, c}
// from the top, using only the first 2*DIM+1 entries.
// Timing: res is valid PE_LATENCY advances (en) after its operands; the first
// two stages are the sum and the scaling, the others are output registers.
// The transition functions follow the benchmark definitions; fixed point (the
// document's benchmarks run in floating point) and the stage split are this
// design's choice.
module isl_pe
  import stencil_pkg::*;
#(
  parameter int unsigned   DIM        = 2,
  parameter stencil_kind_e KIND       = JACOBI,
  parameter int unsigned   D_WIDTH    = 32,
  parameter int unsigned   FRAC       = 16,
  parameter int unsigned   PE_LATENCY = 3
) (
  input  logic                             clk,
  input  logic                             en,
  input  logic [(2*DIM+1)*D_WIDTH-1:0]     nb,
  output logic signed [D_WIDTH-1:0]        res
);
  localparam int unsigned NOP  = 2 * DIM + 1;
  localparam int unsigned SW   = D_WIDTH + 4;            // sum width
  localparam int unsigned PWID = SW + FRAC + 2;          // product width
  localparam logic signed [FRAC+1:0] COEF =
      (FRAC+2)'(((longint'(1) << FRAC) + longint'(NOP / 2)) / longint'(NOP));

  logic signed [SW-1:0]      sum_q;
  logic signed [D_WIDTH-1:0] c_q;
  logic signed [D_WIDTH-1:0] stage [PE_LATENCY-1];

  // Stage 1: sum of the window.
  always_ff @(posedge clk) begin
    if (en) begin
      logic signed [SW-1:0] acc;
      logic signed [D_WIDTH-1:0] c;
      c   = signed'(nb[D_WIDTH-1:0]);
      acc = '0;
      if (KIND == JACOBI) begin
        for (int i = 0; i < NOP; i++)
          acc += SW'(signed'(nb[i*D_WIDTH +: D_WIDTH]));
      end else begin
        for (int i = 1; i < NOP; i++)
          acc += SW'(signed'(nb[i*D_WIDTH +: D_WIDTH]));
        acc -= SW'(c) * SW'(2 * DIM);
      end
      sum_q <= acc;
      c_q   <= c;
    end
  end

  // Stage 2: scaling; further stages delay to PE_LATENCY.
  always_ff @(posedge clk) begin
    if (en) begin
      logic signed [PWID-1:0] prod;
      logic signed [SW-1:0]   h;
      if (KIND == JACOBI) begin
        prod     = PWID'(sum_q) * PWID'(COEF);
        stage[0] <= D_WIDTH'(prod >>> FRAC);
      end else begin
        h = sum_q >>> 3;
        if (DIM == 1) stage[0] <= D_WIDTH'(h);
        else          stage[0] <= D_WIDTH'(h + SW'(c_q));
      end
      for (int i = 1; i < PE_LATENCY - 1; i++) stage[i] <= stage[i-1];
    end
  end

  assign res = stage[PE_LATENCY-2];

  initial assert (PE_LATENCY >= 2) else $error("isl_pe: PE_LATENCY must be at least 2");
endmodule
