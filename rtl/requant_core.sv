// requant_core: bias addition, ReLU and requantisation to 8 bits.
//
// The accumulated output-map elements are wider than 8 bits. For each of the
// LAYER_PARAL maps this core adds the map's bias, applies ReLU (negative
// values become zero), scales down by an arithmetic right shift of `shift`
// bits with round-half-up, and saturates to the signed 8-bit range (0..127
// after ReLU), so the next layer again sees 8-bit data.
//
// Interface: in/bias are signed ACC_WIDTH-bit per map; out is D_WIDTH bits per
// map. Timing: one register stage, a result per clock.
// The three functions follow the document; the requantisation scheme
// (shift, rounding, saturation) is this design's choice.
module requant_core #(
  parameter int unsigned LAYER_PARAL = 96,
  parameter int unsigned ACC_WIDTH   = 32,
  parameter int unsigned D_WIDTH     = 8
) (
  input  logic                               clk,
  input  logic                               rst,
  input  logic [LAYER_PARAL*ACC_WIDTH-1:0]   bias,
  input  logic [4:0]                         shift,
  input  logic                               in_valid,
  input  logic [LAYER_PARAL*ACC_WIDTH-1:0]   in,
  output logic                               out_valid,
  output logic [LAYER_PARAL*D_WIDTH-1:0]     out
);
  localparam logic signed [ACC_WIDTH:0] MAXV = (ACC_WIDTH+1)'((1 << (D_WIDTH - 1)) - 1);

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out       <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        for (int o = 0; o < LAYER_PARAL; o++) begin
          logic signed [ACC_WIDTH:0] s, r;
          s = (ACC_WIDTH+1)'(signed'(in[o*ACC_WIDTH +: ACC_WIDTH])) +
              (ACC_WIDTH+1)'(signed'(bias[o*ACC_WIDTH +: ACC_WIDTH]));
          if (s < 0) s = '0;
          r = (shift == '0) ? s : ((s + ((ACC_WIDTH+1)'(1) <<< (shift - 1))) >>> shift);
          if (r > MAXV) r = MAXV;
          out[o*D_WIDTH +: D_WIDTH] <= D_WIDTH'(r);
        end
      end
    end
  end
endmodule
