// accumulation_core: hierarchical reduction of convolution kernel results.
//
// Each of the LAYER_PARAL output maps receives FM_PARAL kernel results (one
// per input map processed in parallel). A tree of registered adder levels
// reduces them; every level adds groups of KERNEL_GROUP values, so
// ceil(log_KERNEL_GROUP(FM_PARAL)) levels produce the output-map element. The
// ACC_WIDTH-bit sum is cut to its top D_WIDTH_OUT bits when D_WIDTH_OUT is
// smaller.
//
// Interface: in[(o*FM_PARAL+f)*D_WIDTH_IN +: D_WIDTH_IN] is the signed result
// of kernel (o,f); out[o*D_WIDTH_OUT +: D_WIDTH_OUT] the sum for map o.
// Timing: out_valid follows in_valid after LEVELS clocks (at least one).
// The hierarchy follows the document; the group size default is this design's
// choice.
module accumulation_core #(
  parameter int unsigned FM_PARAL     = 3,
  parameter int unsigned LAYER_PARAL  = 96,
  parameter int unsigned D_WIDTH_IN   = 24,
  parameter int unsigned ACC_WIDTH    = 32,
  parameter int unsigned D_WIDTH_OUT  = 32,
  parameter int unsigned KERNEL_GROUP = 2
) (
  input  logic                                    clk,
  input  logic                                    rst,
  input  logic                                    in_valid,
  input  logic [LAYER_PARAL*FM_PARAL*D_WIDTH_IN-1:0] in,
  output logic                                    out_valid,
  output logic [LAYER_PARAL*D_WIDTH_OUT-1:0]      out
);
  function automatic int levels_of(input int n, input int g);
    int l;
    l = 0;
    while (n > 1) begin
      n = (n + g - 1) / g;
      l++;
    end
    return (l == 0) ? 1 : l;
  endfunction

  localparam int unsigned LEVELS = levels_of(FM_PARAL, KERNEL_GROUP);

  logic signed [ACC_WIDTH-1:0] lv [LEVELS+1][LAYER_PARAL][FM_PARAL];
  logic                        vv [LEVELS+1];

  always_comb begin
    vv[0] = in_valid;
    for (int o = 0; o < LAYER_PARAL; o++)
      for (int f = 0; f < FM_PARAL; f++)
        lv[0][o][f] = ACC_WIDTH'(signed'(in[(o*FM_PARAL + f)*D_WIDTH_IN +: D_WIDTH_IN]));
  end

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    always_ff @(posedge clk) begin
      if (rst) vv[l+1] <= 1'b0;
      else     vv[l+1] <= vv[l];
      for (int o = 0; o < LAYER_PARAL; o++)
        for (int j = 0; j < FM_PARAL; j++) begin
          logic signed [ACC_WIDTH-1:0] s;
          s = '0;
          for (int g = 0; g < KERNEL_GROUP; g++)
            if (j * KERNEL_GROUP + g < FM_PARAL) s += lv[l][o][j*KERNEL_GROUP + g];
          lv[l+1][o][j] <= s;
        end
    end
  end

  assign out_valid = vv[LEVELS];
  always_comb begin
    for (int o = 0; o < LAYER_PARAL; o++)
      out[o*D_WIDTH_OUT +: D_WIDTH_OUT] = lv[LEVELS][o][0][ACC_WIDTH-1 -: D_WIDTH_OUT];
  end
endmodule
