// sst_mux_engine: output multiplexer of a Streaming Stencil Timestep.
//
// Rebuilds the output stream so that every element keeps the spatial position
// it had in the input stream, which lets SSTs be chained. The centre word, its
// valid flag and its per-lane interior mask are delayed by PE_LATENCY advances
// to meet the PE results; then each lane takes the PE result if the element is
// interior and the original (border) value otherwise, so border elements are
// not updated.
//
// Interface: en is the chain advance; pe_res are the LANES PE outputs, already
// PE_LATENCY advances behind c_data. Timing: o_valid/o_data change only on en
// and describe the word entered PE_LATENCY advances earlier (output taken from
// the last delay stage, no extra register).
// The multiplexing follows the SST description; the delay-line form is this
// design's choice.
module sst_mux_engine #(
  parameter int unsigned LANES      = 4,
  parameter int unsigned D_WIDTH    = 32,
  parameter int unsigned PE_LATENCY = 3
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     en,
  input  logic                     c_valid,
  input  logic [LANES*D_WIDTH-1:0] c_data,
  input  logic [LANES-1:0]         interior,
  input  logic [LANES*D_WIDTH-1:0] pe_res,
  output logic                     o_valid,
  output logic [LANES*D_WIDTH-1:0] o_data
);
  logic                     v_d [PE_LATENCY];
  logic [LANES-1:0]         m_d [PE_LATENCY];
  logic [LANES*D_WIDTH-1:0] d_d [PE_LATENCY];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < PE_LATENCY; i++) begin
        v_d[i] <= 1'b0;
        m_d[i] <= '0;
        d_d[i] <= '0;
      end
    end else if (en) begin
      v_d[0] <= c_valid;
      m_d[0] <= interior;
      d_d[0] <= c_data;
      for (int i = 1; i < PE_LATENCY; i++) begin
        v_d[i] <= v_d[i-1];
        m_d[i] <= m_d[i-1];
        d_d[i] <= d_d[i-1];
      end
    end
  end

  assign o_valid = v_d[PE_LATENCY-1];

  always_comb begin
    for (int l = 0; l < LANES; l++)
      o_data[l*D_WIDTH +: D_WIDTH] = m_d[PE_LATENCY-1][l] ? pe_res[l*D_WIDTH +: D_WIDTH]
                                                          : d_d[PE_LATENCY-1][l*D_WIDTH +: D_WIDTH];
  end
endmodule
