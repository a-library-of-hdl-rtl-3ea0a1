// isl_accelerator: multi-timestep ISL accelerator.
//
// CHAIN_LENGTH Streaming Stencil Timestep engines connected in series. Because
// every engine emits the array in the same spatial order as it received it,
// the chain acts as a deep pipeline in which each engine computes one timestep
// on a different part of the stream; an array passes through the chain once
// and leaves CHAIN_LENGTH timesteps later, so the off-chip bandwidth needed
// does not depend on the chain length. There is no convergence check between
// engines.
//
// Interface: valid/ready streams of LANES*D_WIDTH bits in row-major order.
// Timing: one word per clock at steady state; latency is the sum of the
// engines' latencies (about two rows or planes per engine).
// The chaining follows the document; the per-FPGA chain length of 48 is this
// design's reading of 191 Jacobi-2D timesteps on four boards.
module isl_accelerator
  import stencil_pkg::*;
#(
  parameter int unsigned   CHAIN_LENGTH = 48,
  parameter int unsigned   DIM          = 2,
  parameter stencil_kind_e KIND         = JACOBI,
  parameter int unsigned   LANES        = 4,
  parameter int unsigned   D_WIDTH      = 32,
  parameter int unsigned   FRAC         = 16,
  parameter int unsigned   COLS         = 1024,
  parameter int unsigned   ROWS         = 1024,
  parameter int unsigned   PLANES       = 1,
  parameter int unsigned   PE_LATENCY   = 3
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic [LANES*D_WIDTH-1:0] in_data,
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic [LANES*D_WIDTH-1:0] out_data
);
  logic                     v [CHAIN_LENGTH+1];
  logic                     r [CHAIN_LENGTH+1];
  logic [LANES*D_WIDTH-1:0] d [CHAIN_LENGTH+1];

  assign v[0]      = in_valid;
  assign d[0]      = in_data;
  assign in_ready  = r[0];
  assign out_valid = v[CHAIN_LENGTH];
  assign out_data  = d[CHAIN_LENGTH];
  assign r[CHAIN_LENGTH] = out_ready;

  for (genvar s = 0; s < CHAIN_LENGTH; s++) begin : g_stage
    sst #(
      .DIM(DIM), .KIND(KIND), .LANES(LANES), .D_WIDTH(D_WIDTH), .FRAC(FRAC),
      .COLS(COLS), .ROWS(ROWS), .PLANES(PLANES), .PE_LATENCY(PE_LATENCY)
    ) u_sst (
      .clk, .rst,
      .in_valid(v[s]), .in_ready(r[s]), .in_data(d[s]),
      .out_valid(v[s+1]), .out_ready(r[s+1]), .out_data(d[s+1])
    );
  end
endmodule
