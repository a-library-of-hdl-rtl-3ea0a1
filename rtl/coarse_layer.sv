// coarse_layer: one CNN coarse-layer (convolution, activation, requantisation
// and optional pooling) built from the library cores.
//
// Convolutional Core: the memory subsystem buffers FM_PARAL input maps and
// presents each output window for K*K clocks; FM_PARAL x LAYER_PARAL
// convolution kernels (one time-shared MACC each: intra-FM times intra-layer
// parallelism) multiply the window by the weights that the weights engine
// holds; the accumulation core adds the FM_PARAL partial results of every
// output map. The requantisation core then adds the bias, applies ReLU and
// brings the result back to 8 bits; if POOL is set, the pooling core pools
// the LAYER_PARAL requantised maps.
//
// A 4-entry FIFO decouples the convolution results from the pooling core; the
// memory subsystem starts a window only while that FIFO has room for the
// results already in flight, and stalls while the weights of the run are not
// loaded. After the last window of a map the weights are released and the
// next set (next group of output maps) can be loaded.
//
// Interface: in_* stream of FM_PARAL*8-bit words (padded internally), w_*
// DMA_WIDTH-bit weight beats, bias/shift for requantisation, out_* stream of
// LAYER_PARAL*8-bit words. Timing: K*K clocks per convolution output window.
// The composition follows the document's coarse-layer; the decoupling FIFO
// and flow control are this design's choice. Accumulating partial output maps
// over several passes of a core (used when FM_PARAL is smaller than the number
// of input maps) is not part of this block.
module coarse_layer
  import stencil_pkg::*;
#(
  parameter int unsigned K           = 11,
  parameter int unsigned STRIDE      = 4,
  parameter int unsigned PAD         = 0,
  parameter int unsigned IN_DIM      = 227,
  parameter int unsigned FM_PARAL    = 3,
  parameter int unsigned LAYER_PARAL = 96,
  parameter int unsigned D_WIDTH     = 8,
  parameter int unsigned W_WIDTH     = 8,
  parameter int unsigned MACC_WIDTH  = 24,
  parameter int unsigned ACC_WIDTH   = 32,
  parameter int unsigned DMA_WIDTH   = 512,
  parameter bit          POOL        = 1'b1,
  parameter int unsigned POOL_K      = 3,
  parameter int unsigned POOL_STRIDE = 2,
  parameter pool_type_e  POOL_TYPE   = POOL_MAX
) (
  input  logic                              clk,
  input  logic                              rst,
  input  logic                              in_valid,
  output logic                              in_ready,
  input  logic [FM_PARAL*D_WIDTH-1:0]       in_data,
  input  logic                              w_valid,
  output logic                              w_ready,
  input  logic [DMA_WIDTH-1:0]              w_data,
  input  logic [LAYER_PARAL*ACC_WIDTH-1:0]  bias,
  input  logic [4:0]                        shift,
  output logic                              out_valid,
  input  logic                              out_ready,
  output logic [LAYER_PARAL*D_WIDTH-1:0]    out_data,
  output logic                              weight_stall
);
  localparam int unsigned PD   = IN_DIM + 2 * PAD;
  localparam int unsigned CDIM = (PD - K) / STRIDE + 1;   // convolution output size
  localparam int unsigned NK   = FM_PARAL * LAYER_PARAL;

  logic                            loaded, mac_en, first, last, frame_done, out_room;
  logic [$clog2(K*K)-1:0]          idx;
  logic [K*K*FM_PARAL*D_WIDTH-1:0] win;
  logic [NK*W_WIDTH-1:0]           w_all;
  logic [NK*MACC_WIDTH-1:0]        kres;
  logic [NK-1:0]                   kval;

  cnn_mem_subsystem #(
    .K(K), .STRIDE(STRIDE), .PAD(PAD), .IN_DIM(IN_DIM), .FM_PARAL(FM_PARAL), .D_WIDTH(D_WIDTH)
  ) u_mem (
    .clk, .rst, .in_valid, .in_ready, .in_data,
    .weights_ready(loaded), .out_room, .win, .mac_en, .idx, .first, .last,
    .frame_done, .stalled(weight_stall)
  );

  weights_engine #(
    .K(K), .FM_PARAL(FM_PARAL), .LAYER_PARAL(LAYER_PARAL), .W_WIDTH(W_WIDTH), .DMA_WIDTH(DMA_WIDTH)
  ) u_weights (
    .clk, .rst, .w_valid, .w_ready, .w_data, .loaded, .consume(frame_done),
    .idx, .w_out(w_all)
  );

  for (genvar o = 0; o < LAYER_PARAL; o++) begin : g_out
    for (genvar f = 0; f < FM_PARAL; f++) begin : g_in
      logic [K*K*D_WIDTH-1:0] wf;
      always_comb
        for (int i = 0; i < K*K; i++)
          wf[i*D_WIDTH +: D_WIDTH] = win[(i*FM_PARAL + f)*D_WIDTH +: D_WIDTH];
      conv_kernel #(.K(K), .D_WIDTH(D_WIDTH), .W_WIDTH(W_WIDTH), .MACC_WIDTH(MACC_WIDTH)) u_k (
        .clk, .rst, .win(wf), .idx, .mac_en, .first, .last,
        .w(signed'(w_all[(o*FM_PARAL + f)*W_WIDTH +: W_WIDTH])),
        .res_valid(kval[o*FM_PARAL + f]), .res(kres[(o*FM_PARAL + f)*MACC_WIDTH +: MACC_WIDTH])
      );
    end
  end

  logic                             acc_valid, rq_valid;
  logic [LAYER_PARAL*ACC_WIDTH-1:0] acc;
  logic [LAYER_PARAL*D_WIDTH-1:0]   rq;

  accumulation_core #(
    .FM_PARAL(FM_PARAL), .LAYER_PARAL(LAYER_PARAL), .D_WIDTH_IN(MACC_WIDTH),
    .ACC_WIDTH(ACC_WIDTH), .D_WIDTH_OUT(ACC_WIDTH), .KERNEL_GROUP(2)
  ) u_acc (
    .clk, .rst, .in_valid(kval[0]), .in(kres), .out_valid(acc_valid), .out(acc)
  );

  requant_core #(.LAYER_PARAL(LAYER_PARAL), .ACC_WIDTH(ACC_WIDTH), .D_WIDTH(D_WIDTH)) u_rq (
    .clk, .rst, .bias, .shift, .in_valid(acc_valid), .in(acc), .out_valid(rq_valid), .out(rq)
  );

  // Decoupling FIFO between the convolution and the pooling/output side.
  logic [2:0]                     q_cnt;
  logic                           q_full, q_empty, q_pop, p_ready;
  logic [LAYER_PARAL*D_WIDTH-1:0] q_data;
  logic                           busy_pipe;

  sst_fifo #(.WIDTH(LAYER_PARAL*D_WIDTH), .DEPTH(4)) u_q (
    .clk, .rst, .push(rq_valid), .din(rq), .pop(q_pop), .dout(q_data),
    .count(q_cnt), .full(q_full), .empty(q_empty)
  );
  // Results in flight between a started window and the FIFO: at most one.
  assign busy_pipe = |kval || acc_valid || rq_valid;
  assign out_room  = (q_cnt + 3'(busy_pipe)) < 3'd3;
  assign q_pop     = !q_empty && p_ready;

  if (POOL) begin : g_pool
    pooling_core #(
      .LAYER_PARAL(LAYER_PARAL), .D_WIDTH(D_WIDTH), .K(POOL_K), .STRIDE(POOL_STRIDE),
      .DIM(CDIM), .POOL_TYPE(POOL_TYPE)
    ) u_pool (
      .clk, .rst, .in_valid(!q_empty), .in_ready(p_ready), .in_data(q_data),
      .out_valid, .out_ready, .out_data
    );
  end else begin : g_nopool
    assign out_valid = !q_empty;
    assign out_data  = q_data;
    assign p_ready   = out_ready;
  end
endmodule
