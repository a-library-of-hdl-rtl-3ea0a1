// stencil_system_top: master node of the multi-FPGA stencil/CNN system.
//
// ISL side. The host streams an array into the ISL accelerator (a chain of
// CHAIN_LENGTH stencil timestep engines). Its output is packed by the link
// gearbox into 8 x 64-bit beats for the outgoing simplex link to the next
// FPGA of the ring; frames are marked last after every array. Beats arriving
// on the incoming link from the last FPGA of the ring are unpacked again and
// cut into host packets by the PCIe controller engine, whose watchdog pads a
// packet with dummy words if the data stop. The link protocol cores, the
// transceivers and the PCIe endpoint are outside this module: their user-side
// streams are the link_* and host_* ports. Wiring link_tx to link_rx gives the
// single-board loopback configuration.
//
// CNN side. One coarse-layer stage (convolution with FM_PARAL x LAYER_PARAL
// time-shared MACCs, accumulation, requantisation, pooling) with its own
// input, weight and output streams; by default the first AlexNet stage
// (11x11 filters, stride 4, 3 -> 96 maps, 227x227 input, 3x3/2 max pooling).
//
// Timing: the ISL path moves LANES elements per clock; the CNN path takes
// K*K clocks per convolution window. All streams are valid/ready.
// Composition follows the document's master node; the frame marking, the
// side-by-side CNN stage and all port formats are this design's choice.
module stencil_system_top
  import stencil_pkg::*;
#(
  // ISL accelerator
  parameter int unsigned   CHAIN_LENGTH = 48,
  parameter int unsigned   DIM          = 2,
  parameter stencil_kind_e KIND         = JACOBI,
  parameter int unsigned   LANES        = 4,
  parameter int unsigned   D_WIDTH      = 32,
  parameter int unsigned   COLS         = 1024,
  parameter int unsigned   ROWS         = 1024,
  parameter int unsigned   PLANES       = 1,
  parameter int unsigned   LINK_W       = 512,
  parameter int unsigned   WDOG_TIMEOUT = 1024,
  // CNN coarse-layer stage
  parameter int unsigned   CNN_K        = 11,
  parameter int unsigned   CNN_STRIDE   = 4,
  parameter int unsigned   CNN_PAD      = 0,
  parameter int unsigned   CNN_IN_DIM   = 227,
  parameter int unsigned   FM_PARAL     = 3,
  parameter int unsigned   LAYER_PARAL  = 96,
  parameter int unsigned   DMA_WIDTH    = 512,
  parameter bit            CNN_POOL     = 1'b1,
  localparam int unsigned  SW           = LANES * D_WIDTH,
  localparam int unsigned  KW           = $clog2(LINK_W / SW + 1)
) (
  input  logic                          clk,
  input  logic                          rst,
  // host -> ISL accelerator
  input  logic                          host_in_valid,
  output logic                          host_in_ready,
  input  logic [SW-1:0]                 host_in_data,
  // outgoing link (to next FPGA)
  output logic                          link_tx_valid,
  input  logic                          link_tx_ready,
  output logic [LINK_W-1:0]             link_tx_data,
  output logic                          link_tx_last,
  output logic [KW-1:0]                 link_tx_keep,
  // incoming link (from last FPGA of the ring)
  input  logic                          link_rx_valid,
  output logic                          link_rx_ready,
  input  logic [LINK_W-1:0]             link_rx_data,
  input  logic                          link_rx_last,
  input  logic [KW-1:0]                 link_rx_keep,
  // packets to host
  input  logic [15:0]                   host_pkt_len,
  output logic                          host_out_valid,
  input  logic                          host_out_ready,
  output logic [SW-1:0]                 host_out_data,
  output logic                          host_out_last,
  output logic                          host_out_dummy,
  output logic [31:0]                   host_dummy_words,
  // CNN stage
  input  logic                          cnn_in_valid,
  output logic                          cnn_in_ready,
  input  logic [FM_PARAL*8-1:0]         cnn_in_data,
  input  logic                          cnn_w_valid,
  output logic                          cnn_w_ready,
  input  logic [DMA_WIDTH-1:0]          cnn_w_data,
  input  logic [LAYER_PARAL*32-1:0]     cnn_bias,
  input  logic [4:0]                    cnn_shift,
  output logic                          cnn_out_valid,
  input  logic                          cnn_out_ready,
  output logic [LAYER_PARAL*8-1:0]      cnn_out_data,
  output logic                          cnn_weight_stall
);
  localparam int unsigned WPA = COLS / LANES * ROWS * PLANES;   // words per array

  // ---------------------------------------------------------------- ISL path
  logic          acc_valid, acc_ready, acc_last;
  logic [SW-1:0] acc_data;
  logic [31:0]   acc_cnt;

  isl_accelerator #(
    .CHAIN_LENGTH(CHAIN_LENGTH), .DIM(DIM), .KIND(KIND), .LANES(LANES), .D_WIDTH(D_WIDTH),
    .COLS(COLS), .ROWS(ROWS), .PLANES(PLANES)
  ) u_isl (
    .clk, .rst,
    .in_valid(host_in_valid), .in_ready(host_in_ready), .in_data(host_in_data),
    .out_valid(acc_valid), .out_ready(acc_ready), .out_data(acc_data)
  );

  assign acc_last = (acc_cnt == WPA - 1);
  always_ff @(posedge clk) begin
    if (rst) acc_cnt <= '0;
    else if (acc_valid && acc_ready) acc_cnt <= acc_last ? '0 : acc_cnt + 1;
  end

  intercv7_gearbox #(.IN_W(SW), .OUT_W(LINK_W)) u_tx_gb (
    .clk, .rst,
    .s_valid(acc_valid), .s_ready(acc_ready), .s_data(acc_data), .s_last(acc_last), .s_keep('0),
    .m_valid(link_tx_valid), .m_ready(link_tx_ready), .m_data(link_tx_data),
    .m_last(link_tx_last), .m_keep(link_tx_keep)
  );

  logic          rx_valid, rx_ready, rx_last;
  logic [SW-1:0] rx_data;
  logic [KW-1:0] rx_keep;

  intercv7_gearbox #(.IN_W(LINK_W), .OUT_W(SW)) u_rx_gb (
    .clk, .rst,
    .s_valid(link_rx_valid), .s_ready(link_rx_ready), .s_data(link_rx_data),
    .s_last(link_rx_last), .s_keep(link_rx_keep),
    .m_valid(rx_valid), .m_ready(rx_ready), .m_data(rx_data), .m_last(rx_last), .m_keep(rx_keep)
  );

  pcie_controller_engine #(.WIDTH(SW), .TIMEOUT(WDOG_TIMEOUT)) u_pcie (
    .clk, .rst, .pkt_len(host_pkt_len),
    .s_valid(rx_valid), .s_ready(rx_ready), .s_data(rx_data),
    .m_valid(host_out_valid), .m_ready(host_out_ready), .m_data(host_out_data),
    .m_last(host_out_last), .m_dummy(host_out_dummy), .dummy_words(host_dummy_words)
  );

  // ---------------------------------------------------------------- CNN stage
  coarse_layer #(
    .K(CNN_K), .STRIDE(CNN_STRIDE), .PAD(CNN_PAD), .IN_DIM(CNN_IN_DIM),
    .FM_PARAL(FM_PARAL), .LAYER_PARAL(LAYER_PARAL), .DMA_WIDTH(DMA_WIDTH), .POOL(CNN_POOL)
  ) u_cnn (
    .clk, .rst,
    .in_valid(cnn_in_valid), .in_ready(cnn_in_ready), .in_data(cnn_in_data),
    .w_valid(cnn_w_valid), .w_ready(cnn_w_ready), .w_data(cnn_w_data),
    .bias(cnn_bias), .shift(cnn_shift),
    .out_valid(cnn_out_valid), .out_ready(cnn_out_ready), .out_data(cnn_out_data),
    .weight_stall(cnn_weight_stall)
  );
endmodule
