// weights_engine: on-chip weight store and gearbox of the Convolutional Core.
//
// A convolution run uses one KxK weight window per (output map, input map)
// pair, i.e. LAYER_PARAL*FM_PARAL small memories of K*K weights, one per MACC.
// The gearbox takes DMA_WIDTH-bit beats from off-chip memory, each carrying
// DMA_WIDTH/W_WIDTH weights, and writes them in order into these memories:
// weight n goes to memory n / (K*K), entry n % (K*K), with memory index
// o*FM_PARAL + f (output map o, input map f) and entries in window row-major
// order. Bits of the final beat past the last weight are ignored. When all
// weights are present, loaded rises and the gearbox stops accepting beats;
// during the run every MACC reads its weight for the current element index.
// consume (end of the run) drops loaded so the next set can come in.
//
// Interface: w_valid/w_ready/w_data beat stream; w_out[(o*FM_PARAL+f)*W_WIDTH
// +: W_WIDTH] is the weight of MACC (o,f) at element idx (combinational read).
// Timing: ceil(LAYER_PARAL*FM_PARAL*K*K*W_WIDTH / DMA_WIDTH) beats per set.
// The gearbox and per-MACC memories follow the document; the weight order,
// single buffering and DMA_WIDTH are this design's choice.
module weights_engine #(
  parameter int unsigned K           = 11,
  parameter int unsigned FM_PARAL    = 3,
  parameter int unsigned LAYER_PARAL = 96,
  parameter int unsigned W_WIDTH     = 8,
  parameter int unsigned DMA_WIDTH   = 512
) (
  input  logic                                    clk,
  input  logic                                    rst,
  input  logic                                    w_valid,
  output logic                                    w_ready,
  input  logic [DMA_WIDTH-1:0]                    w_data,
  output logic                                    loaded,
  input  logic                                    consume,
  input  logic [$clog2(K*K)-1:0]                  idx,
  output logic [LAYER_PARAL*FM_PARAL*W_WIDTH-1:0] w_out
);
  localparam int unsigned KK  = K * K;
  localparam int unsigned NM  = LAYER_PARAL * FM_PARAL;
  localparam int unsigned NW  = NM * KK;
  localparam int unsigned EPB = DMA_WIDTH / W_WIDTH;   // weights per beat
  localparam int unsigned AW  = $clog2(NW + EPB + 1);

  logic [W_WIDTH-1:0] mem [NM][KK];
  logic [AW-1:0]      wp;             // index of the next weight to write
  logic [$clog2(NM+1)-1:0] wm;        // memory of the next weight
  logic [$clog2(KK+1)-1:0] we;        // entry of the next weight

  assign w_ready = !loaded;

  always_ff @(posedge clk) begin
    if (w_valid && w_ready) begin
      logic [$clog2(NM+1)-1:0] m;
      logic [$clog2(KK+1)-1:0] e;
      m = wm;
      e = we;
      for (int i = 0; i < EPB; i++) begin
        if (AW'(i) + wp < AW'(NW)) mem[m][e] <= w_data[i*W_WIDTH +: W_WIDTH];
        if (e == ($clog2(KK+1))'(KK - 1)) begin
          e = '0;
          m = m + 1'b1;
        end else begin
          e = e + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp     <= '0;
      wm     <= '0;
      we     <= '0;
      loaded <= 1'b0;
    end else if (consume) begin
      wp     <= '0;
      wm     <= '0;
      we     <= '0;
      loaded <= 1'b0;
    end else if (w_valid && w_ready) begin
      logic [$clog2(NM+1)-1:0] m;
      logic [$clog2(KK+1)-1:0] e;
      m = wm;
      e = we;
      for (int i = 0; i < EPB; i++) begin
        if (e == ($clog2(KK+1))'(KK - 1)) begin
          e = '0;
          m = m + 1'b1;
        end else begin
          e = e + 1'b1;
        end
      end
      wm <= m;
      we <= e;
      wp <= wp + AW'(EPB);
      if (wp + AW'(EPB) >= AW'(NW)) loaded <= 1'b1;
    end
  end

  always_comb begin
    for (int n = 0; n < NM; n++) w_out[n*W_WIDTH +: W_WIDTH] = mem[n][idx];
  end
endmodule
