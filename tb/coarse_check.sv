// Drives one coarse_layer with NFRAMES random frames and weight sets and
// checks every output word against cnn_ref_pkg. Weights of the first frame
// arrive late (after WDELAY clocks) so the memory subsystem must stall; the
// output side is randomly back-pressured. Reports stall cycles.
module coarse_check
  import stencil_pkg::*;
#(
  parameter int unsigned K = 3, STRIDE = 1, PAD = 1, IN_DIM = 6,
  parameter int unsigned FP = 2, LP = 3, DMA = 64,
  parameter bit POOL = 1, parameter int unsigned PK = 2, PS = 2,
  parameter int unsigned NFRAMES = 2, WDELAY = 200
) (
  input  logic clk,
  input  logic rst,
  output int   checks,
  output int   failures,
  output int   stall_cycles,
  output bit   done
);
  localparam int NW = LP * FP * K * K;
  localparam int EPB = DMA / 8;
  localparam int NB = (NW + EPB - 1) / EPB;

  logic in_valid, in_ready, w_valid, w_ready, out_valid, out_ready, weight_stall;
  logic [FP*8-1:0] in_data;
  logic [DMA-1:0]  w_data;
  logic [LP*32-1:0] bias;
  logic [4:0] shift;
  logic [LP*8-1:0] out_data;

  coarse_layer #(.K(K), .STRIDE(STRIDE), .PAD(PAD), .IN_DIM(IN_DIM), .FM_PARAL(FP),
                 .LAYER_PARAL(LP), .DMA_WIDTH(DMA), .POOL(POOL), .POOL_K(PK),
                 .POOL_STRIDE(PS)) dut (.*);

  int img [NFRAMES][];
  int wts [NFRAMES][];
  int expv [NFRAMES][];
  int od;
  int bias_v [LP];

  initial begin
    shift = 5'd4;
    for (int o = 0; o < LP; o++) begin
      bias_v[o] = int'($urandom_range(0, 400)) - 200;
      bias[o*32 +: 32] = bias_v[o];
    end
    for (int n = 0; n < NFRAMES; n++) begin
      longint acc[];
      int rq[], cd;
      img[n] = new[FP*IN_DIM*IN_DIM];
      foreach (img[n][i]) img[n][i] = int'($urandom_range(0, 255)) - 128;
      wts[n] = new[NW];
      foreach (wts[n][i]) wts[n][i] = int'($urandom_range(0, 255)) - 128;
      cnn_ref_pkg::conv(FP, LP, IN_DIM, K, STRIDE, PAD, img[n], wts[n], acc, cd);
      rq = new[acc.size()];
      foreach (acc[i]) rq[i] = cnn_ref_pkg::requant(acc[i], bias_v[i / (cd*cd)], 4);
      if (POOL) cnn_ref_pkg::pool(LP, cd, PK, PS, 0, rq, expv[n], od);
      else begin expv[n] = rq; od = cd; end
    end
  end

  // weights
  initial begin
    w_valid = 0; w_data = '0;
    @(negedge clk);
    while (rst) @(negedge clk);
    repeat (WDELAY) @(negedge clk);
    for (int n = 0; n < NFRAMES; n++)
      for (int b = 0; b < NB; b++) begin
        w_valid = 1;
        for (int e = 0; e < EPB; e++)
          w_data[e*8 +: 8] = (b*EPB + e < NW) ? 8'(wts[n][b*EPB + e]) : 8'hxx;
        @(posedge clk);
        while (!w_ready) @(posedge clk);
        @(negedge clk);
        w_valid = 0;
      end
  end
  // data
  initial begin
    in_valid = 0; in_data = '0;
    @(negedge clk);
    while (rst) @(negedge clk);
    for (int n = 0; n < NFRAMES; n++)
      for (int p = 0; p < IN_DIM*IN_DIM; p++) begin
        in_valid = 1;
        for (int f = 0; f < FP; f++) in_data[f*8 +: 8] = 8'(img[n][f*IN_DIM*IN_DIM + p]);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        @(negedge clk);
        in_valid = 0;
      end
  end
  // sink
  int got = 0;
  initial begin checks = 0; failures = 0; stall_cycles = 0; done = 0; end
  always @(negedge clk) out_ready <= $urandom_range(0, 3) != 0;
  always @(posedge clk) begin
    if (!rst && weight_stall) stall_cycles <= stall_cycles + 1;
    if (!rst && out_valid && out_ready && !done) begin
      int n, p;
      n = got / (od*od); p = got % (od*od);
      for (int o = 0; o < LP; o++) begin
        checks++;
        if (int'(signed'(out_data[o*8 +: 8])) != expv[n][o*od*od + p]) begin
          failures++;
          if (failures < 6) $display("coarse_layer frame %0d pos %0d map %0d: got %0d expected %0d",
                                     n, p, o, int'(signed'(out_data[o*8 +: 8])), expv[n][o*od*od + p]);
        end
      end
      got++;
      if (got == NFRAMES * od * od) done = 1;
    end
  end
endmodule
