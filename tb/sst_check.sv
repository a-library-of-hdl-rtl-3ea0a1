// Drives one sst instance with NARR random arrays and checks every output word
// against isl_ref_pkg. Arrays 0 and 1 are sent back to back, the rest after
// the engine has drained. With RANDOM_FLOW the input valid and output ready
// are randomly gapped; without it the full-rate steady state is measured:
// an array of TOT words must leave in TOT cycles (one word per clock).
module sst_check
  import stencil_pkg::*;
#(
  parameter int unsigned   DIM    = 2,
  parameter stencil_kind_e KIND   = JACOBI,
  parameter int unsigned   LANES  = 4,
  parameter int unsigned   COLS   = 16,
  parameter int unsigned   ROWS   = 6,
  parameter int unsigned   PLANES = 1,
  parameter int unsigned   NARR   = 3,
  parameter bit            RANDOM_FLOW = 1
) (
  input  logic clk,
  input  logic rst,
  output int   checks,
  output int   failures,
  output bit   done
);
  localparam int DW  = 32;
  localparam int TOT = COLS * ROWS * PLANES;
  localparam int WPA = TOT / LANES;

  logic                in_valid, in_ready, out_valid, out_ready;
  logic [LANES*DW-1:0] in_data, out_data;

  sst #(.DIM(DIM), .KIND(KIND), .LANES(LANES), .D_WIDTH(DW), .FRAC(16),
        .COLS(COLS), .ROWS(ROWS), .PLANES(PLANES), .PE_LATENCY(3)) dut (
    .clk, .rst, .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_data);

  int src [NARR][];
  int exp_arr [NARR][];

  initial begin
    checks = 0; failures = 0; done = 0;
    for (int n = 0; n < NARR; n++) begin
      src[n] = new[TOT];
      for (int i = 0; i < TOT; i++) src[n][i] = int'($urandom_range(0, 2000000)) - 1000000;
      isl_ref_pkg::step(DIM, KIND == HEAT, 16, COLS, ROWS, PLANES, src[n], exp_arr[n]);
    end
  end

  // Source.
  initial begin
    in_valid = 0; in_data = '0;
    @(negedge clk);
    while (rst) @(negedge clk);
    for (int n = 0; n < NARR; n++) begin
      if (n >= 2) repeat (TOT / LANES + 4 * COLS + 20) @(negedge clk);
      for (int w = 0; w < WPA; w++) begin
        if (RANDOM_FLOW) while ($urandom_range(0, 3) == 0) begin
          in_valid = 0; @(negedge clk);
        end
        in_valid = 1;
        for (int l = 0; l < LANES; l++) in_data[l*DW +: DW] = src[n][w*LANES + l];
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        @(negedge clk);
      end
      in_valid = 0;
    end
  end

  // Sink.
  int  first_cyc, last_cyc, cyc;
  always_ff @(posedge clk) cyc <= rst ? 0 : cyc + 1;

  initial begin
    out_ready = 0;
    @(negedge clk);
    for (int n = 0; n < NARR; n++) begin
      for (int w = 0; w < WPA; w++) begin
        out_ready = RANDOM_FLOW ? ($urandom_range(0, 4) != 0) : 1'b1;
        @(posedge clk);
        while (!(out_valid && out_ready)) begin
          @(negedge clk);
          out_ready = RANDOM_FLOW ? ($urandom_range(0, 4) != 0) : 1'b1;
          @(posedge clk);
        end
        if (w == 0) first_cyc = cyc;
        if (w == WPA - 1) last_cyc = cyc;
        for (int l = 0; l < LANES; l++) begin
          checks++;
          if (int'(out_data[l*DW +: DW]) !== exp_arr[n][w*LANES + l]) begin
            failures++;
            if (failures < 10)
              $display("sst DIM=%0d array %0d word %0d lane %0d: got %0d expected %0d",
                       DIM, n, w, l, int'(out_data[l*DW +: DW]), exp_arr[n][w*LANES + l]);
          end
        end
        @(negedge clk);
      end
      if (!RANDOM_FLOW && n == 1) begin
        // Second array follows the first back to back: one word per clock.
        checks++;
        if (last_cyc - first_cyc != WPA - 1) begin
          failures++;
          $display("sst DIM=%0d: array took %0d cycles, expected %0d", DIM,
                   last_cyc - first_cyc + 1, WPA);
        end
      end
    end
    done = 1;
  end
endmodule
