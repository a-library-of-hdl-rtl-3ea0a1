// Testbench of isl_pe: Jacobi 2D, Heat 2D, Heat 1D and Jacobi 3D elements fed
// random windows every clock; each result is checked against the reference
// arithmetic exactly PE_LATENCY clocks later, and held while en is low.
module tb_isl_pe;
  import stencil_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  localparam int LAT = 3;
  logic en;
  logic [5*32-1:0] nb2;
  logic [3*32-1:0] nb1;
  logic [7*32-1:0] nb3;
  logic signed [31:0] rj2, rh2, rh1, rj3;
  int checks = 0, failures = 0;

  isl_pe #(.DIM(2), .KIND(JACOBI), .PE_LATENCY(LAT)) u_j2 (.clk, .en, .nb(nb2), .res(rj2));
  isl_pe #(.DIM(2), .KIND(HEAT),   .PE_LATENCY(LAT)) u_h2 (.clk, .en, .nb(nb2), .res(rh2));
  isl_pe #(.DIM(1), .KIND(HEAT),   .PE_LATENCY(LAT)) u_h1 (.clk, .en, .nb(nb1), .res(rh1));
  isl_pe #(.DIM(3), .KIND(JACOBI), .PE_LATENCY(LAT)) u_j3 (.clk, .en, .nb(nb3), .res(rj3));

  function automatic int ref_v(input int dim, input bit heat, input logic [7*32-1:0] nb);
    longint s, c, coef;
    c = longint'(signed'(nb[31:0]));
    s = 0;
    for (int i = 1; i < 2*dim+1; i++) s += longint'(signed'(nb[i*32 +: 32]));
    coef = ((longint'(1) << 16) + (2*dim+1)/2) / (2*dim+1);
    if (!heat) return int'(((s + c) * coef) >>> 16);
    s = (s - 2*dim*c) >>> 3;
    return int'((dim >= 2) ? s + c : s);
  endfunction

  int e [4][$];
  initial begin
    en = 0;
    @(negedge clk);
    for (int t = 0; t < 400; t++) begin
      logic [7*32-1:0] r;
      for (int i = 0; i < 7; i++) r[i*32 +: 32] = 32'($urandom_range(0, 2000000)) - 32'd1000000;
      nb3 = r; nb2 = r[5*32-1:0]; nb1 = r[3*32-1:0];
      en = 1;
      e[0].push_back(ref_v(2, 0, r)); e[1].push_back(ref_v(2, 1, r));
      e[2].push_back(ref_v(1, 1, r)); e[3].push_back(ref_v(3, 0, r));
      @(negedge clk);
      if (t % 50 == 10) begin en = 0; repeat (3) @(negedge clk); end
    end
  end
  // Results appear LAT advances after their operands.
  int adv_n = 0;
  always @(posedge clk) if (en) adv_n <= adv_n + 1;
  always @(negedge clk) begin
    if (adv_n >= LAT && en) begin
      int k;
      k = adv_n - LAT;
      checks += 4;
      if (rj2 != e[0][k]) begin failures++; $display("J2 %0d: %0d vs %0d", k, rj2, e[0][k]); end
      if (rh2 != e[1][k]) begin failures++; $display("H2 %0d", k); end
      if (rh1 != e[2][k]) begin failures++; $display("H1 %0d", k); end
      if (rj3 != e[3][k]) begin failures++; $display("J3 %0d", k); end
      if (k == 390) begin
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
