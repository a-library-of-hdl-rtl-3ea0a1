// sst: Streaming Stencil Timestep engine with intra-iteration parallelism.
//
// Applies one timestep of a cross-shaped stencil (3, 5 or 7 points for DIM =
// 1, 2, 3) to an array that streams in row-major order, LANES consecutive
// elements per word, and streams the updated array out in the same order, so
// that engines can be chained.
//
// How it works: the words pass through a channel of 2*DIM+1 filters, newest
// first, whose held words are the stencil's far neighbours and the centre:
//   DIM=2:  S(+WPR) -fifo- E(+1) C(0) W(-1) -fifo- N(-WPR)
// (WPR = COLS/LANES words per row; in 3D two more filters B/T one plane
// away). Between filters whose words are more than one position apart sit
// LANES parallel FIFOs of one lane each, holding the words in between; each is
// a fixed delay of (distance-1) advances, so the whole channel is a delay line
// that presents every window at once. Lane l of the centre word takes its
// west/east neighbours from lanes l-1/l+1 of the centre word, or from the last
// lane of W / first lane of E. LANES PEs compute the updates; the mux engine
// keeps border elements unchanged and restores stream order.
//
// The whole channel moves on one advance (adv). It advances when an input word
// is accepted, or, once a whole array has entered and no new word is offered,
// with an empty slot to drain the last rows (empty slots therefore only sit
// between arrays and never break a window). A 2-word output FIFO decouples the
// output handshake, so in_ready depends only on registered state.
//
// Interface: valid/ready streams of LANES*D_WIDTH bits, element 0 in the low
// bits. Timing: one word per clock at steady state; the first updated word of
// an array leaves after (distance S..C) + PE_LATENCY + 2 advances.
// Filters, lane FIFOs, parallel PEs and the mux engine follow the document; the
// drain mechanism, handshake and output FIFO are this design's choice.
module sst
  import stencil_pkg::*;
#(
  parameter int unsigned   DIM        = 2,
  parameter stencil_kind_e KIND       = JACOBI,
  parameter int unsigned   LANES      = 4,
  parameter int unsigned   D_WIDTH    = 32,
  parameter int unsigned   FRAC       = 16,
  parameter int unsigned   COLS       = 1024,
  parameter int unsigned   ROWS       = 1024,
  parameter int unsigned   PLANES     = 1,
  parameter int unsigned   PE_LATENCY = 3
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
  localparam int unsigned WPR = COLS / LANES;
  localparam int unsigned WPP = WPR * ROWS;          // words per plane
  localparam int unsigned TOT = WPP * PLANES;        // words per array
  localparam int unsigned NF  = 2 * DIM + 1;
  localparam int unsigned CI  = DIM;                 // index of the centre filter
  localparam int unsigned DW  = LANES * D_WIDTH;

  // Word offset of filter f from the centre (filter 0 is the newest).
  function automatic longint off(input int f);
    int k;
    longint a;
    k = int'(CI) - f;
    a = (k < 0) ? -longint'(k) : longint'(k);
    a = (a == 0) ? 0 : (a == 1) ? 1 : (a == 2) ? longint'(WPR) : longint'(WPP);
    return (k < 0) ? -a : a;
  endfunction
  function automatic int drow(input int f);
    int k;
    k = int'(CI) - f;
    return (k == 2) ? 1 : (k == -2) ? -1 : 0;
  endfunction
  function automatic int dplane(input int f);
    int k;
    k = int'(CI) - f;
    return (k == 3) ? 1 : (k == -3) ? -1 : 0;
  endfunction

  // ---------------------------------------------------------------- control
  logic                 adv, drain, ofifo_full, ofifo_empty;
  logic [31:0]          in_cnt, pipe_cnt;
  logic                 mx_valid;
  logic [DW-1:0]        mx_data;

  assign in_ready = !ofifo_full;
  assign drain    = (in_cnt == 0) && (pipe_cnt != 0) && !in_valid;
  assign adv      = (in_valid || drain) && !ofifo_full;

  always_ff @(posedge clk) begin
    if (rst) begin
      in_cnt   <= '0;
      pipe_cnt <= '0;
    end else if (adv) begin
      if (in_valid) in_cnt <= (in_cnt == TOT - 1) ? '0 : in_cnt + 1;
      pipe_cnt <= pipe_cnt + 32'(in_valid) - 32'(mx_valid);
    end
  end

  // ---------------------------------------------------------------- channel
  logic          f_in_v [NF];
  logic [DW-1:0] f_in_d [NF];
  logic          f_v    [NF];
  logic [DW-1:0] f_d    [NF];
  logic          f_dom  [NF];
  logic [$clog2(WPR+1)-1:0] c_col;
  logic [$clog2(WPR+1)-1:0] f_col   [NF];
  logic [$clog2(ROWS+1)-1:0]   f_row   [NF];
  logic [$clog2(PLANES+1)-1:0] f_plane [NF];

  assign f_in_v[0] = in_valid;
  assign f_in_d[0] = in_data;

  for (genvar f = 0; f < NF; f++) begin : g_filt
    sst_filter #(
      .DIM(DIM), .LANES(LANES), .D_WIDTH(D_WIDTH), .COLS(COLS), .ROWS(ROWS),
      .PLANES(PLANES), .DROW(drow(f)), .DPLANE(dplane(f))
    ) u_filter (
      .clk, .rst, .adv,
      .in_valid(f_in_v[f]), .in_data(f_in_d[f]),
      .q_valid(f_v[f]), .q_data(f_d[f]),
      .q_col(f_col[f]), .q_row(f_row[f]), .q_plane(f_plane[f]),
      .dom(f_dom[f])
    );

    if (f < NF - 1) begin : g_link
      localparam longint GAP = off(f) - off(f + 1) - 1;
      if (GAP == 0) begin : g_direct
        assign f_in_v[f+1] = f_v[f];
        assign f_in_d[f+1] = f_d[f];
      end else begin : g_fifo
        // LANES FIFOs of GAP words each; lane 0 also carries the valid flag.
        logic          pop;
        logic [DW-1:0] lane_q;
        logic          v_q;
        logic [$clog2(GAP+1)-1:0] cnt0;
        assign pop = adv && (cnt0 == ($clog2(GAP+1))'(GAP));
        for (genvar l = 0; l < LANES; l++) begin : g_lane
          localparam int unsigned LW = D_WIDTH + ((l == 0) ? 1 : 0);
          logic [LW-1:0] din, dout;
          logic [$clog2(GAP+1)-1:0] cnt;
          logic full, empty;
          if (l == 0) begin : g_v
            assign din = {f_v[f], f_d[f][D_WIDTH-1:0]};
            assign v_q = dout[D_WIDTH];
            assign cnt0 = cnt;
          end else begin : g_nv
            assign din = f_d[f][l*D_WIDTH +: D_WIDTH];
          end
          assign lane_q[l*D_WIDTH +: D_WIDTH] = dout[D_WIDTH-1:0];
          sst_fifo #(.WIDTH(LW), .DEPTH(int'(GAP))) u_fifo (
            .clk, .rst, .push(adv), .din, .pop, .dout, .count(cnt), .full, .empty
          );
        end
        assign f_in_v[f+1] = pop && v_q;
        assign f_in_d[f+1] = lane_q;
      end
    end
  end

  // ---------------------------------------------------------------- windows
  logic [LANES-1:0] interior;
  logic [DW-1:0]    pe_res;

  assign c_col = f_col[CI];

  always_comb begin
    logic rowok;
    rowok = f_dom[CI];
    for (int f = 0; f < NF; f++)
      if (drow(f) != 0 || dplane(f) != 0) rowok &= f_dom[f];
    for (int l = 0; l < LANES; l++) begin
      longint col;
      col = longint'(c_col) * LANES + longint'(l);
      interior[l] = rowok && (col >= 1) && (col <= longint'(COLS) - 2);
    end
  end

  for (genvar l = 0; l < LANES; l++) begin : g_pe
    logic [NF*D_WIDTH-1:0] nb;
    always_comb begin
      nb[0 +: D_WIDTH] = f_d[CI][l*D_WIDTH +: D_WIDTH];
      nb[D_WIDTH +: D_WIDTH] = (l > 0) ? f_d[CI][((l>0)?l-1:0)*D_WIDTH +: D_WIDTH]
                                       : f_d[CI+1][(LANES-1)*D_WIDTH +: D_WIDTH];
      nb[2*D_WIDTH +: D_WIDTH] = (l < LANES-1) ? f_d[CI][((l<LANES-1)?l+1:0)*D_WIDTH +: D_WIDTH]
                                               : f_d[CI-1][0 +: D_WIDTH];
      for (int k = 2; k <= DIM; k++) begin
        nb[(2*k-1)*D_WIDTH +: D_WIDTH] = f_d[CI+k][l*D_WIDTH +: D_WIDTH];  // lower index
        nb[(2*k)*D_WIDTH   +: D_WIDTH] = f_d[CI-k][l*D_WIDTH +: D_WIDTH];  // higher index
      end
    end
    isl_pe #(
      .DIM(DIM), .KIND(KIND), .D_WIDTH(D_WIDTH), .FRAC(FRAC), .PE_LATENCY(PE_LATENCY)
    ) u_pe (
      .clk, .en(adv), .nb, .res(pe_res[l*D_WIDTH +: D_WIDTH])
    );
  end

  sst_mux_engine #(.LANES(LANES), .D_WIDTH(D_WIDTH), .PE_LATENCY(PE_LATENCY)) u_mux (
    .clk, .rst, .en(adv),
    .c_valid(f_v[CI]), .c_data(f_d[CI]), .interior,
    .pe_res, .o_valid(mx_valid), .o_data(mx_data)
  );

  // ---------------------------------------------------------------- output
  logic [1:0] ocount;
  sst_fifo #(.WIDTH(DW), .DEPTH(2)) u_ofifo (
    .clk, .rst, .push(adv && mx_valid), .din(mx_data),
    .pop(out_valid && out_ready), .dout(out_data), .count(ocount),
    .full(ofifo_full), .empty(ofifo_empty)
  );
  assign out_valid = !ofifo_empty;

  initial begin
    assert (COLS % LANES == 0) else $error("sst: COLS must be a multiple of LANES");
    assert (DIM == 1 || WPR >= 3) else $error("sst: need COLS/LANES >= 3");
  end
endmodule
