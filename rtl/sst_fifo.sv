// sst_fifo: blocking first-in first-out buffer of an SST channel.
//
// Stores the stream elements that lie between the data domains of two
// consecutive filters. Reads and writes are blocking: a push while full or a
// pop while empty is ignored (and reported by an assertion), so the owner must
// look at full/empty. A push and a pop in the same cycle are allowed when the
// queue is full. The head element is always visible on dout (show-ahead), so a
// pop hands it over in the same cycle.
//
// Interface: push/din write, pop/dout read, count is the occupancy.
// Timing: one clock from push to the element being visible on dout.
// Reset (synchronous, active high) empties the queue. The depth comes from the
// channel geometry; the register-array memory and show-ahead read are this
// design's choice.
module sst_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 254
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       push,
  input  logic [WIDTH-1:0]           din,
  input  logic                       pop,
  output logic [WIDTH-1:0]           dout,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                       full,
  output logic                       empty
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic             do_push, do_pop;

  assign full    = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign empty   = (count == '0);
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);
  assign dout    = mem[rp];

  function automatic logic [AW-1:0] incr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_push) wp <= incr(wp);
      if (do_pop)  rp <= incr(rp);
      case ({do_push, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  // Blocking access rules.
  a_no_overflow:  assert property (@(posedge clk) disable iff (rst) push |-> (!full || pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) pop |-> !empty);
endmodule
