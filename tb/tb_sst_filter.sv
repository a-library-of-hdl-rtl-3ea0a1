// Testbench of sst_filter: streams two 2D arrays (with empty slots and
// stalls) through a filter one row below the centre (DROW=+1) and checks the
// held word, its column/row counters and the domain flag.
module tb_sst_filter;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  localparam int LANES = 2, COLS = 6, ROWS = 5, WPR = COLS / LANES;
  logic adv, in_valid, q_valid, dom;
  logic [LANES*8-1:0] in_data, q_data;
  logic [$clog2(WPR+1)-1:0] q_col;
  logic [$clog2(ROWS+1)-1:0] q_row;
  logic [0:0] q_plane;
  int checks = 0, failures = 0;

  sst_filter #(.DIM(2), .LANES(LANES), .D_WIDTH(8), .COLS(COLS), .ROWS(ROWS), .PLANES(1),
               .DROW(1), .DPLANE(0)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int n;
    adv = 0; in_valid = 0; in_data = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    n = 0;
    while (n < 2 * WPR * ROWS) begin
      adv = $urandom_range(0, 3) != 0;
      in_valid = $urandom_range(0, 4) != 0;
      in_data = 16'(n * 7);
      @(negedge clk);
      if (adv) begin
        chk(q_valid == in_valid, "valid");
        if (in_valid) begin
          int w, r;
          w = n % (WPR * ROWS);
          r = w / WPR;
          chk(q_data == 16'(n * 7), "data");
          chk(q_col == w % WPR, "col");
          chk(q_row == r, "row");
          // centre row = r - 1 must be interior (1..ROWS-2)
          chk(dom == (r - 1 >= 1 && r - 1 <= ROWS - 2), "dom");
          n++;
        end else chk(!dom, "no dom when empty");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
