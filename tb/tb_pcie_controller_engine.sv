// Testbench of pcie_controller_engine: a source sends 500 words with random
// gaps, including long pauses past the watchdog timeout, to a sink with random
// back-pressure; packet length 7. Checks that real words pass in order, that
// every packet has exactly pkt_len words with last on the final one, that
// dummy words appear only after a timeout (zero valued) and the dummy count.
module tb_pcie_controller_engine;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  localparam int WD = 32, TO = 20, PL = 7, NW = 500;
  logic [15:0] pkt_len;
  logic s_valid, s_ready, m_valid, m_ready, m_last, m_dummy;
  logic [WD-1:0] s_data, m_data;
  logic [31:0] dummy_words;
  int checks = 0, failures = 0, nreal = 0, ndummy = 0, inpkt = 0, idle = 0;

  pcie_controller_engine #(.WIDTH(WD), .TIMEOUT(TO)) dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    pkt_len = 16'(PL); s_valid = 0; s_data = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < NW; i++) begin
      if ($urandom_range(0, 40) == 0) repeat ($urandom_range(TO, 3*TO)) @(negedge clk);
      else while ($urandom_range(0, 3) == 0) @(negedge clk);
      s_valid = 1; s_data = WD'(i);
      @(posedge clk);
      while (!s_ready) @(posedge clk);
      @(negedge clk);
      s_valid = 0;
    end
    repeat (3*TO) @(negedge clk);
    chk(nreal == NW, "all words delivered");
    chk(inpkt == 0, "last packet completed");
    chk(ndummy > 0 && dummy_words == 32'(ndummy), "dummy count");
    $display("dummy words %0d", ndummy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge clk) m_ready <= $urandom_range(0, 3) != 0;
  always @(posedge clk) if (!rst) begin
    if (m_valid && m_ready) begin
      if (m_dummy) begin
        chk(m_data == '0, "dummy word zero");
        chk(inpkt > 0 && idle >= TO, "dummy only after timeout in a packet");
        ndummy++;
      end else begin
        chk(m_data == WD'(nreal), "data order");
        nreal++;
        idle = 0;
      end
      inpkt++;
      chk(m_last == (inpkt == PL), "last flag");
      if (inpkt == PL) inpkt = 0;
      if (inpkt == 0) idle = 0;
    end else if (!s_valid) idle++;
  end
  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
