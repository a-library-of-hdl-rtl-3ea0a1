// Testbench of intercv7_gearbox: a 32->128 packer feeds a 128->32 unpacker
// (ratio 4, as the 128/512 link). Frames of random length (so the last wide
// word is often partly filled) pass with random gaps and back-pressure. The
// wide words, keep counts and last flags are checked on the link side, and
// the unpacked words and last flags against the input.
module tb_intercv7_gearbox;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  localparam int N = 32, W = 128, R = 4;
  logic s_valid, s_ready, s_last, l_valid, l_ready, l_last, m_valid, m_ready, m_last;
  logic [2:0] s_keep, l_keep, m_keep;
  logic [N-1:0] s_data, m_data;
  logic [W-1:0] l_data;
  int checks = 0, failures = 0;
  int words[$], lasts[$];        // input words and their frame-end flags
  int wq[$];                     // expected wide-word content
  int nframes = 60, nin = 0, nout = 0;

  intercv7_gearbox #(.IN_W(N), .OUT_W(W)) u_pack (
    .clk, .rst, .s_valid, .s_ready, .s_data, .s_last, .s_keep,
    .m_valid(l_valid), .m_ready(l_ready), .m_data(l_data), .m_last(l_last), .m_keep(l_keep));
  intercv7_gearbox #(.IN_W(W), .OUT_W(N)) u_unpack (
    .clk, .rst, .s_valid(l_valid), .s_ready(l_ready), .s_data(l_data), .s_last(l_last), .s_keep(l_keep),
    .m_valid, .m_ready, .m_data, .m_last, .m_keep);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    s_valid = 0; s_data = 0; s_last = 0; s_keep = 3'd1;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int f = 0; f < nframes; f++) begin
      int len;
      len = $urandom_range(1, 11);
      for (int i = 0; i < len; i++) begin
        while ($urandom_range(0, 3) == 0) begin s_valid = 0; @(negedge clk); end
        s_valid = 1; s_data = $urandom; s_last = (i == len - 1);
        words.push_back(s_data); lasts.push_back(s_last);
        @(posedge clk);
        while (!s_ready) @(posedge clk);
        @(negedge clk);
        s_valid = 0; s_last = 0;
      end
    end
  end
  always @(posedge clk) m_ready <= $urandom_range(0, 3) != 0;

  // link side: keep and last against the input framing
  int lw = 0;
  always @(posedge clk) if (!rst && l_valid && l_ready) begin
    int k;
    bit end_seen;
    k = 0; end_seen = 0;
    while (k < R && !end_seen) begin
      chk(l_data[k*N +: N] == N'(words[lw + k]), "packed word");
      end_seen = lasts[lw + k];
      k++;
    end
    chk(l_keep == 3'(k), $sformatf("keep %0d expected %0d", l_keep, k));
    chk(l_last == end_seen, "link last");
    lw += k;
  end
  always @(posedge clk) if (!rst && m_valid && m_ready) begin
    chk(m_data == N'(words[nout]), $sformatf("word %0d", nout));
    chk(m_last == lasts[nout], "last");
    nout++;
    if (nout == words.size() && lasts[nout-1] && nout > 300) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
  initial begin
    repeat (20000) @(posedge clk);
    $display("words out %0d of %0d", nout, words.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
