// Testbench of sst_mux_engine: random centre words, masks and PE results;
// output must be PE result on interior lanes and the centre value on border
// lanes, PE_LATENCY advances after the centre word entered; en gaps freeze it.
module tb_sst_mux_engine;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  localparam int L = 4, LAT = 3;
  logic en, c_valid, o_valid;
  logic [L*16-1:0] c_data, pe_res, o_data;
  logic [L-1:0] interior;
  int checks = 0, failures = 0;

  sst_mux_engine #(.LANES(L), .D_WIDTH(16), .PE_LATENCY(LAT)) dut (.*);

  logic [L*16-1:0] cq[$];
  logic [L-1:0]    mq[$];
  logic            vq[$];
  initial begin
    en = 0; c_valid = 0; c_data = 0; interior = 0; pe_res = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < LAT; i++) begin cq.push_back('0); mq.push_back('0); vq.push_back(0); end
    for (int t = 0; t < 500; t++) begin
      en = $urandom_range(0, 3) != 0;
      c_valid = $urandom_range(0, 5) != 0;
      c_data = {$urandom, $urandom};
      interior = L'($urandom);
      pe_res = {$urandom, $urandom};
      #1;
      if (en) begin
        // the word now at the output entered LAT advances ago
        checks++;
        if (o_valid != vq[0]) failures++;
        for (int l = 0; l < L; l++) begin
          checks++;
          if (o_data[l*16 +: 16] != (mq[0][l] ? pe_res[l*16 +: 16] : cq[0][l*16 +: 16])) failures++;
        end
        void'(cq.pop_front()); void'(mq.pop_front()); void'(vq.pop_front());
        cq.push_back(c_data); mq.push_back(interior); vq.push_back(c_valid);
      end
      @(negedge clk);
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
