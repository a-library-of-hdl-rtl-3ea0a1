// Shared body of the system testbenches. The including module declares the
// localparams below, instantiates stencil_system_top as `dut` on these signals
// and provides clk/rst. The ISL path runs in loopback (outgoing link wired to
// the incoming link through a link model that stalls at random); the CNN
// stage runs alongside. Every ISL element and CNN output is compared with the
// reference models, and each mechanism of the design is counted:
// engine drain with empty slots, output back-pressure, link beats packed and
// unpacked, watchdog dummy fill, weight-load stall, strided window skipping,
// padding and pooling.
//   localparams: CH, COLS_, ROWS_, L_, LINKW, PKT, CK, CS, CP, CDIM_IN, CFP, CLP, CDMA
  localparam int TOT = COLS_ * ROWS_;
  localparam int WPA = TOT / L_;
  localparam int SWD = L_ * 32;
  localparam int KWD = $clog2(LINKW / SWD + 1);

  logic host_in_valid, host_in_ready, link_tx_valid, link_tx_ready, link_tx_last;
  logic [SWD-1:0] host_in_data, host_out_data;
  logic [LINKW-1:0] link_tx_data;
  logic [KWD-1:0] link_tx_keep;
  logic link_rx_valid, link_rx_ready, link_rx_last;
  logic [LINKW-1:0] link_rx_data;
  logic [KWD-1:0] link_rx_keep;
  logic [15:0] host_pkt_len;
  logic host_out_valid, host_out_ready, host_out_last, host_out_dummy;
  logic [31:0] host_dummy_words;
  logic cnn_in_valid, cnn_in_ready, cnn_w_valid, cnn_w_ready, cnn_out_valid, cnn_out_ready;
  logic cnn_weight_stall;
  logic [CFP*8-1:0] cnn_in_data;
  logic [CDMA-1:0] cnn_w_data;
  logic [CLP*32-1:0] cnn_bias;
  logic [4:0] cnn_shift;
  logic [CLP*8-1:0] cnn_out_data;

  int checks = 0, failures = 0;
  int n_drain = 0, n_bp = 0, n_beats = 0, n_wstall = 0, n_skip = 0, n_pad = 0, n_pool = 0;
  int n_pkts = 0;

  // Link model: loopback with random stalls.
  logic link_ok;
  always @(negedge clk) link_ok <= $urandom_range(0, 7) != 0;
  assign link_rx_valid = link_tx_valid && link_ok;
  assign link_tx_ready = link_rx_ready && link_ok;
  assign link_rx_data  = link_tx_data;
  assign link_rx_last  = link_tx_last;
  assign link_rx_keep  = link_tx_keep;

  // ---------------------------------------------------------------- ISL
  int src[], expv[];
  initial begin
    int a[], b[];
    src = new[TOT];
    foreach (src[i]) src[i] = int'($urandom_range(0, 1 << 20));
    a = src;
    for (int s = 0; s < CH; s++) begin
      isl_ref_pkg::step(2, 0, 16, COLS_, ROWS_, 1, a, b);
      a = b;
    end
    expv = a;
  end

  initial begin
    host_in_valid = 0; host_in_data = '0; host_pkt_len = 16'(PKT);
    @(negedge clk);
    while (rst) @(negedge clk);
    for (int w = 0; w < WPA; w++) begin
      host_in_valid = 1;
      for (int l = 0; l < L_; l++) host_in_data[l*32 +: 32] = src[w*L_ + l];
      @(posedge clk);
      while (!host_in_ready) @(posedge clk);
      @(negedge clk);
    end
    host_in_valid = 0;
  end

  int got = 0, pkt_words = 0, dummies = 0;
  bit isl_done = 0;
  always @(negedge clk) host_out_ready <= $urandom_range(0, 4) != 0;
  always @(posedge clk) begin
    if (!rst) begin
      if (dut.u_isl.g_stage[0].u_sst.drain && dut.u_isl.g_stage[0].u_sst.adv) n_drain++;
      if (host_out_valid && !host_out_ready) n_bp++;
      if (link_tx_valid && link_tx_ready) n_beats++;
    end
    if (!rst && host_out_valid && host_out_ready) begin
      pkt_words++;
      if (host_out_last) begin
        n_pkts++;
        checks++;
        if (pkt_words != PKT) begin failures++; $display("packet of %0d words", pkt_words); end
        pkt_words = 0;
      end
      if (host_out_dummy) dummies++;
      else if (got < WPA) begin
        for (int l = 0; l < L_; l++) begin
          checks++;
          if (int'(host_out_data[l*32 +: 32]) != expv[got*L_ + l]) begin
            failures++;
            if (failures < 5) $display("ISL word %0d lane %0d: %0d vs %0d", got, l,
                                       int'(host_out_data[l*32 +: 32]), expv[got*L_ + l]);
          end
        end
        got++;
      end
      if (got == WPA && host_out_last) isl_done = 1;
    end
  end

  // ---------------------------------------------------------------- CNN
  localparam int NW  = CLP * CFP * CK * CK;
  localparam int EPB = CDMA / 8;
  localparam int NB  = (NW + EPB - 1) / EPB;
  int img[], wts[], cexp[], cod, bias_v[CLP];
  initial begin
    longint acc[];
    int rq[], cd;
    cnn_shift = 5'd10;
    for (int o = 0; o < CLP; o++) begin
      bias_v[o] = int'($urandom_range(0, 4000)) - 2000;
      cnn_bias[o*32 +: 32] = bias_v[o];
    end
    img = new[CFP*CDIM_IN*CDIM_IN];
    foreach (img[i]) img[i] = int'($urandom_range(0, 255)) - 128;
    wts = new[NW];
    foreach (wts[i]) wts[i] = int'($urandom_range(0, 255)) - 128;
    cnn_ref_pkg::conv(CFP, CLP, CDIM_IN, CK, CS, CP, img, wts, acc, cd);
    rq = new[acc.size()];
    foreach (acc[i]) rq[i] = cnn_ref_pkg::requant(acc[i], bias_v[i / (cd*cd)], 10);
    cnn_ref_pkg::pool(CLP, cd, 3, 2, 0, rq, cexp, cod);
  end
  initial begin
    cnn_w_valid = 0; cnn_w_data = '0;
    @(negedge clk);
    while (rst) @(negedge clk);
    repeat (CDIM_IN * CDIM_IN) @(negedge clk);   // weights arrive late
    for (int b = 0; b < NB; b++) begin
      cnn_w_valid = 1;
      for (int e = 0; e < EPB; e++)
        cnn_w_data[e*8 +: 8] = (b*EPB + e < NW) ? 8'(wts[b*EPB + e]) : 8'h00;
      @(posedge clk);
      while (!cnn_w_ready) @(posedge clk);
      @(negedge clk);
    end
    cnn_w_valid = 0;
  end
  initial begin
    cnn_in_valid = 0; cnn_in_data = '0;
    @(negedge clk);
    while (rst) @(negedge clk);
    for (int p = 0; p < CDIM_IN*CDIM_IN; p++) begin
      cnn_in_valid = 1;
      for (int f = 0; f < CFP; f++) cnn_in_data[f*8 +: 8] = 8'(img[f*CDIM_IN*CDIM_IN + p]);
      @(posedge clk);
      while (!cnn_in_ready) @(posedge clk);
      @(negedge clk);
    end
    cnn_in_valid = 0;
  end
  int cgot = 0;
  bit cnn_done = 0;
  always @(negedge clk) cnn_out_ready <= $urandom_range(0, 3) != 0;
  always @(posedge clk) begin
    if (!rst) begin
      if (cnn_weight_stall) n_wstall++;
      if (dut.u_cnn.u_mem.lb_valid && dut.u_cnn.u_mem.lb_ready) begin
        if (dut.u_cnn.u_mem.on_pad) n_pad++;
        if (!dut.u_cnn.u_mem.u_lb.win_valid && dut.u_cnn.u_mem.pr >= CK) n_skip++;
      end
      if (dut.u_cnn.g_pool.u_pool.win_done) n_pool++;
    end
    if (!rst && cnn_out_valid && cnn_out_ready && !cnn_done) begin
      for (int o = 0; o < CLP; o++) begin
        checks++;
        if (int'(signed'(cnn_out_data[o*8 +: 8])) != cexp[o*cod*cod + cgot]) begin
          failures++;
          if (failures < 8) $display("CNN pos %0d map %0d: %0d vs %0d", cgot, o,
                                     int'(signed'(cnn_out_data[o*8 +: 8])), cexp[o*cod*cod + cgot]);
        end
      end
      cgot++;
      if (cgot == cod * cod) cnn_done = 1;
    end
  end

  task automatic mech(input string name, input int n);
    checks++;
    $display("  %-28s %0d", name, n);
    if (n == 0) begin failures++; $display("  mechanism never exercised: %s", name); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    wait (isl_done && cnn_done);
    repeat (10) @(posedge clk);
    $display("mechanisms exercised:");
    mech("SST drain slots", n_drain);
    mech("ISL output back-pressure", n_bp);
    mech("link beats (gearbox)", n_beats);
    mech("host packets", n_pkts);
    mech("watchdog dummy words", dummies);
    mech("CNN weight-load stall", n_wstall);
    mech("CNN strided window skip", n_skip);
    if (CP > 0) mech("CNN padding elements", n_pad);
    else $display("  CNN padding elements         not configured (pad 0)");
    mech("CNN pooling windows", n_pool);
    checks++;
    if (dummies != host_dummy_words) begin failures++; $display("dummy counter mismatch"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
