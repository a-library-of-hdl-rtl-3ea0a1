// intercv7_gearbox: width gearbox between the accelerator stream and the
// inter-FPGA link.
//
// The link carries 8 lanes x 64 bits per user-clock beat, while the stencil
// accelerator streams narrower words. With IN_W < OUT_W the gearbox packs
// R = OUT_W/IN_W consecutive input words into one output word (first word in
// the low bits); with IN_W > OUT_W it unpacks each input word into R output
// words. s_keep/m_keep give the number of narrow words a wide word carries, so
// a frame whose length is not a multiple of R ends with a partly filled wide
// word (zero padded) flagged last.
//
// Interface: AXI-stream-like valid/ready with last and keep. Timing: packing
// accepts one word per clock and emits a wide word with the R-th; unpacking
// emits one word per clock. Both directions run at full rate.
// The gearbox function follows the document; the packing order and keep
// field are this design's choice.
module intercv7_gearbox #(
  parameter int unsigned IN_W  = 128,
  parameter int unsigned OUT_W = 512,
  localparam int unsigned NARROW = (IN_W < OUT_W) ? IN_W : OUT_W,
  localparam int unsigned WIDE   = (IN_W < OUT_W) ? OUT_W : IN_W,
  localparam int unsigned R      = WIDE / NARROW,
  localparam int unsigned KW     = $clog2(R + 1)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             s_valid,
  output logic             s_ready,
  input  logic [IN_W-1:0]  s_data,
  input  logic             s_last,
  input  logic [KW-1:0]    s_keep,
  output logic             m_valid,
  input  logic             m_ready,
  output logic [OUT_W-1:0] m_data,
  output logic             m_last,
  output logic [KW-1:0]    m_keep
);
  if (IN_W < OUT_W) begin : g_pack
    logic [OUT_W-1:0] acc;
    logic [KW-1:0]    cnt;
    logic             done;

    assign s_ready = !m_valid || m_ready;
    assign done    = (cnt == KW'(R - 1)) || s_last;

    always_ff @(posedge clk) begin
      if (rst) begin
        acc     <= '0;
        cnt     <= '0;
        m_valid <= 1'b0;
        m_data  <= '0;
        m_last  <= 1'b0;
        m_keep  <= '0;
      end else begin
        if (m_valid && m_ready) m_valid <= 1'b0;
        if (s_valid && s_ready) begin
          logic [OUT_W-1:0] nxt;
          nxt = acc;
          nxt[cnt*IN_W +: IN_W] = s_data;
          if (done) begin
            m_data  <= nxt;
            m_valid <= 1'b1;
            m_last  <= s_last;
            m_keep  <= cnt + 1'b1;
            acc     <= '0;
            cnt     <= '0;
          end else begin
            acc <= nxt;
            cnt <= cnt + 1'b1;
          end
        end
      end
    end
  end else begin : g_unpack
    logic [IN_W-1:0] hold;
    logic [KW-1:0]   keep, i;
    logic            full, last_q, take;

    assign take    = s_valid && s_ready;
    assign s_ready = !full || (m_ready && (i == keep - 1'b1));
    assign m_valid = full;
    assign m_data  = hold[i*OUT_W +: OUT_W];
    assign m_last  = last_q && (i == keep - 1'b1);
    assign m_keep  = KW'(1);

    always_ff @(posedge clk) begin
      if (rst) begin
        full   <= 1'b0;
        hold   <= '0;
        keep   <= '0;
        i      <= '0;
        last_q <= 1'b0;
      end else begin
        if (full && m_ready) begin
          i <= i + 1'b1;
          if (i == keep - 1'b1) full <= 1'b0;
        end
        if (take) begin
          hold   <= s_data;
          keep   <= (s_keep == '0) ? KW'(R) : s_keep;
          last_q <= s_last;
          i      <= '0;
          full   <= 1'b1;
        end
      end
    end
  end
endmodule
