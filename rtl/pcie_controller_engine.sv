// pcie_controller_engine: packetiser of the accelerator output for the host.
//
// The host tells the accelerator how many words a device-to-host packet holds
// (pkt_len, sampled at the start of every packet). This engine forwards the
// accelerator's output stream and marks the last word of each packet. A
// watchdog counts the clocks during which a started packet receives no data;
// after TIMEOUT such clocks (a hardware stall) it completes the packet with
// dummy words, flagged by m_dummy, so the host's DMA transfer always
// finishes. Real data waiting after a dummy fill start in a new packet.
//
// Interface: s_* accelerator stream, m_* stream to the PCIe DMA with m_last
// and m_dummy. Timing: zero-latency pass-through of valid/ready; one word per
// clock. The function follows the document; counting only idle clocks inside
// a packet, zero-valued dummy words and the TIMEOUT default are this design's
// choice.
module pcie_controller_engine #(
  parameter int unsigned WIDTH   = 128,
  parameter int unsigned TIMEOUT = 1024
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [15:0]      pkt_len,
  input  logic             s_valid,
  output logic             s_ready,
  input  logic [WIDTH-1:0] s_data,
  output logic             m_valid,
  input  logic             m_ready,
  output logic [WIDTH-1:0] m_data,
  output logic             m_last,
  output logic             m_dummy,
  output logic [31:0]      dummy_words
);
  logic [15:0] cnt, len;
  logic [$clog2(TIMEOUT+1)-1:0] idle;
  logic        filling, in_pkt;

  assign in_pkt  = (cnt != '0);
  assign m_valid = filling || s_valid;
  assign m_data  = filling ? '0 : s_data;
  assign m_dummy = filling;
  assign s_ready = !filling && m_ready;
  assign m_last  = ((in_pkt ? len : pkt_len) == cnt + 1'b1) ||
                   (!in_pkt && pkt_len <= 16'd1);

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt         <= '0;
      len         <= '0;
      idle        <= '0;
      filling     <= 1'b0;
      dummy_words <= '0;
    end else begin
      if (m_valid && m_ready) begin
        if (!in_pkt) len <= pkt_len;
        cnt  <= m_last ? '0 : cnt + 1'b1;
        idle <= '0;
        if (filling) dummy_words <= dummy_words + 1;
        if (m_last) filling <= 1'b0;
      end else if (in_pkt && !s_valid && !filling) begin
        if (idle == ($clog2(TIMEOUT+1))'(TIMEOUT - 1)) filling <= 1'b1;
        else idle <= idle + 1'b1;
      end
    end
  end
endmodule
