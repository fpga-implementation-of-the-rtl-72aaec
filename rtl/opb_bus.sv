// opb_bus: address decoder of the peripheral register bus.
//
// The processor side issues one register transfer at a time. The upper three
// bits of the 12-bit word address select one of up to eight slave regions of
// 512 words; the request is forwarded only to that slave and its response
// (ack, read data) is returned. A transfer to a region with no slave is
// acknowledged after one cycle with read data 0, so the master never hangs.
//
// Region map used by the encoder:
//   0 opb_huff  1 opb_hist  2 opb_sort  3 bram_2  4 DMA to histogram
//   5 DMA to encoder  6 coded-output writer  7 unused
// Timing: combinational; adds no cycles. The document only names the bus;
// the single-master decoder and the region map are this implementation's.
module opb_bus
  import dhe_pkg::*;
#(
  parameter int unsigned NSLV = 7
) (
  input  logic     clk,
  input  logic     rst_n,
  input  reg_req_t m_req,
  output reg_rsp_t m_rsp,
  output reg_req_t s_req [NSLV],
  input  reg_rsp_t s_rsp [NSLV]
);

  logic [2:0] region;
  logic       unmapped, dummy_ack;

  assign region   = m_req.addr[REG_AW-1 -: 3];
  assign unmapped = (int'(region) >= NSLV);

  always_comb begin
    m_rsp = '0;
    for (int unsigned k = 0; k < NSLV; k++) begin
      s_req[k]     = m_req;
      s_req[k].sel = m_req.sel && (region == 3'(k));
      if (region == 3'(k)) m_rsp = s_rsp[k];
    end
    if (unmapped) begin
      m_rsp.ack   = dummy_ack;
      m_rsp.rdata = '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dummy_ack <= 1'b0;
    else        dummy_ack <= m_req.sel && unmapped && !dummy_ack;
  end

endmodule
