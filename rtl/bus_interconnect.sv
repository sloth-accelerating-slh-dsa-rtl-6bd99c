// bus_interconnect: the 32-bit system interconnect between the single bus
// master (the RV32 core) and the memory-mapped slaves.
//
// The slave is chosen by address bits 31:24 (see sloth_pkg for the map). The
// request is forwarded, with valid, to the selected slave only, and that
// slave's response is returned. Requests that hit no slave are answered by
// the interconnect itself one cycle later with read data 0, so a stray
// access cannot hang the master. The interconnect adds no cycles. The
// document names a 32-bit interconnect with memory-mapped units and no DMA;
// decoding and the unmapped-access reply are this design's choices.
module bus_interconnect
  import sloth_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t m_req,
  output bus_rsp_t m_rsp,
  output bus_req_t s_req [NUM_SLAVES],
  input  bus_rsp_t s_rsp [NUM_SLAVES],
  output logic     unmapped_o   // one-cycle pulse per unmapped access
);
  logic   hit;
  slave_e sel;
  logic   dflt_ready;

  always_comb begin
    hit = 1'b1;
    sel = SL_RAM;
    unique case (m_req.addr[31:24])
      RAM_SEL:  sel = SL_RAM;
      GPIO_SEL: sel = SL_GPIO;
      UART_SEL: sel = SL_UART;
      KTI3_SEL: sel = SL_KTI3;
      KECC_SEL: sel = SL_KECC;
      S256_SEL: sel = SL_S256;
      S512_SEL: sel = SL_S512;
      default:  hit = 1'b0;
    endcase
  end

  always_comb begin
    for (int i = 0; i < NUM_SLAVES; i++) begin
      s_req[i]       = m_req;
      s_req[i].valid = m_req.valid && hit && (sel == slave_e'(i));
    end
    if (hit) m_rsp = s_rsp[sel];
    else     m_rsp = '{ready: dflt_ready, rdata: 32'h0};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dflt_ready <= 1'b0;
    else        dflt_ready <= m_req.valid && !hit && !dflt_ready;
  end

  assign unmapped_o = m_req.valid && !hit && !dflt_ready;

  // the master holds a request, unchanged, until it is answered
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (m_req.valid && !m_rsp.ready) |=> (m_req.valid && $stable(m_req.addr) &&
                                       $stable(m_req.wstrb) && $stable(m_req.wdata)));
endmodule
