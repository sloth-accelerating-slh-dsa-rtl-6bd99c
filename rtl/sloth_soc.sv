// sloth_soc: SLH-DSA accelerator SoC for a root-of-trust: memory-mapped hash
// units beside a small RV32 system on one 32-bit interconnect.
//
// The RV32 core is not part of this RTL: its bus (one master, see sloth_pkg)
// is the cpu_req/cpu_rsp port, so any core or a testbench can drive it. On
// the interconnect sit the 128 kB RAM, GPIO, UART and four hash units:
//   0x0000_0000 RAM         0x1000_0000 GPIO        0x1100_0000 UART
//   0x1400_0000 KTI3 (three-share threshold Keccak with SLH-DSA formatting)
//   0x1500_0000 KECC (plain Keccak with SLH-DSA formatting, same registers)
//   0x1600_0000 SHA2-256    0x1700_0000 SHA2-512
// There is no DMA: the core moves every word. The units' busy flags are also
// brought out (hash_busy_o: bit 0 KTI3, 1 KECC, 2 SHA-256, 3 SHA-512) as an
// observation/interrupt aid, as is a pulse for accesses that hit no slave.
// Each hash unit can be left out of a build (EN_KTI3, EN_KECC, EN_S256,
// EN_S512), as in the document's table of configurations, from a core-only
// system up to the full system with all four units; the default is the full
// system. A slot whose unit is left out still answers one cycle later, reads
// 0 (so firmware sees CTRL = 0 and no results) and ignores writes.
// The set of units, their optional inclusion and the KTI3 base address
// follow the document; the other addresses, the bus and the extra outputs
// are this design's choices.
module sloth_soc
  import sloth_pkg::*;
#(
  parameter int unsigned RAM_BYTES = 128 * 1024,
  parameter int unsigned UART_DIV  = 217,
  parameter int unsigned GPIO_W    = 32,
  parameter bit          EN_KTI3   = 1'b1,
  parameter bit          EN_KECC   = 1'b1,
  parameter bit          EN_S256   = 1'b1,
  parameter bit          EN_S512   = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  bus_req_t          cpu_req,
  output bus_rsp_t          cpu_rsp,
  input  logic [GPIO_W-1:0] gpio_i,
  output logic [GPIO_W-1:0] gpio_o,
  input  logic              uart_rx_i,
  output logic              uart_tx_o,
  output logic [3:0]        hash_busy_o,
  output logic              unmapped_o
);
  bus_req_t s_req [NUM_SLAVES];
  bus_rsp_t s_rsp [NUM_SLAVES];

  bus_interconnect u_ix (
    .clk, .rst_n, .m_req(cpu_req), .m_rsp(cpu_rsp), .s_req, .s_rsp, .unmapped_o);

  sloth_ram #(.SIZE_BYTES(RAM_BYTES)) u_ram (
    .clk, .rst_n, .req(s_req[SL_RAM]), .rsp(s_rsp[SL_RAM]));

  sloth_gpio #(.WIDTH(GPIO_W)) u_gpio (
    .clk, .rst_n, .req(s_req[SL_GPIO]), .rsp(s_rsp[SL_GPIO]), .gpio_i, .gpio_o);

  sloth_uart #(.DEFAULT_DIV(UART_DIV)) u_uart (
    .clk, .rst_n, .req(s_req[SL_UART]), .rsp(s_rsp[SL_UART]), .uart_rx_i, .uart_tx_o);

  if (EN_KTI3) begin : g_kti3
    keccak_slh_unit #(.SHARES(3)) u_kti3 (
      .clk, .rst_n, .req(s_req[SL_KTI3]), .rsp(s_rsp[SL_KTI3]), .busy_o(hash_busy_o[0]));
  end else begin : g_no_kti3
    empty_slot u_none (.clk, .rst_n, .req(s_req[SL_KTI3]), .rsp(s_rsp[SL_KTI3]));
    assign hash_busy_o[0] = 1'b0;
  end

  if (EN_KECC) begin : g_kecc
    keccak_slh_unit #(.SHARES(1)) u_kecc (
      .clk, .rst_n, .req(s_req[SL_KECC]), .rsp(s_rsp[SL_KECC]), .busy_o(hash_busy_o[1]));
  end else begin : g_no_kecc
    empty_slot u_none (.clk, .rst_n, .req(s_req[SL_KECC]), .rsp(s_rsp[SL_KECC]));
    assign hash_busy_o[1] = 1'b0;
  end

  if (EN_S256) begin : g_s256
    sha256_unit u_s256 (
      .clk, .rst_n, .req(s_req[SL_S256]), .rsp(s_rsp[SL_S256]), .busy_o(hash_busy_o[2]));
  end else begin : g_no_s256
    empty_slot u_none (.clk, .rst_n, .req(s_req[SL_S256]), .rsp(s_rsp[SL_S256]));
    assign hash_busy_o[2] = 1'b0;
  end

  if (EN_S512) begin : g_s512
    sha512_unit u_s512 (
      .clk, .rst_n, .req(s_req[SL_S512]), .rsp(s_rsp[SL_S512]), .busy_o(hash_busy_o[3]));
  end else begin : g_no_s512
    empty_slot u_none (.clk, .rst_n, .req(s_req[SL_S512]), .rsp(s_rsp[SL_S512]));
    assign hash_busy_o[3] = 1'b0;
  end
endmodule
