// tb_bus_interconnect: drives the interconnect with requests to every slot of
// the address map and to unmapped addresses. Simple slave models answer one
// cycle later with their own index in the read data; the test checks that
// only the addressed slave sees valid, that its answer is returned, and that
// unmapped accesses are answered with 0 and flagged.
module tb_bus_interconnect;
  import sloth_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  bus_req_t req;
  bus_rsp_t rsp;
  bus_req_t s_req [NUM_SLAVES];
  bus_rsp_t s_rsp [NUM_SLAVES];
  logic     unmapped;
  int       seen [NUM_SLAVES];
  int       unmapped_count = 0;
  int checks = 0, failures = 0;

  bus_interconnect dut (.clk, .rst_n, .m_req(req), .m_rsp(rsp), .s_req, .s_rsp,
                        .unmapped_o(unmapped));

  for (genvar i = 0; i < NUM_SLAVES; i++) begin : g_slave
    always_ff @(posedge clk) begin
      s_rsp[i].ready <= s_req[i].valid && !s_rsp[i].ready;
      s_rsp[i].rdata <= 32'hC0DE_0000 | 32'(i) | (s_req[i].addr & 32'h0000_ff00);
      if (s_req[i].valid && !s_rsp[i].ready) seen[i]++;
    end
  end

  always_ff @(posedge clk) if (unmapped) unmapped_count++;

  `include "tb_bus_tasks.svh"

  logic [7:0]  bases [NUM_SLAVES] = '{RAM_SEL, GPIO_SEL, UART_SEL, KTI3_SEL, KECC_SEL, S256_SEL, S512_SEL};
  logic [31:0] d;

  initial begin
    req = '0;
    for (int i = 0; i < NUM_SLAVES; i++) begin
      s_rsp[i] = '0;
      seen[i]  = 0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < NUM_SLAVES; i++) begin
      bus_read({bases[i], 24'h00_1200}, d);
      check32($sformatf("read slave %0d", i), d, 32'hC0DE_1200 | 32'(i));
      bus_write({bases[i], 24'h00_0040}, 32'h1234);
    end
    for (int i = 0; i < NUM_SLAVES; i++)
      check32($sformatf("accesses seen by slave %0d", i), 32'(seen[i]), 32'd2);
    bus_read(32'h2000_0000, d);
    check32("unmapped read data", d, 32'h0);
    bus_write(32'hFF00_0000, 32'h1);
    check32("unmapped count", 32'(unmapped_count), 32'd2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
