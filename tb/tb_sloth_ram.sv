// tb_sloth_ram: writes pseudo-random words over the whole 128 kB RAM, reads
// them back against a model, checks byte strobes and the one-cycle response.
module tb_sloth_ram;
  import sloth_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  bus_req_t req;
  bus_rsp_t rsp;
  int checks = 0, failures = 0;

  sloth_ram dut (.clk, .rst_n, .req, .rsp);

  `include "tb_bus_tasks.svh"

  localparam int N = 64;
  logic [31:0] addrs [N];
  logic [31:0] vals  [N];
  logic [31:0] d;
  int          lat;

  initial begin
    req = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < N; i++) begin
      // distinct word addresses spread over the whole RAM, first and last included
      addrs[i] = (i == 0) ? 32'h0 : (i == N - 1) ? 32'h1fffc : {15'h0, 15'(i * 509), 2'b00};
      vals[i]  = $urandom;
      bus_write(addrs[i], vals[i]);
    end
    for (int i = 0; i < N; i++) begin
      bus_read(addrs[i], d);
      check32($sformatf("word %h", addrs[i]), d, vals[i]);
    end
    // byte strobes
    bus_write(32'h100, 32'h11223344);
    bus_write(32'h100, 32'haabbccdd, 4'b0101);
    bus_read(32'h100, d);
    check32("byte strobes", d, 32'h11bb33dd);
    // response latency: ready exactly one cycle after the request
    req <= '{valid: 1'b1, addr: 32'h100, wdata: 32'h0, wstrb: 4'h0};
    lat = 0;
    do begin @(posedge clk); lat++; end while (!rsp.ready);
    req <= '0;
    // the request is sampled at the first edge, ready is seen at the second
    check32("latency", 32'(lat), 32'd2);
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
