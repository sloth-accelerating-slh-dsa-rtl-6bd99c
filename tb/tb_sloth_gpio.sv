// tb_sloth_gpio: checks the output register (with byte strobes) drives
// gpio_o, and that gpio_i is read back after its two-flop synchronizer.
module tb_sloth_gpio;
  import sloth_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  bus_req_t    req;
  bus_rsp_t    rsp;
  logic [31:0] gpio_i, gpio_o, d, v;
  int checks = 0, failures = 0;

  sloth_gpio dut (.clk, .rst_n, .req, .rsp, .gpio_i, .gpio_o);

  `include "tb_bus_tasks.svh"

  initial begin
    req = '0;
    gpio_i = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    check32("reset value", gpio_o, 32'h0);
    for (int i = 0; i < 8; i++) begin
      v = $urandom;
      bus_write(32'h0, v);
      check32("gpio_o", gpio_o, v);
      bus_read(32'h0, d);
      check32("OUT readback", d, v);
      gpio_i = ~v;
      repeat (2) @(posedge clk);
      bus_read(32'h4, d);
      check32("IN", d, ~v);
    end
    bus_write(32'h0, 32'h00000000);
    bus_write(32'h0, 32'hffffffff, 4'b1000);
    check32("byte strobe", gpio_o, 32'hff000000);
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
