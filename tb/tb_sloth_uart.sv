// tb_sloth_uart: sends bytes through the transmitter, decodes the serial line
// independently (start bit, 8 data bits LSB first, stop bit, DIV cycles per
// bit) and checks them and the bit time; loops the line back to the receiver
// and checks the received byte, the status flags and the overrun flag.
module tb_sloth_uart;
  import sloth_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int DIV = 8;

  bus_req_t req;
  bus_rsp_t rsp;
  logic     tx, rx;
  logic [31:0] d;
  int checks = 0, failures = 0;

  sloth_uart #(.DEFAULT_DIV(DIV)) dut (.clk, .rst_n, .req, .rsp, .uart_rx_i(rx), .uart_tx_o(tx));
  assign rx = tx;  // loopback

  `include "tb_bus_tasks.svh"

  // independent line decoder, sampling on the falling clock edge: after the
  // first low sample t0 the bit k (0 start, 1..8 data, 9 stop) is sampled at
  // t0 + DIV/2 + k*DIV; the start bit must still be low at t0 + DIV - 1
  logic [7:0] dec_byte;
  int         dec_count = 0;
  initial begin
    forever begin
      do @(negedge clk); while (tx);
      repeat (DIV / 2) @(negedge clk);
      checks++;
      if (tx) begin failures++; $display("FAIL start bit"); end
      repeat (DIV / 2 - 1) @(negedge clk);
      checks++;
      if (tx) begin failures++; $display("FAIL start bit too short"); end
      repeat (DIV / 2 + 1) @(negedge clk);
      for (int b = 0; b < 8; b++) begin
        dec_byte[b] = tx;
        repeat (DIV) @(negedge clk);
      end
      checks++;
      if (!tx) begin failures++; $display("FAIL stop bit"); end
      dec_count++;
    end
  end

  logic [7:0] bytes [3] = '{8'hA5, 8'h3C, 8'h01};

  initial begin
    req = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    bus_read(32'h8, d);
    check32("DIV reset value", d, 32'(DIV));
    for (int i = 0; i < 3; i++) begin
      bus_write(32'h0, {24'h0, bytes[i]});
      bus_read(32'h4, d);
      check32("tx busy", d & 32'h1, 32'h1);
      do bus_read(32'h4, d); while (d[0]);
      repeat (DIV) @(posedge clk);
      check32("decoded byte", {24'h0, dec_byte}, {24'h0, bytes[i]});
      bus_read(32'h4, d);
      check32("rx valid", d & 32'h6, 32'h2);
      bus_read(32'h0, d);
      check32("received byte", d, {24'h0, bytes[i]});
      bus_read(32'h4, d);
      check32("rx flag cleared", d & 32'h2, 32'h0);
    end
    // two bytes without reading: overrun
    for (int i = 0; i < 2; i++) begin
      bus_write(32'h0, 32'h5a);
      do bus_read(32'h4, d); while (d[0]);
      repeat (DIV) @(posedge clk);
    end
    bus_read(32'h4, d);
    check32("overrun", d & 32'h6, 32'h6);
    check32("bytes on the line", 32'(dec_count), 32'd5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
