// sloth_gpio: general-purpose I/O port on the system bus.
//
// Register 0x0 OUT drives gpio_o (read/write, byte strobes, reset 0);
// register 0x4 IN reads gpio_i through a two-flop synchronizer. Every access
// is answered one cycle after the request. The document only names a GPIO
// block; the registers are this design's choice.
module sloth_gpio
  import sloth_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  bus_req_t         req,
  output bus_rsp_t         rsp,
  input  logic [WIDTH-1:0] gpio_i,
  output logic [WIDTH-1:0] gpio_o
);
  logic [WIDTH-1:0] in_q1, in_q2;
  logic [31:0]      out_r, in_w;
  logic             acc;
  assign acc  = req.valid && !rsp.ready;
  assign in_w = 32'(in_q2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_r <= '0;
      in_q1 <= '0;
      in_q2 <= '0;
      rsp   <= '0;
    end else begin
      in_q1     <= gpio_i;
      in_q2     <= in_q1;
      rsp.ready <= acc;
      rsp.rdata <= req.addr[2] ? in_w : out_r;
      if (acc && !req.addr[2])
        for (int b = 0; b < 4; b++)
          if (req.wstrb[b]) out_r[8*b +: 8] <= req.wdata[8*b +: 8];
    end
  end

  assign gpio_o = out_r[WIDTH-1:0];
endmodule
