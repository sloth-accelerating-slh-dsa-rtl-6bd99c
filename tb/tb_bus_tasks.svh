// Bus helper tasks shared by the testbenches. Included inside a module that
// declares clk, req (bus_req_t) and rsp (bus_rsp_t), checks and failures.
// Each task raises a request, waits for the one-cycle ready and then idles
// the bus for one cycle.

task automatic bus_write(input logic [31:0] a, input logic [31:0] d,
                         input logic [3:0] strb = 4'hf);
  req <= '{valid: 1'b1, addr: a, wdata: d, wstrb: strb};
  do @(posedge clk); while (!rsp.ready);
  req <= '0;
  @(posedge clk);
endtask

task automatic bus_read(input logic [31:0] a, output logic [31:0] d);
  req <= '{valid: 1'b1, addr: a, wdata: 32'h0, wstrb: 4'h0};
  do @(posedge clk); while (!rsp.ready);
  d = rsp.rdata;
  req <= '0;
  @(posedge clk);
endtask

task automatic check32(input string what, input logic [31:0] got, input logic [31:0] exp);
  checks++;
  if (got !== exp) begin
    failures++;
    $display("FAIL %s: got %h expected %h", what, got, exp);
  end
endtask
