// empty_slot: bus responder for an address slot whose hash unit is left out
// of a build. It acknowledges every access one cycle after the request, as
// the units do, returns 0 on reads and ignores writes, so software polling a
// missing unit's CTRL register sees "ready" and reads zeros instead of
// hanging the bus. Its behaviour is this design's choice; the document only
// says that the units are optional.
module empty_slot
  import sloth_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t req,
  output bus_rsp_t rsp
);
  logic ready_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ready_q <= 1'b0;
    else        ready_q <= req.valid && !ready_q;
  end

  assign rsp = '{ready: ready_q, rdata: 32'h0};
endmodule
