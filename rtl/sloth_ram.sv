// sloth_ram: single-port RAM on the system bus (128 kB by default), holding
// the firmware, its stack and the signatures it builds.
//
// Words are 32 bits with byte-write strobes; the array is written as a plain
// memory so synthesis can map it to block RAM. A request is answered one
// cycle later with the registered read data. Address bits above the RAM size
// are ignored (the RAM is mirrored inside its 16 MiB decode window). The
// contents are not reset; an optional $readmemh file preloads them.
// The document gives only the size; the rest is this design's choice.
module sloth_ram
  import sloth_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 128 * 1024,
  parameter string       INIT_FILE  = ""
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t req,
  output bus_rsp_t rsp
);
  localparam int unsigned WORDS = SIZE_BYTES / 4;
  localparam int unsigned AW    = $clog2(WORDS);

  logic [31:0]   mem [WORDS];
  logic [31:0]   rdata_q;
  logic          ready_q;
  logic [AW-1:0] wa;
  logic          acc;
  assign wa  = req.addr[AW+1:2];
  assign acc = req.valid && !rsp.ready;

  initial if (INIT_FILE != "") $readmemh(INIT_FILE, mem);

  always_ff @(posedge clk) begin
    if (acc) begin
      for (int b = 0; b < 4; b++)
        if (req.wstrb[b]) mem[wa][8*b +: 8] <= req.wdata[8*b +: 8];
      rdata_q <= mem[wa];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ready_q <= 1'b0;
    else        ready_q <= acc;
  end

  assign rsp = '{ready: ready_q, rdata: rdata_q};
endmodule
