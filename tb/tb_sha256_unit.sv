// tb_sha256_unit: self-checking test of the SHA-256 unit.
//
// Raw compression: hashes the standard two-block test message and compares
// the chaining value with the SHA-256 digest; checks 64 cycles per
// compression, the busy flag and that writes during a compression are
// ignored. SLH-DSA commands, against values computed independently with
// SHA-256 and the FIPS 205 SHA2 formats: a 3-step F chain at n = 16 (which
// also builds the PK.seed mid-state: 64 + 3*65 cycles), PRF followed by 2
// steps at n = 24 (the mid-state is rebuilt after SECN changes), the ADRS
// write-back, and the 0x80 mid-state load continued by one raw compression
// to a full n = 16 H.
module tb_sha256_unit;
  import sloth_pkg::*;

  localparam logic [255:0] H256_INIT = 256'h5be0cd191f83d9ab9b05688c510e527fa54ff53a3c6ef372bb67ae856a09e667;
  localparam logic [511:0] B256_0 = 512'h00000000800000006e6f70716d6e6f706c6d6e6f6b6c6d6e6a6b6c6d696a6b6c68696a6b6768696a666768696566676864656667636465666263646561626364;
  localparam logic [511:0] B256_1 = 512'h000001c0000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000;
  localparam logic [255:0] D256 = 256'h19db06c1f6ecedd464ff2167a33ce4590c3e6039e5c02693d20638b8248d6a61;
  localparam logic [127:0] SCHAIN16 = 128'hf322c884d0a89c75e334afa7222e48c2;
  localparam logic [191:0] SPRFCH24 = 192'h7c7ab953abb46b2b7f228b88559fb20dcc939b539401290b;
  localparam logic [255:0] SH16 = 256'hf445331b1fe22a68d67835cd925a8df576bafd3349b5a8cb59bc6564f4577ee6;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  bus_req_t req;
  bus_rsp_t rsp;
  logic     busy;
  int checks = 0, failures = 0;

  sha256_unit dut (.clk, .rst_n, .req, .rsp, .busy_o(busy));

  `include "tb_bus_tasks.svh"

  task automatic check(input string what, input logic [511:0] got, input logic [511:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic load_words(input logic [31:0] base, input logic [511:0] v, input int nwords);
    for (int i = 0; i < nwords; i++) bus_write(base + 32'(4 * i), v[32*i +: 32]);
  endtask

  // a command write, then the cycles until the unit is idle again
  task automatic run_cmd(input logic [31:0] a, input logic [31:0] d, output int cyc);
    bus_write(a, d);
    cyc = 1;
    while (busy) begin
      @(posedge clk);
      cyc++;
    end
  endtask

  // byte string <-> big-endian H words
  function automatic logic [255:0] to_words(input logic [255:0] b);
    logic [255:0] r;
    for (int k = 0; k < 8; k++)
      r[32*k +: 32] = {b[32*k +: 8], b[32*k+8 +: 8], b[32*k+16 +: 8], b[32*k+24 +: 8]};
    return r;
  endfunction

  function automatic logic [255:0] pattern(input int mul, input int add);
    logic [255:0] v;
    for (int i = 0; i < 32; i++) v[8*i +: 8] = 8'(mul * i + add);
    return v;
  endfunction

  function automatic logic [255:0] adrs_val(input logic [31:0] hashaddr, input logic [31:0] typ);
    logic [255:0] a;
    for (int i = 0; i < 32; i++) a[8*i +: 8] = 8'(8'h40 + i);
    for (int i = 0; i < 4; i++) begin
      a[8*(16+i) +: 8] = typ[8*(3-i) +: 8];
      a[8*(28+i) +: 8] = hashaddr[8*(3-i) +: 8];
    end
    return a;
  endfunction

  task automatic read_h(output logic [255:0] hb);
    logic [31:0]  d;
    logic [255:0] hw;
    for (int i = 0; i < 8; i++) begin
      bus_read(32'(4 * i), d);
      hw[32*i +: 32] = d;
    end
    hb = to_words(hw);  // the swap is its own inverse
  endtask

  logic [511:0] hv;
  logic [511:0] blk;
  logic [255:0] hb, ad;
  logic [31:0]  d;
  int cyc;

  initial begin
    req = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // ---- raw two-block hash
    load_words(32'h000, 512'(H256_INIT), 8);
    load_words(32'h020, B256_0, 16);
    bus_write(32'h3c0, 32'h1);
    bus_read(32'h3c0, d);
    check("busy flag", 512'(d), 512'd1);
    bus_write(32'h000, 32'hdeadbeef);
    while (busy) @(posedge clk);
    load_words(32'h020, B256_1, 16);
    run_cmd(32'h3c0, 32'h1, cyc);
    check("raw cycles", 512'(cyc), 512'd64);
    bus_read(32'h3c0, d);
    check("ready flag", 512'(d), 512'd0);
    hv = '0;
    for (int i = 0; i < 8; i++) begin
      bus_read(32'(4 * i), d);
      hv[32*i +: 32] = d;
    end
    check("digest", hv, 512'(D256));

    // ---- F chain, n = 16, hash address 2, s = 3
    load_words(32'h280, 512'(pattern(3, 32'h11)), 8);
    load_words(32'h2a0, 512'(pattern(5, 32'h23)), 8);
    load_words(32'h260, 512'(adrs_val(2, 0)), 8);
    load_words(32'h000, 512'(to_words(pattern(7, 32'h01))), 8);
    run_cmd(32'h3cc, 32'd3, cyc);
    check("chain cycles with mid-state", 512'(cyc), 512'(64 + 3 * 65));
    read_h(hb);
    check("chain16 X", 512'(hb[127:0]), 512'(SCHAIN16));
    for (int i = 0; i < 8; i++) begin
      bus_read(32'h260 + 32'(4 * i), d);
      ad[32*i +: 32] = d;
    end
    check("ADRS hash address", 512'(ad), 512'(adrs_val(5, 0)));
    bus_read(32'h2a0, d);
    check("SK.seed write-only", 512'(d), 512'h0);

    // ---- PRF + 2 F, n = 24 (mid-state rebuilt after SECN changes)
    bus_write(32'h3c8, 32'd24);
    load_words(32'h260, 512'(adrs_val(0, 5)), 8);
    run_cmd(32'h3cc, 32'h42, cyc);
    check("prf+chain cycles", 512'(cyc), 512'(64 + 3 * 65));
    read_h(hb);
    check("prf+chain24 X", 512'(hb[191:0]), 512'(SPRFCH24));
    load_words(32'h260, 512'(adrs_val(0, 5)), 8);
    run_cmd(32'h3cc, 32'h42, cyc);
    check("prf+chain cycles, mid-state kept", 512'(cyc), 512'(3 * 65));
    read_h(hb);
    check("prf+chain24 X again", 512'(hb[191:0]), 512'(SPRFCH24));

    // ---- 0x80 at n = 16, then ADRSc || M2 || padding as one raw block
    bus_write(32'h3c8, 32'd16);
    ad = adrs_val(9, 2);
    run_cmd(32'h3cc, 32'h80, cyc);
    blk = '0;
    blk[7:0] = ad[8*3 +: 8];
    for (int i = 0; i < 8; i++)  blk[8*(1+i) +: 8]  = ad[8*(8+i) +: 8];
    blk[8*9 +: 8] = ad[8*19 +: 8];
    for (int i = 0; i < 12; i++) blk[8*(10+i) +: 8] = ad[8*(20+i) +: 8];
    for (int i = 0; i < 32; i++) blk[8*(22+i) +: 8] = 8'(13 * i + 7);
    blk[8*54 +: 8] = 8'h80;
    blk[8*62 +: 8] = 8'h03;  // 118 bytes = 944 = 0x3b0 bits
    blk[8*63 +: 8] = 8'hb0;
    load_words(32'h020, {to_words(blk[511:256]), to_words(blk[255:0])}, 16);
    run_cmd(32'h3c0, 32'h1, cyc);
    read_h(hb);
    check("H via mid-state", 512'(hb), 512'(SH16));

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
