// tb_sha512_unit: self-checking test of the SHA-512 compression unit.
//
// Hashes the standard two-block test message through the bus: loads the
// initial hash value and block 0, starts, then block 1, and compares the
// chaining value read back with the SHA-512 digest computed independently.
// Also checks that a compression takes 80 cycles, that the busy flag reads
// back, and that a write during a compression is ignored.
module tb_sha512_unit;
  import sloth_pkg::*;

  localparam logic [511:0] B256_0 = 512'h00000000800000006e6f70716d6e6f706c6d6e6f6b6c6d6e6a6b6c6d696a6b6c68696a6b6768696a666768696566676864656667636465666263646561626364;
  localparam logic [511:0] B256_1 = 512'h000001c0000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000;
  localparam logic [511:0] H512_INIT = 512'h5be0cd19137e21791f83d9abfb41bd6b9b05688c2b3e6c1f510e527fade682d1a54ff53a5f1d36f13c6ef372fe94f82bbb67ae8584caa73b6a09e667f3bcc908;
  localparam logic [1023:0] B512_0 = 1024'h000000000000000080000000000000006e6f7071727374756d6e6f70717273746c6d6e6f707172736b6c6d6e6f7071726a6b6c6d6e6f7071696a6b6c6d6e6f7068696a6b6c6d6e6f6768696a6b6c6d6e666768696a6b6c6d65666768696a6b6c6465666768696a6b636465666768696a62636465666768696162636465666768;
  localparam logic [1023:0] B512_1 = 1024'h0000000000000380000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000;
  localparam logic [511:0] D512 = 512'h5e96e55b874be909c7d329eeb6dd2654331b99dec4b5433a501d289e4900f7e47299aeadb68890188f7779c6eb9f7fa18cf4f72814fc143f8e959b75dae313da;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  bus_req_t req;
  bus_rsp_t rsp;
  logic     busy;
  int checks = 0, failures = 0;

  sha512_unit dut (.clk, .rst_n, .req, .rsp, .busy_o(busy));

  task automatic bus_write(input logic [9:0] a, input logic [31:0] d);
    req <= '{valid: 1'b1, addr: {22'h0, a}, wdata: d, wstrb: 4'hf};
    do @(posedge clk); while (!rsp.ready);
    req <= '0;
    @(posedge clk);
  endtask

  task automatic bus_read(input logic [9:0] a, output logic [31:0] d);
    req <= '{valid: 1'b1, addr: {22'h0, a}, wdata: 32'h0, wstrb: 4'h0};
    do @(posedge clk); while (!rsp.ready);
    d = rsp.rdata;
    req <= '0;
    @(posedge clk);
  endtask

  task automatic check(input string what, input logic [511:0] got, input logic [511:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // registers are 32-bit words; the vectors hold 64-bit words, low half first
  task automatic load_words(input logic [9:0] base, input logic [1023:0] v, input int nwords);
    for (int i = 0; i < nwords; i++) bus_write(base + 10'(4 * i), v[32*i +: 32]);
  endtask

  task automatic compress(output int cyc);
    bus_write(10'h0c0, 32'h1);
    cyc = 1;
    while (busy) begin
      @(posedge clk);
      cyc++;
    end
  endtask

  logic [511:0] hv;
  logic [31:0]  d;
  int cyc;

  initial begin
    req = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    load_words(10'h000, 1024'(H512_INIT), 16);
    load_words(10'h040, 1024'(B512_0), 32);
    // start, then try to overwrite H0 while busy
    bus_write(10'h0c0, 32'h1);
    bus_read(10'h0c0, d);
    check("busy flag", 512'(d), 512'd1);
    bus_write(10'h000, 32'hdeadbeef);
    while (busy) @(posedge clk);
    load_words(10'h040, 1024'(B512_1), 32);
    compress(cyc);
    check("cycles", 512'(cyc), 512'd80);
    bus_read(10'h0c0, d);
    check("ready flag", 512'(d), 512'd0);
    hv = '0;
    for (int i = 0; i < 16; i++) begin
      bus_read(10'(4 * i), d);
      hv[32*i +: 32] = d;
    end
    check("digest lo", 512'(hv[255:0]), 512'(D512[255:0]));
    check("digest", hv, 512'(D512));

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
