// tb_sloth_soc_cfg: the SoC built in a reduced configuration, plain Keccak
// and SHA-256 only (threshold Keccak and SHA-512 left out), one of the
// smaller builds the hash units can be combined into. The testbench drives
// the system bus in place of the RV32 core and checks that
//   - the remaining units work: a 24-round Keccak-f[1600] permutation on the
//     plain Keccak unit and a two-block SHA-256 compression, both compared
//     with precomputed results;
//   - the slots of the missing units still answer in one cycle: CTRL reads
//     0 (ready), written registers read back 0, starting them does nothing
//     (their busy flags stay low) and the accesses are not reported as
//     unmapped.
module tb_sloth_soc_cfg;
  import sloth_pkg::*;

  localparam logic [1599:0] PERM24 = 1600'h38ad50bdf89b110946d9b6fe11ab6617f58265b0ee0c3a75c44070c1bd7a44ac67f47fcd1434ed7e64692a092bc47df3b862dfda9c1481cace1800491ce416d6f0c11c347af534ebc448cf9898a1a936571ed87b541cbbbbc4434a3c00565c858e7072fc68785c478e9c099d0b042b38a3a6b15cf9e4a79d8dc8eb44ac686caccc2d7ebef2328215a81c2fae72792b1e0519b9747f85c42c42f7734d5c5cb55bab2760e4571548e1d44593d9d4791cacce5506cb0b82e0777b90fc9a732c47adc572ca66a6dad4a0;
  localparam logic [255:0] H256_INIT = 256'h5be0cd191f83d9ab9b05688c510e527fa54ff53a3c6ef372bb67ae856a09e667;
  localparam logic [511:0] B256_0 = 512'h00000000800000006e6f70716d6e6f706c6d6e6f6b6c6d6e6a6b6c6d696a6b6c68696a6b6768696a666768696566676864656667636465666263646561626364;
  localparam logic [511:0] B256_1 = 512'h000001c0000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000;
  localparam logic [255:0] D256 = 256'h19db06c1f6ecedd464ff2167a33ce4590c3e6039e5c02693d20638b8248d6a61;

  localparam logic [31:0] KTI3 = 32'h1400_0000;
  localparam logic [31:0] KECC = 32'h1500_0000;
  localparam logic [31:0] S256 = 32'h1600_0000;
  localparam logic [31:0] S512 = 32'h1700_0000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  bus_req_t    req;
  bus_rsp_t    rsp;
  logic [31:0] gpio_i, gpio_o;
  logic        uart_line;
  logic [3:0]  hash_busy;
  logic        unmapped;
  int checks = 0, failures = 0;
  int n_busy_missing = 0, n_unmapped = 0;

  sloth_soc #(.EN_KTI3(1'b0), .EN_S512(1'b0)) dut (
    .clk, .rst_n, .cpu_req(req), .cpu_rsp(rsp), .gpio_i, .gpio_o,
    .uart_rx_i(uart_line), .uart_tx_o(uart_line), .hash_busy_o(hash_busy),
    .unmapped_o(unmapped));

  `include "tb_bus_tasks.svh"

  always_ff @(posedge clk) begin
    if (rst_n) begin
      if (hash_busy[0] || hash_busy[3]) n_busy_missing++;
      if (unmapped) n_unmapped++;
    end
  end

  task automatic write_words(input logic [31:0] base, input logic [1599:0] v, input int nwords);
    for (int i = 0; i < nwords; i++) bus_write(base + 32'(4 * i), v[32*i +: 32]);
  endtask

  task automatic read_words(input logic [31:0] base, input int nwords, output logic [1599:0] v);
    logic [31:0] d;
    v = '0;
    for (int i = 0; i < nwords; i++) begin
      bus_read(base + 32'(4 * i), d);
      v[32*i +: 32] = d;
    end
  endtask

  logic [1599:0] v, st0;
  logic [31:0]   d;
  int            t0, lat;

  initial begin
    req       = '0;
    gpio_i    = '0;
    for (int i = 0; i < 200; i++) st0[8*i +: 8] = 8'(11 * i + 8'h5a);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);

    // ---------------- the units that are built
    write_words(KECC, st0, 50);
    bus_write(KECC + 32'h3c0, 32'h1);
    do bus_read(KECC + 32'h3c0, d); while (d[0]);
    read_words(KECC, 50, v);
    checks++;
    if (v !== PERM24) begin failures++; $display("FAIL 24-round permutation"); end

    write_words(S256, 1600'(H256_INIT), 8);
    write_words(S256 + 32'h20, 1600'(B256_0), 16);
    bus_write(S256 + 32'h3c0, 32'h1);
    do bus_read(S256 + 32'h3c0, d); while (d[0]);
    write_words(S256 + 32'h20, 1600'(B256_1), 16);
    bus_write(S256 + 32'h3c0, 32'h1);
    do bus_read(S256 + 32'h3c0, d); while (d[0]);
    read_words(S256, 8, v);
    checks++;
    if (v[255:0] !== D256) begin failures++; $display("FAIL SHA-256 %h", v[255:0]); end

    // ---------------- the slots of the units that are left out
    write_words(KTI3, st0, 4);
    bus_write(KTI3 + 32'h3c0, 32'h1);
    bus_write(KTI3 + 32'h3cc, 32'h4f);
    bus_read(KTI3 + 32'h3c0, d);
    check32("KTI3 slot CTRL", d, 32'h0);
    bus_read(KTI3 + 32'h004, d);
    check32("KTI3 slot MEMA[1]", d, 32'h0);
    bus_write(S512, 32'hdead_beef);
    bus_write(S512 + 32'hc0, 32'h1);
    bus_read(S512 + 32'hc0, d);
    check32("SHA-512 slot CTRL", d, 32'h0);
    bus_read(S512, d);
    check32("SHA-512 slot H[0]", d, 32'h0);

    // one-cycle answer from a missing slot: the request is raised after an
    // edge, sampled by the slot at the next one and answered at the one
    // after, so the testbench counts two edges
    @(posedge clk);
    req <= '{valid: 1'b1, addr: S512 + 32'h8, wdata: 32'h0, wstrb: 4'h0};
    t0 = 0;
    do begin @(posedge clk); t0++; end while (!rsp.ready);
    req <= '0;
    @(posedge clk);
    lat = t0;
    checks++;
    if (lat != 2) begin failures++; $display("FAIL missing-slot latency %0d", lat); end

    repeat (40) @(posedge clk);
    checks++;
    if (n_busy_missing != 0) begin failures++; $display("FAIL missing unit reported busy"); end
    checks++;
    if (n_unmapped != 0) begin failures++; $display("FAIL missing slot reported unmapped"); end
    // every unit is idle at the end
    checks++;
    if (hash_busy !== 4'b0000) begin failures++; $display("FAIL busy %b", hash_busy); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
