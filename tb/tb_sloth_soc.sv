// tb_sloth_soc: end-to-end test of the SoC at its default parameters. The
// testbench stands in for the RV32 core and drives the system bus.
//
// The main operation is a complete WOTS+ public-key generation for n = 16
// (w = 16, len = 35), as SLH-DSA performs it inside every hypertree leaf:
//   - on the threshold Keccak unit, with SK.seed loaded as three random
//     shares, each of the 35 chains is one CHNS = 0x40 + 15 command
//     (PRF, then 15 Winternitz F steps); the recombined chain end is stored
//     in RAM;
//   - on the plain Keccak unit, the 35 chain ends are read back from RAM and
//     absorbed into T_len = SHAKE256(PK.seed || ADRS || ends): CHNS = 0x80
//     loads the prefix, the words are XORed into the state, full blocks are
//     permuted with CTRL, and the testbench adds the SHAKE padding.
// The result is compared with a public key computed independently. Around
// it, the test runs one WOTS+ chain of the SHA2 variant on the SHA-256 unit
// (PRF + 15 F, with the PK.seed mid-state), computes H with the 0x80 prefix, runs a 12-round permutation
// (STOP), hashes the two-block SHA-256 and SHA-512 test messages, writes to
// units while they are busy, sends a byte through the UART (looped back),
// uses GPIO and makes an unmapped access. Each of these mechanisms is
// counted inside the design and must have happened; the PRF and F counts
// and the hashing cycle count (24 cycles per hash) are checked exactly.
module tb_sloth_soc;
  import sloth_pkg::*;

  localparam logic [127:0] WOTS_CHAIN0 = 128'h4a4537f9873bb28f390cb1f2f7ae053f;
  localparam logic [127:0] WOTS_PK = 128'h358d7ec030ab17af9178749e258688b4;
  localparam logic [127:0] SHA2_CHAIN0 = 128'hc044de7ef9a0316cd847f0cbea9324c6;
  localparam logic [127:0] H_OUT = 128'h076420426a3a98814aa3221e21e8240b;
  localparam logic [1599:0] PERM24 = 1600'h38ad50bdf89b110946d9b6fe11ab6617f58265b0ee0c3a75c44070c1bd7a44ac67f47fcd1434ed7e64692a092bc47df3b862dfda9c1481cace1800491ce416d6f0c11c347af534ebc448cf9898a1a936571ed87b541cbbbbc4434a3c00565c858e7072fc68785c478e9c099d0b042b38a3a6b15cf9e4a79d8dc8eb44ac686caccc2d7ebef2328215a81c2fae72792b1e0519b9747f85c42c42f7734d5c5cb55bab2760e4571548e1d44593d9d4791cacce5506cb0b82e0777b90fc9a732c47adc572ca66a6dad4a0;
  localparam logic [1599:0] PERM12 = 1600'hd5bab10260e6fc5a9b4d046030127fa818a26278e976ada7d1eb24bacf2f77d758f6f4a35b7e9a39689bb3ff3150f23a88e176adf79a2a24548d748c1ab0f202b7e7696b52fa539f810d17da5b6aeb6ca79dc6cae5856f850eb248a0502b9be4152e63d2287318c9562f12d85f9e62e42740c4c32812ecdc06f5ab327e345b0076ff7f53119c5e8840893b71acce45cba0524b5cba6e48026ecda229a4fe148a465d62acfb35e94c559a1015eb1789ceb0c32430127d4e924277f7b2b70bda73c82416b8346fa987;
  localparam logic [255:0] H256_INIT = 256'h5be0cd191f83d9ab9b05688c510e527fa54ff53a3c6ef372bb67ae856a09e667;
  localparam logic [511:0] B256_0 = 512'h00000000800000006e6f70716d6e6f706c6d6e6f6b6c6d6e6a6b6c6d696a6b6c68696a6b6768696a666768696566676864656667636465666263646561626364;
  localparam logic [511:0] B256_1 = 512'h000001c0000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000;
  localparam logic [255:0] D256 = 256'h19db06c1f6ecedd464ff2167a33ce4590c3e6039e5c02693d20638b8248d6a61;
  localparam logic [511:0] H512_INIT = 512'h5be0cd19137e21791f83d9abfb41bd6b9b05688c2b3e6c1f510e527fade682d1a54ff53a5f1d36f13c6ef372fe94f82bbb67ae8584caa73b6a09e667f3bcc908;
  localparam logic [1023:0] B512_0 = 1024'h000000000000000080000000000000006e6f7071727374756d6e6f70717273746c6d6e6f707172736b6c6d6e6f7071726a6b6c6d6e6f7071696a6b6c6d6e6f7068696a6b6c6d6e6f6768696a6b6c6d6e666768696a6b6c6d65666768696a6b6c6465666768696a6b636465666768696a62636465666768696162636465666768;
  localparam logic [1023:0] B512_1 = 1024'h0000000000000380000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000;
  localparam logic [511:0] D512 = 512'h5e96e55b874be909c7d329eeb6dd2654331b99dec4b5433a501d289e4900f7e47299aeadb68890188f7779c6eb9f7fa18cf4f72814fc143f8e959b75dae313da;

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

  sloth_soc dut (
    .clk, .rst_n, .cpu_req(req), .cpu_rsp(rsp), .gpio_i, .gpio_o,
    .uart_rx_i(uart_line), .uart_tx_o(uart_line), .hash_busy_o(hash_busy),
    .unmapped_o(unmapped));

  `include "tb_bus_tasks.svh"

  localparam logic [31:0] KTI3 = 32'h1400_0000;
  localparam logic [31:0] KECC = 32'h1500_0000;
  localparam logic [31:0] S256 = 32'h1600_0000;
  localparam logic [31:0] S512 = 32'h1700_0000;
  localparam logic [31:0] UART = 32'h1100_0000;
  localparam logic [31:0] GPIO = 32'h1000_0000;
  localparam logic [31:0] TMP  = 32'h0000_1000;  // chain ends in RAM
  localparam int          N = 16, W = 16, LEN = 35, KP = 7;

  // ---------------------------------------------------------------- counters
  int n_prf = 0, n_f_ti3 = 0, n_f_plain = 0, n_raw = 0, n_reduced = 0, n_prefix = 0;
  int n_busy_write = 0, n_s256 = 0, n_s512 = 0, n_unmapped = 0, n_uart = 0;
  int ti3_busy_cycles = 0, n_s256_prf = 0, n_s256_f = 0, n_s256_mid = 0;
  logic [3:0] busy_q = '0;

  always @(posedge clk) if (rst_n) begin
    busy_q <= hash_busy;
    if (dut.g_kti3.u_kti3.fmt_now && hash_busy[0]) begin
      if (dut.g_kti3.u_kti3.hkind != 0) n_prf++;
      else                       n_f_ti3++;
    end
    if (dut.g_kecc.u_kecc.fmt_now && hash_busy[1]) n_f_plain++;
    if (hash_busy[0]) ti3_busy_cycles++;
    if (hash_busy[1] && !busy_q[1] && !dut.g_kecc.u_kecc.fmt_now) begin
      n_raw++;
      if (dut.g_kecc.u_kecc.stop != 5'd24) n_reduced++;
    end
    if (dut.g_s256.u_s256.fsm == 3'd1 && dut.g_s256.u_s256.t == 6'd0) n_s256++;
    if (dut.g_s256.u_s256.fsm == 3'd2 && dut.g_s256.u_s256.t == 6'd0) n_s256_mid++;
    if (dut.g_s256.u_s256.fsm == 3'd3) begin
      if (dut.g_s256.u_s256.hkind != 0) n_s256_prf++;
      else                       n_s256_f++;
    end
    if (hash_busy[3] && !busy_q[3]) n_s512++;
    if (unmapped) n_unmapped++;
    if (dut.s_req[SL_KECC].valid && !dut.s_rsp[SL_KECC].ready && dut.s_req[SL_KECC].wstrb != 0 &&
        dut.s_req[SL_KECC].addr[9:0] == 10'h3cc && dut.s_req[SL_KECC].wdata[7]) n_prefix++;
    for (int u = 0; u < 4; u++)
      if (dut.s_req[int'(SL_KTI3) + u].valid && !dut.s_rsp[int'(SL_KTI3) + u].ready &&
          dut.s_req[int'(SL_KTI3) + u].wstrb != 0 && hash_busy[u]) n_busy_write++;
    if (dut.u_uart.tx_bits == 4'd10 && dut.u_uart.tx_cnt == 16'd0) n_uart++;
  end

  task automatic check_count(input string what, input int cnt);
    checks++;
    if (cnt == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
    $display("  %-28s %0d", what, cnt);
  endtask

  // ---------------------------------------------------------------- helpers
  function automatic logic [255:0] adrs(input int typ, input int kp, input int ch, input int ha);
    logic [255:0] a;
    logic [95:0]  tree;
    tree = 96'h0123456789;
    a = '0;
    for (int i = 0; i < 4; i++) begin
      a[8*i +: 8]      = 8'(2 >> (8 * (3 - i)));
      a[8*(16+i) +: 8] = 8'(typ >> (8 * (3 - i)));
      a[8*(20+i) +: 8] = 8'(kp >> (8 * (3 - i)));
      a[8*(24+i) +: 8] = 8'(ch >> (8 * (3 - i)));
      a[8*(28+i) +: 8] = 8'(ha >> (8 * (3 - i)));
    end
    for (int i = 0; i < 12; i++) a[8*(4+i) +: 8] = tree[8*(11-i) +: 8];
    return a;
  endfunction

  function automatic logic [255:0] pattern(input int mul, input int add);
    logic [255:0] v;
    for (int i = 0; i < 32; i++) v[8*i +: 8] = 8'(mul * i + add);
    return v;
  endfunction

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

  task automatic wait_ready(input logic [31:0] base);
    logic [31:0] d;
    do bus_read(base + 32'h3c0, d); while (d[0]);
  endtask

  task automatic xor_word(input logic [31:0] a, input logic [31:0] x);
    logic [31:0] d;
    bus_read(a, d);
    bus_write(a, d ^ x);
  endtask

  logic [1599:0] v, va, vb, vc, st0;
  logic [255:0]  ra, rb;
  logic [31:0]   d;
  int            pos;

  initial begin
    req = '0;
    gpio_i = 32'h0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < 200; i++) st0[8*i +: 8] = 8'(11 * i + 8'h5a);

    // ---------------- GPIO, unmapped access
    bus_write(GPIO, 32'hCAFE_F00D);
    check32("gpio_o", gpio_o, 32'hCAFE_F00D);
    gpio_i = 32'h1357_9BDF;
    repeat (3) @(posedge clk);
    bus_read(GPIO + 4, d);
    check32("gpio_i", d, 32'h1357_9BDF);
    bus_read(32'h2000_0000, d);
    check32("unmapped read", d, 32'h0);

    // ---------------- WOTS+ chains on the threshold Keccak unit
    bus_write(KTI3 + 32'h3c8, N);
    write_words(KTI3 + 32'h280, 1600'(pattern(3, 8'h11)), 8);
    for (int i = 0; i < 8; i++) begin
      ra[32*i +: 32] = $urandom;
      rb[32*i +: 32] = $urandom;
    end
    write_words(KTI3 + 32'h2a0, 1600'(pattern(5, 32'h23) ^ ra ^ rb), 8);
    write_words(KTI3 + 32'h2c0, 1600'(ra), 8);
    write_words(KTI3 + 32'h2e0, 1600'(rb), 8);
    for (int i = 0; i < LEN; i++) begin
      write_words(KTI3 + 32'h260, 1600'(adrs(5, KP, i, 0)), 8);
      bus_write(KTI3 + 32'h3cc, 32'h40 + W - 1);
      if (i == 0) bus_write(KTI3 + 32'h000, 32'hFFFF_FFFF);  // ignored: unit busy
      wait_ready(KTI3);
      read_words(KTI3 + 32'h000, N / 4, va);
      read_words(KTI3 + 32'h0c8, N / 4, vb);
      read_words(KTI3 + 32'h190, N / 4, vc);
      v = va ^ vb ^ vc;
      if (i == 0) begin
        checks++;
        if (v[127:0] !== WOTS_CHAIN0) begin
          failures++;
          $display("FAIL chain 0: %h", v[127:0]);
        end
      end
      write_words(TMP + 32'(N * i), v, N / 4);
    end
    check32("PRF count", 32'(n_prf), 32'(LEN));
    check32("F count", 32'(n_f_ti3), 32'(LEN * (W - 1)));
    check32("hash cycles, 24 per hash", 32'(ti3_busy_cycles), 32'(LEN * W * 24));

    // ---------------- T_len on the plain Keccak unit, chain ends from RAM
    bus_write(KECC + 32'h3c8, N);
    write_words(KECC + 32'h280, 1600'(pattern(3, 8'h11)), 8);
    write_words(KECC + 32'h260, 1600'(adrs(1, KP, 0, 0)), 8);
    bus_write(KECC + 32'h3cc, 32'h80);
    pos = N + 32;
    for (int i = 0; i < LEN * N / 4; i++) begin
      bus_read(TMP + 32'(4 * i), d);
      xor_word(KECC + 32'(pos), d);
      pos += 4;
      if (pos == 136) begin
        bus_write(KECC + 32'h3c0, 32'h1);
        wait_ready(KECC);
        pos = 0;
      end
    end
    xor_word(KECC + 32'(pos), 32'h0000_001F);
    xor_word(KECC + 32'd132, 32'h8000_0000);
    bus_write(KECC + 32'h3c0, 32'h1);
    wait_ready(KECC);
    read_words(KECC, N / 4, v);
    checks++;
    if (v[127:0] !== WOTS_PK) begin
      failures++;
      $display("FAIL WOTS+ public key: %h expected %h", v[127:0], WOTS_PK);
    end

    // ---------------- H(PK.seed, ADRS, M2) with the 0x80 prefix
    write_words(KECC + 32'h260, 1600'(adrs(2, 0, 0, 0)), 8);
    bus_write(KECC + 32'h3cc, 32'h80);
    write_words(KECC + 32'(N + 32), 1600'(pattern(13, 8'h07)), 2 * N / 4);
    xor_word(KECC + 32'(3 * N + 32), 32'h0000_001F);
    xor_word(KECC + 32'd132, 32'h8000_0000);
    bus_write(KECC + 32'h3c0, 32'h1);
    wait_ready(KECC);
    read_words(KECC, N / 4, v);
    checks++;
    if (v[127:0] !== H_OUT) begin
      failures++;
      $display("FAIL H: %h expected %h", v[127:0], H_OUT);
    end

    // ---------------- raw permutations: 12 rounds, then 24 with a busy write
    write_words(KECC, st0, 50);
    bus_write(KECC + 32'h3c4, 32'd12);
    bus_write(KECC + 32'h3c0, 32'h1);
    wait_ready(KECC);
    read_words(KECC, 50, v);
    checks++;
    if (v !== PERM12) begin failures++; $display("FAIL 12-round permutation"); end
    bus_write(KECC + 32'h3c4, 32'd24);
    write_words(KECC, st0, 50);
    bus_write(KECC + 32'h3c0, 32'h1);
    bus_write(KECC + 32'h004, 32'h0);  // ignored: unit busy
    wait_ready(KECC);
    read_words(KECC, 50, v);
    checks++;
    if (v !== PERM24) begin failures++; $display("FAIL 24-round permutation"); end

    // ---------------- SHA-256 and SHA-512, two blocks each
    write_words(S256, 1600'(H256_INIT), 8);
    write_words(S256 + 32'h20, 1600'(B256_0), 16);
    bus_write(S256 + 32'h3c0, 32'h1);
    bus_write(S256 + 32'h00, 32'h0);  // ignored: unit busy
    do bus_read(S256 + 32'h3c0, d); while (d[0]);
    write_words(S256 + 32'h20, 1600'(B256_1), 16);
    bus_write(S256 + 32'h3c0, 32'h1);
    do bus_read(S256 + 32'h3c0, d); while (d[0]);
    read_words(S256, 8, v);
    checks++;
    if (v[255:0] !== D256) begin failures++; $display("FAIL SHA-256 %h", v[255:0]); end

    write_words(S512, 1600'(H512_INIT), 16);
    write_words(S512 + 32'h40, 1600'(B512_0), 32);
    bus_write(S512 + 32'hc0, 32'h1);
    do bus_read(S512 + 32'hc0, d); while (d[0]);
    write_words(S512 + 32'h40, 1600'(B512_1), 32);
    bus_write(S512 + 32'hc0, 32'h1);
    do bus_read(S512 + 32'hc0, d); while (d[0]);
    read_words(S512, 16, v);
    checks++;
    if (v[511:0] !== D512) begin failures++; $display("FAIL SHA-512 %h", v[511:0]); end

    // ---------------- one WOTS+ chain of SLH-DSA-SHA2-128 on the SHA-256 unit
    write_words(S256 + 32'h280, 1600'(pattern(3, 32'h11)), 8);
    write_words(S256 + 32'h2a0, 1600'(pattern(5, 32'h23)), 8);
    write_words(S256 + 32'h260, 1600'(adrs(5, KP, 0, 0)), 8);
    bus_write(S256 + 32'h3cc, 32'h40 + W - 1);
    do bus_read(S256 + 32'h3c0, d); while (d[0]);
    read_words(S256, N / 4, v);
    for (int k = 0; k < N / 4; k++) v[32*k +: 32] = {<<8{v[32*k +: 32]}};
    checks++;
    if (v[127:0] !== SHA2_CHAIN0) begin failures++; $display("FAIL SHA2 chain %h", v[127:0]); end
    check32("SHA2 PRF count", 32'(n_s256_prf), 32'd1);
    check32("SHA2 F count", 32'(n_s256_f), 32'(W - 1));

    // ---------------- UART loopback
    bus_write(UART, 32'h53);
    do bus_read(UART + 4, d); while (!d[1]);
    bus_read(UART, d);
    check32("uart loopback", d, 32'h53);

    // ---------------- every mechanism happened
    $display("mechanism counts:");
    check_count("PRF (masked, TI3)", n_prf);
    check_count("chain F (TI3)", n_f_ti3);
    check_count("raw permutation", n_raw);
    check_count("reduced-round permutation", n_reduced);
    check_count("0x80 prefix load", n_prefix);
    check_count("write ignored while busy", n_busy_write);
    check_count("SHA-256 raw compression", n_s256);
    check_count("SHA-256 PK.seed mid-state", n_s256_mid);
    check_count("SHA-256 PRF", n_s256_prf);
    check_count("SHA-256 chain F", n_s256_f);
    check_count("SHA-512 compression", n_s512);
    check_count("unmapped access", n_unmapped);
    check_count("UART byte sent", n_uart);
    check32("no F on the plain unit in this flow", 32'(n_f_plain), 32'd0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
