// tb_sloth_wots: the hash work of SLH-DSA at all three security levels of
// the twelve parameter sets, n = 16, 24 and 32 bytes (w = 16 throughout),
// on the SoC at its default parameters. The testbench drives the system bus
// in place of the RV32 core. For each n it runs
//   - SHAKE sets: one WOTS+ chain (PRF, then 15 F steps, CHNS = 0x40 + 15)
//     on the threshold Keccak unit with SK.seed in three random shares, the
//     same chain on the plain Keccak unit with an unshared key, and
//     H(PK.seed, ADRS, M2) on the plain unit with the 0x80 prefix load;
//   - SHA2 sets: the same chain on the SHA-256 unit (F and PRF use SHA-256 at
//     every n) and, for n = 24 and 32, H computed by software formatting on
//     the SHA-512 unit: PK.seed padded to a 128-byte block, then ADRSc || M2
//     with the SHA-512 padding, two raw compressions.
// It then splits each chain as WOTS+ signing and verification do: signing
// stops after a steps (CHNS = 0x40 + a, a = 0 gives the PRF alone), and
// verification loads that value as X, sets the hash address to a and runs
// the remaining 15 - a steps (CHNS = 15 - a); on the Keccak units the two
// halves run on different units, on the SHA-256 unit on the same one. The
// end must equal the full chain.
// Results are compared with values computed independently, and the busy
// cycles are checked: 24 per Keccak hash, 65 per formatted SHA-256 hash plus
// 64 for the PK.seed mid-state after SECN changes, 80 per SHA-512
// compression.
module tb_sloth_wots;
  import sloth_pkg::*;

  localparam logic [255:0] SHAKE_CHAIN [3] = '{256'h00000000000000000000000000000000bf531ed45820a970125f79c1c2972324, 256'h0000000000000000c68f6e129312237d956422fbc2fe6a4c658dca8e896a5a3d, 256'h0bdf442e2391622deda33318d305fa0e7a6659b87dbadf6a40374857a04057cd};
  localparam logic [255:0] SHAKE_H [3] = '{256'h00000000000000000000000000000000076420426a3a98814aa3221e21e8240b, 256'h0000000000000000a4e9387e1ef5519b79419ebcaa5b1ebeedf05dff72392184, 256'h8873bcebb03e0be7193fceeb669748c50ca4c71667237a1a5591be8634c7a288};
  localparam logic [255:0] SHA2_CHAIN [3] = '{256'h00000000000000000000000000000000faacfec8ac525bc84b0dbf22eb5cbf4d, 256'h0000000000000000c75e2de6c5bb16259cb7b33b089a1f4e1dfa9db0b9e9b6ff, 256'hddcb2e9e4ac4449793da6c42e0c6b06f62d6a05a770d61ae9b0dc567a8636785};
  localparam logic [255:0] SHA512_H [3] = '{256'h000000000000000000000000000000009144fc7a490d0bb0a036fdb5099d87dc, 256'h000000000000000048548b1b9e39cba0bf74599fd311104d826098f36e0b81a1, 256'h8ac8b13c56b15b5afae9c0126bf236eb0c4707d24e157b5f027d4d633c4693a2};

  localparam logic [511:0] H512_INIT = 512'h5be0cd19137e21791f83d9abfb41bd6b9b05688c2b3e6c1f510e527fade682d1a54ff53a5f1d36f13c6ef372fe94f82bbb67ae8584caa73b6a09e667f3bcc908;
  localparam logic [31:0] KTI3 = 32'h1400_0000;
  localparam logic [31:0] KECC = 32'h1500_0000;
  localparam logic [31:0] S256 = 32'h1600_0000;
  localparam logic [31:0] S512 = 32'h1700_0000;
  localparam int          W = 16, KP = 7, CH = 3;

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
  int busy_cyc [4] = '{0, 0, 0, 0};
  int n_unmapped = 0;

  sloth_soc dut (
    .clk, .rst_n, .cpu_req(req), .cpu_rsp(rsp), .gpio_i, .gpio_o,
    .uart_rx_i(uart_line), .uart_tx_o(uart_line), .hash_busy_o(hash_busy),
    .unmapped_o(unmapped));

  `include "tb_bus_tasks.svh"

  always @(posedge clk) if (rst_n) begin
    for (int u = 0; u < 4; u++) if (hash_busy[u]) busy_cyc[u]++;
    if (unmapped) n_unmapped++;
  end

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

  // bytes mul*i + add, byte 0 in bits 7:0
  function automatic logic [511:0] pattern(input int mul, input int add);
    logic [511:0] v;
    for (int i = 0; i < 64; i++) v[8*i +: 8] = 8'(mul * i + add);
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

  task automatic wait_ready(input logic [31:0] base, input logic [9:0] ctrl);
    logic [31:0] d;
    do bus_read(base + 32'(ctrl), d); while (d[0]);
  endtask

  task automatic xor_word(input logic [31:0] a, input logic [31:0] x);
    logic [31:0] d;
    bus_read(a, d);
    bus_write(a, d ^ x);
  endtask

  // compare the first n bytes of a result with the expected value
  task automatic check_n(input string what, input int n, input logic [255:0] got,
                         input logic [255:0] exp);
    logic [255:0] mask;
    mask = '0;
    for (int i = 0; i < 8 * n; i++) mask[i] = 1'b1;
    checks++;
    if ((got & mask) !== exp) begin
      failures++;
      $display("FAIL %s n=%0d: got %h expected %h", what, n, got & mask, exp);
    end
  endtask

  task automatic check_int(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  logic [1599:0] v, va, vb, vc;
  logic [255:0]  ra, rb, seed, sk;
  logic [1023:0] blk;
  logic [7:0]    bytes [256];
  int            c0, nb, n;

  initial begin
    req    = '0;
    gpio_i = 32'h0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    seed = pattern(3, 8'h11);
    sk   = pattern(5, 8'h23);

    for (int k = 0; k < 3; k++) begin
      n = 16 + 8 * k;
      $display("n = %0d", n);

      // ---------------- SHAKE: masked chain on the threshold unit
      bus_write(KTI3 + 32'h3c8, n);
      write_words(KTI3 + 32'h280, 1600'(seed), 8);
      for (int i = 0; i < 8; i++) begin
        ra[32*i +: 32] = $urandom;
        rb[32*i +: 32] = $urandom;
      end
      write_words(KTI3 + 32'h2a0, 1600'(sk ^ ra ^ rb), 8);
      write_words(KTI3 + 32'h2c0, 1600'(ra), 8);
      write_words(KTI3 + 32'h2e0, 1600'(rb), 8);
      write_words(KTI3 + 32'h260, 1600'(adrs(5, KP, CH, 0)), 8);
      c0 = busy_cyc[0];
      bus_write(KTI3 + 32'h3cc, 32'h40 + W - 1);
      wait_ready(KTI3, 10'h3c0);
      check_int("TI3 chain cycles", busy_cyc[0] - c0, W * 24);
      read_words(KTI3 + 32'h000, 8, va);
      read_words(KTI3 + 32'h0c8, 8, vb);
      read_words(KTI3 + 32'h190, 8, vc);
      v = va ^ vb ^ vc;
      check_n("SHAKE chain, three shares", n, v[255:0], SHAKE_CHAIN[k]);

      // ---------------- SHAKE: the same chain on the plain unit
      bus_write(KECC + 32'h3c8, n);
      write_words(KECC + 32'h280, 1600'(seed), 8);
      write_words(KECC + 32'h2a0, 1600'(sk), 8);
      write_words(KECC + 32'h260, 1600'(adrs(5, KP, CH, 0)), 8);
      c0 = busy_cyc[1];
      bus_write(KECC + 32'h3cc, 32'h40 + W - 1);
      wait_ready(KECC, 10'h3c0);
      check_int("plain chain cycles", busy_cyc[1] - c0, W * 24);
      read_words(KECC, 8, v);
      check_n("SHAKE chain, plain", n, v[255:0], SHAKE_CHAIN[k]);

      // ---------------- SHAKE: H with the 0x80 prefix, M2 = 2n bytes
      write_words(KECC + 32'h260, 1600'(adrs(2, 0, 0, 0)), 8);
      bus_write(KECC + 32'h3cc, 32'h80);
      write_words(KECC + 32'(n + 32), 1600'(pattern(13, 8'h07)), 2 * n / 4);
      xor_word(KECC + 32'(3 * n + 32), 32'h0000_001F);
      xor_word(KECC + 32'd132, 32'h8000_0000);
      bus_write(KECC + 32'h3c0, 32'h1);
      wait_ready(KECC, 10'h3c0);
      read_words(KECC, 8, v);
      check_n("SHAKE H", n, v[255:0], SHAKE_H[k]);

      // ---------------- SHA2: chain on the SHA-256 unit
      bus_write(S256 + 32'h3c8, n);
      write_words(S256 + 32'h280, 1600'(seed), 8);
      write_words(S256 + 32'h2a0, 1600'(sk), 8);
      write_words(S256 + 32'h260, 1600'(adrs(5, KP, CH, 0)), 8);
      c0 = busy_cyc[2];
      bus_write(S256 + 32'h3cc, 32'h40 + W - 1);
      wait_ready(S256, 10'h3c0);
      check_int("SHA-256 chain cycles with mid-state", busy_cyc[2] - c0, 64 + W * 65);
      read_words(S256, 8, v);
      for (int i = 0; i < 8; i++) v[32*i +: 32] = {<<8{v[32*i +: 32]}};
      check_n("SHA2 chain", n, v[255:0], SHA2_CHAIN[k]);

      // ---------------- split chains: sign on one side, verify on the other
      for (int a = 0; a < 15; a += 6) begin
        // SHAKE: sign (PRF + a steps) on the threshold unit
        write_words(KTI3 + 32'h260, 1600'(adrs(5, KP, CH, 0)), 8);
        bus_write(KTI3 + 32'h3cc, 32'h40 + a);
        wait_ready(KTI3, 10'h3c0);
        read_words(KTI3 + 32'h000, 8, va);
        read_words(KTI3 + 32'h0c8, 8, vb);
        read_words(KTI3 + 32'h190, 8, vc);
        v = va ^ vb ^ vc;
        // verify: continue from X at hash address a on the plain unit
        write_words(KECC + 32'h260, 1600'(adrs(0, KP, CH, a)), 8);
        write_words(KECC, v, n / 4);
        bus_write(KECC + 32'h3cc, 15 - a);
        wait_ready(KECC, 10'h3c0);
        read_words(KECC, 8, v);
        check_n($sformatf("SHAKE chain split at %0d", a), n, v[255:0], SHAKE_CHAIN[k]);
        // SHA2: sign, then write the signature value back as X and verify
        write_words(S256 + 32'h260, 1600'(adrs(5, KP, CH, 0)), 8);
        bus_write(S256 + 32'h3cc, 32'h40 + a);
        wait_ready(S256, 10'h3c0);
        read_words(S256, 8, v);
        bus_write(S256 + 32'h3cc, 32'h80);       // clobber H with the mid-state
        wait_ready(S256, 10'h3c0);
        write_words(S256 + 32'h260, 1600'(adrs(0, KP, CH, a)), 8);
        write_words(S256, v, n / 4);
        bus_write(S256 + 32'h3cc, 15 - a);
        wait_ready(S256, 10'h3c0);
        read_words(S256, 8, v);
        for (int i = 0; i < 8; i++) v[32*i +: 32] = {<<8{v[32*i +: 32]}};
        check_n($sformatf("SHA2 chain split at %0d", a), n, v[255:0], SHA2_CHAIN[k]);
      end

      // ---------------- SHA2, n >= 24: H on the SHA-512 unit
      if (n >= 24) begin
        for (int i = 0; i < 256; i++) bytes[i] = 8'h0;
        for (int i = 0; i < n; i++) bytes[i] = seed[8*i +: 8];
        ra = adrs(2, 0, 0, 0);
        bytes[128] = ra[8*3 +: 8];
        for (int i = 0; i < 8; i++)  bytes[129 + i] = ra[8*(8+i) +: 8];
        bytes[137] = ra[8*19 +: 8];
        for (int i = 0; i < 12; i++) bytes[138 + i] = ra[8*(20+i) +: 8];
        va = 1600'(pattern(13, 8'h07));
        for (int i = 0; i < 2 * n; i++) bytes[150 + i] = va[8*i +: 8];
        nb = 150 + 2 * n;
        bytes[nb] = 8'h80;
        bytes[254] = 8'((8 * nb) >> 8);
        bytes[255] = 8'(8 * nb);
        write_words(S512, 1600'(H512_INIT), 16);
        c0 = busy_cyc[3];
        for (int b = 0; b < 2; b++) begin
          for (int i = 0; i < 128; i++) blk[64*(i/8) + 8*(7 - i%8) +: 8] = bytes[128*b + i];
          write_words(S512 + 32'h40, 1600'(blk), 32);
          bus_write(S512 + 32'hc0, 32'h1);
          wait_ready(S512, 10'h0c0);
        end
        check_int("SHA-512 cycles, two blocks", busy_cyc[3] - c0, 2 * 80);
        read_words(S512, 8, v);
        for (int i = 0; i < 32; i++) ra[8*i +: 8] = v[64*(i/8) + 8*(7 - i%8) +: 8];
        check_n("SHA2 H on SHA-512", n, ra, SHA512_H[k]);
      end
    end

    check_int("unmapped accesses", n_unmapped, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
