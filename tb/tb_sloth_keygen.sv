// tb_sloth_keygen: complete SLH-DSA key generation on the SoC at its default
// parameters, for the fast parameter sets of both hash families
// (SHAKE-128f/192f/256f, SHA2-128f/192f/256f) and the small SHAKE sets
// (SHAKE-128s/192s/256s). The testbench plays the firmware of the RV32 core
// and drives the system bus. Key generation computes PK.root, the root of
// the XMSS tree of the top hypertree layer (layer d-1, tree 0), from SK.seed
// and PK.seed:
//   - for every leaf i (2^hp of them), WOTS+ public-key generation: len
//     chains, each a single CHNS = 0x40 + 15 command (PRF, then 15 F steps),
//     then T_len over the len chain ends, which wait in RAM;
//   - the tree is folded bottom-up with a node stack (treehash): two nodes of
//     the same height are combined with H, with the tree height and index in
//     ADRS.
// SHAKE sets: the chains run on the threshold Keccak unit with SK.seed held
// as three random shares; T_len and H run on the plain Keccak unit
// (CHNS = 0x80 loads PK.seed || ADRS, the testbench XORs the message words
// in and adds the SHAKE padding).
// SHA2 sets: the chains run on the SHA-256 unit. For n = 16, T_len and H
// start from the PK.seed mid-state (CHNS = 0x80) and the testbench feeds the
// padded rest, ADRSc || message, as raw SHA-256 compressions; for n = 24 and
// 32 they are SHA-512 hashes of PK.seed || toByte(0, 128-n) || ADRSc ||
// message, fed block by block to the SHA-512 unit.
// PK.root is compared with a value computed independently. The testbench
// also checks the exact PRF count, for the SHAKE sets the threshold unit's
// busy cycles (24 per hash), and prints the total cycle count of each key
// generation.
module tb_sloth_keygen;
  import sloth_pkg::*;

  // PK.root for SK.seed = bytes 5i+0x23, PK.seed = bytes 3i+0x11 (first n)
  localparam int NSETS = 9;
  localparam logic [255:0] PK_ROOT [NSETS] = '{
    256'h0000000000000000000000000000000001ea64c0f9be933312d318bc704b9751,
    256'h000000000000000051111e501e641a98bc8990ce88734d24fb6d7eec0feec497,
    256'hd589ce8042da2d052f986f825fe5242af4d16098e1f3692c24b63bc233ac1fe4,
    256'h00000000000000000000000000000000d751b9585ebea58d19f8e25ce01cb007,
    256'h000000000000000057ed48e212b133c034ead1715bd2eab7eead21ea7e56ed49,
    256'h0796a0007e04515ddc36a12713a2da6d52b3f20708459c09d149defd99efadc5,
    256'h000000000000000000000000000000003a2ccb6da194b317fa88272c7395375c,
    256'h000000000000000008f38001cdc345e1556c1d40172c1ecdf21457f5efa4f2f6,
    256'h4a0cac42eeba908fba3617382cd2a8e48ed789eeb291622a18a91e80e361074b};
  localparam bit SET_SHA2 [NSETS] = '{0, 0, 0, 1, 1, 1, 0, 0, 0};
  localparam int SET_N    [NSETS] = '{16, 24, 32, 16, 24, 32, 16, 24, 32};
  localparam int SET_HP   [NSETS] = '{3, 3, 4, 3, 3, 4, 9, 9, 8};
  localparam int SET_D    [NSETS] = '{22, 22, 17, 22, 22, 17, 7, 7, 8};
  localparam logic [511:0] H512_INIT = 512'h5be0cd19137e21791f83d9abfb41bd6b9b05688c2b3e6c1f510e527fade682d1a54ff53a5f1d36f13c6ef372fe94f82bbb67ae8584caa73b6a09e667f3bcc908;

  localparam logic [31:0] KTI3 = 32'h1400_0000;
  localparam logic [31:0] KECC = 32'h1500_0000;
  localparam logic [31:0] S256 = 32'h1600_0000;
  localparam logic [31:0] S512 = 32'h1700_0000;
  localparam logic [31:0] TMP  = 32'h0000_2000;  // chain ends in RAM
  localparam int          W = 16;

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
  int cycle = 0, ti3_busy = 0, n_prf = 0, n_unmapped = 0;

  sloth_soc dut (
    .clk, .rst_n, .cpu_req(req), .cpu_rsp(rsp), .gpio_i, .gpio_o,
    .uart_rx_i(uart_line), .uart_tx_o(uart_line), .hash_busy_o(hash_busy),
    .unmapped_o(unmapped));

  `include "tb_bus_tasks.svh"

  always @(posedge clk) if (rst_n) begin
    cycle++;
    if (hash_busy[0]) ti3_busy++;
    if (dut.g_kti3.u_kti3.fmt_now && hash_busy[0] && dut.g_kti3.u_kti3.hkind != 0) n_prf++;
    if (dut.g_s256.u_s256.fsm == 3'd3 && dut.g_s256.u_s256.hkind != 0) n_prf++;
    if (unmapped) n_unmapped++;
  end

  // ---------------------------------------------------------------- helpers
  // ADRS with all fields big-endian: layer, tree (low 32 bits), type,
  // keypair, chain / tree height, hash / tree index
  function automatic logic [255:0] adrs(input int layer, input int typ, input int kp,
                                        input int ch, input int ha);
    logic [255:0] a;
    a = '0;
    for (int i = 0; i < 4; i++) begin
      a[8*i +: 8]      = 8'(layer >> (8 * (3 - i)));
      a[8*(16+i) +: 8] = 8'(typ >> (8 * (3 - i)));
      a[8*(20+i) +: 8] = 8'(kp >> (8 * (3 - i)));
      a[8*(24+i) +: 8] = 8'(ch >> (8 * (3 - i)));
      a[8*(28+i) +: 8] = 8'(ha >> (8 * (3 - i)));
    end
    return a;
  endfunction

  function automatic logic [255:0] pattern(input int mul, input int add);
    logic [255:0] v;
    for (int i = 0; i < 32; i++) v[8*i +: 8] = 8'(mul * i + add);
    return v;
  endfunction

  task automatic write_words(input logic [31:0] base, input logic [255:0] v, input int nwords);
    for (int i = 0; i < nwords; i++) bus_write(base + 32'(4 * i), v[32*i +: 32]);
  endtask

  task automatic read_words(input logic [31:0] base, input int nwords, output logic [255:0] v);
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

  // SHAKE padding after the message ends at byte offset pos, then permute
  task automatic pad_and_finish(input int pos);
    xor_word(KECC + 32'(pos), 32'h0000_001F);
    xor_word(KECC + 32'd132, 32'h8000_0000);
    bus_write(KECC + 32'h3c0, 32'h1);
    wait_ready(KECC);
  endtask

  // WOTS+ public key of leaf i of the layer
  task automatic wots_leaf(input int n, input int layer, input int i, output logic [255:0] pk);
    logic [255:0] va, vb, vc;
    logic [31:0]  d;
    int           len, pos;
    len = 2 * n + 3;
    for (int c = 0; c < len; c++) begin
      write_words(KTI3 + 32'h260, adrs(layer, 5, i, c, 0), 8);
      bus_write(KTI3 + 32'h3cc, 32'h40 + W - 1);
      wait_ready(KTI3);
      read_words(KTI3 + 32'h000, n / 4, va);
      read_words(KTI3 + 32'h0c8, n / 4, vb);
      read_words(KTI3 + 32'h190, n / 4, vc);
      write_words(TMP + 32'(n * c), va ^ vb ^ vc, n / 4);
    end
    write_words(KECC + 32'h260, adrs(layer, 1, i, 0, 0), 8);
    bus_write(KECC + 32'h3cc, 32'h80);
    pos = n + 32;
    for (int k = 0; k < len * n / 4; k++) begin
      bus_read(TMP + 32'(4 * k), d);
      xor_word(KECC + 32'(pos), d);
      pos += 4;
      if (pos == 136) begin
        bus_write(KECC + 32'h3c0, 32'h1);
        wait_ready(KECC);
        pos = 0;
      end
    end
    pad_and_finish(pos);
    read_words(KECC, n / 4, pk);
  endtask

  // H(PK.seed, ADRS(TREE, height z, index i), l || r)
  task automatic tree_hash(input int n, input int layer, input int z, input int i,
                           input logic [255:0] l, input logic [255:0] r,
                           output logic [255:0] node);
    write_words(KECC + 32'h260, adrs(layer, 2, 0, z, i), 8);
    bus_write(KECC + 32'h3cc, 32'h80);
    write_words(KECC + 32'(n + 32), l, n / 4);
    write_words(KECC + 32'(2 * n + 32), r, n / 4);
    pad_and_finish(3 * n + 32);
    read_words(KECC, n / 4, node);
  endtask

  // ---------------------------------------------------------------- SHA2 sets
  // Message buffer: PK.seed || toByte(0, bs-n) || ADRSc || M, then padding.
  logic [7:0] msg [2560];   // T_len of n = 32: 2432 bytes padded

  function automatic logic [175:0] adrs_c(input logic [255:0] a);
    logic [175:0] c;
    c[7:0] = a[8*3 +: 8];
    for (int i = 0; i < 8; i++)  c[8*(1+i) +: 8] = a[8*(8+i) +: 8];
    c[8*9 +: 8] = a[8*19 +: 8];
    for (int i = 0; i < 12; i++) c[8*(10+i) +: 8] = a[8*(20+i) +: 8];
    return c;
  endfunction

  // start the buffer: seed block, then ADRSc; returns the next free offset
  task automatic msg_start(input int n, input int bs, input logic [255:0] a, output int len);
    logic [175:0] c;
    for (int i = 0; i < bs; i++) msg[i] = (i < n) ? 8'(3 * i + 8'h11) : 8'h00;
    c = adrs_c(a);
    for (int i = 0; i < 22; i++) msg[bs + i] = c[8*i +: 8];
    len = bs + 22;
  endtask

  // Trunc_n(SHA-256 or SHA-512 of msg[0 .. len-1]); the seed block of a
  // SHA-256 hash comes from the unit's mid-state
  task automatic sha2_msg(input int n, input int len, output logic [255:0] res);
    logic [31:0]  d, hi, lo;
    logic [255:0] r;
    int           bs, lb, p, nblk;
    bs = (n == 16) ? 64 : 128;
    lb = (n == 16) ? 8 : 16;
    p  = len;
    msg[p++] = 8'h80;
    while (p % bs != bs - lb) msg[p++] = 8'h00;
    for (int i = lb - 1; i >= 0; i--) msg[p++] = (i < 4) ? 8'((8 * len) >> (8 * i)) : 8'h00;
    nblk = p / bs;
    if (n == 16) begin
      bus_write(S256 + 32'h3cc, 32'h80);
      wait_ready(S256);
      for (int b = 1; b < nblk; b++) begin
        for (int i = 0; i < 16; i++)
          bus_write(S256 + 32'h20 + 32'(4 * i), {msg[64*b + 4*i], msg[64*b + 4*i + 1],
                                                msg[64*b + 4*i + 2], msg[64*b + 4*i + 3]});
        bus_write(S256 + 32'h3c0, 32'h1);
        wait_ready(S256);
      end
      r = '0;
      for (int i = 0; i < n / 4; i++) begin
        bus_read(S256 + 32'(4 * i), d);
        r[32*i +: 32] = {<<8{d}};
      end
    end else begin
      write_words(S512, H512_INIT[255:0], 8);
      write_words(S512 + 32'h20, H512_INIT[511:256], 8);
      for (int b = 0; b < nblk; b++) begin
        for (int j = 0; j < 16; j++) begin
          bus_write(S512 + 32'h40 + 32'(8 * j), {msg[128*b + 8*j + 4], msg[128*b + 8*j + 5],
                                                msg[128*b + 8*j + 6], msg[128*b + 8*j + 7]});
          bus_write(S512 + 32'h44 + 32'(8 * j), {msg[128*b + 8*j], msg[128*b + 8*j + 1],
                                                msg[128*b + 8*j + 2], msg[128*b + 8*j + 3]});
        end
        bus_write(S512 + 32'hc0, 32'h1);
        do bus_read(S512 + 32'hc0, d); while (d[0]);
      end
      r = '0;
      for (int j = 0; j < n / 8; j++) begin
        bus_read(S512 + 32'(8 * j), lo);
        bus_read(S512 + 32'(8 * j + 4), hi);
        r[64*j +: 64] = {{<<8{lo}}, {<<8{hi}}};
      end
    end
    res = r;
  endtask

  task automatic wots_leaf_sha2(input int n, input int layer, input int i, output logic [255:0] pk);
    logic [255:0] v;
    logic [31:0]  d;
    int           len, p;
    len = 2 * n + 3;
    for (int c = 0; c < len; c++) begin
      write_words(S256 + 32'h260, adrs(layer, 5, i, c, 0), 8);
      bus_write(S256 + 32'h3cc, 32'h40 + W - 1);
      wait_ready(S256);
      read_words(S256, n / 4, v);
      for (int k = 0; k < n / 4; k++) v[32*k +: 32] = {<<8{v[32*k +: 32]}};
      write_words(TMP + 32'(n * c), v, n / 4);
    end
    msg_start(n, (n == 16) ? 64 : 128, adrs(layer, 1, i, 0, 0), p);
    for (int k = 0; k < len * n / 4; k++) begin
      bus_read(TMP + 32'(4 * k), d);
      for (int b = 0; b < 4; b++) msg[p++] = d[8*b +: 8];
    end
    sha2_msg(n, p, pk);
  endtask

  task automatic tree_hash_sha2(input int n, input int layer, input int z, input int i,
                                input logic [255:0] l, input logic [255:0] r,
                                output logic [255:0] node);
    int p;
    msg_start(n, (n == 16) ? 64 : 128, adrs(layer, 2, 0, z, i), p);
    for (int k = 0; k < n; k++) msg[p++] = l[8*k +: 8];
    for (int k = 0; k < n; k++) msg[p++] = r[8*k +: 8];
    sha2_msg(n, p, node);
  endtask

  logic [255:0] ra, rb, stack_v [16], node, mask;
  int           stack_h [16];
  int           sp, n, hp, layer, t0, b0, p0, h, idx;
  string        fam;

  initial begin
    req    = '0;
    gpio_i = 32'h0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    for (int s = 0; s < NSETS; s++) begin
      n     = SET_N[s];
      hp    = SET_HP[s];
      layer = SET_D[s] - 1;
      t0    = cycle;
      b0    = ti3_busy;
      p0    = n_prf;

      // key material into the units of this hash family
      bus_write(S256 + 32'h3c8, n);
      write_words(S256 + 32'h280, pattern(3, 8'h11), 8);
      write_words(S256 + 32'h2a0, pattern(5, 8'h23), 8);
      bus_write(KTI3 + 32'h3c8, n);
      bus_write(KECC + 32'h3c8, n);
      write_words(KTI3 + 32'h280, pattern(3, 8'h11), 8);
      write_words(KECC + 32'h280, pattern(3, 8'h11), 8);
      for (int i = 0; i < 8; i++) begin
        ra[32*i +: 32] = $urandom;
        rb[32*i +: 32] = $urandom;
      end
      write_words(KTI3 + 32'h2a0, pattern(5, 8'h23) ^ ra ^ rb, 8);
      write_words(KTI3 + 32'h2c0, ra, 8);
      write_words(KTI3 + 32'h2e0, rb, 8);

      // treehash over the 2^hp leaves
      sp = 0;
      for (int i = 0; i < (1 << hp); i++) begin
        if (SET_SHA2[s]) wots_leaf_sha2(n, layer, i, node);
        else             wots_leaf(n, layer, i, node);
        h   = 0;
        idx = i;
        while (sp > 0 && stack_h[sp-1] == h) begin
          sp--;
          idx = idx >> 1;
          if (SET_SHA2[s]) tree_hash_sha2(n, layer, h + 1, idx, stack_v[sp], node, node);
          else             tree_hash(n, layer, h + 1, idx, stack_v[sp], node, node);
          h++;
        end
        stack_v[sp] = node;
        stack_h[sp] = h;
        sp++;
      end

      mask = '0;
      for (int i = 0; i < 8 * n; i++) mask[i] = 1'b1;
      checks++;
      if ((stack_v[0] & mask) !== PK_ROOT[s] || sp != 1) begin
        failures++;
        $display("FAIL PK.root n=%0d: got %h expected %h", n, stack_v[0] & mask, PK_ROOT[s]);
      end
      checks++;
      if (n_prf - p0 != (1 << hp) * (2 * n + 3)) begin
        failures++;
        $display("FAIL PRF count %0d", n_prf - p0);
      end
      checks++;
      if (ti3_busy - b0 != (SET_SHA2[s] ? 0 : (1 << hp) * (2 * n + 3) * W * 24)) begin
        failures++;
        $display("FAIL threshold unit busy cycles %0d", ti3_busy - b0);
      end
      fam = SET_SHA2[s] ? "SHA2" : "SHAKE";
      $display("SLH-DSA-%s-%0d%s key generation: %0d leaves, %0d chains, %0d cycles in all",
               fam, 8 * n, (hp > 4) ? "s" : "f", 1 << hp, (1 << hp) * (2 * n + 3), cycle - t0);
    end

    checks++;
    if (n_unmapped != 0) begin failures++; $display("FAIL unmapped accesses"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (80000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
