// tb_keccak_slh_unit: self-checking test of the SLH-DSA Keccak unit in its
// plain (SHARES = 1) and three-share (SHARES = 3) forms.
//
// Checks, against SHAKE256 / Keccak-f[1600] results computed independently
// of this RTL: a raw 24-round and a 12-round (STOP = 12) permutation; a
// 5-step Winternitz chain at n = 16 and a 2-step chain at n = 32; PRF alone
// and PRF followed by 3 chain steps at n = 24 with SK.seed and X held as three
// random shares; the 0x80 prefix load; the ADRS write-back; and the cycle
// counts (24 cycles per hash, STOP cycles per raw permutation).
module tb_keccak_slh_unit;
  import sloth_pkg::*;

  localparam logic [1599:0] PERM24 = 1600'h38ad50bdf89b110946d9b6fe11ab6617f58265b0ee0c3a75c44070c1bd7a44ac67f47fcd1434ed7e64692a092bc47df3b862dfda9c1481cace1800491ce416d6f0c11c347af534ebc448cf9898a1a936571ed87b541cbbbbc4434a3c00565c858e7072fc68785c478e9c099d0b042b38a3a6b15cf9e4a79d8dc8eb44ac686caccc2d7ebef2328215a81c2fae72792b1e0519b9747f85c42c42f7734d5c5cb55bab2760e4571548e1d44593d9d4791cacce5506cb0b82e0777b90fc9a732c47adc572ca66a6dad4a0;
  localparam logic [1599:0] PERM12 = 1600'hd5bab10260e6fc5a9b4d046030127fa818a26278e976ada7d1eb24bacf2f77d758f6f4a35b7e9a39689bb3ff3150f23a88e176adf79a2a24548d748c1ab0f202b7e7696b52fa539f810d17da5b6aeb6ca79dc6cae5856f850eb248a0502b9be4152e63d2287318c9562f12d85f9e62e42740c4c32812ecdc06f5ab327e345b0076ff7f53119c5e8840893b71acce45cba0524b5cba6e48026ecda229a4fe148a465d62acfb35e94c559a1015eb1789ceb0c32430127d4e924277f7b2b70bda73c82416b8346fa987;
  localparam logic [127:0] CHAIN16 = 128'h2aed5d4c27405178b180513d41f3f29d;
  localparam logic [255:0] CHAIN32 = 256'h9156905d2f53c6f8bb3583cba2087cdf4bf5c7c804a17cac705372bad53dc7cd;
  localparam logic [191:0] PRF24 = 192'hc5d374a0125eb82783ae14f9c2c2f2dd634bb04ad8f9d6c5;
  localparam logic [191:0] PRFCH24 = 192'hee1beed75d572ad4720e0f2214a2a8f1c471887636b4365e;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  bus_req_t req [2];
  bus_rsp_t rsp [2];
  logic     busy [2];
  int checks = 0, failures = 0;

  keccak_slh_unit #(.SHARES(1)) u_plain (.clk, .rst_n, .req(req[0]), .rsp(rsp[0]), .busy_o(busy[0]));
  keccak_slh_unit #(.SHARES(3)) u_ti3   (.clk, .rst_n, .req(req[1]), .rsp(rsp[1]), .busy_o(busy[1]));

  task automatic bus_write(input int u, input logic [9:0] a, input logic [31:0] d);
    req[u] <= '{valid: 1'b1, addr: {22'h0, a}, wdata: d, wstrb: 4'hf};
    do @(posedge clk); while (!rsp[u].ready);
    req[u] <= '0;
    @(posedge clk);
  endtask

  task automatic bus_read(input int u, input logic [9:0] a, output logic [31:0] d);
    req[u] <= '{valid: 1'b1, addr: {22'h0, a}, wdata: 32'h0, wstrb: 4'h0};
    do @(posedge clk); while (!rsp[u].ready);
    d = rsp[u].rdata;
    req[u] <= '0;
    @(posedge clk);
  endtask

  task automatic check(input string what, input logic [255:0] got, input logic [255:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // write nbytes of a little-endian byte string to consecutive words
  task automatic write_bytes(input int u, input logic [9:0] base, input logic [1599:0] v, input int nbytes);
    for (int w = 0; w < (nbytes + 3) / 4; w++) bus_write(u, base + 10'(4 * w), v[32*w +: 32]);
  endtask

  task automatic read_bytes(input int u, input logic [9:0] base, input int nbytes, output logic [1599:0] v);
    logic [31:0] d;
    v = '0;
    for (int w = 0; w < (nbytes + 3) / 4; w++) begin
      bus_read(u, base + 10'(4 * w), d);
      v[32*w +: 32] = d;
    end
  endtask

  // start a command and count the cycles until the unit is idle again
  task automatic run_cmd(input int u, input logic [9:0] a, input logic [31:0] d, output int cyc);
    bus_write(u, a, d);
    cyc = 1;  // the cycle spent in bus_write after the command took effect
    while (busy[u]) begin
      @(posedge clk);
      cyc++;
    end
  endtask

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

  logic [1599:0] v, va, vb, vc, st0, shb, shc;
  logic [255:0]  ra, rb;
  int cyc;

  initial begin
    req[0] = '0;
    req[1] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    for (int i = 0; i < 200; i++) st0[8*i +: 8] = 8'(11 * i + 8'h5a);

    // ---- raw permutation, 24 rounds and 12 rounds (plain unit)
    write_bytes(0, 10'h000, st0, 200);
    run_cmd(0, 10'h3c0, 32'h1, cyc);
    check("raw24 cycles", 256'(cyc), 256'd24);
    read_bytes(0, 10'h000, 200, v);
    check("raw24 lo", v[255:0], PERM24[255:0]);
    check("raw24 hi", v[1599:1344], PERM24[1599:1344]);
    write_bytes(0, 10'h000, st0, 200);
    bus_write(0, 10'h3c4, 32'd12);
    run_cmd(0, 10'h3c0, 32'h1, cyc);
    check("raw12 cycles", 256'(cyc), 256'd12);
    read_bytes(0, 10'h000, 200, v);
    check("raw12 lo", v[255:0], PERM12[255:0]);
    check("raw12 mid", v[1055:800], PERM12[1055:800]);
    bus_write(0, 10'h3c4, 32'd24);

    // ---- chain: n = 16, hash address 3, s = 5 (plain unit)
    write_bytes(0, 10'h280, pattern(3, 8'h11), 32);
    write_bytes(0, 10'h260, adrs_val(3, 0), 32);
    write_bytes(0, 10'h000, 1600'(pattern(7, 1)), 32);
    bus_write(0, 10'h3c8, 32'd16);
    run_cmd(0, 10'h3cc, 32'd5, cyc);
    check("chain16 cycles", 256'(cyc), 256'(5 * 24));
    read_bytes(0, 10'h000, 16, v);
    check("chain16 X", 256'(v[127:0]), 256'(CHAIN16));
    read_bytes(0, 10'h260, 32, v);
    check("chain16 ADRS hash address", v[255:0], adrs_val(8, 0));

    // ---- chain: n = 32, hash address 0, s = 2 (plain unit)
    write_bytes(0, 10'h260, adrs_val(0, 0), 32);
    write_bytes(0, 10'h000, 1600'(pattern(7, 1)), 32);
    bus_write(0, 10'h3c8, 32'd32);
    run_cmd(0, 10'h3cc, 32'd2, cyc);
    check("chain32 cycles", 256'(cyc), 256'(2 * 24));
    read_bytes(0, 10'h000, 32, v);
    check("chain32 X", v[255:0], CHAIN32);

    // ---- 0x80 prefix load for H / T_l, n = 32
    write_bytes(0, 10'h000, st0, 200);
    run_cmd(0, 10'h3cc, 32'h80, cyc);
    read_bytes(0, 10'h000, 200, v);
    check("prefix seed", v[255:0], pattern(3, 8'h11));
    check("prefix adrs", v[511:256], adrs_val(2, 0));
    check("prefix zero", v[1599:1344] | v[767:512], 256'h0);

    // ---- TI3 unit: PRF alone and PRF + 3 F at n = 24 with shares
    write_bytes(1, 10'h280, pattern(3, 8'h11), 32);
    bus_write(1, 10'h3c8, 32'd24);
    for (int i = 0; i < 8; i++) begin
      ra[32*i +: 32] = $urandom;
      rb[32*i +: 32] = $urandom;
    end
    write_bytes(1, 10'h2a0, 1600'(pattern(5, 8'h23) ^ ra ^ rb), 32);
    write_bytes(1, 10'h2c0, 1600'(ra), 32);
    write_bytes(1, 10'h2e0, 1600'(rb), 32);
    for (int i = 0; i < 50; i++) begin
      shb[32*i +: 32] = $urandom;
      shc[32*i +: 32] = $urandom;
    end
    write_bytes(1, 10'h0c8, shb, 200);
    write_bytes(1, 10'h190, shc, 200);
    write_bytes(1, 10'h260, adrs_val(0, 5), 32);
    run_cmd(1, 10'h3cc, 32'h40, cyc);
    check("prf cycles", 256'(cyc), 256'd24);
    read_bytes(1, 10'h000, 24, va);
    read_bytes(1, 10'h0c8, 24, vb);
    read_bytes(1, 10'h190, 24, vc);
    check("prf24 X", 256'(va[191:0] ^ vb[191:0] ^ vc[191:0]), 256'(PRF24));
    bus_read(1, 10'h2a0, ra[31:0]);
    check("SK.seed write-only", 256'(ra[31:0]), 256'h0);

    write_bytes(1, 10'h260, adrs_val(0, 5), 32);
    run_cmd(1, 10'h3cc, 32'h43, cyc);
    check("prf+chain cycles", 256'(cyc), 256'(4 * 24));
    read_bytes(1, 10'h000, 24, va);
    read_bytes(1, 10'h0c8, 24, vb);
    read_bytes(1, 10'h190, 24, vc);
    check("prf+chain24 X", 256'(va[191:0] ^ vb[191:0] ^ vc[191:0]), 256'(PRFCH24));
    check("prf+chain24 masked", 256'(va[191:0] == 192'(PRFCH24)), 256'h0);
    read_bytes(1, 10'h260, 32, v);
    check("prf+chain ADRS", v[255:0], adrs_val(3, 0));

    // ---- TI3 raw permutation of a shared state
    write_bytes(1, 10'h000, st0 ^ shb ^ shc, 200);
    write_bytes(1, 10'h0c8, shb, 200);
    write_bytes(1, 10'h190, shc, 200);
    run_cmd(1, 10'h3c0, 32'h1, cyc);
    read_bytes(1, 10'h000, 200, va);
    read_bytes(1, 10'h0c8, 200, vb);
    read_bytes(1, 10'h190, 200, vc);
    v = va ^ vb ^ vc;
    check("ti3 raw lo", v[255:0], PERM24[255:0]);
    check("ti3 raw hi", v[1599:1344], PERM24[1599:1344]);

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
