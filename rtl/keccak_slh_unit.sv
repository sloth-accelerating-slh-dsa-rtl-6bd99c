// keccak_slh_unit: memory-mapped Keccak-f[1600] unit that formats and chains
// the SLH-DSA (FIPS 205) SHAKE256 hash primitives by itself.
//
// What it does. Besides a raw permutation of the 1600-bit state, the unit
// holds PK.seed, SK.seed and the 32-byte ADRS in registers and builds the
// single-block SHAKE256 inputs of PRF and F in one cycle:
//   PRF = SHAKE256(PK.seed || ADRS || SK.seed, 8n)
//   F   = SHAKE256(PK.seed || ADRS || X,       8n)
// A write of s to CHNS runs s Winternitz iterations X <- F(PK.seed, ADRS, X),
// starting from X in state bytes 0..n-1 and incrementing the ADRS hash
// address after each F; 0x40+s runs PRF first (X <- PRF) and then the s
// iterations; 0x80 loads PK.seed || ADRS followed by zeros, the start of an
// H or T_l input, which software completes and permutes with CTRL. The result
// is always in state bytes 0..n-1. These register meanings, offsets and sizes
// follow the published register map; how PRF hands over to F (the ADRS type
// word, bytes 16..19, is cleared to WOTS_HASH when s > 0), the write-back of
// ADRS, where X comes from and the meaning of 0x80 are this design's reading.
//
// Shares. With SHARES = 3 the state, and SK.seed, are held as three Boolean
// shares (MEMA/MEMB/MEMC, SKSA/SKSB/SKSC) and the round is the threshold
// round of keccak_ti3_round; public data (PK.seed, ADRS, padding) goes into
// share A only. With SHARES = 1 only share A exists (the plain unit) and
// the B/C registers read as zero.
//
// Registers (byte offsets in a 1 KiB window, 32-bit little-endian words):
//   0x000 MEMA (200 B)  0x0c8 MEMB  0x190 MEMC  0x260 ADRS (32 B)
//   0x280 SEED  0x2a0 SKSA  0x2c0 SKSB  0x2e0 SKSC  (SKS* are write-only)
//   0x3c0 CTRL  write 1: raw permutation; read: 0 ready, 1 busy
//   0x3c4 STOP  round count of a raw permutation (rounds 24-STOP..23), reset 24
//   0x3c8 SECN  n in {16, 24, 32}, reset 16
//   0x3cc CHNS  s / 0x40+s / 0x80 as above
// Writes are ignored while busy. Timing: every access is answered one cycle
// after the request; one round runs per cycle and the formatting of each
// hash shares the cycle of its first round, so a raw permutation takes STOP
// cycles and CHNS = 0x40+s takes 24*(s+1) cycles. SLH-DSA hashes always use
// 24 rounds; STOP (meant for TurboSHAKE / KangarooTwelve) affects only raw
// permutations, which is this design's choice.
module keccak_slh_unit
  import sloth_pkg::*;
#(
  parameter int unsigned SHARES = 3  // 1: plain Keccak, 3: three-share TI
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t req,
  output bus_rsp_t rsp,
  output logic     busy_o
);
  localparam int unsigned NS = (SHARES >= 3) ? 3 : 1;

  typedef enum logic [1:0] {ST_IDLE, ST_RAW, ST_HASH} state_e;
  typedef enum logic {HK_F, HK_PRF} hkind_e;

  logic [1599:0] st      [NS];
  logic [1599:0] st_nx   [NS];
  logic [1599:0] rnd_in  [NS];
  logic [1599:0] rnd_out [NS];
  logic [255:0]  sks     [NS];
  logic [255:0]  adrs, seed;
  logic [5:0]    secn;
  logic [4:0]    stop;
  state_e        fsm;
  hkind_e        hkind;
  logic          fmt_now;   // the current round takes the formatted block
  logic [4:0]    ridx;      // round index 0..23
  logic [5:0]    iters;     // F iterations still to run after the current hash

  // ---------------------------------------------------------------- format
  // Single SHAKE256 block (rate 136 bytes) of PK.seed || ADRS || M with the
  // 0x1F .. 0x80 padding, for share A (pub = 1) or for the other shares.
  function automatic logic [1599:0] fmt_block(input int n, input bit pub,
      input logic [255:0] sd, input logic [255:0] ad, input logic [255:0] m);
    logic [1599:0] b;
    b = '0;
    for (int i = 0; i < n; i++) begin
      if (pub) b[8*i +: 8] = sd[8*i +: 8];
      b[8*(n+32+i) +: 8] = m[8*i +: 8];
    end
    if (pub) begin
      for (int i = 0; i < 32; i++) b[8*(n+i) +: 8] = ad[8*i +: 8];
      b[8*(2*n+32) +: 8] = 8'h1F;
      b[8*135 +: 8]      = b[8*135 +: 8] | 8'h80;
    end
    return b;
  endfunction

  function automatic logic [1599:0] fmt_n(input logic [5:0] n, input bit pub,
      input logic [255:0] sd, input logic [255:0] ad, input logic [255:0] m);
    unique case (n)
      6'd24:   return fmt_block(24, pub, sd, ad, m);
      6'd32:   return fmt_block(32, pub, sd, ad, m);
      default: return fmt_block(16, pub, sd, ad, m);
    endcase
  endfunction

  // PK.seed || ADRS || zeros: the start of an H or T_l input
  function automatic logic [1599:0] prefix_n(input logic [5:0] n,
      input logic [255:0] sd, input logic [255:0] ad);
    logic [1599:0] b;
    b = '0;
    unique case (n)
      6'd24:   begin b[24*8-1:0] = sd[24*8-1:0]; b[24*8 +: 256] = ad; end
      6'd32:   begin b[32*8-1:0] = sd;           b[32*8 +: 256] = ad; end
      default: begin b[16*8-1:0] = sd[16*8-1:0]; b[16*8 +: 256] = ad; end
    endcase
    return b;
  endfunction

  // ---------------------------------------------------------------- rounds
  always_comb begin
    for (int k = 0; k < NS; k++)
      rnd_in[k] = fmt_now ? fmt_n(secn, k == 0, seed, adrs,
                                  (hkind == HK_PRF) ? sks[k] : st[k][255:0])
                          : st[k];
  end

  if (NS == 3) begin : g_ti3
    keccak_ti3_round u_round (
      .sa_i(rnd_in[0]), .sb_i(rnd_in[1]), .sc_i(rnd_in[2]), .rc_i(keccak_rc(ridx)),
      .sa_o(rnd_out[0]), .sb_o(rnd_out[1]), .sc_o(rnd_out[2]));
  end else begin : g_plain
    keccak_round u_round (.state_i(rnd_in[0]), .rc_i(keccak_rc(ridx)), .state_o(rnd_out[0]));
  end

  // ---------------------------------------------------------------- bus
  logic [7:0]  widx;
  logic        acc, wr;
  logic [31:0] wmask;
  assign widx  = req.addr[9:2];
  assign acc   = req.valid && !rsp.ready;
  assign wr    = acc && (req.wstrb != 4'b0) && (fsm == ST_IDLE);
  assign wmask = {{8{req.wstrb[3]}}, {8{req.wstrb[2]}}, {8{req.wstrb[1]}}, {8{req.wstrb[0]}}};

  function automatic logic [31:0] merge(input logic [31:0] old, input logic [31:0] nw,
                                        input logic [31:0] msk);
    return (old & ~msk) | (nw & msk);
  endfunction

  logic [31:0] rd_word;
  always_comb begin
    rd_word = '0;
    if (widx < 8'(KW_MEMB)) rd_word = st[0][32*widx +: 32];
    else if (widx < 8'(KW_MEMC)) begin
      if (NS == 3) rd_word = st[1 % NS][32*(widx - 8'(KW_MEMB)) +: 32];
    end else if (widx < 8'(KW_MEMC + 50)) begin
      if (NS == 3) rd_word = st[2 % NS][32*(widx - 8'(KW_MEMC)) +: 32];
    end else if (widx >= 8'(KW_ADRS) && widx < 8'(KW_ADRS + 8))
      rd_word = adrs[32*widx[2:0] +: 32];
    else if (widx >= 8'(KW_SEED) && widx < 8'(KW_SEED + 8))
      rd_word = seed[32*widx[2:0] +: 32];
    else if (widx == 8'(KW_CTRL)) rd_word = {31'b0, fsm != ST_IDLE};
    else if (widx == 8'(KW_STOP)) rd_word = {27'b0, stop};
    else if (widx == 8'(KW_SECN)) rd_word = {26'b0, secn};
    else if (widx == 8'(KW_CHNS)) rd_word = {26'b0, iters};
  end

  // ADRS helpers: hash address is bytes 28..31, type bytes 16..19, big-endian
  function automatic logic [255:0] adrs_inc_hash(input logic [255:0] a);
    logic [31:0] h;
    h = {a[8*28 +: 8], a[8*29 +: 8], a[8*30 +: 8], a[8*31 +: 8]} + 32'd1;
    a[8*28 +: 8] = h[31:24];
    a[8*29 +: 8] = h[23:16];
    a[8*30 +: 8] = h[15:8];
    a[8*31 +: 8] = h[7:0];
    return a;
  endfunction

  function automatic logic [255:0] adrs_set_type(input logic [255:0] a, input logic [31:0] t);
    a[8*16 +: 8] = t[31:24];
    a[8*17 +: 8] = t[23:16];
    a[8*18 +: 8] = t[15:8];
    a[8*19 +: 8] = t[7:0];
    return a;
  endfunction

  // ---------------------------------------------------------------- control
  logic last_round;
  assign last_round = (ridx == 5'd23);

  always_comb begin
    for (int k = 0; k < NS; k++) st_nx[k] = st[k];
    if (fsm != ST_IDLE) begin
      for (int k = 0; k < NS; k++) st_nx[k] = rnd_out[k];
    end else if (wr) begin
      for (int k = 0; k < NS; k++)
        for (int w = 0; w < 50; w++)
          if (32'(widx) == 32'(KW_MEMA + 50*k) + 32'(w))
            st_nx[k][32*w +: 32] = merge(st[k][32*w +: 32], req.wdata, wmask);
      if (widx == 8'(KW_CHNS) && req.wdata[7]) begin
        st_nx[0] = prefix_n(secn, seed, adrs);
        for (int k = 1; k < NS; k++) st_nx[k] = '0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NS; k++) begin
        st[k]  <= '0;
        sks[k] <= '0;
      end
      adrs    <= '0;
      seed    <= '0;
      secn    <= 6'd16;
      stop    <= 5'd24;
      fsm     <= ST_IDLE;
      hkind   <= HK_F;
      fmt_now <= 1'b0;
      ridx    <= '0;
      iters   <= '0;
      rsp     <= '0;
    end else begin
      rsp.ready <= acc;
      rsp.rdata <= rd_word;
      for (int k = 0; k < NS; k++) st[k] <= st_nx[k];

      unique case (fsm)
        ST_IDLE: if (wr) begin
          if (widx >= 8'(KW_ADRS) && widx < 8'(KW_ADRS + 8))
            adrs[32*widx[2:0] +: 32] <= merge(adrs[32*widx[2:0] +: 32], req.wdata, wmask);
          if (widx >= 8'(KW_SEED) && widx < 8'(KW_SEED + 8))
            seed[32*widx[2:0] +: 32] <= merge(seed[32*widx[2:0] +: 32], req.wdata, wmask);
          for (int k = 0; k < NS; k++)
            if (widx[7:3] == 5'((KW_SKSA / 8) + k))
              sks[k][32*widx[2:0] +: 32] <= merge(sks[k][32*widx[2:0] +: 32], req.wdata, wmask);
          if (widx == 8'(KW_STOP)) stop <= (req.wdata[4:0] > 5'd24) ? 5'd24 : req.wdata[4:0];
          if (widx == 8'(KW_SECN) && (req.wdata[5:0] == 6'd16 || req.wdata[5:0] == 6'd24 ||
                                      req.wdata[5:0] == 6'd32))
            secn <= req.wdata[5:0];
          if (widx == 8'(KW_CTRL) && req.wdata[0] && stop != 5'd0) begin
            fsm     <= ST_RAW;
            fmt_now <= 1'b0;
            ridx    <= 5'd24 - stop;
          end
          if (widx == 8'(KW_CHNS) && !req.wdata[7] && (req.wdata[6] || req.wdata[5:0] != 6'd0)) begin
            fsm     <= ST_HASH;
            fmt_now <= 1'b1;
            ridx    <= 5'd0;
            hkind   <= req.wdata[6] ? HK_PRF : HK_F;
            iters   <= req.wdata[6] ? req.wdata[5:0] : req.wdata[5:0] - 6'd1;
          end
        end
        ST_RAW: begin
          ridx <= ridx + 5'd1;
          if (last_round) fsm <= ST_IDLE;
        end
        ST_HASH: begin
          fmt_now <= 1'b0;
          ridx    <= ridx + 5'd1;
          if (last_round) begin
            ridx <= 5'd0;
            if (hkind == HK_PRF) begin
              if (iters != 6'd0) begin
                adrs    <= adrs_set_type(adrs, ADRS_WOTS_HASH);
                hkind   <= HK_F;
                fmt_now <= 1'b1;
                iters   <= iters - 6'd1;
              end else fsm <= ST_IDLE;
            end else begin
              adrs <= adrs_inc_hash(adrs);
              if (iters != 6'd0) begin
                fmt_now <= 1'b1;
                iters   <= iters - 6'd1;
              end else fsm <= ST_IDLE;
            end
          end
        end
        default: fsm <= ST_IDLE;
      endcase
    end
  end

  assign busy_o = (fsm != ST_IDLE);

  // A request must stay asserted, unchanged, until it is answered.
  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (req.valid && !rsp.ready) |=> (req.valid && $stable(req.addr) && $stable(req.wstrb)));
endmodule
