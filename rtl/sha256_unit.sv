// sha256_unit: memory-mapped SHA-256 compression unit (FIPS 180-4), one round
// per clock cycle, that also formats and chains the SLH-DSA SHA2 versions of
// PRF and F (FIPS 205) by itself, like the Keccak unit does for SHAKE.
//
// Raw use. Software writes the chaining value H0..H7 and one 512-bit block
// W0..W15 (32-bit big-endian message words: W0 holds message bytes 0..3 with
// byte 0 in bits 31:24) and writes 1 to CTRL. The unit runs the 64 rounds and
// adds the result into H. The schedule is computed in place, so W does not
// keep the block.
//
// SLH-DSA use. For all SHA2 parameter sets
//   PRF = Trunc_n(SHA-256(PK.seed || toByte(0, 64-n) || ADRSc || SK.seed))
//   F   = Trunc_n(SHA-256(PK.seed || toByte(0, 64-n) || ADRSc || X))
// where ADRSc is the 22-byte compressed ADRS. The first block depends only
// on PK.seed, so the unit compresses it once (64 cycles, the first time a
// command needs it after SEED or SECN was written) and keeps the mid-state.
// Every PRF or F is then one formatting cycle, which loads the mid-state and
// builds the second block (ADRSc || M || 0x80 || zeros || bit length), and
// 64 rounds. CHNS works as on the Keccak unit: s runs s F steps from X = the
// first n bytes of H (big-endian words) and increments the ADRS hash address
// after each; 0x40+s runs PRF with ADRS as written, clears the ADRS type to
// WOTS_HASH when s > 0, then runs the s steps; 0x80 loads the mid-state into
// H, the start of an n = 16 H or T_l, which software continues with raw
// compressions. Results are left in H (first n bytes).
//
// Registers (byte offsets, 32-bit words):
//   0x000..0x01c H0..H7   0x020..0x05c W0..W15
//   0x260 ADRS (32 B)  0x280 SEED (32 B)  0x2a0 SKS (32 B, write-only)
//   (byte strings stored little-endian: byte 4k+i in bits 8i+7:8i of word k)
//   0x3c0 CTRL  write 1: raw compression; read: 0 ready, 1 busy
//   0x3c8 SECN  n in {16, 24, 32}, reset 16
//   0x3cc CHNS  s / 0x40+s / 0x80
// Writes are ignored while busy; every access is answered one cycle after the
// request. A raw compression takes 64 cycles from the cycle after the start
// write (the addition into H shares the cycle of round 63); a formatted
// PRF or F takes 65 cycles, plus 64 once for the mid-state.
// The document names a SHA2-256 round unit, gives 64 cycles per compression
// and describes format and chain automation for the accelerator as a whole,
// printing a register map for the Keccak unit only. Using the same offsets,
// commands and mid-state scheme here is this design's choice.
module sha256_unit
  import sloth_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t req,
  output bus_rsp_t rsp,
  output logic     busy_o
);
  localparam logic [31:0] IV [8] = '{
    32'h6a09e667, 32'hbb67ae85, 32'h3c6ef372, 32'ha54ff53a,
    32'h510e527f, 32'h9b05688c, 32'h1f83d9ab, 32'h5be0cd19};

  typedef enum logic [2:0] {ST_IDLE, ST_RAW, ST_MID, ST_LOAD, ST_HASH} state_e;
  typedef enum logic {HK_F, HK_PRF} hkind_e;

  logic [31:0]  h [8];    // chaining value / result
  logic [31:0]  v [8];    // working variables a..h
  logic [31:0]  w [16];   // message schedule window, w[0] = W_t
  logic [31:0]  mid [8];  // state after the PK.seed block
  logic         mid_ok;
  logic [255:0] adrs, seed, sks;
  logic [5:0]   secn;
  logic [5:0]   iters;
  logic [5:0]   t;
  state_e       fsm;
  hkind_e       hkind;

  function automatic logic [31:0] ror(input logic [31:0] x, input int r);
    return (x >> r) | (x << (32 - r));
  endfunction

  // ---------------------------------------------------------------- round
  logic [31:0] s0, s1, ch, maj, t1, t2, wn;
  logic [31:0] vn [8];
  always_comb begin
    s1  = ror(v[4], 6) ^ ror(v[4], 11) ^ ror(v[4], 25);
    ch  = (v[4] & v[5]) ^ (~v[4] & v[6]);
    t1  = v[7] + s1 + ch + SHA256_K[t] + w[0];
    s0  = ror(v[0], 2) ^ ror(v[0], 13) ^ ror(v[0], 22);
    maj = (v[0] & v[1]) ^ (v[0] & v[2]) ^ (v[1] & v[2]);
    t2  = s0 + maj;
    vn[0] = t1 + t2;
    vn[1] = v[0];
    vn[2] = v[1];
    vn[3] = v[2];
    vn[4] = v[3] + t1;
    vn[5] = v[4];
    vn[6] = v[5];
    vn[7] = v[6];
    wn = (ror(w[14], 17) ^ ror(w[14], 19) ^ (w[14] >> 10)) + w[9]
       + (ror(w[1], 7) ^ ror(w[1], 18) ^ (w[1] >> 3)) + w[0];
  end

  // ---------------------------------------------------------------- format
  // Second block of PRF / F: ADRSc (22 bytes) || M (n bytes) || 0x80 ||
  // zeros || 64-bit bit length of the whole message (64 + 22 + n bytes).
  // Returned as 64 bytes, byte k at bits 8k +: 8.
  function automatic logic [511:0] fmt_block(input int n, input logic [255:0] ad,
                                             input logic [255:0] m);
    logic [511:0] b;
    logic [63:0]  bits;
    b = '0;
    b[7:0] = ad[8*3 +: 8];                                        // layer
    for (int i = 0; i < 8; i++)  b[8*(1+i) +: 8]  = ad[8*(8+i) +: 8];   // tree
    b[8*9 +: 8] = ad[8*19 +: 8];                                  // type
    for (int i = 0; i < 12; i++) b[8*(10+i) +: 8] = ad[8*(20+i) +: 8];  // rest
    for (int i = 0; i < n; i++)  b[8*(22+i) +: 8] = m[8*i +: 8];
    b[8*(22+n) +: 8] = 8'h80;
    bits = 64'(unsigned'((64 + 22 + n) * 8));
    for (int i = 0; i < 8; i++)  b[8*(56+i) +: 8] = bits[8*(7-i) +: 8];
    return b;
  endfunction

  function automatic logic [511:0] fmt_n(input logic [5:0] n, input logic [255:0] ad,
                                         input logic [255:0] m);
    unique case (n)
      6'd24:   return fmt_block(24, ad, m);
      6'd32:   return fmt_block(32, ad, m);
      default: return fmt_block(16, ad, m);
    endcase
  endfunction

  // PK.seed || toByte(0, 64-n): the first block
  function automatic logic [511:0] seed_block(input logic [5:0] n, input logic [255:0] sd);
    logic [511:0] b;
    b = '0;
    unique case (n)
      6'd24:   b[24*8-1:0] = sd[24*8-1:0];
      6'd32:   b[32*8-1:0] = sd;
      default: b[16*8-1:0] = sd[16*8-1:0];
    endcase
    return b;
  endfunction

  // H as a byte string (big-endian words), the X of the next F
  logic [255:0] h_bytes;
  always_comb
    for (int k = 0; k < 32; k++) h_bytes[8*k +: 8] = h[k/4][8*(3 - k%4) +: 8];

  // byte string to big-endian message words
  function automatic logic [31:0] be_word(input logic [511:0] b, input int i);
    return {b[32*i +: 8], b[32*i+8 +: 8], b[32*i+16 +: 8], b[32*i+24 +: 8]};
  endfunction

  logic [511:0] blk, sblk;
  assign blk  = fmt_n(secn, adrs, (hkind == HK_PRF) ? sks : h_bytes);
  assign sblk = seed_block(secn, seed);

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
    if (widx < 8'd8)       rd_word = h[widx[2:0]];
    else if (widx < 8'd24) rd_word = w[4'(widx - 8'd8)];
    else if (widx[7:3] == 5'(KW_ADRS / 8)) rd_word = adrs[32*widx[2:0] +: 32];
    else if (widx[7:3] == 5'(KW_SEED / 8)) rd_word = seed[32*widx[2:0] +: 32];
    else if (widx == 8'(KW_CTRL)) rd_word = {31'b0, fsm != ST_IDLE};
    else if (widx == 8'(KW_SECN)) rd_word = {26'b0, secn};
    else if (widx == 8'(KW_CHNS)) rd_word = {26'b0, iters};
  end

  function automatic logic [255:0] adrs_inc_hash(input logic [255:0] a);
    logic [31:0] x;
    x = {a[8*28 +: 8], a[8*29 +: 8], a[8*30 +: 8], a[8*31 +: 8]} + 32'd1;
    for (int i = 0; i < 4; i++) a[8*(28+i) +: 8] = x[8*(3-i) +: 8];
    return a;
  endfunction

  function automatic logic [255:0] adrs_set_type(input logic [255:0] a, input logic [31:0] ty);
    for (int i = 0; i < 4; i++) a[8*(16+i) +: 8] = ty[8*(3-i) +: 8];
    return a;
  endfunction

  // ---------------------------------------------------------------- control
  logic last;
  assign last = (t == 6'd63);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 8; i++) begin
        h[i]   <= '0;
        v[i]   <= '0;
        mid[i] <= '0;
      end
      for (int i = 0; i < 16; i++) w[i] <= '0;
      mid_ok <= 1'b0;
      adrs   <= '0;
      seed   <= '0;
      sks    <= '0;
      secn   <= 6'd16;
      iters  <= '0;
      t      <= '0;
      fsm    <= ST_IDLE;
      hkind  <= HK_F;
      rsp    <= '0;
    end else begin
      rsp.ready <= acc;
      rsp.rdata <= rd_word;

      // rounds, shared by the raw, mid-state and formatted compressions
      if (fsm == ST_RAW || fsm == ST_MID || fsm == ST_HASH) begin
        for (int i = 0; i < 15; i++) w[i] <= w[i+1];
        w[15] <= wn;
        t     <= t + 6'd1;
        for (int i = 0; i < 8; i++) v[i] <= vn[i];
      end

      unique case (fsm)
        ST_IDLE: if (wr) begin
          if (widx < 8'd8)
            h[widx[2:0]] <= merge(h[widx[2:0]], req.wdata, wmask);
          else if (widx < 8'd24)
            w[4'(widx - 8'd8)] <= merge(w[4'(widx - 8'd8)], req.wdata, wmask);
          if (widx[7:3] == 5'(KW_ADRS / 8))
            adrs[32*widx[2:0] +: 32] <= merge(adrs[32*widx[2:0] +: 32], req.wdata, wmask);
          if (widx[7:3] == 5'(KW_SEED / 8)) begin
            seed[32*widx[2:0] +: 32] <= merge(seed[32*widx[2:0] +: 32], req.wdata, wmask);
            mid_ok <= 1'b0;
          end
          if (widx[7:3] == 5'(KW_SKSA / 8))
            sks[32*widx[2:0] +: 32] <= merge(sks[32*widx[2:0] +: 32], req.wdata, wmask);
          if (widx == 8'(KW_SECN) && (req.wdata[5:0] == 6'd16 || req.wdata[5:0] == 6'd24 ||
                                      req.wdata[5:0] == 6'd32)) begin
            secn   <= req.wdata[5:0];
            mid_ok <= 1'b0;
          end
          if (widx == 8'(KW_CTRL) && req.wdata[0]) begin
            fsm <= ST_RAW;
            t   <= '0;
            for (int i = 0; i < 8; i++) v[i] <= h[i];
          end
          if (widx == 8'(KW_CHNS) && (req.wdata[7] || req.wdata[6] || req.wdata[5:0] != 6'd0)) begin
            // 0x80 is "mid-state into H" with no hash; iters = 0 and no PRF
            hkind <= req.wdata[6] ? HK_PRF : HK_F;
            iters <= req.wdata[7] ? 6'd0 : req.wdata[5:0];
            fsm   <= mid_ok ? ST_LOAD : ST_MID;
            t     <= '0;
            if (!mid_ok) begin
              for (int i = 0; i < 8; i++)  v[i] <= IV[i];
              for (int i = 0; i < 16; i++) w[i] <= be_word(sblk, i);
            end
            if (req.wdata[7]) begin
              hkind <= HK_F;
              iters <= 6'd0;
              if (mid_ok) begin
                fsm <= ST_IDLE;
                for (int i = 0; i < 8; i++) h[i] <= mid[i];
              end
            end
          end
        end
        ST_RAW: if (last) begin
          fsm <= ST_IDLE;
          for (int i = 0; i < 8; i++) h[i] <= h[i] + vn[i];
        end
        ST_MID: if (last) begin
          mid_ok <= 1'b1;
          for (int i = 0; i < 8; i++) mid[i] <= IV[i] + vn[i];
          if (hkind == HK_F && iters == 6'd0) begin   // 0x80: mid-state into H
            fsm <= ST_IDLE;
            for (int i = 0; i < 8; i++) h[i] <= IV[i] + vn[i];
          end else fsm <= ST_LOAD;
        end
        ST_LOAD: begin
          // format the block from X (or SK.seed), start from the mid-state
          for (int i = 0; i < 16; i++) w[i] <= be_word(blk, i);
          for (int i = 0; i < 8; i++) begin
            v[i] <= mid[i];
            h[i] <= mid[i];
          end
          t   <= '0;
          fsm <= ST_HASH;
          if (hkind == HK_F) iters <= iters - 6'd1;
        end
        ST_HASH: if (last) begin
          for (int i = 0; i < 8; i++) h[i] <= h[i] + vn[i];
          if (hkind == HK_PRF) begin
            if (iters != 6'd0) begin
              adrs  <= adrs_set_type(adrs, ADRS_WOTS_HASH);
              hkind <= HK_F;
              fsm   <= ST_LOAD;
            end else fsm <= ST_IDLE;
          end else begin
            adrs <= adrs_inc_hash(adrs);
            fsm  <= (iters != 6'd0) ? ST_LOAD : ST_IDLE;
          end
        end
        default: fsm <= ST_IDLE;
      endcase
    end
  end

  assign busy_o = (fsm != ST_IDLE);
endmodule
