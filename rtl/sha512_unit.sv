// sha512_unit: memory-mapped SHA-512 compression function (FIPS 180-4),
// one round per clock cycle.
//
// Works like sha256_unit with 64-bit words and 80 rounds. Each 64-bit word is
// seen on the 32-bit bus as two registers, the low half at the lower address.
// Software writes H0..H7 and the 1024-bit block W0..W15 (big-endian words:
// message byte 0 is bits 63:56 of W0), then writes 1 to CTRL; the result is
// added into H. The message schedule is computed in place in W.
//
// Registers (byte offsets): 0x00..0x3c H0..H7 (lo, hi), 0x40..0xbc W0..W15
// (lo, hi), 0xc0 CTRL (write 1: start; read: 0 ready, 1 busy). Writes are
// ignored while busy; every access is answered one cycle after the request.
// A compression takes 80 cycles from the cycle after the start write.
// The document names a SHA2-512 round unit and gives 80 cycles per
// compression; the register layout and the bus are this design's choices.
module sha512_unit
  import sloth_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t req,
  output bus_rsp_t rsp,
  output logic     busy_o
);
  logic [63:0] h [8];
  logic [63:0] v [8];
  logic [63:0] w [16];
  logic [6:0]  t;
  logic        busy;

  function automatic logic [63:0] ror(input logic [63:0] x, input int r);
    return (x >> r) | (x << (64 - r));
  endfunction

  logic [63:0] s0, s1, ch, maj, t1, t2, wn;
  logic [63:0] vn [8];
  always_comb begin
    s1  = ror(v[4], 14) ^ ror(v[4], 18) ^ ror(v[4], 41);
    ch  = (v[4] & v[5]) ^ (~v[4] & v[6]);
    t1  = v[7] + s1 + ch + SHA512_K[t] + w[0];
    s0  = ror(v[0], 28) ^ ror(v[0], 34) ^ ror(v[0], 39);
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
    wn = (ror(w[14], 19) ^ ror(w[14], 61) ^ (w[14] >> 6)) + w[9]
       + (ror(w[1], 1) ^ ror(w[1], 8) ^ (w[1] >> 7)) + w[0];
  end

  logic [5:0]  widx;
  logic        acc, wr;
  logic [31:0] wmask;
  assign widx  = req.addr[7:2];
  assign acc   = req.valid && !rsp.ready;
  assign wr    = acc && (req.wstrb != 4'b0) && !busy;
  assign wmask = {{8{req.wstrb[3]}}, {8{req.wstrb[2]}}, {8{req.wstrb[1]}}, {8{req.wstrb[0]}}};

  // 32-bit view of a 64-bit register: half 0 = bits 31:0, half 1 = bits 63:32
  function automatic logic [63:0] put_half(input logic [63:0] old, input logic hi,
                                           input logic [31:0] d, input logic [31:0] m);
    logic [63:0] r;
    r = old;
    if (hi) r[63:32] = (old[63:32] & ~m) | (d & m);
    else    r[31:0]  = (old[31:0]  & ~m) | (d & m);
    return r;
  endfunction

  logic [31:0] rd_word;
  logic [63:0] rd_reg;
  always_comb begin
    rd_reg = '0;
    if (widx < 6'd16)      rd_reg = h[widx[3:1]];
    else if (widx < 6'd48) rd_reg = w[4'((widx - 6'd16) >> 1)];
    rd_word = widx[0] ? rd_reg[63:32] : rd_reg[31:0];
    if (widx == 6'd48) rd_word = {31'b0, busy};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 8; i++) begin
        h[i] <= '0;
        v[i] <= '0;
      end
      for (int i = 0; i < 16; i++) w[i] <= '0;
      t    <= '0;
      busy <= 1'b0;
      rsp  <= '0;
    end else begin
      rsp.ready <= acc;
      rsp.rdata <= rd_word;
      if (busy) begin
        for (int i = 0; i < 15; i++) w[i] <= w[i+1];
        w[15] <= wn;
        t     <= t + 7'd1;
        if (t == 7'd79) begin
          busy <= 1'b0;
          for (int i = 0; i < 8; i++) h[i] <= h[i] + vn[i];
        end else begin
          for (int i = 0; i < 8; i++) v[i] <= vn[i];
        end
      end else if (wr) begin
        if (widx < 6'd16)
          h[widx[3:1]] <= put_half(h[widx[3:1]], widx[0], req.wdata, wmask);
        else if (widx < 6'd48)
          w[4'((widx - 6'd16) >> 1)] <= put_half(w[4'((widx - 6'd16) >> 1)], widx[0], req.wdata, wmask);
        else if (widx == 6'd48 && req.wdata[0]) begin
          busy <= 1'b1;
          t    <= '0;
          for (int i = 0; i < 8; i++) v[i] <= h[i];
        end
      end
    end
  end

  assign busy_o = busy;
endmodule
