// keccak_ti3_round: one Keccak-f[1600] round on a state split into three
// Boolean shares (A ^ B ^ C is the real state), a threshold implementation.
//
// theta, rho and pi are linear and are applied to each share separately; the
// round constant (iota) is added to share A only. The nonlinear chi step uses
// the classic three-share threshold form, in which every output share is
// computed from the other two input shares only (non-completeness):
//   a'[i] = b[i] ^ (~b[i+1] & b[i+2]) ^ (b[i+1] & c[i+2]) ^ (c[i+1] & b[i+2])
//   b'[i] = c[i] ^ (~c[i+1] & c[i+2]) ^ (c[i+1] & a[i+2]) ^ (a[i+1] & c[i+2])
//   c'[i] = a[i] ^ (~a[i+1] & a[i+2]) ^ (a[i+1] & b[i+2]) ^ (b[i+1] & a[i+2])
// The XOR of the three outputs equals chi of the XOR of the inputs.
// The document names a three-share threshold Keccak but gives no equations;
// this form and the absence of fresh re-masking randomness are this design's
// choices. Purely combinational; the lane packing is that of keccak_round.
module keccak_ti3_round (
  input  logic [1599:0] sa_i,
  input  logic [1599:0] sb_i,
  input  logic [1599:0] sc_i,
  input  logic [63:0]   rc_i,
  output logic [1599:0] sa_o,
  output logic [1599:0] sb_o,
  output logic [1599:0] sc_o
);
  localparam int ROT [25] = '{
     0,  1, 62, 28, 27,
    36, 44,  6, 55, 20,
     3, 10, 43, 25, 39,
    41, 45, 15, 21,  8,
    18,  2, 61, 56, 14};

  function automatic logic [63:0] rotl(input logic [63:0] v, input int r);
    return (r == 0) ? v : ((v << r) | (v >> (64 - r)));
  endfunction

  // theta, rho and pi of one share: returns the pre-chi lanes B
  function automatic logic [1599:0] linear(input logic [1599:0] s);
    logic [63:0] a [25];
    logic [63:0] c [5];
    logic [63:0] d [5];
    logic [1599:0] r;
    for (int i = 0; i < 25; i++) a[i] = s[64*i +: 64];
    for (int x = 0; x < 5; x++) c[x] = a[x] ^ a[x+5] ^ a[x+10] ^ a[x+15] ^ a[x+20];
    for (int x = 0; x < 5; x++) d[x] = c[(x+4)%5] ^ rotl(c[(x+1)%5], 1);
    r = '0;
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        r[64*(y + 5*((2*x + 3*y) % 5)) +: 64] = rotl(a[x + 5*y] ^ d[x], ROT[x + 5*y]);
    return r;
  endfunction

  logic [1599:0] la, lb, lc;
  logic [63:0] a0, a1, a2, b0, b1, b2, c0, c1, c2;

  always_comb begin
    la = linear(sa_i);
    lb = linear(sb_i);
    lc = linear(sc_i);
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++) begin
        a0 = la[64*(x + 5*y) +: 64];
        a1 = la[64*((x+1)%5 + 5*y) +: 64];
        a2 = la[64*((x+2)%5 + 5*y) +: 64];
        b0 = lb[64*(x + 5*y) +: 64];
        b1 = lb[64*((x+1)%5 + 5*y) +: 64];
        b2 = lb[64*((x+2)%5 + 5*y) +: 64];
        c0 = lc[64*(x + 5*y) +: 64];
        c1 = lc[64*((x+1)%5 + 5*y) +: 64];
        c2 = lc[64*((x+2)%5 + 5*y) +: 64];
        sa_o[64*(x + 5*y) +: 64] = b0 ^ (~b1 & b2) ^ (b1 & c2) ^ (c1 & b2);
        sb_o[64*(x + 5*y) +: 64] = c0 ^ (~c1 & c2) ^ (c1 & a2) ^ (a1 & c2);
        sc_o[64*(x + 5*y) +: 64] = a0 ^ (~a1 & a2) ^ (a1 & b2) ^ (b1 & a2);
      end
    sa_o[63:0] = sa_o[63:0] ^ rc_i;
  end
endmodule
