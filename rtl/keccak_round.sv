// keccak_round: one round of the Keccak-f[1600] permutation (FIPS 202):
// theta, rho, pi, chi and iota, purely combinational.
//
// The 1600-bit state is packed as 25 little-endian 64-bit lanes, lane
// A[x][y] at bits 64*(x+5*y) +: 64, so state byte i sits at bits 8*i +: 8 as
// in the byte-serial SHAKE definition. The round constant is an input so the
// caller can run any round index (for reduced-round Keccak-p variants).
// The document names a Keccak round unit that computes one round per clock;
// the round itself is the standard one.
module keccak_round (
  input  logic [1599:0] state_i,
  input  logic [63:0]   rc_i,
  output logic [1599:0] state_o
);
  // rho rotation offsets, indexed by x + 5*y
  localparam int ROT [25] = '{
     0,  1, 62, 28, 27,
    36, 44,  6, 55, 20,
     3, 10, 43, 25, 39,
    41, 45, 15, 21,  8,
    18,  2, 61, 56, 14};

  function automatic logic [63:0] rotl(input logic [63:0] v, input int r);
    return (r == 0) ? v : ((v << r) | (v >> (64 - r)));
  endfunction

  logic [63:0] a [25];
  logic [63:0] b [25];
  logic [63:0] c [5];
  logic [63:0] d [5];

  always_comb begin
    for (int i = 0; i < 25; i++) a[i] = state_i[64*i +: 64];
    // theta
    for (int x = 0; x < 5; x++) c[x] = a[x] ^ a[x+5] ^ a[x+10] ^ a[x+15] ^ a[x+20];
    for (int x = 0; x < 5; x++) d[x] = c[(x+4)%5] ^ rotl(c[(x+1)%5], 1);
    for (int i = 0; i < 25; i++) a[i] = a[i] ^ d[i%5];
    // rho and pi: B[y][2x+3y] = rotl(A[x][y], r[x][y])
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        b[y + 5*((2*x + 3*y) % 5)] = rotl(a[x + 5*y], ROT[x + 5*y]);
    // chi
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        a[x + 5*y] = b[x + 5*y] ^ (~b[(x+1)%5 + 5*y] & b[(x+2)%5 + 5*y]);
    // iota
    a[0] = a[0] ^ rc_i;
    for (int i = 0; i < 25; i++) state_o[64*i +: 64] = a[i];
  end
endmodule
