// tb_keccak_ti3_round: checks the three-share Keccak round. A fixed state is
// split into three random shares, the round is applied 24 times, and the XOR
// of the shares must equal the Keccak-f[1600] result computed independently.
// It also checks non-completeness of chi: share A of the output must not
// change when only share A of the input changes in a way theta cannot see
// (a flip of the same bit in two lanes of one column, which cancels in the
// column parity), and likewise for shares B and C.
module tb_keccak_ti3_round;
  import sloth_pkg::*;

  localparam logic [1599:0] PERM24 = 1600'h38ad50bdf89b110946d9b6fe11ab6617f58265b0ee0c3a75c44070c1bd7a44ac67f47fcd1434ed7e64692a092bc47df3b862dfda9c1481cace1800491ce416d6f0c11c347af534ebc448cf9898a1a936571ed87b541cbbbbc4434a3c00565c858e7072fc68785c478e9c099d0b042b38a3a6b15cf9e4a79d8dc8eb44ac686caccc2d7ebef2328215a81c2fae72792b1e0519b9747f85c42c42f7734d5c5cb55bab2760e4571548e1d44593d9d4791cacce5506cb0b82e0777b90fc9a732c47adc572ca66a6dad4a0;

  logic [1599:0] a_in, b_in, c_in, a_out, b_out, c_out;
  logic [63:0]   rc;
  int checks = 0, failures = 0;

  keccak_ti3_round dut (.sa_i(a_in), .sb_i(b_in), .sc_i(c_in), .rc_i(rc),
                        .sa_o(a_out), .sb_o(b_out), .sc_o(c_out));

  task automatic check(input string what, input logic [1599:0] got, input logic [1599:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  logic [1599:0] st0, ra, rb, sa, sb, sc, flip, ref_a, ref_b, ref_c;

  initial begin
    for (int i = 0; i < 200; i++) st0[8*i +: 8] = 8'(11 * i + 8'h5a);
    for (int i = 0; i < 50; i++) begin
      ra[32*i +: 32] = $urandom;
      rb[32*i +: 32] = $urandom;
    end
    sa = st0 ^ ra ^ rb;
    sb = ra;
    sc = rb;
    for (int r = 0; r < 24; r++) begin
      a_in = sa; b_in = sb; c_in = sc; rc = keccak_rc(5'(r));
      #1;
      sa = a_out; sb = b_out; sc = c_out;
    end
    check("24 rounds, recombined", sa ^ sb ^ sc, PERM24);
    check("shares differ from result", 1600'(sa == PERM24), 1600'(0));

    // non-completeness: flip bit 5 of lanes (1,0) and (1,1): column parity unchanged
    flip = '0;
    flip[64*1 + 5] = 1'b1;
    flip[64*6 + 5] = 1'b1;
    a_in = ra; b_in = rb; c_in = st0; rc = 64'h0;
    #1;
    ref_a = a_out; ref_b = b_out; ref_c = c_out;
    a_in = ra ^ flip;
    #1;
    check("share A out independent of share A in", a_out, ref_a);
    check("share A in reaches other shares", 1600'((b_out == ref_b) && (c_out == ref_c)), 1600'(0));
    a_in = ra; b_in = rb ^ flip;
    #1;
    check("share B out independent of share B in", b_out, ref_b);
    b_in = rb; c_in = st0 ^ flip;
    #1;
    check("share C out independent of share C in", c_out, ref_c);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
