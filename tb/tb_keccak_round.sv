// tb_keccak_round: checks the combinational Keccak-f[1600] round by applying
// it 24 times (rounds 0..23) and 12 times (rounds 12..23, Keccak-p[1600,12])
// to a fixed state and comparing with permutation results computed
// independently; also checks the known permutation of the all-zero state.
module tb_keccak_round;
  import sloth_pkg::*;

  localparam logic [1599:0] PERM24 = 1600'h38ad50bdf89b110946d9b6fe11ab6617f58265b0ee0c3a75c44070c1bd7a44ac67f47fcd1434ed7e64692a092bc47df3b862dfda9c1481cace1800491ce416d6f0c11c347af534ebc448cf9898a1a936571ed87b541cbbbbc4434a3c00565c858e7072fc68785c478e9c099d0b042b38a3a6b15cf9e4a79d8dc8eb44ac686caccc2d7ebef2328215a81c2fae72792b1e0519b9747f85c42c42f7734d5c5cb55bab2760e4571548e1d44593d9d4791cacce5506cb0b82e0777b90fc9a732c47adc572ca66a6dad4a0;
  localparam logic [1599:0] PERM12 = 1600'hd5bab10260e6fc5a9b4d046030127fa818a26278e976ada7d1eb24bacf2f77d758f6f4a35b7e9a39689bb3ff3150f23a88e176adf79a2a24548d748c1ab0f202b7e7696b52fa539f810d17da5b6aeb6ca79dc6cae5856f850eb248a0502b9be4152e63d2287318c9562f12d85f9e62e42740c4c32812ecdc06f5ab327e345b0076ff7f53119c5e8840893b71acce45cba0524b5cba6e48026ecda229a4fe148a465d62acfb35e94c559a1015eb1789ceb0c32430127d4e924277f7b2b70bda73c82416b8346fa987;

  logic [1599:0] s_in, s_out;
  logic [63:0]   rc;
  int checks = 0, failures = 0;

  keccak_round dut (.state_i(s_in), .rc_i(rc), .state_o(s_out));

  task automatic check(input string what, input logic [1599:0] got, input logic [1599:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic permute(input logic [1599:0] init, input int first, output logic [1599:0] res);
    res = init;
    for (int r = first; r < 24; r++) begin
      s_in = res;
      rc   = keccak_rc(5'(r));
      #1;
      res = s_out;
    end
  endtask

  logic [1599:0] st0, res;

  initial begin
    for (int i = 0; i < 200; i++) st0[8*i +: 8] = 8'(11 * i + 8'h5a);
    permute(st0, 0, res);
    check("24 rounds", res, PERM24);
    permute(st0, 12, res);
    check("12 rounds", res, PERM12);
    permute('0, 0, res);
    check("zero state lane 0", 1600'(res[63:0]), 1600'(64'hF1258F7940E1DDE7));
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
