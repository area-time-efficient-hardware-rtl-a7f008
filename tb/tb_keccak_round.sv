// tb_keccak_round: self-checking test of one Keccak-f[1600] round.
// The input state has lane i = i * 0x9E3779B97F4A7C15 (mod 2^64). Expected
// states were computed with an independent software model of Keccak-f[1600]
// that was itself checked against a SHAKE256 library: round 0 alone, round 5
// alone, and all 24 rounds chained (the full permutation), compared lane by
// lane. The round index only selects the iota constant, so for every round r
// the output differs from the round-0 output only in lane (0,0), by
// RC[r] ^ RC[0]; the 24 standard round constants are listed below.
module tb_keccak_round;
  logic [1599:0] state_in, state_out, pat, s;
  logic [4:0]    rnd;
  int checks = 0, failures = 0;

  localparam logic [1599:0] EXP_R0  = 1600'h005c69c167f639668c5b05238d60184aff865aa6843667489b155bb6a723d2ff1149d424979e939c7c04a548196e669e1b5a682e4d0fb517877cfb2a3ad43d591ddc512958b450c08ea62fea3b92ef776eb7338223ceca489baae42a76d1c967fca50d2d1fcb9d11321f5ce419c0f2ca84fb38bc3d6216cae4b0e9e3aef552f0d7141b75bee40ec26f4205fd265a8c3f5ac45d79170855aab03324fc3b4904fc91c28a80fae1f769f1b7ea61588eb5179bf53c8a4593c0445592a9a57be78c954ceb819b9831ab5a;
  localparam logic [1599:0] EXP_R5  = 1600'h005c69c167f639668c5b05238d60184aff865aa6843667489b155bb6a723d2ff1149d424979e939c7c04a548196e669e1b5a682e4d0fb517877cfb2a3ad43d591ddc512958b450c08ea62fea3b92ef776eb7338223ceca489baae42a76d1c967fca50d2d1fcb9d11321f5ce419c0f2ca84fb38bc3d6216cae4b0e9e3aef552f0d7141b75bee40ec26f4205fd265a8c3f5ac45d79170855aab03324fc3b4904fc91c28a80fae1f769f1b7ea61588eb5179bf53c8a4593c0445592a9a57be78c954ceb819b1831ab5a;
  localparam logic [1599:0] EXP_F24 = 1600'hbf9436545f4e31d19f06dabe2767a3041bfee53564d37054e4df9661fa5e00cc7ab625ca0be6fddbdce588222470021859bc6e94f3aede1f59d4ed73f35f7c37b5d9b0ae638a1fa26074dc12601e9d588dcada3bb008dfc84cce45e92e03481e46705bd7a95a7b395c91a515ff4aea8058419fa868c81e23085778b8426d1fbe04e074f28f3d29cb97813c19723b03b1c672c623245b0cd9de5762969ecd66ccb9e7a9170ef9f924b1d44b484b1c07f3186b01ea8396a727b6c8ddf17d45934331d0ead06c02003e;

  localparam logic [63:0] RC [24] = '{
    64'h0000000000000001, 64'h0000000000008082, 64'h800000000000808A, 64'h8000000080008000,
    64'h000000000000808B, 64'h0000000080000001, 64'h8000000080008081, 64'h8000000000008009,
    64'h000000000000008A, 64'h0000000000000088, 64'h0000000080008009, 64'h000000008000000A,
    64'h000000008000808B, 64'h800000000000008B, 64'h8000000000008089, 64'h8000000000008003,
    64'h8000000000008002, 64'h8000000000000080, 64'h000000000000800A, 64'h800000008000000A,
    64'h8000000080008081, 64'h8000000000008080, 64'h0000000080000001, 64'h8000000080008008};

  keccak_round dut (.*);

  task automatic check(input string what, input logic [1599:0] exp);
    for (int l = 0; l < 25; l++) begin
      checks++;
      if (state_out[64*l +: 64] !== exp[64*l +: 64]) begin
        failures++;
        $display("FAIL %s lane %0d", what, l);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 25; i++) pat[64*i +: 64] = 64'(i) * 64'h9E3779B97F4A7C15;
    state_in = pat; rnd = 5'd0; #1; check("round 0", EXP_R0);
    state_in = pat; rnd = 5'd5; #1; check("round 5", EXP_R5);
    for (int r = 0; r < 24; r++) begin
      state_in = pat; rnd = 5'(r); #1;
      check($sformatf("round %0d", r),
            EXP_R0 ^ {1536'b0, RC[r] ^ RC[0]});
    end
    s = pat;
    for (int r = 0; r < 24; r++) begin
      state_in = s; rnd = 5'(r); #1;
      s = state_out;
    end
    check("24 rounds", EXP_F24);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
