// keccak_round: one round of the Keccak-f[1600] permutation (combinational).
//
// The 1600-bit state holds 25 lanes of 64 bits; lane (x, y) occupies bits
// [64*(x+5*y) +: 64]. The round applies theta, rho, pi, chi and iota. The
// rotation offsets and the 24 round constants are not stored as tables but
// computed at elaboration: the offsets by the (t+1)(t+2)/2 walk over the lane
// positions, the constants by the degree-8 LFSR x^8+x^6+x^5+x^4+1 of the
// Keccak specification. `rnd` (0..23) selects the round constant.
//
// The published design uses Keccak[r=1088, c=512] (SHAKE256) as its hash unit and
// gives no detail of it; one round per cycle is this design's choice.
module keccak_round (
  input  logic [1599:0] state_in,
  input  logic [4:0]    rnd,
  output logic [1599:0] state_out
);

  typedef logic [23:0][63:0] rc_table_t;
  typedef logic [24:0][5:0]  rho_table_t;

  function automatic logic rc_bit(input int t);
    logic [7:0] r;
    logic [8:0] r9;
    r = 8'h01;
    for (int i = 0; i < t % 255; i++) begin
      r9 = {r, 1'b0};
      r9[0] = r9[0] ^ r9[8];
      r9[4] = r9[4] ^ r9[8];
      r9[5] = r9[5] ^ r9[8];
      r9[6] = r9[6] ^ r9[8];
      r = r9[7:0];
    end
    return r[0];
  endfunction

  function automatic rc_table_t gen_rc();
    rc_table_t t;
    t = '0;
    for (int i = 0; i < 24; i++)
      for (int j = 0; j < 7; j++)
        t[i][(1 << j) - 1] = rc_bit(j + 7 * i);
    return t;
  endfunction

  function automatic rho_table_t gen_rho();
    rho_table_t r;
    int x, y, nx;
    r = '0;
    x = 1;
    y = 0;
    for (int t = 0; t < 24; t++) begin
      r[x + 5 * y] = 6'(((t + 1) * (t + 2) / 2) % 64);
      nx = y;
      y = (2 * x + 3 * y) % 5;
      x = nx;
    end
    return r;
  endfunction

  localparam rc_table_t  RC  = gen_rc();
  localparam rho_table_t RHO = gen_rho();

  function automatic logic [63:0] rotl(input logic [63:0] v, input int n);
    return (n == 0) ? v : ((v << n) | (v >> (64 - n)));
  endfunction

  always_comb begin
    logic [4:0][63:0]  c, d;
    logic [24:0][63:0] a, b;
    for (int i = 0; i < 25; i++) a[i] = state_in[64*i +: 64];
    // theta
    for (int x = 0; x < 5; x++)
      c[x] = a[x] ^ a[x + 5] ^ a[x + 10] ^ a[x + 15] ^ a[x + 20];
    for (int x = 0; x < 5; x++)
      d[x] = c[(x + 4) % 5] ^ rotl(c[(x + 1) % 5], 1);
    for (int i = 0; i < 25; i++) a[i] = a[i] ^ d[i % 5];
    // rho and pi: B[y, 2x+3y] = rot(A[x, y])
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        b[y + 5 * ((2 * x + 3 * y) % 5)] = rotl(a[x + 5 * y], int'(RHO[x + 5 * y]));
    // chi
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        a[x + 5 * y] = b[x + 5 * y] ^ (~b[(x + 1) % 5 + 5 * y] & b[(x + 2) % 5 + 5 * y]);
    // iota
    a[0] = a[0] ^ RC[rnd];
    for (int i = 0; i < 25; i++) state_out[64*i +: 64] = a[i];
  end

endmodule
