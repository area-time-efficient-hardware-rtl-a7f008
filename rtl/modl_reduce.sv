// modl_reduce: constant-time reduction modulo the group order L, and the
// scalar multiply-add S = (r + h*s) mod L of signing.
//
// With L = 2^446 - l0 (l0 of 224 bits), a 912-bit x = x1*2^456 + x0 (x1, x0
// of 456 bits) is reduced in three rounds that all run, whatever x is:
//   round 1: x'   = x1*l0*2^10 + x0                (691 bits),
//            since 2^456 = 2^10*2^446 == 2^10*l0 (mod L);
//   round 2: x''  = x'1*l0 + x'0,   x' = x'1*2^446 + x'0  (470 bits);
//   round 3: x''' = x''1*l0 + x''0, x'' = x''1*2^446 + x''0 (447 bits);
// and a final conditional subtraction of L gives the canonical result < L.
// The products are computed on the shared field multiplier in its
// non-modular mode, so this unit holds only registers and adders.
// With `muladd` set, the unit first forms x = ma*mb + mc on the multiplier
// (mc < 2^446), then reduces it.
//
// Interface: pulse `start` with the inputs stable until `done`; `done`
// pulses with `result`. The multiplier port (mul_*) must be granted to this
// unit while it is busy. Timing: 3 (or 4 with muladd) multiplications of 43
// cycles plus 2 cycles.
//
// From the published design: the split at 2^456 with the 2^10 shift, the two further
// rounds at 2^446 and the reuse of the modular multiplier without the
// reduction modulo p. This design's own choice: the final conditional
// subtraction, and the multiply-add mode for the signature scalar.
module modl_reduce
  import ed448_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          muladd,
  input  logic [PW-1:0] x,
  input  fe_t           ma,
  input  fe_t           mb,
  input  logic [445:0]  mc,
  output logic          busy,
  output logic          done,
  output logic [445:0]  result,
  // shared multiplier, non-modular mode
  output logic          mul_start,
  output logic [OW-1:0] mul_a,
  output logic [OW-1:0] mul_b,
  input  logic [PW-1:0] mul_c,
  input  logic          mul_valid
);

  typedef enum logic [2:0] {S_IDLE, S_MA, S_R1, S_R2, S_R3, S_FIN} state_e;
  state_e state;
  logic   issued;
  logic [PW-1:0] acc;

  logic [446:0] sub_l;
  assign sub_l = acc[446:0] - {1'b0, L};

  always_comb begin
    mul_a = '0;
    mul_b = OW'(L0);
    unique case (state)
      S_MA: begin mul_a = OW'(ma); mul_b = OW'(mb); end
      S_R1: mul_a = acc[911:456];
      S_R2: mul_a = OW'(acc[690:446]);
      S_R3: mul_a = OW'(acc[469:446]);
      default: ;
    endcase
  end

  assign mul_start = !issued && (state inside {S_MA, S_R1, S_R2, S_R3});
  assign busy      = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      issued <= 1'b0;
      acc    <= '0;
      result <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (mul_start) issued <= 1'b1;
      unique case (state)
        S_IDLE: if (start) begin
          acc    <= x;
          issued <= 1'b0;
          state  <= muladd ? S_MA : S_R1;
        end
        S_MA: if (mul_valid) begin
          acc    <= mul_c + PW'(mc);
          issued <= 1'b0;
          state  <= S_R1;
        end
        S_R1: if (mul_valid) begin
          acc    <= (mul_c << 10) + PW'(acc[455:0]);
          issued <= 1'b0;
          state  <= S_R2;
        end
        S_R2: if (mul_valid) begin
          acc    <= mul_c + PW'(acc[445:0]);
          issued <= 1'b0;
          state  <= S_R3;
        end
        S_R3: if (mul_valid) begin
          acc    <= mul_c + PW'(acc[445:0]);
          issued <= 1'b0;
          state  <= S_FIN;
        end
        S_FIN: begin
          result <= sub_l[446] ? acc[445:0] : sub_l[445:0];
          done   <= 1'b1;
          state  <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
