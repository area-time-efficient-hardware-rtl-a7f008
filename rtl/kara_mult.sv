// kara_mult: Ed448 field multiplier, refined Karatsuba over a pipelined
// schoolbook multiplier.
//
// An operand A is split as A = A1*2^224 + A0, Ai = a(2i+1)*2^112 + a(2i), so
// that A*B needs three 225-bit products at the top level,
//   A*B = (A10*B10 - A0*B0)*2^224 + (A1*B1 + A0*B0)   (mod p),
// with A10 = A1 + A0, and each of those three is formed by the refined
// Karatsuba identity at the middle level,
//   A0*B0 = (1 - 2^112)*(a0*b0 - 2^112*a1*b1) + 2^112*a10*b10.
// The nine 128x128-bit digit products are computed on the PSM in the order
//   a0b0, a1b1, a10b10, a2b2, a3b3, a32b32, a20b20, a31b31, a3210b3210,
// one every 4 cycles; a small ROM holds, for each of the nine, which of the
// four digits are summed to form its operands. Digit products go to the
// internal RAM; each middle-level recombination starts as soon as the third
// product of its group leaves the PSM (cycles 15, 27 and 39 after start,
// two cycles ahead of the i*12+5 of the published design).
// The top level folds 2^224*(A10B10 - A0B0) modulo p before adding
// A1B1 + A0B0 (interleaved reduction); a last stage folds the remaining
// bits above 2^448 and subtracts p once, so the result is canonical (< p).
//
// In non-modular mode (`nonmod`) the same schedule yields the exact product
//   A*B = A1B1*2^448 + (A10B10 - A0B0 - A1B1)*2^224 + A0B0
// of two 456-bit operands (912-bit result), used by the mod-L reduction.
//
// Interface: `start` captures `a`, `b` and `nonmod` in the input registers;
// `valid` pulses with the result in `c` LATENCY = 42 cycles after the start
// cycle; `busy` is high in between. Modular mode expects a, b < 2^448.
//
// From the published design: the digit split, the two Karatsuba levels, the product
// order and the 4-cycle issue rate, the internal RAM, interleaved top-level
// reduction and the reuse for non-modular products. This design's own
// choice: the recombinations use full-width adders in one cycle each instead
// of a 128-bit digit-serial adder, so the result is produced 42 cycles after
// start, and the top digit is 120 bits wide so that 456-bit operands fit.
module kara_mult
  import ed448_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          nonmod,
  input  logic [OW-1:0] a,
  input  logic [OW-1:0] b,
  output logic [PW-1:0] c,
  output logic          valid,
  output logic          busy
);

  localparam int unsigned MW = 480;   // middle-level result width
  localparam int unsigned NP = 9;     // digit products per multiplication

  // ---------------------------------------------------------------- input regs
  logic [OW-1:0] a_r, b_r;
  logic          nonmod_r;

  function automatic logic [DPW-1:0] digit(input logic [OW-1:0] x, input int i);
    logic [DPW-1:0] d;
    unique case (i)
      0:       d = DPW'(x[111:0]);
      1:       d = DPW'(x[223:112]);
      2:       d = DPW'(x[335:224]);
      default: d = DPW'(x[455:336]);
    endcase
    return d;
  endfunction

  // Operand ROM: which digits are summed for digit product n.
  function automatic logic [3:0] digit_mask(input logic [3:0] n);
    logic [3:0] m;
    unique case (n)
      4'd0:    m = 4'b0001;   // a0
      4'd1:    m = 4'b0010;   // a1
      4'd2:    m = 4'b0011;   // a10
      4'd3:    m = 4'b0100;   // a2
      4'd4:    m = 4'b1000;   // a3
      4'd5:    m = 4'b1100;   // a32
      4'd6:    m = 4'b0101;   // a20
      4'd7:    m = 4'b1010;   // a31
      default: m = 4'b1111;   // a3210
    endcase
    return m;
  endfunction

  function automatic logic [DPW-1:0] digit_sum(input logic [OW-1:0] x, input logic [3:0] m);
    logic [DPW-1:0] s;
    s = '0;
    for (int i = 0; i < 4; i++)
      if (m[i]) s = s + digit(x, i);
    return s;
  endfunction

  // ---------------------------------------------------------------- control
  typedef enum logic [1:0] {S_IDLE, S_PROD, S_TOP, S_RED} state_e;
  state_e state;

  logic [3:0] iss;     // next digit product to issue
  logic [3:0] rcnt;    // next digit product to come out of the PSM

  logic           psm_start, psm_ready, psm_valid;
  logic [DPW-1:0] psm_a, psm_b, m0, m1;

  assign psm_start = (state == S_PROD) && (iss < 4'(NP)) && psm_ready;
  assign psm_a     = digit_sum(a_r, digit_mask(iss));
  assign psm_b     = digit_sum(b_r, digit_mask(iss));

  psm u_psm (
    .clk   (clk),
    .rst_n (rst_n),
    .start (psm_start),
    .a     (psm_a),
    .b     (psm_b),
    .ready (psm_ready),
    .m0    (m0),
    .m1    (m1),
    .valid (psm_valid)
  );

  // ---------------------------------------------------------------- int RAM
  logic [3:0]   ram_ra, ram_rb;
  logic [255:0] ram_da, ram_db;

  assign ram_ra = rcnt - 4'd2;
  assign ram_rb = rcnt - 4'd1;

  mult_int_ram #(.DEPTH(16), .WIDTH(256)) u_int_ram (
    .clk     (clk),
    .we      (psm_valid),
    .waddr   (rcnt),
    .wdata   ({m1, m0}),
    .raddr_a (ram_ra),
    .rdata_a (ram_da),
    .raddr_b (ram_rb),
    .rdata_b (ram_db)
  );

  // ---------------------------------------------------------------- middle level
  // (1 - 2^112)*(x - 2^112*y) + 2^112*z, exact in MW bits (result >= 0).
  logic [MW-1:0] mid_t, mid_res;
  always_comb begin
    mid_t   = MW'(ram_da) - (MW'(ram_db) << DIGW);
    mid_res = mid_t - (mid_t << DIGW) + (MW'({m1, m0}) << DIGW);
  end

  logic [MW-1:0] mid [3];     // A0B0, A1B1, A10B10

  // ---------------------------------------------------------------- top level
  logic [PW-1:0] top_r;
  logic [MW-1:0] diff, dh;
  logic [MW:0]   ssum;
  logic [PW-1:0] top_mod, top_full;

  always_comb begin
    diff     = mid[2] - mid[0];
    ssum     = {1'b0, mid[0]} + {1'b0, mid[1]};
    // 2^224*diff = dh*2^448 + dl*2^224 == dh*(2^224 + 1) + dl*2^224  (mod p)
    dh       = diff >> 224;
    top_mod  = (PW'(dh) << 224) + PW'(dh) + (PW'(diff[223:0]) << 224) + PW'(ssum);
    top_full = (PW'(mid[1]) << 448) + (PW'(diff - mid[1]) << 224) + PW'(mid[0]);
  end

  // ---------------------------------------------------------------- final reduction
  logic [PW-1:0] f1;
  logic [FW+1:0] f2;
  logic [FW:0]   f3;
  fe_t           red;
  always_comb begin
    f1  = PW'(top_r[FW-1:0]) + (top_r >> FW) + ((top_r >> FW) << 224);
    f2  = (FW+2)'(f1[FW-1:0]) + (FW+2)'(f1 >> FW) + ((FW+2)'(f1 >> FW) << 224);
    f3  = f2[FW:0] - {1'b0, P};
    red = f3[FW] ? f2[FW-1:0] : f3[FW-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      a_r      <= '0;
      b_r      <= '0;
      nonmod_r <= 1'b0;
      iss      <= '0;
      rcnt     <= '0;
      top_r    <= '0;
      c        <= '0;
      valid    <= 1'b0;
      for (int g = 0; g < 3; g++) mid[g] <= '0;
    end else begin
      valid <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          a_r      <= a;
          b_r      <= b;
          nonmod_r <= nonmod;
          iss      <= '0;
          rcnt     <= '0;
          state    <= S_PROD;
        end
        S_PROD: begin
          if (psm_start) iss <= iss + 4'd1;
          if (psm_valid) begin
            rcnt <= rcnt + 4'd1;
            if (rcnt == 4'd2) mid[0] <= mid_res;
            if (rcnt == 4'd5) mid[1] <= mid_res;
            if (rcnt == 4'd8) begin
              mid[2] <= mid_res;
              state  <= S_TOP;
            end
          end
        end
        S_TOP: begin
          top_r <= nonmod_r ? top_full : top_mod;
          state <= S_RED;
        end
        S_RED: begin
          c     <= nonmod_r ? top_r : PW'(red);
          valid <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule
