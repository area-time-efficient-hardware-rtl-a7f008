// ed448_pkg: constants and shared types of the Ed448 signature core.
//
// Field: p = 2^448 - 2^224 - 1 ("Goldilocks" prime, golden ratio 2^224).
// Group order: L = 2^446 - l0, with l0 a 224-bit constant.
// Montgomery form of the curve (Curve448): v^2 = u^3 + A*u^2 + u, A = 156326,
// ladder constant a24 = (A-2)/4 = 39081.
// Multiplier operands are split into four radix-2^112 digits; the top digit is
// 120 bits wide so that 456-bit operands (needed by the mod-L reduction) fit.
package ed448_pkg;

  localparam int unsigned FW   = 448;             // field element width
  localparam int unsigned OW   = 456;             // multiplier operand width
  localparam int unsigned PW   = 912;             // full (non-modular) product width
  localparam int unsigned DIGW = 112;             // Karatsuba digit radix 2^112
  localparam int unsigned DPW  = 128;             // digit datapath width
  localparam int unsigned HW   = 64;              // PSM half-digit width (64x64 multiplier)

  typedef logic [FW-1:0] fe_t;

  localparam fe_t P = {{223{1'b1}}, 1'b0, {224{1'b1}}};

  localparam logic [223:0] L0 =
    224'h8335dc163bb124b65129c96fde933d8d723a70aadc873d6d54a7bb0d;
  localparam logic [445:0] L = 446'({1'b1, 446'b0} - 447'(L0));

  localparam fe_t A24   = fe_t'(39081);
  localparam fe_t TWO_A = fe_t'(312652);

  // Field ALU operations.
  typedef enum logic [0:0] {ALU_ADD = 1'b0, ALU_SUB = 1'b1} alu_op_e;

endpackage
