// field_alu: modular adder/subtracter of the Ed448 field arithmetic unit.
//
// Computes (a + b) mod p or (a - b) mod p for canonical inputs (< p),
// p = 2^448 - 2^224 - 1, and registers the canonical result: `valid` rises
// one cycle after `start`. Addition subtracts p when the sum reaches p;
// subtraction adds p back when it borrows.
//
// The published design places an arithmetic unit for field operations in the lowest
// stage of the architecture but gives no detail of the adder; the one-cycle,
// fully reduced, full-width form here is this design's choice (the published design
// keeps redundant 128-bit digits instead).
module field_alu
  import ed448_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  alu_op_e op,
  input  fe_t     a,
  input  fe_t     b,
  output fe_t     c,
  output logic    valid
);

  logic [FW:0] sum, sum_m_p, diff, diff_p_p;
  fe_t         res;

  always_comb begin
    sum      = {1'b0, a} + {1'b0, b};
    sum_m_p  = sum - {1'b0, P};
    diff     = {1'b0, a} - {1'b0, b};
    diff_p_p = diff + {1'b0, P};
    if (op == ALU_ADD) res = sum_m_p[FW] ? sum[FW-1:0] : sum_m_p[FW-1:0];
    else               res = diff[FW]    ? diff_p_p[FW-1:0] : diff[FW-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c     <= '0;
      valid <= 1'b0;
    end else begin
      valid <= start;
      if (start) c <= res;
    end
  end

endmodule
