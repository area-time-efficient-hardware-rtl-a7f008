// psm: pipelined schoolbook multiplier (PSM) of the Ed448 field multiplier.
//
// Forms the 256-bit product of two 128-bit digits with one 64x64-bit
// multiplier, in four passes: a0*b0, a1*b0, a0*b1, a1*b1 (a = a1*2^64 + a0),
// the order of the published design's scheduling diagram. Each partial product is
// registered (the DSP output register) and then shifted and added into a
// 256-bit accumulator whose halves are the outputs m0 (low) and m1 (high).
//
// Interface: `start` loads the operand registers from `a`/`b`. A new start is
// accepted every 4 cycles, so successive digit products overlap in the
// pipeline. `valid` pulses for one cycle when {m1,m0} holds a finished
// product, 6 cycles after the cycle in which start is high (operand load,
// four multiply passes, accumulation of the last pass).
//
// From the published design: the 64x64 multiplier, the two operand-half multiplexers,
// the 4-cycle rate and the 256-bit accumulator. This design's own choice: the
// accumulator adds shifted partial products instead of the shift-register
// arrangement drawn in the block diagram, and it only adds (the products are
// never negative here).
module psm
  import ed448_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [DPW-1:0]   a,
  input  logic [DPW-1:0]   b,
  output logic             ready,   // a start is accepted this cycle
  output logic [DPW-1:0]   m0,
  output logic [DPW-1:0]   m1,
  output logic             valid
);

  logic [DPW-1:0]   a_r, b_r;
  logic [1:0]       cnt;
  logic             run;

  // stage 1: 64x64 product register
  logic [2*HW-1:0]  prod_r;
  logic [1:0]       pidx_r;
  logic             pval_r;

  logic [2*DPW-1:0] acc;
  logic             acc_done;

  logic [HW-1:0] sel_a, sel_b;

  assign ready = !run || (cnt == 2'd3);

  always_comb begin
    sel_a = cnt[0] ? a_r[DPW-1:HW] : a_r[HW-1:0];
    sel_b = cnt[1] ? b_r[DPW-1:HW] : b_r[HW-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_r    <= '0;
      b_r    <= '0;
      cnt    <= '0;
      run    <= 1'b0;
      prod_r <= '0;
      pidx_r <= '0;
      pval_r <= 1'b0;
    end else begin
      // operand select and multiply
      pval_r <= run;
      pidx_r <= cnt;
      prod_r <= sel_a * sel_b;
      if (start && ready) begin
        a_r <= a;
        b_r <= b;
        cnt <= '0;
        run <= 1'b1;
      end else if (run) begin
        cnt <= cnt + 2'd1;
        if (cnt == 2'd3) run <= 1'b0;
      end
    end
  end

  // stage 2: shifted accumulation
  logic [2*DPW-1:0] addend;
  always_comb begin
    unique case (pidx_r)
      2'd0:    addend = {128'b0, prod_r};
      2'd1,
      2'd2:    addend = {64'b0, prod_r, 64'b0};
      default: addend = {prod_r, 128'b0};
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc      <= '0;
      acc_done <= 1'b0;
    end else begin
      acc_done <= pval_r && (pidx_r == 2'd3);
      if (pval_r) acc <= ((pidx_r == 2'd0) ? '0 : acc) + addend;
    end
  end

  assign m0    = acc[DPW-1:0];
  assign m1    = acc[2*DPW-1:DPW];
  assign valid = acc_done;

endmodule
