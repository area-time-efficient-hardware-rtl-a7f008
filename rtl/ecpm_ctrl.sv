// ecpm_ctrl: point-multiplication controller of the Ed448 core (FSM + program ROM).
//
// Computes the affine Edwards point Q = [k]P for a base point P given in the
// Montgomery domain, following the four steps of the point multiplication:
//  1. the base point arrives already mapped to the Montgomery curve
//     (affine u, v) together with a projectively randomized copy
//     (lambda*u : lambda), the DPA countermeasure; both come from outside;
//  2. a Montgomery ladder on X/Z coordinates over k_Mont = k >> 2, bits 445
//     down to 0, one differential addition and one doubling per bit
//     (10 multiplications, 8 additions), constant time;
//  3. recovery of the Montgomery Y coordinate from P, [k']P and [k'+1]P
//     (Okeya-Sakurai);
//  4. the dual 4-isogeny back to the Edwards curve, which multiplies by 4
//     again, and one inversion by Fermat's little theorem (R = Z^(p-2), a
//     fixed square-and-multiply chain), giving affine x and y.
// For a scalar that is not a multiple of 4 (a signing nonce reduced mod L)
// the controller first adds j*L, j = k mod 4, which leaves [k]P unchanged for
// a point of order L and makes the scalar a multiple of 4; clamped secret
// scalars are already multiples of 4 and pass unchanged.
//
// The program is a ROM of 77 micro-instructions {op, sw, dst, a, b}: load an
// input or a constant, field add/sub (field_alu), field multiply (kara_mult),
// multiply-if-exponent-bit, and two loop instructions. The ladder's
// conditional swap is done by address renaming: in instructions with `sw`
// set, the addresses of (X2,Z2) and (X3,Z3) are exchanged when the current
// key bit is 1, so no data moves.
//
// Interface: pulse `start` with k and the base-point inputs stable; `done`
// pulses when x_out/y_out hold the result. The controller drives the memory
// unit's read/write ports, and hands operands read from the memory to the
// adder and the multiplier, one operation at a time; a multiplication takes
// 43 cycles, an addition 2, a load 1. One point multiplication takes
// 239,375 cycles from the start cycle to done.
// The operand buses alu_a/alu_b and mul_a/mul_b are wired straight from the
// memory read data: the controller only steers addresses, the shared
// memory feeds the arithmetic units directly.
//
// From the published design: the Montgomery ladder of Algorithm 1 with k >> 2 and 446
// iterations, y recovery, the dual isogenous map of eqs. (6)-(7), FLT
// inversion and the externally supplied randomized base point (eq. 12). This
// design's own choice: the ladder formulas (x-only with a24 = 39081), the
// recovery and map formulas in projective form with one shared inversion, the
// micro-instruction format and the j*L adjustment.
module ecpm_ctrl
  import ed448_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  fe_t        k,
  input  fe_t        u,
  input  fe_t        v,
  input  fe_t        xr,
  input  fe_t        zr,
  output logic       busy,
  output logic       done,
  output fe_t        x_out,
  output fe_t        y_out,
  // memory unit
  output logic       mem_we,
  output logic [4:0] mem_waddr,
  output fe_t        mem_wdata,
  output logic [4:0] mem_raddr_a,
  output logic [4:0] mem_raddr_b,
  input  fe_t        mem_rdata_a,
  input  fe_t        mem_rdata_b,
  // field adder
  output logic       alu_start,
  output alu_op_e    alu_op,
  output fe_t        alu_a,
  output fe_t        alu_b,
  input  fe_t        alu_c,
  input  logic       alu_valid,
  // field multiplier
  output logic       mul_start,
  output fe_t        mul_a,
  output fe_t        mul_b,
  input  fe_t        mul_c,
  input  logic       mul_valid
);

  typedef enum logic [3:0] {
    OP_LDI, OP_LDC, OP_ADD, OP_SUB, OP_MUL, OP_MULE, OP_LOOPL, OP_LOOPI, OP_OUT
  } uop_e;

  typedef struct packed {
    uop_e       op;
    logic       sw;     // ladder instruction: conditional swap by renaming
    logic [4:0] dst;
    logic [4:0] a;
    logic [4:0] b;
  } uinstr_t;

  localparam logic [6:0] LADDER_PC = 7'd9;
  localparam logic [6:0] INV_PC    = 7'd71;
  localparam fe_t        EXP_INV   = P - fe_t'(2);

  function automatic uinstr_t urom(input logic [6:0] pc);
    uinstr_t i;
    unique case (pc)
      7'd0: i = '{op: OP_LDI, sw: 1'b0, dst: 5'd0, a: 5'd0, b: 5'd0};  // affine u of the base point
      7'd1: i = '{op: OP_LDI, sw: 1'b0, dst: 5'd1, a: 5'd1, b: 5'd0};  // affine v of the base point
      7'd2: i = '{op: OP_LDI, sw: 1'b0, dst: 5'd6, a: 5'd2, b: 5'd0};  // randomized X of P1 = lambda*u
      7'd3: i = '{op: OP_LDI, sw: 1'b0, dst: 5'd7, a: 5'd3, b: 5'd0};  // randomized Z of P1 = lambda
      7'd4: i = '{op: OP_LDC, sw: 1'b0, dst: 5'd4, a: 5'd1, b: 5'd0};  // P0 = (1 : 0), the neutral element
      7'd5: i = '{op: OP_LDC, sw: 1'b0, dst: 5'd5, a: 5'd0, b: 5'd0};
      7'd6: i = '{op: OP_LDC, sw: 1'b0, dst: 5'd10, a: 5'd0, b: 5'd0};
      7'd7: i = '{op: OP_LDC, sw: 1'b0, dst: 5'd8, a: 5'd2, b: 5'd0};
      7'd8: i = '{op: OP_LDC, sw: 1'b0, dst: 5'd9, a: 5'd3, b: 5'd0};
      7'd9: i = '{op: OP_ADD, sw: 1'b1, dst: 5'd12, a: 5'd4, b: 5'd5};  // ladder step: A = X2 + Z2
      7'd10: i = '{op: OP_SUB, sw: 1'b1, dst: 5'd13, a: 5'd4, b: 5'd5};  // B = X2 - Z2
      7'd11: i = '{op: OP_MUL, sw: 1'b1, dst: 5'd14, a: 5'd12, b: 5'd12};  // AA
      7'd12: i = '{op: OP_MUL, sw: 1'b1, dst: 5'd15, a: 5'd13, b: 5'd13};  // BB
      7'd13: i = '{op: OP_ADD, sw: 1'b1, dst: 5'd16, a: 5'd6, b: 5'd7};  // C
      7'd14: i = '{op: OP_SUB, sw: 1'b1, dst: 5'd17, a: 5'd6, b: 5'd7};  // D
      7'd15: i = '{op: OP_MUL, sw: 1'b1, dst: 5'd18, a: 5'd17, b: 5'd12};  // DA
      7'd16: i = '{op: OP_MUL, sw: 1'b1, dst: 5'd19, a: 5'd16, b: 5'd13};  // CB
      7'd17: i = '{op: OP_ADD, sw: 1'b1, dst: 5'd20, a: 5'd18, b: 5'd19};
      7'd18: i = '{op: OP_SUB, sw: 1'b1, dst: 5'd21, a: 5'd18, b: 5'd19};
      7'd19: i = '{op: OP_MUL, sw: 1'b1, dst: 5'd6, a: 5'd20, b: 5'd20};  // X3 = (DA + CB)^2
      7'd20: i = '{op: OP_MUL, sw: 1'b1, dst: 5'd21, a: 5'd21, b: 5'd21};
      7'd21: i = '{op: OP_MUL, sw: 1'b1, dst: 5'd7, a: 5'd21, b: 5'd0};  // Z3 = u * (DA - CB)^2
      7'd22: i = '{op: OP_MUL, sw: 1'b1, dst: 5'd4, a: 5'd14, b: 5'd15};  // X2 = AA * BB
      7'd23: i = '{op: OP_SUB, sw: 1'b1, dst: 5'd16, a: 5'd14, b: 5'd15};  // E = AA - BB
      7'd24: i = '{op: OP_MUL, sw: 1'b1, dst: 5'd17, a: 5'd8, b: 5'd16};
      7'd25: i = '{op: OP_ADD, sw: 1'b1, dst: 5'd17, a: 5'd14, b: 5'd17};
      7'd26: i = '{op: OP_MUL, sw: 1'b1, dst: 5'd5, a: 5'd16, b: 5'd17};  // Z2 = E * (AA + a24 * E)
      7'd27: i = '{op: OP_LOOPL, sw: 1'b0, dst: 5'd10, a: 5'd0, b: 5'd0};  // next key bit
      7'd28: i = '{op: OP_MUL, sw: 1'b0, dst: 5'd12, a: 5'd0, b: 5'd5};  // y recovery
      7'd29: i = '{op: OP_ADD, sw: 1'b0, dst: 5'd13, a: 5'd4, b: 5'd12};
      7'd30: i = '{op: OP_SUB, sw: 1'b0, dst: 5'd14, a: 5'd4, b: 5'd12};
      7'd31: i = '{op: OP_MUL, sw: 1'b0, dst: 5'd14, a: 5'd14, b: 5'd14};
      7'd32: i = '{op: OP_MUL, sw: 1'b0, dst: 5'd14, a: 5'd14, b: 5'd6};
      7'd33: i = '{op: OP_MUL, sw: 1'b0, dst: 5'd12, a: 5'd9, b: 5'd5};
      7'd34: i = '{op: OP_ADD, sw: 1'b0, dst: 5'd13, a: 5'd13, b: 5'd12};
      7'd35: i = '{op: OP_MUL, sw: 1'b0, dst: 5'd15, a: 5'd0, b: 5'd4};
      7'd36: i = '{op: OP_ADD, sw: 1'b0, dst: 5'd15, a: 5'd15, b: 5'd5};
      7'd37: i = '{op: OP_MUL, sw: 1'b0, dst: 5'd13, a: 5'd13, b: 5'd15};
      7'd38: i = '{op: OP_MUL, sw: 1'b0, dst: 5'd12, a: 5'd12, b: 5'd5};
      7'd39: i = '{op: OP_SUB, sw: 1'b0, dst: 5'd13, a: 5'd13, b: 5'd12};
      7'd40: i = '{op: OP_MUL, sw: 1'b0, dst: 5'd13, a: 5'd13, b: 5'd7};
      7'd41: i = '{op: OP_SUB, sw: 1'b0, dst: 5'd25, a: 5'd13, b: 5'd14};
      7'd42: i = '{op: OP_ADD, sw: 1'b0, dst: 5'd12, a: 5'd1, b: 5'd1};
      7'd43: i = '{op: OP_MUL, sw: 1'b0, dst: 5'd12, a: 5'd12, b: 5'd5};
      7'd44: i = '{op: OP_MUL, sw: 1'b0, dst: 5'd12, a: 5'd12, b: 5'd7};
      7'd45: i = '{op: OP_MUL, sw: 1'b0, dst: 5'd24, a: 5'd12, b: 5'd4};
      7'd46: i = '{op: OP_MUL, sw: 1'b0, dst: 5'd26, a: 5'd12, b: 5'd5};
      7'd47: i = '{op: OP_MUL, sw: 1'b0, dst: 5'd12, a: 5'd24, b: 5'd24};  // dual isogenous map
      7'd48: i = '{op: OP_MUL, sw: 1'b0, dst: 5'd13, a: 5'd26, b: 5'd26};
      7'd49: i = '{op: OP_SUB, sw: 1'b0, dst: 5'd14, a: 5'd12, b: 5'd13};  // X^2 - Z^2
      7'd50: i = '{op: OP_ADD, sw: 1'b0, dst: 5'd15, a: 5'd12, b: 5'd13};  // X^2 + Z^2
      7'd51: i = '{op: OP_MUL, sw: 1'b0, dst: 5'd16, a: 5'd25, b: 5'd26};  // YZ
      7'd52: i = '{op: OP_MUL, sw: 1'b0, dst: 5'd17, a: 5'd16, b: 5'd16};
      7'd53: i = '{op: OP_ADD, sw: 1'b0, dst: 5'd17, a: 5'd17, b: 5'd17};
      7'd54: i = '{op: OP_ADD, sw: 1'b0, dst: 5'd17, a: 5'd17, b: 5'd17};  // 4 Y^2 Z^2
      7'd55: i = '{op: OP_MUL, sw: 1'b0, dst: 5'd18, a: 5'd14, b: 5'd14};  // (X^2 - Z^2)^2
      7'd56: i = '{op: OP_MUL, sw: 1'b0, dst: 5'd19, a: 5'd14, b: 5'd16};
      7'd57: i = '{op: OP_ADD, sw: 1'b0, dst: 5'd19, a: 5'd19, b: 5'd19};
      7'd58: i = '{op: OP_ADD, sw: 1'b0, dst: 5'd19, a: 5'd19, b: 5'd19};  // numerator of x
      7'd59: i = '{op: OP_ADD, sw: 1'b0, dst: 5'd20, a: 5'd18, b: 5'd17};  // denominator of x
      7'd60: i = '{op: OP_SUB, sw: 1'b0, dst: 5'd21, a: 5'd18, b: 5'd17};
      7'd61: i = '{op: OP_MUL, sw: 1'b0, dst: 5'd21, a: 5'd24, b: 5'd21};  // numerator of y
      7'd62: i = '{op: OP_MUL, sw: 1'b0, dst: 5'd22, a: 5'd25, b: 5'd16};
      7'd63: i = '{op: OP_MUL, sw: 1'b0, dst: 5'd22, a: 5'd22, b: 5'd15};
      7'd64: i = '{op: OP_ADD, sw: 1'b0, dst: 5'd22, a: 5'd22, b: 5'd22};
      7'd65: i = '{op: OP_MUL, sw: 1'b0, dst: 5'd23, a: 5'd24, b: 5'd18};
      7'd66: i = '{op: OP_SUB, sw: 1'b0, dst: 5'd22, a: 5'd22, b: 5'd23};  // denominator of y
      7'd67: i = '{op: OP_MUL, sw: 1'b0, dst: 5'd27, a: 5'd19, b: 5'd22};
      7'd68: i = '{op: OP_MUL, sw: 1'b0, dst: 5'd28, a: 5'd21, b: 5'd20};
      7'd69: i = '{op: OP_MUL, sw: 1'b0, dst: 5'd29, a: 5'd20, b: 5'd22};
      7'd70: i = '{op: OP_ADD, sw: 1'b0, dst: 5'd30, a: 5'd29, b: 5'd10};  // inversion by Fermat: R = ZE^(p-2)
      7'd71: i = '{op: OP_MUL, sw: 1'b0, dst: 5'd30, a: 5'd30, b: 5'd30};
      7'd72: i = '{op: OP_MULE, sw: 1'b0, dst: 5'd30, a: 5'd30, b: 5'd29};
      7'd73: i = '{op: OP_LOOPI, sw: 1'b0, dst: 5'd10, a: 5'd0, b: 5'd0};
      7'd74: i = '{op: OP_MUL, sw: 1'b0, dst: 5'd2, a: 5'd27, b: 5'd30};  // affine x
      7'd75: i = '{op: OP_MUL, sw: 1'b0, dst: 5'd3, a: 5'd28, b: 5'd30};  // affine y
      7'd76: i = '{op: OP_OUT, sw: 1'b0, dst: 5'd10, a: 5'd2, b: 5'd3};
      default: i = '{op: OP_OUT, sw: 1'b0, dst: 5'd0, a: 5'd2, b: 5'd3};
    endcase
    return i;
  endfunction

  function automatic fe_t const_rom(input logic [1:0] n);
    unique case (n)
      2'd0:    return '0;
      2'd1:    return fe_t'(1);
      2'd2:    return A24;
      default: return TWO_A;
    endcase
  endfunction

  typedef enum logic [1:0] {S_IDLE, S_EXEC, S_WAIT} state_e;
  state_e state;

  logic [6:0]   pc;
  logic [445:0] kmont;
  logic [8:0]   idx;   // ladder bit index
  logic [8:0]   ei;    // inversion exponent bit index
  uinstr_t      ins;
  logic         sel;

  assign ins = urom(pc);
  assign sel = ins.sw && kmont[idx];

  function automatic logic [4:0] remap(input logic [4:0] ad, input logic s);
    return (s && ad[4:2] == 3'b001) ? (ad ^ 5'd2) : ad;
  endfunction

  // scalar adjustment: k + (k mod 4)*L is a multiple of 4 since L = 3 mod 4
  logic [449:0] kadj;
  assign kadj = 450'(k) + 450'(k[1:0]) * 450'(L);

  assign mem_raddr_a = remap(ins.a, sel);
  assign mem_raddr_b = remap(ins.b, sel);
  assign alu_a       = mem_rdata_a;
  assign alu_b       = mem_rdata_b;
  assign mul_a       = mem_rdata_a;
  assign mul_b       = mem_rdata_b;
  assign alu_op      = (ins.op == OP_SUB) ? ALU_SUB : ALU_ADD;
  assign busy        = (state != S_IDLE);

  always_comb begin
    alu_start = 1'b0;
    mul_start = 1'b0;
    mem_we    = 1'b0;
    mem_waddr = remap(ins.dst, sel);
    mem_wdata = '0;
    if (state == S_EXEC) begin
      unique case (ins.op)
        OP_LDI: begin
          mem_we = 1'b1;
          unique case (ins.a[1:0])
            2'd0:    mem_wdata = u;
            2'd1:    mem_wdata = v;
            2'd2:    mem_wdata = xr;
            default: mem_wdata = zr;
          endcase
        end
        OP_LDC: begin
          mem_we    = 1'b1;
          mem_wdata = const_rom(ins.a[1:0]);
        end
        OP_ADD, OP_SUB: alu_start = 1'b1;
        OP_MUL:         mul_start = 1'b1;
        OP_MULE:        mul_start = EXP_INV[ei];
        default: ;
      endcase
    end else if (state == S_WAIT) begin
      mem_we    = alu_valid || mul_valid;
      mem_wdata = mul_valid ? mul_c : alu_c;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      pc    <= '0;
      kmont <= '0;
      idx   <= '0;
      ei    <= '0;
      done  <= 1'b0;
      x_out <= '0;
      y_out <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          kmont <= kadj[447:2];
          idx   <= 9'd445;
          ei    <= 9'd446;
          pc    <= '0;
          state <= S_EXEC;
        end
        S_EXEC: begin
          unique case (ins.op)
            OP_LDI, OP_LDC: pc <= pc + 7'd1;
            OP_ADD, OP_SUB, OP_MUL: state <= S_WAIT;
            OP_MULE: if (EXP_INV[ei]) state <= S_WAIT;
                     else pc <= pc + 7'd1;
            OP_LOOPL: if (idx != 0) begin
                        idx <= idx - 9'd1;
                        pc  <= LADDER_PC;
                      end else pc <= pc + 7'd1;
            OP_LOOPI: if (ei != 0) begin
                        ei <= ei - 9'd1;
                        pc <= INV_PC;
                      end else pc <= pc + 7'd1;
            default: begin   // OP_OUT
              x_out <= mem_rdata_a;
              y_out <= mem_rdata_b;
              done  <= 1'b1;
              state <= S_IDLE;
            end
          endcase
        end
        S_WAIT: if (alu_valid || mul_valid) begin
          pc    <= pc + 7'd1;
          state <= S_EXEC;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
