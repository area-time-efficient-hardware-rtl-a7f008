// dpm_ctrl: double-point multiplication controller for signature
// verification (FSM + program ROM).
//
// Checks the verification equation [S]B = R + [h]A of a signature by
// computing Q = [S]B + [h](-A) in one pass with Strauss' trick (a joint
// double-and-add over the bit pairs of S and h) on the Edwards curve in
// projective coordinates, and comparing Q with R: ok = (X_Q == x_R*Z_Q) and
// (Y_Q == y_R*Z_Q).
//  * precomputation: -A = (-x_A, y_A) and T = B + (-A);
//  * loop over bits 445..0: Q = 2Q (dedicated doubling, 3M + 4S), then, if
//    the bit pair (h_i, s_i) is not 00, Q = Q + {B, -A, T} with the unified
//    addition A = Z1Z2, B = A^2, C = X1X2, D = Y1Y2, E = dCD, F = B - E,
//    G = B + E, X3 = AF((X1+Y1)(X2+Y2) - C - D), Y3 = AG(D - C), Z3 = FG.
// Both scalars are public, so the loop skips the addition for a 00 pair and
// needs no side-channel protection. The table point is picked by address
// renaming: logical addresses 29..31 stand for the X, Y, Z of B, -A or T
// according to the current bit pair.
//
// The program is a ROM of 71 micro-instructions {op, dst, a, b}. Interface:
// pulse `start` with the inputs stable; `done` pulses with `ok`. Points are
// given in affine Edwards coordinates (decompressed by the host), S and h
// reduced mod L. The memory unit, field adder and multiplier are the same
// ones the point-multiplication controller uses; the top grants them to one
// controller at a time. Timing: 19 multiplications per bit with the
// addition, 7 without; about 320,000 cycles for random scalars.
//
// The operand buses alu_a/alu_b and mul_a/mul_b are wired straight from the
// memory read data: the controller only steers addresses, the shared
// memory feeds the arithmetic units directly.
//
// From the published design: verification by a double-point multiplication with a
// modified Strauss' trick, without SCA countermeasures; the unified addition
// formula (3) and the 3M + 4S doubling cost. This design's own choice: the
// unprotected joint double-and-add with a 3-point table, the projective
// comparison with R, and host-side point decompression.
module dpm_ctrl
  import ed448_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [445:0] s,
  input  logic [445:0] h,
  input  fe_t          bx,
  input  fe_t          by,
  input  fe_t          ax,
  input  fe_t          ay,
  input  fe_t          rx,
  input  fe_t          ry,
  output logic         busy,
  output logic         done,
  output logic         ok,
  // memory unit
  output logic         mem_we,
  output logic [4:0]   mem_waddr,
  output fe_t          mem_wdata,
  output logic [4:0]   mem_raddr_a,
  output logic [4:0]   mem_raddr_b,
  input  fe_t          mem_rdata_a,
  input  fe_t          mem_rdata_b,
  // field adder
  output logic         alu_start,
  output alu_op_e      alu_op,
  output fe_t          alu_a,
  output fe_t          alu_b,
  input  fe_t          alu_c,
  input  logic         alu_valid,
  // field multiplier
  output logic         mul_start,
  output fe_t          mul_a,
  output fe_t          mul_b,
  input  fe_t          mul_c,
  input  logic         mul_valid
);

  typedef enum logic [3:0] {
    OP_LDI, OP_LDC, OP_ADD, OP_SUB, OP_MUL, OP_SKIP, OP_LOOP, OP_OUT
  } uop_e;

  typedef struct packed {
    uop_e       op;
    logic [4:0] dst;
    logic [4:0] a;
    logic [4:0] b;
  } uinstr_t;

  localparam logic [6:0] LOOP_PC    = 7'd32;
  localparam logic [6:0] LOOPEND_PC = 7'd65;
  localparam fe_t        D_EDWARDS  = P - fe_t'(39081);

  function automatic uinstr_t urom(input logic [6:0] pc);
    uinstr_t i;
    unique case (pc)
      7'd0: i = '{op: OP_LDC, dst: 5'd11, a: 5'd0, b: 5'd0};  // constants
      7'd1: i = '{op: OP_LDC, dst: 5'd2, a: 5'd1, b: 5'd0};
      7'd2: i = '{op: OP_LDC, dst: 5'd10, a: 5'd2, b: 5'd0};  // Edwards d = -39081
      7'd3: i = '{op: OP_LDI, dst: 5'd0, a: 5'd0, b: 5'd0};  // base point B (affine)
      7'd4: i = '{op: OP_LDI, dst: 5'd1, a: 5'd1, b: 5'd0};
      7'd5: i = '{op: OP_LDI, dst: 5'd15, a: 5'd2, b: 5'd0};  // public key A, negated: -A = (-x, y)
      7'd6: i = '{op: OP_SUB, dst: 5'd3, a: 5'd11, b: 5'd15};
      7'd7: i = '{op: OP_LDI, dst: 5'd4, a: 5'd3, b: 5'd0};
      7'd8: i = '{op: OP_LDI, dst: 5'd5, a: 5'd4, b: 5'd0};  // signature point R (affine)
      7'd9: i = '{op: OP_LDI, dst: 5'd9, a: 5'd5, b: 5'd0};
      7'd10: i = '{op: OP_MUL, dst: 5'd15, a: 5'd2, b: 5'd2};  // T = B - A: A = Z1 Z2
      7'd11: i = '{op: OP_MUL, dst: 5'd16, a: 5'd15, b: 5'd15};  // B = A^2
      7'd12: i = '{op: OP_MUL, dst: 5'd17, a: 5'd0, b: 5'd3};  // C = X1 X2
      7'd13: i = '{op: OP_MUL, dst: 5'd18, a: 5'd1, b: 5'd4};  // D = Y1 Y2
      7'd14: i = '{op: OP_MUL, dst: 5'd19, a: 5'd17, b: 5'd18};
      7'd15: i = '{op: OP_MUL, dst: 5'd19, a: 5'd10, b: 5'd19};  // E = d C D
      7'd16: i = '{op: OP_SUB, dst: 5'd20, a: 5'd16, b: 5'd19};  // F = B - E
      7'd17: i = '{op: OP_ADD, dst: 5'd21, a: 5'd16, b: 5'd19};  // G = B + E
      7'd18: i = '{op: OP_ADD, dst: 5'd22, a: 5'd0, b: 5'd1};
      7'd19: i = '{op: OP_ADD, dst: 5'd23, a: 5'd3, b: 5'd4};
      7'd20: i = '{op: OP_MUL, dst: 5'd22, a: 5'd22, b: 5'd23};
      7'd21: i = '{op: OP_SUB, dst: 5'd22, a: 5'd22, b: 5'd17};
      7'd22: i = '{op: OP_SUB, dst: 5'd22, a: 5'd22, b: 5'd18};
      7'd23: i = '{op: OP_MUL, dst: 5'd24, a: 5'd15, b: 5'd20};
      7'd24: i = '{op: OP_MUL, dst: 5'd6, a: 5'd24, b: 5'd22};  // X3 = A F ((X1+Y1)(X2+Y2) - C - D)
      7'd25: i = '{op: OP_SUB, dst: 5'd25, a: 5'd18, b: 5'd17};
      7'd26: i = '{op: OP_MUL, dst: 5'd26, a: 5'd15, b: 5'd21};
      7'd27: i = '{op: OP_MUL, dst: 5'd7, a: 5'd26, b: 5'd25};  // Y3 = A G (D - C)
      7'd28: i = '{op: OP_MUL, dst: 5'd8, a: 5'd20, b: 5'd21};  // Z3 = F G
      7'd29: i = '{op: OP_LDC, dst: 5'd12, a: 5'd0, b: 5'd0};  // Q = neutral element (0 : 1 : 1)
      7'd30: i = '{op: OP_LDC, dst: 5'd13, a: 5'd1, b: 5'd0};
      7'd31: i = '{op: OP_LDC, dst: 5'd14, a: 5'd1, b: 5'd0};
      7'd32: i = '{op: OP_ADD, dst: 5'd15, a: 5'd12, b: 5'd13};  // Q = 2Q
      7'd33: i = '{op: OP_MUL, dst: 5'd15, a: 5'd15, b: 5'd15};  // B = (X+Y)^2
      7'd34: i = '{op: OP_MUL, dst: 5'd16, a: 5'd12, b: 5'd12};  // C = X^2
      7'd35: i = '{op: OP_MUL, dst: 5'd17, a: 5'd13, b: 5'd13};  // D = Y^2
      7'd36: i = '{op: OP_ADD, dst: 5'd18, a: 5'd16, b: 5'd17};  // E = C + D
      7'd37: i = '{op: OP_MUL, dst: 5'd19, a: 5'd14, b: 5'd14};  // H = Z^2
      7'd38: i = '{op: OP_ADD, dst: 5'd19, a: 5'd19, b: 5'd19};
      7'd39: i = '{op: OP_SUB, dst: 5'd19, a: 5'd18, b: 5'd19};  // J = E - 2H
      7'd40: i = '{op: OP_SUB, dst: 5'd15, a: 5'd15, b: 5'd18};
      7'd41: i = '{op: OP_MUL, dst: 5'd12, a: 5'd15, b: 5'd19};  // X = (B - E) J
      7'd42: i = '{op: OP_SUB, dst: 5'd20, a: 5'd16, b: 5'd17};
      7'd43: i = '{op: OP_MUL, dst: 5'd13, a: 5'd18, b: 5'd20};  // Y = E (C - D)
      7'd44: i = '{op: OP_MUL, dst: 5'd14, a: 5'd18, b: 5'd19};  // Z = E J
      7'd45: i = '{op: OP_SKIP, dst: 5'd11, a: 5'd0, b: 5'd0};  // no addition when both scalar bits are 0
      7'd46: i = '{op: OP_MUL, dst: 5'd15, a: 5'd14, b: 5'd31};  // Q = Q + {B, -A, B - A}: A = Z1 Z2
      7'd47: i = '{op: OP_MUL, dst: 5'd16, a: 5'd15, b: 5'd15};  // B = A^2
      7'd48: i = '{op: OP_MUL, dst: 5'd17, a: 5'd12, b: 5'd29};  // C = X1 X2
      7'd49: i = '{op: OP_MUL, dst: 5'd18, a: 5'd13, b: 5'd30};  // D = Y1 Y2
      7'd50: i = '{op: OP_MUL, dst: 5'd19, a: 5'd17, b: 5'd18};
      7'd51: i = '{op: OP_MUL, dst: 5'd19, a: 5'd10, b: 5'd19};  // E = d C D
      7'd52: i = '{op: OP_SUB, dst: 5'd20, a: 5'd16, b: 5'd19};  // F = B - E
      7'd53: i = '{op: OP_ADD, dst: 5'd21, a: 5'd16, b: 5'd19};  // G = B + E
      7'd54: i = '{op: OP_ADD, dst: 5'd22, a: 5'd12, b: 5'd13};
      7'd55: i = '{op: OP_ADD, dst: 5'd23, a: 5'd29, b: 5'd30};
      7'd56: i = '{op: OP_MUL, dst: 5'd22, a: 5'd22, b: 5'd23};
      7'd57: i = '{op: OP_SUB, dst: 5'd22, a: 5'd22, b: 5'd17};
      7'd58: i = '{op: OP_SUB, dst: 5'd22, a: 5'd22, b: 5'd18};
      7'd59: i = '{op: OP_MUL, dst: 5'd24, a: 5'd15, b: 5'd20};
      7'd60: i = '{op: OP_MUL, dst: 5'd12, a: 5'd24, b: 5'd22};  // X3 = A F ((X1+Y1)(X2+Y2) - C - D)
      7'd61: i = '{op: OP_SUB, dst: 5'd25, a: 5'd18, b: 5'd17};
      7'd62: i = '{op: OP_MUL, dst: 5'd26, a: 5'd15, b: 5'd21};
      7'd63: i = '{op: OP_MUL, dst: 5'd13, a: 5'd26, b: 5'd25};  // Y3 = A G (D - C)
      7'd64: i = '{op: OP_MUL, dst: 5'd14, a: 5'd20, b: 5'd21};  // Z3 = F G
      7'd65: i = '{op: OP_LOOP, dst: 5'd11, a: 5'd0, b: 5'd0};  // next bit pair
      7'd66: i = '{op: OP_MUL, dst: 5'd15, a: 5'd5, b: 5'd14};  // compare Q with R projectively
      7'd67: i = '{op: OP_MUL, dst: 5'd16, a: 5'd9, b: 5'd14};
      7'd68: i = '{op: OP_SUB, dst: 5'd17, a: 5'd12, b: 5'd15};
      7'd69: i = '{op: OP_SUB, dst: 5'd18, a: 5'd13, b: 5'd16};
      7'd70: i = '{op: OP_OUT, dst: 5'd11, a: 5'd17, b: 5'd18};
      default: i = '{op: OP_OUT, dst: 5'd0, a: 5'd17, b: 5'd18};
    endcase
    return i;
  endfunction

  function automatic fe_t const_rom(input logic [1:0] n);
    unique case (n)
      2'd0:    return '0;
      2'd1:    return fe_t'(1);
      default: return D_EDWARDS;
    endcase
  endfunction

  typedef enum logic [1:0] {S_IDLE, S_EXEC, S_WAIT} state_e;
  state_e state;

  logic [6:0]   pc;
  logic [8:0]   idx;
  logic [445:0] s_r, h_r;
  uinstr_t      ins;
  logic [1:0]   pair;

  assign ins  = urom(pc);
  assign pair = {h_r[idx], s_r[idx]};

  // logical table point (29..31) -> B (0,1,2), -A (3,4,2) or T (6,7,8)
  function automatic logic [4:0] remap(input logic [4:0] ad, input logic [1:0] sel);
    logic [4:0] r;
    r = ad;
    if (ad >= 5'd29) begin
      unique case (sel)
        2'b10:   r = (ad == 5'd31) ? 5'd2 : ad - 5'd26;
        2'b11:   r = ad - 5'd23;
        default: r = ad - 5'd29;
      endcase
    end
    return r;
  endfunction

  assign mem_raddr_a = remap(ins.a, pair);
  assign mem_raddr_b = remap(ins.b, pair);
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
    mem_waddr = remap(ins.dst, pair);
    mem_wdata = '0;
    if (state == S_EXEC) begin
      unique case (ins.op)
        OP_LDI: begin
          mem_we = 1'b1;
          unique case (ins.a[2:0])
            3'd0:    mem_wdata = bx;
            3'd1:    mem_wdata = by;
            3'd2:    mem_wdata = ax;
            3'd3:    mem_wdata = ay;
            3'd4:    mem_wdata = rx;
            default: mem_wdata = ry;
          endcase
        end
        OP_LDC: begin
          mem_we    = 1'b1;
          mem_wdata = const_rom(ins.a[1:0]);
        end
        OP_ADD, OP_SUB: alu_start = 1'b1;
        OP_MUL:         mul_start = 1'b1;
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
      idx   <= '0;
      s_r   <= '0;
      h_r   <= '0;
      done  <= 1'b0;
      ok    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          s_r   <= s;
          h_r   <= h;
          idx   <= 9'd445;
          pc    <= '0;
          state <= S_EXEC;
        end
        S_EXEC: begin
          unique case (ins.op)
            OP_LDI, OP_LDC: pc <= pc + 7'd1;
            OP_ADD, OP_SUB, OP_MUL: state <= S_WAIT;
            OP_SKIP: pc <= (pair == 2'b00) ? LOOPEND_PC : pc + 7'd1;
            OP_LOOP: if (idx != 0) begin
                       idx <= idx - 9'd1;
                       pc  <= LOOP_PC;
                     end else pc <= pc + 7'd1;
            default: begin   // OP_OUT: both differences must be zero
              ok    <= (mem_rdata_a == '0) && (mem_rdata_b == '0);
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
