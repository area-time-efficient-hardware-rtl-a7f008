// ed448_core: Ed448 signature core (key generation and signing).
//
// Three stages share one datapath:
//  * top stage: the command FSM below and the point-multiplication
//    controller (ecpm_ctrl) with its program ROM;
//  * middle stage: the SHAKE256 hash unit, the mod-L reduction handler, the
//    memory unit (distributed register file) and the secret key buffer;
//  * lower stage: the field adder (field_alu) and the refined-Karatsuba field
//    multiplier (kara_mult), which the mod-L handler reuses in its
//    non-modular mode.
//
// The host streams hash input in 136-byte chunks on the hash_* port. When
// hash_ins_prefix is set with the first chunk, the core writes its secret
// prefix into bytes 10..66 of that chunk (after the 10-byte "SigEd448"
// domain string), so the prefix never leaves the core. Commands:
//   CMD_KEYLOAD  digest -> secret key buffer (clamped scalar s, prefix)
//   CMD_MODL_R   digest mod L -> nonce r
//   CMD_MODL_H   digest mod L -> challenge h
//   CMD_ECPM_S   [s]B  -> pt_x, pt_y, pt_enc (public key)
//   CMD_ECPM_R   [r]B  -> pt_x, pt_y, pt_enc (signature point R)
//   CMD_SIGN_S   (r + h*s) mod L -> scalar_out (signature scalar S)
//   CMD_CLEAR    wipes the key buffer, r and h
//   CMD_VERIFY   [S]B == R + [h]A ? -> verify_ok (S on ver_s, h from MODL_H)
// Key generation is: hash the 57-byte secret, KEYLOAD, ECPM_S. Signing is:
// hash dom4||prefix||M, MODL_R, ECPM_R, hash dom4||R||A||M, MODL_H, SIGN_S.
// Verification is: hash dom4||R||A||M, MODL_H, VERIFY, with the points A, R
// and B given decompressed (affine Edwards) on the ver_* inputs.
// The base point B is variable: the host gives it in the Montgomery domain
// (base_u, base_v) with a randomized projective copy (base_xr = lambda*u,
// base_zr = lambda) as the DPA countermeasure; random numbers are generated
// outside. pt_enc is the 57-byte point encoding: y in bits 447:0 and the
// least significant bit of x in bit 455.
//
// Interface: a command is taken when cmd_valid is high and busy is low;
// cmd_done pulses when its result is valid. Hash chunks are accepted when
// hash_ready is high; hash_done pulses when the digest is ready.
// Timing: a point multiplication takes 239,376 cycles, a mod-L reduction
// 132, a multiply-add 175 (command to done), a hash chunk 24, a verification
// about 316,000 (it depends on the scalars).
//
// From the published design: the three-stage structure and its units, the shared
// multiplier, SHAKE256 with 1088-bit chunks and 912-bit output, the mod-L
// reduction, the randomized variable base point and the key generation and
// signing functions. This design's own choice: the command set, the host
// streaming of hash input with in-core prefix insertion, and leaving message
// formatting, point encoding of hash inputs and point decompression to the
// host.
module ed448_core
  import ed448_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  // hash input stream
  input  logic          hash_init,
  input  logic          hash_blk_valid,
  input  logic [1087:0] hash_blk,
  input  logic          hash_blk_last,
  input  logic [7:0]    hash_blk_len,
  input  logic          hash_ins_prefix,
  output logic          hash_ready,
  output logic          hash_done,
  // commands
  input  logic          cmd_valid,
  input  logic [2:0]    cmd,
  output logic          busy,
  output logic          cmd_done,
  // variable base point (Montgomery domain) and its randomized copy
  input  fe_t           base_u,
  input  fe_t           base_v,
  input  fe_t           base_xr,
  input  fe_t           base_zr,
  // point results
  output fe_t           pt_x,
  output fe_t           pt_y,
  output logic [455:0]  pt_enc,
  // verification inputs: affine Edwards B, A, R and the scalar S
  input  fe_t           ver_bx,
  input  fe_t           ver_by,
  input  fe_t           ver_ax,
  input  fe_t           ver_ay,
  input  fe_t           ver_rx,
  input  fe_t           ver_ry,
  input  logic [445:0]  ver_s,
  // results
  output logic [445:0]  scalar_out,
  output logic          verify_ok
);

  localparam logic [2:0] CMD_KEYLOAD = 3'd0;
  localparam logic [2:0] CMD_MODL_R  = 3'd1;
  localparam logic [2:0] CMD_MODL_H  = 3'd2;
  localparam logic [2:0] CMD_ECPM_S  = 3'd3;
  localparam logic [2:0] CMD_ECPM_R  = 3'd4;
  localparam logic [2:0] CMD_SIGN_S  = 3'd5;
  localparam logic [2:0] CMD_CLEAR   = 3'd6;
  localparam logic [2:0] CMD_VERIFY  = 3'd7;

  // ------------------------------------------------------------ hash unit
  logic [911:0]  digest;
  logic [455:0]  prefix;
  logic [1087:0] blk_in;

  always_comb begin
    blk_in = hash_blk;
    if (hash_ins_prefix) blk_in[8*10 +: 456] = prefix;
  end

  shake256 u_hash (
    .clk       (clk),
    .rst_n     (rst_n),
    .init      (hash_init),
    .blk_valid (hash_blk_valid),
    .blk       (blk_in),
    .blk_last  (hash_blk_last),
    .blk_len   (hash_blk_len),
    .ready     (hash_ready),
    .digest    (digest),
    .done      (hash_done)
  );

  // ------------------------------------------------------------ key buffer
  fe_t  sk_scalar;
  logic sk_load, sk_clear;

  sk_buffer u_skbuf (
    .clk    (clk),
    .rst_n  (rst_n),
    .load   (sk_load),
    .clear  (sk_clear),
    .digest (digest),
    .scalar (sk_scalar),
    .prefix (prefix)
  );

  // ------------------------------------------------------------ command FSM
  typedef enum logic [1:0] {C_IDLE, C_MODL, C_ECPM, C_DPM} cstate_e;
  cstate_e       cstate;
  logic [2:0]    cmd_r;
  logic [445:0]  r_reg, h_reg;

  logic          ml_start, ml_muladd, ml_busy, ml_done;
  logic [445:0]  ml_result;
  logic          ec_start, ec_busy, ec_done;
  fe_t           ec_x, ec_y, ec_k;
  logic          dp_start, dp_busy, dp_done, dp_ok;

  logic accept;
  assign accept = cmd_valid && (cstate == C_IDLE);
  assign busy   = (cstate != C_IDLE);

  assign sk_load   = accept && (cmd == CMD_KEYLOAD);
  assign sk_clear  = accept && (cmd == CMD_CLEAR);
  assign ml_start  = accept && (cmd inside {CMD_MODL_R, CMD_MODL_H, CMD_SIGN_S});
  assign ml_muladd = (cmd == CMD_SIGN_S);
  assign ec_start  = accept && (cmd inside {CMD_ECPM_S, CMD_ECPM_R});
  assign ec_k      = (cmd == CMD_ECPM_S) ? sk_scalar : fe_t'(r_reg);
  assign dp_start  = accept && (cmd == CMD_VERIFY);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cstate     <= C_IDLE;
      cmd_r      <= '0;
      r_reg      <= '0;
      h_reg      <= '0;
      cmd_done   <= 1'b0;
      pt_x       <= '0;
      pt_y       <= '0;
      scalar_out <= '0;
      verify_ok  <= 1'b0;
    end else begin
      cmd_done <= 1'b0;
      unique case (cstate)
        C_IDLE: if (cmd_valid) begin
          cmd_r <= cmd;
          unique case (cmd)
            CMD_MODL_R, CMD_MODL_H, CMD_SIGN_S: cstate <= C_MODL;
            CMD_ECPM_S, CMD_ECPM_R:             cstate <= C_ECPM;
            CMD_VERIFY:                         cstate <= C_DPM;
            CMD_CLEAR: begin
              r_reg    <= '0;
              h_reg    <= '0;
              cmd_done <= 1'b1;
            end
            default: cmd_done <= 1'b1;   // CMD_KEYLOAD
          endcase
        end
        C_MODL: if (ml_done) begin
          unique case (cmd_r)
            CMD_MODL_R: r_reg      <= ml_result;
            CMD_MODL_H: h_reg      <= ml_result;
            default:    scalar_out <= ml_result;
          endcase
          cmd_done <= 1'b1;
          cstate   <= C_IDLE;
        end
        C_ECPM: if (ec_done) begin
          pt_x     <= ec_x;
          pt_y     <= ec_y;
          cmd_done <= 1'b1;
          cstate   <= C_IDLE;
        end
        C_DPM: if (dp_done) begin
          verify_ok <= dp_ok;
          cmd_done  <= 1'b1;
          cstate    <= C_IDLE;
        end
        default: cstate <= C_IDLE;
      endcase
    end
  end

  assign pt_enc = {pt_x[0], 7'b0, pt_y};

  // ------------------------------------------------------------ datapath sharing
  // The memory unit and the field adder serve the two point controllers;
  // the multiplier serves them too and, when neither runs, the mod-L handler
  // in non-modular mode. At most one of the three is busy at a time.
  logic          mul_start, mul_nonmod, mul_valid, mul_busy;
  logic [OW-1:0] mul_a, mul_b;
  logic [PW-1:0] mul_c;
  logic          alu_start, alu_valid;
  alu_op_e       alu_op;
  fe_t           alu_a, alu_b, alu_c;
  logic          mem_we;
  logic [4:0]    mem_waddr, mem_raddr_a, mem_raddr_b;
  fe_t           mem_wdata, mem_rdata_a, mem_rdata_b;

  // per-controller views of the shared datapath
  logic          ec_mul_start, dp_mul_start, ml_mul_start;
  fe_t           ec_mul_a, ec_mul_b, dp_mul_a, dp_mul_b;
  logic [OW-1:0] ml_mul_a, ml_mul_b;
  logic          ec_alu_start, dp_alu_start;
  alu_op_e       ec_alu_op, dp_alu_op;
  fe_t           ec_alu_a, ec_alu_b, dp_alu_a, dp_alu_b;
  logic          ec_mem_we, dp_mem_we;
  logic [4:0]    ec_mem_waddr, ec_mem_raddr_a, ec_mem_raddr_b;
  logic [4:0]    dp_mem_waddr, dp_mem_raddr_a, dp_mem_raddr_b;
  fe_t           ec_mem_wdata, dp_mem_wdata;

  always_comb begin
    if (dp_busy) begin
      mul_start   = dp_mul_start;
      mul_a       = OW'(dp_mul_a);
      mul_b       = OW'(dp_mul_b);
      mul_nonmod  = 1'b0;
      alu_start   = dp_alu_start;
      alu_op      = dp_alu_op;
      alu_a       = dp_alu_a;
      alu_b       = dp_alu_b;
      mem_we      = dp_mem_we;
      mem_waddr   = dp_mem_waddr;
      mem_wdata   = dp_mem_wdata;
      mem_raddr_a = dp_mem_raddr_a;
      mem_raddr_b = dp_mem_raddr_b;
    end else begin
      mul_start   = ec_busy ? ec_mul_start : ml_mul_start;
      mul_a       = ec_busy ? OW'(ec_mul_a) : ml_mul_a;
      mul_b       = ec_busy ? OW'(ec_mul_b) : ml_mul_b;
      mul_nonmod  = !ec_busy;
      alu_start   = ec_alu_start;
      alu_op      = ec_alu_op;
      alu_a       = ec_alu_a;
      alu_b       = ec_alu_b;
      mem_we      = ec_mem_we;
      mem_waddr   = ec_mem_waddr;
      mem_wdata   = ec_mem_wdata;
      mem_raddr_a = ec_mem_raddr_a;
      mem_raddr_b = ec_mem_raddr_b;
    end
  end

  // ------------------------------------------------------------ lower stage
  kara_mult u_mul (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (mul_start),
    .nonmod (mul_nonmod),
    .a      (mul_a),
    .b      (mul_b),
    .c      (mul_c),
    .valid  (mul_valid),
    .busy   (mul_busy)
  );

  field_alu u_alu (
    .clk   (clk),
    .rst_n (rst_n),
    .start (alu_start),
    .op    (alu_op),
    .a     (alu_a),
    .b     (alu_b),
    .c     (alu_c),
    .valid (alu_valid)
  );

  // ------------------------------------------------------------ middle stage
  mem_unit #(.DEPTH(32)) u_mem (
    .clk     (clk),
    .we      (mem_we),
    .waddr   (mem_waddr),
    .wdata   (mem_wdata),
    .raddr_a (mem_raddr_a),
    .rdata_a (mem_rdata_a),
    .raddr_b (mem_raddr_b),
    .rdata_b (mem_rdata_b)
  );

  modl_reduce u_modl (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (ml_start),
    .muladd    (ml_muladd),
    .x         (digest),
    .ma        (fe_t'(h_reg)),
    .mb        (sk_scalar),
    .mc        (r_reg),
    .busy      (ml_busy),
    .done      (ml_done),
    .result    (ml_result),
    .mul_start (ml_mul_start),
    .mul_a     (ml_mul_a),
    .mul_b     (ml_mul_b),
    .mul_c     (mul_c),
    .mul_valid (mul_valid && ml_busy)
  );

  // ------------------------------------------------------------ top stage
  ecpm_ctrl u_ecpm (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (ec_start),
    .k           (ec_k),
    .u           (base_u),
    .v           (base_v),
    .xr          (base_xr),
    .zr          (base_zr),
    .busy        (ec_busy),
    .done        (ec_done),
    .x_out       (ec_x),
    .y_out       (ec_y),
    .mem_we      (ec_mem_we),
    .mem_waddr   (ec_mem_waddr),
    .mem_wdata   (ec_mem_wdata),
    .mem_raddr_a (ec_mem_raddr_a),
    .mem_raddr_b (ec_mem_raddr_b),
    .mem_rdata_a (mem_rdata_a),
    .mem_rdata_b (mem_rdata_b),
    .alu_start   (ec_alu_start),
    .alu_op      (ec_alu_op),
    .alu_a       (ec_alu_a),
    .alu_b       (ec_alu_b),
    .alu_c       (alu_c),
    .alu_valid   (alu_valid && ec_busy),
    .mul_start   (ec_mul_start),
    .mul_a       (ec_mul_a),
    .mul_b       (ec_mul_b),
    .mul_c       (mul_c[FW-1:0]),
    .mul_valid   (mul_valid && ec_busy)
  );

  dpm_ctrl u_dpm (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (dp_start),
    .s           (ver_s),
    .h           (h_reg),
    .bx          (ver_bx),
    .by          (ver_by),
    .ax          (ver_ax),
    .ay          (ver_ay),
    .rx          (ver_rx),
    .ry          (ver_ry),
    .busy        (dp_busy),
    .done        (dp_done),
    .ok          (dp_ok),
    .mem_we      (dp_mem_we),
    .mem_waddr   (dp_mem_waddr),
    .mem_wdata   (dp_mem_wdata),
    .mem_raddr_a (dp_mem_raddr_a),
    .mem_raddr_b (dp_mem_raddr_b),
    .mem_rdata_a (mem_rdata_a),
    .mem_rdata_b (mem_rdata_b),
    .alu_start   (dp_alu_start),
    .alu_op      (dp_alu_op),
    .alu_a       (dp_alu_a),
    .alu_b       (dp_alu_b),
    .alu_c       (alu_c),
    .alu_valid   (alu_valid && dp_busy),
    .mul_start   (dp_mul_start),
    .mul_a       (dp_mul_a),
    .mul_b       (dp_mul_b),
    .mul_c       (mul_c[FW-1:0]),
    .mul_valid   (mul_valid && dp_busy)
  );

  // the users of the shared multiplier never overlap
  a_mul_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({ec_busy, dp_busy, ml_busy}));

endmodule
