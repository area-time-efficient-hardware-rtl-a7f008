// tb_ecpm_ctrl: self-checking test of the point-multiplication controller
// with its datapath (memory unit, field adder, field multiplier).
// For several scalars (a clamped secret scalar, random scalars below L that
// need the j*L adjustment, and small ones) it computes [k]B on the Ed448 base
// point and compares the affine result with an independent reference: a
// double-and-add on the Edwards curve with the projective unified addition.
// The Montgomery base point and its randomized copy (lambda*u : lambda) are
// prepared by the bench, as an external source would. Checks the cycle count
// of one point multiplication against the count implied by the program:
// 9 loads, 446 ladder steps of 10 multiplications (43 cycles), 8 additions
// (2 cycles) and a loop instruction, 25 multiplications and 18 additions of
// y recovery and the isogeny, the inversion chain and the two final
// multiplications, plus the start cycle.
module tb_ecpm_ctrl;
  import ed448_pkg::*;
  import ed448_ref_pkg::*;

  localparam int EXP_CYCLES = 9 + 446 * (10 * 43 + 8 * 2 + 1) + (25 * 43 + 18 * 2)
                            + 447 * 44 + 445 * 43 + 2 + 2 * 43 + 1 + 1;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  fe_t k = '0, u = '0, v = '0, xr = '0, zr = '0;
  logic busy, done;
  fe_t x_out, y_out;
  logic mem_we;
  logic [4:0] mem_waddr, mem_raddr_a, mem_raddr_b;
  fe_t mem_wdata, mem_rdata_a, mem_rdata_b;
  logic alu_start, alu_valid, mul_start, mul_valid;
  alu_op_e alu_op;
  fe_t alu_a, alu_b, alu_c, mul_a, mul_b;
  logic [PW-1:0] mul_cw;
  logic mul_busy;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ecpm_ctrl dut (.*, .mul_c(mul_cw[FW-1:0]));
  mem_unit  u_mem (.clk, .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata),
                   .raddr_a(mem_raddr_a), .rdata_a(mem_rdata_a),
                   .raddr_b(mem_raddr_b), .rdata_b(mem_rdata_b));
  field_alu u_alu (.clk, .rst_n, .start(alu_start), .op(alu_op), .a(alu_a), .b(alu_b),
                   .c(alu_c), .valid(alu_valid));
  kara_mult u_mul (.clk, .rst_n, .start(mul_start), .nonmod(1'b0), .a(OW'(mul_a)), .b(OW'(mul_b)),
                   .c(mul_cw), .valid(mul_valid), .busy(mul_busy));

  function automatic fe_t rnd_fe();
    logic [511:0] r;
    for (int i = 0; i < 16; i++) r[32*i +: 32] = $urandom;
    return fe_t'(r % 512'(P));
  endfunction

  task automatic run(input fe_t kk, input bit check_cycles);
    fe_t ex, ey, lam;
    int cyc;
    ed_mul(kk, BASE_X, BASE_Y, ex, ey);
    lam = rnd_fe();
    @(negedge clk);
    k = kk; xr = fmul(lam, u); zr = lam; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks += 2;
    if (x_out !== ex) begin failures++; $display("FAIL x for k=%h: %h exp %h", kk, x_out, ex); end
    if (y_out !== ey) begin failures++; $display("FAIL y for k=%h: %h exp %h", kk, y_out, ey); end
    if (check_cycles) begin
      checks++;
      if (cyc != EXP_CYCLES) begin failures++; $display("FAIL cycles %0d exp %0d", cyc, EXP_CYCLES); end
    end
    $display("k=%h done in %0d cycles", kk, cyc);
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fe_t s;
    to_mont(BASE_X, BASE_Y, u, v);
    checks++;
    if (u !== fe_t'(5)) begin failures++; $display("FAIL reference Montgomery u = %h", u); end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // clamped secret scalar: bit 447 set, two low bits clear
    s = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
         $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    s[447] = 1'b1; s[1:0] = 2'b00;
    run(s, 1'b1);
    // nonces below L with each value of k mod 4
    for (int j = 0; j < 4; j++) begin
      s = fe_t'(rnd_fe() % fe_t'(L));
      s[1:0] = 2'(j);
      run(s, 1'b1);
    end
    run(fe_t'(4), 1'b1);
    run(fe_t'(1), 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
