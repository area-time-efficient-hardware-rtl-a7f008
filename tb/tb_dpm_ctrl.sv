// tb_dpm_ctrl: self-checking test of the double-point multiplication
// controller with its datapath (memory unit, field adder, field multiplier).
// Builds valid verification inputs with the software reference: A = [a]B,
// R = [r]B, random h, S = (r + h*a) mod L, and expects ok = 1; then breaks S,
// h or R and expects ok = 0. Checks the cycle count against the program:
// 1 start cycle, 544 cycles of set-up and precomputation, per bit 313 cycles
// of doubling plus the skip and loop instructions, 530 more cycles when the
// bit pair is not 00, and 91 cycles of final comparison.
module tb_dpm_ctrl;
  import ed448_pkg::*;
  import ed448_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [445:0] s = '0, h = '0;
  fe_t bx = '0, by = '0, ax = '0, ay = '0, rx = '0, ry = '0;
  logic busy, done, ok;
  logic mem_we;
  logic [4:0] mem_waddr, mem_raddr_a, mem_raddr_b;
  fe_t mem_wdata, mem_rdata_a, mem_rdata_b;
  logic alu_start, alu_valid, mul_start, mul_valid, mul_busy;
  alu_op_e alu_op;
  fe_t alu_a, alu_b, alu_c, mul_a, mul_b;
  logic [PW-1:0] mul_cw;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dpm_ctrl dut (.*, .mul_c(mul_cw[FW-1:0]));
  mem_unit  u_mem (.clk, .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata),
                   .raddr_a(mem_raddr_a), .rdata_a(mem_rdata_a),
                   .raddr_b(mem_raddr_b), .rdata_b(mem_rdata_b));
  field_alu u_alu (.clk, .rst_n, .start(alu_start), .op(alu_op), .a(alu_a), .b(alu_b),
                   .c(alu_c), .valid(alu_valid));
  kara_mult u_mul (.clk, .rst_n, .start(mul_start), .nonmod(1'b0), .a(OW'(mul_a)), .b(OW'(mul_b)),
                   .c(mul_cw), .valid(mul_valid), .busy(mul_busy));

  function automatic logic [445:0] rnd_l();
    logic [511:0] r;
    for (int i = 0; i < 16; i++) r[32*i +: 32] = $urandom;
    return 446'(r % 512'(L));
  endfunction

  task automatic run(input logic [445:0] ss, input logic [445:0] hh, input bit expect_ok);
    int cyc, exp_cyc;
    exp_cyc = 1 + 544 + 91;
    for (int i = 445; i >= 0; i--) exp_cyc += 315 + ((ss[i] | hh[i]) ? 530 : 0);
    @(negedge clk);
    s = ss; h = hh; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks += 2;
    if (ok !== expect_ok) begin failures++; $display("FAIL ok=%0d expected %0d", ok, expect_ok); end
    if (cyc != exp_cyc) begin failures++; $display("FAIL cycles %0d exp %0d", cyc, exp_cyc); end
    $display("verify ok=%0d in %0d cycles", ok, cyc);
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [445:0] a, r, hh, ss;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    bx = BASE_X; by = BASE_Y;
    for (int t = 0; t < 2; t++) begin
      a  = rnd_l();
      r  = rnd_l();
      hh = rnd_l();
      ss = 446'((1024'(r) + 1024'(hh) * 1024'(a)) % 1024'(L));
      ed_mul(448'(a), BASE_X, BASE_Y, ax, ay);
      ed_mul(448'(r), BASE_X, BASE_Y, rx, ry);
      run(ss, hh, 1'b1);
      run(446'((1024'(ss) + 1) % 1024'(L)), hh, 1'b0);
      if (t == 0) run(ss, hh ^ 446'd4, 1'b0);
      else begin
        ed_mul(448'(r) + 448'd1, BASE_X, BASE_Y, rx, ry);
        run(ss, hh, 1'b0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
