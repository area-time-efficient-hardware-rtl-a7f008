// tb_modl_reduce: self-checking test of the mod-L reduction unit together
// with the field multiplier in non-modular mode. Reduces random 912-bit
// values, boundary values (0, L-1, L, 2^912-1) and computes multiply-adds
// (r + h*s) mod L; the reference is the simulator's wide modulo. Also checks
// the cycle count: 3 (or 4) multiplications of 43 cycles plus 2.
module tb_modl_reduce;
  import ed448_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, muladd = 1'b0;
  logic [PW-1:0] x = '0;
  fe_t ma = '0, mb = '0;
  logic [445:0] mc = '0, result;
  logic busy, done, mul_start, mul_valid, mul_busy;
  logic [OW-1:0] mul_a, mul_b;
  logic [PW-1:0] mul_c;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  modl_reduce dut (.*);
  kara_mult u_mul (.clk, .rst_n, .start(mul_start), .nonmod(1'b1), .a(mul_a), .b(mul_b),
                   .c(mul_c), .valid(mul_valid), .busy(mul_busy));

  function automatic logic [PW-1:0] rnd912();
    logic [PW-1:0] r;
    for (int i = 0; i < PW / 16; i++) r[16*i +: 16] = 16'($urandom);
    return r;
  endfunction

  task automatic run(input logic ma_mode, input logic [PW-1:0] xx, input fe_t a, input fe_t b,
                     input logic [445:0] c);
    logic [1023:0] e;
    int cyc;
    if (ma_mode) e = (1024'(a) * 1024'(b) + 1024'(c)) % 1024'(L);
    else         e = 1024'(xx) % 1024'(L);
    @(negedge clk);
    muladd = ma_mode; x = xx; ma = a; mb = b; mc = c; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks += 2;
    if (1024'(result) !== e) begin failures++; $display("FAIL x=%h got %h exp %h", xx, result, e); end
    if (cyc != (ma_mode ? 4 : 3) * 43 + 2) begin failures++; $display("FAIL cycles %0d", cyc); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(1'b0, '0, '0, '0, '0);
    run(1'b0, PW'(L) - 1, '0, '0, '0);
    run(1'b0, PW'(L), '0, '0, '0);
    run(1'b0, '1, '0, '0, '0);
    for (int i = 0; i < 40; i++) run(1'b0, rnd912(), '0, '0, '0);
    for (int i = 0; i < 20; i++) begin
      fe_t s;
      s = fe_t'(rnd912());
      s[447] = 1'b1; s[1:0] = 2'b00;
      run(1'b1, '0, fe_t'(rnd912() % PW'(L)), s, 446'(rnd912() % PW'(L)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
