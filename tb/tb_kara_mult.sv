// tb_kara_mult: self-checking test of the refined-Karatsuba field multiplier.
// Random and corner-case operands in modular mode (reference: a*b mod p with
// the simulator's wide arithmetic) and in non-modular mode with 456-bit
// operands (reference: the exact product). Also checks the fixed latency
// from start to valid.
module tb_kara_mult;
  import ed448_pkg::*;

  localparam int LATENCY = 42;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, nonmod = 1'b0;
  logic [OW-1:0] a = '0, b = '0;
  logic [PW-1:0] c;
  logic valid, busy;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  kara_mult dut (.*);

  function automatic logic [OW-1:0] rnd456();
    logic [OW-1:0] r;
    for (int i = 0; i < OW; i += 32) r[i +: 8] = 8'($urandom);
    for (int i = 0; i < OW / 32; i++) r[32*i +: 32] = $urandom;
    r[455:448] = 8'($urandom);
    return r;
  endfunction

  function automatic fe_t rndfe();
    logic [OW-1:0] r = rnd456();
    return fe_t'(r % OW'(P));
  endfunction

  task automatic run(input logic nm, input logic [OW-1:0] x, input logic [OW-1:0] y);
    logic [PW-1:0] exp;
    int cyc;
    if (nm) exp = PW'(x) * PW'(y);
    else    exp = PW'((PW'(x) * PW'(y)) % PW'(P));
    @(negedge clk);
    a = x; b = y; nonmod = nm; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!valid) begin @(negedge clk); cyc++; end
    checks++;
    if (c !== exp) begin
      failures++;
      $display("FAIL nonmod=%0d a=%h b=%h got %h exp %h", nm, x, y, c, exp);
    end
    checks++;
    if (cyc != LATENCY) begin
      failures++;
      $display("FAIL latency %0d expected %0d", cyc, LATENCY);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(1'b0, OW'(P - 1), OW'(P - 1));
    run(1'b0, '0, OW'(P - 1));
    run(1'b0, OW'(1), OW'(P - 1));
    run(1'b0, {8'b0, {448{1'b1}}} >> 1, OW'(P - 1));
    for (int i = 0; i < 60; i++) run(1'b0, OW'(rndfe()), OW'(rndfe()));
    run(1'b1, {OW{1'b1}}, {OW{1'b1}});
    for (int i = 0; i < 40; i++) run(1'b1, rnd456(), rnd456());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
