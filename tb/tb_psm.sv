// tb_psm: self-checking test of the pipelined schoolbook multiplier.
// Issues back-to-back 128x128-bit products every 4 cycles (the published design's
// rate) and checks each product against the simulator's multiplication and
// its latency (valid 6 cycles after the start cycle).
module tb_psm;
  import ed448_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [DPW-1:0] a = '0, b = '0, m0, m1;
  logic ready, valid;
  int checks = 0, failures = 0;
  logic [2*DPW-1:0] expq [$];
  int issue_cyc [$];
  int cyc = 0;

  always #5 clk = ~clk;
  psm dut (.*);

  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) if (rst_n && valid) begin
    logic [2*DPW-1:0] e;
    int ic;
    e = expq.pop_front();
    ic = issue_cyc.pop_front();
    checks += 2;
    if ({m1, m0} !== e) begin failures++; $display("FAIL product %h exp %h", {m1, m0}, e); end
    if (cyc - ic != 6) begin failures++; $display("FAIL latency %0d", cyc - ic); end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      logic [DPW-1:0] x, y;
      x = {$urandom, $urandom, $urandom, $urandom};
      y = {$urandom, $urandom, $urandom, $urandom};
      if (n == 0) begin x = '1; y = '1; end
      // wait until the PSM accepts
      while (!ready) @(negedge clk);
      a = x; b = y; start = 1'b1;
      expq.push_back((2*DPW)'(x) * (2*DPW)'(y));
      issue_cyc.push_back(cyc);
      @(negedge clk);
      start = 1'b0;
      // every 10th product leave a gap
      if (n % 10 == 9) repeat (3) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d products missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
