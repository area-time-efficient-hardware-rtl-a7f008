// tb_mem_unit: self-checking test of the distributed register-file memory.
// Writes every word with a distinct pattern, then reads all pairs of
// addresses on both ports and compares with a model array kept by the bench;
// then random writes interleaved with reads.
module tb_mem_unit;
  import ed448_pkg::*;
  logic clk = 1'b0;
  logic we = 1'b0;
  logic [4:0] waddr = '0, raddr_a = '0, raddr_b = '0;
  fe_t wdata = '0, rdata_a, rdata_b;
  fe_t model [32];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  mem_unit dut (.*);

  function automatic fe_t pattern(input int i);
    fe_t r;
    for (int k = 0; k < 14; k++) r[32*k +: 32] = $urandom ^ i;
    return r;
  endfunction

  task automatic wr(input logic [4:0] ad, input fe_t d);
    @(negedge clk);
    we = 1'b1; waddr = ad; wdata = d;
    @(negedge clk);
    we = 1'b0;
    model[ad] = d;
  endtask

  task automatic rd(input logic [4:0] x, input logic [4:0] y);
    raddr_a = x; raddr_b = y;
    #1;
    checks += 2;
    if (rdata_a !== model[x]) begin failures++; $display("FAIL port A addr %0d", x); end
    if (rdata_b !== model[y]) begin failures++; $display("FAIL port B addr %0d", y); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) wr(5'(i), pattern(i));
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 32; j++) rd(5'(i), 5'(j));
    for (int n = 0; n < 500; n++) begin
      wr(5'($urandom), pattern(n));
      rd(5'($urandom), 5'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
