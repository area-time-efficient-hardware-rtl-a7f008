// tb_mult_int_ram: self-checking test of the multiplier's internal RAM.
// Fills all 16 entries, reads them back on both ports against a model array,
// then random writes with reads of both ports.
module tb_mult_int_ram;
  logic clk = 1'b0;
  logic we = 1'b0;
  logic [3:0] waddr = '0, raddr_a = '0, raddr_b = '0;
  logic [255:0] wdata = '0, rdata_a, rdata_b;
  logic [255:0] model [16];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  mult_int_ram dut (.*);

  function automatic logic [255:0] pattern();
    logic [255:0] r;
    for (int k = 0; k < 8; k++) r[32*k +: 32] = $urandom;
    return r;
  endfunction

  task automatic wr(input logic [3:0] ad, input logic [255:0] d);
    @(negedge clk);
    we = 1'b1; waddr = ad; wdata = d;
    @(negedge clk);
    we = 1'b0;
    model[ad] = d;
  endtask

  task automatic rd(input logic [3:0] x, input logic [3:0] y);
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
    for (int i = 0; i < 16; i++) wr(4'(i), pattern());
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) rd(4'(i), 4'(j));
    for (int n = 0; n < 300; n++) begin
      wr(4'($urandom), pattern());
      rd(4'($urandom), 4'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
