// tb_field_alu: self-checking test of the modular adder/subtracter.
// Random and boundary operands below p; reference uses the simulator's wide
// arithmetic ((a + b) % p and (a + p - b) % p). Checks the 1-cycle latency.
module tb_field_alu;
  import ed448_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  alu_op_e op = ALU_ADD;
  fe_t a = '0, b = '0, c;
  logic valid;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  field_alu dut (.*);

  function automatic fe_t rndfe();
    logic [511:0] r;
    for (int i = 0; i < 16; i++) r[32*i +: 32] = $urandom;
    return fe_t'(r % 512'(P));
  endfunction

  task automatic run(input alu_op_e o, input fe_t x, input fe_t y);
    fe_t e;
    if (o == ALU_ADD) e = fe_t'((512'(x) + 512'(y)) % 512'(P));
    else              e = fe_t'((512'(x) + 512'(P) - 512'(y)) % 512'(P));
    @(negedge clk);
    op = o; a = x; b = y; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    checks += 2;
    if (!valid) begin failures++; $display("FAIL no valid after 1 cycle"); end
    if (c !== e) begin failures++; $display("FAIL op=%0d a=%h b=%h got %h exp %h", o, x, y, c, e); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(ALU_ADD, P - 1, P - 1);
    run(ALU_ADD, P - 1, fe_t'(1));
    run(ALU_ADD, '0, '0);
    run(ALU_SUB, '0, P - 1);
    run(ALU_SUB, fe_t'(5), fe_t'(5));
    run(ALU_SUB, fe_t'(1), fe_t'(2));
    for (int i = 0; i < 300; i++) run(i % 2 ? ALU_SUB : ALU_ADD, rndfe(), rndfe());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
