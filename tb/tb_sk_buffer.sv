// tb_sk_buffer: self-checking test of the secret key buffer. Loads random
// digests and checks the clamped scalar (bits 1:0 clear, bit 447 set, the
// rest equal to digest bits 446:2) and the prefix (digest bits 911:456)
// bit-field by bit-field, then checks that clear wipes both and that the
// outputs hold while neither load nor clear is given.
module tb_sk_buffer;
  import ed448_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, clear = 1'b0;
  logic [911:0] digest = '0;
  fe_t scalar;
  logic [455:0] prefix;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  sk_buffer dut (.*);

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
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
    for (int n = 0; n < 50; n++) begin
      logic [911:0] d;
      for (int i = 0; i < 114; i++) d[8*i +: 8] = 8'($urandom);
      if (n == 0) d = '1;
      if (n == 1) d = '0;
      @(negedge clk);
      digest = d; load = 1'b1;
      @(negedge clk);
      load = 1'b0; digest = ~d;
      chk(scalar[1:0] == 2'b00, "low bits cleared");
      chk(scalar[447] == 1'b1, "bit 447 set");
      for (int i = 2; i < 447; i++)
        if (scalar[i] != d[i]) begin chk(1'b0, "scalar bit"); break; end
      chk(prefix == d[911:456], "prefix");
      repeat (2) @(negedge clk);
      chk(prefix == d[911:456] && scalar[446:2] == d[446:2], "hold");
    end
    @(negedge clk);
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    chk(scalar == '0 && prefix == '0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
