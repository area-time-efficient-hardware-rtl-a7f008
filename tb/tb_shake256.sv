// tb_shake256: self-checking test of the SHAKE256 hash unit.
// Messages of 0, 3, 135, 136 and 300 bytes with byte i = (7*i + 3) mod 256,
// fed in 136-byte chunks; the expected 114-byte digests come from a SHAKE256
// software library (written here with byte 0 in the least significant
// position, as the unit outputs them). The 135- and 136-byte cases exercise
// padding that fills the last byte of a chunk and padding that needs a chunk
// of its own. Also checks the 25-cycle latency from the last chunk to done.
module tb_shake256;
  logic clk = 1'b0, rst_n = 1'b0, init = 1'b0, blk_valid = 1'b0, blk_last = 1'b0;
  logic [1087:0] blk = '0;
  logic [7:0] blk_len = '0;
  logic ready, done;
  logic [911:0] digest;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  shake256 dut (.*);

  task automatic run(input int n, input logic [911:0] exp);
    int pos, cyc;
    @(negedge clk);
    init = 1'b1;
    @(negedge clk);
    init = 1'b0;
    pos = 0;
    do begin
      while (!ready) @(negedge clk);
      for (int i = 0; i < 136; i++) blk[8*i +: 8] = (pos + i < n) ? 8'((7 * (pos + i) + 3) % 256) : 8'($urandom);
      blk_last  = (n - pos) < 136;
      blk_len   = blk_last ? 8'(n - pos) : 8'd0;
      blk_valid = 1'b1;
      @(negedge clk);
      blk_valid = 1'b0;
      pos += 136;
    end while (!blk_last);
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks += 2;
    if (digest !== exp) begin failures++; $display("FAIL digest of %0d bytes: %h", n, digest); end
    if (cyc != 25) begin failures++; $display("FAIL latency %0d", cyc); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(0, 912'h46d810502c46385c77c2b78ff54655c79e34532886ab0ebc84ef7b93928e3c2207dce35ab4d0edc72c695739b16f61961e14bec4b7b3ac2e294086b49a47491c82fcf692b5679d0105cb00f2c0d8ddc45dd72f76d56e64270cb5821bb862ea52cd3f24eb3e74eb3f3b23138da80b2bddb946);
    run(3, 912'hbf98b81f5061be207e5aea4fcb10590ba79bd5df852672c07d3b256c3fc3c2fa9a0656589b422bacb4de62f42935defe71c20fa94b899955f44a9fb96e985a3ebbe0f5bbb7e3cc5dc49d79e729fb1dc5030bd0a61470762fc3e9662b77791589f2cb8e3aa472425274985b8376b997b1a043);
    run(135, 912'hd4d44bc2fe9c124d8e2621f42ca46e1943683e31355d6f5e2ddeb7a6fa1846e8d959401e0995399dcfd6e5dac20b22dc692a9d56cdfe2b37eb90b2eb6bfc6491688b431ca04bdaa4e33b79035e4aaaa6e3f39a7fb11ed26612d85c7ac0f6a65aa885143936eae18edfaf9f002f3598fc1302);
    run(136, 912'h8cdecd7953a1d8c0b92a0e0ea054ad2f9e44ff6321ce78a64071a28c483da97ef6af42432af6c58e37182e8c6f1767613b91c52314815885eb4cdf74967eaacb4e34bc23974f7766fedb8930ef3b179f146b5c6d04763b82c3c6bae54c60cd195a1134cea5d8063c4ee1384a5b1e81430fc0);
    run(300, 912'ha28f7daf1ad9d88b60b82cc90d25e8dd0e27fdfc4d8669fc0514ad057c51ea157d2fe37349a703dfdd141d8da7a2db3e9f79916382d5b08f5944b4931f72248bc953e5c8875b7514672737a0491c8b87ab75be2230b1cc6977f04e7a8418cce5f041987c947b5db14bcec7d43f2373985d68);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
