// tb_ed448_core: end-to-end test of the Ed448 core at its default size.
// For two secret keys it runs key generation and the signing of a 20-byte
// message, driving the core as a host would: it streams the hash inputs
// (the secret key; dom4 || prefix || M with the prefix inserted by the core;
// dom4 || R || A || M in two chunks) and issues the commands. The public
// keys and the 114-byte signatures R || S are compared with values produced
// by an independent Ed448 software library (RFC 8032 algorithm), and the
// public point is also compared with a double-and-add reference on the
// Edwards curve. The two keys are chosen so that both signing nonces are not
// multiples of 4 (exercising the j*L scalar adjustment). The bench counts
// each mechanism of the design and fails if one never happened: multi-chunk
// hashing, prefix insertion, key loading, mod-L reduction, multiply-add,
// non-modular use of the shared multiplier, point multiplication, nonce
// adjustment and ladder swaps. It checks the point-multiplication command
// latency of 239,376 cycles. Each signature is then verified by the core
// (double-point multiplication), and a signature with a modified S must be
// rejected; skipped additions for 00 bit pairs are counted too.
module tb_ed448_core;
  import ed448_pkg::*;
  import ed448_ref_pkg::*;

  localparam int NVEC = 2;
  localparam int SEED [NVEC] = '{1, 2};
  localparam logic [455:0] PK [NVEC] = '{
    456'h80547f3ee4bf3817dda383c6b9a2c9819a24b08ce65e3ac322161ebea8f0c7efaff457e8f09332edaff365f8a1d3ee48a967f6b02f5e7ab78f,
    456'h8041d4bafab6994e85d8568a89bbf5ceef7d147cfd6b8feeb74f343a55b1cc25155fd0bcde5e402729c4bca3723d31565e90a3a543dc9ffb2a};
  localparam logic [911:0] SIG [NVEC] = '{
    912'h001cda2e42826890132602d7b32e405ee953c994fada5efec788171e2ced684cc8ac41383713a4f4cd02aecd6b4780c92f1d2aec52311979118052aae71d254462d6619c15eaae3fbe5e4fedfce2384398d80f0dc720e2ed42860010f952ee0b80c12c8750eab77b1337e208cc374dbc3d6c,
    912'h00180703b9d89e3e907d9c831bdcdb4486a7a5e0b02edec39615de7413f838500f23010daa33c69900bed73967cad84500288694aade85e24580af6b5a7a4ab0a7ab2b84ee263c007bfe93b42b90bc8dddaa39acc025a241efe5736baeaaf0c584ebd37548e004bd9e065574216606f1c082};

  localparam logic [2:0] CMD_KEYLOAD = 3'd0, CMD_MODL_R = 3'd1, CMD_MODL_H = 3'd2,
                         CMD_ECPM_S = 3'd3, CMD_ECPM_R = 3'd4, CMD_SIGN_S = 3'd5,
                         CMD_CLEAR = 3'd6, CMD_VERIFY = 3'd7;
  localparam int ECPM_CMD_CYCLES = 239376;

  logic clk = 1'b0, rst_n = 1'b0;
  logic hash_init = 1'b0, hash_blk_valid = 1'b0, hash_blk_last = 1'b0, hash_ins_prefix = 1'b0;
  logic [1087:0] hash_blk = '0;
  logic [7:0] hash_blk_len = '0;
  logic hash_ready, hash_done;
  logic cmd_valid = 1'b0;
  logic [2:0] cmd = '0;
  logic busy, cmd_done;
  fe_t base_u = '0, base_v = '0, base_xr = '0, base_zr = '0;
  fe_t pt_x, pt_y;
  logic [455:0] pt_enc;
  logic [445:0] scalar_out;
  fe_t ver_bx = '0, ver_by = '0, ver_ax = '0, ver_ay = '0, ver_rx = '0, ver_ry = '0;
  logic [445:0] ver_s = '0;
  logic verify_ok;

  int checks = 0, failures = 0;
  int n_chunks = 0, n_multichunk = 0, n_prefix = 0, n_keyload = 0, n_modl = 0,
      n_muladd = 0, n_nonmod = 0, n_ecpm = 0, n_kadj = 0, n_swap = 0,
      n_verify = 0, n_skip = 0, n_reject = 0;

  always #5 clk = ~clk;
  ed448_core dut (.*);

  // mechanism counters
  always @(posedge clk) if (rst_n) begin
    if (hash_blk_valid && hash_ready) n_chunks++;
    if (hash_blk_valid && hash_ready && hash_ins_prefix) n_prefix++;
    if (dut.u_mul.start && dut.u_mul.state == 0 && dut.mul_nonmod) n_nonmod++;
    if (dut.u_ecpm.start && !dut.u_ecpm.busy) begin
      n_ecpm++;
      if (dut.u_ecpm.k[1:0] != 2'b00) n_kadj++;
    end
    if (dut.u_ecpm.sel && dut.u_ecpm.mul_start) n_swap++;
    if (cmd_valid && !busy && cmd == CMD_KEYLOAD) n_keyload++;
    if (cmd_valid && !busy && (cmd == CMD_MODL_R || cmd == CMD_MODL_H)) n_modl++;
    if (cmd_valid && !busy && cmd == CMD_SIGN_S) n_muladd++;
    if (cmd_valid && !busy && cmd == CMD_VERIFY) n_verify++;
    if (dut.u_dpm.state == 1 && dut.u_dpm.ins.op == 5 && dut.u_dpm.pair == 2'b00) n_skip++;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // hash a byte string given as a queue; returns when the digest is ready
  task automatic hash(input logic [7:0] msg [$], input bit ins_prefix);
    int pos, n;
    n = msg.size();
    @(negedge clk);
    hash_init = 1'b1;
    @(negedge clk);
    hash_init = 1'b0;
    pos = 0;
    if (n >= 136) n_multichunk++;
    do begin
      while (!hash_ready) @(negedge clk);
      for (int i = 0; i < 136; i++) hash_blk[8*i +: 8] = (pos + i < n) ? msg[pos + i] : 8'h00;
      hash_blk_last   = (n - pos) < 136;
      hash_blk_len    = hash_blk_last ? 8'(n - pos) : 8'd0;
      hash_ins_prefix = ins_prefix && (pos == 0);
      hash_blk_valid  = 1'b1;
      @(negedge clk);
      hash_blk_valid  = 1'b0;
      hash_ins_prefix = 1'b0;
      pos += 136;
    end while (!hash_blk_last);
    while (!hash_done) @(negedge clk);
  endtask

  task automatic command(input logic [2:0] c, output int cycles);
    @(negedge clk);
    while (busy) @(negedge clk);
    cmd = c; cmd_valid = 1'b1;
    @(negedge clk);
    cmd_valid = 1'b0;
    cycles = 1;
    while (!cmd_done) begin @(negedge clk); cycles++; end
  endtask

  function automatic fe_t rnd_fe();
    logic [511:0] r;
    for (int i = 0; i < 16; i++) r[32*i +: 32] = $urandom;
    return fe_t'(r % 512'(P));
  endfunction

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] sk [$], msg [$], q [$];
    logic [7:0] dom4 [$];
    logic [455:0] a_enc, r_enc;
    fe_t ax, ay, lam;
    int cyc;
    dom4 = '{8'h53, 8'h69, 8'h67, 8'h45, 8'h64, 8'h34, 8'h34, 8'h38, 8'h00, 8'h00};  // "SigEd448",0,0
    to_mont(BASE_X, BASE_Y, base_u, base_v);
    ver_bx = BASE_X;
    ver_by = BASE_Y;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < NVEC; t++) begin
      sk.delete(); msg.delete();
      for (int i = 0; i < 57; i++) sk.push_back(8'((i * 13 + SEED[t] * 31 + 5) % 256));
      for (int i = 0; i < 20; i++) msg.push_back(8'((i * 29 + SEED[t]) % 256));
      // fresh randomization of the base point for every run
      lam = rnd_fe();
      base_xr = fmul(lam, base_u);
      base_zr = lam;

      // ---- key generation
      hash(sk, 1'b0);
      command(CMD_KEYLOAD, cyc);
      command(CMD_ECPM_S, cyc);
      chk(cyc == ECPM_CMD_CYCLES, $sformatf("point multiplication latency %0d", cyc));
      a_enc = pt_enc;
      ver_ax = pt_x;
      ver_ay = pt_y;
      chk(a_enc === PK[t], $sformatf("public key %h", a_enc));
      ed_mul(dut.sk_scalar, BASE_X, BASE_Y, ax, ay);
      chk(pt_x === ax && pt_y === ay, "public point against the Edwards reference");

      // ---- signing: r = SHAKE256(dom4 || prefix || M) mod L
      q = dom4;
      for (int i = 0; i < 57; i++) q.push_back(8'h00);   // prefix, inserted by the core
      foreach (msg[i]) q.push_back(msg[i]);
      hash(q, 1'b1);
      command(CMD_MODL_R, cyc);
      chk(cyc == 3 * 43 + 3, $sformatf("mod L latency %0d", cyc));
      lam = rnd_fe();
      base_xr = fmul(lam, base_u);
      base_zr = lam;
      command(CMD_ECPM_R, cyc);
      r_enc = pt_enc;
      ver_rx = pt_x;
      ver_ry = pt_y;
      chk(r_enc === SIG[t][455:0], $sformatf("signature R %h", r_enc));
      // h = SHAKE256(dom4 || R || A || M) mod L
      q = dom4;
      for (int i = 0; i < 57; i++) q.push_back(r_enc[8*i +: 8]);
      for (int i = 0; i < 57; i++) q.push_back(a_enc[8*i +: 8]);
      foreach (msg[i]) q.push_back(msg[i]);
      hash(q, 1'b0);
      command(CMD_MODL_H, cyc);
      command(CMD_SIGN_S, cyc);
      chk(cyc == 4 * 43 + 3, $sformatf("multiply-add latency %0d", cyc));
      chk(456'(scalar_out) === SIG[t][911:456], $sformatf("signature S %h", scalar_out));
      // ---- verification of the signature just made, then of a forged one
      ver_s = scalar_out;
      command(CMD_VERIFY, cyc);
      chk(verify_ok === 1'b1, "valid signature accepted");
      $display("verification took %0d cycles", cyc);
      ver_s = 446'((1024'(scalar_out) + 1024'(7)) % 1024'(L));
      command(CMD_VERIFY, cyc);
      chk(verify_ok === 1'b0, "forged signature rejected");
      if (!verify_ok) n_reject++;
      command(CMD_CLEAR, cyc);
      chk(dut.sk_scalar == '0 && dut.prefix == '0 && dut.r_reg == '0, "clear");
    end
    // every mechanism must have happened
    chk(n_chunks > 0,     "hash chunks");
    chk(n_multichunk > 0, "multi-chunk hash");
    chk(n_prefix > 0,     "prefix insertion");
    chk(n_keyload > 0,    "key load");
    chk(n_modl > 0,       "mod-L reduction");
    chk(n_muladd > 0,     "multiply-add");
    chk(n_nonmod > 0,     "non-modular multiplication");
    chk(n_ecpm > 0,       "point multiplication");
    chk(n_kadj > 0,       "nonce adjustment by j*L");
    chk(n_swap > 0,       "ladder swap by renaming");
    chk(n_verify > 0,     "verification");
    chk(n_skip > 0,       "skipped addition for a 00 bit pair");
    chk(n_reject > 0,     "rejection");
    $display("mechanisms: chunks=%0d multichunk=%0d prefix=%0d keyload=%0d modl=%0d muladd=%0d nonmod_mults=%0d ecpm=%0d kadj=%0d swapped_mults=%0d verify=%0d skips=%0d rejects=%0d",
             n_chunks, n_multichunk, n_prefix, n_keyload, n_modl, n_muladd, n_nonmod, n_ecpm, n_kadj, n_swap, n_verify, n_skip, n_reject);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
