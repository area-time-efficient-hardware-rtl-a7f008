// sk_buffer: secret key buffer of the Ed448 core.
//
// Takes the 114-byte SHAKE256 digest of the secret key and keeps its two
// halves: the low 57 bytes, clamped, as the secret scalar s (the two lowest
// bits cleared, bit 447 set, the last byte cleared, so s is a multiple of 4
// with a fixed top bit and a constant-length ladder), and the high 57 bytes
// as the prefix that later seeds the signing nonce. `clear` wipes both.
//
// Interface: `load` captures `digest` (byte i in digest[8*i +: 8]); the
// outputs change on the following clock edge. The published design lists a secret
// key buffer among the units of the middle stage; the clamping rule is the
// standard Ed448 key expansion, supplied here.
module sk_buffer
  import ed448_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic          clear,
  input  logic [911:0]  digest,
  output fe_t           scalar,
  output logic [455:0]  prefix
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scalar <= '0;
      prefix <= '0;
    end else if (clear) begin
      scalar <= '0;
      prefix <= '0;
    end else if (load) begin
      scalar <= {1'b1, digest[446:2], 2'b00};
      prefix <= digest[911:456];
    end
  end

endmodule
