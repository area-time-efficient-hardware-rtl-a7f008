// shake256: SHAKE256 hash unit (Keccak[r=1088, c=512]) with a 912-bit output.
//
// The message is absorbed in 1088-bit (136-byte) chunks; byte i of a chunk is
// blk[8*i +: 8]. For the last chunk, blk_len gives the number of message
// bytes it holds (0..135); the unit discards the bytes above that and applies
// the SHAKE padding itself (0x1F after the message, 0x80 in the last byte of
// the rate). Each chunk is followed by the 24 rounds of Keccak-f[1600], one
// per cycle. After the last chunk's permutation the first 114 bytes of the
// state are the 912-bit digest (byte i in digest[8*i +: 8]) and `done`
// pulses; one squeeze suffices because 114 bytes fit in the rate.
//
// Interface: pulse `init` to clear the state before a new message. A chunk is
// taken when blk_valid and ready are both high; ready drops for 24 cycles
// while the permutation runs. Timing: done rises 25 cycles after the last
// chunk is taken.
//
// The published design gives the rate, capacity, chunk size and output size; the
// round-per-cycle structure and the in-unit padding are this design's choice.
module shake256 (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          init,
  input  logic          blk_valid,
  input  logic [1087:0] blk,
  input  logic          blk_last,
  input  logic [7:0]    blk_len,
  output logic          ready,
  output logic [911:0]  digest,
  output logic          done
);

  localparam int unsigned RATE_BYTES = 136;

  logic [1599:0] state, state_nxt;
  logic [4:0]    rnd;
  logic          running, last_r;

  keccak_round u_round (
    .state_in  (state),
    .rnd       (rnd),
    .state_out (state_nxt)
  );

  // Padded chunk: message bytes below blk_len, then 0x1F, then 0x80 at the end.
  logic [1087:0] padded;
  always_comb begin
    padded = blk;
    if (blk_last) begin
      for (int i = 0; i < RATE_BYTES; i++) begin
        if (i >= int'(blk_len)) padded[8*i +: 8] = 8'h00;
        if (i == int'(blk_len)) padded[8*i +: 8] = 8'h1F;
      end
      padded[1087] = 1'b1;
    end
  end

  assign ready  = !running;
  assign digest = state[911:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= '0;
      rnd     <= '0;
      running <= 1'b0;
      last_r  <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (init) begin
        state   <= '0;
        running <= 1'b0;
      end else if (running) begin
        state <= state_nxt;
        rnd   <= rnd + 5'd1;
        if (rnd == 5'd23) begin
          running <= 1'b0;
          done    <= last_r;
        end
      end else if (blk_valid) begin
        state[1087:0] <= state[1087:0] ^ padded;
        rnd           <= '0;
        running       <= 1'b1;
        last_r        <= blk_last;
      end
    end
  end

endmodule
