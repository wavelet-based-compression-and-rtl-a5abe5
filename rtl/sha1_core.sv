// SHA-1 compression engine, one round per clock.
//
// The working variables A..E are loaded from the chaining value (the five
// initial words H0..H4 when init is set, otherwise the digest of the previous
// block, so longer messages are hashed block after block). Each of the 80
// rounds computes
//   T = rotl5(A) + F_t(B,C,D) + E + K_t + W_t
//   E = D, D = C, C = rotl30(B), B = A, A = T
// with F_t and K_t changing every 20 rounds and W_t from sha1_msg_sched. After
// round 79 the variables are added word-wise to the chaining value to give
// the 160-bit digest {H0,H1,H2,H3,H4}.
//
// Interface: start (with block and init) is accepted while busy is low. done
// pulses for one cycle when digest is updated; digest then holds its value
// until the next block finishes.
// Timing: 81 cycles from start to done (80 rounds and the final addition),
// i.e. 512 bits per 81 cycles.
//
// The round structure, functions and constants follow the document; the
// one-round-per-cycle organisation and the handshake are this design's.
module sha1_core
  import wcrypt_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         init,      // 1: start from H0..H4, 0: chain on digest
  input  logic [511:0] block,
  output logic         busy,
  output logic         done,
  output logic [159:0] digest
);

  typedef enum logic [1:0] {IDLE, ROUND, FINAL} state_t;
  state_t state;

  logic [6:0]  t;
  logic [31:0] a, b, c, d, e;
  logic [31:0] wt, tmp;
  logic        go;

  assign go = start && (state == IDLE);

  sha1_msg_sched u_sched (
    .clk    (clk),
    .rst_n  (rst_n),
    .load   (go),
    .block  (block),
    .advance(state == ROUND),
    .wt     (wt)
  );

  assign tmp = rol32(a, 5) + sha1_f(t, b, c, d) + e + sha1_k(t) + wt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= IDLE;
      t      <= '0;
      {a, b, c, d, e} <= '0;
      digest <= SHA1_IV;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (go) begin
          {a, b, c, d, e} <= init ? SHA1_IV : digest;
          if (init) digest <= SHA1_IV;
          t     <= '0;
          state <= ROUND;
        end
        ROUND: begin
          e <= d;
          d <= c;
          c <= rol32(b, 30);
          b <= a;
          a <= tmp;
          t <= t + 1'b1;
          if (t == 7'(SHA1_ROUNDS - 1)) state <= FINAL;
        end
        FINAL: begin
          digest <= {digest[159:128] + a, digest[127:96] + b, digest[95:64] + c,
                     digest[63:32] + d, digest[31:0] + e};
          done   <= 1'b1;
          state  <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = (state != IDLE);

endmodule
