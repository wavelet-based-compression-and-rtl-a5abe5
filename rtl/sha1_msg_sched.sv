// SHA-1 message schedule.
//
// Expands one 512-bit message block into the 80 round words
//   W[t] = M[t]                                          t = 0..15
//   W[t] = rotl1(W[t-3] ^ W[t-8] ^ W[t-14] ^ W[t-16])    t = 16..79
// with a 16-word shift register instead of an 80-word table: word 0 of the
// register is always the current W[t]; every advance shifts the register by
// one word and appends W[t+16], computed from register words 13, 8, 2 and 0.
//
// Interface: load copies the block (first message word in bits 511:480) and
// presents W[0]; each advance then presents the next word. load has priority.
// Timing: wt is a register output, valid the cycle after load / advance.
//
// The recurrence follows the document (read as a one-bit left rotation, as
// SHA-1 defines it); the shift-register form is this design's choice.
module sha1_msg_sched (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [511:0] block,
  input  logic         advance,
  output logic [31:0]  wt
);

  logic [31:0] w [16];
  logic [31:0] w_next;

  assign w_next = wcrypt_pkg::rol32(w[13] ^ w[8] ^ w[2] ^ w[0], 1);
  assign wt     = w[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 16; i++) w[i] <= '0;
    end else if (load) begin
      for (int i = 0; i < 16; i++) w[i] <= block[511 - 32*i -: 32];
    end else if (advance) begin
      for (int i = 0; i < 15; i++) w[i] <= w[i+1];
      w[15] <= w_next;
    end
  end

endmodule
