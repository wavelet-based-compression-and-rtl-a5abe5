// SHA-1 message padding and block assembly for a message of any length.
//
// The message arrives as a stream of 32-bit big-endian words (first message
// byte in bits 31:24). The last word carries in_last and in_nbytes, the
// number of its valid bytes (0..4; 0 allows the empty message). Words are
// collected into 16-word, 512-bit blocks. After the last word the standard
// SHA-1 padding is appended one word per clock:
//   * a single 1 bit (byte 0x80) right after the last message byte,
//   * zero words up to word 13 of a block,
//   * the message length in bits as a 64-bit number in words 14 and 15.
// When the 0x80 byte lands in word 14 or 15 of a block, that block is sent
// with zeros and one extra block holds the zeros and the length.
//
// Interface: in_valid/in_ready word stream; out_valid/out_ready block
// stream. out_first marks the first block of a message (start the hash from
// the initial values), out_final the block that ends it (its digest is the
// result). out_block holds its value while out_valid is high.
// Timing: one word per clock, then one cycle to hand over each block, so a
// full block costs 17 cycles; the padding words of the last block cost one
// cycle each.
//
// The split into 512-bit groups follows the document; the padding rule is
// that of SHA-1, and the word stream and its handshake are this design's
// choices.
module sha1_msg_pad (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [31:0]  in_data,
  input  logic         in_last,
  input  logic [2:0]   in_nbytes,   // valid bytes of the last word, 0..4
  output logic         out_valid,
  input  logic         out_ready,
  output logic [511:0] out_block,
  output logic         out_first,
  output logic         out_final
);

  typedef enum logic [1:0] {FILL, PAD, SEND} state_t;
  state_t state, ret;

  logic [31:0] buf_w [16];
  logic [3:0]  widx;
  logic [63:0] bitlen;
  logic        need80, final_blk, first_blk;

  // bytes and padded form of the incoming word
  logic [2:0]  nb;
  logic [31:0] in_word;
  always_comb begin
    nb = in_last ? ((in_nbytes > 3'd4) ? 3'd4 : in_nbytes) : 3'd4;
    if (nb == 3'd4) in_word = in_data;
    else            in_word = (in_data & ~(32'hffff_ffff >> (8 * int'(nb))))
                              | (32'h8000_0000 >> (8 * int'(nb)));
  end

  assign in_ready = (state == FILL);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= FILL;
      ret       <= FILL;
      widx      <= '0;
      bitlen    <= '0;
      need80    <= 1'b0;
      final_blk <= 1'b0;
      first_blk <= 1'b1;
      for (int i = 0; i < 16; i++) buf_w[i] <= '0;
    end else begin
      unique case (state)
        FILL: if (in_valid) begin
          buf_w[widx] <= in_word;
          widx        <= widx + 1'b1;
          bitlen      <= bitlen + 64'(nb) * 64'd8;
          if (in_last) need80 <= (nb == 3'd4);
          if (widx == 4'd15) begin
            state <= SEND;
            ret   <= in_last ? PAD : FILL;
          end else if (in_last) begin
            state <= PAD;
          end
        end

        PAD: begin
          if (!need80 && widx == 4'd14) begin
            buf_w[14] <= bitlen[63:32];
            buf_w[15] <= bitlen[31:0];
            final_blk <= 1'b1;
            state     <= SEND;
          end else begin
            buf_w[widx] <= need80 ? 32'h8000_0000 : 32'h0;
            need80      <= 1'b0;
            widx        <= widx + 1'b1;
            if (widx == 4'd15) begin
              state <= SEND;
              ret   <= PAD;
            end
          end
        end

        SEND: if (out_ready) begin
          widx      <= '0;
          first_blk <= final_blk;
          if (final_blk) begin
            final_blk <= 1'b0;
            bitlen    <= '0;
            state     <= FILL;
          end else begin
            state <= ret;
          end
        end

        default: state <= FILL;
      endcase
    end
  end

  assign out_valid = (state == SEND);
  assign out_first = first_blk;
  assign out_final = final_blk;
  always_comb
    for (int i = 0; i < 16; i++) out_block[511 - 32*i -: 32] = buf_w[i];

  assert property (@(posedge clk) disable iff (!rst_n)
                   out_valid && !out_ready |=> out_valid && $stable(out_block));

endmodule
