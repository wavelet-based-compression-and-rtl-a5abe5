// Stream encryption of the wavelet coefficients with the SHA-1 key digest.
//
// Every DW-bit coefficient is XORed with the next DW-bit slice of the
// KEY_W-bit digest: the first word of a frame with the top slice
// key[KEY_W-1 -: DW], the next with the slice below it, and so on, wrapping
// around after KEY_W/DW words (10 words for a 160-bit digest and 16-bit
// coefficients). The slice index returns to the top slice after the word
// marked in_last, so each frame is encrypted from the start of the digest.
// XORing the cipher stream again with the same digest restores the
// coefficients, so the same block also decrypts.
//
// Interface: valid/ready streams with a registered output stage. No word is
// accepted while key_valid is low: the stream stalls until the digest exists.
// Timing: one word per clock, one cycle of latency.
//
// The XOR of the serial stream with the hash of the key follows the document;
// the word width and the order in which digest bits are used are this
// design's choices.
module xor_cipher #(
  parameter int DW    = 16,    // coefficient width
  parameter int KEY_W = 160    // digest width
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [KEY_W-1:0] key,
  input  logic             key_valid,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [DW-1:0]    in_data,
  input  logic             in_last,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [DW-1:0]    out_data,
  output logic             out_last
);

  localparam int NW = KEY_W / DW;
  localparam int IW = (NW > 1) ? $clog2(NW) : 1;

  if (KEY_W % DW != 0) begin : gen_width_check
    $error("xor_cipher: KEY_W must be a multiple of DW");
  end

  logic [IW-1:0] idx;
  logic          fire;

  assign in_ready = key_valid && (!out_valid || out_ready);
  assign fire     = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_last  <= 1'b0;
    end else begin
      if (fire) begin
        out_valid <= 1'b1;
        out_data  <= in_data ^ key[KEY_W - 1 - DW * int'(idx) -: DW];
        out_last  <= in_last;
        idx       <= (in_last || idx == IW'(NW - 1)) ? '0 : idx + 1'b1;
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule
