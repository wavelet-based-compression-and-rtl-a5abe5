// Image compression-encryption chain: CDF 9/7 wavelet decomposition followed
// by XOR encryption with the SHA-1 hash of a secret key.
//
//   host pixels -> image_preproc -> dwt2d -> xor_cipher -> image_postproc -> host
//                                             ^
//   host key -> sha1_msg_pad -> sha1_core ----+ (160-bit digest)
//
// The host writes a grayscale image into the pre-processing frame store and
// pulses img_start. The image is serialised in raster order, decomposed into
// the LL/HL/LH/HH sub-bands by the row-column 2-D DWT (LEVELS octave levels),
// and the coefficient stream is XORed with the digest of the key before the
// post-processing block writes it back into a frame memory that the host
// reads. Independently, the host streams a key of any length as 32-bit
// words; it is padded and cut into 512-bit SHA-1 blocks, which are hashed
// one after the other. key_ready rises when the digest of the whole key is
// available; until then the encryption stage holds the coefficient stream
// (the DWT waits with its result).
//
// Interface: plain host ports. pix_wr_* write one pixel per clock; rd_row /
// rd_col read the encrypted frame with one cycle of latency; frame_done
// pulses and frame_valid stays high once a complete encrypted frame is in
// the output memory. key_in_* is a valid/ready word stream, first key byte
// in bits 31:24, key_in_nbytes (0..4) valid bytes in the word marked
// key_in_last. key_ready drops with the first word of a new key; a new key
// should be sent between frames.
//
// Timing for one frame (out_ready never stalls): IMG_W*IMG_H cycles to
// stream the image in, the DWT passes (per level h*(w+8)+4 + w*(h+8)+4
// cycles, w = IMG_W>>l, h = IMG_H>>l), and IMG_W*IMG_H cycles to stream the
// result out, plus 4 cycles of pipeline, counted from the clock edge that
// samples img_start to the one that raises frame_done (67,596 cycles at
// 128x128, one level). Hashing takes 17 cycles per 16 key words to build each
// block plus 82 cycles per block.
//
// The chain (pre-processing, DWT analysis filter bank, SHA-1 key hash, XOR
// of the serial stream, post-processing) and the 128x128 grayscale working
// size follow the document; the one-level default, word widths, the key
// word stream and the stream handshakes are this design's choices.
module wavelet_crypto_top #(
  parameter int IMG_W     = 128,
  parameter int IMG_H     = 128,
  parameter int LEVELS    = 1,
  parameter int PIX_W     = 8,
  parameter int DW        = 16
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // key hashing
  input  logic                           key_in_valid,
  output logic                           key_in_ready,
  input  logic [31:0]                    key_in_data,
  input  logic                           key_in_last,
  input  logic [2:0]                     key_in_nbytes,
  output logic                           key_ready,
  output logic [159:0]                   key_digest,
  // image input
  input  logic                           pix_wr_en,
  input  logic [$clog2(IMG_H)-1:0]       pix_wr_row,
  input  logic [$clog2(IMG_W)-1:0]       pix_wr_col,
  input  logic [PIX_W-1:0]               pix_wr_data,
  input  logic                           img_start,
  // encrypted sub-band image output
  input  logic [$clog2(IMG_H)-1:0]       rd_row,
  input  logic [$clog2(IMG_W)-1:0]       rd_col,
  output logic [DW-1:0]                  rd_data,
  output logic                           frame_done,
  output logic                           frame_valid,
  output logic                           busy
);

  // ---------------- key hashing ----------------
  logic [511:0] key_block;
  logic         blk_valid, blk_first, blk_final;
  logic         sha_busy, sha_done, sha_go, hashing_final;

  sha1_msg_pad u_pad (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (key_in_valid),
    .in_ready (key_in_ready),
    .in_data  (key_in_data),
    .in_last  (key_in_last),
    .in_nbytes(key_in_nbytes),
    .out_valid(blk_valid),
    .out_ready(sha_go),
    .out_block(key_block),
    .out_first(blk_first),
    .out_final(blk_final)
  );

  // a block is handed over whenever the engine is idle
  assign sha_go = blk_valid && !sha_busy;

  sha1_core u_sha (
    .clk   (clk),
    .rst_n (rst_n),
    .start (sha_go),
    .init  (blk_first),
    .block (key_block),
    .busy  (sha_busy),
    .done  (sha_done),
    .digest(key_digest)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      key_ready     <= 1'b0;
      hashing_final <= 1'b0;
    end else begin
      if (sha_go) hashing_final <= blk_final;
      if (key_in_valid && key_in_ready)      key_ready <= 1'b0;
      else if (sha_done && hashing_final)    key_ready <= 1'b1;
    end
  end

  // ---------------- image path ----------------
  logic                 pre_valid, pre_ready, pre_last, pre_busy;
  logic signed [DW-1:0] pre_data;
  logic                 dwt_valid, dwt_ready, dwt_last, dwt_busy;
  logic signed [DW-1:0] dwt_data;
  logic                 enc_valid, enc_ready, enc_last;
  logic [DW-1:0]        enc_data;

  image_preproc #(.IMG_W(IMG_W), .IMG_H(IMG_H), .PIX_W(PIX_W), .DW(DW)) u_pre (
    .clk      (clk),
    .rst_n    (rst_n),
    .wr_en    (pix_wr_en),
    .wr_row   (pix_wr_row),
    .wr_col   (pix_wr_col),
    .wr_pix   (pix_wr_data),
    .start    (img_start),
    .busy     (pre_busy),
    .out_valid(pre_valid),
    .out_ready(pre_ready),
    .out_data (pre_data),
    .out_last (pre_last)
  );

  dwt2d #(.IMG_W(IMG_W), .IMG_H(IMG_H), .LEVELS(LEVELS), .DW(DW)) u_dwt (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (pre_valid),
    .in_ready (pre_ready),
    .in_data  (pre_data),
    .out_valid(dwt_valid),
    .out_ready(dwt_ready),
    .out_data (dwt_data),
    .out_last (dwt_last),
    .busy     (dwt_busy)
  );

  xor_cipher #(.DW(DW), .KEY_W(160)) u_enc (
    .clk      (clk),
    .rst_n    (rst_n),
    .key      (key_digest),
    .key_valid(key_ready),
    .in_valid (dwt_valid),
    .in_ready (dwt_ready),
    .in_data  (dwt_data),
    .in_last  (dwt_last),
    .out_valid(enc_valid),
    .out_ready(enc_ready),
    .out_data (enc_data),
    .out_last (enc_last)
  );

  image_postproc #(.IMG_W(IMG_W), .IMG_H(IMG_H), .DW(DW)) u_post (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (enc_valid),
    .in_ready   (enc_ready),
    .in_data    (enc_data),
    .in_last    (enc_last),
    .frame_done (frame_done),
    .frame_valid(frame_valid),
    .rd_row     (rd_row),
    .rd_col     (rd_col),
    .rd_data    (rd_data)
  );

  assign busy = pre_busy || dwt_busy || dwt_valid || enc_valid || sha_busy;

  logic unused_pre_last;
  assign unused_pre_last = pre_last;

endmodule
