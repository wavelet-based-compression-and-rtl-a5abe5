// End-to-end testbench of the compression-encryption chain at its default
// size (128x128 pixels, one DWT level).
//
// Frame 1: a synthetic grayscale image (smooth gradients plus noise) is
// written and started before any key exists, so the finished sub-band
// stream has to wait at the encryption stage; the key is hashed afterwards.
// Frame 2: a new 60-byte key (two SHA-1 blocks) is hashed first, a new image
// follows, and the frame must complete in the cycle count of the pass
// lengths.
// For both frames every word of the output memory is compared with an
// independent model: the row-column CDF 9/7 reference of tb_ref_pkg, XORed
// with the reference SHA-1 digest of the key, slice k mod 10 for the k-th
// word. The digest itself is also compared. The run counts the mechanisms
// the design relies on and fails if one never occurred: key padding and
// hashing, a key spread over two chained blocks, row pass, column pass,
// symmetric boundary extension, stream stall waiting for the key, and frame
// reassembly. As a histogram analysis it also counts, per frame, the input
// pixel values and the low bytes of the encrypted words, prints both
// histograms' spread and fails if they are not clearly different (L1
// distance below a quarter of the pixel count).
module tb_wavelet_crypto_top;
  import tb_ref_pkg::*;

  localparam int W = 128, H = 128, N = W * H, DW = 16;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge for the asynchronous reset
  always #5 clk = ~clk;

  logic            key_in_valid, key_in_ready, key_in_last, key_ready;
  logic [31:0]     key_in_data;
  logic [2:0]      key_in_nbytes;
  logic [159:0]    key_digest;
  logic            pix_wr_en, img_start;
  logic [6:0]      pix_wr_row, pix_wr_col, rd_row, rd_col;
  logic [7:0]      pix_wr_data;
  logic [DW-1:0]   rd_data;
  logic            frame_done, frame_valid, busy;

  wavelet_crypto_top dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- mechanism counters ----------------
  int n_chain = 0, n_hash = 0, n_row = 0, n_col = 0, n_ext = 0, n_stall = 0, n_frames = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_sha.done)                                    n_hash++;
    if (dut.sha_go && !dut.blk_first)                      n_chain++;
    if (dut.u_dwt.rd_v && !dut.u_dwt.col_pass)             n_row++;
    if (dut.u_dwt.rd_v && dut.u_dwt.col_pass)              n_col++;
    if (dut.u_dwt.rd_v && (dut.u_dwt.pos < 4 || dut.u_dwt.pos >= dut.u_dwt.len + 4)) n_ext++;
    if (dut.u_dwt.out_valid && !dut.key_ready)             n_stall++;
    if (frame_done)                                        n_frames++;
  end

  // ---------------- reference ----------------
  int img [N];
  int tmp [N];

  // histogram analysis: input pixels against the low byte of the encrypted words
  int hist_in [256];
  int hist_enc [256];

  task automatic histogram_report(int frame);
    int l1, used_in, used_enc, max_in, max_enc;
    l1 = 0; used_in = 0; used_enc = 0; max_in = 0; max_enc = 0;
    for (int b = 0; b < 256; b++) begin
      l1 += (hist_in[b] > hist_enc[b]) ? hist_in[b] - hist_enc[b] : hist_enc[b] - hist_in[b];
      if (hist_in[b] != 0)  used_in++;
      if (hist_enc[b] != 0) used_enc++;
      if (hist_in[b] > max_in)   max_in = hist_in[b];
      if (hist_enc[b] > max_enc) max_enc = hist_enc[b];
    end
    $display("histogram frame %0d: input bins used %0d, peak %0d; encrypted bins used %0d, peak %0d; L1 distance %0d of %0d",
             frame, used_in, max_in, used_enc, max_enc, l1, 2 * N);
    // the encrypted histogram must be clearly different from the input one
    checks++;
    if (l1 < N / 4) begin
      failures++;
      $display("FAIL encrypted histogram too close to the input histogram");
    end
  endtask

  task automatic ref_dwt();
    for (int r = 0; r < H; r++) begin
      for (int c = 0; c < W; c++) ref_line[c] = img[r*W + c];
      for (int c = 0; c < W; c++) tmp[r*W + ref_dest(W, c)] = ref_dwt_coef(W, c, DW);
    end
    for (int c = 0; c < W; c++) begin
      for (int r = 0; r < H; r++) ref_line[r] = tmp[r*W + c];
      for (int r = 0; r < H; r++) img[ref_dest(H, r)*W + c] = ref_dwt_coef(H, r, DW);
    end
  endtask

  task automatic write_image(int seed);
    for (int b = 0; b < 256; b++) hist_in[b] = 0;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        int v;
        v = (r * 2 + c + seed * 37) % 200 + int'($urandom_range(0, 40)) - 20;
        if ((r / 32 + c / 32 + seed) % 3 == 0) v = 240 - v / 2;   // blocks with sharp edges
        if (v < 0) v = 0;
        if (v > 255) v = 255;
        img[r*W + c] = v;
        hist_in[v]++;
        @(negedge clk);
        pix_wr_en = 1; pix_wr_row = 7'(r); pix_wr_col = 7'(c); pix_wr_data = 8'(v);
      end
    @(negedge clk);
    pix_wr_en = 0;
  endtask

  task automatic hash_key(int nbytes, output logic [159:0] exp_digest);
    int nw;
    for (int i = 0; i < nbytes; i++) ref_msg[i] = 8'($urandom);
    exp_digest = ref_sha1(nbytes);
    nw = (nbytes == 0) ? 1 : (nbytes + 3) / 4;
    for (int w = 0; w < nw; w++) begin
      logic [31:0] d;
      for (int j = 0; j < 4; j++) d[31 - 8*j -: 8] = (4*w + j < nbytes) ? ref_msg[4*w + j] : 8'hee;
      @(negedge clk);
      key_in_valid = 1; key_in_data = d; key_in_last = (w == nw - 1);
      key_in_nbytes = 3'(nbytes - 4*w > 4 ? 4 : nbytes - 4*w);
      @(posedge clk);
      while (!key_in_ready) @(posedge clk);
    end
    @(negedge clk);
    key_in_valid = 0; key_in_last = 0;
    while (!key_ready) @(posedge clk);
    checks++;
    if (key_digest !== exp_digest) begin
      failures++;
      $display("FAIL digest %h, expected %h", key_digest, exp_digest);
    end
  endtask

  task automatic check_output(logic [159:0] d);
    int bad;
    bad = 0;
    for (int b = 0; b < 256; b++) hist_enc[b] = 0;
    for (int i = 0; i < N; i++) begin
      logic [DW-1:0] e;
      e = DW'(img[i]) ^ d[159 - DW*(i % 10) -: DW];
      @(negedge clk); rd_row = 7'(i / W); rd_col = 7'(i % W);
      @(negedge clk);
      hist_enc[rd_data[7:0]]++;
      checks++;
      if (rd_data !== e) begin
        failures++;
        bad++;
        if (bad < 8) $display("FAIL output r%0d c%0d: %h, expected %h", i / W, i % W, rd_data, e);
      end
    end
  endtask

  initial begin
    logic [159:0] d;
    int t0, t1, exp_cycles;
    key_in_valid = 0; key_in_data = 0; key_in_last = 0; key_in_nbytes = 0; pix_wr_en = 0; pix_wr_row = 0; pix_wr_col = 0;
    pix_wr_data = 0; img_start = 0; rd_row = 0; rd_col = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- frame 1: the transform finishes before the key exists ----
    write_image(1);
    ref_dwt();
    @(negedge clk); img_start = 1;
    @(negedge clk); img_start = 0;
    while (!dut.u_dwt.out_valid) @(posedge clk);
    repeat (50) @(posedge clk);
    checks++;
    if (frame_valid || dut.u_post.wr_addr != 0) begin
      failures++;
      $display("FAIL data passed the encryption stage without a key");
    end
    hash_key(13, d);
    while (!frame_done) @(posedge clk);
    check_output(d);
    histogram_report(1);

    // ---- frame 2: key first, then a new image; timed ----
    hash_key(60, d);
    write_image(2);
    ref_dwt();
    @(negedge clk); img_start = 1;
    @(posedge clk);
    t0 = cyc;
    @(negedge clk); img_start = 0;
    while (!frame_done) @(posedge clk);
    t1 = cyc;
    // stream in (N) + row pass H*(W+8)+4 + column pass W*(H+8)+4 + stream out (N) + pipeline
    exp_cycles = N + H * (W + 8) + 4 + W * (H + 8) + 4 + N + 4;
    checks++;
    if (t1 - t0 != exp_cycles) begin
      failures++;
      $display("FAIL frame took %0d cycles, expected %0d", t1 - t0, exp_cycles);
    end
    check_output(d);
    histogram_report(2);

    $display("mechanisms: chained_blocks=%0d hashes=%0d row_reads=%0d col_reads=%0d extension_reads=%0d stall_cycles=%0d frames=%0d",
             n_chain, n_hash, n_row, n_col, n_ext, n_stall, n_frames);
    checks++;
    if (n_hash != 3 || n_chain != 1 || n_row == 0 || n_col == 0 || n_ext == 0 || n_stall == 0 || n_frames != 2) begin
      failures++;
      $display("FAIL a mechanism did not occur as planned");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
