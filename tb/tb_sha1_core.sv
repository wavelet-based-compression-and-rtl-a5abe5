// Self-checking testbench of the SHA-1 compression engine.
// Published SHA-1 digests are checked first ("abc", the empty string, "The
// quick brown fox jumps over the lazy dog" and the two-block 448-bit message
// "abcdbcdecdef...nopq", which exercises chaining). Then random messages of
// one to three random blocks are compared with the reference model of
// tb_ref_pkg. Every block must raise done exactly 81 cycles after its start.
module tb_sha1_core;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge for the asynchronous reset
  always #5 clk = ~clk;

  logic         start, init, busy, done;
  logic [511:0] block;
  logic [159:0] digest;

  sha1_core dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic hash_block(logic [511:0] b, logic first);
    int t0;
    @(negedge clk);
    block = b; init = first; start = 1;
    @(posedge clk);
    t0 = cyc;
    @(negedge clk);
    start = 0;
    while (!done) @(posedge clk);
    // done rises 81 cycles after the start edge and is sampled one edge later
    checks++;
    if (cyc - t0 != 82) begin
      failures++;
      $display("FAIL block took %0d cycles", cyc - t0);
    end
  endtask

  task automatic expect_digest(logic [159:0] e, string what);
    checks++;
    if (digest !== e) begin
      failures++;
      $display("FAIL %s: %h, expected %h", what, digest, e);
    end
  endtask

  initial begin
    logic [511:0] b;
    logic [159:0] h;
    start = 0; init = 0; block = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // "abc"
    b = '0; b[511:488] = "abc"; b[487:480] = 8'h80; b[63:0] = 64'd24;
    hash_block(b, 1);
    expect_digest(160'ha9993e36_4706816a_ba3e2571_7850c26c_9cd0d89d, "abc");

    // empty string
    b = '0; b[511:504] = 8'h80;
    hash_block(b, 1);
    expect_digest(160'hda39a3ee_5e6b4b0d_3255bfef_95601890_afd80709, "empty");

    // 43-byte sentence
    b = '0; b[511:168] = "The quick brown fox jumps over the lazy dog";
    b[167:160] = 8'h80; b[63:0] = 64'd344;
    hash_block(b, 1);
    expect_digest(160'h2fd4e1c6_7a2d28fc_ed849ee1_bb76e739_1b93eb12, "fox");

    // 56-byte message, two blocks
    b = '0; b[511:64] = "abcdbcdecdefdefgefghfghighijhijkijkljklmklmnlmnomnopnopq";
    b[63:56] = 8'h80;
    hash_block(b, 1);
    b = '0; b[63:0] = 64'd448;
    hash_block(b, 0);
    expect_digest(160'h84983e44_1c3bd26e_baae4aa1_f95129e5_e54670f1, "two-block");

    // random chained messages
    for (int n = 0; n < 30; n++) begin
      int nb;
      nb = int'($urandom_range(1, 3));
      h = IV;
      for (int k = 0; k < nb; k++) begin
        for (int i = 0; i < 16; i++) b[32*i +: 32] = $urandom;
        h = ref_sha1_block(h, b);
        hash_block(b, k == 0);
        repeat ($urandom_range(0, 3)) @(posedge clk);
      end
      expect_digest(h, "random message");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
