// Self-checking testbench of the SHA-1 padding and block assembly. Messages
// of every length from 0 to 140 bytes (all positions of the 0x80 byte and of
// the length field, including the cases that need an extra block) are sent
// as word streams with random gaps, the blocks are taken with random stalls
// and compared with the byte-wise padding reference, together with the
// first/final block flags. Known vectors: the padded block of "abc".
module tb_sha1_msg_pad;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge for the asynchronous reset
  always #5 clk = ~clk;

  logic         in_valid, in_ready, in_last, out_valid, out_ready, out_first, out_final;
  logic [31:0]  in_data;
  logic [2:0]   in_nbytes;
  logic [511:0] out_block;

  sha1_msg_pad dut (.*);

  int checks = 0, failures = 0;
  int cur_n, blk_k;
  int n_extra = 0;

  always @(negedge clk) out_ready = ($urandom_range(0, 2) != 0);

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    checks++;
    if (out_block !== ref_block(cur_n, blk_k) || out_first !== (blk_k == 0)
        || out_final !== (blk_k == ref_nblocks(cur_n) - 1)) begin
      failures++;
      if (failures < 10) $display("FAIL length %0d block %0d: %h first %b final %b",
                                  cur_n, blk_k, out_block, out_first, out_final);
    end
    blk_k++;
  end

  task automatic send(int n);
    int nw;
    cur_n = n;
    blk_k = 0;
    if ((n % 64) >= 56) n_extra++;
    nw = (n == 0) ? 1 : (n + 3) / 4;
    for (int w = 0; w < nw; w++) begin
      logic [31:0] d;
      for (int j = 0; j < 4; j++) d[31 - 8*j -: 8] = (4*w + j < n) ? ref_msg[4*w + j] : 8'($urandom);
      @(negedge clk);
      while ($urandom_range(0, 4) == 0) begin in_valid = 0; @(negedge clk); end
      in_valid = 1; in_data = d; in_last = (w == nw - 1);
      in_nbytes = 3'(n - 4*w > 4 ? 4 : n - 4*w);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    @(negedge clk);
    in_valid = 0; in_last = 0;
    while (blk_k < ref_nblocks(n)) @(posedge clk);
    @(posedge clk);
  endtask

  initial begin
    in_valid = 0; in_data = 0; in_last = 0; in_nbytes = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    ref_msg[0] = "a"; ref_msg[1] = "b"; ref_msg[2] = "c";
    send(3);
    checks++;
    if (ref_block(3, 0) !== {"abc", 8'h80, 416'd0, 64'd24}) begin
      failures++;
      $display("FAIL reference padding of abc");
    end
    for (int n = 0; n <= 140; n++) begin
      for (int i = 0; i < n; i++) ref_msg[i] = 8'($urandom);
      send(n);
    end
    checks++;
    if (n_extra == 0) begin
      failures++;
      $display("FAIL no message needed an extra padding block");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
