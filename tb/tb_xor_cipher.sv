// Self-checking testbench of the stream XOR cipher: random frames of random
// length are sent with random input gaps and output stalls. Each output word
// must equal the input word XOR the digest slice chosen by its position in
// the frame (wrapping every 10 words), the key slice must restart after
// in_last, no word may pass while key_valid is low, and a second pass through
// a second instance must restore the plain words.
module tb_xor_cipher;
  localparam int DW = 16;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge for the asynchronous reset
  always #5 clk = ~clk;

  logic [159:0]  key;
  logic          key_valid = 0;
  logic          in_valid, in_ready, in_last, out_valid, out_ready, out_last;
  logic [DW-1:0] in_data, out_data;
  logic          d_ready, d_valid, d_last;
  logic [DW-1:0] d_data;

  xor_cipher #(.DW(DW), .KEY_W(160)) enc (.*);

  // decrypting instance: same key, fed by the encrypted stream
  xor_cipher #(.DW(DW), .KEY_W(160)) dec (
    .clk, .rst_n, .key, .key_valid(1'b1),
    .in_valid(out_valid && out_ready), .in_ready(d_ready), .in_data(out_data), .in_last(out_last),
    .out_valid(d_valid), .out_ready(1'b1), .out_data(d_data), .out_last(d_last));

  int checks = 0, failures = 0;
  int stalls = 0;

  logic [DW-1:0] sent [$];
  logic [DW-1:0] plain [$];
  int            pos_q [$];
  logic          last_q [$];

  always @(posedge clk) if (rst_n) begin
    if (in_valid && !key_valid) stalls++;
    checks++;
    if (!key_valid && in_ready) begin
      failures++;
      $display("FAIL accepted a word without a key");
    end
    if (out_valid && out_ready) begin
      logic [DW-1:0] p;
      int k;
      p = sent.pop_front();
      k = pos_q.pop_front();
      checks++;
      if (out_data !== (p ^ key[159 - DW*(k % 10) -: DW]) || out_last !== last_q.pop_front()) begin
        failures++;
        if (failures < 10) $display("FAIL word at frame position %0d: %h", k, out_data);
      end
    end
    if (d_valid) begin
      checks++;
      if (d_data !== plain.pop_front()) begin
        failures++;
        if (failures < 10) $display("FAIL decryption mismatch");
      end
    end
  end

  always @(negedge clk) out_ready = ($urandom_range(0, 3) != 0);

  // the key arrives after the data, and is withdrawn for a while later on
  initial begin
    repeat (30) @(negedge clk);
    key_valid = 1;
    repeat (150) @(negedge clk);
    key_valid = 0;
    repeat (12) @(negedge clk);
    key_valid = 1;
  end

  initial begin
    key = {$urandom, $urandom, $urandom, $urandom, $urandom};
    in_valid = 0; in_data = 0; in_last = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 12; f++) begin
      int n;
      n = int'($urandom_range(1, 37));
      for (int i = 0; i < n; i++) begin
        @(negedge clk);
        in_valid = ($urandom_range(0, 4) != 0);
        in_data  = 16'($urandom);
        in_last  = (i == n - 1);
        if (!in_valid) begin i--; continue; end
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        sent.push_back(in_data);
        plain.push_back(in_data);
        pos_q.push_back(i);
        last_q.push_back(in_last);
      end
      @(negedge clk);
      in_valid = 0;
    end
    repeat (20) @(posedge clk);
    checks++;
    if (sent.size() != 0 || plain.size() != 0 || stalls == 0) begin
      failures++;
      $display("FAIL %0d words not delivered, %0d not decrypted, %0d stall cycles", sent.size(), plain.size(), stalls);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
