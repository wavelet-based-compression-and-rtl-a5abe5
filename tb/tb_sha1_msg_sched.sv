// Self-checking testbench of the SHA-1 message schedule: random blocks are
// loaded and the 80 words, read out with random pauses between advances, are
// compared with the W[t] recurrence evaluated directly on an 80-word array.
module tb_sha1_msg_sched;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge for the asynchronous reset
  always #5 clk = ~clk;

  logic         load, advance;
  logic [511:0] block;
  logic [31:0]  wt;

  sha1_msg_sched dut (.*);

  int checks = 0, failures = 0;

  function automatic logic [31:0] r1(logic [31:0] v);
    return {v[30:0], v[31]};
  endfunction

  initial begin
    logic [31:0] w [80];
    load = 0; advance = 0; block = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 20; n++) begin
      for (int i = 0; i < 16; i++) block[32*i +: 32] = $urandom;
      for (int i = 0; i < 16; i++) w[i] = block[511 - 32*i -: 32];
      for (int i = 16; i < 80; i++) w[i] = r1(w[i-3] ^ w[i-8] ^ w[i-14] ^ w[i-16]);
      @(negedge clk); load = 1;
      @(negedge clk); load = 0;
      for (int t = 0; t < 80; t++) begin
        checks++;
        if (wt !== w[t]) begin
          failures++;
          if (failures < 10) $display("FAIL block %0d W[%0d] = %h, expected %h", n, t, wt, w[t]);
        end
        while ($urandom_range(0, 3) == 0) @(negedge clk);
        advance = 1;
        @(negedge clk);
        advance = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
