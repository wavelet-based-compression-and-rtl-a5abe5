// Self-checking testbench of the post-processing frame store: two frames of
// random words (the second shorter, ended early by in_last) are streamed in
// with gaps; frame_done / frame_valid are checked, and every location is read
// back through the row/column port and compared.
module tb_image_postproc;
  localparam int W = 8, H = 6, DW = 16;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge for the asynchronous reset
  always #5 clk = ~clk;

  logic          in_valid, in_ready, in_last, frame_done, frame_valid;
  logic [DW-1:0] in_data, rd_data;
  logic [2:0]    rd_row, rd_col;

  image_postproc #(.IMG_W(W), .IMG_H(H), .DW(DW)) dut (.*);

  int checks = 0, failures = 0;
  int exp_mem [W*H];
  int dones = 0;
  always @(posedge clk) if (frame_done) dones++;

  task automatic send(int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      in_valid = 0;
      while ($urandom_range(0, 3) == 0) @(negedge clk);
      in_valid = 1; in_data = 16'($urandom); in_last = (i == n - 1);
      exp_mem[i] = int'(in_data);
    end
    @(negedge clk); in_valid = 0; in_last = 0;
    @(negedge clk);
    checks++;
    if (!frame_valid) begin
      failures++;
      $display("FAIL frame_valid low after a frame");
    end
  endtask

  task automatic read_all();
    for (int i = 0; i < W*H; i++) begin
      @(negedge clk); rd_row = 3'(i / W); rd_col = 3'(i % W);
      @(negedge clk);
      checks++;
      if (int'(rd_data) != exp_mem[i]) begin
        failures++;
        if (failures < 10) $display("FAIL location %0d: %h exp %h", i, rd_data, exp_mem[i]);
      end
    end
  endtask

  initial begin
    in_valid = 0; in_data = 0; in_last = 0; rd_row = 0; rd_col = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    send(W*H);
    read_all();
    send(W*H - 5);      // partial frame, the tail keeps the old words
    read_all();
    send(W*H);
    read_all();
    checks++;
    if (dones != 3 || !in_ready) begin
      failures++;
      $display("FAIL %0d frame_done pulses", dones);
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
