// Self-checking testbench of the pre-processing frame store: a random 12x10
// image is written in a shuffled order, streamed out twice with random
// stalls, and every pixel is checked against its raster position together
// with out_last and the one-pixel-per-clock rate without stalls.
module tb_image_preproc;
  localparam int W = 12, H = 10, DW = 16;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge for the asynchronous reset
  always #5 clk = ~clk;

  logic                 wr_en, start, busy, out_valid, out_ready, out_last;
  logic [3:0]           wr_row, wr_col;
  logic [7:0]           wr_pix;
  logic signed [DW-1:0] out_data;

  image_preproc #(.IMG_W(W), .IMG_H(H), .PIX_W(8), .DW(DW)) dut (.*);

  int checks = 0, failures = 0;
  int img [W*H];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic stream(bit stall);
    int got, t0;
    got = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    t0 = cyc;
    while (got < W * H) begin
      @(negedge clk);
      out_ready = stall ? ($urandom_range(0, 2) != 0) : 1'b1;
      @(posedge clk);
      if (out_valid && out_ready) begin
        checks++;
        if (int'(out_data) != img[got] || out_last != (got == W*H - 1)) begin
          failures++;
          if (failures < 10) $display("FAIL pixel %0d: %0d exp %0d", got, out_data, img[got]);
        end
        got++;
      end
    end
    if (!stall) begin
      checks++;
      if (cyc - t0 != W * H) begin
        failures++;
        $display("FAIL streaming took %0d cycles", cyc - t0);
      end
    end
    @(negedge clk); out_ready = 0;
    repeat (2) @(posedge clk);
    checks++;
    if (busy || out_valid) begin
      failures++;
      $display("FAIL still busy after the frame");
    end
  endtask

  initial begin
    int order [W*H];
    wr_en = 0; start = 0; out_ready = 0; wr_row = 0; wr_col = 0; wr_pix = 0;
    for (int i = 0; i < W*H; i++) begin
      img[i] = int'($urandom_range(0, 255));
      order[i] = i;
    end
    order.shuffle();
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < W*H; i++) begin
      @(negedge clk);
      wr_en = 1; wr_row = 4'(order[i] / W); wr_col = 4'(order[i] % W); wr_pix = 8'(img[order[i]]);
    end
    @(negedge clk); wr_en = 0;
    stream(1);
    stream(0);
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
