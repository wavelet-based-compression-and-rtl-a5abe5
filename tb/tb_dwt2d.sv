// Self-checking testbench of the row-column 2-D DWT.
// Two instances are tested: one level on a 16x16 frame and two levels on a
// 24x20 frame. Each receives random 8-bit frames (and one frame of extreme
// values) with random input gaps, and is unloaded with random output stalls.
// The sub-band image is compared word by word with a reference that applies
// the 1-D reference transform of tb_ref_pkg to rows and then columns, and the
// time between the last input sample and the first output coefficient is
// compared with the pass lengths given in the dwt2d header.
module tb_dwt2d;
  import tb_ref_pkg::*;

  localparam int DW = 16;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge for the asynchronous reset
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- reference ----------------
  int ref_img [1024];
  int tmp_img [1024];

  task automatic ref_2d(int W, int H, int L);
    for (int l = 0; l < L; l++) begin
      int w, h;
      w = W >> l; h = H >> l;
      for (int r = 0; r < h; r++) begin
        for (int c = 0; c < w; c++) ref_line[c] = ref_img[r*W + c];
        for (int c = 0; c < w; c++) tmp_img[r*W + ref_dest(w, c)] = ref_dwt_coef(w, c, DW);
      end
      for (int c = 0; c < w; c++) begin
        for (int r = 0; r < h; r++) ref_line[r] = tmp_img[r*W + c];
        for (int r = 0; r < h; r++) ref_img[ref_dest(h, r)*W + c] = ref_dwt_coef(h, r, DW);
      end
    end
  endtask

  // ---------------- DUTs ----------------
  logic                 iv0, ir0, ov0, or0, ol0, b0;
  logic signed [DW-1:0] id0, od0;
  logic                 iv1, ir1, ov1, or1, ol1, b1;
  logic signed [DW-1:0] id1, od1;

  dwt2d #(.IMG_W(16), .IMG_H(16), .LEVELS(1), .DW(DW)) dut0 (
    .clk, .rst_n, .in_valid(iv0), .in_ready(ir0), .in_data(id0),
    .out_valid(ov0), .out_ready(or0), .out_data(od0), .out_last(ol0), .busy(b0));

  dwt2d #(.IMG_W(24), .IMG_H(20), .LEVELS(2), .DW(DW)) dut1 (
    .clk, .rst_n, .in_valid(iv1), .in_ready(ir1), .in_data(id1),
    .out_valid(ov1), .out_ready(or1), .out_data(od1), .out_last(ol1), .busy(b1));

  int pix [1024];

  task automatic run(int which, int W, int H, int L, int mode);
    int n, got, t_last_in, t_first_out, exp_gap;
    logic first;
    n = W * H;
    for (int i = 0; i < n; i++) begin
      pix[i] = (mode == 1) ? ((($urandom_range(0, 1)) == 1) ? 255 : 0) : int'($urandom_range(0, 255));
      ref_img[i] = pix[i];
    end
    ref_2d(W, H, L);
    // load
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      while ($urandom_range(0, 5) == 0) begin
        if (which == 0) iv0 = 0; else iv1 = 0;
        @(negedge clk);
      end
      if (which == 0) begin iv0 = 1; id0 = DW'(pix[i]); end
      else            begin iv1 = 1; id1 = DW'(pix[i]); end
      @(posedge clk);
      while (!((which == 0) ? ir0 : ir1)) @(posedge clk);
      t_last_in = cyc;
    end
    @(negedge clk);
    iv0 = 0; iv1 = 0;
    // unload
    got = 0;
    first = 1;
    while (got < n) begin
      @(negedge clk);
      if (which == 0) or0 = ($urandom_range(0, 3) != 0); else or1 = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if ((which == 0) ? (ov0 && first) : (ov1 && first)) begin
        first = 0;
        t_first_out = cyc;
      end
      if ((which == 0) ? (ov0 && or0) : (ov1 && or1)) begin
        int v;
        logic last;
        v    = (which == 0) ? int'(od0) : int'(od1);
        last = (which == 0) ? ol0 : ol1;
        checks++;
        if (v != ref_img[got]) begin
          failures++;
          if (failures < 10) $display("FAIL dut%0d coef %0d (r%0d c%0d): got %0d exp %0d",
                                      which, got, got / W, got % W, v, ref_img[got]);
        end
        checks++;
        if (last != (got == n - 1)) begin
          failures++;
          $display("FAIL dut%0d out_last at %0d", which, got);
        end
        got++;
      end
    end
    @(negedge clk);
    or0 = 0; or1 = 0;
    // cycle budget: per level h*(w+8)+4 + w*(h+8)+4, plus read-out start
    exp_gap = 2;
    for (int l = 0; l < L; l++) begin
      int w, h;
      w = W >> l; h = H >> l;
      exp_gap += h * (w + 8) + 4 + w * (h + 8) + 4;
    end
    checks++;
    if (t_first_out - t_last_in != exp_gap) begin
      failures++;
      $display("FAIL dut%0d transform took %0d cycles, expected %0d", which, t_first_out - t_last_in, exp_gap);
    end
  endtask

  initial begin
    iv0 = 0; iv1 = 0; id0 = 0; id1 = 0; or0 = 0; or1 = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(0, 16, 16, 1, 0);
    run(0, 16, 16, 1, 1);
    run(1, 24, 20, 2, 0);
    run(1, 24, 20, 2, 1);
    run(0, 16, 16, 1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
