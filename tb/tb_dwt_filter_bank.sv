// Self-checking testbench of the 1-D CDF 9/7 analysis filter bank.
// Random lines (pixel-range values, full-range values that drive the
// saturation, and impulses) are fed with symmetric extension, one sample per
// clock with occasional idle cycles. Every emitted coefficient is compared
// with the direct-convolution reference of tb_ref_pkg, its band with the
// centre parity and its arrival with the two-cycle latency.
module tb_dwt_filter_bank;
  import tb_ref_pkg::*;

  localparam int DW = 16;
  localparam int TAGW = 32;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge for the asynchronous reset
  always #5 clk = ~clk;

  logic                 in_valid, in_emit, in_odd;
  logic signed [DW-1:0] in_data;
  logic [TAGW-1:0]      in_tag;
  logic                 out_valid, out_band;
  logic signed [DW-1:0] out_data;
  logic [TAGW-1:0]      out_tag;

  dwt_filter_bank #(.DW(DW), .TAGW(TAGW)) dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // expected results, indexed by tag
  int exp_val [4096];
  int exp_cyc [4096];
  int n_exp, n_got;

  always @(posedge clk) if (rst_n && out_valid) begin
    int idx;
    idx = int'(out_tag[11:0]);
    checks++;
    if (int'(out_data) != exp_val[idx]) begin
      failures++;
      if (failures < 10) $display("FAIL coef %0d: got %0d exp %0d", idx, out_data, exp_val[idx]);
    end
    checks++;
    if (out_band != out_tag[16]) begin
      failures++;
      $display("FAIL band of coef %0d", idx);
    end
    checks++;
    if (cyc != exp_cyc[idx] + 2) begin
      failures++;
      if (failures < 10) $display("FAIL latency of coef %0d: %0d cycles", idx, cyc - exp_cyc[idx]);
    end
    n_got++;
  end

  task automatic run_line(int n, int mode);
    for (int i = 0; i < n; i++) begin
      case (mode)
        0: ref_line[i] = int'($urandom_range(0, 255));
        1: ref_line[i] = int'($urandom_range(0, 65535)) - 32768;
        default: ref_line[i] = (i == n / 2) ? 255 : 0;
      endcase
    end
    for (int s = -4; s <= n + 3; s++) begin
      int c;
      c = s - 4;
      @(negedge clk);
      in_valid = 1'b1;
      in_data  = DW'(ext(n, s));
      in_emit  = (c >= 0);
      in_odd   = (c % 2 != 0);
      if (c >= 0) begin
        in_tag = {15'd0, in_odd, 16'(n_exp)};
        exp_val[n_exp] = ref_dwt_coef(n, c, DW);
        exp_cyc[n_exp] = cyc;
        n_exp++;
      end else in_tag = '0;
      // occasional bubble
      if ($urandom_range(0, 7) == 0) begin
        @(negedge clk);
        in_valid = 1'b0;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin
    in_valid = 0; in_data = 0; in_emit = 0; in_odd = 0; in_tag = 0;
    n_exp = 0; n_got = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_line(16, 0);
    run_line(8, 0);
    run_line(64, 0);
    run_line(32, 2);
    run_line(40, 1);
    run_line(128, 0);
    repeat (5) @(posedge clk);
    checks++;
    if (n_got != n_exp) begin
      failures++;
      $display("FAIL %0d coefficients expected, %0d seen", n_exp, n_got);
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
