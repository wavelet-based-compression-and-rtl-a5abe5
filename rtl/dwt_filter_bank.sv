// One-dimensional CDF 9/7 analysis filter bank with 2:1 decimation.
//
// A nine-sample sliding window is shifted by every valid input sample. The
// 9-tap low-pass filter and the 7-tap high-pass filter are both evaluated on
// the same window, centred on its middle sample, using the symmetry of the
// taps (pre-add of mirrored samples, then one multiply per tap pair). The
// decimator keeps the low-pass result when the centre sample has an even
// index along the line (approximation coefficient) and the high-pass result
// when it is odd (detail coefficient), so one coefficient leaves for every
// sample that enters and the two sub-bands come out interleaved L,H,L,H...
//
// The sample stream must already carry the boundary extension: the caller
// feeds the line with four mirrored samples before and after it, and marks
// with in_emit the samples whose arrival completes a window centred on a real
// sample of the line. in_odd gives the parity of that centre index, and in_tag
// is opaque side information (the caller uses it as a write address) that
// travels with the sample to the output.
//
// Results are rounded to nearest (add half an LSB, arithmetic shift by
// COEF_FRAC) and saturated to DW bits.
//
// Timing: fully pipelined, one sample per clock, out_valid two cycles after
// the in_valid/in_emit that produced it.
//
// The tap values and the low-/high-pass analysis structure follow the
// document; fixed-point widths, rounding and saturation are this design's
// choices.
module dwt_filter_bank
  import wcrypt_pkg::*;
#(
  parameter int DW   = 16,   // sample / coefficient width (signed)
  parameter int TAGW = 16    // width of the side information
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // sample input
  input  logic                 in_valid,
  input  logic signed [DW-1:0] in_data,
  input  logic                 in_emit,   // window complete: produce a coefficient
  input  logic                 in_odd,    // centre index odd: detail, else approximation
  input  logic [TAGW-1:0]      in_tag,
  // decimated coefficient output
  output logic                 out_valid,
  output logic                 out_band,  // 0: low-pass (L), 1: high-pass (H)
  output logic signed [DW-1:0] out_data,
  output logic [TAGW-1:0]      out_tag
);

  localparam int PW   = DW + 1;                 // pre-added pair width
  localparam int ACCW = DW + COEF_W + 5;        // accumulator width

  localparam logic signed [ACCW-1:0] HALF = ACCW'(1) <<< (COEF_FRAC - 1);
  localparam logic signed [ACCW-1:0] SMAX = ACCW'((1 <<< (DW - 1)) - 1);
  localparam logic signed [ACCW-1:0] SMIN = -(ACCW'(1) <<< (DW - 1));

  // win[0] is the newest sample, win[4] the centre, win[8] the oldest
  logic signed [DW-1:0] win [9];
  logic                 v1, emit1, odd1;
  logic [TAGW-1:0]      tag1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 9; i++) win[i] <= '0;
      v1    <= 1'b0;
      emit1 <= 1'b0;
      odd1  <= 1'b0;
      tag1  <= '0;
    end else begin
      v1 <= in_valid;
      if (in_valid) begin
        win[0] <= in_data;
        for (int i = 1; i < 9; i++) win[i] <= win[i-1];
        emit1 <= in_emit;
        odd1  <= in_odd;
        tag1  <= in_tag;
      end
    end
  end

  // symmetric filters on the current window
  logic signed [ACCW-1:0] lp_acc, hp_acc, lp_rnd, hp_rnd, sel;
  logic signed [PW-1:0]   pair [1:4];

  always_comb begin
    for (int k = 1; k <= 4; k++)
      pair[k] = PW'(win[4-k]) + PW'(win[4+k]);

    lp_acc = ACCW'(win[4]) * ACCW'(LP_TAP[0]);
    for (int k = 1; k <= 4; k++)
      lp_acc += ACCW'(pair[k]) * ACCW'(LP_TAP[k]);

    hp_acc = ACCW'(win[4]) * ACCW'(HP_TAP[0]);
    for (int k = 1; k <= 3; k++)
      hp_acc += ACCW'(pair[k]) * ACCW'(HP_TAP[k]);

    lp_rnd = (lp_acc + HALF) >>> COEF_FRAC;
    hp_rnd = (hp_acc + HALF) >>> COEF_FRAC;
    sel    = odd1 ? hp_rnd : lp_rnd;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_band  <= 1'b0;
      out_data  <= '0;
      out_tag   <= '0;
    end else begin
      out_valid <= v1 && emit1;
      if (v1 && emit1) begin
        out_band <= odd1;
        out_tag  <= tag1;
        if (sel > SMAX)      out_data <= SMAX[DW-1:0];
        else if (sel < SMIN) out_data <= SMIN[DW-1:0];
        else                 out_data <= sel[DW-1:0];
      end
    end
  end

endmodule
