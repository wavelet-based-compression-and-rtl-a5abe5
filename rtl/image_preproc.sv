// Image pre-processing: 2-D frame store and raster serialiser.
//
// The host writes the IMG_H x IMG_W grayscale image pixel by pixel at (row,
// column) into a frame memory. A start pulse then turns the stored matrix
// into a serial stream: pixels leave in raster order (row 0 column 0 first),
// widened to DW-bit signed samples (the pixel value is unsigned, so the
// upper bits are zero), which is the form the wavelet transform consumes.
//
// Interface: wr_en/wr_row/wr_col/wr_pix host port (one pixel per cycle),
// start (ignored while streaming), and an out_valid/out_ready stream with
// out_last on the final pixel. busy is high while streaming.
// Timing: one pixel per clock when out_ready stays high; the first pixel is
// valid two cycles after start.
//
// The document converts the image matrix to a serial stream before the
// wavelet filters; the memory and the handshakes are this design's choices.
module image_preproc #(
  parameter int IMG_W = 128,
  parameter int IMG_H = 128,
  parameter int PIX_W = 8,
  parameter int DW    = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [$clog2(IMG_H)-1:0] wr_row,
  input  logic [$clog2(IMG_W)-1:0] wr_col,
  input  logic [PIX_W-1:0]         wr_pix,
  input  logic                     start,
  output logic                     busy,
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic signed [DW-1:0]     out_data,
  output logic                     out_last
);

  localparam int NPIX = IMG_W * IMG_H;
  localparam int AW   = $clog2(NPIX);

  logic [PIX_W-1:0] mem [NPIX];
  logic [PIX_W-1:0] q;
  logic [AW:0]      rd_cnt;
  logic             rd_go;

  assign rd_go = busy && (rd_cnt < (AW+1)'(NPIX)) && (!out_valid || out_ready);

  always_ff @(posedge clk) begin
    if (wr_en) mem[AW'(wr_row) * AW'(IMG_W) + AW'(wr_col)] <= wr_pix;
    if (rd_go) q <= mem[rd_cnt[AW-1:0]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      rd_cnt    <= '0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
    end else begin
      if (!busy && start) begin
        busy   <= 1'b1;
        rd_cnt <= '0;
      end
      if (rd_go) begin
        rd_cnt    <= rd_cnt + 1'b1;
        out_valid <= 1'b1;
        out_last  <= (rd_cnt == (AW+1)'(NPIX - 1));
      end else if (out_ready && out_valid) begin
        out_valid <= 1'b0;
        out_last  <= 1'b0;
        if (out_last) busy <= 1'b0;
      end
    end
  end

  assign out_data = DW'(q);

  assert property (@(posedge clk) disable iff (!rst_n)
                   out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule
