// Image post-processing: serial stream back to a 2-D frame store.
//
// Encrypted coefficients arrive in raster order and are written to
// consecutive locations of an IMG_H x IMG_W frame memory, rebuilding the
// (encrypted) sub-band image as a matrix. After the last word of a frame
// frame_done pulses and frame_valid stays high until the next frame starts
// to arrive. The host reads any location through rd_row/rd_col.
//
// Interface: in_valid/in_ready stream (always ready), in_last marks the end
// of a frame and realigns the write position; host read port with one cycle
// read latency.
//
// The document converts the serial stream back to a 2-D matrix after
// encryption; the memory and its ports are this design's choices.
module image_postproc #(
  parameter int IMG_W = 128,
  parameter int IMG_H = 128,
  parameter int DW    = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic [DW-1:0]            in_data,
  input  logic                     in_last,
  output logic                     frame_done,
  output logic                     frame_valid,
  input  logic [$clog2(IMG_H)-1:0] rd_row,
  input  logic [$clog2(IMG_W)-1:0] rd_col,
  output logic [DW-1:0]            rd_data
);

  localparam int NPIX = IMG_W * IMG_H;
  localparam int AW   = $clog2(NPIX);

  logic [DW-1:0] mem [NPIX];
  logic [AW-1:0] wr_addr;

  assign in_ready = 1'b1;

  always_ff @(posedge clk) begin
    if (in_valid) mem[wr_addr] <= in_data;
    rd_data <= mem[AW'(rd_row) * AW'(IMG_W) + AW'(rd_col)];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_addr     <= '0;
      frame_done  <= 1'b0;
      frame_valid <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      if (in_valid) begin
        if (in_last || wr_addr == AW'(NPIX - 1)) begin
          wr_addr     <= '0;
          frame_done  <= 1'b1;
          frame_valid <= 1'b1;
        end else begin
          wr_addr     <= wr_addr + 1'b1;
          frame_valid <= 1'b0;
        end
      end
    end
  end

endmodule
