// Two-dimensional discrete wavelet transform by row-column decomposition.
//
// A frame of IMG_H x IMG_W samples arrives as a raster-order stream and is
// stored in frame memory A. One decomposition level is two passes of the
// shared 1-D CDF 9/7 analysis filter bank (dwt_filter_bank):
//   row pass    - every row of A is filtered; the approximation (L) results
//                 go to the left half of the same row of memory B and the
//                 detail (H) results to the right half;
//   column pass - every column of B is filtered; L results go to the top half
//                 of the same column of A, H results to the bottom half.
// A then holds the four sub-bands LL1 (top-left), HL1 (top-right), LH1
// (bottom-left) and HH1 (bottom-right). With LEVELS > 1 the same two passes
// are repeated on the LL quadrant of the previous level (octave-band
// decomposition). Finally A is streamed out in raster order.
//
// Line boundaries use whole-sample symmetric extension: each line of length
// n is read as x[4],x[3],x[2],x[1],x[0],...,x[n-1],x[n-2],..,x[n-5], i.e. n+8
// reads per line, one per clock, and the filter bank emits one coefficient
// per real sample.
//
// Interface: in_valid/in_ready and out_valid/out_ready streams (data moves
// when both are high). in_ready is high only while a frame is being loaded;
// out_valid only while the result is being unloaded. busy is high during the
// filter passes.
//
// Timing per frame: IMG_W*IMG_H load cycles, then for each level l with
// w = IMG_W>>l, h = IMG_H>>l: h*(w+8)+4 row-pass cycles and w*(h+8)+4
// column-pass cycles, then IMG_W*IMG_H unload cycles when out_ready stays high.
// The first coefficient is valid 2 + (sum of the pass lengths) cycles after
// the clock edge that accepted the last input sample.
//
// The row-then-column computation and the octave-band decomposition follow
// the document; the memory organisation, the boundary extension, the
// sub-band placement and the handshakes are this design's choices.
module dwt2d #(
  parameter int IMG_W  = 128,   // image width  (pixels)
  parameter int IMG_H  = 128,   // image height (pixels)
  parameter int LEVELS = 1,     // decomposition levels
  parameter int DW     = 16     // sample / coefficient width (signed)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // raster-order input samples
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [DW-1:0] in_data,
  // raster-order sub-band coefficients
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic signed [DW-1:0] out_data,
  output logic                 out_last,   // with the final coefficient of a frame
  output logic                 busy
);

  localparam int NPIX = IMG_W * IMG_H;
  localparam int AW   = $clog2(NPIX);
  localparam int CW   = $clog2((IMG_W > IMG_H ? IMG_W : IMG_H) + 9) + 1;

  if ((IMG_W >> LEVELS) < 5 || (IMG_H >> LEVELS) < 5 ||
      ((IMG_W >> LEVELS) << LEVELS) != IMG_W || ((IMG_H >> LEVELS) << LEVELS) != IMG_H)
  begin : gen_size_check
    $error("dwt2d: image sides must be multiples of 2**LEVELS and at least 5*2**LEVELS");
  end

  typedef enum logic [2:0] {S_LOAD, S_ROW, S_ROW_DRAIN, S_COL, S_COL_DRAIN, S_OUT} state_t;
  state_t state;

  logic signed [DW-1:0] mem_a [NPIX];
  logic signed [DW-1:0] mem_b [NPIX];

  logic [AW:0]   cnt;          // load / unload sample counter
  logic [CW-1:0] line, pos;    // pass: current line, position along the extended line
  logic [2:0]    drain;
  logic [3:0]    lvl;

  // line geometry of the current pass
  logic [CW-1:0] w_l, h_l, len, nlines;
  always_comb begin
    w_l    = CW'(IMG_W >> lvl);
    h_l    = CW'(IMG_H >> lvl);
    len    = (state == S_COL) ? h_l : w_l;
    nlines = (state == S_COL) ? w_l : h_l;
  end

  // ------------------------------------------------------------------
  // read address generation with symmetric extension
  // ------------------------------------------------------------------
  logic          rd_v, rd_emit, rd_odd;
  logic [AW-1:0] rd_addr, rd_dest;

  always_comb begin
    logic [CW-1:0] m, c, d;
    // stream index s = pos - 4, mirrored into 0 .. len-1
    if (pos < CW'(4))               m = CW'(4) - pos;
    else if (pos >= len + CW'(4))   m = CW'(2) * len + CW'(2) - pos;
    else                            m = pos - CW'(4);
    c = pos - CW'(8);                          // centre index when emitting
    d = (c >> 1) + (c[0] ? (len >> 1) : '0);   // destination along the line
    rd_v    = (state == S_ROW) || (state == S_COL);
    rd_emit = rd_v && (pos >= CW'(8));
    rd_odd  = c[0];
    if (state == S_COL) begin
      rd_addr = AW'(m) * AW'(IMG_W) + AW'(line);
      rd_dest = AW'(d) * AW'(IMG_W) + AW'(line);
    end else begin
      rd_addr = AW'(line) * AW'(IMG_W) + AW'(m);
      rd_dest = AW'(line) * AW'(IMG_W) + AW'(d);
    end
  end

  // ------------------------------------------------------------------
  // memory A: written by the input stream and the column pass,
  //           read by the row pass and the output stream
  // memory B: written by the row pass, read by the column pass
  // ------------------------------------------------------------------
  logic                 a_we, a_re, b_we;
  logic [AW-1:0]        a_waddr, a_raddr, b_waddr;
  logic signed [DW-1:0] a_wdata, b_wdata, a_q, b_q;

  logic                 f_valid, f_band;
  logic signed [DW-1:0] f_data;
  logic [AW-1:0]        f_tag;
  logic                 col_pass;     // current or draining pass is a column pass

  logic out_fire, load_fire, unload_go;
  assign load_fire = in_valid && in_ready;
  assign out_fire  = out_valid && out_ready;
  assign unload_go = (state == S_OUT) && (cnt < (AW+1)'(NPIX)) && (!out_valid || out_ready);

  always_comb begin
    a_we    = load_fire || (f_valid && col_pass);
    a_waddr = load_fire ? cnt[AW-1:0] : f_tag;
    a_wdata = load_fire ? in_data : f_data;
    b_we    = f_valid && !col_pass;
    b_waddr = f_tag;
    b_wdata = f_data;
    a_re    = (state == S_ROW) || unload_go;
    a_raddr = (state == S_OUT) ? cnt[AW-1:0] : rd_addr;
  end

  always_ff @(posedge clk) begin
    if (a_we) mem_a[a_waddr] <= a_wdata;
    if (a_re) a_q <= mem_a[a_raddr];
  end

  always_ff @(posedge clk) begin
    if (b_we) mem_b[b_waddr] <= b_wdata;
    b_q <= mem_b[rd_addr];
  end

  // read -> filter pipeline stage (memory read latency)
  logic          p_v, p_emit, p_odd, p_from_b;
  logic [AW-1:0] p_dest;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_v      <= 1'b0;
      p_emit   <= 1'b0;
      p_odd    <= 1'b0;
      p_from_b <= 1'b0;
      p_dest   <= '0;
    end else begin
      p_v      <= rd_v;
      p_emit   <= rd_emit;
      p_odd    <= rd_odd;
      p_from_b <= (state == S_COL);
      p_dest   <= rd_dest;
    end
  end

  dwt_filter_bank #(.DW(DW), .TAGW(AW)) u_fb (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (p_v),
    .in_data  (p_from_b ? b_q : a_q),
    .in_emit  (p_emit),
    .in_odd   (p_odd),
    .in_tag   (p_dest),
    .out_valid(f_valid),
    .out_band (f_band),
    .out_data (f_data),
    .out_tag  (f_tag)
  );

  // ------------------------------------------------------------------
  // control
  // ------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_LOAD;
      cnt       <= '0;
      line      <= '0;
      pos       <= '0;
      drain     <= '0;
      lvl       <= '0;
      col_pass  <= 1'b0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
    end else begin
      unique case (state)
        S_LOAD: if (load_fire) begin
          if (cnt == (AW+1)'(NPIX - 1)) begin
            cnt      <= '0;
            lvl      <= '0;
            line     <= '0;
            pos      <= '0;
            col_pass <= 1'b0;
            state    <= S_ROW;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end

        S_ROW, S_COL: begin
          if (pos == len + CW'(7)) begin
            pos <= '0;
            if (line == nlines - 1'b1) begin
              line  <= '0;
              drain <= '0;
              state <= (state == S_ROW) ? S_ROW_DRAIN : S_COL_DRAIN;
            end else begin
              line <= line + 1'b1;
            end
          end else begin
            pos <= pos + 1'b1;
          end
        end

        S_ROW_DRAIN: begin
          drain <= drain + 1'b1;
          if (drain == 3'd3) begin
            col_pass <= 1'b1;
            state    <= S_COL;
          end
        end

        S_COL_DRAIN: begin
          drain <= drain + 1'b1;
          if (drain == 3'd3) begin
            col_pass <= 1'b0;
            if (lvl == 4'(LEVELS - 1)) begin
              cnt   <= '0;
              state <= S_OUT;
            end else begin
              lvl   <= lvl + 1'b1;
              state <= S_ROW;
            end
          end
        end

        S_OUT: begin
          if (unload_go) begin
            cnt       <= cnt + 1'b1;
            out_valid <= 1'b1;
            out_last  <= (cnt == (AW+1)'(NPIX - 1));
          end else if (out_fire) begin
            out_valid <= 1'b0;
            out_last  <= 1'b0;
          end
          if (out_fire && out_last) begin
            cnt   <= '0;
            state <= S_LOAD;
          end
        end

        default: state <= S_LOAD;
      endcase
    end
  end

  assign in_ready = (state == S_LOAD);
  assign out_data = a_q;
  assign busy     = (state != S_LOAD) && (state != S_OUT);

  // f_band is implied by the destination address; kept for observation
  logic unused_band;
  assign unused_band = f_band;

  // a coefficient must never be written while the frame is being loaded
  assert property (@(posedge clk) disable iff (!rst_n) !(f_valid && state == S_LOAD));
  // the output holds its data while stalled
  assert property (@(posedge clk) disable iff (!rst_n)
                   out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule
