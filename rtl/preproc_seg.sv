// preproc_seg: SPOT pre-processing (segmentation) of a raster pixel stream.
//
// Pixels arrive one per `pix_valid` cycle in raster order (row z by row, and
// column y left to right inside a row); `pix_sof` marks the first pixel of a
// frame. The local background BKG is the mean of the WIN pixels that precede
// the current one in the stream (a sliding-window sum shifted right by
// log2(WIN)). A pixel opens a segment when its value exceeds BKG + tau; the
// background is then latched (BKG_l) and held for the whole segment, which
// goes on while pixels exceed BKG_l + tau and ends at the first pixel that
// does not, or at the end of the row. While a segment is open the unit sums
// the pixel values (window sum), the columns (x sum), column x pixel and the
// length; when it closes, two registered pipeline stages form
//   E_seg  = window_sum - BKG_l * length          (segment energy)
//   EY_seg = sum(y * pixel) - BKG_l * x_sum        (column-weighted energy)
// and emit one segment_t on `seg_valid`, 3 cycles after the pixel that
// closed it. `frame_done` pulses one cycle after the last segment of the frame.
// During the first WIN pixels of a frame the window is not yet full and no
// pixel is declared over threshold.
//
// From the document: background from the local neighbourhood, threshold
// BKG + tau, segment outputs (position, energy, weighted energy, length) and
// the latch/multiply/subtract pipeline with BKG latched at segment start.
// This design's choices: the window shape (WIN preceding pixels), WIN = 16,
// 8-bit pixels and the exact pipeline depth.
module preproc_seg
  import spot_pkg::*;
#(
  parameter int unsigned IMG_W = 960,
  parameter int unsigned IMG_H = 640,
  parameter int unsigned PIX_W = 8,
  parameter int unsigned WIN   = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [PIX_W-1:0] tau,         // user threshold above background
  input  logic             pix_valid,
  input  logic             pix_sof,
  input  logic [PIX_W-1:0] pix,
  output logic             seg_valid,
  output segment_t         seg,
  output logic             frame_done
);
  localparam int unsigned LW = $clog2(WIN);
  localparam int unsigned SW = PIX_W + LW;          // window sum width
  localparam int unsigned XW = 2 * COORD_W;         // x sum width

  // ---- raster position ----
  coord_t col, row;
  coord_t cur_col, cur_row;
  always_comb begin
    cur_col = pix_sof ? '0 : col;
    cur_row = pix_sof ? '0 : row;
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col <= '0; row <= '0;
    end else if (pix_valid) begin
      if (cur_col == coord_t'(IMG_W - 1)) begin
        col <= '0;
        row <= cur_row + 1'b1;
      end else begin
        col <= cur_col + 1'b1;
        row <= cur_row;
      end
    end
  end

  // ---- sliding-window background ----
  logic [PIX_W-1:0] win [WIN];
  logic [SW-1:0]    win_sum;
  logic [LW:0]      fill;
  logic [PIX_W-1:0] bkg;
  assign bkg = PIX_W'(win_sum >> LW);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win_sum <= '0; fill <= '0;
      for (int i = 0; i < WIN; i++) win[i] <= '0;
    end else if (pix_valid) begin
      if (pix_sof) begin
        win_sum <= SW'(pix);
        fill    <= 1;
        win[0]  <= pix;
        for (int i = 1; i < WIN; i++) win[i] <= '0;
      end else begin
        win_sum <= win_sum + SW'(pix) - SW'(win[WIN-1]);
        win[0]  <= pix;
        for (int i = 1; i < WIN; i++) win[i] <= win[i-1];
        if (fill != (LW+1)'(WIN)) fill <= fill + 1'b1;
      end
    end
  end

  // ---- segment accumulation ----
  logic                   in_seg;
  logic [PIX_W-1:0]       bkg_l;
  logic [SW+COORD_W-1:0]  fin_sum;  // finestra (window) sum of pixel values
  logic [XW-1:0]          x_sum;
  logic [WEN_W-1:0]       px_sum;
  logic [COORD_W:0]       l_seg;
  coord_t                 s_row, s_col;

  logic             win_full, last_col, over_new, over_cont, take, close_now;
  logic [PIX_W:0]   thr_new, thr_cont;
  always_comb begin
    win_full  = (fill == (LW+1)'(WIN)) && !pix_sof;
    last_col  = (cur_col == coord_t'(IMG_W - 1));
    thr_new   = {1'b0, bkg}   + {1'b0, tau};
    thr_cont  = {1'b0, bkg_l} + {1'b0, tau};
    over_new  = win_full && ({1'b0, pix} > thr_new);
    over_cont = in_seg && ({1'b0, pix} > thr_cont);
    take      = pix_valid && (over_cont || (!in_seg && over_new));
    // segment closes on a pixel that falls below, or after the row's last pixel
    close_now = pix_valid && in_seg && (!over_cont || last_col);
  end

  // stage-1 register: the closed segment's raw sums (z^-1 after accumulation)
  logic                   s1_v;
  logic [PIX_W-1:0]       s1_bkg;
  logic [SW+COORD_W-1:0]  s1_fin;
  logic [XW-1:0]          s1_x;
  logic [WEN_W-1:0]       s1_px;
  logic [COORD_W:0]       s1_l;
  coord_t                 s1_row, s1_cs, s1_ce;
  // a segment that starts on the last column is a single pixel closed at once
  logic                   single_last;
  assign single_last = take && !in_seg && last_col;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_seg <= 1'b0; bkg_l <= '0; fin_sum <= '0; x_sum <= '0; px_sum <= '0;
      l_seg <= '0; s_row <= '0; s_col <= '0;
      s1_v <= 1'b0; s1_bkg <= '0; s1_fin <= '0; s1_x <= '0; s1_px <= '0;
      s1_l <= '0; s1_row <= '0; s1_cs <= '0; s1_ce <= '0;
    end else begin
      s1_v <= 1'b0;
      if (pix_valid && pix_sof) in_seg <= 1'b0;
      if (close_now) begin
        // emit the open segment, including this pixel when it is still over
        s1_v   <= 1'b1;
        s1_bkg <= bkg_l;
        s1_row <= s_row;
        s1_cs  <= s_col;
        if (over_cont) begin
          s1_fin <= fin_sum + (SW+COORD_W)'(pix);
          s1_x   <= x_sum + XW'(cur_col);
          s1_px  <= px_sum + WEN_W'(cur_col) * WEN_W'(pix);
          s1_l   <= l_seg + 1'b1;
          s1_ce  <= cur_col;
        end else begin
          s1_fin <= fin_sum;
          s1_x   <= x_sum;
          s1_px  <= px_sum;
          s1_l   <= l_seg;
          s1_ce  <= cur_col - 1'b1;
        end
        in_seg <= 1'b0;
        // a new segment cannot start on the pixel that ended the last one:
        // that pixel is below the latched threshold
      end else if (single_last) begin
        s1_v   <= 1'b1;
        s1_bkg <= bkg;
        s1_row <= cur_row;
        s1_cs  <= cur_col;
        s1_ce  <= cur_col;
        s1_fin <= (SW+COORD_W)'(pix);
        s1_x   <= XW'(cur_col);
        s1_px  <= WEN_W'(cur_col) * WEN_W'(pix);
        s1_l   <= 1;
      end else if (take && !in_seg) begin
        in_seg  <= 1'b1;
        bkg_l   <= bkg;                     // init_seg: latch BKG at start_seg
        fin_sum <= (SW+COORD_W)'(pix);
        x_sum   <= XW'(cur_col);
        px_sum  <= WEN_W'(cur_col) * WEN_W'(pix);
        l_seg   <= 1;
        s_row   <= cur_row;
        s_col   <= cur_col;
      end else if (take) begin
        fin_sum <= fin_sum + (SW+COORD_W)'(pix);
        x_sum   <= x_sum + XW'(cur_col);
        px_sum  <= px_sum + WEN_W'(cur_col) * WEN_W'(pix);
        l_seg   <= l_seg + 1'b1;
      end
    end
  end

  // stage 2: products BKG_l * l_seg (mul_1) and BKG_l * x_sum (mul_3)
  logic                   s2_v;
  logic [SW+COORD_W-1:0]  s2_fin;
  logic [WEN_W-1:0]       s2_px;
  logic [ENE_W-1:0]       s2_mul1;
  logic [WEN_W-1:0]       s2_mul3;
  coord_t                 s2_row, s2_cs, s2_ce;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_v <= 1'b0; s2_fin <= '0; s2_px <= '0; s2_mul1 <= '0; s2_mul3 <= '0;
      s2_row <= '0; s2_cs <= '0; s2_ce <= '0;
    end else begin
      s2_v    <= s1_v;
      s2_fin  <= s1_fin;
      s2_px   <= s1_px;
      s2_mul1 <= ENE_W'(s1_bkg) * ENE_W'(s1_l);
      s2_mul3 <= WEN_W'(s1_bkg) * WEN_W'(s1_x);
      s2_row  <= s1_row; s2_cs <= s1_cs; s2_ce <= s1_ce;
    end
  end

  // stage 3: subtraction (E_seg_sub) and output register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seg_valid <= 1'b0; seg <= '0;
    end else begin
      seg_valid <= s2_v;
      if (s2_v) begin
        seg.row   <= s2_row;
        seg.col_s <= s2_cs;
        seg.col_e <= s2_ce;
        seg.e     <= ENE_W'(s2_fin) - s2_mul1;
        seg.ey    <= s2_px - s2_mul3;
      end
    end
  end

  // frame end: after the last pixel, wait for the pipeline to drain
  logic [3:0] flush;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flush <= '0; frame_done <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      flush      <= {flush[2:0], 1'b0};
      if (pix_valid && last_col && cur_row == coord_t'(IMG_H - 1)) flush[0] <= 1'b1;
      if (flush[3]) frame_done <= 1'b1;
    end
  end
endmodule
