// clustering: SPOT clustering unit (primitive clustering, improved clustering
// and energy-weighted centroids) for one image.
//
// Input is the segment stream of the pre-processing unit (`seg_valid`/`seg`,
// rows in increasing order) and `frame_done`, which marks the last segment of
// the image. Segments go through a FIFO and are handled in three phases:
//
//  1. PRIM - primitive clustering. Each segment is compared with the segments
//     of the previous row; two segments touch when they share an edge or a
//     corner (column ranges overlapping after widening by one pixel). A
//     segment touching nothing opens a new cluster; one touching several
//     clusters first merges them, one merge per clock, then joins the result.
//     Cluster records (pixel count, energy, column- and row-weighted energy,
//     bounding box) live in a register table; `alias_q[i]` always names the
//     surviving cluster of id i, so a merge relabels every alias entry in one
//     cycle. Every segment is also stored, with its cluster id, in a segment
//     memory.
//  2. IMP - improved clustering. All pairs of stored segments (i < j, rows no
//     further apart than eps_dist) are visited, one pair per clock. Two
//     different clusters are merged when
//       - minimum distance: the uniform-norm (Chebyshev) distance between the
//         two segments is <= eps_dist (Eq. 1; the minimum over all segment
//         pairs is the pixel-by-pixel minimum distance);
//       - increasing length: the virtual length of the merged cluster is
//         greater than that of each part;
//       - density: both clusters have density d = N / lambda <= dens_max
//         (Eq. 2), i.e. both look like pieces of a thin broken streak.
//     Single-pixel clusters take no part and are discarded.
//  3. CENT - for each surviving cluster of two or more pixels the centroid
//     c = sum(E p) / sum(E) (Eq. 3) is formed with a shared sequential
//     divider, in Q.4 fixed point, and sent out on `cl_valid`/`cl`.
//     `cl_done` pulses after the last cluster; the tables are then cleared.
//
// From the document: the corner-sharing clustering rule, discarding single
// pixels, the three improved-clustering filters (Eq. 1, 2) and the centroid
// formula (Eq. 3). This design's choices: the exact length and density
// conditions (the document names them without formulas), lambda = longest
// bounding-box side, table sizes, and the serial one-pair-per-clock schedule.
// Overflow of the FIFO, segment memory, row buffer or cluster table is
// flagged on `overflow` (sticky until the next frame) and the data is dropped.
module clustering
  import spot_pkg::*;
#(
  parameter int unsigned MAX_CL   = 256,   // cluster table entries
  parameter int unsigned MAX_SEG  = 1024,  // segments stored per image
  parameter int unsigned ROW_SEG  = 32,    // segments per image row
  parameter int unsigned FIFO_D   = 64     // input FIFO depth
) (
  input  logic             clk,
  input  logic             rst_n,
  input  coord_t           eps_dist,       // minimum-distance threshold (px)
  input  logic [15:0]      dens_max,       // density threshold, Q12.4 px/px
  input  logic             seg_valid,
  input  segment_t         seg,
  input  logic             frame_done,
  output logic             cl_valid,
  output cluster_t         cl,
  output logic             cl_done,
  output logic             busy,
  output logic             overflow,
  output logic [15:0]      prim_merges,    // merges made by primitive clustering
  output logic [15:0]      imp_merges      // merges made by improved clustering
);
  localparam int unsigned IW = $clog2(MAX_CL);
  localparam int unsigned SAW = $clog2(MAX_SEG);
  localparam int unsigned DW = WEN_W + FRAC;

  typedef logic [IW-1:0] cid_t;
  typedef struct packed {
    coord_t row;
    coord_t cs;
    coord_t ce;
    cid_t   id;
  } sref_t;

  typedef enum logic [2:0] {S_PRIM, S_ROW, S_IMP, S_CENT, S_DIVY, S_DIVZ, S_CLEAR} state_t;
  state_t state;

  // ---------------- input FIFO ----------------
  logic     f_empty, f_full, f_ovf, f_pop;
  segment_t f_seg;
  sync_fifo #(.W($bits(segment_t)), .DEPTH(FIFO_D)) u_fifo (
    .clk, .rst_n, .clr(1'b0),
    .wr_en(seg_valid), .wr_data(seg),
    .rd_en(f_pop), .rd_data(f_seg),
    .empty(f_empty), .full(f_full), .overflow(f_ovf)
  );

  logic frame_end_seen;

  // ---------------- tables ----------------
  clrec_t rec     [MAX_CL];
  cid_t   alias_q [MAX_CL];
  logic [IW:0] next_id;
  sref_t  segmem  [MAX_SEG];
  logic [SAW:0] nseg;
  sref_t  prev_l [ROW_SEG];
  sref_t  cur_l  [ROW_SEG];
  logic [$clog2(ROW_SEG):0] n_prev, n_cur;
  coord_t cur_row;
  logic   row_started;

  // ---------------- shared merge datapath ----------------
  logic   do_merge;
  cid_t   m_dst, m_src;
  clrec_t merged;
  always_comb begin
    merged       = rec[m_dst];
    merged.valid = 1'b1;
    merged.n     = rec[m_dst].n  + rec[m_src].n;
    merged.e     = rec[m_dst].e  + rec[m_src].e;
    merged.ey    = rec[m_dst].ey + rec[m_src].ey;
    merged.ez    = rec[m_dst].ez + rec[m_src].ez;
    if (rec[m_src].ymin < merged.ymin) merged.ymin = rec[m_src].ymin;
    if (rec[m_src].ymax > merged.ymax) merged.ymax = rec[m_src].ymax;
    if (rec[m_src].zmin < merged.zmin) merged.zmin = rec[m_src].zmin;
    if (rec[m_src].zmax > merged.zmax) merged.zmax = rec[m_src].zmax;
  end

  // ---------------- phase 1: primitive clustering ----------------
  logic [ROW_SEG-1:0] touch;
  logic       any_touch, have_other;
  cid_t       tgt, other;
  always_comb begin
    any_touch = 1'b0; have_other = 1'b0; tgt = '0; other = '0;
    for (int k = 0; k < ROW_SEG; k++) begin
      touch[k] = (k < n_prev) &&
                 ({1'b0, prev_l[k].cs} <= {1'b0, f_seg.col_e} + 1'b1) &&
                 ({1'b0, f_seg.col_s} <= {1'b0, prev_l[k].ce} + 1'b1);
    end
    for (int k = 0; k < ROW_SEG; k++) begin
      if (touch[k]) begin
        if (!any_touch) begin
          any_touch = 1'b1;
          tgt = alias_q[prev_l[k].id];
        end else if (!have_other && alias_q[prev_l[k].id] != tgt) begin
          have_other = 1'b1;
          other = alias_q[prev_l[k].id];
        end
      end
    end
  end

  // record of the incoming segment on its own
  clrec_t seg_rec;
  logic [CNT_W-1:0] seg_len;
  always_comb begin
    seg_len       = CNT_W'(f_seg.col_e - f_seg.col_s) + 1'b1;
    seg_rec.valid = 1'b1;
    seg_rec.n     = seg_len;
    seg_rec.e     = f_seg.e;
    seg_rec.ey    = f_seg.ey;
    seg_rec.ez    = WEN_W'(f_seg.row) * WEN_W'(f_seg.e);
    seg_rec.ymin  = f_seg.col_s;
    seg_rec.ymax  = f_seg.col_e;
    seg_rec.zmin  = f_seg.row;
    seg_rec.zmax  = f_seg.row;
  end
  clrec_t joined;
  always_comb begin
    joined       = rec[tgt];
    joined.n     = rec[tgt].n  + seg_rec.n;
    joined.e     = rec[tgt].e  + seg_rec.e;
    joined.ey    = rec[tgt].ey + seg_rec.ey;
    joined.ez    = rec[tgt].ez + seg_rec.ez;
    if (seg_rec.ymin < joined.ymin) joined.ymin = seg_rec.ymin;
    if (seg_rec.ymax > joined.ymax) joined.ymax = seg_rec.ymax;
    if (seg_rec.zmax > joined.zmax) joined.zmax = seg_rec.zmax;
  end

  // ---------------- phase 2: improved clustering ----------------
  logic [SAW:0] pi, pj;
  sref_t  sa, sb;
  cid_t   ra, rb;
  coord_t dy, dz;
  logic   far_rows, pair_ok;
  logic [CNT_W-1:0] lam_a, lam_b, lam_m;
  always_comb begin
    sa = segmem[pi[SAW-1:0]];
    sb = segmem[pj[SAW-1:0]];
    ra = alias_q[sa.id];
    rb = alias_q[sb.id];
    dy = gap1d(sa.cs, sa.ce, sb.cs, sb.ce);
    dz = gap1d(sa.row, sa.row, sb.row, sb.row);
    far_rows = (sb.row > sa.row) && (dz > eps_dist);
    lam_a = virt_len(rec[ra].ymin, rec[ra].ymax, rec[ra].zmin, rec[ra].zmax);
    lam_b = virt_len(rec[rb].ymin, rec[rb].ymax, rec[rb].zmin, rec[rb].zmax);
    lam_m = virt_len((rec[ra].ymin < rec[rb].ymin) ? rec[ra].ymin : rec[rb].ymin,
                     (rec[ra].ymax > rec[rb].ymax) ? rec[ra].ymax : rec[rb].ymax,
                     (rec[ra].zmin < rec[rb].zmin) ? rec[ra].zmin : rec[rb].zmin,
                     (rec[ra].zmax > rec[rb].zmax) ? rec[ra].zmax : rec[rb].zmax);
    pair_ok = (ra != rb) && (rec[ra].n >= 2) && (rec[rb].n >= 2) &&
              (dy <= eps_dist) && (dz <= eps_dist) &&                      // Eq. 1
              (lam_m > lam_a) && (lam_m > lam_b) &&                        // length
              ({rec[ra].n, 4'b0} <= 20'(dens_max) * 20'(lam_a)) &&         // Eq. 2
              ({rec[rb].n, 4'b0} <= 20'(dens_max) * 20'(lam_b));
  end

  // ---------------- phase 3: centroids ----------------
  logic [IW:0] ck;
  logic        dv_start, dv_busy, dv_done;
  logic [DW-1:0] dv_a, dv_b, dv_q, dv_r;
  seq_divider #(.W(DW)) u_div (
    .clk, .rst_n, .start(dv_start), .dividend(dv_a), .divisor(dv_b),
    .busy(dv_busy), .done(dv_done), .quotient(dv_q), .remainder(dv_r)
  );
  clrec_t crec;
  assign crec = rec[ck[IW-1:0]];
  logic cent_take;
  assign cent_take = (ck < next_id) && crec.valid &&
                     (alias_q[ck[IW-1:0]] == cid_t'(ck)) && (crec.n >= 2);

  // ---------------- control ----------------
  always_comb begin
    do_merge = 1'b0; m_dst = '0; m_src = '0;
    if (state == S_PRIM && !f_empty && row_started && f_seg.row == cur_row && have_other) begin
      do_merge = 1'b1; m_dst = tgt; m_src = other;
    end else if (state == S_IMP && pj < nseg && !far_rows && pair_ok) begin
      do_merge = 1'b1; m_dst = ra; m_src = rb;
    end
    f_pop = (state == S_PRIM) && !f_empty && row_started && (f_seg.row == cur_row) && !have_other;
  end

  assign busy = (state != S_PRIM) || !f_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_PRIM;
      for (int i = 0; i < MAX_CL; i++) begin rec[i] <= '0; alias_q[i] <= cid_t'(i); end
      for (int i = 0; i < ROW_SEG; i++) begin prev_l[i] <= '0; cur_l[i] <= '0; end
      next_id <= '0; nseg <= '0; n_prev <= '0; n_cur <= '0; cur_row <= '0;
      row_started <= 1'b0; frame_end_seen <= 1'b0; overflow <= 1'b0;
      pi <= '0; pj <= '0; ck <= '0; dv_start <= 1'b0; dv_a <= '0; dv_b <= '0;
      cl_valid <= 1'b0; cl <= '0; cl_done <= 1'b0;
      prim_merges <= '0; imp_merges <= '0;
    end else begin
      cl_valid <= 1'b0; cl_done <= 1'b0; dv_start <= 1'b0;
      if (frame_done) frame_end_seen <= 1'b1;
      if (f_ovf) overflow <= 1'b1;

      if (do_merge) begin
        rec[m_dst] <= merged;
        rec[m_src].valid <= 1'b0;
        for (int i = 0; i < MAX_CL; i++)
          if (alias_q[i] == m_src) alias_q[i] <= m_dst;
      end

      unique case (state)
        S_PRIM: begin
          if (!f_empty && !(row_started && f_seg.row == cur_row)) begin
            state <= S_ROW;
          end else if (!f_empty && !have_other) begin
            // join an existing cluster or open a new one
            if (any_touch) begin
              rec[tgt] <= joined;
            end else if (next_id < (IW+1)'(MAX_CL)) begin
              rec[next_id[IW-1:0]] <= seg_rec;
              next_id <= next_id + 1'b1;
            end else begin
              overflow <= 1'b1;
            end
            if (any_touch || next_id < (IW+1)'(MAX_CL)) begin
              if (n_cur < ($clog2(ROW_SEG)+1)'(ROW_SEG)) begin
                cur_l[n_cur[$clog2(ROW_SEG)-1:0]] <= '{row: f_seg.row, cs: f_seg.col_s,
                    ce: f_seg.col_e, id: any_touch ? tgt : next_id[IW-1:0]};
                n_cur <= n_cur + 1'b1;
              end else overflow <= 1'b1;
              if (nseg < (SAW+1)'(MAX_SEG)) begin
                segmem[nseg[SAW-1:0]] <= '{row: f_seg.row, cs: f_seg.col_s,
                    ce: f_seg.col_e, id: any_touch ? tgt : next_id[IW-1:0]};
                nseg <= nseg + 1'b1;
              end else overflow <= 1'b1;
            end
          end else if (!f_empty && have_other) begin
            prim_merges <= prim_merges + 1'b1;
          end else if (f_empty && frame_end_seen && !frame_done) begin
            state <= S_IMP;
            pi <= '0; pj <= (SAW+1)'(1);
          end
        end
        S_ROW: begin
          // move to the row of the head segment; rows not adjacent share nothing
          if (row_started && f_seg.row == cur_row + 1'b1) begin
            prev_l <= cur_l; n_prev <= n_cur;
          end else begin
            n_prev <= '0;
          end
          n_cur <= '0;
          cur_row <= f_seg.row;
          row_started <= 1'b1;
          state <= S_PRIM;
        end
        S_IMP: begin
          if (pj >= nseg || far_rows) begin
            if (pi + 2 >= nseg) begin
              state <= S_CENT; ck <= '0;
            end else begin
              pi <= pi + 1'b1; pj <= pi + (SAW+1)'(2);
            end
          end else begin
            if (pair_ok) imp_merges <= imp_merges + 1'b1;
            pj <= pj + 1'b1;
          end
        end
        S_CENT: begin
          if (ck >= next_id) begin
            state <= S_CLEAR; cl_done <= 1'b1;
          end else if (cent_take) begin
            dv_a <= DW'(crec.ey) << FRAC;
            dv_b <= DW'(crec.e);
            dv_start <= 1'b1;
            state <= S_DIVY;
          end else begin
            ck <= ck + 1'b1;
          end
        end
        S_DIVY: if (dv_done) begin
          cl.cy <= pos_t'(dv_q);
          dv_a <= DW'(crec.ez) << FRAC;
          dv_b <= DW'(crec.e);
          dv_start <= 1'b1;
          state <= S_DIVZ;
        end
        S_DIVZ: if (dv_done) begin
          cl.cz   <= pos_t'(dv_q);
          cl.e    <= crec.e;
          cl.n    <= crec.n;
          cl.ymin <= crec.ymin; cl.ymax <= crec.ymax;
          cl.zmin <= crec.zmin; cl.zmax <= crec.zmax;
          cl_valid <= 1'b1;
          ck <= ck + 1'b1;
          state <= S_CENT;
        end
        S_CLEAR: begin
          for (int i = 0; i < MAX_CL; i++) begin rec[i].valid <= 1'b0; alias_q[i] <= cid_t'(i); end
          next_id <= '0; nseg <= '0; n_prev <= '0; n_cur <= '0;
          row_started <= 1'b0; frame_end_seen <= 1'b0; overflow <= 1'b0;
          state <= S_PRIM;
        end
        default: state <= S_PRIM;
      endcase
    end
  end
endmodule
