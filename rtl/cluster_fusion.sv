// cluster_fusion: SPOT cluster fusion of two consecutive images.
//
// Clusters of the first image are written into bank 0 and those of the
// second image into bank 1 (`cl_valid`, `cl_bank`, `cl`), either while the
// clustering unit produces them or later; `clr` empties both banks. A
// `start` pulse then compares every cluster i of image 1 with every unused
// cluster j of image 2, one pair per clock, and keeps the j with the
// smallest distance that passes both filters:
//   - minimum distance: the uniform-norm gap between the two bounding boxes
//     is <= eps_fus;
//   - density: the two densities d = N / lambda differ by less than a factor
//     of two (checked by cross-multiplication, no division).
// Each match is sent out on `fu_valid` as a fused_t with both centroids and
// the first-order velocity c2 - c1 (px per image interval); clusters that
// have no partner in the other image are dropped. `done` pulses after the
// last comparison. With `single` high the fusion is skipped: each bank-0
// cluster is sent out as its own partner with zero velocity.
//
// From the document: fusion only with two consecutive images, minimum
// distance and density filters, no output for unmatched clusters, velocity
// by first-order difference. This design's choices: bounding-box distance
// (pixel lists of the earlier image are not kept), the factor-two density
// rule, nearest-match selection with each cluster used at most once, and
// lambda of the fused object = sum of both virtual lengths.
module cluster_fusion
  import spot_pkg::*;
#(
  parameter int unsigned MAX_CLF = 64    // clusters held per image
) (
  input  logic      clk,
  input  logic      rst_n,
  input  coord_t    eps_fus,
  input  logic      single,
  input  logic      clr,
  input  logic      cl_valid,
  input  logic      cl_bank,
  input  cluster_t  cl,
  input  logic      start,
  output logic      fu_valid,
  output fused_t    fu,
  output logic      done,
  output logic      busy,
  output logic      overflow
);
  localparam int unsigned AW = $clog2(MAX_CLF);
  cluster_t bank_a [MAX_CLF];
  cluster_t bank_b [MAX_CLF];
  logic [AW:0] na, nb;
  logic [MAX_CLF-1:0] used;

  // ---- bank write port ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      na <= '0; nb <= '0; overflow <= 1'b0;
    end else if (clr) begin
      na <= '0; nb <= '0; overflow <= 1'b0;
    end else if (cl_valid) begin
      if (!cl_bank) begin
        if (na < (AW+1)'(MAX_CLF)) begin bank_a[na[AW-1:0]] <= cl; na <= na + 1'b1; end
        else overflow <= 1'b1;
      end else begin
        if (nb < (AW+1)'(MAX_CLF)) begin bank_b[nb[AW-1:0]] <= cl; nb <= nb + 1'b1; end
        else overflow <= 1'b1;
      end
    end
  end

  // ---- pair evaluation ----
  typedef enum logic [1:0] {F_IDLE, F_SCAN, F_EMIT} fstate_t;
  fstate_t st;
  logic [AW:0] i, j;
  cluster_t a, b;
  coord_t   cdist;
  logic [CNT_W-1:0] lam_a, lam_b;
  logic [2*CNT_W:0] na_lb, nb_la;
  logic     pass;
  always_comb begin
    a = bank_a[i[AW-1:0]];
    b = bank_b[j[AW-1:0]];
    lam_a = virt_len(a.ymin, a.ymax, a.zmin, a.zmax);
    lam_b = virt_len(b.ymin, b.ymax, b.zmin, b.zmax);
    begin
      coord_t gy, gz;
      gy = gap1d(a.ymin, a.ymax, b.ymin, b.ymax);
      gz = gap1d(a.zmin, a.zmax, b.zmin, b.zmax);
      cdist = (gy > gz) ? gy : gz;
    end
    na_lb = (2*CNT_W+1)'(a.n) * (2*CNT_W+1)'(lam_b);
    nb_la = (2*CNT_W+1)'(b.n) * (2*CNT_W+1)'(lam_a);
    pass  = !used[j[AW-1:0]] && (cdist <= eps_fus) &&
            (na_lb < (nb_la << 1)) && (nb_la < (na_lb << 1));
  end

  logic        have_best;
  logic [AW-1:0] best;
  coord_t      best_d;
  cluster_t    bb;
  assign bb = bank_b[best];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= F_IDLE; i <= '0; j <= '0; used <= '0; have_best <= 1'b0; best <= '0;
      best_d <= '0; fu_valid <= 1'b0; fu <= '0; done <= 1'b0;
    end else begin
      fu_valid <= 1'b0; done <= 1'b0;
      unique case (st)
        F_IDLE: if (start) begin
          i <= '0; j <= '0; used <= '0; have_best <= 1'b0;
          st <= F_SCAN;
        end
        F_SCAN: begin
          if (i >= na) begin
            st <= F_IDLE; done <= 1'b1;
          end else if (single) begin
            fu_valid <= 1'b1;
            fu <= '{c1y: a.cy, c1z: a.cz, c2y: a.cy, c2z: a.cz, vy: '0, vz: '0,
                    n: a.n, lam: lam_a};
            i <= i + 1'b1;
          end else if (j >= nb) begin
            st <= F_EMIT;
          end else begin
            if (pass && (!have_best || cdist < best_d)) begin
              have_best <= 1'b1; best <= j[AW-1:0]; best_d <= cdist;
            end
            j <= j + 1'b1;
          end
        end
        F_EMIT: begin
          if (have_best) begin
            fu_valid <= 1'b1;
            fu.c1y <= a.cy;  fu.c1z <= a.cz;
            fu.c2y <= bb.cy; fu.c2z <= bb.cz;
            fu.vy  <= vel_t'({1'b0, bb.cy}) - vel_t'({1'b0, a.cy});
            fu.vz  <= vel_t'({1'b0, bb.cz}) - vel_t'({1'b0, a.cz});
            fu.n   <= a.n + bb.n;
            fu.lam <= lam_a + virt_len(bb.ymin, bb.ymax, bb.zmin, bb.zmax);
            used[best] <= 1'b1;
          end
          have_best <= 1'b0;
          i <= i + 1'b1; j <= '0;
          st <= F_SCAN;
        end
        default: st <= F_IDLE;
      endcase
    end
  end
  assign busy = (st != F_IDLE);
endmodule
