// tb_clustering: self-checking test of the clustering unit.
//
// Builds a small scene of pixel energies, cuts it into row segments the way
// the pre-processing unit does, and streams them into the clustering unit.
// The scene holds objects whose expected grouping is known by construction:
// two compact stars close together (kept apart by the density filter), a
// diagonal streak broken into three fragments (joined by improved
// clustering), a U shape (joined by primitive clustering when its two arms
// meet), a thin pair whose union would not grow longer (kept apart by the
// length filter) and single pixels (discarded). The expected centroids are
// computed here from the pixel energies. Two frames are run, the second one
// shifted, to check that the tables are cleared between images.
module tb_clustering;
  import spot_pkg::*;
  localparam int W = 64, H = 40;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  coord_t eps_dist;
  logic [15:0] dens_max;
  logic seg_valid, frame_done, cl_valid, cl_done, busy, overflow;
  segment_t seg;
  cluster_t cl;
  logic [15:0] prim_merges, imp_merges;
  clustering #(.MAX_CL(64), .MAX_SEG(256), .ROW_SEG(16), .FIFO_D(16)) dut (
    .clk, .rst_n, .eps_dist, .dens_max, .seg_valid, .seg, .frame_done,
    .cl_valid, .cl, .cl_done, .busy, .overflow, .prim_merges, .imp_merges);

  int checks = 0, failures = 0;
  int en  [H][W];   // pixel energy, 0 = background
  int grp [H][W];   // expected group, -1 = none / discarded
  int ngrp;
  cluster_t got[$];

  task automatic put(int r, int c, int g);
    en[r][c] = $urandom_range(10, 100);
    grp[r][c] = g;
  endtask

  task automatic build(int dr, int dc);
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) begin en[r][c] = 0; grp[r][c] = -1; end
    for (int r = 5; r <= 7; r++) for (int c = 5; c <= 7; c++) put(r+dr, c+dc, 0);   // star A
    for (int r = 5; r <= 6; r++) for (int c = 10; c <= 11; c++) put(r+dr, c+dc, 1); // star B
    for (int k = 0; k < 3; k++) for (int i = 0; i < 3; i++)                         // broken streak
      put(20 + 4*k + i + dr, 30 + 4*k + i + dc, 2);
    for (int r = 10; r <= 12; r++) begin put(r+dr, 40+dc, 3); put(r+dr, 44+dc, 3); end // U
    for (int c = 40; c <= 44; c++) put(13+dr, c+dc, 3);
    for (int r = 26; r <= 30; r++) put(r+dr, 55+dc, 4);                             // line P
    put(28+dr, 57+dc, 5); put(29+dr, 57+dc, 5);                                     // pair Q
    put(35+dr, 5+dc, -1); put(2+dr, 60+dc, -1);                                     // singles
    ngrp = 6;
  endtask

  task automatic send_frame();
    for (int r = 0; r < H; r++) begin
      int c = 0;
      while (c < W) begin
        if (en[r][c] != 0) begin
          automatic segment_t s = '0;
          s.row = r; s.col_s = c;
          while (c < W && en[r][c] != 0) begin
            s.e += en[r][c]; s.ey += c * en[r][c]; c++;
          end
          s.col_e = c - 1;
          @(negedge clk); seg_valid = 1; seg = s;
          @(negedge clk); seg_valid = 0;
        end else c++;
      end
    end
    @(negedge clk); frame_done = 1;
    @(negedge clk); frame_done = 0;
  endtask

  always @(posedge clk) if (cl_valid) got.push_back(cl);

  task automatic check_frame();
    for (int g = 0; g < ngrp; g++) begin
      longint se = 0, sy = 0, sz = 0; int n = 0, found = 0;
      for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) if (grp[r][c] == g) begin
        n++; se += en[r][c]; sy += c * en[r][c]; sz += r * en[r][c];
      end
      foreach (got[i]) if (got[i].n == n && got[i].e == se) begin
        found = 1;
        checks++;
        if (got[i].cy != pos_t'((sy * 16) / se) || got[i].cz != pos_t'((sz * 16) / se)) begin
          failures++;
          $display("group %0d centroid %0d,%0d expected %0d,%0d", g, got[i].cy, got[i].cz,
                   (sy*16)/se, (sz*16)/se);
        end
      end
      checks++;
      if (!found) begin failures++; $display("group %0d (n=%0d) not found", g, n); end
    end
    checks++;
    if (got.size() != ngrp) begin failures++; $display("got %0d clusters, expected %0d", got.size(), ngrp); end
    got = {};
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    eps_dist = 2; dens_max = 16'd24;   // 1.5 px/px
    seg_valid = 0; frame_done = 0; seg = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      build(f, 2*f);
      send_frame();
      @(posedge cl_done);
      @(posedge clk);
      check_frame();
      checks++;
      if (overflow) begin failures++; $display("overflow"); end
    end
    checks++;
    if (prim_merges == 0) begin failures++; $display("no primitive merge"); end
    checks++;
    if (imp_merges != 4) begin failures++; $display("improved merges %0d, expected 4", imp_merges); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
