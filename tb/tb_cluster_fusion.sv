// tb_cluster_fusion: self-checking test of the cluster fusion unit.
//
// Image 1 holds objects on a coarse grid; image 2 holds a moved copy of some
// of them (bounding-box gap within eps_fus), objects that exist only in one
// image, and one partner whose density differs by more than a factor of two.
// The expected fused list (pairs, both centroids, velocity) is known by
// construction. The test is repeated in single-image mode, where each image-1
// cluster must come out alone with zero velocity.
module tb_cluster_fusion;
  import spot_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  coord_t eps_fus;
  logic single, clr, cl_valid, cl_bank, start, fu_valid, done, busy, overflow;
  cluster_t cl;
  fused_t fu;
  cluster_fusion #(.MAX_CLF(16)) dut (.clk, .rst_n, .eps_fus, .single, .clr, .cl_valid,
    .cl_bank, .cl, .start, .fu_valid, .fu, .done, .busy, .overflow);

  int checks = 0, failures = 0;
  fused_t got[$], exp_l[$];
  always @(posedge clk) if (rst_n && fu_valid) got.push_back(fu);

  function automatic cluster_t mk(int y0, int z0, int ly, int lz, int n);
    cluster_t c;
    c = '0;
    c.ymin = y0; c.ymax = y0 + ly - 1; c.zmin = z0; c.zmax = z0 + lz - 1;
    c.cy = (y0 * 16) + (ly - 1) * 8 + $urandom_range(0, 3);
    c.cz = (z0 * 16) + (lz - 1) * 8 + $urandom_range(0, 3);
    c.n = n; c.e = 100 * n;
    return c;
  endfunction

  task automatic wr(logic bank, cluster_t c);
    @(negedge clk); cl_valid = 1; cl_bank = bank; cl = c;
    @(negedge clk); cl_valid = 0;
  endtask

  function automatic fused_t pair(cluster_t a, cluster_t b);
    fused_t f;
    f.c1y = a.cy; f.c1z = a.cz; f.c2y = b.cy; f.c2z = b.cz;
    f.vy = vel_t'(int'(b.cy) - int'(a.cy)); f.vz = vel_t'(int'(b.cz) - int'(a.cz));
    f.n = a.n + b.n;
    f.lam = ((a.ymax-a.ymin) > (a.zmax-a.zmin) ? a.ymax-a.ymin : a.zmax-a.zmin) + 1 +
            ((b.ymax-b.ymin) > (b.zmax-b.zmin) ? b.ymax-b.ymin : b.zmax-b.zmin) + 1;
    return f;
  endfunction

  task automatic compare(string what);
    checks++;
    if (got.size() != exp_l.size()) begin
      failures++; $display("%s: %0d fused, expected %0d", what, got.size(), exp_l.size());
      foreach (got[m]) $display("  got c1 %0d,%0d c2 %0d,%0d", got[m].c1y, got[m].c1z, got[m].c2y, got[m].c2z);
    end
    foreach (exp_l[k]) begin
      int hit = 0;
      foreach (got[m]) if (got[m] == exp_l[k]) hit = 1;
      checks++;
      if (!hit) begin failures++; $display("%s: expected pair %0d missing", what, k); end
    end
    got = {}; exp_l = {};
  endtask

  initial begin
    #1000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    cluster_t a [6], b [6];
    eps_fus = 3; single = 0; clr = 0; cl_valid = 0; cl_bank = 0; start = 0; cl = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int rep = 0; rep < 3; rep++) begin
      @(negedge clk); clr = 1; @(negedge clk); clr = 0;
      // image 1
      a[0] = mk(100, 100, 8, 3, 12);   // streak, moves by 10 px
      a[1] = mk(300, 100, 3, 3, 9);    // star, still
      a[2] = mk(500, 300, 3, 3, 9);    // star with a thin partner: density mismatch
      a[3] = mk(700, 400, 2, 2, 4);    // only in image 1
      // image 2
      b[0] = mk(110, 101, 8, 3, 12);   // gap 2 to a[0]
      b[1] = mk(301, 100, 3, 3, 9);    // overlapping a[1]
      b[2] = mk(502, 300, 9, 1, 9);    // density 1 vs 3
      b[3] = mk(50, 500, 2, 2, 4);     // only in image 2
      b[4] = mk(304, 104, 3, 3, 9);    // second, farther candidate for a[1]
      for (int k = 0; k < 4; k++) wr(0, a[k]);
      for (int k = 0; k < 5; k++) wr(1, b[k]);
      exp_l.push_back(pair(a[0], b[0]));
      exp_l.push_back(pair(a[1], b[1]));
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      @(posedge done); @(posedge clk);
      compare("fusion");
      // single-image mode
      single = 1;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      @(posedge done); @(posedge clk);
      for (int k = 0; k < 4; k++) begin
        automatic fused_t f = pair(a[k], a[k]);
        f.n = a[k].n; f.lam = f.lam / 2;
        exp_l.push_back(f);
      end
      compare("single");
      single = 0;
      checks++;
      if (overflow) begin failures++; $display("overflow"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
