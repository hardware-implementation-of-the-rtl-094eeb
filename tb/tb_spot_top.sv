// tb_spot_top: end-to-end test of the SPOT chain on a synthetic sky.
//
// A 64 x 48 image sequence (noisy background) holds two stars (one shaped so
// that primitive clustering must merge two branches), an object crossing the
// field at 7 px per image as a streak broken into two fragments (improved
// clustering must join them), a short-lived object seen only in the first
// couple, a flash seen in one image only (fusion must drop it) and a hot
// pixel (discarded as a single pixel). Three couples are processed: the
// first without attitude (antitracking bypassed), the next two with the
// attitude, where both stars are in the catalogue and must be removed. A
// sequencer upset is injected in the second couple. Finally one image is
// processed in single-image mode. Every mechanism is counted and must occur;
// cluster, fused-object and database contents are checked against the values
// known from the scene.
module tb_spot_top;
  import spot_pkg::*;
  localparam int W = 64, H = 48;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic pix_valid, pix_sof, single, att_valid, cat_we;
  logic [7:0] pix, tau;
  coord_t eps_dist, eps_fus;
  logic [15:0] dens_max, focal_px, r_search, cos2_phi;
  logic signed [15:0] q [4];
  logic signed [15:0] cat_vec [3];
  pos_t y0, z0;
  logic [31:0] sin2_thr;
  logic [3:0] cat_addr;
  logic [4:0] n_stars;
  logic [3:0] n_jump, dt;
  logic [2:0] seu_inject;
  logic [2:0] tmr_copy_err;
  logic seg_valid, cl_valid, fu_valid, rso_valid;
  segment_t seg; cluster_t cl; fused_t fu, rso;
  logic [3:0] obj_sel; logic [2:0] hist_sel;
  logic obj_valid, obj_active, couple_done, busy;
  logic [15:0] obj_couples, hist_couple;
  pos_t obj_last_y, obj_last_z, hist_c1y, hist_c1z, hist_c2y, hist_c2z;
  vel_t obj_vy, obj_vz;
  logic [4:0] overflow;
  logic [15:0] frame_dropped, prim_merges, imp_merges, stars_removed, n_updates, n_created,
               n_closed, tmr_errors;

  spot_top #(.IMG_W(W), .IMG_H(H), .WIN(8), .MAX_CL(64), .MAX_SEG(256), .ROW_SEG(16),
             .MAX_CLF(16), .CAT_SIZE(16), .MAX_OBJ(16), .MAX_CAND(8), .MAX_HIST(8)) dut (.*);

  int checks = 0, failures = 0;
  int n_cl = 0, n_fu = 0, n_rso = 0, n_couples = 0;
  always @(posedge clk) if (rst_n) begin
    if (cl_valid) n_cl++;
    if (fu_valid) n_fu++;
    if (rso_valid) n_rso++;
    if (couple_done) n_couples++;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int img [H][W];
  task automatic run_image(int i, bit with_t, bit with_f, bit hot);
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) img[r][c] = 20 + $urandom_range(0, 4);
    for (int r = 9; r <= 11; r++) for (int c = 9; c <= 11; c++) img[r][c] = (r == 10 && c == 10) ? 150 : 120;
    img[11][49] = 130; img[11][51] = 130;                          // star 2, crown shape
    for (int c = 49; c <= 51; c++) img[12][c] = 130;
    img[13][50] = 130;
    for (int k = 0; k < 6; k++) if (k != 2) img[30][6 + 7*i + k] = 130;   // broken streak
    if (with_t) begin img[40][30 + i] = 120; img[41][30 + i] = 120; end
    if (with_f) begin img[44][20] = 120; img[44][21] = 120; end
    if (hot) img[40][60] = 200;
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) begin
      @(negedge clk); pix_valid = 1; pix_sof = (r == 0 && c == 0); pix = 8'(img[r][c]);
    end
    @(negedge clk); pix_valid = 0; pix_sof = 0;
    repeat (20) @(posedge clk);
    while (busy) @(posedge clk);
    @(posedge clk);
  endtask

  task automatic load_star(int addr, real x, real y, real z);
    real n;
    n = $sqrt(x*x + y*y + z*z);
    @(negedge clk); cat_we = 1; cat_addr = 4'(addr);
    cat_vec[0] = 16'($rtoi(x / n * 16384.0)); cat_vec[1] = 16'($rtoi(y / n * 16384.0));
    cat_vec[2] = 16'($rtoi(z / n * 16384.0));
    @(negedge clk); cat_we = 0;
  endtask

  initial begin
    #20000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int c0, f0, r0, m;
    pix_valid = 0; pix_sof = 0; pix = 0; single = 0; att_valid = 0; cat_we = 0; cat_addr = 0;
    tau = 25; eps_dist = 2; dens_max = 24; eps_fus = 3;
    q = '{16'sd0, 16'sd0, 16'sd0, 16'sd16384};
    cat_vec = '{16'sd0, 16'sd0, 16'sd0};
    focal_px = 100 * 16; y0 = 32 * 16; z0 = 24 * 16;
    sin2_thr = 32'($rtoi($pow($sin(1.0 * 3.14159265358979 / 180.0), 2) * 4294967296.0));
    n_stars = 4; r_search = 4 * 16; cos2_phi = 16'($rtoi(0.9698 * 65536.0)); n_jump = 1; dt = 1;
    seu_inject = 0; obj_sel = 0; hist_sel = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    load_star(0, 100.0, 10.0 - 32.0, 10.0 - 24.0);
    load_star(1, 100.0, 50.0 - 32.0, 11.8333 - 24.0);
    load_star(2, 100.0, -40.0, 30.0);
    load_star(3, -100.0, 5.0, 5.0);

    // couple 0: no attitude
    c0 = n_cl; run_image(0, 1, 0, 1);
    chk(n_cl - c0 == 4, $sformatf("image 0: %0d clusters, expected 4 (hot pixel discarded)", n_cl - c0));
    f0 = n_fu; r0 = n_rso; run_image(1, 1, 0, 0);
    chk(n_fu - f0 == 4, $sformatf("couple 0: %0d fused, expected 4", n_fu - f0));
    chk(n_rso - r0 == 4 && stars_removed == 0, "couple 0: antitracking bypassed without attitude");
    chk(n_created == 4, $sformatf("couple 0: %0d objects created", n_created));
    // couple 1: attitude, flash in image 2, sequencer upset
    att_valid = 1;
    c0 = n_cl; run_image(2, 0, 1, 0);
    chk(n_cl - c0 == 4, $sformatf("image 2: %0d clusters", n_cl - c0));
    f0 = n_fu; r0 = n_rso;
    fork
      run_image(3, 0, 0, 0);
      begin repeat (500) @(negedge clk); seu_inject = 3'b010; @(negedge clk); seu_inject = 0; end
    join
    chk(n_fu - f0 == 3, $sformatf("couple 1: %0d fused, expected 3 (flash dropped)", n_fu - f0));
    chk(n_rso - r0 == 1 && stars_removed == 2, $sformatf("couple 1: %0d kept, %0d stars removed",
        n_rso - r0, stars_removed));
    chk(tmr_errors >= 1, "sequencer upset detected");
    chk(tmr_copy_err == 3'b010, "upset attributed to copy 2 only");
    // couple 2
    run_image(4, 0, 0, 0);
    run_image(5, 0, 0, 0);
    chk(stars_removed == 4, $sformatf("stars removed %0d", stars_removed));
    chk(n_updates == 2, $sformatf("updates %0d", n_updates));
    chk(n_closed == 3, $sformatf("closed %0d", n_closed));
    chk(n_couples == 3, $sformatf("couples %0d", n_couples));
    chk(prim_merges > 0, "primitive merge");
    chk(imp_merges >= 6, $sformatf("improved merges %0d", imp_merges));
    // the crossing object: tracked in all three couples
    m = -1;
    for (int i = 0; i < 16; i++) begin obj_sel = 4'(i); #1; if (obj_valid && obj_couples == 3) m = i; end
    chk(m >= 0, "crossing object tracked through three couples");
    if (m >= 0) begin
      obj_sel = 4'(m); #1;
      chk(obj_active, "crossing object active");
      chk(int'(obj_last_y) >= (41*16 + 41 - 16) && int'(obj_last_y) <= (41*16 + 41 + 16),
          $sformatf("last column %0d, expected about %0d", obj_last_y, 41*16+41));
      chk(obj_vy >= 7*16 - 4 && obj_vy <= 7*16 + 4 && obj_vz >= -4 && obj_vz <= 4,
          $sformatf("velocity %0d,%0d", obj_vy, obj_vz));
      for (int h = 0; h < 3; h++) begin
        hist_sel = 3'(h); #1;
        chk(hist_couple == 16'(h) && int'(hist_c2y) - int'(hist_c1y) >= 7*16 - 4 &&
            int'(hist_c2y) - int'(hist_c1y) <= 7*16 + 4, $sformatf("history %0d", h));
      end
    end
    // single-image mode: fusion and tracking skipped
    single = 1; att_valid = 0;
    f0 = n_fu; c0 = n_created;
    run_image(6, 0, 0, 0);
    chk(n_fu - f0 == 3 && n_created - c0 == 3, $sformatf("single mode: %0d passed, %0d created",
        n_fu - f0, n_created - c0));
    chk(n_couples == 4, "single image processed");
    chk(overflow == 0 && frame_dropped == 0, "no overflow");
    $display("mechanisms: prim_merge=%0d imp_merge=%0d fused=%0d stars_removed=%0d updates=%0d created=%0d closed=%0d tmr=%0d",
             prim_merges, imp_merges, n_fu, stars_removed, n_updates, n_created, n_closed, tmr_errors);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
