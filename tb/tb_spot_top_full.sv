// tb_spot_top_full: one complete couple of full-size images through spot_top
// with every parameter at its default (960 x 640 pixels, 8-bit).
//
// Two images with a noisy background, three stars (all in the catalogue)
// and an object crossing at 12 px per image as a broken streak. The attitude
// quaternion is q = [-0.526829 0.222090 -0.342451 -0.745556]; the catalogue
// directions of the stars are computed here in floating point with that
// attitude and a 1000 px focal length. Expected: three stars removed, one
// new object in the database, at the streak's position, with the 12 px
// velocity.
module tb_spot_top_full;
  import spot_pkg::*;
  localparam int W = 960, H = 640;
  localparam real F = 1000.0;
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
  logic [9:0] cat_addr;
  logic [10:0] n_stars;
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

  spot_top dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  real qr [4] = '{-0.526829, 0.222090, -0.342451, -0.745556};
  int  sy [3] = '{178, 445, 837};
  int  sz [3] = '{116, 215, 494};
  real A [3][3];

  task automatic run_image(int i);
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) begin
      int p;
      p = 20 + $urandom_range(0, 4);
      for (int s = 0; s < 3; s++) if (r >= sz[s]-1 && r <= sz[s]+1 && c >= sy[s]-1 && c <= sy[s]+1)
        p = (r == sz[s] && c == sy[s]) ? 160 : 120;
      if (r == 399 && c >= 300 + 12*i && c < 308 + 12*i && c != 303 + 12*i) p = 130;
      @(negedge clk); pix_valid = 1; pix_sof = (r == 0 && c == 0); pix = 8'(p);
    end
    @(negedge clk); pix_valid = 0; pix_sof = 0;
    repeat (20) @(posedge clk);
    while (busy) @(posedge clk);
  endtask

  initial begin
    #100000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    pix_valid = 0; pix_sof = 0; pix = 0; single = 0; att_valid = 1; cat_we = 0; cat_addr = 0;
    tau = 25; eps_dist = 2; dens_max = 24; eps_fus = 6;
    for (int k = 0; k < 4; k++) q[k] = 16'($rtoi(qr[k] * 16384.0));
    cat_vec = '{16'sd0, 16'sd0, 16'sd0};
    focal_px = 16'($rtoi(F * 16.0)); y0 = 480 * 16; z0 = 320 * 16;
    sin2_thr = 32'($rtoi($pow($sin(0.2 * 3.14159265358979 / 180.0), 2) * 4294967296.0));
    n_stars = 3; r_search = 8 * 16; cos2_phi = 16'($rtoi(0.9698 * 65536.0)); n_jump = 2; dt = 1;
    seu_inject = 0; obj_sel = 0; hist_sel = 0;
    begin
      real q1, q2, q3, q4;
      q1 = qr[0]; q2 = qr[1]; q3 = qr[2]; q4 = qr[3];
      A[0][0] = q1*q1 - q2*q2 - q3*q3 + q4*q4; A[0][1] = 2*(q1*q2 + q3*q4); A[0][2] = 2*(q1*q3 - q2*q4);
      A[1][0] = 2*(q1*q2 - q3*q4); A[1][1] = -q1*q1 + q2*q2 - q3*q3 + q4*q4; A[1][2] = 2*(q2*q3 + q1*q4);
      A[2][0] = 2*(q1*q3 + q2*q4); A[2][1] = 2*(q2*q3 - q1*q4); A[2][2] = -q1*q1 - q2*q2 + q3*q3 + q4*q4;
    end
    repeat (3) @(posedge clk); rst_n = 1;
    for (int s = 0; s < 3; s++) begin
      real vc [3], vi [3], n;
      vc[0] = F; vc[1] = sy[s] - 480.0; vc[2] = sz[s] - 320.0;
      for (int r = 0; r < 3; r++) vi[r] = A[0][r]*vc[0] + A[1][r]*vc[1] + A[2][r]*vc[2];
      n = $sqrt(vi[0]*vi[0] + vi[1]*vi[1] + vi[2]*vi[2]);
      @(negedge clk); cat_we = 1; cat_addr = 10'(s);
      for (int k = 0; k < 3; k++) cat_vec[k] = 16'($rtoi(vi[k] / n * 16384.0));
      @(negedge clk); cat_we = 0;
    end
    run_image(0);
    run_image(1);
    chk(n_created == 1, $sformatf("objects created %0d, expected 1", n_created));
    chk(stars_removed == 3, $sformatf("stars removed %0d, expected 3", stars_removed));
    chk(imp_merges == 2, $sformatf("improved merges %0d, expected 2", imp_merges));
    obj_sel = 0; #1;
    // streak of image 1: columns 312..319 without 315, centroid about 315.57
    chk(obj_valid && int'(obj_last_y) >= 5049 - 8 && int'(obj_last_y) <= 5049 + 8 &&
        obj_last_z == pos_t'(399 * 16), $sformatf("object at %0d,%0d", obj_last_y, obj_last_z));
    chk(obj_vy >= 12*16 - 4 && obj_vy <= 12*16 + 4, $sformatf("velocity %0d", obj_vy));
    chk(overflow == 0, "no overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
