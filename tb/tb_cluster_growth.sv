// tb_cluster_growth: self-checking test of the cluster growth unit.
//
// Replays the six-image sequence of a low-orbit satellite pass as three
// couples (centroids per image, px):
//   (291.9,194.2) (303.0,235.9) | (315.1,281.9) (326.3,324.9) | (336.4,363.6) (345.5,399.0)
// together with a still star, an object seen only in the first couple
// (closed after n_jump = 1 missed couples) and a spurious object in the second
// couple. Checks that the satellite stays one object with three history
// entries, its last position and its average velocity (computed here from
// the same Q.4 values), the star's three updates, the counts of created,
// updated and closed objects, and finally the single-image mode.
module tb_cluster_growth;
  import spot_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic single, in_valid, couple_end, done, busy, overflow;
  logic [15:0] r_search, cos2_phi;
  logic [3:0] n_jump, dt;
  fused_t in_obj;
  logic [3:0] obj_sel;
  logic [2:0] hist_sel;
  logic obj_valid, obj_active;
  logic [15:0] obj_couples, hist_couple, n_updates, n_created, n_closed;
  pos_t obj_last_y, obj_last_z, hist_c1y, hist_c1z, hist_c2y, hist_c2z;
  vel_t obj_vy, obj_vz;
  cluster_growth #(.MAX_OBJ(16), .MAX_CAND(8), .MAX_HIST(8)) dut (.*);

  int checks = 0, failures = 0;
  real iss [6][2] = '{'{291.9,194.2}, '{303.0,235.9}, '{315.1,281.9},
                      '{326.3,324.9}, '{336.4,363.6}, '{345.5,399.0}};
  function automatic int qz(real v); return $rtoi(v * 16.0 + 0.5); endfunction

  task automatic send(int c1y, int c1z, int c2y, int c2z, int n, int lam);
    @(negedge clk);
    in_valid = 1;
    in_obj = '{c1y: c1y, c1z: c1z, c2y: c2y, c2z: c2z, vy: vel_t'(c2y - c1y),
               vz: vel_t'(c2z - c1z), n: n, lam: lam};
    @(negedge clk); in_valid = 0;
  endtask

  task automatic end_couple();
    @(negedge clk); couple_end = 1; @(negedge clk); couple_end = 0;
    @(posedge done); @(posedge clk);
  endtask

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int sy, sz;
    single = 0; in_valid = 0; couple_end = 0; in_obj = '0; obj_sel = 0; hist_sel = 0;
    r_search = 16'(8 * 16); cos2_phi = 16'($rtoi(0.9698 * 65536.0)); n_jump = 1; dt = 1;
    repeat (3) @(posedge clk); rst_n = 1;
    sy = 0; sz = 0;
    for (int c = 0; c < 3; c++) begin
      send(qz(iss[2*c][0]), qz(iss[2*c][1]), qz(iss[2*c+1][0]), qz(iss[2*c+1][1]), 30, 50);
      sy += qz(iss[2*c+1][0]) - qz(iss[2*c][0]);
      sz += qz(iss[2*c+1][1]) - qz(iss[2*c][1]);
      send(500*16 + c, 100*16, 500*16 + c + 2, 100*16 - 1, 18, 6);          // star
      if (c == 0) send(700*16, 500*16, 780*16, 500*16, 10, 12);             // vanishes
      if (c == 1) send(100*16, 600*16, 110*16, 610*16, 8, 10);              // spurious
      end_couple();
    end
    // satellite: slot 0
    obj_sel = 0; #1;
    chk(obj_valid && obj_active, "satellite object active");
    chk(obj_couples == 3, $sformatf("satellite couples %0d", obj_couples));
    chk(obj_last_y == pos_t'(qz(345.5)) && obj_last_z == pos_t'(qz(399.0)), "satellite last position");
    chk(obj_vy == vel_t'(sy / 3) && obj_vz == vel_t'(sz / 3),
        $sformatf("average velocity %0d,%0d expected %0d,%0d", obj_vy, obj_vz, sy/3, sz/3));
    for (int h = 0; h < 3; h++) begin
      hist_sel = h; #1;
      chk(hist_couple == h && hist_c1y == pos_t'(qz(iss[2*h][0])) && hist_c1z == pos_t'(qz(iss[2*h][1]))
          && hist_c2y == pos_t'(qz(iss[2*h+1][0])) && hist_c2z == pos_t'(qz(iss[2*h+1][1])),
          $sformatf("history entry %0d", h));
    end
    obj_sel = 1; #1;
    chk(obj_valid && obj_couples == 3, "star tracked through three couples");
    obj_sel = 2; #1;
    chk(obj_valid && !obj_active && obj_couples == 1, "vanished object closed");
    obj_sel = 3; #1;
    chk(obj_valid && obj_active && obj_couples == 1 && obj_last_y == pos_t'(110*16), "spurious object created");
    chk(n_created == 4, $sformatf("created %0d", n_created));
    chk(n_updates == 4, $sformatf("updates %0d", n_updates));
    chk(n_closed == 1, $sformatf("closed %0d", n_closed));
    // single-image mode: database rebuilt from the candidates
    single = 1;
    send(200*16, 200*16, 200*16, 200*16, 9, 3);
    send(300*16, 300*16, 300*16, 300*16, 9, 3);
    end_couple();
    begin
      int nv = 0;
      for (int i = 0; i < 16; i++) begin obj_sel = i; #1; if (obj_valid) nv++; end
      chk(nv == 2, $sformatf("single mode objects %0d", nv));
    end
    chk(!overflow, "no overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
