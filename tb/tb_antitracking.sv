// tb_antitracking: self-checking test of the antitracking unit.
//
// Uses the attitude quaternion q = [-0.526829 0.222090 -0.342451 -0.745556]
// and five object centroids, four on stars and one on a moving object,
// (178.2,116.4) (445.5,215.3) (637.4,315.5) (837.5,494.6) (345.5,399.0).
// The star catalogue is built here in floating point: the inertial
// directions of the four star centroids (moved by a fraction of a pixel, as
// a catalogue never matches exactly) plus random unrelated stars. Expected:
// only (345.5, 399.0) survives. Then checks that with no attitude every
// object passes, and that with a different attitude no star is recognised.
module tb_antitracking;
  import spot_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam int CAT = 64;
  localparam real F = 1000.0, Y0 = 480.0, Z0 = 320.0;

  logic att_valid, cat_we, start, in_valid, in_last, out_valid, done, busy, overflow;
  logic signed [15:0] q [4];
  logic signed [15:0] cat_vec [3];
  logic [15:0] focal_px, removed;
  pos_t y0, z0;
  logic [31:0] sin2_thr;
  logic [5:0] cat_addr;
  logic [6:0] n_stars;
  fused_t in_obj, out_obj;
  antitracking #(.CAT_SIZE(CAT), .FIFO_D(8)) dut (.clk, .rst_n, .att_valid, .q, .focal_px,
    .y0, .z0, .sin2_thr, .cat_we, .cat_addr, .cat_vec, .n_stars, .start, .in_valid, .in_obj,
    .in_last, .out_valid, .out_obj, .done, .busy, .overflow, .removed);

  int checks = 0, failures = 0;
  fused_t got[$];
  always @(posedge clk) if (rst_n && out_valid) got.push_back(out_obj);

  real qr [4] = '{-0.526829, 0.222090, -0.342451, -0.745556};
  real cy [5] = '{178.2, 445.5, 637.4, 837.5, 345.5};
  real cz [5] = '{116.4, 215.3, 315.5, 494.6, 399.0};
  real A [3][3];

  task automatic att_matrix(real q1, real q2, real q3, real q4);
    A[0][0] = q1*q1 - q2*q2 - q3*q3 + q4*q4; A[0][1] = 2*(q1*q2 + q3*q4); A[0][2] = 2*(q1*q3 - q2*q4);
    A[1][0] = 2*(q1*q2 - q3*q4); A[1][1] = -q1*q1 + q2*q2 - q3*q3 + q4*q4; A[1][2] = 2*(q2*q3 + q1*q4);
    A[2][0] = 2*(q1*q3 + q2*q4); A[2][1] = 2*(q2*q3 - q1*q4); A[2][2] = -q1*q1 - q2*q2 + q3*q3 + q4*q4;
  endtask

  task automatic load_star(int addr, real x, real y, real z);
    real n;
    n = $sqrt(x*x + y*y + z*z);
    @(negedge clk);
    cat_we = 1; cat_addr = addr;
    cat_vec[0] = $rtoi(x / n * 16384.0); cat_vec[1] = $rtoi(y / n * 16384.0);
    cat_vec[2] = $rtoi(z / n * 16384.0);
    @(negedge clk); cat_we = 0;
  endtask

  task automatic send_all();
    for (int k = 0; k < 5; k++) begin
      @(negedge clk); in_valid = 1;
      in_obj = '0;
      in_obj.c2y = pos_t'($rtoi(cy[k] * 16.0 + 0.5)); in_obj.c2z = pos_t'($rtoi(cz[k] * 16.0 + 0.5));
      in_obj.c1y = in_obj.c2y - 16; in_obj.c1z = in_obj.c2z; in_obj.vy = 16; in_obj.n = k + 2;
    end
    @(negedge clk); in_valid = 0; in_last = 1;
    @(negedge clk); in_last = 0;
  endtask

  task automatic set_q(real q1, real q2, real q3, real q4);
    q[0] = $rtoi(q1 * 16384.0); q[1] = $rtoi(q2 * 16384.0);
    q[2] = $rtoi(q3 * 16384.0); q[3] = $rtoi(q4 * 16384.0);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
  endtask

  initial begin
    #2000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    att_valid = 1; cat_we = 0; start = 0; in_valid = 0; in_last = 0; in_obj = '0;
    cat_addr = 0; cat_vec = '{0, 0, 0}; q = '{0, 0, 0, 0};
    focal_px = 16'($rtoi(F * 16.0)); y0 = pos_t'($rtoi(Y0 * 16.0)); z0 = pos_t'($rtoi(Z0 * 16.0));
    sin2_thr = 32'($rtoi($pow($sin(0.2 * 3.14159265358979 / 180.0), 2) * 4294967296.0));
    n_stars = 40;
    repeat (3) @(posedge clk); rst_n = 1;
    att_matrix(qr[0], qr[1], qr[2], qr[3]);
    // catalogue: stars 0..3 at the four star centroids, moved by up to 0.4 px
    for (int k = 0; k < 4; k++) begin
      real vc [3], vi [3];
      vc[0] = F; vc[1] = cy[k] + 0.4 - Y0; vc[2] = cz[k] - 0.3 - Z0;
      for (int r = 0; r < 3; r++) vi[r] = A[0][r]*vc[0] + A[1][r]*vc[1] + A[2][r]*vc[2];
      load_star(3 + 9*k, vi[0], vi[1], vi[2]);
    end
    for (int k = 0; k < 40; k++) if (!(k inside {3, 12, 21, 30}))
      load_star(k, $itor($urandom_range(0, 2000)) - 1000.0, $itor($urandom_range(0, 2000)) - 1000.0,
                $itor($urandom_range(0, 2000)) - 1000.0);
    // 1) attitude known: the four stars are removed
    set_q(qr[0], qr[1], qr[2], qr[3]);
    send_all();
    @(posedge done); @(posedge clk);
    checks++;
    if (got.size() != 1) begin failures++; $display("kept %0d objects, expected 1", got.size()); end
    else begin
      checks++;
      if (got[0].c2y != pos_t'(5528) || got[0].c2z != pos_t'(6384)) begin
        failures++; $display("wrong object kept %0d,%0d", got[0].c2y, got[0].c2z);
      end
    end
    checks++;
    if (removed != 4) begin failures++; $display("removed %0d", removed); end
    got = {};
    // 2) no attitude: bypass
    att_valid = 0;
    send_all();
    @(posedge done); @(posedge clk);
    checks++;
    if (got.size() != 5) begin failures++; $display("bypass passed %0d", got.size()); end
    got = {};
    // 3) another attitude: no star matches
    att_valid = 1;
    set_q(0.0, 0.0, 0.0, 1.0);
    send_all();
    @(posedge done); @(posedge clk);
    checks++;
    if (got.size() != 5) begin failures++; $display("wrong attitude kept %0d", got.size()); end
    checks++;
    if (overflow) begin failures++; $display("overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
