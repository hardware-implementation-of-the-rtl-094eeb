// antitracking: SPOT antitracking, removal of catalogued stars.
//
// Fused objects arrive on `in_valid`/`in_obj` into an input FIFO; `in_last`
// marks that the list of the current couple is complete. For each object the
// unit
//   1. forms the 3-D direction in the camera frame from the 2-D centroid
//      (of the second image) and the sensor characteristics: boresight along
//      x, v_c = [f, c_y - y0, c_z - z0] (pinhole model, Q.4 pixels);
//   2. rotates it into the inertial frame, v_i = A(q)^T v_c, with the
//      attitude matrix A(q) of the current quaternion q = [q1 q2 q3 q4]
//      (q4 scalar, Q1.14); A(q) is computed once, when `start` pulses;
//   3. compares v_i with every catalogued star direction s (unit vector,
//      Q1.14), one star per clock: the angle is below the threshold when
//      v_i . s > 0 and |v_i x s|^2 <= sin^2(thr) |v_i|^2 (sin^2 given in Q0.32);
//   4. drops the object when some star lies within the threshold (it is a
//      star), otherwise passes it on `out_valid`/`out_obj`.
// `done` pulses when the FIFO is empty after `in_last`. With `att_valid`
// low there is no attitude: every object passes unchanged, one per clock.
// The catalogue is a memory of CAT_SIZE entries loaded through `cat_we`.
//
// From the document: the four antitracking steps, the use of attitude
// quaternion, star catalogue and sensor characteristics, and the bypass
// when no attitude is available. This design's choices: the pinhole camera
// model and axis convention, the scalar-last quaternion, the cross-product
// angle test, the fixed-point formats and the catalogue size.
module antitracking
  import spot_pkg::*;
#(
  parameter int unsigned CAT_SIZE = 1024,  // catalogue entries
  parameter int unsigned FIFO_D   = 64
) (
  input  logic               clk,
  input  logic               rst_n,
  // attitude and sensor
  input  logic               att_valid,
  input  logic signed [15:0] q [4],          // Q1.14, q[3] scalar part
  input  logic [15:0]        focal_px,       // focal length, Q12.4 px
  input  pos_t               y0,             // principal point, Q.4 px
  input  pos_t               z0,
  input  logic [31:0]        sin2_thr,       // sin^2 of the angular threshold, Q0.32
  // catalogue load port and size
  input  logic               cat_we,
  input  logic [$clog2(CAT_SIZE)-1:0] cat_addr,
  input  logic signed [15:0] cat_vec [3],    // unit vector, Q1.14
  input  logic [$clog2(CAT_SIZE):0]   n_stars,
  // object stream
  input  logic               start,          // latch attitude matrix
  input  logic               in_valid,
  input  fused_t             in_obj,
  input  logic               in_last,
  output logic               out_valid,
  output fused_t             out_obj,
  output logic               done,
  output logic               busy,
  output logic               overflow,
  output logic [15:0]        removed         // stars removed since reset
);
  localparam int unsigned CW = $clog2(CAT_SIZE);
  typedef logic signed [15:0] s16_t;

  // ---- catalogue memory ----
  s16_t cat_x [CAT_SIZE];
  s16_t cat_y [CAT_SIZE];
  s16_t cat_z [CAT_SIZE];
  always_ff @(posedge clk) begin
    if (cat_we) begin
      cat_x[cat_addr] <= cat_vec[0];
      cat_y[cat_addr] <= cat_vec[1];
      cat_z[cat_addr] <= cat_vec[2];
    end
  end

  // ---- attitude matrix A(q), Q2.14 ----
  logic signed [17:0] am [3][3];
  function automatic logic signed [17:0] qsum(logic signed [31:0] a, logic signed [31:0] b,
                                              logic signed [31:0] c, logic signed [31:0] d);
    logic signed [33:0] s;
    s = 34'(a) + 34'(b) + 34'(c) + 34'(d);
    return 18'(s >>> 14);
  endfunction
  logic signed [31:0] p11, p22, p33, p44, p12, p13, p14, p23, p24, p34;
  always_comb begin
    p11 = q[0] * q[0]; p22 = q[1] * q[1]; p33 = q[2] * q[2]; p44 = q[3] * q[3];
    p12 = q[0] * q[1]; p13 = q[0] * q[2]; p14 = q[0] * q[3];
    p23 = q[1] * q[2]; p24 = q[1] * q[3]; p34 = q[2] * q[3];
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) am[r][c] <= '0;
    end else if (start) begin
      am[0][0] <= qsum(p11, -p22, -p33, p44);
      am[0][1] <= qsum(p12, p12, p34, p34);
      am[0][2] <= qsum(p13, p13, -p24, -p24);
      am[1][0] <= qsum(p12, p12, -p34, -p34);
      am[1][1] <= qsum(-p11, p22, -p33, p44);
      am[1][2] <= qsum(p23, p23, p14, p14);
      am[2][0] <= qsum(p13, p13, p24, p24);
      am[2][1] <= qsum(p23, p23, -p14, -p14);
      am[2][2] <= qsum(-p11, -p22, p33, p44);
    end
  end

  // ---- input FIFO ----
  logic   f_empty, f_full, f_ovf, f_pop;
  fused_t f_obj;
  sync_fifo #(.W($bits(fused_t)), .DEPTH(FIFO_D)) u_fifo (
    .clk, .rst_n, .clr(1'b0), .wr_en(in_valid), .wr_data(in_obj),
    .rd_en(f_pop), .rd_data(f_obj), .empty(f_empty), .full(f_full), .overflow(f_ovf));

  // ---- per-object datapath ----
  typedef enum logic [1:0] {A_IDLE, A_ROT, A_SCAN} astate_t;
  astate_t st;
  logic last_seen;
  logic signed [16:0] vc [3];        // camera frame, Q.4
  logic signed [23:0] vi [3];        // inertial frame, Q.4
  logic signed [23:0] vi_c [3];
  always_comb begin
    vc[0] = signed'({1'b0, focal_px});
    vc[1] = signed'({1'b0, f_obj.c2y}) - signed'({1'b0, y0});
    vc[2] = signed'({1'b0, f_obj.c2z}) - signed'({1'b0, z0});
    for (int k = 0; k < 3; k++) begin
      logic signed [37:0] acc;
      acc = 38'(am[0][k] * vc[0]) + 38'(am[1][k] * vc[1]) + 38'(am[2][k] * vc[2]);
      vi_c[k] = 24'(acc >>> 14);
    end
  end

  logic [CW:0] sk;
  s16_t sx, sy, sz;
  logic signed [40:0] cr [3];
  logic signed [41:0] dot;
  logic [83:0] cr2;
  logic [81:0] thr_rhs;
  logic [47:0] vi2;
  logic        is_star;
  always_comb begin
    sx = cat_x[sk[CW-1:0]]; sy = cat_y[sk[CW-1:0]]; sz = cat_z[sk[CW-1:0]];
    cr[0] = 41'(vi[1] * sz) - 41'(vi[2] * sy);
    cr[1] = 41'(vi[2] * sx) - 41'(vi[0] * sz);
    cr[2] = 41'(vi[0] * sy) - 41'(vi[1] * sx);
    dot   = 42'(vi[0] * sx) + 42'(vi[1] * sy) + 42'(vi[2] * sz);
    cr2   = 84'(cr[0] * cr[0]) + 84'(cr[1] * cr[1]) + 84'(cr[2] * cr[2]);   // Q.36
    vi2   = 48'(vi[0] * vi[0]) + 48'(vi[1] * vi[1]) + 48'(vi[2] * vi[2]);   // Q.8
    thr_rhs = 82'(vi2) * 82'(sin2_thr);                                    // Q.40
    is_star = (dot > 0) && ({cr2, 4'b0} <= 88'(thr_rhs));
  end

  assign f_pop = (st == A_IDLE && !f_empty && !att_valid) ||
                 (st == A_SCAN && (is_star || sk + 1'b1 >= n_stars));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= A_IDLE; last_seen <= 1'b0; sk <= '0; out_valid <= 1'b0; out_obj <= '0;
      done <= 1'b0; overflow <= 1'b0; removed <= '0;
      for (int k = 0; k < 3; k++) vi[k] <= '0;
    end else begin
      out_valid <= 1'b0; done <= 1'b0;
      if (in_last) last_seen <= 1'b1;
      if (f_ovf) overflow <= 1'b1;
      unique case (st)
        A_IDLE: begin
          if (!f_empty) begin
            if (!att_valid) begin
              out_valid <= 1'b1; out_obj <= f_obj;        // no attitude: bypass
            end else if (n_stars == 0) begin
              st <= A_ROT;
            end else begin
              st <= A_ROT;
            end
          end else if (last_seen && !in_last) begin
            last_seen <= 1'b0; done <= 1'b1;
          end
        end
        A_ROT: begin
          for (int k = 0; k < 3; k++) vi[k] <= vi_c[k];
          sk <= '0;
          st <= A_SCAN;
        end
        A_SCAN: begin
          if (n_stars == 0) begin
            out_valid <= 1'b1; out_obj <= f_obj; st <= A_IDLE;
          end else if (is_star) begin
            removed <= removed + 1'b1; st <= A_IDLE;
          end else if (sk + 1'b1 >= n_stars) begin
            out_valid <= 1'b1; out_obj <= f_obj; st <= A_IDLE;
          end else begin
            sk <= sk + 1'b1;
          end
        end
        default: st <= A_IDLE;
      endcase
    end
  end
  assign busy = (st != A_IDLE) || !f_empty;
endmodule
