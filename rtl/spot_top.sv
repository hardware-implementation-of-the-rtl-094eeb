// spot_top: SPOT on-board detection chain for resident space objects.
//
// Raw star-sensor images enter as a raster pixel stream and leave as a
// database of tracked objects (stars or orbiting objects) with positions per
// couple of images and average velocities:
//
//   pixels -> preproc_seg -> clustering -> cluster_fusion -> antitracking
//          -> cluster_growth -> object database (read port)
//
// preproc_seg segments each image into over-threshold row segments;
// clustering groups them into clusters and computes centroids; the clusters
// of the two images of a couple are written into the two banks of
// cluster_fusion, which keeps only the objects seen in both images (skipped,
// cluster-by-cluster pass-through, when `single` is high); antitracking
// removes catalogued stars when an attitude is available (`att_valid`,
// otherwise it passes everything); cluster_growth associates the result with
// the tracked objects. The sequencer that starts each stage is held in three
// copies (spot_ctrl) whose state is majority-voted by tmr_voter and fed back
// to all three; `seu_inject` upsets a copy for test, `tmr_errors` counts the
// corrected disagreements and `tmr_copy_err` records which copies were hit.
//
// Interface: one pixel per `pix_valid` clock, `pix_sof` on the first pixel of
// an image; images must be spaced so that an image's clusters are out before
// the next image ends (`frame_dropped` counts images whose clusters arrived
// while a couple was still being processed). `couple_done` pulses after each
// database update. Configuration and the star catalogue come from the host
// processor as plain ports. All processing stages run sequentially on one
// clock; their latencies depend on the scene (see each unit).
module spot_top
  import spot_pkg::*;
#(
  parameter int unsigned IMG_W    = 960,
  parameter int unsigned IMG_H    = 640,
  parameter int unsigned PIX_W    = 8,
  parameter int unsigned WIN      = 16,
  parameter int unsigned MAX_CL   = 256,
  parameter int unsigned MAX_SEG  = 1024,
  parameter int unsigned ROW_SEG  = 32,
  parameter int unsigned MAX_CLF  = 64,
  parameter int unsigned CAT_SIZE = 1024,
  parameter int unsigned MAX_OBJ  = 16,
  parameter int unsigned MAX_CAND = 16,
  parameter int unsigned MAX_HIST = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  // pixel stream
  input  logic               pix_valid,
  input  logic               pix_sof,
  input  logic [PIX_W-1:0]   pix,
  // configuration
  input  logic               single,          // single-image mode: no fusion, no tracking
  input  logic [PIX_W-1:0]   tau,             // pre-processing threshold
  input  coord_t             eps_dist,        // improved clustering distance
  input  logic [15:0]        dens_max,        // improved clustering density, Q.4
  input  coord_t             eps_fus,         // fusion distance
  input  logic               att_valid,       // attitude available
  input  logic signed [15:0] q [4],           // attitude quaternion, Q1.14, q[3] scalar
  input  logic [15:0]        focal_px,        // Q.4 px
  input  pos_t               y0,
  input  pos_t               z0,
  input  logic [31:0]        sin2_thr,        // antitracking threshold, Q0.32
  input  logic               cat_we,
  input  logic [$clog2(CAT_SIZE)-1:0] cat_addr,
  input  logic signed [15:0] cat_vec [3],
  input  logic [$clog2(CAT_SIZE):0]   n_stars,
  input  logic [15:0]        r_search,        // Q.4 px
  input  logic [15:0]        cos2_phi,        // Q0.16
  input  logic [3:0]         n_jump,
  input  logic [3:0]         dt,
  input  logic [2:0]         seu_inject,      // test: upset sequencer copy i
  // observation of the intermediate streams
  output logic               seg_valid,
  output segment_t           seg,
  output logic               cl_valid,
  output cluster_t           cl,
  output logic               fu_valid,
  output fused_t             fu,
  output logic               rso_valid,       // object that survived antitracking
  output fused_t             rso,
  // database read port
  input  logic [$clog2(MAX_OBJ)-1:0]  obj_sel,
  input  logic [$clog2(MAX_HIST)-1:0] hist_sel,
  output logic               obj_valid,
  output logic               obj_active,
  output logic [15:0]        obj_couples,
  output pos_t               obj_last_y,
  output pos_t               obj_last_z,
  output vel_t               obj_vy,
  output vel_t               obj_vz,
  output logic [15:0]        hist_couple,
  output pos_t               hist_c1y,
  output pos_t               hist_c1z,
  output pos_t               hist_c2y,
  output pos_t               hist_c2z,
  // status
  output logic               couple_done,
  output logic               busy,
  output logic [4:0]         overflow,        // clustering, fusion, antitracking, growth, frames
  output logic [15:0]        frame_dropped,
  output logic [15:0]        prim_merges,
  output logic [15:0]        imp_merges,
  output logic [15:0]        stars_removed,
  output logic [15:0]        n_updates,
  output logic [15:0]        n_created,
  output logic [15:0]        n_closed,
  output logic [15:0]        tmr_errors,
  output logic [2:0]         tmr_copy_err     // sticky: copy i has disagreed since reset
);
  // ---------------- sequencer, triplicated ----------------
  logic [2:0] st1, st2, st3, st_v;
  logic       tmr_mis;
  logic [2:0] tmr_faulty;
  logic       cl_done, fus_done, anti_done, grow_done;
  spot_ctrl u_ctrl1 (.clk, .rst_n, .state_recv(st_v), .single, .cl_done, .fus_done, .anti_done,
                     .grow_done, .seu_flip(seu_inject[0]), .state_out(st1));
  spot_ctrl u_ctrl2 (.clk, .rst_n, .state_recv(st_v), .single, .cl_done, .fus_done, .anti_done,
                     .grow_done, .seu_flip(seu_inject[1]), .state_out(st2));
  spot_ctrl u_ctrl3 (.clk, .rst_n, .state_recv(st_v), .single, .cl_done, .fus_done, .anti_done,
                     .grow_done, .seu_flip(seu_inject[2]), .state_out(st3));
  tmr_voter #(.W(3)) u_vote (.in1(st1), .in2(st2), .in3(st3), .voted(st_v),
                             .mismatch(tmr_mis), .faulty(tmr_faulty));

  logic in_img, img, fus_start, fus_clr;
  assign in_img    = (st_v[2:1] == 2'd0);
  assign img       = st_v[0];
  assign fus_start = in_img && cl_done && (single || img);
  assign fus_clr   = (st_v[2:1] == 2'd3) && grow_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tmr_errors <= '0; tmr_copy_err <= '0; frame_dropped <= '0; overflow[4] <= 1'b0;
    end else begin
      if (tmr_mis) tmr_errors <= tmr_errors + 1'b1;
      tmr_copy_err <= tmr_copy_err | tmr_faulty;
      if (cl_done && !in_img) begin
        frame_dropped <= frame_dropped + 1'b1; overflow[4] <= 1'b1;
      end
    end
  end

  // ---------------- pre-processing ----------------
  logic frame_done;
  preproc_seg #(.IMG_W(IMG_W), .IMG_H(IMG_H), .PIX_W(PIX_W), .WIN(WIN)) u_pre (
    .clk, .rst_n, .tau, .pix_valid, .pix_sof, .pix, .seg_valid, .seg, .frame_done);

  // ---------------- clustering ----------------
  logic cl_busy;
  clustering #(.MAX_CL(MAX_CL), .MAX_SEG(MAX_SEG), .ROW_SEG(ROW_SEG)) u_clu (
    .clk, .rst_n, .eps_dist, .dens_max, .seg_valid, .seg, .frame_done,
    .cl_valid, .cl, .cl_done, .busy(cl_busy), .overflow(overflow[0]),
    .prim_merges, .imp_merges);

  // ---------------- cluster fusion ----------------
  logic fus_busy;
  cluster_fusion #(.MAX_CLF(MAX_CLF)) u_fus (
    .clk, .rst_n, .eps_fus, .single, .clr(fus_clr),
    .cl_valid(cl_valid && in_img), .cl_bank(img && !single), .cl,
    .start(fus_start), .fu_valid, .fu, .done(fus_done), .busy(fus_busy),
    .overflow(overflow[1]));

  // ---------------- antitracking ----------------
  logic at_busy;
  antitracking #(.CAT_SIZE(CAT_SIZE)) u_at (
    .clk, .rst_n, .att_valid, .q, .focal_px, .y0, .z0, .sin2_thr,
    .cat_we, .cat_addr, .cat_vec, .n_stars,
    .start(fus_start), .in_valid(fu_valid), .in_obj(fu), .in_last(fus_done),
    .out_valid(rso_valid), .out_obj(rso), .done(anti_done), .busy(at_busy),
    .overflow(overflow[2]), .removed(stars_removed));

  // ---------------- cluster growth ----------------
  logic gr_busy;
  cluster_growth #(.MAX_OBJ(MAX_OBJ), .MAX_CAND(MAX_CAND), .MAX_HIST(MAX_HIST)) u_gro (
    .clk, .rst_n, .single, .r_search, .cos2_phi, .n_jump, .dt,
    .in_valid(rso_valid), .in_obj(rso), .couple_end(anti_done),
    .done(grow_done), .busy(gr_busy), .overflow(overflow[3]),
    .obj_sel, .hist_sel, .obj_valid, .obj_active, .obj_couples, .obj_last_y, .obj_last_z,
    .obj_vy, .obj_vz, .hist_couple, .hist_c1y, .hist_c1z, .hist_c2y, .hist_c2z,
    .n_updates, .n_created, .n_closed);

  assign couple_done = grow_done;
  assign busy = cl_busy || fus_busy || at_busy || gr_busy || !in_img;
endmodule
