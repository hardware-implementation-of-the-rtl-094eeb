// cluster_growth: SPOT cluster growth, the on-board database of tracked objects.
//
// The fused objects of one couple of images arrive on `in_valid`/`in_obj`
// (at most MAX_CAND); `couple_end` starts the update. For every active
// tracked object the unit
//   - estimates where the object should appear in the first image of this
//     couple: c~1 = c2(previous couple) + v_avg * dt, where v_avg is the mean
//     of all first-order velocities measured so far and dt the number of image
//     intervals between the two images;
//   - position filter: keeps candidates whose c1 lies in the circular
//     searching area |c1 - c~1| <= r_search;
//   - velocity filter: keeps candidates whose velocity makes an angle phi
//     with v_avg of cos^2(phi) >= cos2_phi (and v . v_avg > 0) and whose speed
//     is within a factor two of |v_avg|; two nearly still velocities
//     (<= 1 px per interval) always agree;
//   - confirmation: among the survivors picks the lowest
//     F = F_dist + F_dens, F_dist = |c1 - c~1| (1-norm, px) and
//     F_dens = |d - d_obj| / d_obj (normalised density difference, d = N/lambda);
//   - updates the object with the chosen candidate (history entry, last
//     position, velocity average) or, if none, counts a missed couple; after
//     more than n_jump missed couples the object is closed and never updated.
// Candidates not used by any object become new objects. With `single` high
// (one image, no fusion) no tracking is done: the database is rebuilt from
// the candidates. One sequential divider serves F_dens and the averages.
// The database is read through `obj_sel` / `hist_sel`; `done` pulses at the
// end of the update.
//
// From the document: the database of objects, their creation, update and
// N_jump rule, the estimate from the average velocity, the circular
// searching area, the direction/magnitude velocity filter and the
// F = F_dist + F_dens minimum criterion. This design's choices: the exact
// forms of F_dist, F_dens and the magnitude test, fixed-point formats,
// database and history sizes (history is a ring of the last MAX_HIST couples).
module cluster_growth
  import spot_pkg::*;
#(
  parameter int unsigned MAX_OBJ  = 16,
  parameter int unsigned MAX_CAND = 16,
  parameter int unsigned MAX_HIST = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        single,
  input  logic [15:0] r_search,       // searching-area radius, Q12.4 px
  input  logic [15:0] cos2_phi,       // cos^2 of the angle threshold, Q0.16
  input  logic [3:0]  n_jump,
  input  logic [3:0]  dt,             // image intervals from c2(i-1) to c1(i)
  input  logic        in_valid,
  input  fused_t      in_obj,
  input  logic        couple_end,
  output logic        done,
  output logic        busy,
  output logic        overflow,
  // database read port
  input  logic [$clog2(MAX_OBJ)-1:0]  obj_sel,
  input  logic [$clog2(MAX_HIST)-1:0] hist_sel,
  output logic        obj_valid,
  output logic        obj_active,
  output logic [15:0] obj_couples,    // couples in which the object was seen
  output pos_t        obj_last_y,     // last position (second image)
  output pos_t        obj_last_z,
  output vel_t        obj_vy,         // average velocity, Q.4 px per interval
  output vel_t        obj_vz,
  output logic [15:0] hist_couple,    // couple index of history entry hist_sel
  output pos_t        hist_c1y,
  output pos_t        hist_c1z,
  output pos_t        hist_c2y,
  output pos_t        hist_c2z,
  // statistics
  output logic [15:0] n_updates,
  output logic [15:0] n_created,
  output logic [15:0] n_closed
);
  localparam int unsigned OW = $clog2(MAX_OBJ);
  localparam int unsigned KW = $clog2(MAX_CAND);
  localparam int unsigned HW = $clog2(MAX_HIST);
  localparam int unsigned SVW = VEL_W + 16;      // velocity sums

  typedef struct packed {
    logic             valid;
    logic             active;
    logic [3:0]       miss;
    logic [15:0]      couples;
    pos_t             ly, lz;
    vel_t             vy, vz;
    logic signed [SVW-1:0] sy, sz;
    logic [CNT_W-1:0] n, lam;
  } obj_t;
  typedef struct packed {
    logic [15:0] couple;
    pos_t c1y, c1z, c2y, c2z;
  } hist_t;

  obj_t   obj  [MAX_OBJ];
  hist_t  hist [MAX_OBJ][MAX_HIST];
  fused_t cand [MAX_CAND];
  logic [KW:0] nc;
  logic [MAX_CAND-1:0] used;
  logic [15:0] couple_idx;

  // ---- read port ----
  always_comb begin
    obj_valid   = obj[obj_sel].valid;
    obj_active  = obj[obj_sel].active;
    obj_couples = obj[obj_sel].couples;
    obj_last_y  = obj[obj_sel].ly;
    obj_last_z  = obj[obj_sel].lz;
    obj_vy      = obj[obj_sel].vy;
    obj_vz      = obj[obj_sel].vz;
    hist_couple = hist[obj_sel][hist_sel].couple;
    hist_c1y    = hist[obj_sel][hist_sel].c1y;
    hist_c1z    = hist[obj_sel][hist_sel].c1z;
    hist_c2y    = hist[obj_sel][hist_sel].c2y;
    hist_c2z    = hist[obj_sel][hist_sel].c2z;
  end

  // ---- divider ----
  logic        dv_start, dv_busy, dv_done;
  logic [39:0] dv_a, dv_b, dv_q, dv_r;
  seq_divider #(.W(40)) u_div (.clk, .rst_n, .start(dv_start), .dividend(dv_a), .divisor(dv_b),
    .busy(dv_busy), .done(dv_done), .quotient(dv_q), .remainder(dv_r));

  typedef enum logic [3:0] {G_COLLECT, G_OBJ, G_EST, G_CAND, G_FDIV, G_UPD, G_VY, G_VZ,
                            G_NEW, G_DONE} gstate_t;
  gstate_t st;
  logic [OW:0] o;
  logic [KW:0] k;
  obj_t   cur;
  fused_t ck;
  assign cur = obj[o[OW-1:0]];
  assign ck  = cand[k[KW-1:0]];

  // ---- filters for (object o, candidate k) ----
  logic signed [VEL_W+1:0] ey, ez;           // estimate c~1, Q.4
  logic signed [VEL_W+1:0] dy, dz;
  logic [2*VEL_W+5:0] d2, r2;
  logic signed [2*VEL_W+2:0] dotv;
  logic [2*VEL_W+2:0] v2, vb2;
  logic [4*VEL_W+21:0] lhs, rhs;
  logic pos_ok, vel_ok, cand_ok;
  logic [VEL_W+2:0] fdist;
  logic [2*CNT_W-1:0] nk_lo, no_lk, ddiff;
  always_comb begin
    dy = signed'((VEL_W+2)'({1'b0, ck.c1y})) - ey;
    dz = signed'((VEL_W+2)'({1'b0, ck.c1z})) - ez;
    d2 = (2*VEL_W+6)'(dy * dy) + (2*VEL_W+6)'(dz * dz);
    r2 = (2*VEL_W+6)'(r_search) * (2*VEL_W+6)'(r_search);
    pos_ok = (d2 <= r2);
    dotv = (2*VEL_W+3)'(ck.vy * cur.vy) + (2*VEL_W+3)'(ck.vz * cur.vz);
    v2   = (2*VEL_W+3)'(ck.vy * ck.vy) + (2*VEL_W+3)'(ck.vz * ck.vz);
    vb2  = (2*VEL_W+3)'(cur.vy * cur.vy) + (2*VEL_W+3)'(cur.vz * cur.vz);
    lhs  = (4*VEL_W+22)'(dotv * dotv) << 16;
    rhs  = (4*VEL_W+22)'(v2) * (4*VEL_W+22)'(vb2) * (4*VEL_W+22)'(cos2_phi);
    if (v2 <= 256 && vb2 <= 256)
      vel_ok = 1'b1;
    else
      vel_ok = (dotv > 0) && (lhs >= rhs) && (v2 <= (vb2 << 2)) && (vb2 <= (v2 << 2));
    cand_ok = !used[k[KW-1:0]] && pos_ok && vel_ok;
    fdist = (VEL_W+3)'(dy < 0 ? -dy : dy) + (VEL_W+3)'(dz < 0 ? -dz : dz);
    nk_lo = (2*CNT_W)'(ck.n) * (2*CNT_W)'(cur.lam);
    no_lk = (2*CNT_W)'(cur.n) * (2*CNT_W)'(ck.lam);
    ddiff = (nk_lo > no_lk) ? nk_lo - no_lk : no_lk - nk_lo;
  end

  logic have_best;
  logic [KW-1:0] best;
  logic [39:0] best_f;
  logic [OW:0] free_slot;
  logic        has_free;
  always_comb begin
    has_free = 1'b0; free_slot = '0;
    for (int i = MAX_OBJ-1; i >= 0; i--)
      if (!obj[i].valid) begin has_free = 1'b1; free_slot = (OW+1)'(i); end
  end
  fused_t bc;
  assign bc = cand[best];

  function automatic vel_t sdiv_fix(logic neg, logic [39:0] qv);
    return neg ? -vel_t'(qv) : vel_t'(qv);
  endfunction
  logic neg_y, neg_z;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= G_COLLECT; nc <= '0; used <= '0; couple_idx <= '0; o <= '0; k <= '0;
      done <= 1'b0; overflow <= 1'b0; have_best <= 1'b0; best <= '0; best_f <= '0;
      ey <= '0; ez <= '0; dv_start <= 1'b0; dv_a <= '0; dv_b <= '0; neg_y <= 1'b0; neg_z <= 1'b0;
      n_updates <= '0; n_created <= '0; n_closed <= '0;
      for (int i = 0; i < MAX_OBJ; i++) obj[i] <= '0;
    end else begin
      done <= 1'b0; dv_start <= 1'b0;
      unique case (st)
        G_COLLECT: begin
          if (in_valid) begin
            if (nc < (KW+1)'(MAX_CAND)) begin cand[nc[KW-1:0]] <= in_obj; nc <= nc + 1'b1; end
            else overflow <= 1'b1;
          end
          if (couple_end) begin
            used <= '0; o <= '0; k <= '0;
            if (single) begin
              for (int i = 0; i < MAX_OBJ; i++) obj[i].valid <= 1'b0;
              st <= G_NEW;
            end else st <= G_OBJ;
          end
        end
        G_OBJ: begin
          if (o >= (OW+1)'(MAX_OBJ)) begin
            st <= G_NEW; k <= '0;
          end else if (!cur.valid || !cur.active) begin
            o <= o + 1'b1;
          end else st <= G_EST;
        end
        G_EST: begin
          ey <= signed'((VEL_W+2)'({1'b0, cur.ly})) + (VEL_W+2)'(cur.vy * signed'({1'b0, dt}));
          ez <= signed'((VEL_W+2)'({1'b0, cur.lz})) + (VEL_W+2)'(cur.vz * signed'({1'b0, dt}));
          k <= '0; have_best <= 1'b0;
          st <= G_CAND;
        end
        G_CAND: begin
          if (k >= nc) st <= G_UPD;
          else if (cand_ok) begin
            dv_a <= 40'(ddiff) << FRAC;
            dv_b <= 40'(no_lk);
            dv_start <= 1'b1;
            st <= G_FDIV;
          end else k <= k + 1'b1;
        end
        G_FDIV: if (dv_done) begin
          if (!have_best || (40'(fdist) + dv_q) < best_f) begin
            have_best <= 1'b1; best <= k[KW-1:0]; best_f <= 40'(fdist) + dv_q;
          end
          k <= k + 1'b1;
          st <= G_CAND;
        end
        G_UPD: begin
          if (have_best) begin
            automatic logic signed [SVW-1:0] nsy = cur.sy + SVW'(bc.vy);
            automatic logic signed [SVW-1:0] nsz = cur.sz + SVW'(bc.vz);
            automatic logic [HW-1:0] hw = cur.couples[HW-1:0];
            obj[o[OW-1:0]].miss    <= '0;
            obj[o[OW-1:0]].couples <= cur.couples + 1'b1;
            obj[o[OW-1:0]].ly      <= bc.c2y;
            obj[o[OW-1:0]].lz      <= bc.c2z;
            obj[o[OW-1:0]].sy      <= nsy;
            obj[o[OW-1:0]].sz      <= nsz;
            obj[o[OW-1:0]].n       <= bc.n;
            obj[o[OW-1:0]].lam     <= bc.lam;
            hist[o[OW-1:0]][hw]    <= '{couple: couple_idx, c1y: bc.c1y, c1z: bc.c1z,
                                        c2y: bc.c2y, c2z: bc.c2z};
            used[best] <= 1'b1;
            n_updates <= n_updates + 1'b1;
            // average velocity = sum / number of measurements (sign-magnitude)
            neg_y <= nsy < 0; neg_z <= nsz < 0;
            dv_a  <= 40'(unsigned'(nsy < 0 ? SVW'(-nsy) : nsy));
            dv_b  <= 40'(cur.couples + 1'b1);
            dv_start <= 1'b1;
            st <= G_VY;
          end else begin
            if (cur.miss >= n_jump) begin
              obj[o[OW-1:0]].active <= 1'b0;
              n_closed <= n_closed + 1'b1;
            end else obj[o[OW-1:0]].miss <= cur.miss + 1'b1;
            o <= o + 1'b1;
            st <= G_OBJ;
          end
        end
        G_VY: if (dv_done) begin
          obj[o[OW-1:0]].vy <= sdiv_fix(neg_y, dv_q);
          dv_a  <= 40'(unsigned'(cur.sz < 0 ? SVW'(-cur.sz) : cur.sz));
          dv_b  <= 40'(cur.couples);
          dv_start <= 1'b1;
          st <= G_VZ;
        end
        G_VZ: if (dv_done) begin
          obj[o[OW-1:0]].vz <= sdiv_fix(neg_z, dv_q);
          o <= o + 1'b1;
          st <= G_OBJ;
        end
        G_NEW: begin
          if (k >= nc) st <= G_DONE;
          else begin
            if (!used[k[KW-1:0]]) begin
              if (has_free) begin
                obj[free_slot[OW-1:0]] <= '{valid: 1'b1, active: 1'b1, miss: '0, couples: 16'd1,
                    ly: ck.c2y, lz: ck.c2z, vy: ck.vy, vz: ck.vz,
                    sy: SVW'(ck.vy), sz: SVW'(ck.vz), n: ck.n, lam: ck.lam};
                hist[free_slot[OW-1:0]][0] <= '{couple: couple_idx, c1y: ck.c1y, c1z: ck.c1z,
                    c2y: ck.c2y, c2z: ck.c2z};
                n_created <= n_created + 1'b1;
              end else overflow <= 1'b1;
            end
            k <= k + 1'b1;
          end
        end
        G_DONE: begin
          done <= 1'b1; nc <= '0; couple_idx <= couple_idx + 1'b1;
          st <= G_COLLECT;
        end
        default: st <= G_COLLECT;
      endcase
    end
  end
  assign busy = (st != G_COLLECT);
endmodule
