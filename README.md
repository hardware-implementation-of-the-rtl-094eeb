# SPOT: detecting orbiting objects in star-sensor images, in SystemVerilog

A star sensor photographs the sky to find its attitude. The same images also
show resident space objects: satellites and debris crossing the field of view
as short, often broken, streaks. SPOT is an on-board processing chain that
pulls those objects out of the image stream. It finds the bright pixels,
groups them into objects, pairs up the objects of two consecutive images,
throws away the catalogued stars when the attitude is known, and keeps a
small database of tracked objects. For each one the database holds its
position in every couple of images and its average velocity. This
repository is synthesizable RTL for that chain, from the pixel stream to the
object database.

```
pixels ─► preproc_seg ─► clustering ─► cluster_fusion ─► antitracking ─► cluster_growth ─► database
         (segments)    (clusters,    (objects seen in   (stars removed   (tracked objects,
                        centroids)    both images)       if attitude)     history, velocity)
                                        ▲ skipped for                ▲ bypassed without
                                          a single image               attitude
          spot_ctrl ×3 + tmr_voter: sequencer with triple-modular-redundant state
```

## Conventions

* A pixel is `p = [p_y, p_z]`, where `y` is the image column and `z` the row.
  Pixels arrive in raster order.
* Pixel coordinates are 11-bit integers, so images of up to 2048 × 2048 work.
  Centroids, positions and velocities are fixed point with 4 fractional bits
  (Q.4, 1/16 px). A centroid of 345.5 px is therefore 5528.
* The shared types are in `rtl/spot_pkg.sv`:
  * `segment_t`: one run of over-threshold pixels in a row;
  * `clrec_t`: a cluster record while the cluster is being built;
  * `cluster_t`: a finished cluster with its centroid and bounding box;
  * `fused_t`: an object seen in both images, with centroids `c1`, `c2` and
    velocity `v = c2 − c1`.
* The *virtual length* λ of a cluster is its longest bounding-box side. Its
  *density* is `d = N / λ`, where N is the pixel count. Thin streak fragments
  have d ≈ 1; compact star images have d ≥ 2.
* Every unit uses one clock and an asynchronous active-low reset.

## Segmentation (`preproc_seg`)

The background at each pixel is the mean of the 16 pixels before it in the
stream (`WIN`, a sliding sum). A pixel whose value exceeds background + `tau`
opens a *segment*. At that moment the background is latched as `BKG_l`. The
segment goes on while pixels exceed `BKG_l + tau`, and it ends at the first
pixel that does not, or at the end of the row. While it is open the unit
adds up four things: the pixel values, their columns, column × value, and
the length. Two registered stages then form:

* the energy `E = Σpixel − BKG_l·length`;
* the column-weighted energy `EY = Σ(y·pixel) − BKG_l·Σy`.

A segment comes out 3 clocks after the pixel that closes it. `frame_done`
pulses one clock after the last segment of the image. Only segments leave
the unit, not a pixel mask, so the data shrinks from about 600 k pixels to a
few hundred records.

## Clustering (`clustering`): the hardest part

This unit turns segments into objects. It works in three phases per image.
Its input FIFO lets segments keep arriving while a phase takes several
clocks.

**1. Primitive clustering (while the image streams in).** Two segments of
adjacent rows belong together when they share an edge or a corner. In
hardware terms, their column ranges overlap once one of them is widened by
one pixel. The unit keeps the segments of the previous row and of the
current row in two small buffers. It compares each new segment with all
previous-row segments in parallel:

* If the segment touches nothing, it opens a new cluster record.
* If it touches one cluster, it is added to that record.
* If it touches several clusters (a "U" whose arms meet), they are merged,
  one merge per clock, before the segment joins them.

A merge does not rewrite the stored segments. An alias table `alias_q[id]`
always names the surviving record, and a merge from `src` to `dst` rewrites
every alias entry equal to `src` in the same clock. Lookups are therefore
always one level deep, with no union-find chains. Every segment is also
written, with the cluster id it had when written, into a segment memory.

**2. Improved clustering (after the last segment).** A fast object moves
during the exposure and leaves a streak broken into pieces. The unit visits
all pairs of stored segments, one pair per clock. Segments are stored in row
order, so the inner loop stops as soon as the row gap exceeds `eps_dist`.
Two different clusters are merged only if they pass three filters:

* **minimum distance:** the Chebyshev (uniform-norm) distance between the two
  segments is ≤ `eps_dist`. Taken over all segment pairs, this is the exact
  pixel-to-pixel minimum distance;
* **increasing length:** the merged cluster is longer (λ) than either part;
* **density:** both parts are thin, `d ≤ dens_max`, because compact clusters
  are stars, not fragments.

Clusters of a single pixel take no part (they are noise) and never come out.
Merges use the same alias mechanism, so the filters always see the records
of the merged clusters.

**3. Centroids.** Each surviving cluster of two or more pixels gets its
energy-weighted centroid `c = Σ E·p / Σ E`. A shared 1-bit-per-clock divider
computes it in Q.4 and truncates it. The cluster is then sent out on
`cl_valid`/`cl`. `cl_done` pulses after the last cluster, and the tables are
cleared for the next image.

Time per image:

* phase 1: about one clock per segment, plus one per merge;
* phase 2: pairs within the row window, one clock per pair;
* phase 3: about 2 × 45 clocks per cluster.

## Cluster fusion (`cluster_fusion`)

The clusters of the first and second image of a couple go into two banks.
For each first-image cluster, the unit scans all unused second-image
clusters, one per clock. It keeps the nearest one that passes two filters:

* the gap between the two bounding boxes is ≤ `eps_fus`;
* the two densities are within a factor of two, checked by
  cross-multiplication.

Each match comes out as a `fused_t` with velocity `c2 − c1` in px per image
interval. Clusters without a partner are dropped, which removes flashes and
noise. With `single` high the fusion is skipped: each cluster comes out as
its own partner, with zero velocity.

## Antitracking (`antitracking`)

The goal is to decide whether an object is a catalogued star. Using the
centroid `c2` and a pinhole camera model, the unit forms the camera-frame
direction `v_c = [f, c_y − y0, c_z − z0]`, with the boresight along x. The
attitude matrix A(q) is built once per couple from the quaternion
`q = [q1 q2 q3 q4]` (q4 is the scalar part, Q1.14). The inertial direction is
then `v_i = A(q)ᵀ v_c`.

Next, v_i is compared with each catalogue unit vector s, one star per clock.
The object is a star when `v_i·s > 0` and `|v_i × s|² ≤ sin²θ · |v_i|²`.
This test needs no square root and no division. `sin²θ` is given in Q0.32,
because thresholds of a fraction of a degree need that resolution. Stars are
dropped and everything else goes on.

With `att_valid` low the unit passes every object through unchanged. The
catalogue (1024 entries by default) is loaded by the host through `cat_we`.

## Cluster growth (`cluster_growth`)

The database holds up to 16 objects. For each object it keeps the last
position, the sum and the average of its measured velocities, its density,
a miss counter, and a ring of the last 8 couples (c1, c2 and the couple
index). For each active object and each new candidate, the unit applies:

* **Estimate:** `c̃1 = c2(previous couple) + v_avg · dt`.
* **Position filter:** `|c1 − c̃1| ≤ r_search` (the circular searching area).
* **Velocity filter:** the angle between the candidate's velocity and
  `v_avg` must have `cos²φ ≥ cos2_phi` and a positive dot product, and the
  two speeds must be within a factor of two. Two velocities of ≤ 1 px per
  interval always agree, so still stars can be tracked.
* **Confirmation:** of the survivors, the one with the lowest `F = F_dist +
  F_dens` wins. `F_dist = |c1 − c̃1|₁` is in px and
  `F_dens = |d − d_obj| / d_obj`; both are Q.4 and weigh the same.

What happens next:

* The winner updates the object: a history entry is written and `v_avg` is
  re-averaged with the shared divider.
* An object with no winner counts a miss. After more than `n_jump` misses it
  is closed and never updated again.
* Candidates that no object took become new objects.

With `single` high no tracking is done and the database is rebuilt from the
candidates. The database is read through `obj_sel` / `hist_sel`.

## Sequencer and radiation hardening (`spot_ctrl`, `tmr_voter`)

The sequencer walks through the phases:

1. first image;
2. second image;
3. fusion;
4. antitracking;
5. growth;
6. back to 1.

A single image goes straight from step 1 to fusion. The sequencer state is
held in three copies. A bitwise 2-of-3 voter combines them, and its output
is fed back as the state every copy steps from. A copy hit by an upset
therefore rejoins the other two on the next clock, while the voted state
never changes. The top level counts disagreements in `tmr_errors`, records in `tmr_copy_err`
which copies disagreed, and the
`seu_inject` input flips a copy for testing.

## Top level (`spot_top`)

Everything is wired as in the diagram above. Configuration, the attitude and
the catalogue come in as plain ports, since they are the host processor's
job. The intermediate streams (segments, clusters, fused objects, objects
kept by antitracking) are brought out for observation.

Two timing limits apply:

* Images must be spaced so that one image's clusters are out before the next
  image ends. The real sensor exposes for seconds, so this is easy to meet.
  An image whose clusters arrive while a couple is still being processed is
  counted in `frame_dropped`.
* Every unit flags lost data (a full FIFO or table) on `overflow`.

Defaults:

| parameter | default | meaning |
|---|---|---|
| `IMG_W` × `IMG_H` | 960 × 640 | image size |
| `PIX_W` | 8 | pixel depth |
| `WIN` | 16 | background window |
| `MAX_CL` | 256 | clusters per image |
| `MAX_SEG` | 1024 | segments per image |
| `ROW_SEG` | 32 | segments per row |
| `MAX_CLF` | 64 | clusters per fusion bank |
| `CAT_SIZE` | 1024 | catalogue entries |
| `MAX_OBJ` | 16 | tracked objects |
| `MAX_CAND` | 16 | candidates per couple |
| `MAX_HIST` | 8 | history entries per object |

## What is from the SPOT description and what is not

**Follows the original architecture:**

* the chain and its two bypasses (single image, no attitude);
* segmentation against a local-mean background plus a threshold, with the
  background latched at segment start and the latch/multiply/subtract
  pipeline;
* corner-sharing primitive clusters, discarding single pixels;
* the three named improved-clustering filters and the energy-weighted
  centroid;
* fusion by distance and density, with unmatched clusters dropped;
* the four antitracking steps;
* the growth estimate, searching area, velocity filter, `F = F_dist + F_dens`
  and the `N_jump` rule;
* triple-modular redundancy with a voter and state resynchronisation.

**This design's own choices**, where the description names a rule without
giving it:

* the background window shape and size;
* the exact increasing-length, density, velocity-magnitude and
  `F_dist`/`F_dens` formulas;
* λ = longest bounding-box side;
* fusion distance on bounding boxes;
* the camera model and quaternion convention (scalar last);
* all fixed-point formats and table sizes;
* the serial schedules;
* the choice of the sequencer as the triplicated unit;
* the hardware sequencer itself (the original plans the control on the
  processor).

**One point where the description contradicts itself:** one passage says to
remove centroids *farther* than the threshold from catalogued stars. Its own
test, however, removes the objects that are stars. This design removes the
centroids that lie within the threshold of a star.

**Not included:**

* the ARM processing system and its AXI links;
* the vendor's configuration-memory scrubbing core;
* the hardware-in-the-loop test set-up.

## Simulating

Each unit has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. For example:

```
verilator --binary --timing -Wno-fatal --top-module tb_spot_top -y rtl -y tb +libext+.sv \
          rtl/spot_pkg.sv tb/tb_spot_top.sv && ./obj_dir/Vtb_spot_top
```

| testbench | what it exercises |
|---|---|
| `tb_preproc_seg` | random frames against a behavioural model, 3-clock latency |
| `tb_clustering` | stars, a broken streak, a U shape, the length filter, single pixels, exact centroids |
| `tb_cluster_fusion` | matches, unmatched objects, density mismatch, single-image mode |
| `tb_antitracking` | attitude q = [−0.526829 0.222090 −0.342451 −0.745556] and five centroids, of which four are stars and only (345.5, 399.0) survives; also the bypass and a wrong attitude |
| `tb_cluster_growth` | a satellite pass over six images (three couples), a still star, `N_jump` closing, creation, single mode |
| `tb_tmr_voter`, `tb_spot_ctrl` | voting, fault flags, phase sequence, upset recovery |
| `tb_spot_top` | 64 × 48 sky, three couples plus one single image; every mechanism above is counted and must occur |
| `tb_spot_top_full` | one couple of 960 × 640 images at the default parameters (a few seconds of simulation) |

All testbenches pass. Each was also run against a deliberately broken copy
of its unit and caught the fault. Nothing has been run on an FPGA, and
synthesis has only been checked at the coarse level. The wide register
tables of `clustering` (256 records, parallel alias rewrite) take a
synthesis tool a long time.
