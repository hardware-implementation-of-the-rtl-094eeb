// spot_pkg: types and constants shared by the SPOT detection chain.
//
// Coordinates follow the convention p = [p_y, p_z]: y is the image column,
// z the image row. Pixel coordinates are integers; centroids, velocities and
// positions derived from them are unsigned/signed fixed point with FRAC
// fractional bits (Q.4), i.e. 1/16 px resolution, finer than the one-decimal
// rounding used for the tracked centroids. Field widths are sized for images
// of up to 2048 x 2048 pixels and 8..12-bit pixels; they are this design's
// choice, the document gives none.
package spot_pkg;

  localparam int unsigned COORD_W = 11;   // integer pixel coordinate (0..2047)
  localparam int unsigned FRAC    = 4;    // fractional bits of centroids
  localparam int unsigned POS_W   = COORD_W + FRAC;   // unsigned Q11.4 position
  localparam int unsigned VEL_W   = POS_W + 1;        // signed Q11.4 velocity
  localparam int unsigned CNT_W   = 16;   // pixel count of a cluster
  localparam int unsigned ENE_W   = 28;   // energy sum (pixel - background)
  localparam int unsigned WEN_W   = ENE_W + COORD_W;  // energy x coordinate sum

  typedef logic [COORD_W-1:0] coord_t;
  typedef logic [POS_W-1:0]   pos_t;
  typedef logic signed [VEL_W-1:0] vel_t;

  // One run of consecutive over-threshold pixels in an image row.
  typedef struct packed {
    coord_t              row;     // z
    coord_t              col_s;   // first column (y)
    coord_t              col_e;   // last column (y)
    logic [ENE_W-1:0]    e;       // sum of (pixel - background)
    logic [WEN_W-1:0]    ey;      // sum of y * (pixel - background)
  } segment_t;

  // Accumulated record of one cluster while it is being built.
  typedef struct packed {
    logic                valid;
    logic [CNT_W-1:0]    n;
    logic [ENE_W-1:0]    e;
    logic [WEN_W-1:0]    ey;
    logic [WEN_W-1:0]    ez;
    coord_t              ymin;
    coord_t              ymax;
    coord_t              zmin;
    coord_t              zmax;
  } clrec_t;

  // Finished cluster: energy-weighted centroid and shape.
  typedef struct packed {
    pos_t                cy;
    pos_t                cz;
    logic [ENE_W-1:0]    e;
    logic [CNT_W-1:0]    n;
    coord_t              ymin;
    coord_t              ymax;
    coord_t              zmin;
    coord_t              zmax;
  } cluster_t;

  // Object seen in both images of a couple (output of the cluster fusion).
  typedef struct packed {
    pos_t                c1y;     // centroid in the first image
    pos_t                c1z;
    pos_t                c2y;     // centroid in the second image
    pos_t                c2z;
    vel_t                vy;      // c2 - c1, px per image interval
    vel_t                vz;
    logic [CNT_W-1:0]    n;       // pixels of both parts
    logic [CNT_W-1:0]    lam;     // virtual length: longest bounding-box side, both parts
  } fused_t;

  // Virtual length lambda of a cluster: its longest projection (in pixels).
  function automatic logic [CNT_W-1:0] virt_len(coord_t ymin, coord_t ymax,
                                                coord_t zmin, coord_t zmax);
    logic [CNT_W-1:0] ly, lz;
    ly = CNT_W'(ymax - ymin) + 1'b1;
    lz = CNT_W'(zmax - zmin) + 1'b1;
    return (ly > lz) ? ly : lz;
  endfunction

  // Chebyshev (uniform-norm) gap between two closed integer intervals:
  // 0 when they overlap, otherwise the coordinate difference of the nearest ends.
  function automatic coord_t gap1d(coord_t a0, coord_t a1, coord_t b0, coord_t b1);
    if (b0 > a1) return b0 - a1;
    else if (a0 > b1) return a0 - b1;
    else return '0;
  endfunction

endpackage
