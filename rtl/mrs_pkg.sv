// mrs_pkg: types, constants and helper functions shared by the Modified
// Resolution Synthesis (MRS) up-scaler.
//
// The scaler turns a 480p (720x480) stream into a 1.5x larger picture using a
// trained, content-adaptive interpolator: for every SD pixel an 8-element
// feature vector of its 3x3 neighbourhood is classified into one of five
// contexts, and the class picks the 5x5 filters that produce up to four HD
// pixels. The numbers below are the design's defaults: the SD format, the
// 1.5 ratio, five classes, two phase steps per axis and a resource sharing
// degree of 4 follow the design description; bit widths of the feature vector
// (9 bits), prototypes and filter coefficients are this implementation's own
// fixed-point choices.
//
// axis_map() implements the coordinate mapping y = floor(z/L) and the phase
// p = floor(Q*(z/L - y)) with exact rational arithmetic (L = LN/LD), so the
// "+epsilon" of a floating-point formulation is not needed. Because L <= 2 and
// Q = 2, every SD index maps to at most one HD index per phase.
package mrs_pkg;

  // ---- picture format and scaling ratio ------------------------------------
  parameter int unsigned SD_W   = 720;   // input active pixels per line
  parameter int unsigned SD_H   = 480;   // input active lines
  parameter int unsigned L_NUM  = 3;     // scaling ratio L = L_NUM / L_DEN
  parameter int unsigned L_DEN  = 2;
  parameter int unsigned QPH    = 2;     // phase quantisation per axis (Q)

  // ---- datapath sizes --------------------------------------------------------
  parameter int unsigned NCLASS    = 5;  // context classes
  parameter int unsigned NFV       = 8;  // feature vector elements
  parameter int unsigned PHI_W     = 9;  // feature vector element width
  parameter int unsigned PHI_FRAC  = 8;  // fractional bits of a feature element
  parameter int unsigned INVS_W    = 8;  // inverse variance width
  parameter int unsigned DIST_W    = 29; // class distance width
  parameter int unsigned COEF_W    = 10; // filter coefficient width (signed)
  parameter int unsigned COEF_FRAC = 8;  // fractional bits of a coefficient
  parameter int unsigned NTAP      = 25; // 5x5 kernel
  parameter int unsigned CLS_W     = 3;  // class index width
  parameter int unsigned SFV_W     = 67; // sum of eight 64-bit squares
  parameter int unsigned COORD_W   = 12; // SD/HD coordinate width

  typedef struct packed {
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } rgb_t;

  typedef struct packed {
    logic [7:0] y;
    logic [7:0] cb;
    logic [7:0] cr;
  } ycbcr_t;

  typedef struct packed {
    logic [7:0] cb;
    logic [7:0] cr;
  } cbcr_t;

  // 5x5 luminance window: [row][col], row 0 = line m-4 ... row 4 = line m,
  // col 0 = column n ... col 4 = column n-4. The centre [2][2] is Y(m-2,n-2).
  typedef logic [4:0][4:0][7:0] win5_t;
  // 3x3 neighbourhood of the centre: [row][col], row 0 = line m-3.
  typedef logic [2:0][2:0][7:0] win3_t;

  // Mapping of one SD coordinate onto the HD axis, indexed by phase.
  typedef struct packed {
    logic [1:0]              keep;   // keep[p]: an HD pixel with phase p exists
    logic [1:0][COORD_W-1:0] z;      // z[p]: its HD coordinate
  } axis_map_t;

  // Per-SD-pixel information that travels with a window through the datapath.
  typedef struct packed {
    axis_map_t vmap;     // vertical mapping of the centre row
    axis_map_t hmap;     // horizontal mapping of the centre column
    logic      row_end;  // last centre of its SD line
    cbcr_t     cbcr;     // chroma of the centre pixel (replicated)
  } token_meta_t;

  function automatic axis_map_t axis_map(input logic [COORD_W-1:0] y);
    axis_map_t   res;
    int unsigned z0, z, ph;
    res = '0;
    z0  = (int'(y) * L_NUM + L_DEN - 1) / L_DEN;    // ceil(y*L)
    for (int k = 0; k < 2; k++) begin
      z = z0 + k;
      if (z * L_DEN < (int'(y) + 1) * L_NUM) begin   // floor(z/L) == y
        ph = (QPH * (z * L_DEN - int'(y) * L_NUM)) / L_NUM;
        res.keep[ph[0]] = 1'b1;
        res.z[ph[0]]    = COORD_W'(z);
      end
    end
    return res;
  endfunction

  // Number of HD pixels along an axis of n SD pixels: ceil(n*L).
  function automatic int unsigned hd_size(input int unsigned n);
    return (n * L_NUM + L_DEN - 1) / L_DEN;
  endfunction

  // First / last HD coordinate written for centres 2 .. n-3.
  function automatic int unsigned hd_first();
    axis_map_t m;
    m = axis_map(COORD_W'(2));
    return m.keep[0] ? int'(m.z[0]) : int'(m.z[1]);
  endfunction

  function automatic int unsigned hd_last(input int unsigned n);
    axis_map_t m;
    m = axis_map(COORD_W'(n - 3));
    return m.keep[1] ? int'(m.z[1]) : int'(m.z[0]);
  endfunction

endpackage
