// hough_pkg: constants and small types shared by the incremental Hough
// transform (IHT) voting engine.
//
// The angle axis [0, 180) degrees is split into K = 180 steps of
// eps = pi/K, and the image is CIF (352 x 288), as in the design's target
// workload. The radius r is carried in signed fixed point with FRAC
// fraction bits; eps is rounded to that grid. The vote memory is indexed by
// the rounded radius plus RHO_OFF so that negative radii (which occur for
// angles above 90 degrees) get non-negative addresses. FRAC, RHO_OFF and
// VOTE_W are this implementation's choices.
package hough_pkg;
  localparam int unsigned K       = 180;  // angle steps over 180 degrees
  localparam int unsigned IMG_W   = 352;  // CIF width
  localparam int unsigned IMG_H   = 288;  // CIF height
  localparam int unsigned X_W     = 9;    // bits of an x coordinate
  localparam int unsigned Y_W     = 9;    // bits of a y coordinate
  localparam int unsigned FRAC    = 16;   // fraction bits of r
  localparam int unsigned R_W     = 28;   // total bits of r (signed)
  localparam int unsigned RHO_W   = 10;   // bits of a vote-memory radius index
  localparam int unsigned RHO_OFF = 512;  // radius index = round(r) + RHO_OFF
  localparam int unsigned VOTE_W  = 17;   // vote counter bits (holds 352*288)
  localparam int unsigned RUN_W   = 10;   // bits of a run length (up to IMG_W)

  // eps = pi/K as an unsigned fixed-point number with `frac` fraction bits,
  // rounded to nearest.
  function automatic longint unsigned eps_fixed(int unsigned k, int unsigned frac);
    real e;
    e = 3.14159265358979323846 / real'(k);
    return longint'(e * (2.0 ** frac) + 0.5);
  endfunction

  // One run of equal pixels inside an image line.
  typedef struct packed {
    logic             value;  // pixel value of the run
    logic [RUN_W-1:0] len;    // run length, 1..IMG_W
    logic             eol;    // run ends its image line
  } run_t;
endpackage
