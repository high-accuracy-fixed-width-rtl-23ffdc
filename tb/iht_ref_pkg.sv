// iht_ref_pkg: reference model of the incremental Hough transform used by
// the Hough testbenches. It applies the recurrence
//   r_{n+1} = r_n + floor(eps * r_{K/2+n}),  r_{K/2+n+1} = r_{K/2+n} - floor(eps * r_n)
// with integer arithmetic on radii scaled by 2^16 and eps = round(pi/180 * 2^16),
// and gives the vote-memory index round(r) + 512 of every angle.
package iht_ref_pkg;
  localparam int K    = 180;
  localparam int HALF = K / 2;
  localparam int FB   = 16;
  localparam longint EPS = 1144;   // round(pi / 180 * 65536)
  localparam int OFF  = 512;

  // floor division by 2^FB of a signed value
  function automatic longint fdiv(longint v);
    return v >>> FB;
  endfunction

  // Fills idx[0..K-1] with the radius index of (x, y) for every angle.
  task automatic votes_of(input int x, input int y, output int idx [K]);
    longint ra, rb, na, nb;
    ra = longint'(x) <<< FB;
    rb = longint'(y) <<< FB;
    for (int n = 0; n < HALF; n++) begin
      idx[n]        = int'(fdiv(ra + (longint'(1) <<< (FB - 1)))) + OFF;
      idx[HALF + n] = int'(fdiv(rb + (longint'(1) <<< (FB - 1)))) + OFF;
      na = ra + fdiv(rb * EPS);
      nb = rb - fdiv(ra * EPS);
      ra = na;
      rb = nb;
    end
  endtask
endpackage
