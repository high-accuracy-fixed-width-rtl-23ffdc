// iht_engine: bit-parallel iterative incremental Hough transform (IHT)
// processor for one feature point at a time.
//
// For a feature point (x, y) the radius of the line through it at angle
// n*eps (eps = pi/K) is r_n = x cos(n eps) + y sin(n eps). Using
// cos(eps) ~ 1 and sin(eps) ~ eps, two radii a quarter turn apart advance
// together without any trigonometry:
//     r_{n+1}     = r_n     + eps * r_{K/2+n}
//     r_{K/2+n+1} = r_{K/2+n} - eps * r_n,    r_0 = x, r_{K/2} = y.
// The two registers ra (r_n) and rb (r_{K/2+n}) are updated once per cycle
// through two adder/subtractor cells; eps * r is formed by shifting and
// adding r at the set bit positions of the fixed-point constant eps, so no
// multiplier is used. Each cycle yields two votes, one for angle n and one
// for angle K/2+n, so a point takes K/2 cycles.
//
// Interface: a point is accepted with in_valid && in_ready. in_ready is high
// when idle and in the last iteration of the current point, so points stream
// back to back with no bubble. The outputs are valid for K/2 consecutive
// cycles after acceptance (the first in the cycle after); out_rho_lo and
// out_rho_hi are round(r) + RHO_OFF for angles out_n and K/2 + out_n.
// There is no output back-pressure: the vote accumulator takes one vote pair
// every cycle. The recurrence follows the design; the fixed-point format,
// the round-half-up rounding, the index offset and the handshake are this
// implementation's choices. The small-angle approximation makes |r| grow by
// the factor sqrt(1 + eps^2) per step (about 1.4 % over a half turn for
// K = 180); that error belongs to the algorithm and is kept.
module iht_engine
  import hough_pkg::*;
#(
  parameter int unsigned KA      = hough_pkg::K,
  parameter int unsigned XW      = hough_pkg::X_W,
  parameter int unsigned YW      = hough_pkg::Y_W,
  parameter int unsigned FB      = hough_pkg::FRAC,
  parameter int unsigned RW      = hough_pkg::R_W,
  parameter int unsigned RHOW    = hough_pkg::RHO_W,
  parameter int unsigned RHOOFF  = hough_pkg::RHO_OFF
) (
  input  logic             clk,
  input  logic             rst_n,
  // feature point in
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [XW-1:0]    in_x,
  input  logic [YW-1:0]    in_y,
  // vote pair out
  output logic             out_valid,
  output logic             out_last,     // last pair of this point
  output logic [7:0]       out_n,        // angle index n, 0 .. KA/2-1
  output logic [RHOW-1:0]  out_rho_lo,   // radius index for angle n
  output logic [RHOW-1:0]  out_rho_hi    // radius index for angle KA/2 + n
);
  localparam int unsigned HALF = KA / 2;
  localparam longint unsigned EPS = eps_fixed(KA, FB);
  localparam int unsigned EPS_BITS = FB;  // eps < 1, so it fits in FB bits

  logic signed [RW-1:0] ra, rb;
  logic [7:0]           n;
  logic                 busy;
  logic signed [RW-1:0] eps_rb, eps_ra;
  logic [RW-1:0]        ra_next, rb_next;

  // eps * r by shift-and-add over the set bits of eps, then scaled back
  // to the radius format (arithmetic shift, i.e. rounding toward -inf).
  function automatic logic signed [RW-1:0] mul_eps(input logic signed [RW-1:0] r);
    logic signed [RW+EPS_BITS-1:0] acc;
    acc = '0;
    for (int j = 0; j < EPS_BITS; j++)
      if (EPS[j]) acc = acc + ((RW+EPS_BITS)'(r) <<< j);
    return RW'(acc >>> FB);
  endfunction

  // round(r) = floor(r + 1/2), as a signed integer.
  function automatic logic signed [RW-1:0] round_r(input logic signed [RW-1:0] r);
    return (r + $signed(RW'(longint'(1) << (FB - 1)))) >>> FB;
  endfunction

  logic signed [RW-1:0] rnd_lo, rnd_hi;

  always_comb begin
    eps_rb = mul_eps(rb);
    eps_ra = mul_eps(ra);
    rnd_lo = round_r(ra);
    rnd_hi = round_r(rb);
  end

  addsub #(.N(RW)) u_as_lo (.a(ra), .b(eps_rb), .sub(1'b0), .s(ra_next));
  addsub #(.N(RW)) u_as_hi (.a(rb), .b(eps_ra), .sub(1'b1), .s(rb_next));

  assign out_last = busy && (n == 8'(HALF - 1));
  assign in_ready = !busy || out_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      n    <= '0;
      ra   <= '0;
      rb   <= '0;
    end else if (in_valid && in_ready) begin
      busy <= 1'b1;
      n    <= '0;
      ra   <= RW'(in_x) <<< FB;
      rb   <= RW'(in_y) <<< FB;
    end else if (busy) begin
      busy <= !out_last;
      n    <= n + 8'd1;
      ra   <= ra_next;
      rb   <= rb_next;
    end
  end

  assign out_valid  = busy;
  assign out_n      = n;
  assign out_rho_lo = RHOW'(rnd_lo + $signed(RW'(RHOOFF)));
  assign out_rho_hi = RHOW'(rnd_hi + $signed(RW'(RHOOFF)));

  // The rounded radius must land inside the vote memory.
  localparam longint RMIN = -longint'(RHOOFF);
  localparam longint RMAX = (longint'(1) << RHOW) - longint'(RHOOFF) - 1;
  always_ff @(posedge clk) begin
    if (rst_n && busy) begin
      a_lo_range: assert (longint'(rnd_lo) >= RMIN && longint'(rnd_lo) <= RMAX)
        else $error("radius %0d for angle %0d outside the vote memory", rnd_lo, n);
      a_hi_range: assert (longint'(rnd_hi) >= RMIN && longint'(rnd_hi) <= RMAX)
        else $error("radius %0d for angle %0d outside the vote memory", rnd_hi, n + 8'(HALF));
    end
  end

  initial begin
    assert (KA % 2 == 0 && KA / 2 <= 256) else $error("KA must be even and at most 512");
  end
endmodule
