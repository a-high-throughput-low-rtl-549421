// se_next: one step of Schnorr-Euchner (SE) enumeration along one axis.
//
// The points already visited on one axis of the constellation always form a
// contiguous run of odd coordinates [lo, hi] around the slice of the centre
// x. The next nearest point is therefore lo-2 or hi+2, whichever is inside
// the constellation and closer to x (a tie goes to lo-2). When neither is
// inside, the axis is exhausted and nxt_valid is low. Combinational.
//
// x is signed with FRAC fractional bits; lo, hi and nxt are integers.
//
// SE enumeration is named in the algorithm; this run-based form of it,
// and the tie rule, are this design's own.
module se_next #(
  parameter int XW     = 24,
  parameter int SW     = 4,
  parameter int FRAC   = 10,
  parameter int SQRT_M = 8
) (
  input  logic signed [XW-1:0] x,
  input  logic signed [SW-1:0] lo,
  input  logic signed [SW-1:0] hi,
  output logic                 nxt_valid,
  output logic signed [SW-1:0] nxt,
  output logic signed [SW-1:0] nxt_lo,
  output logic signed [SW-1:0] nxt_hi
);
  localparam int MAXC = SQRT_M - 1;
  localparam int DWID = XW + 2;

  logic                   lo_ok, hi_ok, take_lo;
  logic signed [DWID-1:0] dist_lo, dist_hi;
  logic signed [SW:0]     lo_m2, hi_p2;

  always_comb begin
    lo_m2   = (SW+1)'(lo) - (SW+1)'(2);
    hi_p2   = (SW+1)'(hi) + (SW+1)'(2);
    lo_ok   = lo_m2 >= -(SW+1)'(MAXC);
    hi_ok   = hi_p2 <= (SW+1)'(MAXC);
    // distances to the two candidates, both non-negative while lo <= x <= hi region holds
    dist_lo = DWID'(x) - (DWID'(lo_m2) <<< FRAC);
    dist_hi = (DWID'(hi_p2) <<< FRAC) - DWID'(x);
    if (dist_lo < 0) dist_lo = -dist_lo;
    if (dist_hi < 0) dist_hi = -dist_hi;
    take_lo   = lo_ok && (!hi_ok || dist_lo <= dist_hi);
    nxt_valid = lo_ok || hi_ok;
    nxt       = take_lo ? SW'(lo_m2) : SW'(hi_p2);
    nxt_lo    = take_lo ? SW'(lo_m2) : lo;
    nxt_hi    = take_lo ? hi : (hi_ok ? SW'(hi_p2) : hi);
  end
endmodule
