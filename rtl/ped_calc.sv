// ped_calc: partial Euclidean distance of a child node.
//
// PED_i = PED_{i+1} + e_i * |L_i - s_i|^2, the recursion of the K-Best tree
// search, where L_i is the centre of level i (scaled by 1/r_ii) and
// e_i = |r_ii|^2 restores the scale. Fixed point: L and e carry FRAC
// fractional bits, s is an integer; the squared distance and the product
// are each truncated back to FRAC fractional bits, and the sum saturates at
// the all-ones PED. Truncation keeps the result monotone in |L - s|, which
// the on-demand enumeration relies on. Purely combinational.
//
// The recursion is the detector's; the fixed-point handling is this
// design's own.
module ped_calc #(
  parameter int LW   = 24,
  parameter int SW   = 4,
  parameter int DW   = 16,
  parameter int FRAC = 10,
  parameter int PW   = 32
) (
  input  logic        [PW-1:0] ped_in,
  input  logic        [DW-1:0] e,
  input  logic signed [LW-1:0] l_re,
  input  logic signed [LW-1:0] l_im,
  input  logic signed [SW-1:0] s_re,
  input  logic signed [SW-1:0] s_im,
  output logic        [PW-1:0] ped_out
);
  localparam int DFW = LW + 1;            // difference width
  localparam int SQW = 2 * DFW + 1;       // sum of squares width
  localparam int PRW = SQW + DW;          // product width

  logic signed [DFW-1:0] d_re, d_im;
  logic        [SQW-1:0] d2;
  logic        [PRW-1:0] prod, inc;
  logic        [PRW:0]   sum;

  always_comb begin
    d_re = DFW'(l_re) - (DFW'(s_re) <<< FRAC);
    d_im = DFW'(l_im) - (DFW'(s_im) <<< FRAC);
    d2   = (SQW'(d_re * d_re) + SQW'(d_im * d_im)) >> FRAC;
    prod = PRW'(e) * PRW'(d2);
    inc  = prod >> FRAC;
    sum  = (PRW+1)'(ped_in) + (PRW+1)'(inc);
    ped_out = (sum > (PRW+1)'({PW{1'b1}})) ? {PW{1'b1}} : PW'(sum);
  end
endmodule
