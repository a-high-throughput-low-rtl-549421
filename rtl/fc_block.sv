// fc_block: first child (FC) of a node, i.e. the constellation point nearest
// to the interference-cancelled centre L.
//
// As in the architecture this is one mapper and one limiter per axis. The
// mapper rounds a coordinate to the nearest odd integer: for x with FRAC
// fractional bits, 2*floor(x / 2^(FRAC+1)) + 1. The limiter clips that odd
// integer to [-(SQRT_M-1), SQRT_M-1], which is the nearest point of a
// square QAM grid when L lies outside it. The 'clipped' flags tell which
// limiter acted. Purely combinational.
//
// The two mappers and two limiters are the architecture's; the rounding
// rule (midpoints go up) is this design's own.
module fc_block #(
  parameter int LW     = 24,
  parameter int SW     = 4,
  parameter int FRAC   = 10,
  parameter int SQRT_M = 8
) (
  input  logic signed [LW-1:0] l_re,
  input  logic signed [LW-1:0] l_im,
  output logic signed [SW-1:0] fc_re,
  output logic signed [SW-1:0] fc_im,
  output logic                 clipped_re,
  output logic                 clipped_im
);
  localparam int MW   = LW - FRAC + 1;  // mapper output width
  localparam int MAXC = SQRT_M - 1;

  // mapper: nearest odd integer
  function automatic logic signed [MW-1:0] map_odd(input logic signed [LW-1:0] x);
    logic signed [LW-1:0] q;
    q = x >>> (FRAC + 1);
    return (MW'(q) <<< 1) + MW'(1);
  endfunction

  logic signed [MW-1:0] m_re, m_im;

  always_comb begin
    m_re = map_odd(l_re);
    m_im = map_odd(l_im);
    // limiters
    clipped_re = (m_re > MW'(MAXC)) || (m_re < -MW'(MAXC));
    clipped_im = (m_im > MW'(MAXC)) || (m_im < -MW'(MAXC));
    if (m_re > MW'(MAXC))       fc_re = SW'(MAXC);
    else if (m_re < -MW'(MAXC)) fc_re = -SW'(MAXC);
    else                        fc_re = SW'(m_re);
    if (m_im > MW'(MAXC))       fc_im = SW'(MAXC);
    else if (m_im < -MW'(MAXC)) fc_im = -SW'(MAXC);
    else                        fc_im = SW'(m_im);
  end
endmodule
