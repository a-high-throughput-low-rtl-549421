// li_calc: interference-cancelled centre of tree level LVL (0-based, level
// NT-1 is the root level).
//
//   L = z_bar[LVL] - sum_{j>LVL} r_bar[LVL][j] * s[j]
//
// z_bar and r_bar are the rotated receive vector and the R matrix already
// divided by the real diagonal r_ii (so the slicer needs no divider); s[j]
// are the parent's decided symbols. Each level uses a different number of
// products, hence one instance per layer with its own LVL. Combinational;
// the calling layer registers the result path.
//
// The formula and the per-layer customisation follow the architecture;
// it was described as fully pipelined; here it is combinational and each
// layer registers its result before the FC block.
module li_calc #(
  parameter int NT   = 4,
  parameter int LVL  = 2,
  parameter int DW   = 16,
  parameter int SW   = 4,
  parameter int LW   = 24
) (
  input  logic signed [DW-1:0] z_re,
  input  logic signed [DW-1:0] z_im,
  input  logic signed [DW-1:0] r_re [NT],   // row LVL of r_bar
  input  logic signed [DW-1:0] r_im [NT],
  input  logic signed [SW-1:0] s_re [NT],   // parent path, entries j > LVL used
  input  logic signed [SW-1:0] s_im [NT],
  output logic signed [LW-1:0] l_re,
  output logic signed [LW-1:0] l_im
);
  always_comb begin
    l_re = LW'(z_re);
    l_im = LW'(z_im);
    for (int j = LVL + 1; j < NT; j++) begin
      l_re = l_re - (LW'(r_re[j]) * LW'(s_re[j]) - LW'(r_im[j]) * LW'(s_im[j]));
      l_im = l_im - (LW'(r_re[j]) * LW'(s_im[j]) + LW'(r_im[j]) * LW'(s_re[j]));
    end
  end
endmodule
