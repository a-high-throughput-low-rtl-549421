// nc_block: the children of one parent that enter the candidate list L.
//
// Entry 0 is the first child FC. Entries 1..ROWS-1 are the "Level-2 nodes":
// the best node of each of the ROWS-1 constellation rows nearest to the
// centre after the FC row, found by SE enumeration across rows (row SE
// enumeration). Inside any row the best node sits in the FC column, so
// every entry has the FC's real coordinate; only the row (imaginary part)
// differs. Each entry gets its PED from a ped_calc, and carries the
// visited run lo = hi = FC real coordinate so that its row can later be
// enumerated further on demand. Entries past the constellation edge are
// marked invalid. Purely combinational.
//
// Layers NT-1..2 use ROWS = RSE_NUM + 1; the root layer uses ROWS = SQRT_M
// (one node per row).
//
// The NC block's role follows the architecture; its structure (an SE
// chain across rows and one PED unit per entry) is this design's own.
module nc_block #(
  parameter int ROWS   = 4,
  parameter int LW     = 24,
  parameter int SW     = 4,
  parameter int DW     = 16,
  parameter int FRAC   = 10,
  parameter int PW     = 32,
  parameter int SQRT_M = 8
) (
  input  logic signed [LW-1:0] l_re,
  input  logic signed [LW-1:0] l_im,
  input  logic signed [SW-1:0] fc_re,
  input  logic signed [SW-1:0] fc_im,
  input  logic        [PW-1:0] ped_parent,
  input  logic        [DW-1:0] e,
  output logic                 c_valid [ROWS],
  output logic signed [SW-1:0] c_re    [ROWS],
  output logic signed [SW-1:0] c_im    [ROWS],
  output logic        [PW-1:0] c_ped   [ROWS]
);
  // row enumeration chain: visited rows [lo_k, hi_k]
  logic signed [SW-1:0] row_lo [ROWS];
  logic signed [SW-1:0] row_hi [ROWS];
  logic                 row_ok [ROWS];

  assign row_lo[0] = fc_im;
  assign row_hi[0] = fc_im;
  assign row_ok[0] = 1'b1;
  assign c_im[0]   = fc_im;

  for (genvar k = 1; k < ROWS; k++) begin : g_rse
    logic nv;
    se_next #(.XW(LW), .SW(SW), .FRAC(FRAC), .SQRT_M(SQRT_M)) u_se (
      .x(l_im), .lo(row_lo[k-1]), .hi(row_hi[k-1]),
      .nxt_valid(nv), .nxt(c_im[k]), .nxt_lo(row_lo[k]), .nxt_hi(row_hi[k])
    );
    assign row_ok[k] = row_ok[k-1] && nv;
  end

  for (genvar k = 0; k < ROWS; k++) begin : g_ped
    assign c_valid[k] = row_ok[k];
    assign c_re[k]    = fc_re;
    ped_calc #(.LW(LW), .SW(SW), .DW(DW), .FRAC(FRAC), .PW(PW)) u_ped (
      .ped_in(ped_parent), .e(e), .l_re(l_re), .l_im(l_im),
      .s_re(fc_re), .s_im(c_im[k]), .ped_out(c_ped[k])
    );
  end
endmodule
