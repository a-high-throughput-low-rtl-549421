// kbest_detector: complex-domain K-Best MIMO detector with on-demand
// expansion, NT x NT antennas, square QAM (default 4 x 4, 64-QAM).
//
// It finds s_hat = argmin ||y - H s||^2 approximately by a breadth-first
// tree search on z = Q^H y and the upper-triangular R of H = QR. Layer NT
// (layer_nt) keeps the K best root nodes; layers NT-1..2 (layer_mid) each
// expand every one of the K parents into its first child plus RSE_NUM
// row-enumerated nodes and keep the K best children, visiting further
// siblings only when one is selected; layer 1 (layer_one) visits only the
// first child of each parent and outputs the best complete path. The
// control unit feeds each layer its row of the channel data and starts all
// layers together once per frame of 2K+2 cycles, so NT vectors are in
// flight at once.
//
// Interface: a vector (z_bar, r_bar, e, see control_unit for scaling) is
// taken in a cycle where in_valid and in_ready are both high; in_ready is
// high one cycle per frame. Its decision appears with a one-cycle
// out_valid pulse (NT-1)*(2K+2)+K+3 cycles (79 at the defaults) after the
// accepting edge; s_hat_*[j] is the symbol of tree
// level j+1 as an odd integer, out_ped its squared distance (FRAC
// fractional bits). There is no output back-pressure.
//
// The layer structure and block order follow the published architecture;
// the frame timing, K, RSE_NUM and the widths are this design's own. The
// layers' done/ev_* outputs are observation points only and stay internal.
module kbest_detector
#(
  parameter int NT      = kbest_pkg::DEF_NT,
  parameter int SQRT_M  = kbest_pkg::DEF_SQRT_M,
  parameter int K       = kbest_pkg::DEF_K,
  parameter int RSE_NUM = kbest_pkg::DEF_RSE_NUM,
  parameter int DW      = kbest_pkg::DEF_DW,
  parameter int FRAC    = kbest_pkg::DEF_FRAC,
  parameter int PW      = kbest_pkg::DEF_PW,
  localparam int SW     = kbest_pkg::sym_w(SQRT_M)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [DW-1:0] z_re [NT],
  input  logic signed [DW-1:0] z_im [NT],
  input  logic signed [DW-1:0] r_re [NT][NT],
  input  logic signed [DW-1:0] r_im [NT][NT],
  input  logic        [DW-1:0] e    [NT],
  output logic                 out_valid,
  output logic signed [SW-1:0] s_hat_re [NT],
  output logic signed [SW-1:0] s_hat_im [NT],
  output logic        [PW-1:0] out_ped
);
  logic                 start [NT];
  logic signed [DW-1:0] lz_re [NT], lz_im [NT];
  logic signed [DW-1:0] lr_re [NT][NT], lr_im [NT][NT];
  logic        [DW-1:0] le    [NT];

  // parents leaving each layer (index = level of the producing layer)
  logic                 pv [NT][K];
  logic        [PW-1:0] pp [NT][K];
  logic signed [SW-1:0] pr [NT][K][NT];
  logic signed [SW-1:0] pi [NT][K][NT];

  logic done_nt, clip_nt, sib_nt, clip_one;
  logic done_mid [NT], clip_mid [NT], sib_mid [NT];

  control_unit #(.NT(NT), .DW(DW), .FRAME(2 * K + 2)) u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready, .z_re, .z_im, .r_re, .r_im, .e,
    .start, .lz_re, .lz_im, .lr_re, .lr_im, .le
  );

  layer_nt #(.NT(NT), .SQRT_M(SQRT_M), .K(K), .DW(DW), .FRAC(FRAC), .PW(PW)) u_layer_nt (
    .clk, .rst_n, .start(start[NT-1]), .z_re(lz_re[NT-1]), .z_im(lz_im[NT-1]), .e(le[NT-1]),
    .par_valid(pv[NT-1]), .par_ped(pp[NT-1]), .par_re(pr[NT-1]), .par_im(pi[NT-1]),
    .done(done_nt), .ev_clip(clip_nt), .ev_sibling(sib_nt)
  );

  for (genvar l = NT - 2; l >= 1; l--) begin : g_mid
    layer_mid #(.NT(NT), .LVL(l), .SQRT_M(SQRT_M), .K(K), .RSE_NUM(RSE_NUM), .DW(DW),
                .FRAC(FRAC), .PW(PW)) u_layer (
      .clk, .rst_n, .start(start[l]), .z_re(lz_re[l]), .z_im(lz_im[l]),
      .r_re(lr_re[l]), .r_im(lr_im[l]), .e(le[l]),
      .par_in_valid(pv[l+1]), .par_in_ped(pp[l+1]), .par_in_re(pr[l+1]), .par_in_im(pi[l+1]),
      .par_valid(pv[l]), .par_ped(pp[l]), .par_re(pr[l]), .par_im(pi[l]),
      .done(done_mid[l]), .ev_clip(clip_mid[l]), .ev_sibling(sib_mid[l])
    );
  end

  // level 0 carries no parents
  always_comb begin
    done_mid[0] = 1'b0;
    clip_mid[0] = 1'b0;
    sib_mid[0]  = 1'b0;
    for (int k = 0; k < K; k++) begin
      pv[0][k] = 1'b0;
      pp[0][k] = '0;
      for (int j = 0; j < NT; j++) begin
        pr[0][k][j] = '0;
        pi[0][k][j] = '0;
      end
    end
  end

  layer_one #(.NT(NT), .SQRT_M(SQRT_M), .K(K), .DW(DW), .FRAC(FRAC), .PW(PW)) u_layer_one (
    .clk, .rst_n, .start(start[0]), .z_re(lz_re[0]), .z_im(lz_im[0]),
    .r_re(lr_re[0]), .r_im(lr_im[0]), .e(le[0]),
    .par_in_valid(pv[1]), .par_in_ped(pp[1]), .par_in_re(pr[1]), .par_in_im(pi[1]),
    .out_valid, .s_hat_re, .s_hat_im, .out_ped, .ev_clip(clip_one)
  );
endmodule
