// layer_one: last layer of the tree (level 1), step III.
//
// For each of the K parents in turn (one per cycle) the Li Calc. block
// computes the level-1 centre, the FC block slices it and the PED Calc.
// block gives the first child's PED; only the first child of each parent
// is visited here. When all K first children are in, Sorter1 picks the one
// of lowest PED and the layer announces it, with all its ancestors, as the
// hard decision s_hat (index j of s_hat_* is tree level j+1, i.e. antenna
// j after the QR ordering).
//
// Timing: the clock edge that samples 'start' copies the upstream
// parents. The next K edges register the centres of parents 0..K-1 (Li
// Calc. stage); each following edge stores that parent's first child and
// PED (FC / PED Calc. stage). The edge after the last one registers the
// result, so 'out_valid' is high for exactly one cycle K+2 edges after the
// start edge, with s_hat_* and out_ped held until the next result. If no
// parent was valid, no result
// is announced. z, r and e must be stable from 'start' to the result.
module layer_one
#(
  parameter int NT      = kbest_pkg::DEF_NT,
  parameter int SQRT_M  = kbest_pkg::DEF_SQRT_M,
  parameter int K       = kbest_pkg::DEF_K,
  parameter int DW      = kbest_pkg::DEF_DW,
  parameter int FRAC    = kbest_pkg::DEF_FRAC,
  parameter int PW      = kbest_pkg::DEF_PW,
  localparam int SW     = kbest_pkg::sym_w(SQRT_M),
  localparam int LW     = kbest_pkg::l_w(DW, SQRT_M, NT)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic signed [DW-1:0] z_re,
  input  logic signed [DW-1:0] z_im,
  input  logic signed [DW-1:0] r_re [NT],
  input  logic signed [DW-1:0] r_im [NT],
  input  logic        [DW-1:0] e,
  input  logic                 par_in_valid [K],
  input  logic        [PW-1:0] par_in_ped   [K],
  input  logic signed [SW-1:0] par_in_re    [K][NT],
  input  logic signed [SW-1:0] par_in_im    [K][NT],
  output logic                 out_valid,
  output logic signed [SW-1:0] s_hat_re [NT],
  output logic signed [SW-1:0] s_hat_im [NT],
  output logic        [PW-1:0] out_ped,
  output logic                 ev_clip
);
  localparam int CW = $clog2(K + 3);
  localparam int GW = $clog2(K > 1 ? K : 2);
  localparam int IW = $clog2(K > 1 ? K : 2);

  logic                 pv [K];
  logic        [PW-1:0] pp [K];
  logic signed [SW-1:0] pr [K][NT];
  logic signed [SW-1:0] pi [K][NT];

  // first children
  logic                 cv  [K];
  logic        [PW-1:0] cp  [K];
  logic signed [SW-1:0] cre [K];
  logic signed [SW-1:0] cim [K];

  logic            busy;
  logic [CW-1:0]   cnt;
  logic            eval, finish;
  logic [GW-1:0]   pidx;

  // pipeline register between Li Calc. and the FC / PED Calc. blocks
  logic                 s1_valid;
  logic [GW-1:0]        s1_idx;
  logic signed [LW-1:0] s1_l_re, s1_l_im;
  logic        [PW-1:0] s1_ped;

  logic signed [LW-1:0] l_re, l_im;
  logic signed [SW-1:0] fc_re, fc_im;
  logic                 clip_re, clip_im;
  logic        [PW-1:0] fc_ped;

  logic                 best_valid;
  logic        [IW-1:0] best;
  logic        [PW-1:0] best_ped;

  assign eval   = busy && (cnt < CW'(K));
  assign finish = busy && (cnt == CW'(K + 1));
  assign pidx   = GW'(cnt);

  li_calc #(.NT(NT), .LVL(0), .DW(DW), .SW(SW), .LW(LW)) u_li (
    .z_re, .z_im, .r_re, .r_im, .s_re(pr[pidx]), .s_im(pi[pidx]), .l_re, .l_im
  );

  fc_block #(.LW(LW), .SW(SW), .FRAC(FRAC), .SQRT_M(SQRT_M)) u_fc (
    .l_re(s1_l_re), .l_im(s1_l_im), .fc_re, .fc_im, .clipped_re(clip_re), .clipped_im(clip_im)
  );

  ped_calc #(.LW(LW), .SW(SW), .DW(DW), .FRAC(FRAC), .PW(PW)) u_ped (
    .ped_in(s1_ped), .e, .l_re(s1_l_re), .l_im(s1_l_im), .s_re(fc_re), .s_im(fc_im),
    .ped_out(fc_ped)
  );

  sorter1 #(.N(K), .PW(PW)) u_sorter1 (
    .valid(cv), .ped(cp), .min_valid(best_valid), .min_idx(best), .min_ped(best_ped)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      cnt       <= '0;
      out_valid <= 1'b0;
      out_ped   <= '0;
      for (int j = 0; j < NT; j++) begin
        s_hat_re[j] <= '0;
        s_hat_im[j] <= '0;
      end
      for (int k = 0; k < K; k++) begin
        pv[k] <= 1'b0;
        pp[k] <= '0;
        cv[k] <= 1'b0;
        cp[k] <= '0;
        cre[k] <= '0;
        cim[k] <= '0;
        for (int j = 0; j < NT; j++) begin
          pr[k][j] <= '0;
          pi[k][j] <= '0;
        end
      end
    end else begin
      out_valid <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        cnt  <= '0;
        pv   <= par_in_valid;
        pp   <= par_in_ped;
        pr   <= par_in_re;
        pi   <= par_in_im;
        for (int k = 0; k < K; k++) cv[k] <= 1'b0;
      end else if (busy) begin
        cnt <= cnt + 1'b1;
        if (s1_valid) begin
          cv[s1_idx]  <= 1'b1;
          cp[s1_idx]  <= fc_ped;
          cre[s1_idx] <= fc_re;
          cim[s1_idx] <= fc_im;
        end
        if (finish) begin
          busy      <= 1'b0;
          out_valid <= best_valid;
          if (best_valid) begin
            out_ped <= best_ped;
            for (int j = 0; j < NT; j++) begin
              s_hat_re[j] <= (j == 0) ? cre[best] : pr[best][j];
              s_hat_im[j] <= (j == 0) ? cim[best] : pi[best][j];
            end
          end
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_idx   <= '0;
      s1_l_re  <= '0;
      s1_l_im  <= '0;
      s1_ped   <= '0;
    end else begin
      s1_valid <= !start && eval && pv[pidx];
      s1_idx   <= pidx;
      s1_l_re  <= l_re;
      s1_l_im  <= l_im;
      s1_ped   <= pp[pidx];
    end
  end

  assign ev_clip = s1_valid && (clip_re || clip_im);
endmodule
