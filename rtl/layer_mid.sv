// layer_mid: one of the layers NT-1 .. 2 (tree level LVL+1), step II.
//
// For each of the K parents in turn (one per cycle) the Li Calc. block
// computes the centre L of this level from the parent's symbols, the FC
// block slices it and the NC block produces the FC plus RSE_NUM Level-2
// nodes with their PEDs, which are written as one group of the list L
// (|L| = K * (RSE_NUM+1)). Then K pops of L select the K best children:
// Sorter1 picks the best node, which is moved into Sorter2 & Shifter and
// replaced in L by its next sibling in the same row (on-demand expansion).
//
// Timing: the clock edge that samples 'start' copies the upstream parents
// (par_in_*) and clears the layer. The next K edges register the centre of
// parents 0..K-1 (Li Calc. stage); each following edge writes that
// parent's candidates into L (FC / NC stage), so the two stages overlap.
// The K edges after the last write pop, and 'done' is high for one cycle
// after the last pop (2K+1 edges after the start edge). Parents out
// (par_*) are then stable until the next 'start'. z, r and e must be
// stable from 'start' to 'done'. The two-stage, one-parent-per-cycle
// schedule and the widths are this design's own.
//
module layer_mid
#(
  parameter int NT      = kbest_pkg::DEF_NT,
  parameter int LVL     = 2,
  parameter int SQRT_M  = kbest_pkg::DEF_SQRT_M,
  parameter int K       = kbest_pkg::DEF_K,
  parameter int RSE_NUM = kbest_pkg::DEF_RSE_NUM,
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
  output logic                 par_valid [K],
  output logic        [PW-1:0] par_ped   [K],
  output logic signed [SW-1:0] par_re    [K][NT],
  output logic signed [SW-1:0] par_im    [K][NT],
  output logic                 done,
  output logic                 ev_clip,
  output logic                 ev_sibling
);
  localparam int ROWS = RSE_NUM + 1;
  localparam int PAYW = 2 * NT * SW;
  localparam int CW   = $clog2(2 * K + 2);
  localparam int GW   = $clog2(K > 1 ? K : 2);

  // captured parents
  logic                 pv [K];
  logic        [PW-1:0] pp [K];
  logic signed [SW-1:0] pr [K][NT];
  logic signed [SW-1:0] pi [K][NT];

  logic            busy;
  logic [CW-1:0]   cnt;
  logic            expand, load, pop;
  logic [GW-1:0]   pidx;

  // pipeline register between Li Calc. and the FC / NC blocks
  logic                 s1_valid;
  logic [GW-1:0]        s1_grp;
  logic signed [LW-1:0] s1_l_re, s1_l_im;
  logic        [PW-1:0] s1_ped;
  logic signed [SW-1:0] s1_re [NT];
  logic signed [SW-1:0] s1_im [NT];

  logic signed [LW-1:0] l_re, l_im;
  logic signed [SW-1:0] fc_re, fc_im;
  logic                 clip_re, clip_im;
  logic                 c_valid [ROWS];
  logic signed [SW-1:0] c_re [ROWS], c_im [ROWS];
  logic        [PW-1:0] c_ped [ROWS];

  logic                 min_valid, sib_valid;
  logic        [PW-1:0] min_ped;
  logic signed [SW-1:0] min_re [NT], min_im [NT];
  logic      [PAYW-1:0] ins_pay;
  logic      [PAYW-1:0] q_pay [K];

  assign expand = busy && (cnt < CW'(K));
  assign pidx   = GW'(cnt);
  assign load   = s1_valid;
  assign pop    = busy && (cnt > CW'(K));

  li_calc #(.NT(NT), .LVL(LVL), .DW(DW), .SW(SW), .LW(LW)) u_li (
    .z_re, .z_im, .r_re, .r_im, .s_re(pr[pidx]), .s_im(pi[pidx]), .l_re, .l_im
  );

  fc_block #(.LW(LW), .SW(SW), .FRAC(FRAC), .SQRT_M(SQRT_M)) u_fc (
    .l_re(s1_l_re), .l_im(s1_l_im), .fc_re, .fc_im, .clipped_re(clip_re), .clipped_im(clip_im)
  );

  nc_block #(.ROWS(ROWS), .LW(LW), .SW(SW), .DW(DW), .FRAC(FRAC), .PW(PW), .SQRT_M(SQRT_M)) u_nc (
    .l_re(s1_l_re), .l_im(s1_l_im), .fc_re, .fc_im, .ped_parent(s1_ped), .e,
    .c_valid, .c_re, .c_im, .c_ped
  );

  node_list #(.NT(NT), .LVL(LVL), .NGRP(K), .ROWS(ROWS), .LW(LW), .SW(SW), .DW(DW),
              .FRAC(FRAC), .PW(PW), .SQRT_M(SQRT_M)) u_list (
    .clk, .rst_n, .clear(start), .e,
    .load, .load_grp(s1_grp), .load_l_re(s1_l_re), .load_l_im(s1_l_im), .load_ped_parent(s1_ped),
    .load_path_re(s1_re), .load_path_im(s1_im),
    .c_valid, .c_re, .c_im, .c_ped,
    .pop, .min_valid, .min_ped, .min_path_re(min_re), .min_path_im(min_im),
    .sib_valid
  );

  always_comb begin
    for (int j = 0; j < NT; j++) begin
      ins_pay[j*SW +: SW]      = min_re[j];
      ins_pay[(NT+j)*SW +: SW] = min_im[j];
    end
  end

  sorter2_shifter #(.K(K), .PW(PW), .PAYW(PAYW)) u_sorter2 (
    .clk, .rst_n, .clear(start), .ins(pop && min_valid), .ins_ped(min_ped), .ins_pay,
    .q_valid(par_valid), .q_ped(par_ped), .q_pay
  );

  always_comb begin
    for (int k = 0; k < K; k++)
      for (int j = 0; j < NT; j++) begin
        par_re[k][j] = q_pay[k][j*SW +: SW];
        par_im[k][j] = q_pay[k][(NT+j)*SW +: SW];
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cnt  <= '0;
      done <= 1'b0;
      for (int k = 0; k < K; k++) begin
        pv[k] <= 1'b0;
        pp[k] <= '0;
        for (int j = 0; j < NT; j++) begin
          pr[k][j] <= '0;
          pi[k][j] <= '0;
        end
      end
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        cnt  <= '0;
        pv   <= par_in_valid;
        pp   <= par_in_ped;
        pr   <= par_in_re;
        pi   <= par_in_im;
      end else if (busy) begin
        if (cnt == CW'(2 * K)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
        cnt <= cnt + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_grp   <= '0;
      s1_l_re  <= '0;
      s1_l_im  <= '0;
      s1_ped   <= '0;
      for (int j = 0; j < NT; j++) begin
        s1_re[j] <= '0;
        s1_im[j] <= '0;
      end
    end else begin
      s1_valid <= !start && expand && pv[pidx];
      s1_grp   <= pidx;
      s1_l_re  <= l_re;
      s1_l_im  <= l_im;
      s1_ped   <= pp[pidx];
      s1_re    <= pr[pidx];
      s1_im    <= pi[pidx];
    end
  end

  assign ev_clip    = load && (clip_re || clip_im);
  assign ev_sibling = pop && min_valid && sib_valid;
endmodule
