// layer_nt: root layer of the tree (level NT), step I of the detector.
//
// The centre of the root level is z_bar[NT-1] itself. The FC block slices
// it, and the NC block lists the best node of every constellation row (the
// FC column in each of the SQRT_M rows, nearest rows first) with its PED.
// These SQRT_M nodes form the list L. Then K pops of L (Sorter1 picks the
// best, the picked node is replaced by its next sibling in its row) give
// the K best root nodes, which are exact because every row's best unvisited
// node is always in L. Sorter2 & Shifter holds them as the K parents of the
// next layer.
//
// Timing: the clock edge that samples 'start' clears the layer, the next
// edge loads L, the following K edges each pop one node, and 'done' is high
// for one cycle after the last pop (K+1 edges after the start edge). The
// parents are stable from then until the next 'start'.
// Throughout, 'e' and 'z_*' must stay stable (the control unit holds them
// for a whole frame). Sequencing and widths are this design's own.
module layer_nt
#(
  parameter int NT     = kbest_pkg::DEF_NT,
  parameter int SQRT_M = kbest_pkg::DEF_SQRT_M,
  parameter int K      = kbest_pkg::DEF_K,
  parameter int DW     = kbest_pkg::DEF_DW,
  parameter int FRAC   = kbest_pkg::DEF_FRAC,
  parameter int PW     = kbest_pkg::DEF_PW,
  localparam int SW    = kbest_pkg::sym_w(SQRT_M),
  localparam int LW    = kbest_pkg::l_w(DW, SQRT_M, NT)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic signed [DW-1:0] z_re,
  input  logic signed [DW-1:0] z_im,
  input  logic        [DW-1:0] e,
  output logic                 par_valid [K],
  output logic        [PW-1:0] par_ped   [K],
  output logic signed [SW-1:0] par_re    [K][NT],
  output logic signed [SW-1:0] par_im    [K][NT],
  output logic                 done,
  output logic                 ev_clip,     // FC limiter acted during load
  output logic                 ev_sibling   // a pop revealed a next sibling
);
  localparam int LVL  = NT - 1;
  localparam int ROWS = SQRT_M;
  localparam int PAYW = 2 * NT * SW;
  localparam int CW   = $clog2(K + 2);

  logic            busy;
  logic [CW-1:0]   cnt;
  logic            load, pop;

  logic signed [LW-1:0] l_re, l_im;
  logic signed [SW-1:0] fc_re, fc_im;
  logic                 clip_re, clip_im;
  logic                 c_valid [ROWS];
  logic signed [SW-1:0] c_re [ROWS], c_im [ROWS];
  logic        [PW-1:0] c_ped [ROWS];
  logic signed [SW-1:0] zero_path [NT];

  logic                 min_valid, sib_valid;
  logic        [PW-1:0] min_ped;
  logic signed [SW-1:0] min_re [NT], min_im [NT];
  logic      [PAYW-1:0] ins_pay;
  logic      [PAYW-1:0] q_pay [K];

  assign l_re = LW'(z_re);
  assign l_im = LW'(z_im);
  always_comb for (int j = 0; j < NT; j++) zero_path[j] = '0;

  fc_block #(.LW(LW), .SW(SW), .FRAC(FRAC), .SQRT_M(SQRT_M)) u_fc (
    .l_re, .l_im, .fc_re, .fc_im, .clipped_re(clip_re), .clipped_im(clip_im)
  );

  nc_block #(.ROWS(ROWS), .LW(LW), .SW(SW), .DW(DW), .FRAC(FRAC), .PW(PW), .SQRT_M(SQRT_M)) u_nc (
    .l_re, .l_im, .fc_re, .fc_im, .ped_parent('0), .e,
    .c_valid, .c_re, .c_im, .c_ped
  );

  node_list #(.NT(NT), .LVL(LVL), .NGRP(1), .ROWS(ROWS), .LW(LW), .SW(SW), .DW(DW),
              .FRAC(FRAC), .PW(PW), .SQRT_M(SQRT_M)) u_list (
    .clk, .rst_n, .clear(start), .e,
    .load, .load_grp('0), .load_l_re(l_re), .load_l_im(l_im), .load_ped_parent('0),
    .load_path_re(zero_path), .load_path_im(zero_path),
    .c_valid, .c_re, .c_im, .c_ped,
    .pop, .min_valid, .min_ped, .min_path_re(min_re), .min_path_im(min_im),
    .sib_valid
  );

  always_comb begin
    for (int j = 0; j < NT; j++) begin
      ins_pay[j*SW +: SW]          = min_re[j];
      ins_pay[(NT+j)*SW +: SW]     = min_im[j];
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

  // sequencing
  assign load = busy && (cnt == '0);
  assign pop  = busy && (cnt != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cnt  <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        cnt  <= '0;
      end else if (busy) begin
        if (cnt == CW'(K)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
        cnt <= cnt + 1'b1;
      end
    end
  end

  assign ev_clip    = load && (clip_re || clip_im);
  assign ev_sibling = pop && min_valid && sib_valid;
endmodule
