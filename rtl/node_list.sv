// node_list: the candidate register bank L of one layer, with on-demand
// expansion of siblings.
//
// The bank holds NGRP groups of ROWS entries; group g is written in one
// cycle ('load') with the children an nc_block produced for parent g: the
// FC and the Level-2 nodes. Each entry keeps its own symbol path (the
// parent's path with this node's symbol at level LVL), its PED, the
// parent's PED, the level centre L, and the run [lo, hi] of real
// coordinates already visited in its row.
//
// 'pop' takes the entry Sorter1 reports as best (visible combinationally
// on min_*) and, at the same clock edge, replaces it by its next sibling in
// the same row: the next real coordinate in SE order (se_next) with its PED
// from ped_calc. When the row is used up the entry becomes invalid. Because
// siblings of a row come in non-decreasing PED, successive pops yield the
// best nodes of all rows in the bank in non-decreasing PED order while only
// one new node is visited per pop.
//
// 'clear' empties the bank. load and pop must not coincide (asserted).
// 'sib_valid' reports whether the current pop found a next sibling.
//
// The list L and its update follow the algorithm; storing the parent's
// PED and centre in every entry is this design's own.
module node_list #(
  parameter int NT     = 4,
  parameter int LVL    = 2,
  parameter int NGRP   = 10,
  parameter int ROWS   = 4,
  parameter int LW     = 24,
  parameter int SW     = 4,
  parameter int DW     = 16,
  parameter int FRAC   = 10,
  parameter int PW     = 32,
  parameter int SQRT_M = 8,
  localparam int N     = NGRP * ROWS,
  localparam int GW    = $clog2(NGRP > 1 ? NGRP : 2)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic        [DW-1:0] e,
  // group load
  input  logic                 load,
  input  logic        [GW-1:0] load_grp,
  input  logic signed [LW-1:0] load_l_re,
  input  logic signed [LW-1:0] load_l_im,
  input  logic        [PW-1:0] load_ped_parent,
  input  logic signed [SW-1:0] load_path_re [NT],
  input  logic signed [SW-1:0] load_path_im [NT],
  input  logic                 c_valid [ROWS],
  input  logic signed [SW-1:0] c_re    [ROWS],
  input  logic signed [SW-1:0] c_im    [ROWS],
  input  logic        [PW-1:0] c_ped   [ROWS],
  // best entry and pop
  input  logic                 pop,
  output logic                 min_valid,
  output logic        [PW-1:0] min_ped,
  output logic signed [SW-1:0] min_path_re [NT],
  output logic signed [SW-1:0] min_path_im [NT],
  output logic                 sib_valid
);
  localparam int IW = $clog2(N > 1 ? N : 2);

  logic                 v     [N];
  logic        [PW-1:0] ped   [N];
  logic        [PW-1:0] pbase [N];
  logic signed [LW-1:0] lre   [N];
  logic signed [LW-1:0] lim   [N];
  logic signed [SW-1:0] lo    [N];
  logic signed [SW-1:0] hi    [N];
  logic signed [SW-1:0] pre   [N][NT];
  logic signed [SW-1:0] pim   [N][NT];

  logic          [IW-1:0] sel;
  logic signed   [SW-1:0] sib_re, sib_lo, sib_hi;
  logic          [PW-1:0] sib_ped;

  sorter1 #(.N(N), .PW(PW)) u_sorter1 (
    .valid(v), .ped(ped), .min_valid(min_valid), .min_idx(sel), .min_ped(min_ped)
  );

  always_comb begin
    for (int j = 0; j < NT; j++) begin
      min_path_re[j] = pre[sel][j];
      min_path_im[j] = pim[sel][j];
    end
  end

  // next sibling of the selected entry in its row
  se_next #(.XW(LW), .SW(SW), .FRAC(FRAC), .SQRT_M(SQRT_M)) u_se (
    .x(lre[sel]), .lo(lo[sel]), .hi(hi[sel]),
    .nxt_valid(sib_valid), .nxt(sib_re), .nxt_lo(sib_lo), .nxt_hi(sib_hi)
  );

  ped_calc #(.LW(LW), .SW(SW), .DW(DW), .FRAC(FRAC), .PW(PW)) u_ped (
    .ped_in(pbase[sel]), .e(e), .l_re(lre[sel]), .l_im(lim[sel]),
    .s_re(sib_re), .s_im(pim[sel][LVL]), .ped_out(sib_ped)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n < N; n++) begin
        v[n]     <= 1'b0;
        ped[n]   <= '0;
        pbase[n] <= '0;
        lre[n]   <= '0;
        lim[n]   <= '0;
        lo[n]    <= '0;
        hi[n]    <= '0;
        for (int j = 0; j < NT; j++) begin
          pre[n][j] <= '0;
          pim[n][j] <= '0;
        end
      end
    end else if (clear) begin
      for (int n = 0; n < N; n++) v[n] <= 1'b0;
    end else if (load) begin
      for (int g = 0; g < NGRP; g++) begin
        if (GW'(g) == load_grp) begin
          for (int k = 0; k < ROWS; k++) begin
            v[g*ROWS+k]     <= c_valid[k];
            ped[g*ROWS+k]   <= c_ped[k];
            pbase[g*ROWS+k] <= load_ped_parent;
            lre[g*ROWS+k]   <= load_l_re;
            lim[g*ROWS+k]   <= load_l_im;
            lo[g*ROWS+k]    <= c_re[k];
            hi[g*ROWS+k]    <= c_re[k];
            for (int j = 0; j < NT; j++) begin
              pre[g*ROWS+k][j] <= (j == LVL) ? c_re[k] : load_path_re[j];
              pim[g*ROWS+k][j] <= (j == LVL) ? c_im[k] : load_path_im[j];
            end
          end
        end
      end
    end else if (pop && min_valid) begin
      v[sel]        <= sib_valid;
      ped[sel]      <= sib_ped;
      lo[sel]       <= sib_lo;
      hi[sel]       <= sib_hi;
      pre[sel][LVL] <= sib_re;
    end
  end

  a_no_load_pop: assert property (@(posedge clk) disable iff (!rst_n) !(load && pop));
endmodule
