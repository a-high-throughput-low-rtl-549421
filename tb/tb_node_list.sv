// tb_node_list: loads three groups of four entries (FC plus three
// row-enumerated nodes of random parents, contents from the reference
// model), then pops until the list is empty. The popped PEDs must be the
// full sorted list of every point in the admitted rows, in order, each
// popped path must be one of those points, and the list must run dry after
// exactly that many pops. Load followed by a fresh clear and reuse is
// checked over many rounds.
module automatic tb_node_list;
  import kbest_ref_pkg::*;
  localparam int NT = 4, LVL = 1, NGRP = 3, ROWS = 4, LW = 24, SW = 4, DW = 16,
                 FRAC = 10, PW = 32, SQRT_M = 8;

  logic                 clk = 0, rst_n = 0, clear = 0, load = 0, pop = 0;
  logic        [DW-1:0] e;
  logic        [1:0]    load_grp;
  logic signed [LW-1:0] load_l_re, load_l_im;
  logic        [PW-1:0] load_ped_parent;
  logic signed [SW-1:0] load_path_re [NT], load_path_im [NT];
  logic                 c_valid [ROWS];
  logic signed [SW-1:0] c_re [ROWS], c_im [ROWS];
  logic        [PW-1:0] c_ped [ROWS];
  logic                 min_valid, sib_valid;
  logic        [PW-1:0] min_ped;
  logic signed [SW-1:0] min_path_re [NT], min_path_im [NT];
  int checks = 0, failures = 0, nsib = 0, nexh = 0;

  node_list #(.NT(NT), .LVL(LVL), .NGRP(NGRP), .ROWS(ROWS), .LW(LW), .SW(SW), .DW(DW),
              .FRAC(FRAC), .PW(PW), .SQRT_M(SQRT_M)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    chan_t  ch;
    node_t  par[$], cands[$], one[$], got;
    longint ev;
    int     q[$];
    e = '0; load_grp = '0; load_l_re = '0; load_l_im = '0; load_ped_parent = '0;
    for (int j = 0; j < NT; j++) begin
      load_path_re[j] = '0;
      load_path_im[j] = '0;
    end
    for (int k = 0; k < ROWS; k++) begin
      c_valid[k] = 0; c_re[k] = '0; c_im[k] = '0; c_ped[k] = '0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 40; round++) begin
      ch = gen_vector(NT, SQRT_M, FRAC, 600);
      ev = ch.e[LVL];
      e = DW'(ev);
      par.delete();
      for (int g = 0; g < NGRP; g++) begin
        node_t p;
        for (int j = 0; j < MAXNT; j++) begin
          p.re[j] = (j > LVL && j < NT) ? rand_sym(SQRT_M) : 0;
          p.im[j] = (j > LVL && j < NT) ? rand_sym(SQRT_M) : 0;
        end
        p.ped = $urandom_range(0, 20 << FRAC);
        par.push_back(p);
      end
      layer_cands(par, LVL, NT, ch.z_re[LVL], ch.z_im[LVL], ch.r_re[LVL], ch.r_im[LVL], ev,
                  ROWS, SQRT_M, FRAC, PW, cands);
      @(negedge clk);
      clear = 1;
      @(negedge clk);
      clear = 0;
      // load one group per cycle
      foreach (par[g]) begin
        longint lr, li;
        int fr, fi;
        centre(ch.z_re[LVL], ch.z_im[LVL], ch.r_re[LVL], ch.r_im[LVL], par[g], LVL, NT, lr, li);
        fr = slice(lr, FRAC, SQRT_M);
        fi = slice(li, FRAC, SQRT_M);
        near_rows(li, ROWS, SQRT_M, FRAC, q);
        load = 1;
        load_grp = 2'(g);
        load_l_re = LW'(lr);
        load_l_im = LW'(li);
        load_ped_parent = PW'(par[g].ped);
        for (int j = 0; j < NT; j++) begin
          load_path_re[j] = SW'(par[g].re[j]);
          load_path_im[j] = SW'(par[g].im[j]);
        end
        for (int k = 0; k < ROWS; k++) begin
          c_valid[k] = 1;
          c_re[k] = SW'(fr);
          c_im[k] = SW'(q[k]);
          c_ped[k] = PW'(ped(par[g].ped, ev, lr, li, fr, q[k], FRAC, PW));
        end
        @(negedge clk);
      end
      load = 0;
      // pop everything
      for (int n = 0; n < cands.size(); n++) begin
        checks++;
        if (!min_valid || longint'(min_ped) != cands[n].ped) begin
          failures++;
          $display("FAIL round %0d pop %0d: v=%b ped=%0d exp %0d", round, n, min_valid,
                   min_ped, cands[n].ped);
          break;
        end
        got.ped = longint'(min_ped);
        for (int j = 0; j < MAXNT; j++) begin
          got.re[j] = (j < NT) ? int'(min_path_re[j]) : 0;
          got.im[j] = (j < NT) ? int'(min_path_im[j]) : 0;
        end
        checks++;
        if (!has_node(cands, got, LVL, NT)) begin
          failures++;
          $display("FAIL round %0d pop %0d: path not a candidate", round, n);
        end
        if (sib_valid) nsib++;
        else nexh++;
        pop = 1;
        @(negedge clk);
        pop = 0;
      end
      checks++;
      if (min_valid) begin
        failures++;
        $display("FAIL round %0d: list not empty after all candidates", round);
      end
    end
    if (nsib == 0 || nexh == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
