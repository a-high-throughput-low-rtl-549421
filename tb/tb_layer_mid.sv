// tb_layer_mid: random channels and K random parents (sometimes only a few
// valid) into an inner layer at level 3 (LVL=2). Its K outputs must carry
// the K smallest PEDs among all points of the RSE_NUM+1 nearest rows of
// every valid parent, in order, each with a matching path; 'done' must
// rise 2K+1 clock edges after the edge that samples start (K expansions
// through a two-stage pipeline, K pops).
module automatic tb_layer_mid;
  import kbest_ref_pkg::*;
  localparam int NT = 4, LVL = 2, SQRT_M = 8, K = 10, RSE_NUM = 3, DW = 16, FRAC = 10,
                 PW = 32, SW = 4;

  logic                 clk = 0, rst_n = 0, start = 0;
  logic signed [DW-1:0] z_re, z_im;
  logic signed [DW-1:0] r_re [NT], r_im [NT];
  logic        [DW-1:0] e;
  logic                 par_in_valid [K];
  logic        [PW-1:0] par_in_ped   [K];
  logic signed [SW-1:0] par_in_re    [K][NT];
  logic signed [SW-1:0] par_in_im    [K][NT];
  logic                 par_valid [K];
  logic        [PW-1:0] par_ped   [K];
  logic signed [SW-1:0] par_re    [K][NT];
  logic signed [SW-1:0] par_im    [K][NT];
  logic                 done, ev_clip, ev_sibling;
  int checks = 0, failures = 0, nclip = 0, nsib = 0, nfew = 0;

  layer_mid #(.NT(NT), .LVL(LVL), .SQRT_M(SQRT_M), .K(K), .RSE_NUM(RSE_NUM), .DW(DW),
              .FRAC(FRAC), .PW(PW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (ev_clip) nclip++;
    if (ev_sibling) nsib++;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    chan_t ch;
    node_t par[$], cands[$], got;
    z_re = '0; z_im = '0; e = '0;
    for (int j = 0; j < NT; j++) begin
      r_re[j] = '0;
      r_im[j] = '0;
    end
    for (int k = 0; k < K; k++) begin
      par_in_valid[k] = 0;
      par_in_ped[k] = '0;
      for (int j = 0; j < NT; j++) begin
        par_in_re[k][j] = '0;
        par_in_im[k][j] = '0;
      end
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      int cyc = 0;
      int nvalid = (t % 5 == 4) ? 2 : K;
      int nexp;
      ch = gen_vector(NT, SQRT_M, FRAC, (t % 4 == 0) ? (6 << FRAC) : 400);
      par.delete();
      @(negedge clk);
      for (int k = 0; k < K; k++) begin
        node_t p;
        for (int j = 0; j < MAXNT; j++) begin
          p.re[j] = (j > LVL && j < NT) ? rand_sym(SQRT_M) : 0;
          p.im[j] = (j > LVL && j < NT) ? rand_sym(SQRT_M) : 0;
        end
        if (k == 0) begin
          p.re[NT-1] = ch.s_re[NT-1];
          p.im[NT-1] = ch.s_im[NT-1];
        end
        p.ped = $urandom_range(0, 30 << FRAC);
        par_in_valid[k] = k < nvalid;
        par_in_ped[k] = PW'(p.ped);
        for (int j = 0; j < NT; j++) begin
          par_in_re[k][j] = SW'(p.re[j]);
          par_in_im[k][j] = SW'(p.im[j]);
        end
        if (k < nvalid) par.push_back(p);
      end
      layer_cands(par, LVL, NT, ch.z_re[LVL], ch.z_im[LVL], ch.r_re[LVL], ch.r_im[LVL],
                  ch.e[LVL], RSE_NUM + 1, SQRT_M, FRAC, PW, cands);
      z_re = DW'(ch.z_re[LVL]);
      z_im = DW'(ch.z_im[LVL]);
      e = DW'(ch.e[LVL]);
      for (int j = 0; j < NT; j++) begin
        r_re[j] = DW'(ch.r_re[LVL][j]);
        r_im[j] = DW'(ch.r_im[LVL][j]);
      end
      start = 1;
      @(negedge clk);
      start = 0;
      // scramble the upstream bank: the layer must have captured it
      for (int k = 0; k < K; k++) par_in_ped[k] = '1;
      while (!done && cyc < 100) begin
        @(negedge clk);
        cyc++;
      end
      checks++;
      if (cyc != 2 * K + 1) begin
        failures++;
        $display("FAIL t=%0d: done %0d edges after start, expected %0d", t, cyc, 2 * K + 1);
      end
      nexp = (cands.size() < K) ? cands.size() : K;
      if (nexp < K) nfew++;
      for (int k = 0; k < K; k++) begin
        got.ped = longint'(par_ped[k]);
        for (int j = 0; j < MAXNT; j++) begin
          got.re[j] = (j < NT) ? int'(par_re[k][j]) : 0;
          got.im[j] = (j < NT) ? int'(par_im[k][j]) : 0;
        end
        checks++;
        if (par_valid[k] != (k < nexp) ||
            (k < nexp && (got.ped != cands[k].ped || !has_node(cands, got, LVL, NT)))) begin
          failures++;
          $display("FAIL t=%0d slot %0d: v=%b ped=%0d exp %0d", t, k, par_valid[k], got.ped,
                   (k < nexp) ? cands[k].ped : -1);
        end
      end
    end
    if (nclip == 0 || nsib == 0) begin
      failures++;
      $display("FAIL clip=%0d sibling=%0d", nclip, nsib);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
