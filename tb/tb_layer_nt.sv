// tb_layer_nt: random received vectors into the root layer. The K parents
// it produces must carry the K smallest PEDs of all 64 root nodes, in
// order, each with a matching path; 'done' must rise K+1 clock edges after
// the edge that samples start (one load cycle, K pops). Noise is large enough that the
// limiter and row exhaustion both occur.
module automatic tb_layer_nt;
  import kbest_ref_pkg::*;
  localparam int NT = 4, SQRT_M = 8, K = 10, DW = 16, FRAC = 10, PW = 32, SW = 4;

  logic                 clk = 0, rst_n = 0, start = 0;
  logic signed [DW-1:0] z_re, z_im;
  logic        [DW-1:0] e;
  logic                 par_valid [K];
  logic        [PW-1:0] par_ped   [K];
  logic signed [SW-1:0] par_re    [K][NT];
  logic signed [SW-1:0] par_im    [K][NT];
  logic                 done, ev_clip, ev_sibling;
  int checks = 0, failures = 0, nclip = 0, nsib = 0;

  layer_nt #(.NT(NT), .SQRT_M(SQRT_M), .K(K), .DW(DW), .FRAC(FRAC), .PW(PW)) dut (.*);

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
    node_t root, par[$], cands[$], got;
    z_re = '0; z_im = '0; e = '0;
    for (int j = 0; j < MAXNT; j++) begin
      root.re[j] = 0;
      root.im[j] = 0;
    end
    root.ped = 0;
    par.push_back(root);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      int cyc = 0;
      ch = gen_vector(NT, SQRT_M, FRAC, (t % 4 == 0) ? (6 << FRAC) : 400);
      layer_cands(par, NT - 1, NT, ch.z_re[NT-1], ch.z_im[NT-1], ch.r_re[NT-1], ch.r_im[NT-1],
                  ch.e[NT-1], SQRT_M, SQRT_M, FRAC, PW, cands);
      @(negedge clk);
      z_re = DW'(ch.z_re[NT-1]);
      z_im = DW'(ch.z_im[NT-1]);
      e = DW'(ch.e[NT-1]);
      start = 1;
      @(negedge clk);
      start = 0;
      while (!done && cyc < 100) begin
        @(negedge clk);
        cyc++;
      end
      checks++;
      if (cyc != K + 1) begin
        failures++;
        $display("FAIL t=%0d: done %0d edges after start, expected %0d", t, cyc, K + 1);
      end
      for (int k = 0; k < K; k++) begin
        got.ped = longint'(par_ped[k]);
        for (int j = 0; j < MAXNT; j++) begin
          got.re[j] = (j < NT) ? int'(par_re[k][j]) : 0;
          got.im[j] = (j < NT) ? int'(par_im[k][j]) : 0;
        end
        checks++;
        if (!par_valid[k] || got.ped != cands[k].ped || !has_node(cands, got, NT - 1, NT)) begin
          failures++;
          $display("FAIL t=%0d slot %0d: v=%b ped=%0d exp %0d", t, k, par_valid[k], got.ped,
                   cands[k].ped);
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
