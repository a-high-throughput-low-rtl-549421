// tb_layer_one: random channels and K random parents (sometimes only a few
// valid, sometimes none) into the last layer. s_hat must be a complete path
// whose PED is the smallest first-child PED over the valid parents, and
// out_valid must pulse once, K+2 clock edges after the edge that samples
// start, or not at
// all when no parent is valid.
module automatic tb_layer_one;
  import kbest_ref_pkg::*;
  localparam int NT = 4, SQRT_M = 8, K = 10, DW = 16, FRAC = 10, PW = 32, SW = 4;

  logic                 clk = 0, rst_n = 0, start = 0;
  logic signed [DW-1:0] z_re, z_im;
  logic signed [DW-1:0] r_re [NT], r_im [NT];
  logic        [DW-1:0] e;
  logic                 par_in_valid [K];
  logic        [PW-1:0] par_in_ped   [K];
  logic signed [SW-1:0] par_in_re    [K][NT];
  logic signed [SW-1:0] par_in_im    [K][NT];
  logic                 out_valid;
  logic signed [SW-1:0] s_hat_re [NT], s_hat_im [NT];
  logic        [PW-1:0] out_ped;
  logic                 ev_clip;
  int checks = 0, failures = 0, nclip = 0;

  layer_one #(.NT(NT), .SQRT_M(SQRT_M), .K(K), .DW(DW), .FRAC(FRAC), .PW(PW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (ev_clip) nclip++;

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
    for (int t = 0; t < 300; t++) begin
      int cyc = 0, npulse = 0;
      int nvalid = (t % 10 == 9) ? 0 : (t % 5 == 4) ? 3 : K;
      ch = gen_vector(NT, SQRT_M, FRAC, (t % 4 == 0) ? (6 << FRAC) : 400);
      par.delete();
      @(negedge clk);
      for (int k = 0; k < K; k++) begin
        node_t p;
        for (int j = 0; j < MAXNT; j++) begin
          p.re[j] = (j > 0 && j < NT) ? rand_sym(SQRT_M) : 0;
          p.im[j] = (j > 0 && j < NT) ? rand_sym(SQRT_M) : 0;
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
      last_cands(par, NT, ch.z_re[0], ch.z_im[0], ch.r_re[0], ch.r_im[0], ch.e[0], SQRT_M,
                 FRAC, PW, cands);
      z_re = DW'(ch.z_re[0]);
      z_im = DW'(ch.z_im[0]);
      e = DW'(ch.e[0]);
      for (int j = 0; j < NT; j++) begin
        r_re[j] = DW'(ch.r_re[0][j]);
        r_im[j] = DW'(ch.r_im[0][j]);
      end
      start = 1;
      @(negedge clk);
      start = 0;
      repeat (K + 4) begin
        cyc++;
        if (out_valid) begin
          npulse++;
          checks++;
          if (cyc - 1 != K + 2) begin
            failures++;
            $display("FAIL t=%0d: result %0d edges after start, expected %0d", t, cyc - 1, K + 2);
          end
          got.ped = longint'(out_ped);
          for (int j = 0; j < MAXNT; j++) begin
            got.re[j] = (j < NT) ? int'(s_hat_re[j]) : 0;
            got.im[j] = (j < NT) ? int'(s_hat_im[j]) : 0;
          end
          checks++;
          if (nvalid == 0 || got.ped != cands[0].ped || !has_node(cands, got, 0, NT)) begin
            failures++;
            $display("FAIL t=%0d: ped=%0d exp %0d", t, got.ped, (nvalid > 0) ? cands[0].ped : -1);
          end
        end
        @(negedge clk);
      end
      checks++;
      if (npulse != ((nvalid > 0) ? 1 : 0)) begin
        failures++;
        $display("FAIL t=%0d: %0d result pulses", t, npulse);
      end
    end
    if (nclip == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
