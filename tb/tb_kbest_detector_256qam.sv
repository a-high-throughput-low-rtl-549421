// tb_kbest_detector_256qam: the end-to-end test of tb_kbest_detector run on
// the 256-QAM configuration (SQRT_M=16). The input word is widened to 18 bits
// (range +-128) because 256-QAM centres exceed the +-32 of the default
// 16-bit word; everything else is at its default. A 16-point row cannot be
// used up by K=10 pops, so row exhaustion is not required here.
//
// Random channels and symbols are generated here; each accepted vector is
// detected by the bit-true reference model and the detector's s_hat and
// PED must match it exactly. Low-noise vectors must also return the
// transmitted symbols. Vectors are offered back to back with occasional
// idle frames, so NT vectors are in flight at once. Timing checks: one
// accept window per frame of 2K+2 cycles, and every result exactly
// (NT-1)*FRAME + K + 3 clock edges after its accept edge. Mechanisms
// counted (each must occur): full pipeline (all layers busy in one frame),
// idle frame, on-demand sibling visit in the root and in an inner layer,
// row exhaustion in the root layer, limiter clipping.
module automatic tb_kbest_detector_256qam;
  import kbest_ref_pkg::*;
  localparam int NT = kbest_pkg::DEF_NT, SQRT_M = 16, K = kbest_pkg::DEF_K;
  localparam int RSE_NUM = kbest_pkg::DEF_RSE_NUM, DW = 18;
  localparam int FRAC = kbest_pkg::DEF_FRAC, PW = kbest_pkg::DEF_PW;
  localparam int SW = kbest_pkg::sym_w(SQRT_M);
  localparam int FRAME = 2 * K + 2;
  localparam int LATENCY = (NT - 1) * FRAME + K + 3;
  localparam int NVEC = 120;

  logic                 clk = 0, rst_n = 0, in_valid = 0, in_ready;
  logic signed [DW-1:0] z_re [NT], z_im [NT];
  logic signed [DW-1:0] r_re [NT][NT], r_im [NT][NT];
  logic        [DW-1:0] e [NT];
  logic                 out_valid;
  logic signed [SW-1:0] s_hat_re [NT], s_hat_im [NT];
  logic        [PW-1:0] out_ped;

  kbest_detector #(.SQRT_M(SQRT_M), .DW(DW)) dut (.*);

  int checks = 0, failures = 0;
  int n_full = 0, n_idle = 0, n_sib_root = 0, n_sib_inner = 0, n_exhaust = 0, n_clip = 0;
  int n_clean = 0, n_out = 0;
  longint cycle = 0;

  node_t  exp_q[$];
  longint acc_q[$];
  bit     clean_q[$];
  node_t  tx_q[$];

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (dut.start[0] && dut.start[1] && dut.start[2] && dut.start[NT-1]) n_full++;
    if (dut.sib_nt) n_sib_root++;
    for (int l = 1; l < NT - 1; l++) if (dut.sib_mid[l]) n_sib_inner++;
    if (dut.u_layer_nt.pop && dut.u_layer_nt.min_valid && !dut.u_layer_nt.sib_valid) n_exhaust++;
    if (dut.clip_nt || dut.clip_one) n_clip++;
    for (int l = 1; l < NT - 1; l++) if (dut.clip_mid[l]) n_clip++;
  end

  // results
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      node_t  x;
      longint acc;
      bit     clean;
      node_t  tx;
      bit     same;
      n_out++;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected result");
      end else begin
        x = exp_q.pop_front();
        acc = acc_q.pop_front();
        clean = clean_q.pop_front();
        tx = tx_q.pop_front();
        if (cycle - acc != LATENCY) begin
          failures++;
          $display("FAIL latency %0d, expected %0d", cycle - acc, LATENCY);
        end
        same = (longint'(out_ped) == x.ped);
        for (int j = 0; j < NT; j++)
          same &= (int'(s_hat_re[j]) == x.re[j]) && (int'(s_hat_im[j]) == x.im[j]);
        checks++;
        if (!same) begin
          failures++;
          $display("FAIL result %0d: ped %0d exp %0d", n_out, out_ped, x.ped);
        end
        if (clean) begin
          bit ok = 1;
          for (int j = 0; j < NT; j++)
            ok &= (int'(s_hat_re[j]) == tx.re[j]) && (int'(s_hat_im[j]) == tx.im[j]);
          checks++;
          n_clean++;
          if (!ok) begin
            failures++;
            $display("FAIL result %0d: low-noise vector not recovered", n_out);
          end
        end
      end
    end
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
    node_t best;
    for (int i = 0; i < NT; i++) begin
      z_re[i] = '0; z_im[i] = '0; e[i] = '0;
      for (int j = 0; j < NT; j++) begin
        r_re[i][j] = '0;
        r_im[i][j] = '0;
      end
    end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int v = 0; v < NVEC; v++) begin
      bit idle = (v % 17 == 16);
      bit clean = (v % 3 == 0) && (v % 13 != 5);
      longint noise = clean ? 100 : (v % 5 == 1) ? (5 << FRAC) : (1 << FRAC);
      node_t tx;
      ch = gen_vector(NT, SQRT_M, FRAC, noise);
      // now and then a root centre far off the grid
      if (v % 13 == 5) ch.z_im[NT-1] = longint'(100) << FRAC;
      for (int i = 0; i < NT; i++) begin
        z_re[i] = DW'(ch.z_re[i]);
        z_im[i] = DW'(ch.z_im[i]);
        e[i]    = DW'(ch.e[i]);
        for (int j = 0; j < NT; j++) begin
          r_re[i][j] = DW'(ch.r_re[i][j]);
          r_im[i][j] = DW'(ch.r_im[i][j]);
        end
      end
      tx.re = ch.s_re;
      tx.im = ch.s_im;
      tx.ped = 0;
      in_valid = !idle;
      while (!in_ready) @(negedge clk);
      // accepted at the coming edge
      if (!idle) begin
        detect(ch, NT, SQRT_M, K, RSE_NUM + 1, FRAC, PW, best);
        exp_q.push_back(best);
        acc_q.push_back(cycle + 1);
        clean_q.push_back(clean);
        tx_q.push_back(tx);
      end else n_idle++;
      @(negedge clk);
      in_valid = 0;
    end
    repeat ((NT + 1) * FRAME) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", exp_q.size());
    end
    $display("results=%0d clean=%0d full=%0d idle=%0d sib_root=%0d sib_inner=%0d exhaust=%0d clip=%0d",
             n_out, n_clean, n_full, n_idle, n_sib_root, n_sib_inner, n_exhaust, n_clip);
    if (n_full == 0)      begin failures++; $display("FAIL pipeline never full"); end
    if (n_idle == 0)      begin failures++; $display("FAIL no idle frame"); end
    if (n_sib_root == 0)  begin failures++; $display("FAIL no sibling visit in the root layer"); end
    if (n_sib_inner == 0) begin failures++; $display("FAIL no sibling visit in an inner layer"); end
    if (n_clip == 0)      begin failures++; $display("FAIL limiter never clipped"); end
    if (n_clean == 0)     begin failures++; $display("FAIL no low-noise vector checked"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
