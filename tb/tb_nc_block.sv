// tb_nc_block: random centres into two NC blocks, one with RSE_NUM+1 = 4
// rows (inner layers) and one with all 8 rows (root layer). Every entry
// must sit in the FC column, the set of rows must be the nearest rows
// grown from the FC row, and each PED must match the reference recursion.
module automatic tb_nc_block;
  import kbest_ref_pkg::*;
  localparam int LW = 24, SW = 4, DW = 16, FRAC = 10, PW = 32, SQRT_M = 8;
  localparam int R4 = 4, R8 = 8;

  logic signed [LW-1:0] l_re, l_im;
  logic signed [SW-1:0] fc_re, fc_im;
  logic        [PW-1:0] ped_parent;
  logic        [DW-1:0] e;
  logic                 v4 [R4], v8 [R8];
  logic signed [SW-1:0] re4 [R4], im4 [R4], re8 [R8], im8 [R8];
  logic        [PW-1:0] p4 [R4], p8 [R8];
  int checks = 0, failures = 0, nedge = 0;

  nc_block #(.ROWS(R4), .LW(LW), .SW(SW), .DW(DW), .FRAC(FRAC), .PW(PW), .SQRT_M(SQRT_M)) dut4 (
    .l_re, .l_im, .fc_re, .fc_im, .ped_parent, .e,
    .c_valid(v4), .c_re(re4), .c_im(im4), .c_ped(p4));
  nc_block #(.ROWS(R8), .LW(LW), .SW(SW), .DW(DW), .FRAC(FRAC), .PW(PW), .SQRT_M(SQRT_M)) dut8 (
    .l_re, .l_im, .fc_re, .fc_im, .ped_parent, .e,
    .c_valid(v8), .c_re(re8), .c_im(im8), .c_ped(p8));


  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int q[$];
    for (int t = 0; t < 2000; t++) begin
      longint lr = longint'($signed($urandom_range(0, 24 << FRAC))) - (12 << FRAC);
      longint li = longint'($signed($urandom_range(0, 24 << FRAC))) - (12 << FRAC);
      int fr = slice(lr, FRAC, SQRT_M);
      int fi = slice(li, FRAC, SQRT_M);
      longint pp = $urandom_range(0, 1 << 20);
      longint ev = $urandom_range(256, 8192);
      l_re = LW'(lr); l_im = LW'(li);
      fc_re = SW'(fr); fc_im = SW'(fi);
      ped_parent = PW'(pp); e = DW'(ev);
      #1;
      // 4-row block
      near_rows(li, R4, SQRT_M, FRAC, q);
      checks++;
      for (int k = 0; k < R4; k++) begin
        bit ok = v4[k] && int'(re4[k]) == fr && int'(im4[k]) == q[k] &&
                 longint'(p4[k]) == ped(pp, ev, lr, li, fr, q[k], FRAC, PW);
        if (!ok) begin
          failures++;
          $display("FAIL R4 t=%0d k=%0d: v=%b (%0d,%0d) ped=%0d exp row %0d", t, k, v4[k],
                   re4[k], im4[k], p4[k], q[k]);
          break;
        end
      end
      // all-rows block: every row exactly once
      near_rows(li, R8, SQRT_M, FRAC, q);
      checks++;
      if (fi == 7 || fi == -7) nedge++;
      for (int k = 0; k < R8; k++) begin
        bit ok = v8[k] && int'(re8[k]) == fr && int'(im8[k]) == q[k] &&
                 longint'(p8[k]) == ped(pp, ev, lr, li, fr, q[k], FRAC, PW);
        if (!ok) begin
          failures++;
          $display("FAIL R8 t=%0d k=%0d", t, k);
          break;
        end
      end
      checks++;
      begin
        int seen = 0;
        for (int k = 0; k < R8; k++) seen |= 1 << ((int'(im8[k]) + 7) / 2);
        if (seen != 8'hFF) begin
          failures++;
          $display("FAIL R8 t=%0d rows not all covered %h", t, seen);
        end
      end
    end
    if (nedge == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
