// tb_li_calc: random rows of r_bar, z_bar and parent paths into two
// instances (level 2, two products; level 0, three products) compared with
// L = z - sum r*s computed in 64-bit integers.
module automatic tb_li_calc;
  import kbest_ref_pkg::*;
  localparam int NT = 4, DW = 16, SW = 4, LW = 24;

  logic signed [DW-1:0] z_re, z_im;
  logic signed [DW-1:0] r_re [NT], r_im [NT];
  logic signed [SW-1:0] s_re [NT], s_im [NT];
  logic signed [LW-1:0] l2_re, l2_im, l0_re, l0_im;
  int checks = 0, failures = 0;

  li_calc #(.NT(NT), .LVL(2), .DW(DW), .SW(SW), .LW(LW)) dut2 (
    .z_re, .z_im, .r_re, .r_im, .s_re, .s_im, .l_re(l2_re), .l_im(l2_im));
  li_calc #(.NT(NT), .LVL(0), .DW(DW), .SW(SW), .LW(LW)) dut0 (
    .z_re, .z_im, .r_re, .r_im, .s_re, .s_im, .l_re(l0_re), .l_im(l0_im));

  function automatic longint rw();
    return longint'($signed(DW'($urandom)));
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint rr [MAXNT], ri [MAXNT];
    node_t  p;
    longint er, ei;
    for (int n = 0; n < 2000; n++) begin
      z_re = DW'(rw());
      z_im = DW'(rw());
      for (int j = 0; j < MAXNT; j++) begin
        rr[j] = 0; ri[j] = 0; p.re[j] = 0; p.im[j] = 0;
      end
      for (int j = 0; j < NT; j++) begin
        rr[j] = rw();
        ri[j] = rw();
        r_re[j] = DW'(rr[j]);
        r_im[j] = DW'(ri[j]);
        p.re[j] = 2 * int'($urandom_range(0, 7)) - 7;
        p.im[j] = 2 * int'($urandom_range(0, 7)) - 7;
        s_re[j] = SW'(p.re[j]);
        s_im[j] = SW'(p.im[j]);
      end
      #1;
      centre(longint'(z_re), longint'(z_im), rr, ri, p, 2, NT, er, ei);
      checks++;
      if (longint'(l2_re) != er || longint'(l2_im) != ei) begin
        failures++;
        $display("FAIL lvl2 got (%0d,%0d) exp (%0d,%0d)", l2_re, l2_im, er, ei);
      end
      centre(longint'(z_re), longint'(z_im), rr, ri, p, 0, NT, er, ei);
      checks++;
      if (longint'(l0_re) != er || longint'(l0_im) != ei) begin
        failures++;
        $display("FAIL lvl0 got (%0d,%0d) exp (%0d,%0d)", l0_re, l0_im, er, ei);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
