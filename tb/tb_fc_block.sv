// tb_fc_block: drives random centres, inside and well outside the 64-QAM
// grid and exactly on decision boundaries, into the FC block and compares
// the first child with a nearest-point search over all odd coordinates.
// Also checks the limiter flags.
module automatic tb_fc_block;
  import kbest_ref_pkg::*;
  localparam int LW = 24, SW = 4, FRAC = 10, SQRT_M = 8;

  logic signed [LW-1:0] l_re, l_im;
  logic signed [SW-1:0] fc_re, fc_im;
  logic clipped_re, clipped_im;
  int checks = 0, failures = 0, nclip = 0;

  fc_block #(.LW(LW), .SW(SW), .FRAC(FRAC), .SQRT_M(SQRT_M)) dut (.*);

  task automatic try(longint xr, longint xi);
    int er, ei;
    bit cr, ci;
    l_re = LW'(xr);
    l_im = LW'(xi);
    #1;
    er = slice(xr, FRAC, SQRT_M);
    ei = slice(xi, FRAC, SQRT_M);
    cr = (xr >= (longint'(SQRT_M) << FRAC)) || (xr < -(longint'(SQRT_M) << FRAC));
    ci = (xi >= (longint'(SQRT_M) << FRAC)) || (xi < -(longint'(SQRT_M) << FRAC));
    checks += 2;
    if (int'(fc_re) != er || int'(fc_im) != ei) begin
      failures++;
      $display("FAIL L=(%0d,%0d) fc=(%0d,%0d) exp=(%0d,%0d)", xr, xi, fc_re, fc_im, er, ei);
    end
    if (clipped_re != cr || clipped_im != ci) begin
      failures++;
      $display("FAIL clip L=(%0d,%0d) got %b%b exp %b%b", xr, xi, clipped_re, clipped_im, cr, ci);
    end
    if (cr || ci) nclip++;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // decision boundaries at even integers and their neighbours
    for (int b = -10; b <= 10; b += 2) begin
      try(longint'(b) << FRAC, (longint'(b) << FRAC) - 1);
      try((longint'(b) << FRAC) + 1, longint'(b) << FRAC);
    end
    for (int n = 0; n < 2000; n++)
      try(longint'($signed($urandom_range(0, 40 << FRAC))) - (20 << FRAC),
          longint'($signed($urandom_range(0, 40 << FRAC))) - (20 << FRAC));
    if (nclip == 0) begin
      failures++;
      $display("FAIL limiter never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
