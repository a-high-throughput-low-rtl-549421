// tb_ped_calc: random parent PEDs, weights, centres and symbols against the
// reference PED recursion PED + e*|L-s|^2 (same fixed point), plus the
// saturation of a PED near its maximum.
module automatic tb_ped_calc;
  import kbest_ref_pkg::*;
  localparam int LW = 24, SW = 4, DW = 16, FRAC = 10, PW = 32;

  logic [PW-1:0] ped_in, ped_out;
  logic [DW-1:0] e;
  logic signed [LW-1:0] l_re, l_im;
  logic signed [SW-1:0] s_re, s_im;
  int checks = 0, failures = 0, nsat = 0;

  ped_calc #(.LW(LW), .SW(SW), .DW(DW), .FRAC(FRAC), .PW(PW)) dut (.*);

  task automatic try(longint pin, longint ev, longint lr, longint li, int sr, int si);
    longint exp;
    ped_in = PW'(pin);
    e = DW'(ev);
    l_re = LW'(lr);
    l_im = LW'(li);
    s_re = SW'(sr);
    s_im = SW'(si);
    #1;
    exp = ped(pin, ev, lr, li, sr, si, FRAC, PW);
    if (exp == (longint'(1) << PW) - 1) nsat++;
    checks++;
    if (longint'(ped_out) != exp) begin
      failures++;
      $display("FAIL pin=%0d e=%0d L=(%0d,%0d) s=(%0d,%0d): %0d exp %0d",
               pin, ev, lr, li, sr, si, ped_out, exp);
    end
  endtask

  function automatic int rsym();
    return 2 * int'($urandom_range(0, 7)) - 7;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    try(0, 1 << FRAC, 0, 0, 1, 1);                // |(-1,-1)|^2 = 2
    checks++;
    if (ped_out != 32'(2 << FRAC)) begin
      failures++;
      $display("FAIL hand case: %0d", ped_out);
    end
    for (int n = 0; n < 3000; n++)
      try($urandom_range(0, 1 << 20), $urandom_range(0, 65535),
          longint'($signed($urandom_range(0, 40 << FRAC))) - (20 << FRAC),
          longint'($signed($urandom_range(0, 40 << FRAC))) - (20 << FRAC),
          rsym(), rsym());
    for (int n = 0; n < 20; n++)
      try(longint'(32'hFFFF_0000) + $urandom_range(0, 65535), 65535,
          -(20 << FRAC), 20 << FRAC, 7, -7);
    if (nsat == 0) begin
      failures++;
      $display("FAIL saturation never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
