// tb_sorter1: random valid masks and PEDs (with deliberate duplicates)
// into a 40-entry Sorter1; the winner must be the lowest-index entry of
// lowest PED among the valid ones, found here by a plain scan.
module automatic tb_sorter1;
  localparam int N = 40, PW = 32;

  logic          valid [N];
  logic [PW-1:0] ped   [N];
  logic          min_valid;
  logic [5:0]    min_idx;
  logic [PW-1:0] min_ped;
  int checks = 0, failures = 0;

  sorter1 #(.N(N), .PW(PW)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int  bi = -1;
      int unsigned range = (t % 3 == 0) ? 16 : 32'hFFFF_FFFF;
      for (int n = 0; n < N; n++) begin
        valid[n] = (t % 50 == 0) ? 1'b0 : ($urandom_range(0, 3) != 0);
        ped[n]   = $urandom_range(0, range);
      end
      for (int n = 0; n < N; n++)
        if (valid[n] && (bi < 0 || ped[n] < ped[bi])) bi = n;
      #1;
      checks++;
      if (min_valid != (bi >= 0) || (bi >= 0 && (int'(min_idx) != bi || min_ped != ped[bi]))) begin
        failures++;
        $display("FAIL t=%0d got v=%b idx=%0d exp idx=%0d", t, min_valid, min_idx, bi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
