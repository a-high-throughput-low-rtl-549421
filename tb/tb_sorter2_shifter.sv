// tb_sorter2_shifter: inserts random nodes (random order, repeated PEDs,
// more nodes than slots) into a K=10 bank and after every insertion
// compares the bank with a reference list kept by a stable sort and cut to
// K. Checks clear as well.
module automatic tb_sorter2_shifter;
  localparam int K = 10, PW = 32, PAYW = 16;

  logic            clk = 0, rst_n = 0, clear = 0, ins = 0;
  logic [PW-1:0]   ins_ped;
  logic [PAYW-1:0] ins_pay;
  logic            q_valid [K];
  logic [PW-1:0]   q_ped   [K];
  logic [PAYW-1:0] q_pay   [K];
  int checks = 0, failures = 0, ndrop = 0;

  sorter2_shifter #(.K(K), .PW(PW), .PAYW(PAYW)) dut (.*);

  always #5 clk = ~clk;

  longint rp[$];
  int     ry[$];

  task automatic compare();
    checks++;
    for (int k = 0; k < K; k++) begin
      bit ev = k < rp.size();
      if (q_valid[k] != ev || (ev && (longint'(q_ped[k]) != rp[k] || int'(q_pay[k]) != ry[k]))) begin
        failures++;
        $display("FAIL slot %0d: v=%b ped=%0d pay=%0d", k, q_valid[k], q_ped[k], q_pay[k]);
        break;
      end
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ins_ped = '0;
    ins_pay = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 50; round++) begin
      @(negedge clk);
      clear = 1;
      @(negedge clk);
      clear = 0;
      rp.delete();
      ry.delete();
      compare();
      for (int n = 0; n < 25; n++) begin
        int pos;
        ins = 1;
        ins_ped = $urandom_range(0, (round % 2) ? 8 : 100000);
        ins_pay = PAYW'(round * 100 + n);
        @(negedge clk);
        ins = 0;
        // reference: stable insertion, truncate to K
        pos = 0;
        while (pos < rp.size() && rp[pos] <= longint'(ins_ped)) pos++;
        rp.insert(pos, longint'(ins_ped));
        ry.insert(pos, int'(ins_pay));
        if (rp.size() > K) begin
          void'(rp.pop_back());
          void'(ry.pop_back());
          ndrop++;
        end
        compare();
      end
    end
    if (ndrop == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
