// tb_control_unit: offers tagged vectors (with bubbles) to the control
// unit. in_ready must be high exactly one cycle in every FRAME; in the
// cycle after each accept window start[l] must pulse exactly for the
// layers whose vector is valid, and layer l must see row l of the vector
// accepted NT-1-l frames before, held stable through the whole frame.
module automatic tb_control_unit;
  localparam int NT = 4, DW = 16, FRAME = 22;

  logic                 clk = 0, rst_n = 0, in_valid = 0, in_ready;
  logic signed [DW-1:0] z_re [NT], z_im [NT];
  logic signed [DW-1:0] r_re [NT][NT], r_im [NT][NT];
  logic        [DW-1:0] e [NT];
  logic                 start [NT];
  logic signed [DW-1:0] lz_re [NT], lz_im [NT];
  logic signed [DW-1:0] lr_re [NT][NT], lr_im [NT][NT];
  logic        [DW-1:0] le [NT];
  int checks = 0, failures = 0, nbubble = 0;

  control_unit #(.NT(NT), .DW(DW), .FRAME(FRAME)) dut (.*);

  always #5 clk = ~clk;

  task automatic drive(int tag);
    for (int i = 0; i < NT; i++) begin
      z_re[i] = DW'(tag * 8 + i);
      z_im[i] = DW'(-(tag * 8 + i));
      e[i]    = DW'(tag * 4 + i);
      for (int j = 0; j < NT; j++) begin
        r_re[i][j] = DW'(tag * 64 + i * 8 + j);
        r_im[i][j] = DW'(-(tag * 64 + i * 8 + j));
      end
    end
  endtask

  function automatic bit row_ok(int l, int tag);
    bit ok = (lz_re[l] == DW'(tag * 8 + l)) && (lz_im[l] == DW'(-(tag * 8 + l))) &&
             (le[l] == DW'(tag * 4 + l));
    for (int j = 0; j < NT; j++)
      ok &= (lr_re[l][j] == DW'(tag * 64 + l * 8 + j)) && (lr_im[l][j] == DW'(-(tag * 64 + l * 8 + j)));
    return ok;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit hv[$];
    int ht[$];
    int last_ready = -1, cyc = 0;
    drive(0);
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 40; f++) begin
      bit v = (f % 7 != 3);
      int tag = f + 1;
      in_valid = v;
      drive(tag);
      // wait for the accept window
      while (!in_ready) begin
        checks++;
        for (int l = 0; l < NT; l++)
          if (start[l] && !(cyc == last_ready + 1)) begin
            failures++;
            $display("FAIL start outside the frame boundary");
          end
        @(negedge clk);
        cyc++;
      end
      checks++;
      if (last_ready >= 0 && cyc - last_ready != FRAME) begin
        failures++;
        $display("FAIL in_ready period %0d", cyc - last_ready);
      end
      last_ready = cyc;
      hv.push_front(v);
      ht.push_front(tag);
      if (!v) nbubble++;
      @(negedge clk);
      cyc++;
      in_valid = 0;
      drive(999);
      // starts and data for this frame
      for (int l = 0; l < NT; l++) begin
        int age = NT - 1 - l;
        bit ev = (age < hv.size()) ? hv[age] : 0;
        checks++;
        if (start[l] != ev) begin
          failures++;
          $display("FAIL frame %0d layer %0d: start=%b expected %b", f, l, start[l], ev);
        end
        if (ev) begin
          checks++;
          if (!row_ok(l, ht[age])) begin
            failures++;
            $display("FAIL frame %0d layer %0d: wrong row", f, l);
          end
        end
      end
      // data must stay put through the frame
      repeat (FRAME - 2) begin
        @(negedge clk);
        cyc++;
      end
      for (int l = 0; l < NT; l++) begin
        int age = NT - 1 - l;
        if (age < hv.size() && hv[age]) begin
          checks++;
          if (!row_ok(l, ht[age])) begin
            failures++;
            $display("FAIL frame %0d layer %0d: row changed during the frame", f, l);
          end
        end
      end
    end
    if (nbubble == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
