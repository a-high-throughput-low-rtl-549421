// control_unit: frame timing and channel-data distribution for the layer
// pipeline.
//
// The detector is a pipeline of NT layers, each working on a different
// received vector. Time is cut into frames of FRAME cycles. In the last
// cycle of a frame the unit accepts a new vector (in_ready is high then;
// the vector is taken if in_valid is high) and shifts its stage registers:
// stage NT-1 receives the new z_bar, r_bar and e, and stage lvl receives
// what stage lvl+1 held. Layer lvl reads row lvl of stage lvl, so each
// layer sees the channel data of the vector whose parents it receives.
// One cycle later start[lvl] pulses for every layer whose stage holds a
// valid vector. A vector therefore leaves layer 1 NT frames after it was
// accepted, and one vector is accepted per frame.
//
// r_bar[i][j] is row i, column j of R divided by r_ii (only j > i is used),
// z_bar[i] = (Q^H y)_i / r_ii and e[i] = r_ii^2. The frame scheme, the
// one-cycle accept window and the data layout are this design's own.
module control_unit #(
  parameter int NT    = kbest_pkg::DEF_NT,
  parameter int DW    = kbest_pkg::DEF_DW,
  parameter int FRAME = 2 * kbest_pkg::DEF_K + 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [DW-1:0] z_re [NT],
  input  logic signed [DW-1:0] z_im [NT],
  input  logic signed [DW-1:0] r_re [NT][NT],
  input  logic signed [DW-1:0] r_im [NT][NT],
  input  logic        [DW-1:0] e    [NT],
  // per layer (index = tree level - 1)
  output logic                 start [NT],
  output logic signed [DW-1:0] lz_re [NT],
  output logic signed [DW-1:0] lz_im [NT],
  output logic signed [DW-1:0] lr_re [NT][NT],
  output logic signed [DW-1:0] lr_im [NT][NT],
  output logic        [DW-1:0] le    [NT]
);
  localparam int CW = $clog2(FRAME);

  logic [CW-1:0]        cnt;
  logic                 advance, start_q;
  logic                 sv   [NT];
  logic signed [DW-1:0] sz_re [NT][NT];
  logic signed [DW-1:0] sz_im [NT][NT];
  logic signed [DW-1:0] sr_re [NT][NT][NT];
  logic signed [DW-1:0] sr_im [NT][NT][NT];
  logic        [DW-1:0] se    [NT][NT];

  assign advance  = (cnt == CW'(FRAME - 1));
  assign in_ready = advance;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      start_q <= 1'b0;
      for (int s = 0; s < NT; s++) begin
        sv[s] <= 1'b0;
        for (int i = 0; i < NT; i++) begin
          sz_re[s][i] <= '0;
          sz_im[s][i] <= '0;
          se[s][i]    <= '0;
          for (int j = 0; j < NT; j++) begin
            sr_re[s][i][j] <= '0;
            sr_im[s][i][j] <= '0;
          end
        end
      end
    end else begin
      cnt     <= advance ? '0 : cnt + 1'b1;
      start_q <= advance;
      if (advance) begin
        sv[NT-1]    <= in_valid;
        sz_re[NT-1] <= z_re;
        sz_im[NT-1] <= z_im;
        sr_re[NT-1] <= r_re;
        sr_im[NT-1] <= r_im;
        se[NT-1]    <= e;
        for (int s = 0; s < NT - 1; s++) begin
          sv[s]    <= sv[s+1];
          sz_re[s] <= sz_re[s+1];
          sz_im[s] <= sz_im[s+1];
          sr_re[s] <= sr_re[s+1];
          sr_im[s] <= sr_im[s+1];
          se[s]    <= se[s+1];
        end
      end
    end
  end

  always_comb begin
    for (int l = 0; l < NT; l++) begin
      start[l] = start_q && sv[l];
      lz_re[l] = sz_re[l][l];
      lz_im[l] = sz_im[l][l];
      le[l]    = se[l][l];
      for (int j = 0; j < NT; j++) begin
        lr_re[l][j] = sr_re[l][l][j];
        lr_im[l][j] = sr_im[l][l][j];
      end
    end
  end
endmodule
