// sorter2_shifter: a register bank that keeps up to K nodes sorted by PED.
//
// An inserted node goes to the position after every stored node whose PED
// is lower or equal (stable order); the nodes behind it shift down by one
// and the last one falls off when the bank is full. A node worse than every
// entry of a full bank is dropped. In the layers the nodes arrive from
// Sorter1 already in non-decreasing order, so insertion is at the tail,
// but the bank sorts any order. 'clear' empties it; clear wins over ins.
// Each node carries a PAYW-bit payload (its symbol path). One insertion
// per clock, result visible the next cycle.
//
// Sorter2 & Shifter is named in the architecture; the insertion-sort
// register bank is this design's reading of that name.
module sorter2_shifter #(
  parameter int K    = 10,
  parameter int PW   = 32,
  parameter int PAYW = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,
  input  logic            ins,
  input  logic [PW-1:0]   ins_ped,
  input  logic [PAYW-1:0] ins_pay,
  output logic            q_valid [K],
  output logic [PW-1:0]   q_ped   [K],
  output logic [PAYW-1:0] q_pay   [K]
);
  logic goes_before [K];   // new node ranks ahead of entry k
  logic prev_before [K];   // new node ranks ahead of entry k-1

  always_comb begin
    for (int k = 0; k < K; k++)
      goes_before[k] = !q_valid[k] || (ins_ped < q_ped[k]);
    prev_before[0] = 1'b0;
    for (int k = 1; k < K; k++)
      prev_before[k] = goes_before[k-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < K; k++) begin
        q_valid[k] <= 1'b0;
        q_ped[k]   <= '0;
        q_pay[k]   <= '0;
      end
    end else if (clear) begin
      for (int k = 0; k < K; k++) q_valid[k] <= 1'b0;
    end else if (ins) begin
      // entries behind the insertion point shift down by one
      for (int k = 1; k < K; k++) begin
        if (prev_before[k]) begin
          q_valid[k] <= q_valid[k-1];
          q_ped[k]   <= q_ped[k-1];
          q_pay[k]   <= q_pay[k-1];
        end
      end
      // the insertion point itself
      for (int k = 0; k < K; k++) begin
        if (goes_before[k] && !prev_before[k]) begin
          q_valid[k] <= 1'b1;
          q_ped[k]   <= ins_ped;
          q_pay[k]   <= ins_pay;
        end
      end
    end
  end
endmodule
