// sorter1: finds the valid entry of lowest PED among N entries.
//
// A linear compare chain over the entries; on equal PEDs the lower index
// wins, so the choice is deterministic. min_valid is low when no entry is
// valid. Purely combinational: the list that feeds it and the bank that
// takes its winner are registered.
//
// Sorter1 is named in the architecture; the linear search and the tie
// rule are this design's own.
module sorter1 #(
  parameter int N  = 40,
  parameter int PW = 32
) (
  input  logic          valid [N],
  input  logic [PW-1:0] ped   [N],
  output logic          min_valid,
  output logic [$clog2(N > 1 ? N : 2)-1:0] min_idx,
  output logic [PW-1:0] min_ped
);
  localparam int IW = $clog2(N > 1 ? N : 2);

  always_comb begin
    min_valid = 1'b0;
    min_idx   = '0;
    min_ped   = '1;
    for (int n = 0; n < N; n++) begin
      if (valid[n] && (!min_valid || ped[n] < min_ped)) begin
        min_valid = 1'b1;
        min_idx   = IW'(n);
        min_ped   = ped[n];
      end
    end
  end
endmodule
