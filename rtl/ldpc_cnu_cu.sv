// ldpc_cnu_cu: compare unit (CU) of the check node unit.
//
// Merges two partial results (first minimum, second minimum, index of the
// first minimum), each covering a disjoint set of edges, into the result for
// the union: the new first minimum is the smaller first minimum, and the new
// second minimum is the smaller of the losing first minimum and the winning
// side's second minimum. A tie keeps side a. Purely combinational. The check
// node unit chains two levels of these after its pipeline register. The
// published design names the "CU stages"; the merge rule is the standard one for a
// two-minimum search and is this design's choice.
module ldpc_cnu_cu #(
  parameter int MW = 5,
  parameter int IW = 3
) (
  input  logic [MW-1:0] min1_a,
  input  logic [MW-1:0] min2_a,
  input  logic [IW-1:0] idx_a,
  input  logic [MW-1:0] min1_b,
  input  logic [MW-1:0] min2_b,
  input  logic [IW-1:0] idx_b,
  output logic [MW-1:0] min1,
  output logic [MW-1:0] min2,
  output logic [IW-1:0] idx
);

  always_comb begin
    if (min1_b < min1_a) begin
      min1 = min1_b;
      idx  = idx_b;
      min2 = (min1_a < min2_b) ? min1_a : min2_b;
    end else begin
      min1 = min1_a;
      idx  = idx_a;
      min2 = (min1_b < min2_a) ? min1_b : min2_a;
    end
  end

endmodule
