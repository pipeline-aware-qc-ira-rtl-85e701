// ldpc_cnu_cs: compare-and-select cell, the first stage of the check node unit.
//
// Takes two message magnitudes with their edge indices and returns the
// smaller (min1) with its index and the larger (min2). A tie selects input a.
// Purely combinational. In the decoder, four of these cells (the last one fed
// by a single edge and a saturated dummy) reduce the seven edges of a check
// row to four (min1, min2, index) groups before the pipeline register. The
// published design names the stage; the cell's insides are this design's choice.
module ldpc_cnu_cs #(
  parameter int MW = 5,
  parameter int IW = 3
) (
  input  logic [MW-1:0] mag_a,
  input  logic [IW-1:0] idx_a,
  input  logic [MW-1:0] mag_b,
  input  logic [IW-1:0] idx_b,
  output logic [MW-1:0] min1,
  output logic [MW-1:0] min2,
  output logic [IW-1:0] idx
);

  always_comb begin
    if (mag_b < mag_a) begin
      min1 = mag_b;
      min2 = mag_a;
      idx  = idx_b;
    end else begin
      min1 = mag_a;
      min2 = mag_b;
      idx  = idx_a;
    end
  end

endmodule
