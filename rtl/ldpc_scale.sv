// ldpc_scale: normalisation of a check-to-variable message by alpha = 0.75.
//
// The magnitude is scaled with a shift-and-add, (m >> 1) + (m >> 2), which
// rounds toward zero, and the sign is then applied to give a two's complement
// message. Purely combinational. The factor 0.75 is the published design's; the
// shift-and-add rounding is this design's choice.
module ldpc_scale #(
  parameter int W = 6
) (
  input  logic [W-2:0] mag,
  input  logic         sign,
  output logic [W-1:0] r_out
);

  logic [W-2:0] scaled;

  always_comb begin
    scaled = (mag >> 1) + (mag >> 2);
    r_out  = sign ? W'(-$signed({1'b0, scaled})) : {1'b0, scaled};
  end

endmodule
