// ldpc_sn: switch network (cyclic shifter) for one block column of messages.
//
// Rotates a vector of Q messages so that dout[i] = din[(i + shift) mod Q].
// The decoder has one such network per layer slot (seven in all); it aligns
// the stored LLRs of a block column with the check rows of the layer being
// processed. The rotation is built as a logarithmic barrel shifter: stage k
// rotates by 2^k mod Q when bit k of the shift is set, and because rotations
// modulo Q compose by addition, the stages together rotate by the shift.
// The shift must be below Q.
//
// Purely combinational. Width and size are parameters; the defaults are the
// circulant size 84 and the decoder's 8-bit a-posteriori LLRs. The barrel structure is this design's
// choice: the published design only names the block and its job.
module ldpc_sn #(
  parameter int Q   = 84,
  parameter int W   = 8,
  parameter int SHW = $clog2(Q)
) (
  input  logic [Q-1:0][W-1:0] din,
  input  logic [SHW-1:0]      shift,
  output logic [Q-1:0][W-1:0] dout
);

  logic [Q-1:0][W-1:0] stage [SHW+1];

  assign stage[0] = din;

  for (genvar k = 0; k < SHW; k++) begin : g_stage
    localparam int AMT = (1 << k) % Q;
    for (genvar i = 0; i < Q; i++) begin : g_lane
      assign stage[k+1][i] = shift[k] ? stage[k][(i + AMT) % Q] : stage[k][i];
    end
  end

  assign dout = stage[SHW];

endmodule
