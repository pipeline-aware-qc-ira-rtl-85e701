// ldpc_r_mem: storage of the check-to-variable messages, one word per layer
// holding the DEG messages of each of the Q check rows (12 x 84 x 7 x 6 bits
// by default).
//
// One synchronous read port and one write port. The read port is clocked
// together with the mux register, so the messages of a layer arrive in
// section A alongside its LLRs; rd_zero returns all-zero messages instead,
// which is how the first iteration starts without clearing the memory. The
// write port stores the new messages of the layer leaving section B. A layer
// is read again only twelve layers after it was written, so the ports never
// touch the same word in one cycle.
//
// The published design places these messages in its "memory" block; the uncompressed
// per-edge storage and the port arrangement are this design's choices.
module ldpc_r_mem
  import ldpc_pkg::*;
(
  input  logic   clk,
  input  logic   rd_en,
  input  logic   rd_zero,
  input  layer_t rd_layer,
  output rslots_t rd_data,
  input  logic   wr_en,
  input  layer_t wr_layer,
  input  rslots_t wr_data
);

  rslots_t mem [LAYERS];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_layer] <= wr_data;
    if (rd_en) rd_data <= rd_zero ? '0 : mem[rd_layer];
  end

endmodule
