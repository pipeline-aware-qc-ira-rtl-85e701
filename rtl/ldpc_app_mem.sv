// ldpc_app_mem: storage of the a-posteriori LLRs, one Q-message word per
// block column (24 x 84 x 6 bits by default).
//
// Two write paths: the frame loader writes one block column of channel LLRs
// in natural order (load_we, load_col), and section B writes back the seven
// block columns of the layer it has just finished (wr_en, wr_layer), each in
// the rotation of that layer. The columns of one layer are distinct, so the
// seven write-backs never collide; a load and a write-back in the same cycle
// is not allowed (the controller accepts loads only while idle). All columns
// are readable at once (mem_cols) for the selecting mux.
//
// app_nat presents the contents rotated back into natural variable order
// using the rotation each column is left in after a complete iteration
// (FINAL_SHIFT); it is meaningful once decoding has finished. Because those
// rotations are constants this is wiring only.
//
// The published design shows a single "memory" block; splitting it into this LLR
// store and the check-message store, and the register-file realisation, are
// this design's choices.
module ldpc_app_mem
  import ldpc_pkg::*;
(
  input  logic             clk,
  input  logic             load_we,
  input  col_t             load_col,
  input  blk_t             load_data,
  input  logic             wr_en,
  input  layer_t           wr_layer,
  input  slots_t           wr_data,
  output blk_t [NCOL-1:0]  mem_cols,
  output blk_t [NCOL-1:0]  app_nat
);

  blk_t [NCOL-1:0] mem;

  always_ff @(posedge clk) begin
    if (load_we) mem[load_col] <= load_data;
    if (wr_en) begin
      for (int s = 0; s < DEG; s++) mem[BASE[wr_layer][s].col] <= wr_data[s];
    end
  end

  assign mem_cols = mem;

  // stored[i] holds variable (i + FINAL_SHIFT[c]) mod Q
  for (genvar c = 0; c < NCOL; c++) begin : g_col
    for (genvar v = 0; v < Q; v++) begin : g_var
      assign app_nat[c][v] = mem[c][(v - int'(FINAL_SHIFT[c]) + Q) % Q];
    end
  end

  always_ff @(posedge clk) begin
    assert (!(load_we && wr_en)) else $error("ldpc_app_mem: load during write-back");
  end

endmodule
