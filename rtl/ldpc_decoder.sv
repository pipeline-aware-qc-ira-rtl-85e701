// ldpc_decoder: pipeline-aware layered min-sum decoder for the rate-1/2
// (2016,1008) QC-IRA-LDPC code of ldpc_pkg.
//
// The decoder is layer-parallel: every clock cycle one whole layer (84 check
// rows of weight 7) is processed, split over two pipeline sections.
//   Section A: the mux register holds the seven block columns of the layer's
//   LLRs; seven switch networks rotate them into row order; 84 row units
//   subtract the previous check messages (read from the message memory in
//   step with the mux) and run the compare-and-select stage of their check
//   node units.
//   Section B: after the pipeline register, two compare-unit stages finish the
//   check node units; new messages are scaled by 0.75, added back to give new
//   LLRs, and both are written to the memories. The new LLRs are also fed back
//   to the mux, which takes them directly when the layer two steps later needs
//   the same column.
// Because consecutive layers of the code share no block column, a layer can
// enter section A while its predecessor is still in section B.
//
// Interface: while idle, channel LLRs are written one block column per cycle
// (load_valid, load_col, load_llr; 6-bit two's complement, positive = bit 0,
// element v of a column is variable 84*col + v). A start pulse then decodes
// for ITERS iterations; done rises 121 cycles after the start edge (12 layers
// x 10 iterations + 1 pipeline cycle) and stays high until the next start.
// hard_bits and app_llr give the decision and final LLR of every code bit in
// natural order while done is high; bits 0..1007 are the information bits.
//
// The architecture (mux register, seven switch networks, subtract, CNU split
// by a pipeline register before two CU stages, scaling, add, memory, one
// layer per cycle) follows the published design. The load/start/done interface, the
// differential rotation of stored LLRs, the bypass logic, saturating
// arithmetic with 8-bit a-posteriori LLRs next to 6-bit channel LLRs and
// check messages, and the code's shift values are this design's choices.
module ldpc_decoder
  import ldpc_pkg::*;
#(
  parameter int ITERS = ITER
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load_valid,
  input  col_t             load_col,
  input  chan_blk_t        load_llr,
  input  logic             start,
  output logic             busy,
  output logic             done,
  output logic [N-1:0]     hard_bits,
  output blk_t [NCOL-1:0]  app_llr
);

  logic   mux_load, first_iter, a_valid, b_valid;
  layer_t sel_layer, a_layer, b_layer;

  ldpc_ctrl #(.ITERS(ITERS)) u_ctrl (
    .clk, .rst_n, .start, .busy, .done,
    .mux_load, .sel_layer, .first_iter,
    .a_valid, .a_layer, .b_valid, .b_layer
  );

  blk_t [NCOL-1:0] mem_cols;
  slots_t          p_wb;            // section B LLRs, slot/row order
  rslots_t         r_wb;            // section B check messages
  blk_t            load_ext;        // channel LLRs widened to LLR width

  for (genvar v = 0; v < Q; v++) begin : g_ext
    assign load_ext[v] = PW'(load_llr[v]);
  end

  ldpc_app_mem u_app_mem (
    .clk,
    .load_we   (load_valid && !busy),
    .load_col  (load_col),
    .load_data (load_ext),
    .wr_en     (b_valid),
    .wr_layer  (b_layer),
    .wr_data   (p_wb),
    .mem_cols  (mem_cols),
    .app_nat   (app_llr)
  );

  slots_t           pa_data;
  shift_t [DEG-1:0] pa_delta;

  ldpc_mux_reg u_mux (
    .clk,
    .load       (mux_load),
    .sel_layer  (sel_layer),
    .first_iter (first_iter),
    .mem_cols   (mem_cols),
    .byp_valid  (b_valid),
    .byp_layer  (b_layer),
    .byp_data   (p_wb),
    .pa_data    (pa_data),
    .pa_delta   (pa_delta)
  );

  rslots_t r_rd;

  ldpc_r_mem u_r_mem (
    .clk,
    .rd_en    (mux_load),
    .rd_zero  (first_iter),
    .rd_layer (sel_layer),
    .rd_data  (r_rd),
    .wr_en    (b_valid),
    .wr_layer (b_layer),
    .wr_data  (r_wb)
  );

  slots_t aligned;

  for (genvar s = 0; s < DEG; s++) begin : g_sn
    ldpc_sn #(.Q(Q), .W(PW), .SHW(SHW)) u_sn (
      .din   (pa_data[s]),
      .shift (pa_delta[s]),
      .dout  (aligned[s])
    );
  end

  for (genvar r = 0; r < Q; r++) begin : g_row
    logic [DEG-1:0][PW-1:0] p_in, p_new;
    logic [DEG-1:0][W-1:0]  r_old, r_new;
    for (genvar s = 0; s < DEG; s++) begin : g_slot
      assign p_in[s]     = aligned[s][r];
      assign r_old[s]    = r_rd[s][r];
      assign r_wb[s][r]  = r_new[s];
      assign p_wb[s][r]  = p_new[s];
    end
    ldpc_row #(.DEG(DEG), .W(W), .PW(PW)) u_row (
      .clk,
      .en    (a_valid),
      .p_in  (p_in),
      .r_old (r_old),
      .r_new (r_new),
      .p_new (p_new)
    );
  end

  for (genvar c = 0; c < NCOL; c++) begin : g_hard
    for (genvar v = 0; v < Q; v++) begin : g_bit
      assign hard_bits[c*Q + v] = app_llr[c][v][PW-1];
    end
  end

endmodule
