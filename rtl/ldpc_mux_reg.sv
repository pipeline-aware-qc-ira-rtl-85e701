// ldpc_mux_reg: the "mux with registered outputs" at the head of section A.
//
// For the layer about to enter section A (sel_layer), each of the seven slots
// selects the block column the base matrix places there and captures its Q
// LLRs in a register, together with the rotation the switch network must
// apply to them (from DELTA_FIRST in the first iteration, DELTA_STEADY after).
//
// Bypass: in the same cycle, section B is writing back the results of the
// layer two ahead of sel_layer (byp_layer). That layer may share columns with
// sel_layer, and its new values reach the memory only at the same clock edge,
// so for such a column the register takes section B's fresh value instead of
// the memory's. The layer in between (now in section A) shares no column with
// sel_layer by construction of the pipeline-aware code, so no other hazard
// exists. The bypass path follows the feedback from the adders to this mux in
// the published decoder diagram; the select logic is this design's.
//
// Timing: pa_data and pa_delta update at the clock edge where load is high.
module ldpc_mux_reg
  import ldpc_pkg::*;
(
  input  logic                 clk,
  input  logic                 load,
  input  layer_t               sel_layer,
  input  logic                 first_iter,
  input  blk_t [NCOL-1:0]      mem_cols,
  input  logic                 byp_valid,
  input  layer_t               byp_layer,
  input  slots_t               byp_data,
  output slots_t               pa_data,
  output shift_t [DEG-1:0]     pa_delta
);

  slots_t           nxt_data;
  shift_t [DEG-1:0] nxt_delta;

  always_comb begin
    for (int s = 0; s < DEG; s++) begin
      col_t c;
      c            = BASE[sel_layer][s].col;
      nxt_data[s]  = mem_cols[c];
      nxt_delta[s] = first_iter ? DELTA_FIRST[sel_layer][s] : DELTA_STEADY[sel_layer][s];
      for (int t = 0; t < DEG; t++)
        if (byp_valid && BASE[byp_layer][t].col == c) nxt_data[s] = byp_data[t];
    end
  end

  always_ff @(posedge clk) begin
    if (load) begin
      pa_data  <= nxt_data;
      pa_delta <= nxt_delta;
    end
  end

endmodule
