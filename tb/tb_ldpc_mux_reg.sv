// tb_ldpc_mux_reg: checks the mux register. With random memory contents and
// random section-B write-back data, random (layer, first-iteration, bypass
// layer, bypass on/off) combinations are loaded; each slot must hold the
// block column the base matrix names, taken from the write-back when the
// bypassed layer writes that column, and the rotation must equal the shift of
// the slot minus the shift of the same column in the most recent earlier layer
// that holds it (cyclically in steady state; within the iteration, else 0, in
// the first iteration), worked out here from the base matrix. With load low
// the register must hold.
module tb_ldpc_mux_reg;
  import ldpc_pkg::*;
  logic             clk = 1'b0;
  logic             load = 1'b0, first_iter = 1'b0, byp_valid = 1'b0;
  layer_t           sel_layer = '0, byp_layer = '0;
  blk_t [NCOL-1:0]  mem_cols = '0;
  slots_t           byp_data = '0, pa_data;
  shift_t [DEG-1:0] pa_delta;
  int checks = 0, failures = 0, n_byp = 0;

  ldpc_mux_reg dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int exp_delta(int l, int s, bit first);
    int c, prev;
    c = int'(BASE[l][s].col);
    prev = -1;
    for (int k = 1; k <= LAYERS && prev < 0; k++) begin
      int lp;
      if (first && l - k < 0) break;
      lp = (l - k + LAYERS) % LAYERS;
      for (int u = 0; u < DEG; u++) if (int'(BASE[lp][u].col) == c) prev = int'(BASE[lp][u].shift);
    end
    if (prev < 0) prev = 0;
    return (int'(BASE[l][s].shift) - prev + Q) % Q;
  endfunction

  initial begin
    for (int rep = 0; rep < 400; rep++) begin
      int l, bl;
      bit f, bv;
      slots_t           exp_d;
      shift_t [DEG-1:0] exp_s;
      @(negedge clk);
      for (int c = 0; c < NCOL; c++) for (int v = 0; v < Q; v++) mem_cols[c][v] = llr_t'($urandom);
      for (int s = 0; s < DEG; s++) for (int v = 0; v < Q; v++) byp_data[s][v] = llr_t'($urandom);
      l  = $urandom_range(0, LAYERS - 1);
      bl = (rep % 2) ? (l + LAYERS - 2) % LAYERS : $urandom_range(0, LAYERS - 1);
      f  = 1'($urandom_range(0, 1));
      bv = ($urandom_range(0, 3) != 0);
      sel_layer = layer_t'(l); first_iter = f; byp_layer = layer_t'(bl); byp_valid = bv;
      load = 1'b1;
      for (int s = 0; s < DEG; s++) begin
        int c;
        c = int'(BASE[l][s].col);
        exp_d[s] = mem_cols[c];
        for (int t = 0; t < DEG; t++)
          if (bv && int'(BASE[bl][t].col) == c) begin exp_d[s] = byp_data[t]; n_byp++; end
        exp_s[s] = shift_t'(exp_delta(l, s, f));
      end
      @(negedge clk);
      checks++;
      if (pa_data != exp_d || pa_delta != exp_s) begin
        failures++;
        if (failures < 5) $display("layer %0d first %0d bypass %0d/%0d wrong", l, f, bv, bl);
      end
      // hold
      load = 1'b0;
      sel_layer = layer_t'((l + 1) % LAYERS);
      @(negedge clk);
      checks++;
      if (pa_data != exp_d || pa_delta != exp_s) begin failures++; $display("load low did not hold"); end
    end
    checks++;
    if (n_byp == 0) begin failures++; $display("no bypass exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
