// tb_ldpc_app_mem: checks the LLR memory. All 24 columns are loaded, then
// random layers are written back (the seven columns of the layer, taken from
// the base matrix, change and no others), mixed with further loads. The
// natural-order view must equal the stored words rotated back by each
// column's final shift: app_nat[c][v] = mem[c][(v - FINAL_SHIFT[c]) mod 84].
module tb_ldpc_app_mem;
  import ldpc_pkg::*;
  logic            clk = 1'b0;
  logic            load_we = 1'b0, wr_en = 1'b0;
  col_t            load_col = '0;
  blk_t            load_data = '0;
  layer_t          wr_layer = '0;
  slots_t          wr_data = '0;
  blk_t [NCOL-1:0] mem_cols, app_nat;
  blk_t            shadow [NCOL];
  int checks = 0, failures = 0;

  ldpc_app_mem dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic blk_t rnd();
    blk_t d;
    for (int v = 0; v < Q; v++) d[v] = llr_t'($urandom);
    return d;
  endfunction

  task automatic compare(string what);
    for (int c = 0; c < NCOL; c++) begin
      checks++;
      if (mem_cols[c] != shadow[c]) begin failures++; $display("%s: column %0d differs", what, c); end
      for (int v = 0; v < Q; v++) begin
        checks++;
        if (app_nat[c][v] != shadow[c][(v - int'(FINAL_SHIFT[c]) + Q) % Q]) begin
          failures++;
          if (failures < 5) $display("%s: app_nat[%0d][%0d]", what, c, v);
        end
      end
    end
  endtask

  initial begin
    for (int c = 0; c < NCOL; c++) begin
      blk_t d;
      d = rnd();
      @(negedge clk);
      load_we = 1'b1; load_col = col_t'(c); load_data = d; shadow[c] = d;
    end
    @(negedge clk);
    load_we = 1'b0;
    compare("after load");
    for (int k = 0; k < 60; k++) begin
      int l;
      slots_t d;
      l = $urandom_range(0, LAYERS - 1);
      for (int s = 0; s < DEG; s++) begin
        d[s] = rnd();
        shadow[int'(BASE[l][s].col)] = d[s];
      end
      wr_en = 1'b1; wr_layer = layer_t'(l); wr_data = d;
      @(negedge clk);
      wr_en = 1'b0;
      compare("after write-back");
      if (k % 7 == 3) begin
        int c;
        blk_t b;
        c = $urandom_range(0, NCOL - 1);
        b = rnd();
        load_we = 1'b1; load_col = col_t'(c); load_data = b; shadow[c] = b;
        @(negedge clk);
        load_we = 1'b0;
        compare("after reload");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
