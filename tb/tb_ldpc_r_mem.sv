// tb_ldpc_r_mem: checks the check-message memory: every layer is written with
// random data, then read back in random order (one-cycle read latency), with
// rd_zero forcing zeros and rd_en low holding the last read value.
module tb_ldpc_r_mem;
  import ldpc_pkg::*;
  logic    clk = 1'b0;
  logic    rd_en = 1'b0, rd_zero = 1'b0, wr_en = 1'b0;
  layer_t  rd_layer = '0, wr_layer = '0;
  rslots_t rd_data, wr_data = '0;
  rslots_t shadow [LAYERS];
  int checks = 0, failures = 0;

  ldpc_r_mem dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic rslots_t rnd();
    rslots_t d;
    for (int s = 0; s < DEG; s++) for (int r = 0; r < Q; r++) d[s][r] = msg_t'($urandom);
    return d;
  endfunction

  initial begin
    for (int pass = 0; pass < 3; pass++) begin
      for (int l = 0; l < LAYERS; l++) begin
        rslots_t d;
        d = rnd();
        @(negedge clk);
        wr_en = 1'b1; wr_layer = layer_t'(l); wr_data = d; shadow[l] = d;
      end
      @(negedge clk);
      wr_en = 1'b0;
      for (int k = 0; k < 40; k++) begin
        int l;
        bit z;
        rslots_t hold;
        l = $urandom_range(0, LAYERS - 1);
        z = ($urandom_range(0, 3) == 0);
        rd_en = 1'b1; rd_layer = layer_t'(l); rd_zero = z;
        @(negedge clk);
        checks++;
        if (rd_data != (z ? '0 : shadow[l])) begin failures++; $display("read layer %0d zero %0d wrong", l, z); end
        hold = rd_data;
        rd_en = 1'b0; rd_layer = layer_t'((l + 1) % LAYERS); rd_zero = 1'b0;
        @(negedge clk);
        checks++;
        if (rd_data != hold) begin failures++; $display("rd_en low did not hold"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
