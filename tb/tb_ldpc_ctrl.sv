// tb_ldpc_ctrl: checks the layer sequencer. After a start pulse the mux must
// be loaded with layers 0,1,..,11,0,.. (first_iter high for the first twelve),
// each loaded layer must appear in section A one cycle later and in section B
// one cycle after that, done must rise exactly 121 cycles after the start edge
// (12 layers x 10 iterations + 1), and a start while busy must be ignored.
module tb_ldpc_ctrl;
  import ldpc_pkg::*;
  logic   clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic   busy, done, mux_load, first_iter, a_valid, b_valid;
  layer_t sel_layer, a_layer, b_layer;
  int checks = 0, failures = 0;

  ldpc_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("%s", msg); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    chk(!busy && !done, "not idle after reset");
    for (int frame = 0; frame < 2; frame++) begin
      int cyc, loads;
      int exp_a, exp_b;
      start = 1'b1;
      #1;
      chk(mux_load && sel_layer == 0 && first_iter, "start does not load layer 0");
      @(negedge clk);
      start = 1'b0;
      cyc = 1; loads = 1;
      exp_a = 0; exp_b = -1;
      while (!done && cyc < 200) begin
        chk(a_valid == (loads <= ITER * LAYERS && exp_a >= 0), $sformatf("a_valid wrong at %0d", cyc));
        if (a_valid) chk(int'(a_layer) == exp_a % LAYERS, $sformatf("a_layer wrong at %0d", cyc));
        chk(b_valid == (exp_b >= 0), $sformatf("b_valid wrong at %0d", cyc));
        if (b_valid) chk(int'(b_layer) == exp_b % LAYERS, $sformatf("b_layer wrong at %0d", cyc));
        chk(busy, "not busy while decoding");
        if (cyc == 5) start = 1'b1;      // must be ignored
        if (mux_load) begin
          chk(int'(sel_layer) == loads % LAYERS, $sformatf("sel_layer wrong at %0d", cyc));
          chk(first_iter == (loads < LAYERS), $sformatf("first_iter wrong at %0d", cyc));
          loads++;
        end
        @(negedge clk);
        start = 1'b0;
        exp_b = (cyc <= ITER * LAYERS) ? cyc - 1 : -1;
        exp_a = (cyc < ITER * LAYERS) ? cyc : -1;
        cyc++;
      end
      // cyc - 1 clock edges have passed since the start edge
      chk(cyc - 1 == ITER * LAYERS + 1, $sformatf("done %0d cycles after start", cyc - 1));
      chk(loads == ITER * LAYERS, $sformatf("%0d layer loads", loads));
      chk(!busy, "busy after done");
      repeat (3) @(negedge clk);
      chk(done, "done not held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
