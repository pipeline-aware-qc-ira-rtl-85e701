// tb_ldpc_cnu: checks the pipelined check node unit. Random degree-7 message
// vectors (in the symmetric 6-bit range, many with ties) are applied one per
// cycle; one cycle later each edge must carry the minimum magnitude over the
// other six edges and the parity of their signs.
module tb_ldpc_cnu;
  localparam int DEG = 7, W = 6;
  logic clk = 1'b0;
  logic en  = 1'b0;
  logic [DEG-1:0][W-1:0] l_in = '0;
  logic [DEG-1:0][W-2:0] r_mag;
  logic [DEG-1:0]        r_sign;
  int checks = 0, failures = 0;

  ldpc_cnu #(.DEG(DEG), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int prev [DEG];
  bit have_prev = 1'b0;

  initial begin
    for (int rep = 0; rep < 3000; rep++) begin
      int cur [DEG];
      @(negedge clk);
      // compare outputs for the vector captured at the last edge
      if (have_prev) begin
        for (int e = 0; e < DEG; e++) begin
          int m, sg;
          m = 99; sg = 0;
          for (int t = 0; t < DEG; t++) if (t != e) begin
            int a;
            a = prev[t] < 0 ? -prev[t] : prev[t];
            if (a < m) m = a;
            if (prev[t] < 0) sg ^= 1;
          end
          checks++;
          if (int'(r_mag[e]) != m || int'(r_sign[e]) != sg) begin
            failures++;
            if (failures < 5) $display("rep %0d edge %0d: %0d/%0d expected %0d/%0d", rep, e, r_mag[e], r_sign[e], m, sg);
          end
        end
      end
      // hold: with en low nothing may change
      if (rep % 10 == 9) begin
        en = 1'b0;
        for (int e = 0; e < DEG; e++) l_in[e] = W'($urandom);
        @(negedge clk);
        continue;
      end
      for (int e = 0; e < DEG; e++) begin
        cur[e] = (rep % 2) ? $urandom_range(0, 8) - 4 : $urandom_range(0, 62) - 31;
        l_in[e] = W'(cur[e]);
        prev[e] = cur[e];
      end
      en = 1'b1;
      have_prev = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
