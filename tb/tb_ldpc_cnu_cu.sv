// tb_ldpc_cnu_cu: checks the compare unit. Two random multisets of magnitudes
// are reduced to (first minimum, second minimum, index) directly, merged by
// the unit, and compared with the same reduction over their union.
module tb_ldpc_cnu_cu;
  logic [4:0] min1_a, min2_a, min1_b, min2_b, min1, min2;
  logic [2:0] idx_a, idx_b, idx;
  int checks = 0, failures = 0;

  ldpc_cnu_cu dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 5000; rep++) begin
      int m [4];
      int e1, e2, ei;
      // edges 0,1 on side a, edges 2,3 on side b; a small range forces ties
      for (int k = 0; k < 4; k++) m[k] = (rep < 2500) ? $urandom_range(0, 5) : $urandom_range(0, 31);
      min1_a = 5'((m[0] <= m[1]) ? m[0] : m[1]);
      min2_a = 5'((m[0] <= m[1]) ? m[1] : m[0]);
      idx_a  = (m[0] <= m[1]) ? 3'd0 : 3'd1;
      min1_b = 5'((m[2] <= m[3]) ? m[2] : m[3]);
      min2_b = 5'((m[2] <= m[3]) ? m[3] : m[2]);
      idx_b  = (m[2] <= m[3]) ? 3'd2 : 3'd3;
      #1;
      e1 = 99; ei = 0;
      for (int k = 0; k < 4; k++) if (m[k] < e1) begin e1 = m[k]; ei = k; end
      e2 = 99;
      for (int k = 0; k < 4; k++) if (k != ei && m[k] < e2) e2 = m[k];
      checks++;
      if (int'(min1) != e1 || int'(min2) != e2 || (m[int'(idx)] != e1)) begin
        failures++;
        if (failures < 5) $display("%0d %0d %0d %0d -> %0d %0d %0d", m[0], m[1], m[2], m[3], min1, min2, idx);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
