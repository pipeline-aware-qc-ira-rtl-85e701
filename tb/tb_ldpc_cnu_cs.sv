// tb_ldpc_cnu_cs: exhaustive check of the compare-and-select cell over all
// pairs of 5-bit magnitudes, with random edge indices.
module tb_ldpc_cnu_cs;
  logic [4:0] mag_a, mag_b, min1, min2;
  logic [2:0] idx_a, idx_b, idx;
  int checks = 0, failures = 0;

  ldpc_cnu_cs dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 32; a++) begin
      for (int b = 0; b < 32; b++) begin
        int e1, e2, ei;
        mag_a = 5'(a); mag_b = 5'(b);
        idx_a = 3'($urandom); idx_b = 3'($urandom);
        #1;
        e1 = (a <= b) ? a : b;
        e2 = (a <= b) ? b : a;
        ei = (a <= b) ? int'(idx_a) : int'(idx_b);
        checks++;
        if (int'(min1) != e1 || int'(min2) != e2 || int'(idx) != ei) begin
          failures++;
          if (failures < 5) $display("a=%0d b=%0d -> %0d %0d %0d", a, b, min1, min2, idx);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
