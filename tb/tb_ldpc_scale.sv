// tb_ldpc_scale: exhaustive check of the 0.75 scaling for every magnitude and
// sign: the result must be +-floor(3m/4) computed as floor(m/2)+floor(m/4),
// which equals floor(3m/4) except when m mod 4 = 3, where it is one less.
module tb_ldpc_scale;
  logic [4:0] mag;
  logic       sign;
  logic [5:0] r_out;
  int checks = 0, failures = 0;

  ldpc_scale dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 32; m++) begin
      for (int s = 0; s < 2; s++) begin
        int e;
        mag = 5'(m); sign = 1'(s);
        #1;
        e = (3 * m) / 4;
        if (m % 4 == 3) e = e - 1;
        if (s == 1) e = -e;
        checks++;
        if (int'($signed(r_out)) != e) begin
          failures++;
          $display("m=%0d s=%0d -> %0d expected %0d", m, s, $signed(r_out), e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
