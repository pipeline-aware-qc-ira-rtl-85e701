// tb_ldpc_sn: checks the switch network at the default size (84 lanes of
// 8 bits) for every shift 0..83 with random data: dout[i] must equal
// din[(i + shift) mod 84].
module tb_ldpc_sn;
  localparam int Q = 84, W = 8, SHW = 7;
  logic [Q-1:0][W-1:0] din, dout;
  logic [SHW-1:0]      shift;
  int checks = 0, failures = 0;

  ldpc_sn #(.Q(Q), .W(W), .SHW(SHW)) dut (.din, .shift, .dout);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 4; rep++) begin
      for (int sh = 0; sh < Q; sh++) begin
        for (int i = 0; i < Q; i++) din[i] = W'($urandom);
        shift = SHW'(sh);
        #1;
        for (int i = 0; i < Q; i++) begin
          checks++;
          if (dout[i] != din[(i + sh) % Q]) begin
            failures++;
            if (failures < 5) $display("shift %0d lane %0d: %0d vs %0d", sh, i, dout[i], din[(i + sh) % Q]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
