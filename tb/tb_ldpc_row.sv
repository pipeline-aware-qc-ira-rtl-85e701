// tb_ldpc_row: checks one check-row datapath against equations (5)-(7).
// Random LLRs (8-bit range, including saturated values) and previous check
// messages (6-bit range) are applied one set per cycle; one cycle later the
// new messages must be 0.75 x (sign product x minimum over the other edges of
// L = P - R_old, with L clipped to +-31 for the check node) and the new LLRs
// L + R_new, all saturating.
module tb_ldpc_row;
  localparam int DEG = 7, W = 6, PW = 8;
  logic clk = 1'b0;
  logic en  = 1'b0;
  logic [DEG-1:0][PW-1:0] p_in = '0;
  logic [DEG-1:0][W-1:0]  r_old = '0;
  logic [DEG-1:0][W-1:0]  r_new;
  logic [DEG-1:0][PW-1:0] p_new;
  int checks = 0, failures = 0;

  ldpc_row #(.DEG(DEG), .W(W), .PW(PW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sat(int v, int m);
    return v > m ? m : (v < -m ? -m : v);
  endfunction

  int ep [DEG];
  int er [DEG];
  bit have = 1'b0;

  initial begin
    for (int rep = 0; rep < 3000; rep++) begin
      int p [DEG];
      int r [DEG];
      @(negedge clk);
      if (have) begin
        for (int e = 0; e < DEG; e++) begin
          checks++;
          if (int'($signed(r_new[e])) != er[e] || int'($signed(p_new[e])) != ep[e]) begin
            failures++;
            if (failures < 5) $display("rep %0d edge %0d: R %0d/%0d P %0d/%0d", rep, e,
                                       $signed(r_new[e]), er[e], $signed(p_new[e]), ep[e]);
          end
        end
      end
      for (int e = 0; e < DEG; e++) begin
        p[e] = (rep % 3 == 0) ? $urandom_range(0, 254) - 127 : $urandom_range(0, 40) - 20;
        r[e] = $urandom_range(0, 46) - 23;
        p_in[e]  = PW'(p[e]);
        r_old[e] = W'(r[e]);
      end
      en = 1'b1;
      // expected results of this set
      begin
        int l [DEG];
        for (int e = 0; e < DEG; e++) l[e] = sat(p[e] - r[e], 127);
        for (int e = 0; e < DEG; e++) begin
          int m, sg, rn;
          m = 99; sg = 0;
          for (int t = 0; t < DEG; t++) if (t != e) begin
            int a;
            a = sat(l[t], 31);
            a = a < 0 ? -a : a;
            if (a < m) m = a;
            if (l[t] < 0) sg ^= 1;
          end
          rn = (m >> 1) + (m >> 2);
          if (sg) rn = -rn;
          er[e] = rn;
          ep[e] = sat(l[e] + rn, 127);
        end
      end
      have = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
