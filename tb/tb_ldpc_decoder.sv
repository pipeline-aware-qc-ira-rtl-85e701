// tb_ldpc_decoder: end-to-end test of the decoder at its default size
// (2016-bit code, 10 iterations, no parameter overrides).
//
// For each frame the testbench draws random information bits, encodes them
// (ldpc_ref_pkg), confirms that every parity check is satisfied, adds noise
// and quantises the channel LLRs to 6 bits. A plain sequential layered
// min-sum model, working in natural variable order with no rotation and no
// pipeline, computes the expected final LLRs. The decoder's app_llr and
// hard_bits must match the model exactly, decoding must take 121 cycles from
// the start edge to done, and at low noise the decoded word must equal the
// transmitted codeword.
//
// It also counts the mechanisms of the design: section A and B busy in the
// same cycle (pipelining), the mux register taking a column from the
// section-B bypass, first-iteration zero check messages, and a load attempt
// ignored while busy. Each must be seen at least once.
module tb_ldpc_decoder;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  logic      clk = 1'b0;
  logic      rst_n = 1'b0;
  logic      load_valid = 1'b0;
  col_t      load_col = '0;
  chan_blk_t load_llr = '0;
  logic      start = 1'b0;
  logic      busy, done;
  logic [N-1:0]    hard_bits;
  blk_t [NCOL-1:0] app_llr;

  ldpc_decoder dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_overlap = 0, n_bypass = 0, n_first = 0, n_ignored = 0;

  // Watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters, from the decoder's pipeline control signals
  always @(posedge clk) begin
    if (dut.a_valid && dut.b_valid) n_overlap++;
    if (dut.mux_load && dut.first_iter) n_first++;
    if (dut.mux_load && dut.b_valid) begin
      for (int s = 0; s < DEG; s++)
        for (int t = 0; t < DEG; t++)
          if (BASE[dut.sel_layer][s].col == BASE[dut.b_layer][t].col) n_bypass++;
    end
  end

  bit cw [N];
  int ch [N];
  int ref_p [N];

  task automatic run_frame(real sigma, bit expect_correct);
    int lat, nerr, nmis, raw, bad;
    make_codeword(cw);
    bad = unsatisfied(cw);
    checks++;
    if (bad != 0) begin failures++; $display("encoder: %0d unsatisfied checks", bad); end
    channel(cw, sigma, ch);
    for (int c = 0; c < NCOL; c++) begin
      chan_blk_t blk;
      for (int v = 0; v < Q; v++) blk[v] = msg_t'(ch[c * Q + v]);
      load_valid <= 1'b1;
      load_col   <= col_t'(c);
      load_llr   <= blk;
      @(posedge clk);
    end
    load_valid <= 1'b0;
    start      <= 1'b1;
    @(posedge clk);
    lat = 0;
    start      <= 1'b0;
    // a load attempt during decoding must be ignored
    load_valid <= 1'b1;
    load_col   <= '0;
    load_llr   <= '0;
    @(posedge clk);
    lat++;
    #1;
    if (busy) n_ignored++;
    load_valid <= 1'b0;
    while (!done) begin
      @(posedge clk);
      #1;
      lat++;
    end
    ref_decode(ch, ITER, ref_p);
    checks++;
    if (lat != ITER * LAYERS + 1) begin
      failures++;
      $display("latency %0d, expected %0d", lat, ITER * LAYERS + 1);
    end
    nmis = 0; nerr = 0; raw = 0;
    for (int v = 0; v < N; v++) begin
      int got;
      got = int'(app_llr[v / Q][v % Q]);
      checks++;
      if (got != ref_p[v] || hard_bits[v] != (ref_p[v] < 0)) begin
        failures++;
        if (nmis < 5) $display("var %0d: dut %0d model %0d", v, got, ref_p[v]);
        nmis++;
      end
      if (hard_bits[v] != cw[v]) nerr++;
      if ((ch[v] < 0) != cw[v]) raw++;
    end
    $display("frame sigma=%0.2f latency=%0d mismatches=%0d channel bit errors=%0d after decoding=%0d",
             sigma, lat, nmis, raw, nerr);
    if (expect_correct) begin
      checks++;
      if (nerr != 0) failures++;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    run_frame(0.6, 1'b1);
    run_frame(0.85, 1'b0);
    run_frame(1.1, 1'b0);
    $display("pipeline overlap cycles=%0d bypassed columns=%0d first-iteration layers=%0d ignored loads=%0d",
             n_overlap, n_bypass, n_first, n_ignored);
    checks += 4;
    if (n_overlap == 0) failures++;
    if (n_bypass == 0) failures++;
    if (n_first == 0) failures++;
    if (n_ignored == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
