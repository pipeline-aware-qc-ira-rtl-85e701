// tb_ldpc_ber: bit-error-rate run of the full-size decoder at three of the
// signal-to-noise ratios of the published fixed-point curve: Eb/N0 = 1.5,
// 2.0 and 2.25 dB (rate 1/2, so noise deviation sigma = 1/sqrt(Eb/N0)).
//
// FRAMES random codewords per point are decoded for 10 iterations. Every frame
// must match the sequential reference model (ldpc_ref_pkg) bit for bit and
// take 121 cycles. The measured bit error rates are printed. As a loose sanity
// bound, the rate at 2.25 dB must be below 2e-3 and must not exceed the rate
// at 1.5 dB. The published fixed-point curve is near 5e-6 at 2.25 dB; this
// run is far too short to resolve that, and its base matrix is a different
// draw of the construction.
module tb_ldpc_ber;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  localparam int FRAMES = 100;
  localparam int NPTS = 3;
  localparam real EBN0_DB [NPTS] = '{1.5, 2.0, 2.25};

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

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit cw [N];
  int ch [N];
  int ref_p [N];
  real ber [NPTS];

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int pt = 0; pt < NPTS; pt++) begin
      real sigma;
      int errs, ferrs;
      sigma = 1.0 / $sqrt(10.0 ** (EBN0_DB[pt] / 10.0));
      errs = 0; ferrs = 0;
      for (int f = 0; f < FRAMES; f++) begin
        int lat, nmis, nerr;
        make_codeword(cw);
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
        start      <= 1'b0;
        lat = 0;
        do begin
          @(posedge clk);
          #1;
          lat++;
        end while (!done);
        ref_decode(ch, ITER, ref_p);
        checks++;
        if (lat != ITER * LAYERS + 1) begin failures++; $display("latency %0d", lat); end
        nmis = 0; nerr = 0;
        for (int v = 0; v < N; v++) begin
          if (int'(app_llr[v / Q][v % Q]) != ref_p[v]) nmis++;
          if (hard_bits[v] != cw[v]) nerr++;
        end
        checks++;
        if (nmis != 0) begin failures++; $display("frame %0d: %0d LLRs differ from the model", f, nmis); end
        errs += nerr;
        if (nerr != 0) ferrs++;
      end
      ber[pt] = real'(errs) / real'(FRAMES * N);
      $display("Eb/N0 %4.2f dB  sigma %5.3f  frames %0d  bit errors %0d  frame errors %0d  BER %e",
               EBN0_DB[pt], sigma, FRAMES, errs, ferrs, ber[pt]);
    end
    checks += 2;
    if (ber[NPTS-1] >= 2.0e-3) failures++;
    if (ber[NPTS-1] > ber[0]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
