// ldpc_row: the per-check-row datapath of the layered min-sum decoder.
//
// Section A: for each of the DEG edges, the variable-to-check message is
// formed as L = P - R_old (equation 5), where P is the aligned a-posteriori
// LLR from the switch network and R_old the check-to-variable message this
// row sent in the previous iteration; the check node unit's first stage then
// runs on L, clipped to the message width. At the enabled clock edge the L
// values are captured alongside the check node unit's pipeline register.
// Section B: the check node unit completes, each new message is scaled by
// 0.75 (equation 6), and the new LLR is P_new = L + R_new (equation 7).
//
// Widths: P and L have PW bits, check messages W bits. All arithmetic
// saturates to the symmetric range of its width (+-127 and +-31 by default).
// Timing: r_new and p_new belong to the inputs presented in the cycle before
// the last enabled edge. The published design gives the equations and reports 6-bit
// quantisation; saturation and the wider LLR are this design's choices (with
// LLRs as narrow as the messages, a saturated LLR loses its extrinsic part and
// decoding diverges at moderate noise).
module ldpc_row #(
  parameter int DEG = 7,
  parameter int W   = 6,
  parameter int PW  = 8
) (
  input  logic                   clk,
  input  logic                   en,
  input  logic [DEG-1:0][PW-1:0] p_in,    // aligned LLRs, section A
  input  logic [DEG-1:0][W-1:0]  r_old,   // previous check-to-variable messages, section A
  output logic [DEG-1:0][W-1:0]  r_new,   // new check-to-variable messages, section B
  output logic [DEG-1:0][PW-1:0] p_new    // updated LLRs, section B
);

  localparam logic signed [PW:0] PMAX = (PW+1)'((1 << (PW - 1)) - 1);
  localparam logic signed [PW:0] MMAX = (PW+1)'((1 << (W - 1)) - 1);

  // saturate a PW+1-bit sum to +-max
  function automatic logic signed [PW:0] clip(input logic signed [PW:0] v,
                                              input logic signed [PW:0] max);
    if (v > max)       return max;
    else if (v < -max) return -max;
    else               return v;
  endfunction

  logic [DEG-1:0][PW-1:0] l_a, l_b;
  logic [DEG-1:0][W-1:0]  l_msg;

  always_comb begin
    for (int e = 0; e < DEG; e++) begin
      logic signed [PW:0] d, m;
      d        = clip((PW+1)'($signed(p_in[e])) - (PW+1)'($signed(r_old[e])), PMAX);
      m        = clip(d, MMAX);
      l_a[e]   = d[PW-1:0];
      l_msg[e] = m[W-1:0];
    end
  end

  always_ff @(posedge clk) begin
    if (en) l_b <= l_a;
  end

  logic [DEG-1:0][W-2:0] r_mag;
  logic [DEG-1:0]        r_sign;

  ldpc_cnu #(.DEG(DEG), .W(W)) u_cnu (
    .clk    (clk),
    .en     (en),
    .l_in   (l_msg),
    .r_mag  (r_mag),
    .r_sign (r_sign)
  );

  for (genvar e = 0; e < DEG; e++) begin : g_edge
    logic signed [PW:0] sum;
    ldpc_scale #(.W(W)) u_scale (
      .mag   (r_mag[e]),
      .sign  (r_sign[e]),
      .r_out (r_new[e])
    );
    assign sum      = clip((PW+1)'($signed(l_b[e])) + (PW+1)'($signed(r_new[e])), PMAX);
    assign p_new[e] = sum[PW-1:0];
  end

endmodule
