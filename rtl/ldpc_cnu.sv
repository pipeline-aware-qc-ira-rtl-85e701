// ldpc_cnu: pipelined min-sum check node unit for one check row of degree DEG.
//
// Section A (combinational from the inputs): the sign and magnitude of every
// variable-to-check message L are split, and compare-and-select cells pair
// the edges (0,1), (2,3), (4,5), (6,-) into four (min1, min2, index) groups.
// The groups and the seven sign bits are then captured in the pipeline
// register when en is high. Section B (combinational from that register): two
// levels of compare units merge the four groups into the row's first and
// second minimum and the index of the first, and the product of all signs is
// formed. For each edge e the outputs give the unscaled check-to-variable
// magnitude (min2 on the edge that holds the minimum, min1 elsewhere) and its
// sign (sign product times the edge's own sign, i.e. the product over the
// other edges), which is equation (6) before the 0.75 scaling.
//
// Timing: one register stage; outputs belong to the inputs presented in the
// cycle before the last enabled clock edge. The split into compare-and-select,
// pipeline register and two CU stages follows the published decoder diagram of the
// decoder; the pairing of edges is this design's choice. DEG may be 5 to 8.
module ldpc_cnu #(
  parameter int DEG = 7,
  parameter int W   = 6
) (
  input  logic                        clk,
  input  logic                        en,
  input  logic [DEG-1:0][W-1:0]       l_in,     // variable-to-check messages, two's complement
  output logic [DEG-1:0][W-2:0]       r_mag,    // unscaled check-to-variable magnitudes
  output logic [DEG-1:0]              r_sign    // 1 = negative
);

  localparam int MW = W - 1;
  localparam int IW = 3;
  localparam int NG = 4;           // groups after compare-and-select
  localparam logic [MW-1:0] MAXM = '1;

  initial assert (DEG >= 5 && DEG <= 2 * NG) else $error("ldpc_cnu supports DEG 5..8");

  // ---------------- Section A ----------------
  logic [2*NG-1:0][MW-1:0] mag;
  logic [DEG-1:0]          sgn;

  always_comb begin
    for (int e = 0; e < 2 * NG; e++) mag[e] = MAXM;
    for (int e = 0; e < DEG; e++) begin
      sgn[e] = l_in[e][W-1];
      mag[e] = l_in[e][W-1] ? MW'(-$signed(l_in[e])) : l_in[e][MW-1:0];
    end
  end

  logic [NG-1:0][MW-1:0] cs_min1, cs_min2;
  logic [NG-1:0][IW-1:0] cs_idx;

  for (genvar g = 0; g < NG; g++) begin : g_cs
    ldpc_cnu_cs #(.MW(MW), .IW(IW)) u_cs (
      .mag_a (mag[2*g]),   .idx_a (IW'(2*g)),
      .mag_b (mag[2*g+1]), .idx_b (IW'(2*g+1)),
      .min1  (cs_min1[g]), .min2  (cs_min2[g]), .idx (cs_idx[g])
    );
  end

  // ---------------- Pipeline register ----------------
  logic [NG-1:0][MW-1:0] p_min1, p_min2;
  logic [NG-1:0][IW-1:0] p_idx;
  logic [DEG-1:0]        p_sgn;

  always_ff @(posedge clk) begin
    if (en) begin
      p_min1 <= cs_min1;
      p_min2 <= cs_min2;
      p_idx  <= cs_idx;
      p_sgn  <= sgn;
    end
  end

  // ---------------- Section B: two CU stages ----------------
  logic [1:0][MW-1:0] cu1_min1, cu1_min2;
  logic [1:0][IW-1:0] cu1_idx;
  logic [MW-1:0]      fin_min1, fin_min2;
  logic [IW-1:0]      fin_idx;

  for (genvar g = 0; g < 2; g++) begin : g_cu1
    ldpc_cnu_cu #(.MW(MW), .IW(IW)) u_cu (
      .min1_a (p_min1[2*g]),   .min2_a (p_min2[2*g]),   .idx_a (p_idx[2*g]),
      .min1_b (p_min1[2*g+1]), .min2_b (p_min2[2*g+1]), .idx_b (p_idx[2*g+1]),
      .min1   (cu1_min1[g]),   .min2   (cu1_min2[g]),   .idx   (cu1_idx[g])
    );
  end

  ldpc_cnu_cu #(.MW(MW), .IW(IW)) u_cu2 (
    .min1_a (cu1_min1[0]), .min2_a (cu1_min2[0]), .idx_a (cu1_idx[0]),
    .min1_b (cu1_min1[1]), .min2_b (cu1_min2[1]), .idx_b (cu1_idx[1]),
    .min1   (fin_min1),    .min2   (fin_min2),    .idx   (fin_idx)
  );

  logic sign_prod;
  assign sign_prod = ^p_sgn;

  always_comb begin
    for (int e = 0; e < DEG; e++) begin
      r_mag[e]  = (fin_idx == IW'(e)) ? fin_min2 : fin_min1;
      r_sign[e] = sign_prod ^ p_sgn[e];
    end
  end

endmodule
