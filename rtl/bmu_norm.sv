// bmu_norm: branch metric unit with branch metric normalization.
//
// One trellis step per clock. From the systematic symbol x, the parity symbol
// y and the a-priori value la it forms the two distinct branch metrics of a
// rate-1/2 code, g0 = la + x + y and g1 = la + x - y (the other two are their
// negatives). Instead of normalizing state metrics inside the recursion, this
// unit normalizes the branch metrics: it takes the absolute values of g0 and
// g1, compares them, selects the larger magnitude m, and outputs the four
// metrics +g0, +g1, -g0, -g1 either minus m (all <= 0, "max" normalization) or
// plus m (all >= 0, "min" normalization). The choice comes from the state
// metric unit that consumes the metrics (sel_max).
//
// Interface: gamma[i] follows the index order of turbo_pkg::bm_index.
// Timing: the output is registered, so this unit is one pipeline stage in
// front of the state metric unit; gamma is valid the cycle after its inputs.
//
// Structure (two adders per metric, abs, compare, select, negate, normalize)
// follows the design; the factor 1/2 of the log-domain branch metric is
// dropped here (it is restored when the LLR is halved in the LCU), and the
// output word length equals the state metric word length.
module bmu_norm
  import turbo_pkg::*;
#(
  parameter int unsigned SYM_W_P = SYM_W,
  parameter int unsigned LA_W_P  = LA_W,
  parameter int unsigned SM_W_P  = SM_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [SYM_W_P-1:0] x,
  input  logic signed [SYM_W_P-1:0] y,
  input  logic signed [LA_W_P-1:0]  la,
  input  logic                     sel_max,  // 1: subtract max |g|, 0: add it
  output logic signed [SM_W_P-1:0]  gamma [4]
);

  logic signed [SM_W_P-1:0] s, g0, g1, a0, a1, m;
  logic signed [SM_W_P-1:0] raw [4];
  logic signed [SM_W_P-1:0] nrm [4];

  always_comb begin
    // branch metric adders
    s  = SM_W_P'(la) + SM_W_P'(x);
    g0 = s + SM_W_P'(y);
    g1 = s - SM_W_P'(y);
    // absolute values, compare, select the larger magnitude
    a0 = g0[SM_W_P-1] ? -g0 : g0;
    a1 = g1[SM_W_P-1] ? -g1 : g1;
    m  = (a0 >= a1) ? a0 : a1;
    // the four branch metrics and their normalization
    raw[0] = g0;
    raw[1] = g1;
    raw[2] = -g0;
    raw[3] = -g1;
    for (int i = 0; i < 4; i++)
      nrm[i] = sel_max ? raw[i] - m : raw[i] + m;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) gamma[i] <= '0;
    end else begin
      for (int i = 0; i < 4; i++) gamma[i] <= nrm[i];
    end
  end

endmodule
