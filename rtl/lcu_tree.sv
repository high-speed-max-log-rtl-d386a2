// lcu_tree: one max-log LLR term (L1 or L0) in two pipeline stages.
//
// Computes L_u = max over the 8 trellis branches carrying information bit U of
// alpha(s) + gamma(s->s') + beta(s'). The 8 branches are split into 4 groups of
// two that share one branch metric (turbo_pkg::lcu_state). Stage 1, per group:
// two adders form alpha+beta for the two branches, a comparator compares these
// sums (without the branch metric), two adders add the shared branch metric and
// a selector keeps the winner, giving LV0..LV3, which are registered. Stage 2
// compares LV0..LV3 pairwise with six comparators (m0..m5) and one 4-way
// selector picks the largest.
//
// Timing: inputs in cycle c, LV registered at the end of c, l_out valid
// (combinational from the LV registers) in cycle c+1.
// Widths: the sums are OUT_W_P = SM_W_P + 2 bits wide so that nothing wraps;
// that width is this design's choice.
module lcu_tree
  import turbo_pkg::*;
#(
  parameter int unsigned SM_W_P = SM_W,
  parameter int unsigned U      = 1,
  parameter int unsigned OUT_W_P = SM_W + 2
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic signed [SM_W_P-1:0]  alpha [NSTATES],
  input  logic signed [SM_W_P-1:0]  beta  [NSTATES],
  input  logic signed [SM_W_P-1:0]  gamma [4],
  output logic signed [OUT_W_P-1:0] l_out
);

  logic signed [OUT_W_P-1:0] ab   [4][2];
  logic signed [OUT_W_P-1:0] abg  [4][2];
  logic signed [OUT_W_P-1:0] lv_d [4];
  logic signed [OUT_W_P-1:0] lv_q [4];
  logic                      m    [6];

  // stage 1: four parallel add-compare-select units
  always_comb begin
    for (int unsigned g = 0; g < 4; g++) begin
      for (int unsigned b = 0; b < 2; b++) begin
        ab[g][b]  = OUT_W_P'(alpha[lcu_state(U, g, b)])
                  + OUT_W_P'(beta[next_state(lcu_state(U, g, b), U)]);
        abg[g][b] = ab[g][b] + OUT_W_P'(gamma[bm_index(U, (g < 2) ? 1 : 0)]);
      end
      lv_d[g] = (ab[g][0] >= ab[g][1]) ? abg[g][0] : abg[g][1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int g = 0; g < 4; g++) lv_q[g] <= '0;
    else        for (int g = 0; g < 4; g++) lv_q[g] <= lv_d[g];
  end

  // stage 2: six comparators and one selector
  always_comb begin
    m[0] = lv_q[0] >= lv_q[1];
    m[1] = lv_q[0] >= lv_q[2];
    m[2] = lv_q[0] >= lv_q[3];
    m[3] = lv_q[1] >= lv_q[2];
    m[4] = lv_q[1] >= lv_q[3];
    m[5] = lv_q[2] >= lv_q[3];
    if (m[0] && m[1] && m[2])        l_out = lv_q[0];
    else if (!m[0] && m[3] && m[4])  l_out = lv_q[1];
    else if (!m[1] && !m[3] && m[5]) l_out = lv_q[2];
    else                             l_out = lv_q[3];
  end

endmodule
