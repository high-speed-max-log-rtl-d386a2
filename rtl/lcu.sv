// lcu: LLR computation unit.
//
// Two lcu_tree instances compute L1 (branches with information bit 1) and L0
// (bit 0) from alpha(k-1), beta(k) and the branch metrics of step k. The LLR
// is (L1 - L0) / 2: the halving undoes the doubled branch metrics of bmu_norm
// and is exact, because every difference of path metrics is even. The result
// is saturated to LLR_W_P bits. A common offset on all four branch metrics
// (branch metric normalization) cancels in L1 - L0.
//
// Timing: two pipeline stages, as in the design's proposed LCU (LV register,
// then compare/select); the subtraction and saturation are placed in the
// second stage and registered, so llr and out_valid follow in_valid by 2 cycles.
module lcu
  import turbo_pkg::*;
#(
  parameter int unsigned SM_W_P  = SM_W,
  parameter int unsigned LLR_W_P = LLR_W
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic signed [SM_W_P-1:0]  alpha [NSTATES],
  input  logic signed [SM_W_P-1:0]  beta  [NSTATES],
  input  logic signed [SM_W_P-1:0]  gamma [4],
  output logic                      out_valid,
  output logic signed [LLR_W_P-1:0] llr
);

  localparam int unsigned TW = SM_W_P + 2;
  localparam logic signed [TW:0] LMAX = (TW+1)'(2 ** (LLR_W_P - 1) - 1);
  localparam logic signed [TW:0] LMIN = -LMAX - 1;

  logic signed [TW-1:0] l1, l0;
  logic signed [TW:0]   diff, half;
  logic                 v_q;

  lcu_tree #(.SM_W_P(SM_W_P), .U(1), .OUT_W_P(TW)) u_l1 (
    .clk, .rst_n, .alpha, .beta, .gamma, .l_out(l1)
  );
  lcu_tree #(.SM_W_P(SM_W_P), .U(0), .OUT_W_P(TW)) u_l0 (
    .clk, .rst_n, .alpha, .beta, .gamma, .l_out(l0)
  );

  always_comb begin
    diff = (TW+1)'(l1) - (TW+1)'(l0);
    half = diff >>> 1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q       <= 1'b0;
      out_valid <= 1'b0;
      llr       <= '0;
    end else begin
      v_q       <= in_valid;
      out_valid <= v_q;
      if (half > LMAX)      llr <= LMAX[LLR_W_P-1:0];
      else if (half < LMIN) llr <= LMIN[LLR_W_P-1:0];
      else                  llr <= half[LLR_W_P-1:0];
    end
  end

endmodule
