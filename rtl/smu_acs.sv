// smu_acs: 8-state add-compare-select state metric unit (forward or backward).
//
// Each clock it advances the state metrics by one trellis step using the four
// normalized branch metrics from bmu_norm: for every state it adds the metrics
// of its two trellis branches to the two neighbouring state metrics, compares
// the sums and keeps the larger (max-log approximation, no correction term).
// BACKWARD = 0 runs the forward (alpha) recursion over predecessors,
// BACKWARD = 1 the backward (beta) recursion over successors.
//
// There is no state metric normalization inside the recursion: the branch
// metrics are already normalized, so the loop is only add, compare and select.
// The unit instead tells its branch metric unit which normalization to use
// (sel_max): if every state metric is above zero the maximum branch metric is
// subtracted, if every one is below zero the minimum is, and otherwise the
// previous choice is kept (that last rule is this design's choice).
//
// Interface: load replaces the metrics with load_val at the next clock edge
// (and the held normalization choice with load_max); sm is the registered
// metric vector, sm_next the combinational result of the current step.
// An assertion checks that no metric leaves the signed SM_W_P-bit range.
module smu_acs
  import turbo_pkg::*;
#(
  parameter int unsigned SM_W_P   = SM_W,
  parameter bit          BACKWARD = 1'b0
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [SM_W_P-1:0] gamma    [4],
  input  logic                    load,
  input  logic signed [SM_W_P-1:0] load_val [NSTATES],
  input  logic                    load_max,
  output logic signed [SM_W_P-1:0] sm       [NSTATES],
  output logic signed [SM_W_P-1:0] sm_next  [NSTATES],
  output logic                    sel_max
);

  logic signed [SM_W_P:0] cand0 [NSTATES];
  logic signed [SM_W_P:0] cand1 [NSTATES];
  logic signed [SM_W_P:0] best  [NSTATES];
  logic                   mode_q;
  logic                   all_pos, all_neg;

  // add, compare, select
  always_comb begin
    for (int unsigned t = 0; t < NSTATES; t++) begin
      if (!BACKWARD) begin
        cand0[t] = (SM_W_P+1)'(sm[pred_state(t, 0)])
                 + (SM_W_P+1)'(gamma[bm_index(pred_input(t, 0), parity(pred_state(t, 0), pred_input(t, 0)))]);
        cand1[t] = (SM_W_P+1)'(sm[pred_state(t, 1)])
                 + (SM_W_P+1)'(gamma[bm_index(pred_input(t, 1), parity(pred_state(t, 1), pred_input(t, 1)))]);
      end else begin
        cand0[t] = (SM_W_P+1)'(sm[next_state(t, 0)]) + (SM_W_P+1)'(gamma[bm_index(0, parity(t, 0))]);
        cand1[t] = (SM_W_P+1)'(sm[next_state(t, 1)]) + (SM_W_P+1)'(gamma[bm_index(1, parity(t, 1))]);
      end
      best[t]    = (cand0[t] >= cand1[t]) ? cand0[t] : cand1[t];
      sm_next[t] = best[t][SM_W_P-1:0];
    end
  end

  // normalization choice from the signs of the current state metrics
  always_comb begin
    all_pos = 1'b1;
    all_neg = 1'b1;
    for (int unsigned t = 0; t < NSTATES; t++) begin
      if (sm[t] <= 0)  all_pos = 1'b0;
      if (!sm[t][SM_W_P-1]) all_neg = 1'b0;
    end
    sel_max = all_pos ? 1'b1 : (all_neg ? 1'b0 : mode_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned t = 0; t < NSTATES; t++) sm[t] <= '0;
      mode_q <= 1'b0;
    end else if (load) begin
      for (int unsigned t = 0; t < NSTATES; t++) sm[t] <= load_val[t];
      mode_q <= load_max;
    end else begin
      for (int unsigned t = 0; t < NSTATES; t++) sm[t] <= sm_next[t];
      mode_q <= sel_max;
    end
  end

  // The state metrics must stay inside the signed SM_W_P-bit range.
  for (genvar g = 0; g < NSTATES; g++) begin : g_range
    a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
      load || (best[g][SM_W_P] == best[g][SM_W_P-1]))
      else $error("state metric %0d overflows", g);
  end

endmodule
