// metric_unit: one branch metric unit followed by one state metric unit.
//
// This is the pipelined gamma/alpha (forward) or gamma/beta (backward) pair of
// the SISO decoder: bmu_norm forms and normalizes the branch metrics of one
// trellis step and registers them, and smu_acs uses them one cycle later to
// advance its 8 state metrics. The state metric unit feeds its normalization
// choice back to the branch metric unit.
//
// Timing: symbol k enters at cycle c; gamma (branch metrics of step k) is
// valid in cycle c+1, when sm holds the metrics before step k and sm_next the
// metrics after it. load/load_val/load_max act on the state metric register
// at the end of the cycle in which load is high.
module metric_unit
  import turbo_pkg::*;
#(
  parameter int unsigned SYM_W_P  = SYM_W,
  parameter int unsigned LA_W_P   = LA_W,
  parameter int unsigned SM_W_P   = SM_W,
  parameter bit          BACKWARD = 1'b0
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [SYM_W_P-1:0] x,
  input  logic signed [SYM_W_P-1:0] y,
  input  logic signed [LA_W_P-1:0]  la,
  input  logic                     load,
  input  logic signed [SM_W_P-1:0]  load_val [NSTATES],
  input  logic                     load_max,
  output logic signed [SM_W_P-1:0]  gamma    [4],
  output logic signed [SM_W_P-1:0]  sm       [NSTATES],
  output logic signed [SM_W_P-1:0]  sm_next  [NSTATES],
  output logic                     sel_max
);

  bmu_norm #(.SYM_W_P(SYM_W_P), .LA_W_P(LA_W_P), .SM_W_P(SM_W_P)) u_bmu (
    .clk, .rst_n, .x, .y, .la, .sel_max, .gamma
  );

  smu_acs #(.SM_W_P(SM_W_P), .BACKWARD(BACKWARD)) u_smu (
    .clk, .rst_n, .gamma, .load, .load_val, .load_max, .sm, .sm_next, .sel_max
  );

endmodule
