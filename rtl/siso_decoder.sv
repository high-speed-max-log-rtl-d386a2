// siso_decoder: sliding-window max-log-MAP soft-in soft-out decoder.
//
// Decodes one constituent code of the turbo code (K = 4, 8 states) from the
// systematic symbol x, parity symbol y and a-priori value la of every trellis
// step, and returns the LLR of each information bit and its extrinsic part.
// The frame is processed in windows of W_P steps (sliding window method), one
// step per clock, with the schedule of siso_ctrl:
//
//   LIFO 1  reverses each window;
//   gamma1/beta1 (the "dummy" backward unit) runs over the reversed window
//           starting from equal metrics, only to produce the starting beta of
//           the window before it;
//   LIFO 2  turns the reversed window back into natural order for
//   gamma/alpha, the forward unit, whose metrics are stored in LIFO 3;
//   FIFO 1, FIFO 2 delay the reversed window by two slots for
//   gamma2/beta2, the backward unit that runs together with the
//   LCU     which combines alpha (from LIFO 3), beta2 and gamma2;
//   LIFO 4  puts the LLRs, produced in reverse order, back in natural order.
//
// The buffers and units and their connections follow the design. The
// following are this design's choices: the forward recursion starts each frame
// in state 0 (the other states get a penalty of INIT_PEN); the backward
// recursion of the last window of a frame starts from equal metrics (the code
// is not terminated); the extrinsic output is le = llr - la - x, saturated to
// LA_W_P bits.
//
// The three metric units are the same module, so each has outputs that its
// role does not need (beta1 only hands on its final metrics, alpha only its
// registered metrics); those outputs are left unused here.
//
// Interface: in_valid/in_sof/in_eof/in_x/in_y/in_la carry one trellis step per
// cycle (protocol in siso_ctrl: a frame starts when in_ready is high, is made
// of whole windows and has no gaps).
// out_valid/out_sof/out_eof/out_llr/out_le return the steps in the same order.
// Timing: step j of a frame arrives in cycle T+j and leaves in cycle
// T+j+4*W_P+3 (four window slots plus three pipeline registers: BMU, LCU
// stage 1, LCU stage 2); throughput is one step per cycle.
module siso_decoder
  import turbo_pkg::*;
#(
  parameter int unsigned W_P     = WIN,
  parameter int unsigned SYM_W_P = SYM_W,
  parameter int unsigned LA_W_P  = LA_W,
  parameter int unsigned SM_W_P  = SM_W,
  parameter int unsigned LLR_W_P = LLR_W
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic                      in_sof,
  input  logic                      in_eof,
  output logic                      in_ready,
  input  logic signed [SYM_W_P-1:0] in_x,
  input  logic signed [SYM_W_P-1:0] in_y,
  input  logic signed [LA_W_P-1:0]  in_la,
  output logic                      out_valid,
  output logic                      out_sof,
  output logic                      out_eof,
  output logic signed [LLR_W_P-1:0] out_llr,
  output logic signed [LA_W_P-1:0]  out_le
);

  localparam int unsigned IW  = $clog2(W_P);
  localparam int unsigned RW  = 2 * SYM_W_P + LA_W_P;  // symbol record width
  localparam int unsigned AW  = NSTATES * SM_W_P;      // alpha vector width
  localparam int unsigned OW  = LLR_W_P + LA_W_P;      // output record width
  localparam logic [IW-1:0] LAST_IDX = IW'(W_P - 1);

  typedef struct packed {
    logic signed [SYM_W_P-1:0] x;
    logic signed [SYM_W_P-1:0] y;
    logic signed [LA_W_P-1:0]  la;
  } sym_t;

  // ---------------------------------------------------------------- schedule
  logic [IW-1:0] idx;
  logic          dir;
  win_tag_t      tag [5];

  siso_ctrl #(.W_P(W_P)) u_ctrl (
    .clk, .rst_n, .in_valid, .in_sof, .in_eof, .in_ready, .idx, .dir, .tag
  );

  // copies of the schedule delayed by the pipeline registers
  logic [IW-1:0] idx_d [1:3];
  logic          dir_d [1:3];
  win_tag_t      tag4_d [1:3];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 1; i <= 3; i++) begin
        idx_d[i]  <= '0;
        dir_d[i]  <= 1'b0;
        tag4_d[i] <= '0;
      end
    end else begin
      idx_d[1]  <= idx;
      dir_d[1]  <= dir;
      tag4_d[1] <= tag[4];
      for (int i = 2; i <= 3; i++) begin
        idx_d[i]  <= idx_d[i-1];
        dir_d[i]  <= dir_d[i-1];
        tag4_d[i] <= tag4_d[i-1];
      end
    end
  end

  // ------------------------------------------------------- input buffering
  sym_t in_rec, r1, f1, r3, f2;

  always_comb begin
    in_rec.x  = in_valid ? in_x  : '0;
    in_rec.y  = in_valid ? in_y  : '0;
    in_rec.la = in_valid ? in_la : '0;
  end

  // LIFO 1: window w arrives in slot t, leaves reversed in slot t+1
  lifo_buf #(.W_P(W_P), .DW_P(RW)) u_lifo1 (
    .clk, .idx, .dir, .din(in_rec), .dout(r1)
  );
  // FIFO 1 and FIFO 2: reversed window again in slot t+3
  fifo_buf #(.W_P(W_P), .DW_P(RW)) u_fifo1 (.clk, .idx, .din(r1), .dout(f1));
  fifo_buf #(.W_P(W_P), .DW_P(RW)) u_fifo2 (.clk, .idx, .din(f1), .dout(r3));
  // LIFO 2: natural order in slot t+2
  lifo_buf #(.W_P(W_P), .DW_P(RW)) u_lifo2 (
    .clk, .idx, .dir, .din(r1), .dout(f2)
  );

  // ------------------------------------------------- dummy backward: beta1
  logic signed [SM_W_P-1:0] zero_sm [NSTATES];
  logic signed [SM_W_P-1:0] alpha_init [NSTATES];
  logic signed [SM_W_P-1:0] b1_gamma [4], b1_sm [NSTATES], b1_next [NSTATES];
  logic                     b1_sel;

  always_comb begin
    for (int s = 0; s < NSTATES; s++) begin
      zero_sm[s]    = '0;
      alpha_init[s] = (s == 0) ? '0 : -SM_W_P'(INIT_PEN);
    end
  end

  metric_unit #(.SYM_W_P(SYM_W_P), .LA_W_P(LA_W_P), .SM_W_P(SM_W_P), .BACKWARD(1'b1)) u_beta1 (
    .clk, .rst_n, .x(r1.x), .y(r1.y), .la(r1.la),
    .load(idx == '0), .load_val(zero_sm), .load_max(1'b0),
    .gamma(b1_gamma), .sm(b1_sm), .sm_next(b1_next), .sel_max(b1_sel)
  );

  // ------------------------------------------------------ forward: alpha
  logic signed [SM_W_P-1:0] a_gamma [4], a_sm [NSTATES], a_next [NSTATES];
  logic                     a_sel;

  metric_unit #(.SYM_W_P(SYM_W_P), .LA_W_P(LA_W_P), .SM_W_P(SM_W_P), .BACKWARD(1'b0)) u_alpha (
    .clk, .rst_n, .x(f2.x), .y(f2.y), .la(f2.la),
    .load((idx == '0) && tag[2].first), .load_val(alpha_init), .load_max(1'b0),
    .gamma(a_gamma), .sm(a_sm), .sm_next(a_next), .sel_max(a_sel)
  );

  // LIFO 3: alpha before step k, written in slot t+2, read reversed in t+3
  logic [AW-1:0] a_pack, a3_pack;
  logic signed [SM_W_P-1:0] a3 [NSTATES];

  always_comb begin
    for (int s = 0; s < NSTATES; s++) begin
      a_pack[s*SM_W_P +: SM_W_P] = a_sm[s];
      a3[s] = a3_pack[s*SM_W_P +: SM_W_P];
    end
  end

  lifo_buf #(.W_P(W_P), .DW_P(AW)) u_lifo3 (
    .clk, .idx(idx_d[1]), .dir(dir_d[1]), .din(a_pack), .dout(a3_pack)
  );

  // ------------------------------------------------------ backward: beta2
  logic signed [SM_W_P-1:0] b2_gamma [4], b2_sm [NSTATES], b2_next [NSTATES];
  logic signed [SM_W_P-1:0] b2_init [NSTATES];
  logic                     b2_sel;

  always_comb
    for (int s = 0; s < NSTATES; s++) b2_init[s] = tag[3].last ? '0 : b1_next[s];

  metric_unit #(.SYM_W_P(SYM_W_P), .LA_W_P(LA_W_P), .SM_W_P(SM_W_P), .BACKWARD(1'b1)) u_beta2 (
    .clk, .rst_n, .x(r3.x), .y(r3.y), .la(r3.la),
    .load(idx == '0), .load_val(b2_init), .load_max(tag[3].last ? 1'b0 : b1_sel),
    .gamma(b2_gamma), .sm(b2_sm), .sm_next(b2_next), .sel_max(b2_sel)
  );

  // ------------------------------------------------------------------ LCU
  logic                     lcu_in_valid, lcu_out_valid;
  logic signed [LLR_W_P-1:0] llr;

  // stage 3 data reaches the LCU one cycle late (BMU register)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lcu_in_valid <= 1'b0;
    else        lcu_in_valid <= tag[3].valid;
  end

  lcu #(.SM_W_P(SM_W_P), .LLR_W_P(LLR_W_P)) u_lcu (
    .clk, .rst_n, .in_valid(lcu_in_valid), .alpha(a3), .beta(b2_sm), .gamma(b2_gamma),
    .out_valid(lcu_out_valid), .llr
  );

  // systematic symbol and a-priori value aligned with the LLR
  sym_t rec_d [1:3];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 1; i <= 3; i++) rec_d[i] <= '0;
    end else begin
      rec_d[1] <= r3;
      rec_d[2] <= rec_d[1];
      rec_d[3] <= rec_d[2];
    end
  end

  // extrinsic value
  localparam int unsigned EW = LLR_W_P + 2;
  localparam logic signed [EW-1:0] EMAX = EW'(2 ** (LA_W_P - 1) - 1);
  localparam logic signed [EW-1:0] EMIN = -EMAX - 1;
  logic signed [EW-1:0]     le_wide;
  logic signed [LA_W_P-1:0] le;

  always_comb begin
    le_wide = EW'(llr) - EW'(rec_d[3].la) - EW'(rec_d[3].x);
    if (le_wide > EMAX)      le = EMAX[LA_W_P-1:0];
    else if (le_wide < EMIN) le = EMIN[LA_W_P-1:0];
    else                     le = le_wide[LA_W_P-1:0];
  end

  // LIFO 4: LLRs back in natural order
  logic [OW-1:0] o_pack;

  lifo_buf #(.W_P(W_P), .DW_P(OW)) u_lifo4 (
    .clk, .idx(idx_d[3]), .dir(dir_d[3]), .din({llr, le}), .dout(o_pack)
  );

  assign out_valid = tag4_d[3].valid;
  assign out_sof   = tag4_d[3].valid && tag4_d[3].first && (idx_d[3] == '0);
  assign out_eof   = tag4_d[3].valid && tag4_d[3].last && (idx_d[3] == LAST_IDX);
  assign out_llr   = o_pack[OW-1 -: LLR_W_P];
  assign out_le    = o_pack[LA_W_P-1:0];

  // the LCU produces a value for every step of a valid window in stage 3
  a_lcu_valid: assert property (@(posedge clk) disable iff (!rst_n)
    lcu_out_valid == $past(lcu_in_valid, 2))
    else $error("LCU valid misaligned");

endmodule
