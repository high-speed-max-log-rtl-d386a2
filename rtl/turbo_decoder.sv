// turbo_decoder: iterative turbo decoder with two max-log-MAP SISO decoders.
//
// A frame of N = ROWS_P*COLS_P information bits is received as systematic
// symbols x and the parity symbols y1 and y2 of the two constituent encoders
// (the second encoder sees the interleaved bits). Decoding alternates two
// half-iterations, as in a classic turbo decoder:
//   SISO 1 reads x, y1 and the a-priori values L'e1 in natural order (zero in
//          the first iteration) and writes its extrinsic values Le2;
//   SISO 2 reads x and Le2 through the block interleaver (I), y2 in order,
//          and writes its extrinsic values Le1 through the deinterleaver (D).
// One extrinsic memory serves both directions: every half-iteration reads each
// address once and later overwrites it. After ITER_P iterations the LLRs of
// SISO 2 (deinterleaved) give the decisions, which are streamed out in natural
// order.
//
// The SISO decoders need whole windows, so each half-iteration feeds
// NP = N rounded up to a multiple of W_P steps; the steps past N carry zero
// symbols and zero a-priori values, which leaves the trellis end unterminated.
// Memories are plain arrays with combinational read.
//
// The two-SISO structure, the interleaver/deinterleaver and the zero initial
// a-priori value follow the design; the frame memories, the sequential
// half-iteration control, the fixed iteration count (no early stop) and the
// load/output protocol are this design's own.
//
// Interface and timing:
//   load:   while in_ready, each cycle with in_valid stores one (x, y1, y2)
//           triple in natural order; after N of them decoding starts.
//   decode: 2*ITER_P half-iterations of NP + 4*W_P + 3 cycles each.
//   output: out_valid for N consecutive cycles with out_bit (1 when the LLR
//           is positive), out_llr and out_last on the final one; then the
//           decoder accepts the next frame.
module turbo_decoder
  import turbo_pkg::*;
#(
  parameter int unsigned W_P     = WIN,
  parameter int unsigned ROWS_P  = 32,
  parameter int unsigned COLS_P  = 32,
  parameter int unsigned ITER_P  = 8,
  parameter int unsigned SYM_W_P = SYM_W,
  parameter int unsigned LA_W_P  = LA_W,
  parameter int unsigned SM_W_P  = SM_W,
  parameter int unsigned LLR_W_P = LLR_W
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // frame input
  input  logic                      in_valid,
  output logic                      in_ready,
  input  logic signed [SYM_W_P-1:0] in_x,
  input  logic signed [SYM_W_P-1:0] in_y1,
  input  logic signed [SYM_W_P-1:0] in_y2,
  // decoded output
  output logic                      out_valid,
  output logic                      out_bit,
  output logic signed [LLR_W_P-1:0] out_llr,
  output logic                      out_last,
  output logic                      busy
);

  localparam int unsigned N   = ROWS_P * COLS_P;
  localparam int unsigned AW  = $clog2(N);
  localparam int unsigned NP  = ((N + W_P - 1) / W_P) * W_P;
  localparam int unsigned JW  = $clog2(NP + 1);
  localparam int unsigned ITW = (ITER_P > 1) ? $clog2(ITER_P) : 1;

  typedef enum logic [1:0] {S_LOAD, S_RUN, S_OUT} state_t;

  state_t        state;
  logic          half;       // 0: SISO 1 half-iteration, 1: SISO 2
  logic [ITW-1:0] iter;
  logic [JW-1:0] fj;         // feed position
  logic [JW-1:0] wj;         // write-back position
  logic [AW-1:0] lj;         // load / output position

  // frame memories
  logic signed [SYM_W_P-1:0] mem_x  [N];
  logic signed [SYM_W_P-1:0] mem_y1 [N];
  logic signed [SYM_W_P-1:0] mem_y2 [N];
  logic signed [LA_W_P-1:0]  mem_le [N];
  logic signed [LLR_W_P-1:0] mem_l  [N];

  // ------------------------------------------------------------ addressing
  logic [AW-1:0] pi_rd, pi_wr;
  logic          feed, hstart;
  logic          so_valid, so_eof;
  logic signed [LLR_W_P-1:0] so_llr;
  logic signed [LA_W_P-1:0]  so_le;

  assign feed = (state == S_RUN) && (fj < JW'(NP));

  // interleaver (read side) and deinterleaver (write side)
  block_interleaver #(.ROWS_P(ROWS_P), .COLS_P(COLS_P)) u_intl (
    .clk, .rst_n, .start(hstart), .step(feed), .addr(pi_rd)
  );
  block_interleaver #(.ROWS_P(ROWS_P), .COLS_P(COLS_P)) u_deintl (
    .clk, .rst_n, .start(hstart), .step(so_valid), .addr(pi_wr)
  );

  logic [AW-1:0] rd_addr, wr_addr;
  logic          rd_in, wr_in;
  assign rd_in   = fj < JW'(N);
  assign wr_in   = wj < JW'(N);
  assign rd_addr = half ? pi_rd : fj[AW-1:0];
  assign wr_addr = half ? pi_wr : wj[AW-1:0];

  // ------------------------------------------------------------ SISO inputs
  logic signed [SYM_W_P-1:0] s_x, s_y;
  logic signed [LA_W_P-1:0]  s_la;
  logic                      first_half;

  assign first_half = (half == 1'b0) && (iter == '0);

  always_comb begin
    s_x  = '0;
    s_y  = '0;
    s_la = '0;
    if (rd_in) begin
      s_x  = mem_x[rd_addr];
      s_y  = half ? mem_y2[fj[AW-1:0]] : mem_y1[fj[AW-1:0]];
      s_la = first_half ? '0 : mem_le[rd_addr];
    end
  end

  logic s_sof, s_eof;
  assign s_sof = (fj == '0);
  assign s_eof = (fj == JW'(NP - 1));

  logic s1_ready, s2_ready;
  logic o1_valid, o1_sof, o1_eof, o2_valid, o2_sof, o2_eof;
  logic signed [LLR_W_P-1:0] o1_llr, o2_llr;
  logic signed [LA_W_P-1:0]  o1_le, o2_le;

  siso_decoder #(.W_P(W_P), .SYM_W_P(SYM_W_P), .LA_W_P(LA_W_P), .SM_W_P(SM_W_P),
                 .LLR_W_P(LLR_W_P)) u_siso1 (
    .clk, .rst_n,
    .in_valid(feed && !half), .in_sof(s_sof), .in_eof(s_eof), .in_ready(s1_ready),
    .in_x(s_x), .in_y(s_y), .in_la(s_la),
    .out_valid(o1_valid), .out_sof(o1_sof), .out_eof(o1_eof),
    .out_llr(o1_llr), .out_le(o1_le)
  );

  siso_decoder #(.W_P(W_P), .SYM_W_P(SYM_W_P), .LA_W_P(LA_W_P), .SM_W_P(SM_W_P),
                 .LLR_W_P(LLR_W_P)) u_siso2 (
    .clk, .rst_n,
    .in_valid(feed && half), .in_sof(s_sof), .in_eof(s_eof), .in_ready(s2_ready),
    .in_x(s_x), .in_y(s_y), .in_la(s_la),
    .out_valid(o2_valid), .out_sof(o2_sof), .out_eof(o2_eof),
    .out_llr(o2_llr), .out_le(o2_le)
  );

  assign so_valid = half ? o2_valid : o1_valid;
  assign so_eof   = half ? o2_eof   : o1_eof;
  assign so_llr   = half ? o2_llr   : o1_llr;
  assign so_le    = half ? o2_le    : o1_le;

  logic last_half;
  assign last_half = half && (iter == ITW'(ITER_P - 1));
  assign hstart    = (state == S_LOAD) || ((state == S_RUN) && so_valid && so_eof);

  // ------------------------------------------------------------ control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_LOAD;
      half  <= 1'b0;
      iter  <= '0;
      fj    <= '0;
      wj    <= '0;
      lj    <= '0;
    end else begin
      case (state)
        S_LOAD: begin
          half <= 1'b0;
          iter <= '0;
          fj   <= '0;
          wj   <= '0;
          if (in_valid) begin
            if (lj == AW'(N - 1)) begin
              lj    <= '0;
              state <= S_RUN;
            end else begin
              lj <= lj + 1'b1;
            end
          end
        end
        S_RUN: begin
          if (feed) fj <= fj + 1'b1;
          if (so_valid) begin
            wj <= wj + 1'b1;
            if (so_eof) begin
              fj <= '0;
              wj <= '0;
              if (last_half) begin
                state <= S_OUT;
              end else begin
                half <= !half;
                if (half) iter <= iter + 1'b1;
              end
            end
          end
        end
        S_OUT: begin
          if (lj == AW'(N - 1)) begin
            lj    <= '0;
            state <= S_LOAD;
          end else begin
            lj <= lj + 1'b1;
          end
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  // ------------------------------------------------------------ memories
  always_ff @(posedge clk) begin
    if (state == S_LOAD && in_valid) begin
      mem_x[lj]  <= in_x;
      mem_y1[lj] <= in_y1;
      mem_y2[lj] <= in_y2;
    end
    if (state == S_RUN && so_valid && wr_in) begin
      mem_le[wr_addr] <= so_le;
      if (last_half) mem_l[wr_addr] <= so_llr;
    end
  end

  assign in_ready  = (state == S_LOAD);
  assign busy      = (state != S_LOAD);
  assign out_valid = (state == S_OUT);
  assign out_llr   = mem_l[lj];
  assign out_bit   = (state == S_OUT) && (mem_l[lj] > 0);
  assign out_last  = (state == S_OUT) && (lj == AW'(N - 1));

  // a half-iteration starts only when its SISO decoder is ready
  a_ready: assert property (@(posedge clk) disable iff (!rst_n)
    (feed && fj == '0) |-> (half ? s2_ready : s1_ready))
    else $error("SISO decoder not ready");

  // every SISO output frame begins with its start marker
  a_sof: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_RUN && so_valid && wj == '0) |-> (half ? o2_sof : o1_sof))
    else $error("SISO output out of step");

endmodule
