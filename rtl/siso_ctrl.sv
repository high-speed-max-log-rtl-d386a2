// siso_ctrl: sliding-window schedule controller of the SISO decoder.
//
// Time is divided into slots of W_P cycles. In each slot every stage of the
// decoder works on a different window (sub-block) of the input:
//   stage 0: the window is written into LIFO 1
//   stage 1: dummy backward recursion (beta1) on it; it enters FIFO 1 and LIFO 2
//   stage 2: forward recursion (alpha), results into LIFO 3
//   stage 3: backward recursion (beta2) and LLR computation
//   stage 4: LLRs leave LIFO 4 in natural order
// so a window's LLRs are produced four slots after it arrived.
//
// The controller keeps the position inside the slot (idx), the slot parity
// (dir, which sets the address direction of the LIFOs) and one tag per stage
// (valid, first and last window of a frame). Tags move one stage at the end of
// every slot. The counter runs while a window is arriving or any stage holds
// a valid window, and otherwise waits at idx = 0, so a frame may start in any
// cycle once the decoder is idle, and back to back after a previous frame.
//
// Input protocol: a frame may begin in a cycle with in_ready high (inside a
// frame, or at a window boundary); in_valid is then high for every symbol of
// the frame, without gaps; in_sof marks the first symbol and in_eof the last;
// a frame is a whole number of windows. Assertions check the alignment. The protocol is this design's own.
module siso_ctrl
  import turbo_pkg::*;
#(
  parameter int unsigned W_P = WIN
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic                   in_sof,
  input  logic                   in_eof,
  output logic                   in_ready,
  output logic [$clog2(W_P)-1:0] idx,
  output logic                   dir,
  output win_tag_t               tag [5]
);

  localparam logic [$clog2(W_P)-1:0] LAST_IDX = ($clog2(W_P))'(W_P - 1);

  logic busy;
  logic run;
  logic in_frame;  // inside a frame: the next symbol must arrive

  always_comb begin
    busy = 1'b0;
    for (int i = 1; i < 5; i++) busy |= tag[i].valid;
    run = (idx != '0) || in_valid || busy;
  end

  // a new frame may only begin at a window boundary
  assign in_ready = in_frame || (idx == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx      <= '0;
      dir      <= 1'b0;
      in_frame <= 1'b0;
      for (int i = 0; i < 5; i++) tag[i] <= '0;
    end else begin
      if (in_valid) in_frame <= !in_eof;
      if (run) begin
        // stage 0 tag is built while its window arrives
        if (idx == '0) begin
          tag[0].valid <= in_valid;
          tag[0].first <= in_valid && in_sof;
          tag[0].last  <= in_valid && in_eof;
        end else if (in_valid && in_eof) begin
          tag[0].last <= 1'b1;
        end
        if (idx == LAST_IDX) begin
          idx <= '0;
          dir <= !dir;
          tag[1]       <= tag[0];
          tag[1].last  <= tag[0].last || (in_valid && in_eof);
          for (int i = 2; i < 5; i++) tag[i] <= tag[i-1];
        end else begin
          idx <= idx + 1'b1;
        end
      end
    end
  end

  // a frame starts at a window boundary and ends at one
  a_sof_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    (in_valid && in_sof) |-> (idx == '0))
    else $error("frame start not at a window boundary");
  a_eof_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    (in_valid && in_eof) |-> (idx == LAST_IDX))
    else $error("frame length is not a multiple of the window length");
  a_no_gap: assert property (@(posedge clk) disable iff (!rst_n)
    in_frame |-> in_valid)
    else $error("gap inside a frame");

endmodule
