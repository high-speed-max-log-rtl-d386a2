// turbo_pkg: shared constants, types and trellis functions of the max-log-MAP
// turbo decoder.
//
// The constituent code is a rate-1/2 recursive systematic convolutional code
// with constraint length K = 4 (8 states). Its generators (feedback 1+D^2+D^3,
// feed-forward 1+D+D^3, octal 13/15, the 3GPP UMTS code) are this design's
// choice: the design only fixes K = 4. The state is the encoder shift register
// {s1,s2,s3} with s1, the most recent bit, in bit 2.
//
// Word lengths: received symbols are signed 4-bit and state metrics signed
// 10-bit, as in the design's word-length table. The a-priori / extrinsic word
// length (5 bits) and the LLR output width are this design's choices.
//
// Soft values use the convention "positive means bit 1": a branch with
// information bit u and parity bit p carries the metric
//   gamma(u,p) = (2u-1)*(La + x) + (2p-1)*y
// so the four metrics of one trellis step are +g0, +g1, -g0, -g1 with
// g0 = La + x + y and g1 = La + x - y.
package turbo_pkg;

  localparam int unsigned NSTATES  = 8;   // 2^(K-1), K = 4
  localparam int unsigned SYM_W    = 4;   // received symbol word length
  localparam int unsigned LA_W     = 5;   // a-priori / extrinsic word length
  localparam int unsigned SM_W     = 10;  // branch and state metric word length
  localparam int unsigned LLR_W    = 10;  // soft output word length
  localparam int unsigned WIN      = 40;  // sliding window length
  // Penalty given to states other than the zero state at the start of a frame.
  localparam int          INIT_PEN = 384;

  // Index of a branch metric inside the normalized 4-entry set:
  // 0: (u=1,p=1) = +g0, 1: (u=1,p=0) = +g1, 2: (u=0,p=0) = -g0, 3: (u=0,p=1) = -g1
  function automatic int unsigned bm_index(input int unsigned u, input int unsigned p);
    if (u != 0) return (p != 0) ? 0 : 1;
    else        return (p != 0) ? 3 : 2;
  endfunction

  // Next state of the encoder from state s with information bit u.
  function automatic int unsigned next_state(input int unsigned s, input int unsigned u);
    int unsigned s1, s2, s3, a;
    s1 = (s >> 2) & 1;
    s2 = (s >> 1) & 1;
    s3 = s & 1;
    a  = (u ^ s2 ^ s3) & 1;
    return (a << 2) | (s1 << 1) | s2;
  endfunction

  // Parity bit produced from state s with information bit u.
  function automatic int unsigned parity(input int unsigned s, input int unsigned u);
    int unsigned s1, s2, s3, a;
    s1 = (s >> 2) & 1;
    s2 = (s >> 1) & 1;
    s3 = s & 1;
    a  = (u ^ s2 ^ s3) & 1;
    return (a ^ s1 ^ s3) & 1;
  endfunction

  // The two trellis predecessors of state ns: predecessor number j (0 or 1),
  // in increasing state order.
  function automatic int unsigned pred_state(input int unsigned ns, input int unsigned j);
    int unsigned n;
    n = 0;
    for (int unsigned s = 0; s < NSTATES; s++)
      for (int unsigned u = 0; u < 2; u++)
        if (next_state(s, u) == ns) begin
          if (n == j) return s;
          n++;
        end
    return 0;
  endfunction

  // Information bit on the branch from pred_state(ns, j) into ns.
  function automatic int unsigned pred_input(input int unsigned ns, input int unsigned j);
    int unsigned n;
    n = 0;
    for (int unsigned s = 0; s < NSTATES; s++)
      for (int unsigned u = 0; u < 2; u++)
        if (next_state(s, u) == ns) begin
          if (n == j) return u;
          n++;
        end
    return 0;
  endfunction

  // LLR grouping: the 8 branches carrying information bit u form 4 groups of
  // two that share one branch metric. Member m (0/1) of group g is the branch
  // leaving state lcu_state(u, g, m). Groups 0 and 1 have parity 1, 2 and 3
  // parity 0.
  function automatic int unsigned lcu_state(input int unsigned u, input int unsigned g,
                                            input int unsigned m);
    int unsigned n, want_p, skip;
    want_p = (g < 2) ? 1 : 0;
    skip   = (g % 2) * 2 + m;
    n = 0;
    for (int unsigned s = 0; s < NSTATES; s++)
      if (parity(s, u) == want_p) begin
        if (n == skip) return s;
        n++;
      end
    return 0;
  endfunction

  // Per-window tag carried through the sliding-window schedule.
  typedef struct packed {
    logic valid;  // the slot holds a window of a frame
    logic first;  // first window of the frame
    logic last;   // last window of the frame
  } win_tag_t;

endpackage
