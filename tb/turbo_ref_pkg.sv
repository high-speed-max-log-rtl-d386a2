// turbo_ref_pkg: reference models for the testbenches of the turbo decoder.
//
// Holds an independent software model of the windowed max-log-MAP SISO
// decoder with the same arithmetic as the RTL (integer metrics without any
// normalization, which cannot change the result as long as the RTL does not
// overflow), a turbo encoder for the same code, the block interleaver
// permutation written as a closed formula, and a Gaussian noise source.
package turbo_ref_pkg;
  import turbo_pkg::*;

  typedef int ivec_t [];

  function automatic int sat(input int v, input int bits);
    int hi, lo;
    hi = (1 <<< (bits - 1)) - 1;
    lo = -(1 <<< (bits - 1));
    if (v > hi) return hi;
    if (v < lo) return lo;
    return v;
  endfunction

  // branch metric of step k for information bit u and parity bit p
  function automatic int ref_gamma(input int x, input int y, input int la,
                                   input int unsigned u, input int unsigned p);
    int s;
    s = la + x;
    return (u != 0 ? s : -s) + (p != 0 ? y : -y);
  endfunction

  // Windowed max-log-MAP over np steps (np a multiple of w).
  function automatic void siso_ref(input int np, input int w,
                                   input ivec_t x, input ivec_t y, input ivec_t la,
                                   input int llr_bits, input int la_bits,
                                   output ivec_t llr, output ivec_t le);
    int alpha [][NSTATES];
    int b [NSTATES], bn [NSTATES];
    int nwin, k, l1, l0, v, d;
    llr  = new[np];
    le   = new[np];
    alpha = new[np + 1];
    // forward recursion: alpha[k] is the metric before step k
    for (int s = 0; s < NSTATES; s++) alpha[0][s] = (s == 0) ? 0 : -INIT_PEN;
    for (k = 0; k < np; k++) begin
      for (int ns = 0; ns < NSTATES; ns++) alpha[k+1][ns] = -1000000000;
      for (int s = 0; s < NSTATES; s++)
        for (int u = 0; u < 2; u++) begin
          v = alpha[k][s] + ref_gamma(x[k], y[k], la[k], u, parity(s, u));
          if (v > alpha[k+1][next_state(s, u)]) alpha[k+1][next_state(s, u)] = v;
        end
    end
    nwin = np / w;
    for (int wi = 0; wi < nwin; wi++) begin
      // starting beta of window wi
      for (int s = 0; s < NSTATES; s++) b[s] = 0;
      if (wi != nwin - 1) begin
        for (k = (wi + 2) * w - 1; k >= (wi + 1) * w; k--) begin
          for (int s = 0; s < NSTATES; s++) begin
            bn[s] = -1000000000;
            for (int u = 0; u < 2; u++) begin
              v = b[next_state(s, u)] + ref_gamma(x[k], y[k], la[k], u, parity(s, u));
              if (v > bn[s]) bn[s] = v;
            end
          end
          b = bn;
        end
      end
      // backward recursion with LLR
      for (k = (wi + 1) * w - 1; k >= wi * w; k--) begin
        l1 = -1000000000;
        l0 = -1000000000;
        for (int s = 0; s < NSTATES; s++)
          for (int u = 0; u < 2; u++) begin
            v = alpha[k][s] + ref_gamma(x[k], y[k], la[k], u, parity(s, u))
              + b[next_state(s, u)];
            if (u == 1 && v > l1) l1 = v;
            if (u == 0 && v > l0) l0 = v;
          end
        d = l1 - l0;
        llr[k] = sat(d >>> 1, llr_bits);
        le[k]  = sat(llr[k] - la[k] - x[k], la_bits);
        for (int s = 0; s < NSTATES; s++) begin
          bn[s] = -1000000000;
          for (int u = 0; u < 2; u++) begin
            v = b[next_state(s, u)] + ref_gamma(x[k], y[k], la[k], u, parity(s, u));
            if (v > bn[s]) bn[s] = v;
          end
        end
        b = bn;
      end
    end
  endfunction

  // block interleaver: j-th element read column-wise from a rows x cols
  // matrix written row-wise
  function automatic int intl(input int j, input int rows, input int cols);
    return (j % rows) * cols + (j / rows);
  endfunction

  // recursive systematic encoder of the constituent code, unterminated
  function automatic void rsc_encode(input ivec_t bits, output ivec_t par);
    int unsigned s;
    par = new[bits.size()];
    s = 0;
    for (int i = 0; i < bits.size(); i++) begin
      par[i] = int'(parity(s, bits[i]));
      s = next_state(s, bits[i]);
    end
  endfunction

  // standard normal sample (Box-Muller)
  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom % 1000000) + 1.0) / 1000001.0;
    u2 = real'($urandom % 1000000) / 1000000.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  // BPSK (bit 1 -> +1) plus noise, scaled and rounded to a signed sym_bits value
  function automatic int channel(input int bit_v, input real sigma, input real scale,
                                 input int sym_bits);
    real r;
    int q;
    r = (bit_v != 0 ? 1.0 : -1.0) + sigma * gauss();
    q = $rtoi(r * scale + (r >= 0.0 ? 0.5 : -0.5));
    return sat(q, sym_bits);
  endfunction

endpackage
