// tb_lcu: self-checking testbench of the LLR computation unit.
//
// Drives random forward metrics, backward metrics and branch metric sets and
// checks, two cycles later, the LLR against (L1 - L0)/2 computed here by a
// direct maximum over all 16 trellis branches (trellis of the 13/15 code
// written out again in this file), saturated to the output width. Random
// values are sized so that some results saturate. Also checks out_valid.
module tb_lcu;
  import turbo_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [SM_W-1:0] alpha [NSTATES], beta [NSTATES], gamma [4];
  logic out_valid;
  logic signed [LLR_W-1:0] llr;

  lcu dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_sat = 0;
  int expq [$];
  bit vq [$];

  function automatic int nxt(int s, int u);
    int s1 = (s >> 2) & 1, s2 = (s >> 1) & 1, s3 = s & 1;
    return (((u ^ s2 ^ s3) & 1) << 2) | (s1 << 1) | s2;
  endfunction
  function automatic int par(int s, int u);
    int s1 = (s >> 2) & 1, s2 = (s >> 1) & 1, s3 = s & 1;
    return (u ^ s2 ^ s3 ^ s1 ^ s3) & 1;
  endfunction

  initial begin
    int g0, g1, off, l1, l0, v, gm, e, range;
    for (int s = 0; s < NSTATES; s++) begin alpha[s] = '0; beta[s] = '0; end
    for (int i = 0; i < 4; i++) gamma[i] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      range = (t % 3 == 0) ? 1000 : 200;
      for (int s = 0; s < NSTATES; s++) begin
        alpha[s] = SM_W'(int'($urandom % range) - range / 2);
        beta[s]  = SM_W'(int'($urandom % range) - range / 2);
      end
      g0  = int'($urandom % 64) - 32;
      g1  = int'($urandom % 64) - 32;
      off = int'($urandom % 64) - 32;
      if (t % 3 == 0) begin
        g0 = (t % 2 == 0) ? 240 : -240;
        g1 = g0;
      end
      gamma[0] = SM_W'(g0 + off); gamma[1] = SM_W'(g1 + off);
      gamma[2] = SM_W'(-g0 + off); gamma[3] = SM_W'(-g1 + off);
      in_valid = 1'($urandom);
      l1 = -100000; l0 = -100000;
      for (int s = 0; s < NSTATES; s++)
        for (int u = 0; u < 2; u++) begin
          if (u == 1) gm = par(s, u) ? g0 : g1;
          else        gm = par(s, u) ? -g1 : -g0;
          v = int'(alpha[s]) + gm + int'(beta[nxt(s, u)]);
          if (u == 1 && v > l1) l1 = v;
          if (u == 0 && v > l0) l0 = v;
        end
      e = (l1 - l0) >>> 1;
      if (e > 511) begin e = 511; n_sat++; end
      if (e < -512) begin e = -512; n_sat++; end
      expq.push_back(e);
      vq.push_back(in_valid);
      if (expq.size() > 2) begin
        e = expq.pop_front();
        checks += 2;
        if (int'(llr) != e) begin
          failures++;
          if (failures < 10) $display("FAIL: t=%0d llr=%0d expected %0d", t, llr, e);
        end
        if (out_valid != vq.pop_front()) failures++;
      end
    end
    checks++;
    if (n_sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
