// tb_smu_acs: self-checking testbench of the state metric unit.
//
// Runs a forward and a backward instance side by side on random branch metric
// sets (normalized the way the branch metric unit would, following each
// unit's own sel_max) and compares every state metric, every cycle, with an
// add-compare-select model written here from the encoder equations. Also
// checks the normalization rule (all metrics above zero -> max, all below ->
// min, otherwise unchanged), the load input, and that both directions of
// normalization occur.
module tb_smu_acs;
  import turbo_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [SM_W-1:0] gf [4], gb [4];
  logic load = 1'b0, load_max = 1'b0;
  logic signed [SM_W-1:0] load_val [NSTATES];
  logic signed [SM_W-1:0] smf [NSTATES], smb [NSTATES], nf [NSTATES], nb [NSTATES];
  logic self, selb;

  smu_acs #(.BACKWARD(1'b0)) dut_f (.clk, .rst_n, .gamma(gf), .load, .load_val, .load_max,
                                   .sm(smf), .sm_next(nf), .sel_max(self));
  smu_acs #(.BACKWARD(1'b1)) dut_b (.clk, .rst_n, .gamma(gb), .load, .load_val, .load_max,
                                   .sm(smb), .sm_next(nb), .sel_max(selb));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_max = 0, n_min = 0;

  function automatic int nxt(int s, int u);
    int s1 = (s >> 2) & 1, s2 = (s >> 1) & 1, s3 = s & 1;
    return (((u ^ s2 ^ s3) & 1) << 2) | (s1 << 1) | s2;
  endfunction
  function automatic int par(int s, int u);
    int s1 = (s >> 2) & 1, s3 = s & 1, s2 = (s >> 1) & 1;
    return (u ^ s1 ^ s2 ^ s3 ^ s3) & 1;
  endfunction
  function automatic int bm(int u, int p, int g0, int g1);
    if (u == 1) return p ? g0 : g1;
    return p ? -g1 : -g0;
  endfunction

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL: %s %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int mf [NSTATES], mb [NSTATES], tf [NSTATES], tb_ [NSTATES];
    int g0f, g1f, mxf, g0b, g1b, mxb, v;
    bit modef, modeb, pos, neg;
    for (int s = 0; s < NSTATES; s++) begin mf[s] = 0; mb[s] = 0; load_val[s] = '0; end
    for (int i = 0; i < 4; i++) begin gf[i] = '0; gb[i] = '0; end
    modef = 0; modeb = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      // model normalization choice from the current metrics
      pos = 1; neg = 1;
      for (int s = 0; s < NSTATES; s++) begin if (mf[s] <= 0) pos = 0; if (mf[s] >= 0) neg = 0; end
      if (pos) modef = 1; else if (neg) modef = 0;
      pos = 1; neg = 1;
      for (int s = 0; s < NSTATES; s++) begin if (mb[s] <= 0) pos = 0; if (mb[s] >= 0) neg = 0; end
      if (pos) modeb = 1; else if (neg) modeb = 0;
      chk(int'(self), int'(modef), "forward sel_max");
      chk(int'(selb), int'(modeb), "backward sel_max");
      if (modef) n_max++; else n_min++;
      // branch metrics normalized as the branch metric unit would
      g0f = int'($urandom % 61) - 30; g1f = int'($urandom % 61) - 30;
      g0b = int'($urandom % 61) - 30; g1b = int'($urandom % 61) - 30;
      mxf = (g0f < 0 ? -g0f : g0f) > (g1f < 0 ? -g1f : g1f) ? (g0f < 0 ? -g0f : g0f) : (g1f < 0 ? -g1f : g1f);
      mxb = (g0b < 0 ? -g0b : g0b) > (g1b < 0 ? -g1b : g1b) ? (g0b < 0 ? -g0b : g0b) : (g1b < 0 ? -g1b : g1b);
      if (!modef) mxf = -mxf;
      if (!modeb) mxb = -mxb;
      gf[0] = SM_W'(g0f - mxf); gf[1] = SM_W'(g1f - mxf); gf[2] = SM_W'(-g0f - mxf); gf[3] = SM_W'(-g1f - mxf);
      gb[0] = SM_W'(g0b - mxb); gb[1] = SM_W'(g1b - mxb); gb[2] = SM_W'(-g0b - mxb); gb[3] = SM_W'(-g1b - mxb);
      load = (t % 97 == 0);
      load_max = 1'($urandom);
      for (int s = 0; s < NSTATES; s++) load_val[s] = SM_W'(int'($urandom % 200) - 100);
      // model step
      for (int s = 0; s < NSTATES; s++) begin tf[s] = -100000; tb_[s] = -100000; end
      for (int s = 0; s < NSTATES; s++)
        for (int u = 0; u < 2; u++) begin
          v = mf[s] + bm(u, par(s, u), g0f, g1f) - mxf;
          if (v > tf[nxt(s, u)]) tf[nxt(s, u)] = v;
          v = mb[nxt(s, u)] + bm(u, par(s, u), g0b, g1b) - mxb;
          if (v > tb_[s]) tb_[s] = v;
        end
      #1;
      for (int s = 0; s < NSTATES; s++) begin
        chk(int'(nf[s]), tf[s], $sformatf("forward sm_next[%0d]", s));
        chk(int'(nb[s]), tb_[s], $sformatf("backward sm_next[%0d]", s));
      end
      if (load) begin
        for (int s = 0; s < NSTATES; s++) begin mf[s] = int'(load_val[s]); mb[s] = int'(load_val[s]); end
        modef = load_max; modeb = load_max;
      end else begin
        mf = tf; mb = tb_;
      end
      @(posedge clk);
      #1;
      for (int s = 0; s < NSTATES; s++) begin
        chk(int'(smf[s]), mf[s], $sformatf("forward sm[%0d]", s));
        chk(int'(smb[s]), mb[s], $sformatf("backward sm[%0d]", s));
      end
    end
    checks++;
    if (n_max == 0 || n_min == 0) failures++;
    $display("max-normalized steps %0d, min-normalized steps %0d", n_max, n_min);
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
