// tb_metric_unit: self-checking testbench of the BMU + SMU pair.
//
// Streams random symbols through a forward and a backward metric unit and
// compares their state metrics, every cycle, with an unnormalized max-log
// recursion computed here. Branch metric normalization shifts all metrics of
// a unit by a common offset, so the check is on metric differences to state
// 0, plus a check that every metric stays within the 10-bit range. A load in
// the middle of the stream is checked too, and both normalization directions
// must occur.
module tb_metric_unit;
  import turbo_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [SYM_W-1:0] x = '0, y = '0;
  logic signed [LA_W-1:0]  la = '0;
  logic load = 1'b0;
  logic signed [SM_W-1:0] load_val [NSTATES];
  logic signed [SM_W-1:0] gf [4], gb [4], smf [NSTATES], smb [NSTATES], nf [NSTATES], nb [NSTATES];
  logic self, selb;

  metric_unit #(.BACKWARD(1'b0)) dut_f (.clk, .rst_n, .x, .y, .la, .load, .load_val,
    .load_max(1'b0), .gamma(gf), .sm(smf), .sm_next(nf), .sel_max(self));
  metric_unit #(.BACKWARD(1'b1)) dut_b (.clk, .rst_n, .x, .y, .la, .load, .load_val,
    .load_max(1'b0), .gamma(gb), .sm(smb), .sm_next(nb), .sel_max(selb));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_tog = 0;
  bit prev_sel = 0;

  function automatic int nxt(int s, int u);
    int s1 = (s >> 2) & 1, s2 = (s >> 1) & 1, s3 = s & 1;
    return (((u ^ s2 ^ s3) & 1) << 2) | (s1 << 1) | s2;
  endfunction
  function automatic int par(int s, int u);
    int s1 = (s >> 2) & 1, s2 = (s >> 1) & 1;
    return (u ^ s1 ^ s2) & 1;
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int rf [NSTATES], rb [NSTATES], tf [NSTATES], tb_ [NSTATES];
    int px, py, pla, v, gm;
    for (int s = 0; s < NSTATES; s++) begin rf[s] = 0; rb[s] = 0; load_val[s] = '0; end
    px = 0; py = 0; pla = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      x  = SYM_W'($urandom);
      y  = SYM_W'($urandom);
      la = LA_W'($urandom);
      load = (t == 2000);
      for (int s = 0; s < NSTATES; s++) load_val[s] = SM_W'(int'($urandom % 100) - 50);
      @(posedge clk);
      #1;
      if (t == 2000) begin
        for (int s = 0; s < NSTATES; s++) begin rf[s] = int'(load_val[s]); rb[s] = int'(load_val[s]); end
      end else begin
        for (int s = 0; s < NSTATES; s++) begin tf[s] = -100000; tb_[s] = -100000; end
        for (int s = 0; s < NSTATES; s++)
          for (int u = 0; u < 2; u++) begin
            gm = (u ? 1 : -1) * (pla + px) + (par(s, u) ? 1 : -1) * py;
            v = rf[s] + gm;
            if (v > tf[nxt(s, u)]) tf[nxt(s, u)] = v;
            v = rb[nxt(s, u)] + gm;
            if (v > tb_[s]) tb_[s] = v;
          end
        rf = tf; rb = tb_;
      end
      px = int'(x); py = int'(y); pla = int'(la);
      for (int s = 1; s < NSTATES; s++) begin
        chk(int'(smf[s]) - int'(smf[0]) == rf[s] - rf[0],
            $sformatf("t=%0d forward state %0d: %0d vs %0d", t, s, int'(smf[s]) - int'(smf[0]), rf[s] - rf[0]));
        chk(int'(smb[s]) - int'(smb[0]) == rb[s] - rb[0],
            $sformatf("t=%0d backward state %0d", t, s));
      end
      if (self != prev_sel) n_tog++;
      prev_sel = self;
    end
    chk(n_tog > 0, "normalization direction never changed");
    $display("normalization direction changes %0d", n_tog);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
