// tb_turbo_decoder: end-to-end testbench of the turbo decoder at its default
// size (1024-bit frames, 32 x 32 block interleaver, window 40, 8 iterations).
//
// Encodes random frames with the turbo encoder of turbo_ref_pkg (two
// constituent encoders, the second behind the block interleaver), sends them
// over a BPSK channel with Gaussian noise (or none), quantizes to 4-bit
// symbols and decodes them. Every output LLR is compared bit for bit with a
// software turbo decoder built from the reference SISO model; the decoded bits
// are compared with the source bits; the decoding time is checked against
// 2*ITER*(NP + 4*W + 3) cycles. It also counts how often the mechanisms of the
// design were exercised: changes of the branch normalization direction in all
// six state metric units, frame-start loads of the forward unit, dummy-beta
// handoffs, last-window starts of beta2, zero-padded steps, extrinsic
// saturation and half-iterations; each must occur at least once.
module tb_turbo_decoder;
  import turbo_pkg::*;
  import turbo_ref_pkg::*;

  localparam int ROWS = 32, COLS = 32, N = ROWS * COLS, ITER = 8, W = WIN;
  localparam int NP = ((N + W - 1) / W) * W;
  localparam int NFRAMES = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready;
  logic signed [SYM_W-1:0] in_x = '0, in_y1 = '0, in_y2 = '0;
  logic out_valid, out_bit, out_last, busy;
  logic signed [LLR_W-1:0] out_llr;

  turbo_decoder dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ---------------------------------------------------------------- counters
  int n_norm = 0, n_ainit = 0, n_handoff = 0, n_blast = 0, n_pad = 0, n_sat = 0, n_half = 0;
  logic [5:0] sel_prev = '0;
  logic [5:0] sel_now;

  assign sel_now = {dut.u_siso1.u_alpha.sel_max, dut.u_siso1.u_beta1.sel_max,
                    dut.u_siso1.u_beta2.sel_max, dut.u_siso2.u_alpha.sel_max,
                    dut.u_siso2.u_beta1.sel_max, dut.u_siso2.u_beta2.sel_max};

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < 6; i++) if (sel_now[i] != sel_prev[i]) n_norm++;
    sel_prev <= sel_now;
    if (dut.u_siso1.tag[2].valid && dut.u_siso1.tag[2].first && dut.u_siso1.idx == '0) n_ainit++;
    if (dut.u_siso2.tag[2].valid && dut.u_siso2.tag[2].first && dut.u_siso2.idx == '0) n_ainit++;
    if (dut.u_siso1.tag[3].valid && !dut.u_siso1.tag[3].last && dut.u_siso1.idx == '0) n_handoff++;
    if (dut.u_siso2.tag[3].valid && !dut.u_siso2.tag[3].last && dut.u_siso2.idx == '0) n_handoff++;
    if (dut.u_siso1.tag[3].valid && dut.u_siso1.tag[3].last && dut.u_siso1.idx == '0) n_blast++;
    if (dut.u_siso2.tag[3].valid && dut.u_siso2.tag[3].last && dut.u_siso2.idx == '0) n_blast++;
    if (dut.feed && !dut.rd_in) n_pad++;
    if (dut.so_valid && dut.wr_in &&
        (dut.so_le == LA_W'(2 ** (LA_W - 1) - 1) || dut.so_le == LA_W'(-(2 ** (LA_W - 1)))))
      n_sat++;
    if (dut.so_valid && dut.so_eof) n_half++;
  end

  // ---------------------------------------------------------------- frames
  int    src [NFRAMES][N];
  int    cx [NFRAMES][N], cy1 [NFRAMES][N], cy2 [NFRAMES][N];
  int    exp_llr [NFRAMES][N];
  real   sigma [NFRAMES] = '{0.0, 0.95, 0.84};

  // software turbo decoder with the same arithmetic as the RTL
  task automatic ref_decode(input int f);
    ivec_t x, y, la, llr, le;
    int    ext [N];
    x = new[NP]; y = new[NP]; la = new[NP];
    for (int j = 0; j < N; j++) ext[j] = 0;
    for (int it = 0; it < ITER; it++) begin
      for (int j = 0; j < NP; j++) begin
        x[j]  = (j < N) ? cx[f][j] : 0;
        y[j]  = (j < N) ? cy1[f][j] : 0;
        la[j] = (j < N && it > 0) ? ext[j] : 0;
      end
      siso_ref(NP, W, x, y, la, LLR_W, LA_W, llr, le);
      for (int j = 0; j < N; j++) ext[j] = le[j];
      for (int j = 0; j < NP; j++) begin
        x[j]  = (j < N) ? cx[f][intl(j, ROWS, COLS)] : 0;
        y[j]  = (j < N) ? cy2[f][j] : 0;
        la[j] = (j < N) ? ext[intl(j, ROWS, COLS)] : 0;
      end
      siso_ref(NP, W, x, y, la, LLR_W, LA_W, llr, le);
      for (int j = 0; j < N; j++) begin
        ext[intl(j, ROWS, COLS)] = le[j];
        if (it == ITER - 1) exp_llr[f][intl(j, ROWS, COLS)] = llr[j];
      end
    end
  endtask

  initial begin
    for (int f = 0; f < NFRAMES; f++) begin
      automatic ivec_t b, bi, p1, p2;
      b = new[N]; bi = new[N];
      for (int j = 0; j < N; j++) begin
        src[f][j] = int'($urandom % 2);
        b[j] = src[f][j];
      end
      for (int j = 0; j < N; j++) bi[j] = b[intl(j, ROWS, COLS)];
      rsc_encode(b, p1);
      rsc_encode(bi, p2);
      for (int j = 0; j < N; j++) begin
        cx[f][j]  = channel(b[j], sigma[f], 2.0, SYM_W);
        cy1[f][j] = channel(p1[j], sigma[f], 2.0, SYM_W);
        cy2[f][j] = channel(p2[j], sigma[f], 2.0, SYM_W);
      end
      ref_decode(f);
    end
  end

  // ---------------------------------------------------------------- drive and check
  initial begin
    time t_start, t_end;
    int  errs, raw_errs, k;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int f = 0; f < NFRAMES; f++) begin
      @(negedge clk);
      while (!in_ready) @(negedge clk);
      for (int j = 0; j < N; j++) begin
        in_valid = 1'b1;
        in_x     = cx[f][j];
        in_y1    = cy1[f][j];
        in_y2    = cy2[f][j];
        @(negedge clk);
      end
      in_valid = 1'b0;
      t_start = $time;
      while (!out_valid) @(negedge clk);
      t_end = $time;
      check((t_end - t_start) / 10 == 2 * ITER * (NP + 4 * W + 3),
            $sformatf("frame %0d decoding took %0d cycles, expected %0d", f,
                      (t_end - t_start) / 10, 2 * ITER * (NP + 4 * W + 3)));
      errs = 0;
      raw_errs = 0;
      k = 0;
      while (out_valid) begin
        check(int'(out_llr) == exp_llr[f][k],
              $sformatf("frame %0d bit %0d llr %0d expected %0d", f, k, out_llr, exp_llr[f][k]));
        check(out_bit == (exp_llr[f][k] > 0), $sformatf("frame %0d bit %0d decision", f, k));
        check(out_last == (k == N - 1), $sformatf("frame %0d bit %0d last flag", f, k));
        if (int'(out_bit) != src[f][k]) errs++;
        if ((cx[f][k] > 0 ? 1 : 0) != src[f][k]) raw_errs++;
        k++;
        @(negedge clk);
      end
      check(k == N, $sformatf("frame %0d gave %0d bits", f, k));
      $display("frame %0d: sigma %0.2f, channel bit errors %0d, decoded bit errors %0d",
               f, sigma[f], raw_errs, errs);
      if (sigma[f] == 0.0) check(errs == 0, "errors on a noiseless frame");
      else                 check(errs * 4 <= raw_errs, "decoder does not correct errors");
    end
    $display("normalization direction changes %0d, alpha frame starts %0d, beta handoffs %0d,",
             n_norm, n_ainit, n_handoff);
    $display("last-window beta starts %0d, padded steps %0d, saturated extrinsics %0d, half-iterations %0d",
             n_blast, n_pad, n_sat, n_half);
    check(n_norm > 0, "normalization direction never changed");
    check(n_ainit == 2 * ITER * NFRAMES, "forward frame-start loads");
    check(n_handoff > 0, "no dummy beta handoff");
    check(n_blast == 2 * ITER * NFRAMES, "last-window beta starts");
    check(n_pad == 2 * ITER * NFRAMES * (NP - N), "padded steps");
    check(n_sat > 0, "extrinsic never saturated");
    check(n_half == 2 * ITER * NFRAMES, "half-iterations");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (NFRAMES * (2 * N + 2 * ITER * (NP + 4 * W + 10)) + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
