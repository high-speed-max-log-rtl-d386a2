// tb_turbo_ber: bit error rate run of the turbo decoder over an AWGN channel
// with BPSK, for 1, 2, 4 and 8 iterations.
//
// Four turbo_decoder instances, identical except for ITER_P = 1, 2, 4 and 8,
// receive the same frames side by side. Frames are 1024 random bits, turbo
// encoded (two K = 4 RSC encoders, 32 x 32 block interleaver, rate 1/3), sent
// as BPSK with Gaussian noise of sigma = sqrt(3 / (2 Eb/N0)) and quantized to
// 4-bit symbols (received value times 2, rounded, saturated).
//
// Checks:
//   - every LLR of every instance equals the software turbo decoder of
//     turbo_ref_pkg after the same number of iterations, bit for bit;
//   - decoding at 8 iterations has fewer bit errors than the hard decisions
//     of the channel at every Eb/N0 point, and no more than at 1 iteration;
//   - the 8-iteration error count does not grow from one Eb/N0 point to the
//     next higher one.
// It prints the measured bit error rates per point and iteration count. The
// Eb/N0 points (1.0, 1.5 and 2.0 dB) and the iteration counts are those of a
// typical turbo decoder BER plot; the number of frames per point is kept
// small (32 frames, 32768 bits) so that the run takes well under a minute; the
// rates below about 1e-4 are not resolved.
module tb_turbo_ber;
  import turbo_pkg::*;
  import turbo_ref_pkg::*;

  localparam int ROWS = 32, COLS = 32, N = ROWS * COLS, W = WIN;
  localparam int NP = ((N + W - 1) / W) * W;
  localparam int NI = 4;
  localparam int ITS [NI] = '{1, 2, 4, 8};
  localparam int NPT = 3;
  localparam real EBN0 [NPT] = '{1.0, 1.5, 2.0};
  localparam int FRAMES = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [SYM_W-1:0] in_x = '0, in_y1 = '0, in_y2 = '0;
  logic [NI-1:0] rdy, ov, ob, olast, bz;
  logic signed [LLR_W-1:0] ol [NI];

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int src [N];
  int exp_llr [NI][N];
  int chk_g [NI], fail_g [NI], err_g [NI], done_g [NI];
  int biterr [NPT][NI];

  for (genvar g = 0; g < NI; g++) begin : g_dut
    turbo_decoder #(.ITER_P(ITS[g])) u_dut (
      .clk, .rst_n, .in_valid, .in_ready(rdy[g]), .in_x, .in_y1, .in_y2,
      .out_valid(ov[g]), .out_bit(ob[g]), .out_llr(ol[g]), .out_last(olast[g]), .busy(bz[g])
    );

    int k = 0;
    initial begin
      chk_g[g]  = 0;
      fail_g[g] = 0;
      err_g[g]  = 0;
      done_g[g] = 0;
    end
    always @(posedge clk) if (rst_n && ov[g]) begin
      chk_g[g]++;
      if (int'(ol[g]) != exp_llr[g][k]) begin
        fail_g[g]++;
        if (fail_g[g] < 5)
          $display("FAIL: %0d iterations bit %0d llr %0d expected %0d", ITS[g], k, ol[g], exp_llr[g][k]);
      end
      if (int'(ob[g]) != src[k]) err_g[g]++;
      if (olast[g]) begin
        k = 0;
        done_g[g]++;
      end else begin
        k++;
      end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // software turbo decoder; keeps the LLRs after 1, 2, 4 and 8 iterations
  task automatic ref_decode(input int cx [N], input int cy1 [N], input int cy2 [N]);
    ivec_t x, y, la, llr, le;
    int    ext [N];
    x = new[NP]; y = new[NP]; la = new[NP];
    for (int j = 0; j < N; j++) ext[j] = 0;
    for (int it = 0; it < ITS[NI-1]; it++) begin
      for (int j = 0; j < NP; j++) begin
        x[j]  = (j < N) ? cx[j] : 0;
        y[j]  = (j < N) ? cy1[j] : 0;
        la[j] = (j < N && it > 0) ? ext[j] : 0;
      end
      siso_ref(NP, W, x, y, la, LLR_W, LA_W, llr, le);
      for (int j = 0; j < N; j++) ext[j] = le[j];
      for (int j = 0; j < NP; j++) begin
        x[j]  = (j < N) ? cx[intl(j, ROWS, COLS)] : 0;
        y[j]  = (j < N) ? cy2[j] : 0;
        la[j] = (j < N) ? ext[intl(j, ROWS, COLS)] : 0;
      end
      siso_ref(NP, W, x, y, la, LLR_W, LA_W, llr, le);
      for (int j = 0; j < N; j++) begin
        ext[intl(j, ROWS, COLS)] = le[j];
        for (int g = 0; g < NI; g++)
          if (it == ITS[g] - 1) exp_llr[g][intl(j, ROWS, COLS)] = llr[j];
      end
    end
  endtask

  initial begin
    int  cx [N], cy1 [N], cy2 [N];
    int  raw [NPT];
    int  nfr;
    real sigma;
    ivec_t b, bi, p1, p2;
    b = new[N]; bi = new[N];
    nfr = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int p = 0; p < NPT; p++) begin
      raw[p] = 0;
      for (int g = 0; g < NI; g++) err_g[g] = 0;
      sigma = $sqrt(3.0 / (2.0 * (10.0 ** (EBN0[p] / 10.0))));
      for (int f = 0; f < FRAMES; f++) begin
        for (int j = 0; j < N; j++) begin
          src[j] = int'($urandom % 2);
          b[j] = src[j];
        end
        for (int j = 0; j < N; j++) bi[j] = b[intl(j, ROWS, COLS)];
        rsc_encode(b, p1);
        rsc_encode(bi, p2);
        for (int j = 0; j < N; j++) begin
          cx[j]  = channel(b[j], sigma, 2.0, SYM_W);
          cy1[j] = channel(p1[j], sigma, 2.0, SYM_W);
          cy2[j] = channel(p2[j], sigma, 2.0, SYM_W);
          if ((cx[j] > 0 ? 1 : 0) != src[j]) raw[p]++;
        end
        ref_decode(cx, cy1, cy2);
        @(negedge clk);
        while (rdy != '1) @(negedge clk);
        for (int j = 0; j < N; j++) begin
          in_valid = 1'b1;
          in_x     = cx[j];
          in_y1    = cy1[j];
          in_y2    = cy2[j];
          @(negedge clk);
        end
        in_valid = 1'b0;
        nfr++;
        for (int g = 0; g < NI; g++) while (done_g[g] < nfr) @(negedge clk);
      end
      for (int g = 0; g < NI; g++) biterr[p][g] = err_g[g];
      $display("Eb/N0 %0.1f dB (sigma %0.3f), %0d bits: channel hard-decision BER %e", EBN0[p], sigma,
               FRAMES * N, real'(raw[p]) / real'(FRAMES * N));
      for (int g = 0; g < NI; g++)
        $display("  %0d iteration(s): BER %e (%0d errors)", ITS[g],
                 real'(biterr[p][g]) / real'(FRAMES * N), biterr[p][g]);
      check(biterr[p][NI-1] < raw[p], $sformatf("%0.1f dB: decoding does not beat the channel", EBN0[p]));
      check(biterr[p][NI-1] <= biterr[p][0], $sformatf("%0.1f dB: 8 iterations worse than 1", EBN0[p]));
      if (p > 0)
        check(biterr[p][NI-1] <= biterr[p-1][NI-1], $sformatf("%0.1f dB: BER grew with Eb/N0", EBN0[p]));
    end
    for (int g = 0; g < NI; g++) begin
      checks += chk_g[g];
      failures += fail_g[g];
      check(chk_g[g] == NPT * FRAMES * N, $sformatf("%0d iterations: %0d outputs", ITS[g], chk_g[g]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (NPT * FRAMES * (2 * N + 2 * ITS[NI-1] * (NP + 4 * W + 10)) + 5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
