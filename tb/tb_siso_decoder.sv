// tb_siso_decoder: self-checking testbench of the sliding-window SISO decoder.
//
// Sends several frames (1 to 5 windows long, some back to back, some after an
// idle gap, random symbols over the full input range and noisy codewords) and
// compares every LLR and extrinsic value with the reference model of
// turbo_ref_pkg, bit for bit. Also checks the output order markers and that
// the first output of each frame appears 4*W+3 cycles after its first input.
module tb_siso_decoder;
  import turbo_pkg::*;
  import turbo_ref_pkg::*;

  localparam int W = WIN;
  localparam int NFR = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_sof = 1'b0, in_eof = 1'b0;
  logic signed [SYM_W-1:0] in_x = '0, in_y = '0;
  logic signed [LA_W-1:0]  in_la = '0;
  logic in_ready, out_valid, out_sof, out_eof;
  logic signed [LLR_W-1:0] out_llr;
  logic signed [LA_W-1:0]  out_le;

  siso_decoder dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int nwin [NFR] = '{1, 3, 2, 1, 5, 2};
  int gap  [NFR] = '{0, 0, 0, 30, 0, 200};
  ivec_t fx [NFR], fy [NFR], fla [NFR], ellr [NFR], ele [NFR];
  time t_in [NFR];
  longint cyc = 0;
  int mode_switch = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // count normalization direction changes of the forward unit
  logic prev_sel = 1'b0;
  always @(posedge clk) begin
    if (rst_n && dut.u_alpha.sel_max != prev_sel) mode_switch++;
    prev_sel <= dut.u_alpha.sel_max;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // stimulus
  initial begin
    for (int f = 0; f < NFR; f++) begin
      automatic int np = nwin[f] * W;
      fx[f] = new[np]; fy[f] = new[np]; fla[f] = new[np];
      if (f % 2 == 0) begin
        for (int i = 0; i < np; i++) begin
          fx[f][i]  = int'($urandom % 16) - 8;
          fy[f][i]  = int'($urandom % 16) - 8;
          fla[f][i] = int'($urandom % 32) - 16;
        end
      end else begin
        automatic ivec_t bits, par;
        bits = new[np];
        for (int i = 0; i < np; i++) bits[i] = int'($urandom % 2);
        rsc_encode(bits, par);
        for (int i = 0; i < np; i++) begin
          fx[f][i]  = channel(bits[i], 0.8, 2.0, SYM_W);
          fy[f][i]  = channel(par[i], 0.8, 2.0, SYM_W);
          fla[f][i] = sat(int'($urandom % 9) - 4 + (bits[i] != 0 ? 3 : -3), LA_W);
        end
      end
      siso_ref(np, W, fx[f], fy[f], fla[f], LLR_W, LA_W, ellr[f], ele[f]);
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    for (int f = 0; f < NFR; f++) begin
      automatic int np = nwin[f] * W;
      if (gap[f] > 0) begin
        in_valid <= 1'b0;
        in_sof   <= 1'b0;
        in_eof   <= 1'b0;
        repeat (gap[f]) @(posedge clk);
        @(negedge clk);
        while (!in_ready) @(negedge clk);
      end
      for (int i = 0; i < np; i++) begin
        in_valid <= 1'b1;
        in_sof   <= (i == 0);
        in_eof   <= (i == np - 1);
        in_x     <= fx[f][i];
        in_y     <= fy[f][i];
        in_la    <= fla[f][i];
        @(posedge clk);
        if (i == 0) t_in[f] = $time;
      end
    end
    in_valid <= 1'b0;
    in_sof   <= 1'b0;
    in_eof   <= 1'b0;
  end

  // response checking
  initial begin
    automatic int f = 0, i = 0;
    wait (rst_n);
    while (f < NFR) begin
      @(posedge clk);
      if (out_valid) begin
        if (i == 0) check(($time - t_in[f]) / 10 == 4 * W + 3,
                          $sformatf("frame %0d latency %0d", f, ($time - t_in[f]) / 10));
        check(out_sof == (i == 0), $sformatf("frame %0d sof at %0d", f, i));
        check(out_eof == (i == nwin[f] * W - 1), $sformatf("frame %0d eof at %0d", f, i));
        check(int'(out_llr) == ellr[f][i],
              $sformatf("frame %0d step %0d llr %0d expected %0d", f, i, out_llr, ellr[f][i]));
        check(int'(out_le) == ele[f][i],
              $sformatf("frame %0d step %0d le %0d expected %0d", f, i, out_le, ele[f][i]));
        i++;
        if (i == nwin[f] * W) begin
          i = 0;
          f++;
        end
      end
    end
    check(mode_switch > 0, "normalization direction never changed");
    $display("normalization direction changes: %0d", mode_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
