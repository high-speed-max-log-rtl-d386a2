// tb_siso_ctrl: self-checking testbench of the sliding-window schedule
// controller (window length 40).
//
// Sends frames of 2, 1 and 3 windows (back to back and after idle gaps) and
// checks, every cycle: that a window which entered in cycle T is tagged valid
// in stage k exactly during cycles T+k*W .. T+k*W+W-1 with its first/last
// flags, and invalid otherwise; that the slot position counts every cycle
// while a window is in flight and waits at 0 when the controller is idle; that
// the slot parity flips at each slot end; and that in_ready is high exactly at
// slot boundaries and inside frames.
module tb_siso_ctrl;
  import turbo_pkg::*;

  localparam int W = WIN;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_sof = 1'b0, in_eof = 1'b0, in_ready;
  logic [$clog2(W)-1:0] idx;
  logic dir;
  win_tag_t tag [5];

  siso_ctrl dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_idle = 0;
  longint cyc = 0;
  longint wstart [$];
  bit wfirst [$], wlast [$];
  bit in_frame_m = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: cycle %0d: %s", cyc, what);
    end
  endtask

  // stimulus, driven at the falling edge
  task automatic send_frame(input int nw);
    while (!in_ready) @(negedge clk);
    for (int w = 0; w < nw; w++) begin
      wstart.push_back(cyc);
      wfirst.push_back(w == 0);
      wlast.push_back(w == nw - 1);
      for (int i = 0; i < W; i++) begin
        in_valid = 1'b1;
        in_sof = (w == 0 && i == 0);
        in_eof = (w == nw - 1 && i == W - 1);
        @(negedge clk);
      end
    end
    in_valid = 1'b0;
    in_sof = 1'b0;
    in_eof = 1'b0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    send_frame(2);
    repeat (17) @(negedge clk);
    send_frame(1);
    send_frame(3);
    repeat (400) @(negedge clk);
    send_frame(1);
    repeat (300) @(negedge clk);
    chk(n_idle > 100, "controller never idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checking, just before each rising edge
  initial begin
    int prev_idx, prev_dir;
    bit busy_m, prev_valid, prev_busy;
    prev_idx = 0; prev_dir = 0; prev_valid = 0; prev_busy = 0;
    wait (rst_n);
    forever begin
      @(negedge clk);
      #4;
      // expected stage tags
      busy_m = 0;
      for (int k = 1; k < 5; k++) begin
        automatic bit found = 0;
        for (int w = 0; w < wstart.size(); w++)
          if (cyc >= wstart[w] + k * W && cyc < wstart[w] + (k + 1) * W) begin
            found = 1;
            chk(tag[k].valid && tag[k].first == wfirst[w] && tag[k].last == wlast[w],
                $sformatf("stage %0d tag of window %0d", k, w));
          end
        if (!found) chk(!tag[k].valid, $sformatf("stage %0d should be empty", k));
        busy_m |= found;
      end
      // slot position and parity
      if (prev_busy || prev_idx != 0 || prev_valid) begin
        chk(int'(idx) == (prev_idx + 1) % W, $sformatf("idx %0d after %0d", idx, prev_idx));
      end else begin
        chk(idx == 0, "idx must wait at 0 when idle");
        n_idle++;
      end
      if (prev_idx == W - 1) chk(int'(dir) != prev_dir, "dir must flip at slot end");
      else                   chk(int'(dir) == prev_dir, "dir must hold inside a slot");
      chk(in_ready == (in_frame_m || idx == 0), "in_ready");
      prev_idx = int'(idx);
      prev_dir = int'(dir);
      prev_valid = in_valid;
      prev_busy = busy_m;
      if (in_valid) in_frame_m = !in_eof;
      @(posedge clk);
      cyc++;
    end
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
