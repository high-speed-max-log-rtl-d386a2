// tb_fifo_buf: self-checking testbench of the one-window delay buffer.
//
// Writes random words, one per cycle, with the slot position of a window of
// 40, and checks that the output is always the word written 40 cycles before.
module tb_fifo_buf;
  localparam int W = 40, DW = 13;

  logic clk = 1'b0;
  logic [$clog2(W)-1:0] idx = '0;
  logic [DW-1:0] din = '0, dout;

  fifo_buf #(.W_P(W), .DW_P(DW)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int hist [$];

  initial begin
    for (int t = 0; t < 12 * W; t++) begin
      @(negedge clk);
      idx = ($clog2(W))'(t % W);
      din = DW'($urandom);
      hist.push_back(int'(din));
      #1;
      if (t >= W) begin
        checks++;
        if (int'(dout) != hist[t - W]) begin
          failures++;
          if (failures < 10) $display("FAIL: t=%0d got %0d expected %0d", t, dout, hist[t - W]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
