// tb_lifo_buf: self-checking testbench of the window-reversing buffer.
//
// Writes a stream of random words, one per cycle, with the slot position and
// slot parity a schedule controller would give (window length 40), and checks
// that in every slot after the first the output is the previous slot's window
// in reverse order.
module tb_lifo_buf;
  localparam int W = 40, DW = 13;

  logic clk = 1'b0;
  logic [$clog2(W)-1:0] idx = '0;
  logic dir = 1'b0;
  logic [DW-1:0] din = '0, dout;

  lifo_buf #(.W_P(W), .DW_P(DW)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int prev [W], cur [W];

  initial begin
    for (int slot = 0; slot < 12; slot++) begin
      for (int i = 0; i < W; i++) begin
        @(negedge clk);
        idx = ($clog2(W))'(i);
        dir = slot[0];
        cur[i] = int'($urandom % (1 << DW));
        din = DW'(cur[i]);
        #1;
        if (slot > 0) begin
          checks++;
          if (int'(dout) != prev[W - 1 - i]) begin
            failures++;
            if (failures < 10) $display("FAIL: slot %0d pos %0d got %0d expected %0d",
                                        slot, i, dout, prev[W - 1 - i]);
          end
        end
      end
      prev = cur;
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
