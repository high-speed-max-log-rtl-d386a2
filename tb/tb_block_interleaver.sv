// tb_block_interleaver: self-checking testbench of the interleaver address
// generator at its default 32 x 32 size and at a non-square 5 x 8 size.
//
// Checks every address against the closed form pi(j) = (j mod R)*C + j div R,
// checks that a full sequence is a permutation, that step low holds the
// address, that the sequence wraps after R*C steps, and that start restarts it.
module tb_block_interleaver;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, step = 1'b0;
  logic [9:0] addr;
  logic [5:0] addr_s;

  block_interleaver dut (.clk, .rst_n, .start, .step, .addr);
  block_interleaver #(.ROWS_P(5), .COLS_P(8)) dut_s (.clk, .rst_n, .start, .step, .addr(addr_s));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit seen [1024];

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int j, pj;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    j = 0;
    pj = -1;
    for (int t = 0; t < 2500; t++) begin
      @(negedge clk);
      chk(int'(addr) == ((j % 1024) % 32) * 32 + (j % 1024) / 32, $sformatf("32x32 j=%0d addr=%0d", j, addr));
      chk(int'(addr_s) == ((j % 40) % 5) * 8 + (j % 40) / 5, $sformatf("5x8 j=%0d addr=%0d", j, addr_s));
      if (j < 1024 && j != pj && t <= 2200) begin
        chk(!seen[addr], "address repeated");
        seen[addr] = 1'b1;
      end
      pj    = j;
      step  = (t % 7 != 3);
      start = (t == 2200);
      if (start) j = 0;
      else if (step) j++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
