// tb_bmu_norm: self-checking testbench of the branch metric unit.
//
// Applies random systematic, parity and a-priori values over their full
// ranges with both normalization choices and checks, one cycle later, the
// four normalized branch metrics against values computed here: the raw
// metrics +-(la+x+y), +-(la+x-y) shifted by the largest magnitude, downwards
// for max normalization and upwards for min normalization. It also checks that
// the largest (or smallest) normalized metric is exactly zero.
module tb_bmu_norm;
  import turbo_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [SYM_W-1:0] x = '0, y = '0;
  logic signed [LA_W-1:0]  la = '0;
  logic sel_max = 1'b0;
  logic signed [SM_W-1:0] gamma [4];

  bmu_norm dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    int ex [4];
    int g0, g1, m, ext;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      x       = SYM_W'($urandom);
      y       = SYM_W'($urandom);
      la      = LA_W'($urandom);
      sel_max = 1'($urandom);
      g0 = int'(la) + int'(x) + int'(y);
      g1 = int'(la) + int'(x) - int'(y);
      m  = (g0 < 0 ? -g0 : g0) > (g1 < 0 ? -g1 : g1) ? (g0 < 0 ? -g0 : g0) : (g1 < 0 ? -g1 : g1);
      ex[0] = g0; ex[1] = g1; ex[2] = -g0; ex[3] = -g1;
      for (int i = 0; i < 4; i++) ex[i] = sel_max ? ex[i] - m : ex[i] + m;
      @(negedge clk);
      ext = sel_max ? -1000 : 1000;
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (int'(gamma[i]) != ex[i]) begin
          failures++;
          if (failures < 10) $display("FAIL: x=%0d y=%0d la=%0d max=%0d gamma[%0d]=%0d expected %0d",
                                      x, y, la, sel_max, i, gamma[i], ex[i]);
        end
        if (sel_max) ext = (int'(gamma[i]) > ext) ? int'(gamma[i]) : ext;
        else         ext = (int'(gamma[i]) < ext) ? int'(gamma[i]) : ext;
      end
      checks++;
      if (ext != 0) failures++;
    end
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
