// tb_reset_ctrl: checks the PLL-lock based reset.
//
// Reset must be active while the PLL is unlocked, fall exactly
// HOLD_CYCLES + 3 rising edges after lock is raised (two synchronizer stages,
// the hold count, one output register), stay low while lock holds, and come
// back within three edges when lock is lost.
module tb_reset_ctrl;
  localparam int HOLD = 10;
  logic clk = 1'b0, pll_locked = 1'b0, rst;
  always #5 clk = ~clk;

  reset_ctrl #(.HOLD_CYCLES(HOLD)) dut (.clk, .pll_locked, .rst);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int edges;
    for (int round = 0; round < 3; round++) begin
      repeat (20) begin @(posedge clk); #1 check(rst, "reset held while unlocked"); end
      @(negedge clk) pll_locked = 1'b1;
      edges = 0;
      do begin @(posedge clk); #1 edges++; end while (rst && edges < 100);
      check(edges == HOLD + 3, $sformatf("release after %0d edges", edges));
      repeat (50) begin @(posedge clk); #1 check(!rst, "reset stays low"); end
      @(negedge clk) pll_locked = 1'b0;
      edges = 0;
      do begin @(posedge clk); #1 edges++; end while (!rst && edges < 100);
      check(edges <= 3, $sformatf("reset on loss of lock after %0d edges", edges));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
