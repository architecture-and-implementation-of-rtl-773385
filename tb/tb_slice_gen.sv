// tb_slice_gen: checks the Slice (frame) generator.
//
// With div16 set the Slice must repeat every 16 clocks and be high for 8;
// with div16 clear every 8 clocks, high for 4. slice_start must mark each
// rising edge of Slice, phase must count 0..period-1 from it, and startup
// must pulse exactly once, with the first Slice after reset.
module tb_slice_gen;
  logic clk = 1'b0, rst = 1'b1, div16 = 1'b1;
  logic slice, slice_start, startup;
  logic [3:0] phase;
  always #5 clk = ~clk;

  slice_gen dut (.clk, .rst, .div16, .slice, .slice_start, .startup, .phase);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: watch the outputs cycle by cycle
  int startups = 0, starts = 0, since = -1, high = 0, period = 0;
  int last_period = 0, last_high = 0;
  logic slice_q = 1'b0;
  always @(posedge clk) begin
    #1;
    if (!rst) begin
      if (startup) startups++;
      check(slice_start == (slice && !slice_q), "slice_start marks the rising edge");
      if (slice_start) begin
        if (since >= 0) begin last_period = since + 1; last_high = high; end
        since = 0; high = 1; starts++;
        check(phase == 0, "phase 0 at frame start");
      end else if (since >= 0) begin
        since++;
        if (slice) high++;
        check(int'(phase) == since, $sformatf("phase %0d at offset %0d", phase, since));
      end
      slice_q = slice;
    end
  end

  initial begin
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    repeat (100) @(posedge clk);
    #2 check(startups == 1, $sformatf("one startup pulse, saw %0d", startups));
    check(last_period == 16 && last_high == 8, $sformatf("div16: period %0d high %0d", last_period, last_high));
    @(negedge clk) div16 = 1'b0;
    repeat (100) @(posedge clk);
    #2 check(last_period == 8 && last_high == 4, $sformatf("div8: period %0d high %0d", last_period, last_high));
    check(startups == 1, "still one startup pulse");
    check(starts > 15, "frames counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
