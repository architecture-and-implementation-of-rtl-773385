// tb_async_fifo: checks the dual-clock FIFO.
//
// The write clock runs at 80 MHz and the read clock at 30 MHz, as between
// the data path and the USB module. The writer pushes a counting sequence
// whenever the FIFO is not almost full, the reader pops at random. Checked:
// no word is lost, duplicated or reordered; full is never exceeded (a write
// while full is counted as an error by the checker); empty and full both
// occur; almost_full rises before full. A final phase checks the read rate:
// once the FIFO is full, a reader popping every clock gets one word per read
// clock.
module tb_async_fifo;
  localparam int W = 16, DEPTH = 32;
  logic wclk = 1'b0, rclk = 1'b0, wrst = 1'b1, rrst = 1'b1;
  always #6.25 wclk = ~wclk;
  always #16.67 rclk = ~rclk;

  logic wr_en = 1'b0, rd_en = 1'b0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic full, almost_full, empty;

  async_fifo #(.W(W), .DEPTH(DEPTH)) dut (.wclk, .wrst, .wr_en, .wr_data, .full, .almost_full,
                                          .rclk, .rrst, .rd_en, .rd_data, .empty);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit writing = 1, rand_rd = 1;
  int n_wr = 0, n_rd = 0, saw_full = 0, saw_afull = 0, saw_empty = 0, afull_first = 0;
  logic [W-1:0] exp = '0;

  always @(posedge wclk) begin
    if (!wrst) begin
      if (wr_en) begin
        check(!full, "no write while full");
        n_wr++;
      end
      if (almost_full) saw_afull++;
      if (full) begin saw_full++; check(almost_full, "almost_full set when full"); end
    end
  end
  always @(negedge wclk) begin
    wr_en   <= writing && !almost_full;
    wr_data <= W'(n_wr);
  end

  always @(posedge rclk) begin
    if (!rrst) begin
      if (empty) saw_empty++;
      if (rd_en && !empty) begin
        check(rd_data == exp, $sformatf("word %0d: %h vs %h", n_rd, rd_data, exp));
        exp = exp + 1'b1;
        n_rd++;
      end
    end
  end
  always @(negedge rclk) rd_en <= rand_rd ? ($urandom_range(0, 2) == 0) : 1'b1;

  initial begin
    int r0;
    #100 wrst = 1'b0; rrst = 1'b0;
    #60000;
    writing = 0;
    #5000;
    check(n_rd == n_wr, $sformatf("all words read: %0d of %0d", n_rd, n_wr));
    check(saw_afull > 0, "almost_full reached");
    check(saw_empty > 0, "empty seen");
    // rate: fill, then read every clock
    rand_rd = 0;
    @(negedge rclk); force rd_en = 1'b0;
    writing = 1;
    #3000;
    writing = 0;
    @(negedge rclk); release rd_en;
    r0 = n_rd;
    repeat (20) @(posedge rclk);
    #1 check(n_rd - r0 >= 19, $sformatf("one word per read clock: %0d in 20", n_rd - r0));
    #5000;
    check(n_rd == n_wr, $sformatf("all words read after rate phase: %0d of %0d", n_rd, n_wr));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
