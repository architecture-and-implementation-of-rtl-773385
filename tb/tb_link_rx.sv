// tb_link_rx: checks the 16-to-32-bit link receiver.
//
// The testbench drives the wire itself: a block is a run of Slice-high
// clocks carrying two words per packet (upper half first), followed by at
// least one clock with Slice low. Checked: every packet is rebuilt, out_last
// marks exactly the last packet of each run, and a run with an odd number
// of words raises frame_err.
module tb_link_rx;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic [15:0] link_data = '0;
  logic        link_slice = 1'b0;
  logic        out_valid, out_last, frame_err;
  logic [31:0] out_data;

  link_rx dut (.clk, .rst, .link_data, .link_slice, .out_valid, .out_data, .out_last, .frame_err);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] exp_q [$];
  bit          exp_last [$];
  int          errs = 0;
  always @(posedge clk) begin
    #1;
    if (frame_err) errs++;
    if (out_valid) begin
      check(exp_q.size() > 0, "packet expected");
      if (exp_q.size() > 0) begin
        check(out_data == exp_q[0] && out_last == exp_last[0],
              $sformatf("packet %h/%0b vs %h/%0b", out_data, out_last, exp_q[0], exp_last[0]));
        void'(exp_q.pop_front()); void'(exp_last.pop_front());
      end
    end
  end

  task automatic wire_block(input int len, input int idle);
    for (int i = 0; i < len; i++) begin
      logic [31:0] w;
      w = $urandom;
      exp_q.push_back(w); exp_last.push_back(i == len - 1);
      @(negedge clk) link_slice = 1'b1; link_data = w[31:16];
      @(negedge clk) link_data = w[15:0];
    end
    @(negedge clk) link_slice = 1'b0; link_data = '0;
    repeat (idle - 1) @(negedge clk);
  endtask

  initial begin
    int e0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int b = 0; b < 40; b++) wire_block($urandom_range(1, 20), $urandom_range(1, 4));
    repeat (5) @(posedge clk);
    check(exp_q.size() == 0, "all packets received");
    check(errs == 0, "no framing error on good runs");
    // odd run of three words
    e0 = errs;
    @(negedge clk) link_slice = 1'b1; link_data = 16'h1234;
    @(negedge clk) link_data = 16'h5678;
    @(negedge clk) link_data = 16'h9abc;
    exp_q.push_back(32'h12345678); exp_last.push_back(1'b0);
    @(negedge clk) link_slice = 1'b0;
    repeat (4) @(posedge clk);
    check(errs == e0 + 1, "odd run flagged");
    // the receiver is back in step afterwards
    wire_block(5, 2);
    repeat (5) @(posedge clk);
    check(exp_q.size() == 0, "recovered after framing error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
