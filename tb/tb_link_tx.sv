// tb_link_tx: checks the 32-to-16-bit link transmitter.
//
// Blocks of random length and content are offered with random gaps. The
// wire is decoded independently: while Slice is high one 16-bit word per
// clock, upper half first. Checked: the packet sequence on the wire equals
// the input sequence; with the link enabled, a block goes out without a
// pause (one packet every two clocks) and Slice is low for at least one
// clock between blocks; link_en low holds the wire idle.
module tb_link_tx;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic        in_valid = 1'b0, in_last = 1'b0, link_en = 1'b1;
  logic        in_ready, link_slice;
  logic [31:0] in_data = '0;
  logic [15:0] link_data;

  link_tx dut (.clk, .rst, .in_valid, .in_ready, .in_data, .in_last, .link_en,
               .link_data, .link_slice);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected packets and block ends
  logic [31:0] exp_q [$];
  bit          exp_last [$];
  bit          en_toggle = 0;

  // wire decoder
  int   half = 0, run = 0, pkts = 0, blocks_seen = 0;
  logic [15:0] hi;
  bit   in_block_end = 0;
  always @(posedge clk) begin
    #1;
    if (!rst) begin
      if (!link_en) check(!link_slice || en_toggle, "idle while disabled");
      if (link_slice) begin
        run++;
        if (half == 0) begin hi = link_data; half = 1; end
        else begin
          logic [31:0] w; bit l;
          half = 0;
          w = {hi, link_data};
          pkts++;
          check(exp_q.size() > 0, "packet expected");
          if (exp_q.size() > 0) begin
            check(w == exp_q[0], $sformatf("packet %0d: %h vs %h", pkts, w, exp_q[0]));
            l = exp_last[0];
            void'(exp_q.pop_front()); void'(exp_last.pop_front());
            in_block_end = l;
          end
        end
      end else begin
        if (run > 0 && !en_toggle) begin
          check(half == 0, "even number of words per run");
          check(in_block_end, $sformatf("pause only after a block's last packet (run %0d)", run));
          blocks_seen++;
        end
        run = 0;
      end
    end
  end

  task automatic send_block(input int len, input int gap_pct);
    for (int i = 0; i < len; i++) begin
      @(negedge clk);
      while ($urandom_range(0, 99) < gap_pct) begin in_valid = 1'b0; @(negedge clk); end
      in_valid = 1'b1;
      in_data  = $urandom;
      in_last  = (i == len - 1);
      do @(posedge clk); while (!in_ready);
      exp_q.push_back(in_data); exp_last.push_back(in_last);
      #1;
    end
    @(negedge clk) in_valid = 1'b0; in_last = 1'b0;
  endtask

  initial begin
    int nblk;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    // steady source: whole blocks ready, each must leave without pause
    for (int b = 0; b < 30; b++) send_block($urandom_range(1, 12), 0);
    repeat (40) @(posedge clk);
    check(exp_q.size() == 0, "all packets sent");
    nblk = blocks_seen;
    check(nblk == 30, $sformatf("30 blocks seen as runs, got %0d", nblk));
    // link_en pauses: only the sequence is checked
    en_toggle = 1;
    fork
      for (int b = 0; b < 20; b++) send_block($urandom_range(1, 12), 30);
      repeat (1500) begin @(negedge clk); link_en = ($urandom_range(0, 3) != 0); end
    join
    @(negedge clk) link_en = 1'b1;
    repeat (60) @(posedge clk);
    check(exp_q.size() == 0, "all packets sent with pauses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
