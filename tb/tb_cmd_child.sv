// tb_cmd_child: checks the child side of the command protocol.
//
// The SPI slave is replaced by a transaction model: at the start of a
// transaction the word on tx_word is taken (tx_taken pulse), at its end the
// word received from the parent is delivered (rx_valid). Checked: the echo
// of the first command word, the request to the executor, replies to reads
// before and after the executor answers (header with the c/r flag toggled,
// then payload), a read that started before the answer does not use up the
// header, the immediate acknowledgment of a non-blocking command, the
// execution time-out (cancel and CMD_STDCMD_TIMEDOUT) and the time-out of
// an unfinished command.
module tb_cmd_child;
  import openpet_pkg::*;
  localparam int SPI_TO = 300, EXEC_TO = 500;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic        rx_valid = 1'b0, tx_taken = 1'b0, resp_valid = 1'b0;
  logic [31:0] rx_word = '0, tx_word, req_payload, resp_payload = '0;
  logic        req_valid, cancel, busy;
  logic [15:0] req_cmd, req_dst, resp_cmd = '0;

  cmd_child #(.SPI_TIMEOUT(SPI_TO), .EXEC_TIMEOUT(EXEC_TO)) dut (
    .clk, .rst, .rx_valid, .rx_word, .tx_word, .tx_taken,
    .req_valid, .req_cmd, .req_dst, .req_payload,
    .resp_valid, .resp_cmd, .resp_payload, .cancel, .busy
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_req = 0, n_cancel = 0;
  logic [15:0] l_cmd, l_dst; logic [31:0] l_pay;
  always @(posedge clk) begin
    if (!rst && req_valid) begin n_req++; l_cmd = req_cmd; l_dst = req_dst; l_pay = req_payload; end
    if (!rst && cancel) n_cancel++;
  end

  // split transaction: begin takes tx_word, finish delivers the word
  logic [31:0] taken;
  task automatic begin_xfer();
    @(negedge clk) tx_taken = 1'b1; taken = tx_word;
    @(negedge clk) tx_taken = 1'b0;
  endtask
  task automatic end_xfer(input logic [31:0] w);
    @(negedge clk) rx_valid = 1'b1; rx_word = w;
    @(negedge clk) rx_valid = 1'b0;
    repeat (2) @(negedge clk);
  endtask
  task automatic xfer(input logic [31:0] w, output logic [31:0] got);
    begin_xfer(); repeat (10) @(negedge clk); end_xfer(w); got = taken;
  endtask
  task automatic respond(input logic [15:0] c, input logic [31:0] p);
    @(negedge clk) resp_valid = 1'b1; resp_cmd = c; resp_payload = p;
    @(negedge clk) resp_valid = 1'b0;
  endtask

  initial begin
    logic [31:0] g;
    int r0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;

    // 1) blocking command, answered later
    xfer({16'h0011, 16'h0102}, g);
    xfer(32'hAABB_CCDD, g);
    check(g == {16'h0011, 16'h0102}, $sformatf("echo of first word: %h", g));
    check(n_req == 1 && l_cmd == 16'h0011 && l_dst == 16'h0102 && l_pay == 32'hAABB_CCDD,
          $sformatf("request to executor %0d %h %h %h", n_req, l_cmd, l_dst, l_pay));
    check(busy, "busy while executing");
    xfer(32'h0, g);
    check(g == {16'h0011, 16'h0102}, $sformatf("read while busy returns echo: %h", g));
    // a read is in flight when the answer arrives
    begin_xfer();
    respond(16'h8011, 32'h1234_5678);
    end_xfer(32'h0);
    check(taken == {16'h0011, 16'h0102}, "in-flight read still saw the echo");
    xfer(32'h0, g);
    check(g == {16'h8011, 16'h0102}, $sformatf("reply header: %h", g));
    xfer(32'h0, g);
    check(g == 32'h1234_5678, $sformatf("reply payload: %h", g));
    check(!busy, "idle after reply");

    // 2) non-blocking command: acknowledged at once
    xfer({16'h8020, 16'h0003}, g);
    xfer(32'h0000_0FA0, g);
    check(g == {16'h8020, 16'h0003}, "echo of non-blocking command");
    check(n_req == 2 && l_cmd == 16'h8020, "non-blocking request passed on");
    xfer(32'h0, g);
    check(g == {16'h0020, 16'h0003}, $sformatf("immediate acknowledgment: %h", g));
    xfer(32'h0, g);
    check(g == 32'h0000_0FA0, $sformatf("acknowledgment payload: %h", g));
    respond(16'h0020, 32'h5555_5555);
    xfer(32'h0, g);
    check(g == 32'h0000_0FA0, "late executor answer ignored");

    // 3) executor never answers: time-out
    r0 = n_cancel;
    xfer({16'h0012, 16'h0005}, g);
    xfer(32'h1, g);
    repeat (EXEC_TO + 20) @(negedge clk);
    check(n_cancel == r0 + 1, "cancel pulse on time-out");
    xfer(32'h0, g);
    check(g == {CMD_STDCMD_TIMEDOUT, 16'h0005}, $sformatf("time-out reply: %h", g));

    // 4) command abandoned after the first word
    r0 = n_req;
    xfer({16'h0013, 16'h0001}, g);
    repeat (SPI_TO + 20) @(negedge clk);
    xfer({16'h0014, 16'h0002}, g);        // taken as a new first word
    check(n_req == r0, "no request from an abandoned command");
    xfer(32'h0000_0007, g);
    check(n_req == r0 + 1 && l_cmd == 16'h0014 && l_pay == 32'h7, "next command after abandon");
    respond(16'h8014, 32'h7);
    xfer(32'h0, g);
    check(g == {16'h8014, 16'h0002}, "reply after abandon");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
