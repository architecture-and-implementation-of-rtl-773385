// tb_sw_fw_if: checks the firmware end of the processor interface.
//
// The testbench plays the processor: it writes command words on the 16-bit
// port and raises valid for a random number of clocks per word (the
// firmware must take each word once, on the rising edge of valid). Checked:
// the assembled cmd_id and payload, one fw_cmd_valid per three words, that
// a stale partial command is discarded after WORD_TIMEOUT clocks, and the
// reply: three words (id, payload high, payload low), reply_valid rising on
// the second clock edge after the one that takes fw_resp_valid, then every
// two clocks, with busy set until done.
module tb_sw_fw_if;
  localparam int WTO = 64;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic [15:0] cmd_data = '0, reply_data, fw_cmd_id, fw_resp_id = '0;
  logic        cmd_valid = 1'b0, reply_valid, fw_cmd_valid, fw_resp_valid = 1'b0, busy;
  logic [31:0] fw_cmd_payload, fw_resp_payload = '0;

  sw_fw_if #(.WORD_TIMEOUT(WTO)) dut (
    .clk, .rst, .cmd_data, .cmd_valid, .reply_data, .reply_valid,
    .fw_cmd_valid, .fw_cmd_id, .fw_cmd_payload,
    .fw_resp_valid, .fw_resp_id, .fw_resp_payload, .busy
  );

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

  int n_cmd = 0;
  logic [15:0] l_id; logic [31:0] l_pay;
  int cyc = 0;
  int rep_cyc [$]; logic [15:0] rep_word [$];
  always @(posedge clk) begin
    cyc++;
    if (!rst && fw_cmd_valid) begin n_cmd++; l_id = fw_cmd_id; l_pay = fw_cmd_payload; end
    if (!rst && reply_valid) begin rep_cyc.push_back(cyc); rep_word.push_back(reply_data); end
  end

  task automatic pio_word(input logic [15:0] w);
    @(negedge clk) cmd_data = w; cmd_valid = 1'b1;
    repeat ($urandom_range(1, 4)) @(negedge clk);
    cmd_valid = 1'b0;
    repeat ($urandom_range(1, 4)) @(negedge clk);
  endtask

  initial begin
    int c0, t0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int k = 0; k < 20; k++) begin
      logic [15:0] id; logic [31:0] p;
      id = $urandom; p = $urandom;
      c0 = n_cmd;
      pio_word(id); pio_word(p[31:16]);
      check(n_cmd == c0, "no command before the third word");
      pio_word(p[15:0]);
      check(n_cmd == c0 + 1 && l_id == id && l_pay == p,
            $sformatf("command %0d: %h %h vs %h %h", k, l_id, l_pay, id, p));
    end
    // stale partial command
    c0 = n_cmd;
    pio_word(16'h1111); pio_word(16'h2222);
    repeat (WTO + 10) @(negedge clk);
    pio_word(16'h0033); pio_word(16'hABCD); pio_word(16'hEF01);
    check(n_cmd == c0 + 1 && l_id == 16'h0033 && l_pay == 32'hABCD_EF01, "stale words discarded");
    // reply
    for (int k = 0; k < 5; k++) begin
      logic [15:0] id; logic [31:0] p;
      id = $urandom; p = $urandom;
      rep_cyc.delete(); rep_word.delete();
      // fw_resp_valid is taken at edge t0+1; reply_valid is high after edge
      // t0+2 and seen by the monitor at edge t0+3
      @(negedge clk) fw_resp_valid = 1'b1; fw_resp_id = id; fw_resp_payload = p; t0 = cyc;
      @(negedge clk) fw_resp_valid = 1'b0;
      check(busy, "busy while replying");
      repeat (10) @(negedge clk);
      check(!busy, "idle after reply");
      check(rep_word.size() == 3, $sformatf("three reply words, got %0d", rep_word.size()));
      if (rep_word.size() == 3) begin
        check(rep_word[0] == id && rep_word[1] == p[31:16] && rep_word[2] == p[15:0], "reply words");
        check(rep_cyc[0] == t0 + 3 && rep_cyc[1] == rep_cyc[0] + 2 && rep_cyc[2] == rep_cyc[1] + 2,
              $sformatf("reply timing %0d %0d %0d after %0d", rep_cyc[0], rep_cyc[1], rep_cyc[2], t0));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
