// tb_db_regs: checks the Detector Board command decoder.
//
// Each supported command is sent once and the register it sets is read
// back; PING must return the event count, every reply must carry the
// cmd_id with its c/r flag set, one clock after the command, and an
// unsupported cmd_id must be answered with CMD_STDCMD_UNKNOWN and change
// nothing. The reset values (Idle mode, stopped, threshold at full scale,
// all channels masked) are checked first.
module tb_db_regs;
  import openpet_pkg::*;
  localparam int CH = 16, ADC_W = 12;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic cmd_valid = 1'b0, resp_valid, run;
  logic [15:0] cmd_id = '0, resp_id, events = 16'd0;
  logic [31:0] cmd_payload = '0, resp_payload;
  logic [3:0] mode;
  scope_cfg_t cfg;
  logic [CH-1:0] trig_mask;
  logic [ADC_W-1:0] fw_threshold;

  db_regs #(.CH(CH), .ADC_W(ADC_W)) dut (
    .clk, .rst, .cmd_valid, .cmd_id, .cmd_payload, .resp_valid, .resp_id, .resp_payload,
    .mode, .run, .cfg, .trig_mask, .fw_threshold, .events
  );

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

  task automatic cmd(input logic [14:0] id, input logic [31:0] p, input logic [15:0] exp_id,
                     input logic [31:0] exp_p, input string tag);
    @(negedge clk) cmd_valid = 1'b1; cmd_id = {1'b0, id}; cmd_payload = p;
    @(negedge clk) cmd_valid = 1'b0;
    check(resp_valid && resp_id == exp_id && resp_payload == exp_p,
          $sformatf("%s reply %0b %h %h", tag, resp_valid, resp_id, resp_payload));
    @(negedge clk) check(!resp_valid, {tag, " one reply"});
  endtask

  initial begin
    scope_cfg_t c;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    check(mode == MODE_IDLE && !run && trig_mask == '0 && fw_threshold == '1 && cfg == '0, "reset values");
    events = 16'd321;
    cmd(CMD_PING, 32'h0, {1'b1, CMD_PING}, 32'd321, "ping");
    cmd(CMD_SET_SYS_DATA_MODE, 32'(MODE_SCOPE), {1'b1, CMD_SET_SYS_DATA_MODE}, 32'(MODE_SCOPE), "mode");
    check(mode == MODE_SCOPE, "mode set");
    c = '0; c.data_format = 4'd7; c.num_samples = 9'd300; c.pre_samples = 4'd9; c.trig_window = 4'd5;
    cmd(CMD_SET_SYS_DATA_MODE_SETTINGS, 32'(c), {1'b1, CMD_SET_SYS_DATA_MODE_SETTINGS}, 32'(c), "settings");
    check(cfg.num_samples == 9'd300 && cfg.data_format == 4'd7 && cfg.pre_samples == 4'd9 &&
          cfg.trig_window == 4'd5, "settings fields");
    cmd(CMD_SET_TRIGGER_MASK, 32'h0000_A5C3, {1'b1, CMD_SET_TRIGGER_MASK}, 32'h0000_A5C3, "mask");
    check(trig_mask == 16'hA5C3, "mask set");
    cmd(CMD_SET_FW_THRESHOLD, 32'd2047, {1'b1, CMD_SET_FW_THRESHOLD}, 32'd2047, "threshold");
    check(fw_threshold == 12'd2047, "threshold set");
    cmd(CMD_SET_SYS_DATA_MODE_ACTION, 32'd1, {1'b1, CMD_SET_SYS_DATA_MODE_ACTION}, 32'd1, "run");
    check(run, "running");
    cmd(15'h2A5, 32'hFFFF_FFFF, CMD_STDCMD_UNKNOWN, 32'h0, "unknown");
    check(mode == MODE_SCOPE && run && trig_mask == 16'hA5C3 && fw_threshold == 12'd2047,
          "unknown command changes nothing");
    cmd(CMD_SET_SYS_DATA_MODE_ACTION, 32'd0, {1'b1, CMD_SET_SYS_DATA_MODE_ACTION}, 32'd0, "stop");
    check(!run, "stopped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
