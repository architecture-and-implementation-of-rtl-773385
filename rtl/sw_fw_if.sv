// sw_fw_if: firmware end of the generic Software-Firmware Interface.
//
// The node's processor passes each command meant for the FPGA fabric over a
// 16-bit parallel output port with a 1-bit valid, and receives replies on a
// second 16-bit port with its own valid, which also serves as the
// processor's interrupt. This block registers an incoming word on every
// rising edge of cmd_valid. A command is three words: the 16-bit cmd_id,
// then payload bits 31:16, then payload bits 15:0; after the third word it
// is presented to the firmware as fw_cmd_valid/fw_cmd_id/fw_cmd_payload.
// The firmware's answer (fw_resp_valid/fw_resp_id/fw_resp_payload) is sent
// back as three words in the same order, each shown on reply_data with a
// one-cycle reply_valid pulse, pulses two cycles apart. A new command word
// resets the collection if a previous command was left incomplete for
// more than WORD_TIMEOUT clocks.
//
// Interface: cmd_data/cmd_valid in, reply_data/reply_valid out (processor
// side); fw_cmd_*, fw_resp_* (fabric side).
// Timing: fw_cmd_valid one cycle after the third rising edge of cmd_valid;
// reply_valid of the first word rises at the second clock edge after the
// one that takes fw_resp_valid.
// The 16-bit buses, the valid signals and registering on the rising edge
// follow the document; splitting a command into three words is this design's
// own choice.
module sw_fw_if #(
  parameter int unsigned WORD_TIMEOUT = 1024
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] cmd_data,
  input  logic        cmd_valid,
  output logic [15:0] reply_data,
  output logic        reply_valid,
  output logic        fw_cmd_valid,
  output logic [15:0] fw_cmd_id,
  output logic [31:0] fw_cmd_payload,
  input  logic        fw_resp_valid,
  input  logic [15:0] fw_resp_id,
  input  logic [31:0] fw_resp_payload,
  output logic        busy
);
  localparam int unsigned TW = $clog2(WORD_TIMEOUT + 1);

  logic          valid_q;
  logic [1:0]    nwords;
  logic [TW-1:0] timer;
  logic [47:0]   rsp;
  logic [2:0]    rcnt;       // reply slots left (words and gaps)

  assign busy = (rcnt != '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      valid_q <= 1'b0; nwords <= '0; timer <= '0; fw_cmd_valid <= 1'b0;
      fw_cmd_id <= '0; fw_cmd_payload <= '0; rsp <= '0; rcnt <= '0;
      reply_data <= '0; reply_valid <= 1'b0;
    end else begin
      valid_q      <= cmd_valid;
      fw_cmd_valid <= 1'b0;
      if (nwords != '0 && timer != TW'(WORD_TIMEOUT)) timer <= timer + 1'b1;
      if (cmd_valid && !valid_q) begin
        timer <= '0;
        if (nwords == 2'd0 || timer == TW'(WORD_TIMEOUT)) begin
          fw_cmd_id <= cmd_data;
          nwords    <= 2'd1;
        end else if (nwords == 2'd1) begin
          fw_cmd_payload[31:16] <= cmd_data;
          nwords <= 2'd2;
        end else begin
          fw_cmd_payload[15:0] <= cmd_data;
          nwords       <= 2'd0;
          fw_cmd_valid <= 1'b1;
        end
      end
      // reply words: id, payload high, payload low
      reply_valid <= 1'b0;
      if (fw_resp_valid && rcnt == '0) begin
        rsp  <= {fw_resp_id, fw_resp_payload};
        rcnt <= 3'd6;
      end else if (rcnt != '0) begin
        rcnt <= rcnt - 1'b1;
        if (rcnt[0] == 1'b0) begin
          reply_valid <= 1'b1;
          reply_data  <= rsp[47:32];
          rsp         <= {rsp[31:0], 16'h0};
        end
      end
    end
  end
endmodule
