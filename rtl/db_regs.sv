// db_regs: command decoder and configuration registers of a Detector Board.
//
// Commands that reach the board's fabric through the Software-Firmware
// Interface are executed here. The system data mode, the Scope-mode
// settings and the run/stop action are the commands the Scope mode needs;
// the trigger mask and the firmware trigger threshold configure which
// channels may start an acquisition. Each executed command is answered one
// cycle later with its cmd_id with the c/r flag set and, as payload, the new
// register value (for PING, the number of Scope-mode events sent). Any other
// identifier is answered with CMD_STDCMD_UNKNOWN.
//
// Interface: cmd_valid/cmd_id/cmd_payload in, resp_valid/resp_id/
// resp_payload out; register outputs mode, run, cfg, trig_mask,
// fw_threshold; events in.
// Timing: response one clock after the command; registers change on the
// same edge.
// The three Scope-mode commands and their payload values (mode 0x1, run
// 0x1) follow the document; the register reset values, the other commands
// and all numeric command codes are this design's own.
module db_regs
  import openpet_pkg::*;
#(
  parameter int unsigned CH    = 16,
  parameter int unsigned ADC_W = 12
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              cmd_valid,
  input  logic [15:0]       cmd_id,
  input  logic [31:0]       cmd_payload,
  output logic              resp_valid,
  output logic [15:0]       resp_id,
  output logic [31:0]       resp_payload,
  output logic [3:0]        mode,
  output logic              run,
  output scope_cfg_t        cfg,
  output logic [CH-1:0]     trig_mask,
  output logic [ADC_W-1:0]  fw_threshold,
  input  logic [15:0]       events
);
  always_ff @(posedge clk) begin
    if (rst) begin
      mode <= MODE_IDLE; run <= 1'b0; cfg <= '0; trig_mask <= '0;
      fw_threshold <= '1;
      resp_valid <= 1'b0; resp_id <= '0; resp_payload <= '0;
    end else begin
      resp_valid <= cmd_valid;
      if (cmd_valid) begin
        resp_id      <= {1'b1, cmd_id[14:0]};
        resp_payload <= cmd_payload;
        unique case (cmd_id[14:0])
          CMD_PING:                       resp_payload <= 32'(events);
          CMD_SET_SYS_DATA_MODE:          mode <= cmd_payload[3:0];
          CMD_SET_SYS_DATA_MODE_SETTINGS: cfg  <= cmd_payload;
          CMD_SET_SYS_DATA_MODE_ACTION:   run  <= cmd_payload[0];
          CMD_SET_TRIGGER_MASK:           trig_mask <= cmd_payload[CH-1:0];
          CMD_SET_FW_THRESHOLD:           fw_threshold <= cmd_payload[ADC_W-1:0];
          default: begin
            resp_id      <= CMD_STDCMD_UNKNOWN;
            resp_payload <= '0;
          end
        endcase
      end
    end
  end
endmodule
