// pio_master: processor end of the Software-Firmware Interface.
//
// In a node the embedded processor writes commands to the fabric through
// two parallel ports and is interrupted by the reply valid. This block plays
// that part for the hardware command handler: a request (cmd_id, payload) is
// written as three 16-bit words, each with its own rising edge on cmd_valid
// (valid high one cycle, low one cycle), and the three reply words are
// collected on the rising edges of reply_valid and returned as one response.
//
// Interface: req_valid/req_cmd/req_payload, resp_valid/resp_cmd/
// resp_payload, cancel (drops a reply being collected); cmd_data/cmd_valid
// out, reply_data/reply_valid in.
// Timing: the third word is written five cycles after req_valid; resp_valid
// one cycle after the third reply word.
// The word split matches sw_fw_if and is this design's own choice.
module pio_master (
  input  logic        clk,
  input  logic        rst,
  input  logic        req_valid,
  input  logic [15:0] req_cmd,
  input  logic [31:0] req_payload,
  input  logic        cancel,
  output logic        resp_valid,
  output logic [15:0] resp_cmd,
  output logic [31:0] resp_payload,
  output logic [15:0] cmd_data,
  output logic        cmd_valid,
  input  logic [15:0] reply_data,
  input  logic        reply_valid
);
  logic [47:0] sh;
  logic [2:0]  wcnt;
  logic [1:0]  rcnt;
  logic        rv_q;
  logic [47:0] acc;

  always_ff @(posedge clk) begin
    if (rst) begin
      sh <= '0; wcnt <= '0; rcnt <= '0; rv_q <= 1'b0; acc <= '0;
      cmd_data <= '0; cmd_valid <= 1'b0; resp_valid <= 1'b0;
      resp_cmd <= '0; resp_payload <= '0;
    end else begin
      resp_valid <= 1'b0;
      rv_q <= reply_valid;
      if (req_valid && wcnt == '0) begin
        sh   <= {req_cmd, req_payload};
        wcnt <= 3'd6;
        rcnt <= '0;
      end else if (wcnt != '0) begin
        wcnt <= wcnt - 1'b1;
        if (wcnt[0] == 1'b0) begin
          cmd_data  <= sh[47:32];
          cmd_valid <= 1'b1;
          sh        <= {sh[31:0], 16'h0};
        end else begin
          cmd_valid <= 1'b0;
        end
      end else begin
        cmd_valid <= 1'b0;
      end
      if (cancel) begin
        rcnt <= '0;
      end else if (reply_valid && !rv_q) begin
        acc <= {acc[31:0], reply_data};
        if (rcnt == 2'd2) begin
          rcnt         <= '0;
          resp_valid   <= 1'b1;
          resp_cmd     <= acc[31:16];
          resp_payload <= {acc[15:0], reply_data};
        end else begin
          rcnt <= rcnt + 1'b1;
        end
      end
    end
  end
endmodule
