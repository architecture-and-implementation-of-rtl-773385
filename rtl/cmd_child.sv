// cmd_child: child side of the OpenPET command protocol over SPI.
//
// A child never starts an SPI transaction; it answers through the word it
// leaves ready for the next one. The protocol this block implements, in
// hardware, is the one the node's embedded processor runs in its SPI
// interrupt routine:
//  * a non-zero word while idle is the first half of a command, {cmd_id,
//    dst}; it is echoed in the next transaction, so the parent can see the
//    command arrived;
//  * the next word is the 32-bit payload (taken as payload even when it is
//    zero); the command is then handed to the executor (req_*);
//  * an all-zero word while idle is a read: after the executor's reply the
//    first read returns {reply cmd_id (c/r flag set), dst}, the next read the
//    reply payload (the switch happens only after a read that actually
//    carried the header, tx_taken telling when a transaction took the word);
//  * while a command executes, incoming words are ignored and the last valid
//    answer stays in place, which the parent reads as "busy";
//  * a command with the c/r flag set is non-blocking: it is acknowledged at
//    once with the flag cleared (payload: the command's own payload) and
//    executed in the background; the acknowledgment can be read meanwhile;
//  * a payload that does not follow within SPI_TIMEOUT clocks drops the
//    command; an executor that does not answer within EXEC_TIMEOUT clocks is
//    aborted and CMD_STDCMD_TIMEDOUT is returned.
//
// Interface: rx_valid/rx_word/tx_taken from the SPI slave, tx_word to it; executor
// port req_valid/req_cmd/req_dst/req_payload, resp_valid/resp_cmd/
// resp_payload, cancel; busy.
// The message formats, the zero-word read, echo and busy rules and the
// non-blocking flag follow the document. The zero-payload rule, the
// acknowledgment format of non-blocking commands and the timeout values are
// this design's own choices.
module cmd_child
  import openpet_pkg::*;
#(
  parameter int unsigned SPI_TIMEOUT  = 80_000,
  parameter int unsigned EXEC_TIMEOUT = 80_000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        rx_valid,
  input  logic [31:0] rx_word,
  output logic [31:0] tx_word,
  input  logic        tx_taken,
  output logic        req_valid,
  output logic [15:0] req_cmd,
  output logic [15:0] req_dst,
  output logic [31:0] req_payload,
  input  logic        resp_valid,
  input  logic [15:0] resp_cmd,
  input  logic [31:0] resp_payload,
  output logic        cancel,
  output logic        busy
);
  localparam int unsigned TMAX = (SPI_TIMEOUT > EXEC_TIMEOUT) ? SPI_TIMEOUT : EXEC_TIMEOUT;
  localparam int unsigned TW   = $clog2(TMAX + 1);

  typedef enum logic [1:0] {C_IDLE, C_PAYLOAD, C_EXEC} cstate_t;
  cstate_t     st;
  logic [TW-1:0] timer;
  logic [31:0] pay_q;
  logic        hdr_out;     // tx_word holds a reply header
  logic        hdr_sent;    // ... and a transaction has started with it
  logic        nonblock;

  assign busy = (st == C_EXEC);

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= C_IDLE; timer <= '0; tx_word <= '0; pay_q <= '0; hdr_out <= 1'b0;
      hdr_sent <= 1'b0; nonblock <= 1'b0; req_valid <= 1'b0; req_cmd <= '0; req_dst <= '0;
      req_payload <= '0; cancel <= 1'b0;
    end else begin
      req_valid <= 1'b0;
      cancel    <= 1'b0;
      if (tx_taken && hdr_out) hdr_sent <= 1'b1;
      unique case (st)
        C_IDLE: if (rx_valid) begin
          if (rx_word == 32'h0) begin          // read
            if (hdr_out && hdr_sent) begin
              tx_word  <= pay_q;
              hdr_out  <= 1'b0;
              hdr_sent <= 1'b0;
            end
          end else begin                       // first half of a command
            req_cmd <= rx_word[31:16];
            req_dst <= rx_word[15:0];
            tx_word <= rx_word;
            hdr_out <= 1'b0;
            timer   <= '0;
            st      <= C_PAYLOAD;
          end
        end
        C_PAYLOAD: begin
          if (rx_valid) begin
            req_payload <= rx_word;
            req_valid   <= 1'b1;
            timer       <= '0;
            nonblock    <= req_cmd[15];
            st          <= C_EXEC;
            if (req_cmd[15]) begin
              tx_word <= {req_cmd ^ 16'h8000, req_dst};
              pay_q   <= rx_word;
              hdr_out <= 1'b1;
              hdr_sent <= 1'b0;
            end
          end else if (timer == TW'(SPI_TIMEOUT)) begin
            st <= C_IDLE;
          end else timer <= timer + 1'b1;
        end
        C_EXEC: begin
          if (rx_valid && rx_word == 32'h0 && hdr_out && hdr_sent) begin   // read of an acknowledgment
            tx_word  <= pay_q;
            hdr_out  <= 1'b0;
            hdr_sent <= 1'b0;
          end
          if (resp_valid) begin
            if (!nonblock) begin
              tx_word <= {resp_cmd, req_dst};
              pay_q   <= resp_payload;
              hdr_out <= 1'b1;
              hdr_sent <= 1'b0;
            end
            st <= C_IDLE;
          end else if (timer == TW'(EXEC_TIMEOUT)) begin
            cancel <= 1'b1;
            if (!nonblock) begin
              tx_word <= {CMD_STDCMD_TIMEDOUT, req_dst};
              pay_q   <= '0;
              hdr_out <= 1'b1;
              hdr_sent <= 1'b0;
            end
            st <= C_IDLE;
          end else timer <= timer + 1'b1;
        end
        default: st <= C_IDLE;
      endcase
    end
  end
endmodule
