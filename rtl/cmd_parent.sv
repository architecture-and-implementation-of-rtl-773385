// cmd_parent: parent side of the OpenPET command protocol over SPI.
//
// A parent delivers an 80-bit command to one of its SLOTS children with two
// 32-bit SPI transactions and collects the reply by polling, as the node's
// embedded software does with its "spi write" and "spi read" routines:
//
//  write: send {cmd_id, dst} (answer ignored), send the payload and keep the
//    answer. The echoed {cmd_id, dst} means the child began executing;
//    all ones or all zeros means an empty slot or a dead child (WR_DEAD);
//    anything else means the child is busy (WR_BUSY). Only WR_OK goes on.
//  read: wait RESPONSE_SLEEP clocks, read (send 0). If the answer carries the
//    cmd_id with its c/r flag toggled, read once more for the payload; if it
//    carries CMD_STDCMD_UNKNOWN or CMD_STDCMD_TIMEDOUT, return that; else
//    count a retry and wait again, giving up with CMD_STDCMD_TIMEDOUT after
//    RESPONSE_RETRIES retries.
//
// The slot is the 3-bit field of the destination address at SLOT_LSB (2:0
// detector board, 5:3 detector unit). With the broadcast flag set the
// command is written to every slot first and the replies are then read from
// each child that accepted it, sleeping only before the first read; the
// reply payload is then a mask of the slots that answered with success and
// the reply cmd_id is the toggled one only if all accepting children
// succeeded.
//
// Interface: req_valid/req/req_ready; done (pulse), status, resp_cmd,
// resp_payload; SPI pins sclk/mosi/cs_n/miso.
// Timing: one SPI transaction takes about 66*HALF_PERIOD clocks; a command
// answered at once takes two writes, RESPONSE_SLEEP and two reads.
// The write and read flows, the status codes 0/1/2 and the retry scheme
// follow the document; the numeric sleep and retry counts, the slot field
// choice and the broadcast sequencing are this design's own.
module cmd_parent
  import openpet_pkg::*;
#(
  parameter int unsigned SLOTS            = 8,
  parameter int unsigned SLOT_LSB         = 0,
  parameter int unsigned HALF_PERIOD      = 8,
  parameter int unsigned RESPONSE_SLEEP   = 80_000,
  parameter int unsigned RESPONSE_RETRIES = 200
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        req_valid,
  input  cmd_pkt_t    req,
  output logic        req_ready,
  output logic        done,
  output wr_status_t  status,
  output logic [15:0] resp_cmd,
  output logic [31:0] resp_payload,
  output logic        sclk,
  output logic        mosi,
  output logic [SLOTS-1:0] cs_n,
  input  logic        miso
);
  localparam int unsigned SW = (SLOTS > 1) ? $clog2(SLOTS) : 1;
  localparam int unsigned TW = $clog2(RESPONSE_SLEEP + 1);
  localparam int unsigned RW = $clog2(RESPONSE_RETRIES + 2);

  typedef enum logic [2:0] {P_IDLE, P_W1, P_W2, P_SLEEP, P_R1, P_R2, P_NEXT} pstate_t;
  pstate_t       st;
  logic          spi_start, spi_busy, spi_done;
  logic [31:0]   spi_tx, spi_rx;
  logic [SW-1:0] slot;
  logic [15:0]   cmd, dst;
  logic [31:0]   pay;
  logic          bcast, all_ok;
  logic [SLOTS-1:0] accepted, succeeded;
  logic [TW-1:0] timer;
  logic [RW-1:0] retries;
  logic [15:0]   toggled;

  spi_master #(.SLOTS(SLOTS), .HALF_PERIOD(HALF_PERIOD)) u_spi (
    .clk, .rst, .start(spi_start), .slot_sel(slot), .tx_data(spi_tx),
    .busy(spi_busy), .done(spi_done), .rx_data(spi_rx),
    .sclk, .mosi, .cs_n, .miso
  );

  assign req_ready = (st == P_IDLE);
  assign toggled   = cmd ^ 16'h8000;

  // first slot at or after s whose bit is set in m (SLOTS if none)
  function automatic int unsigned next_set(input logic [SLOTS-1:0] m, input int unsigned s);
    int unsigned n;
    n = SLOTS;
    for (int i = int'(SLOTS) - 1; i >= 0; i--) if (m[i] && i >= int'(s)) n = i;
    return n;
  endfunction

  // first accepting slot, and the next one after the current slot
  logic [SW:0]      first_acc, next_acc;
  logic [SLOTS-1:0] succ_new;
  always_comb begin
    first_acc = (SW+1)'(next_set(accepted, 0));
    next_acc  = (SW+1)'(next_set(accepted, int'(slot) + 1));
    succ_new  = succeeded | (SLOTS'(1) << slot);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= P_IDLE; spi_start <= 1'b0; spi_tx <= '0; slot <= '0;
      cmd <= '0; dst <= '0; pay <= '0; bcast <= 1'b0; all_ok <= 1'b0;
      accepted <= '0; succeeded <= '0; timer <= '0; retries <= '0;
      done <= 1'b0; status <= WR_OK; resp_cmd <= '0; resp_payload <= '0;
    end else begin
      spi_start <= 1'b0;
      done      <= 1'b0;
      unique case (st)
        P_IDLE: if (req_valid) begin
          cmd   <= req.cmd;
          dst   <= req.dst;
          pay   <= req.payload;
          bcast <= req.dst.broadcast;
          slot  <= req.dst.broadcast ? SW'(0) : SW'(req.dst[SLOT_LSB +: 3]);
          accepted  <= '0;
          succeeded <= '0;
          all_ok    <= 1'b1;
          spi_tx    <= {req.cmd, req.dst};
          spi_start <= 1'b1;
          st        <= P_W1;
        end

        P_W1: if (spi_done) begin
          spi_tx    <= pay;
          spi_start <= 1'b1;
          st        <= P_W2;
        end

        P_W2: if (spi_done) begin
          if (spi_rx == {cmd, dst}) begin
            accepted[slot] <= 1'b1;
            if (!bcast) begin
              timer <= '0; retries <= '0; st <= P_SLEEP;
            end
          end else if (!bcast) begin
            status   <= (spi_rx == 32'hFFFF_FFFF || spi_rx == 32'h0) ? WR_DEAD : WR_BUSY;
            resp_cmd <= '0;
            resp_payload <= '0;
            done     <= 1'b1;
            st       <= P_IDLE;
          end
          if (bcast) begin
            if (int'(slot) == int'(SLOTS) - 1) begin
              st <= P_NEXT;
            end else begin
              slot      <= slot + 1'b1;
              spi_tx    <= {cmd, dst};
              spi_start <= 1'b1;
              st        <= P_W1;
            end
          end
        end

        P_NEXT: begin                 // broadcast: pick the first accepting slot
          timer <= '0; retries <= '0;
          if (int'(first_acc) == int'(SLOTS)) begin
            status <= WR_DEAD; resp_cmd <= '0; resp_payload <= '0;
            done <= 1'b1; st <= P_IDLE;
          end else begin
            slot <= SW'(first_acc);
            st   <= P_SLEEP;
          end
        end

        P_SLEEP: begin
          if (timer == TW'(RESPONSE_SLEEP)) begin
            retries   <= retries + 1'b1;
            spi_tx    <= '0;
            spi_start <= 1'b1;
            st        <= P_R1;
          end else timer <= timer + 1'b1;
        end

        P_R1: if (spi_done) begin
          if (spi_rx[31:16] == toggled) begin
            spi_tx    <= '0;
            spi_start <= 1'b1;
            st        <= P_R2;
          end else if (spi_rx[31:16] == CMD_STDCMD_UNKNOWN ||
                       spi_rx[31:16] == CMD_STDCMD_TIMEDOUT ||
                       retries > RW'(RESPONSE_RETRIES)) begin
            // finished without success
            if (!bcast) begin
              status   <= WR_OK;
              resp_cmd <= (spi_rx[31:16] == CMD_STDCMD_UNKNOWN)
                          ? CMD_STDCMD_UNKNOWN : CMD_STDCMD_TIMEDOUT;
              resp_payload <= '0;
              done     <= 1'b1;
              st       <= P_IDLE;
            end else begin
              all_ok <= 1'b0;
              if (int'(next_acc) == int'(SLOTS)) begin
                status <= WR_OK; resp_cmd <= CMD_STDCMD_TIMEDOUT;
                resp_payload <= 32'(succeeded); done <= 1'b1; st <= P_IDLE;
              end else begin
                slot <= SW'(next_acc); retries <= 1; spi_tx <= '0; spi_start <= 1'b1;
              end
            end
          end else begin
            timer <= '0;
            st    <= P_SLEEP;
          end
        end

        P_R2: if (spi_done) begin
          if (!bcast) begin
            status       <= WR_OK;
            resp_cmd     <= toggled;
            resp_payload <= spi_rx;
            done         <= 1'b1;
            st           <= P_IDLE;
          end else begin
            succeeded <= succ_new;
            if (int'(next_acc) == int'(SLOTS)) begin
              status <= WR_OK;
              resp_cmd <= all_ok ? toggled : CMD_STDCMD_TIMEDOUT;
              resp_payload <= 32'(succ_new);
              done <= 1'b1; st <= P_IDLE;
            end else begin
              slot <= SW'(next_acc); retries <= 1; spi_tx <= '0; spi_start <= 1'b1;
              st <= P_R1;
            end
          end
        end

        default: st <= P_IDLE;
      endcase
    end
  end

  a_one_spi_at_a_time: assert property (@(posedge clk) disable iff (rst)
    spi_start |-> !spi_busy);
endmodule
