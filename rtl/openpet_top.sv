// openpet_top: an OpenPET Standard System running in Scope mode.
//
// NUM_DU detector units, each a Support Board configured as Detector Unit
// Controller (sb_node) with NUM_DB Detector Boards (db_node) in its slots,
// feed one coincidence unit whose Support Board (sb_node, uppermost)
// merges their streams and is the node the workstation talks to. The
// Coincidence Interface and passive Multiplexer Boards between a detector
// unit and the coincidence unit are only cables and appear here as direct
// connections of the 16-bit data link and the SPI lines.
//
// Data: ADC pins -> db_node (trigger, buffer, format) -> link -> sb_node of
// the unit (two levels of round-robin block multiplexing) -> link ->
// sb_node of the coincidence unit (same) -> 16-bit words -> async_fifo ->
// USB-side port usb_data/usb_valid/usb_ready in the usb_clk domain. When the
// FIFO is full the stream is held back, the block FIFOs fill and whole
// blocks are dropped (dropped_* counts).
// Commands: the host port carries 80-bit commands to the coincidence unit
// controller, which relays them by SPI to a detector unit controller (slot =
// detector-unit field of the destination), which relays them to a Detector
// Board (slot = detector-board field), or to all of them with the broadcast
// flag; the reply comes back the same way.
// Clocks: slice_gen makes the Slice (frame) signal and the startup pulse of
// the uppermost node; every node has its own PLL-lock based reset.
//
// Interface: clk (main system clock), usb_clk, pll_locked (from the PLLs,
// which are not modelled), div16, host command port, ADC pins, comparator
// and TDC inputs per channel, USB output, Slice outputs, status counts.
// Timing: everything runs on clk except the read side of the USB FIFO
// (usb_clk). A block passes three store-and-forward multiplexing stages on
// its way up. A command to a Detector Board crosses two SPI hops, each
// waiting RESPONSE_SLEEP clocks before polling, so it takes a little over
// 2 * RESPONSE_SLEEP clocks when every board answers at once.
// The system structure and numbers (8 detector units of 8 boards of 16
// channels, 16-bit links, 80-bit commands, 32-bit data packets) follow the
// document; the single clock domain for all data paths is this design's
// simplification.
module openpet_top
  import openpet_pkg::*;
#(
  parameter int unsigned NUM_DU           = 8,
  parameter int unsigned NUM_DB           = 8,
  parameter int unsigned CH               = 16,
  parameter int unsigned ADC_W            = 12,
  parameter int unsigned DEPTH            = 512,
  parameter int unsigned FIFO_DEPTH       = 8192,
  parameter int unsigned USB_FIFO_DEPTH   = 4096,
  parameter int unsigned HALF_PERIOD      = 8,
  parameter int unsigned RESPONSE_SLEEP   = 80_000,
  parameter int unsigned RESPONSE_RETRIES = 200
) (
  input  logic                                            clk,
  input  logic                                            usb_clk,
  input  logic                                            pll_locked,
  input  logic                                            div16,
  // host commands
  input  logic                                            host_valid,
  input  cmd_pkt_t                                        host_cmd,
  output logic                                            host_ready,
  output logic                                            host_resp_valid,
  output logic [15:0]                                     host_resp_cmd,
  output logic [31:0]                                     host_resp_payload,
  // analog front-end side of every Detector Board
  input  logic [NUM_DU-1:0][NUM_DB-1:0][CH-1:0][ADC_W/2-1:0] adc_pins,
  input  logic [NUM_DU-1:0][NUM_DB-1:0][CH-1:0]           hw_trig,
  input  logic [NUM_DU-1:0][NUM_DB-1:0][CH-1:0][19:0]     tdc,
  // towards the QuickUSB module
  output logic [15:0]                                     usb_data,
  output logic                                            usb_valid,
  input  logic                                            usb_ready,
  // frame clock
  output logic                                            slice,
  output logic                                            slice_start,
  output logic                                            startup,
  // status
  output logic [NUM_DU-1:0][NUM_DB-1:0][15:0]             db_events,
  output logic [NUM_DU-1:0][15:0]                         dropped_du,
  output logic [15:0]                                     dropped_cu
);
  localparam int unsigned SLOTS = 8;

  // uppermost-node housekeeping
  logic rst, usb_rst;
  logic [3:0] phase;
  reset_ctrl u_rst     (.clk,          .pll_locked, .rst);
  reset_ctrl u_usb_rst (.clk(usb_clk), .pll_locked, .rst(usb_rst));
  slice_gen  u_slice   (.clk, .rst, .div16, .slice, .slice_start, .startup, .phase);

  // links between detector units and the coincidence unit
  logic [SLOTS-1:0][15:0] du_data;
  logic [SLOTS-1:0]       du_slice;
  logic                   cu_sclk, cu_mosi;
  logic [SLOTS-1:0]       cu_cs_n;
  logic [SLOTS-1:0]       du_miso, du_miso_oe;
  logic                   cu_miso;

  for (genvar u = 0; u < int'(SLOTS); u++) begin : g_du
    if (u < int'(NUM_DU)) begin : g_present
      logic [SLOTS-1:0][15:0] db_data;
      logic [SLOTS-1:0]       db_slice;
      logic                   db_sclk, db_mosi, db_miso;
      logic [SLOTS-1:0]       db_cs_n, db_miso_v, db_miso_oe;

      for (genvar b = 0; b < int'(SLOTS); b++) begin : g_db
        if (b < int'(NUM_DB)) begin : g_present
          db_node #(.CH(CH), .ADC_W(ADC_W), .DEPTH(DEPTH)) u_db (
            .clk, .pll_locked,
            .db_addr(3'(b)), .du_addr(3'd0), .mb_addr(3'(u)),
            .adc_pins(adc_pins[u][b]), .hw_trig(hw_trig[u][b]), .tdc(tdc[u][b]),
            .sclk(db_sclk), .mosi(db_mosi), .cs_n(db_cs_n[b]),
            .miso(db_miso_v[b]), .miso_oe(db_miso_oe[b]),
            .link_data(db_data[b]), .link_slice(db_slice[b]),
            .events(db_events[u][b])
          );
        end else begin : g_empty
          assign db_data[b]    = '0;
          assign db_slice[b]   = 1'b0;
          assign db_miso_v[b]  = 1'b1;
          assign db_miso_oe[b] = 1'b0;
        end
      end
      // MISO is shared by the slots; an empty bus reads as ones (pull-up)
      assign db_miso = &(~db_miso_oe | db_miso_v);

      sb_node #(
        .SLOTS(SLOTS), .SLOT_LSB(0), .LOCAL_BIT(9), .UPPERMOST(1'b0),
        .FIFO_DEPTH(FIFO_DEPTH), .HALF_PERIOD(HALF_PERIOD),
        .RESPONSE_SLEEP(RESPONSE_SLEEP), .RESPONSE_RETRIES(RESPONSE_RETRIES),
        .EXEC_TIMEOUT((RESPONSE_RETRIES + 2) * (RESPONSE_SLEEP + 2000))
      ) u_duc (
        .clk, .pll_locked,
        .child_data(db_data), .child_slice(db_slice),
        .child_sclk(db_sclk), .child_mosi(db_mosi), .child_cs_n(db_cs_n), .child_miso(db_miso),
        .out_en(1'b1), .out_data(du_data[u]), .out_slice(du_slice[u]),
        .sclk(cu_sclk), .mosi(cu_mosi), .cs_n(cu_cs_n[u]),
        .miso(du_miso[u]), .miso_oe(du_miso_oe[u]),
        .host_valid(1'b0), .host_cmd('0), .host_ready(),
        .host_resp_valid(), .host_resp_cmd(), .host_resp_payload(),
        .dropped(dropped_du[u])
      );
    end else begin : g_empty
      assign du_data[u]    = '0;
      assign du_slice[u]   = 1'b0;
      assign du_miso[u]    = 1'b1;
      assign du_miso_oe[u] = 1'b0;
    end
  end
  assign cu_miso = &(~du_miso_oe | du_miso);

  // coincidence unit controller (uppermost node)
  logic [15:0] cu_data;
  logic        cu_slice, fifo_full, fifo_afull, fifo_empty;
  sb_node #(
    .SLOTS(SLOTS), .SLOT_LSB(3), .LOCAL_BIT(10), .UPPERMOST(1'b1),
    .FIFO_DEPTH(FIFO_DEPTH), .HALF_PERIOD(HALF_PERIOD),
    .RESPONSE_SLEEP(RESPONSE_SLEEP), .RESPONSE_RETRIES(RESPONSE_RETRIES)
  ) u_cuc (
    .clk, .pll_locked,
    .child_data(du_data), .child_slice(du_slice),
    .child_sclk(cu_sclk), .child_mosi(cu_mosi), .child_cs_n(cu_cs_n), .child_miso(cu_miso),
    .out_en(!fifo_afull), .out_data(cu_data), .out_slice(cu_slice),
    .sclk(1'b0), .mosi(1'b0), .cs_n(1'b1), .miso(), .miso_oe(),
    .host_valid, .host_cmd, .host_ready,
    .host_resp_valid, .host_resp_cmd, .host_resp_payload,
    .dropped(dropped_cu)
  );

  // dual-clock FIFO towards the USB module
  async_fifo #(.W(16), .DEPTH(USB_FIFO_DEPTH)) u_usb_fifo (
    .wclk(clk), .wrst(rst), .wr_en(cu_slice), .wr_data(cu_data), .full(fifo_full), .almost_full(fifo_afull),
    .rclk(usb_clk), .rrst(usb_rst), .rd_en(usb_ready), .rd_data(usb_data), .empty(fifo_empty)
  );
  assign usb_valid = !fifo_empty;
endmodule
