// db_node: the FPGA of one Detector Board.
//
// It ties together what a Detector Board does in Scope mode: ADC data enter
// through double-data-rate input registers (ddio_rx, PINS lines per channel,
// one 2*PINS-bit sample per clock), scope_acq buffers, triggers and formats
// them into 32-bit packets, and link_tx sends the packets to the Support
// Board over the 16-line data bus with Slice Out as the valid line.
// Commands arrive on the slot's SPI lines (spi_slave); cmd_child runs the
// command protocol, pio_master and sw_fw_if carry each command over the
// 16-bit Software-Firmware Interface to db_regs, which holds the Scope-mode
// configuration. reset_ctrl keeps the board in reset until its PLL locks.
//
// Interface: clk (the distributed system clock, also the ADC clock),
// pll_locked, board address (slot position), ADC pins, hardware trigger
// (comparator) and TDC inputs, SPI pins, data link out, event count.
// Timing: ADC samples are taken every clock; see scope_acq for the block
// format and link_tx for the link timing.
// The partitioning follows the document's Detector Board; one clock for the
// ADC and the data path is this design's simplification.
module db_node
  import openpet_pkg::*;
#(
  parameter int unsigned CH           = 16,
  parameter int unsigned ADC_W        = 12,
  parameter int unsigned DEPTH        = 512,
  parameter int unsigned SPI_TIMEOUT  = 80_000,
  parameter int unsigned EXEC_TIMEOUT = 80_000
) (
  input  logic                          clk,
  input  logic                          pll_locked,
  input  logic [2:0]                    db_addr,
  input  logic [2:0]                    du_addr,
  input  logic [2:0]                    mb_addr,
  input  logic [CH-1:0][ADC_W/2-1:0]    adc_pins,
  input  logic [CH-1:0]                 hw_trig,
  input  logic [CH-1:0][19:0]           tdc,
  input  logic                          sclk,
  input  logic                          mosi,
  input  logic                          cs_n,
  output logic                          miso,
  output logic                          miso_oe,
  output logic [15:0]                   link_data,
  output logic                          link_slice,
  output logic [15:0]                   events
);
  logic rst;
  reset_ctrl u_rst (.clk, .pll_locked, .rst);

  // ADC capture
  logic [CH-1:0][ADC_W-1:0] adc;
  for (genvar c = 0; c < int'(CH); c++) begin : g_adc
    ddio_rx #(.PINS(ADC_W/2)) u_ddio (.clk, .din(adc_pins[c]), .dout(adc[c]));
  end

  // command path
  logic [31:0] spi_rx_word, spi_tx_word;
  logic        spi_tx_taken, spi_rx_valid;
  spi_slave u_spi (
    .clk, .rst, .sclk, .mosi, .cs_n, .miso, .miso_oe,
    .tx_word(spi_tx_word), .tx_taken(spi_tx_taken), .rx_valid(spi_rx_valid), .rx_word(spi_rx_word)
  );

  logic        req_valid, resp_valid, cancel, child_busy;
  logic [15:0] req_cmd, req_dst, resp_cmd;
  logic [31:0] req_payload, resp_payload;
  cmd_child #(.SPI_TIMEOUT(SPI_TIMEOUT), .EXEC_TIMEOUT(EXEC_TIMEOUT)) u_child (
    .clk, .rst, .rx_valid(spi_rx_valid), .rx_word(spi_rx_word), .tx_word(spi_tx_word), .tx_taken(spi_tx_taken),
    .req_valid, .req_cmd, .req_dst, .req_payload,
    .resp_valid, .resp_cmd, .resp_payload, .cancel, .busy(child_busy)
  );

  logic [15:0] pio_cmd, pio_reply;
  logic        pio_cmd_valid, pio_reply_valid;
  pio_master u_pio (
    .clk, .rst, .req_valid, .req_cmd, .req_payload, .cancel,
    .resp_valid, .resp_cmd, .resp_payload,
    .cmd_data(pio_cmd), .cmd_valid(pio_cmd_valid),
    .reply_data(pio_reply), .reply_valid(pio_reply_valid)
  );

  logic        fw_cmd_valid, fw_resp_valid, swfw_busy;
  logic [15:0] fw_cmd_id, fw_resp_id;
  logic [31:0] fw_cmd_payload, fw_resp_payload;
  sw_fw_if u_swfw (
    .clk, .rst, .cmd_data(pio_cmd), .cmd_valid(pio_cmd_valid),
    .reply_data(pio_reply), .reply_valid(pio_reply_valid),
    .fw_cmd_valid, .fw_cmd_id, .fw_cmd_payload,
    .fw_resp_valid, .fw_resp_id, .fw_resp_payload, .busy(swfw_busy)
  );

  logic [3:0]       mode;
  logic             run;
  scope_cfg_t       cfg;
  logic [CH-1:0]    trig_mask;
  logic [ADC_W-1:0] fw_threshold;
  db_regs #(.CH(CH), .ADC_W(ADC_W)) u_regs (
    .clk, .rst, .cmd_valid(fw_cmd_valid), .cmd_id(fw_cmd_id), .cmd_payload(fw_cmd_payload),
    .resp_valid(fw_resp_valid), .resp_id(fw_resp_id), .resp_payload(fw_resp_payload),
    .mode, .run, .cfg, .trig_mask, .fw_threshold, .events
  );

  // Scope-mode data path
  logic        pkt_valid, pkt_ready, pkt_last, acq_busy;
  logic [31:0] pkt_data;
  scope_acq #(.CH(CH), .ADC_W(ADC_W), .DEPTH(DEPTH)) u_scope (
    .clk, .rst, .mode, .run, .cfg, .trig_mask, .fw_threshold,
    .db_addr, .du_addr, .mb_addr,
    .sample_valid(1'b1), .adc, .hw_trig, .tdc,
    .out_valid(pkt_valid), .out_ready(pkt_ready), .out_data(pkt_data), .out_last(pkt_last),
    .busy(acq_busy), .events
  );

  link_tx u_link (
    .clk, .rst, .in_valid(pkt_valid), .in_ready(pkt_ready), .in_data(pkt_data),
    .in_last(pkt_last), .link_en(1'b1), .link_data, .link_slice
  );
endmodule
