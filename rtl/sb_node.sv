// sb_node: a Support Board (Main FPGA and two IO FPGAs) as unit controller.
//
// The same board serves as Detector Unit Controller (children are Detector
// Boards) and as Coincidence Unit Controller (children are the detector
// units behind the Multiplexer Boards); only the firmware settings differ.
//
// Data path (Scope mode): each of the SLOTS child links is received by
// link_rx. IO FPGA 0 merges slots 0-3 and IO FPGA 1 slots 4-7 with a
// round-robin block multiplexer and passes the result to the Main FPGA over
// an internal 16-bit link; the Main FPGA merges its two IO FPGAs the same
// way and sends the stream upward through link_tx (towards the Coincidence
// Interface Board, or to the USB FIFO at the uppermost node; out_en holds
// the stream back when that FIFO is full).
//
// Command path: a command arrives either over SPI from the parent
// (spi_slave + cmd_child) or, at the uppermost node (UPPERMOST = 1), from the
// host port. A command whose destination carries this node's controller flag
// (LOCAL_BIT: 9 for a detector unit controller, 10 for a coincidence unit
// controller) is executed here: PING returns the number of blocks the
// multiplexers dropped, anything else is unknown. Every other command is
// passed down by cmd_parent to the slot named by the destination field at
// SLOT_LSB (or to all slots for broadcast), and the child's answer becomes
// this node's answer; a dead or busy child gives CMD_STDCMD_TIMEDOUT with
// the write status as payload.
//
// Interface: clk, pll_locked; child links and child SPI bus; uplink; parent
// SPI (when not uppermost) or host command/response port (when uppermost);
// dropped-block count. The port that UPPERMOST leaves unused is tied off:
// host_resp_* read 0 below the top, and miso/miso_oe read 1/0 at the top.
// Timing: a 32-bit packet takes two clocks on every 16-bit link. The IO and
// Main FPGA multiplexers store and forward whole blocks, so a block leaves
// the node only after it has been fully received at each stage. A relayed
// command takes two SPI writes, RESPONSE_SLEEP clocks and two SPI reads
// (about 66*HALF_PERIOD clocks each) when the child answers at once.
// The board structure (two IO FPGAs with four slots each, Main FPGA,
// command relaying down the tree) follows the document. Which address bits
// select the slot and mark a local command, and the PING command, are this
// design's own choices.
module sb_node
  import openpet_pkg::*;
#(
  parameter int unsigned SLOTS            = 8,
  parameter int unsigned SLOT_LSB         = 0,
  parameter int unsigned LOCAL_BIT        = 9,
  parameter bit          UPPERMOST        = 1'b0,
  parameter int unsigned FIFO_DEPTH       = 8192,
  parameter int unsigned HALF_PERIOD      = 8,
  parameter int unsigned RESPONSE_SLEEP   = 80_000,
  parameter int unsigned RESPONSE_RETRIES = 200,
  parameter int unsigned SPI_TIMEOUT      = 80_000,
  parameter int unsigned EXEC_TIMEOUT     = 20_000_000
) (
  input  logic                    clk,
  input  logic                    pll_locked,
  // child data links
  input  logic [SLOTS-1:0][15:0]  child_data,
  input  logic [SLOTS-1:0]        child_slice,
  // child command bus
  output logic                    child_sclk,
  output logic                    child_mosi,
  output logic [SLOTS-1:0]        child_cs_n,
  input  logic                    child_miso,
  // uplink
  input  logic                    out_en,
  output logic [15:0]             out_data,
  output logic                    out_slice,
  // parent command bus (not uppermost)
  input  logic                    sclk,
  input  logic                    mosi,
  input  logic                    cs_n,
  output logic                    miso,
  output logic                    miso_oe,
  // host command port (uppermost)
  input  logic                    host_valid,
  input  cmd_pkt_t                host_cmd,
  output logic                    host_ready,
  output logic                    host_resp_valid,
  output logic [15:0]             host_resp_cmd,
  output logic [31:0]             host_resp_payload,
  // status
  output logic [15:0]             dropped
);
  localparam int unsigned HALF = SLOTS / 2;

  logic rst;
  reset_ctrl u_rst (.clk, .pll_locked, .rst);

  // ------------------------------------------------------------ data path
  logic [SLOTS-1:0]       rx_valid, rx_last, rx_err;
  logic [SLOTS-1:0][31:0] rx_data;
  for (genvar s = 0; s < int'(SLOTS); s++) begin : g_rx
    link_rx u_rx (
      .clk, .rst, .link_data(child_data[s]), .link_slice(child_slice[s]),
      .out_valid(rx_valid[s]), .out_data(rx_data[s]), .out_last(rx_last[s]),
      .frame_err(rx_err[s])
    );
  end

  logic [1:0][15:0] io_data;
  logic [1:0]       io_slice;
  logic [SLOTS-1:0] io_drops;
  for (genvar g = 0; g < 2; g++) begin : g_io
    logic        m_valid, m_ready, m_last;
    logic [31:0] m_data;
    rr_mux #(.N(HALF), .DEPTH(FIFO_DEPTH)) u_mux (
      .clk, .rst,
      .in_valid(rx_valid[g*HALF +: HALF]), .in_data(rx_data[g*HALF +: HALF]),
      .in_last(rx_last[g*HALF +: HALF]),
      .out_ready(m_ready), .out_valid(m_valid), .out_data(m_data), .out_last(m_last),
      .drops(io_drops[g*HALF +: HALF])
    );
    link_tx u_tx (
      .clk, .rst, .in_valid(m_valid), .in_ready(m_ready), .in_data(m_data),
      .in_last(m_last), .link_en(1'b1), .link_data(io_data[g]), .link_slice(io_slice[g])
    );
  end

  logic [1:0]       mrx_valid, mrx_last, mrx_err;
  logic [1:0][31:0] mrx_data;
  logic [1:0]       main_drops;
  logic             o_valid, o_ready, o_last;
  logic [31:0]      o_data;
  for (genvar g = 0; g < 2; g++) begin : g_mrx
    link_rx u_rx (
      .clk, .rst, .link_data(io_data[g]), .link_slice(io_slice[g]),
      .out_valid(mrx_valid[g]), .out_data(mrx_data[g]), .out_last(mrx_last[g]),
      .frame_err(mrx_err[g])
    );
  end
  rr_mux #(.N(2), .DEPTH(FIFO_DEPTH)) u_main_mux (
    .clk, .rst, .in_valid(mrx_valid), .in_data(mrx_data), .in_last(mrx_last),
    .out_ready(o_ready), .out_valid(o_valid), .out_data(o_data), .out_last(o_last),
    .drops(main_drops)
  );
  link_tx u_out (
    .clk, .rst, .in_valid(o_valid), .in_ready(o_ready), .in_data(o_data),
    .in_last(o_last), .link_en(out_en), .link_data(out_data), .link_slice(out_slice)
  );

  always_ff @(posedge clk) begin
    if (rst) dropped <= '0;
    else dropped <= dropped + 16'($countones({io_drops, main_drops}));
  end

  // ---------------------------------------------------------- command path
  logic        req_valid, resp_valid, cancel;
  logic [15:0] req_cmd, req_dst, resp_cmd;
  logic [31:0] req_payload, resp_payload;
  logic [15:0] req_src;

  if (UPPERMOST) begin : g_host
    assign req_valid   = host_valid && host_ready;
    assign req_cmd     = host_cmd.cmd;
    assign req_dst     = host_cmd.dst;
    assign req_src     = host_cmd.src;
    assign req_payload = host_cmd.payload;
    assign miso        = 1'b1;
    assign miso_oe     = 1'b0;
    assign cancel       = 1'b0;
    assign host_resp_valid   = resp_valid;
    assign host_resp_cmd     = resp_cmd;
    assign host_resp_payload = resp_payload;
  end else begin : g_child
    logic [31:0] spi_rx_word, spi_tx_word;
    logic        spi_tx_taken, spi_rx_valid, child_busy;
    spi_slave u_spi (
      .clk, .rst, .sclk, .mosi, .cs_n, .miso, .miso_oe,
      .tx_word(spi_tx_word), .tx_taken(spi_tx_taken), .rx_valid(spi_rx_valid), .rx_word(spi_rx_word)
    );
    cmd_child #(.SPI_TIMEOUT(SPI_TIMEOUT), .EXEC_TIMEOUT(EXEC_TIMEOUT)) u_child (
      .clk, .rst, .rx_valid(spi_rx_valid), .rx_word(spi_rx_word), .tx_word(spi_tx_word), .tx_taken(spi_tx_taken),
      .req_valid, .req_cmd, .req_dst, .req_payload,
      .resp_valid, .resp_cmd, .resp_payload, .cancel, .busy(child_busy)
    );
    assign req_src = 16'h0;
    assign host_resp_valid   = 1'b0;
    assign host_resp_cmd     = '0;
    assign host_resp_payload = '0;
  end

  // router: execute locally or forward to a child
  typedef enum logic [1:0] {R_IDLE, R_FWD} rstate_t;
  rstate_t     rst_st;
  logic        p_req_valid, p_req_ready, p_done;
  cmd_pkt_t    p_req;
  wr_status_t  p_status;
  logic [15:0] p_resp_cmd;
  logic [31:0] p_resp_payload;

  assign host_ready = (rst_st == R_IDLE) && !rst;

  cmd_parent #(
    .SLOTS(SLOTS), .SLOT_LSB(SLOT_LSB), .HALF_PERIOD(HALF_PERIOD),
    .RESPONSE_SLEEP(RESPONSE_SLEEP), .RESPONSE_RETRIES(RESPONSE_RETRIES)
  ) u_parent (
    .clk, .rst, .req_valid(p_req_valid), .req(p_req), .req_ready(p_req_ready),
    .done(p_done), .status(p_status), .resp_cmd(p_resp_cmd), .resp_payload(p_resp_payload),
    .sclk(child_sclk), .mosi(child_mosi), .cs_n(child_cs_n), .miso(child_miso)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      rst_st <= R_IDLE; p_req_valid <= 1'b0; p_req <= '0;
      resp_valid <= 1'b0; resp_cmd <= '0; resp_payload <= '0;
    end else begin
      resp_valid  <= 1'b0;
      p_req_valid <= 1'b0;
      if (cancel) rst_st <= R_IDLE;
      unique case (rst_st)
        R_IDLE: if (req_valid) begin
          if (req_dst[LOCAL_BIT] && !req_dst[15]) begin
            resp_valid   <= 1'b1;
            resp_cmd     <= (req_cmd[14:0] == CMD_PING) ? {1'b1, req_cmd[14:0]} : CMD_STDCMD_UNKNOWN;
            resp_payload <= (req_cmd[14:0] == CMD_PING) ? 32'(dropped) : 32'h0;
          end else begin
            p_req.cmd     <= req_cmd;
            p_req.src     <= req_src;
            p_req.dst     <= req_dst;
            p_req.payload <= req_payload;
            p_req_valid   <= 1'b1;
            rst_st        <= R_FWD;
          end
        end
        R_FWD: if (p_done) begin
          resp_valid <= 1'b1;
          rst_st     <= R_IDLE;
          if (p_status == WR_OK) begin
            resp_cmd     <= p_resp_cmd;
            resp_payload <= p_resp_payload;
          end else begin
            resp_cmd     <= CMD_STDCMD_TIMEDOUT;
            resp_payload <= 32'(p_status);
          end
        end
        default: rst_st <= R_IDLE;
      endcase
    end
  end
endmodule
