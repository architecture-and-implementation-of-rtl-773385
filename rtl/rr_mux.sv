// rr_mux: round-robin multiplexer of Scope-mode packet blocks.
//
// Used at every concentration stage of the data path: an IO FPGA merging the
// streams of its Detector Boards, the Main FPGA merging its two IO FPGAs, and
// the coincidence unit merging detector units. Each of the N inputs feeds a
// block_fifo. A round-robin arbiter grants, in turn, the next input after the
// last one served that holds at least one whole block, and keeps the grant
// until that block's last packet has left, so packets of different boards
// are never interleaved. Blocks that arrive while an input's FIFO is full are
// dropped whole; drops[i] pulses for each one.
//
// Interface: in_valid/in_data/in_last per input (no back-pressure, like the
// backplane links), out_valid/out_data/out_last with out_ready, grant index.
// Timing: a block starts leaving two to three cycles after its last packet
// was stored; within a block one packet per cycle when out_ready stays high.
// Round-robin scheduling of 32-bit packets follows the document; block
// granularity and whole-block dropping are this design's own choices.
module rr_mux #(
  parameter int unsigned N     = 4,
  parameter int unsigned DEPTH = 8192
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [N-1:0]      in_valid,
  input  logic [N-1:0][31:0] in_data,
  input  logic [N-1:0]      in_last,
  input  logic              out_ready,
  output logic              out_valid,
  output logic [31:0]       out_data,
  output logic              out_last,
  output logic [N-1:0]      drops
);
  localparam int unsigned GW = (N > 1) ? $clog2(N) : 1;

  logic [N-1:0]       f_valid, f_last, f_ready, has_block;
  logic [N-1:0][31:0] f_data;
  logic [GW-1:0]      grant, last_served;
  logic               busy;

  for (genvar i = 0; i < int'(N); i++) begin : g_fifo
    logic [$clog2(DEPTH):0] blocks;
    block_fifo #(.DEPTH(DEPTH), .W(32)) u_fifo (
      .clk, .rst,
      .wr_valid(in_valid[i]), .wr_data(in_data[i]), .wr_last(in_last[i]),
      .rd_ready(f_ready[i]), .rd_valid(f_valid[i]), .rd_data(f_data[i]),
      .rd_last(f_last[i]), .blocks(blocks), .drop(drops[i])
    );
    assign has_block[i] = (blocks != '0);
    assign f_ready[i]   = busy && (grant == GW'(i)) && out_ready;
  end

  assign out_valid = busy && f_valid[grant];
  assign out_data  = f_data[grant];
  assign out_last  = f_last[grant];

  // next input with a complete block, searching from last_served + 1
  logic          found;
  logic [GW-1:0] pick;
  always_comb begin
    found = 1'b0;
    pick  = '0;
    // walk from the farthest candidate to the nearest: the nearest wins
    for (int k = int'(N); k >= 1; k--) begin
      if (has_block[(int'(last_served) + k) % int'(N)]) begin
        found = 1'b1;
        pick  = GW'((int'(last_served) + k) % int'(N));
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy        <= 1'b0;
      grant       <= '0;
      last_served <= GW'(N - 1);
    end else if (!busy) begin
      if (found) begin
        busy  <= 1'b1;
        grant <= pick;
      end
    end else if (out_valid && out_ready && out_last) begin
      busy        <= 1'b0;
      last_served <= grant;
    end
  end

  // a granted block never leaves a gap: the FIFO already holds all of it
  a_no_gap: assert property (@(posedge clk) disable iff (rst) busy |-> f_valid[grant]);
endmodule
