// block_fifo: store-and-forward packet FIFO that keeps blocks whole.
//
// Each entry is a 32-bit data packet plus a "last" flag that closes a block
// (one detector board's Scope-mode event). Writes go to a speculative write
// pointer; the block becomes visible to the reader only when its last packet
// is written. If a block does not fit, the rest of it is discarded and the
// write pointer falls back to the start of that block, so a reader never sees
// a partial block. blocks counts whole blocks stored; drop pulses once per
// discarded block.
//
// Interface: wr_valid/wr_data/wr_last (no back-pressure on the write side),
// rd_ready/rd_valid/rd_data/rd_last (valid-ready), blocks, drop.
// Timing: one write and one read per cycle; read data is registered, so
// rd_valid rises two cycles after the last packet of a block is written.
// This block is this design's own means of keeping blocks from different
// children apart in the round-robin multiplexer.
module block_fifo #(
  parameter int unsigned DEPTH = 8192,   // entries, power of two
  parameter int unsigned W     = 32
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         wr_valid,
  input  logic [W-1:0] wr_data,
  input  logic         wr_last,
  input  logic         rd_ready,
  output logic         rd_valid,
  output logic [W-1:0] rd_data,
  output logic         rd_last,
  output logic [$clog2(DEPTH):0] blocks,
  output logic         drop
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [W:0]    mem [DEPTH];
  logic [AW:0]   wp, wp_commit, rp;
  logic          dropping;
  logic          full_spec;
  logic          pop_mem;     // entry moves from memory into the output register
  logic          commit;
  logic          rd_last_pop;

  assign full_spec = (wp[AW-1:0] == rp[AW-1:0]) && (wp[AW] != rp[AW]);
  assign commit    = wr_valid && wr_last && !dropping && !full_spec;

  // output register: refilled whenever it is empty or being consumed
  assign pop_mem = (rp != wp_commit) && (!rd_valid || rd_ready);
  assign rd_last_pop = rd_valid && rd_ready && rd_last;

  always_ff @(posedge clk) begin
    if (rst) begin
      wp        <= '0;
      wp_commit <= '0;
      rp        <= '0;
      dropping  <= 1'b0;
      drop      <= 1'b0;
      rd_valid  <= 1'b0;
      rd_data   <= '0;
      rd_last   <= 1'b0;
      blocks    <= '0;
    end else begin
      drop <= 1'b0;
      // write side
      if (wr_valid) begin
        if (dropping || full_spec) begin
          if (wr_last) begin
            dropping <= 1'b0;
            wp       <= wp_commit;
            drop     <= 1'b1;
          end else begin
            dropping <= 1'b1;
          end
        end else begin
          mem[wp[AW-1:0]] <= {wr_last, wr_data};
          wp <= wp + 1'b1;
          if (wr_last) wp_commit <= wp + 1'b1;
        end
      end
      // read side
      if (pop_mem) begin
        {rd_last, rd_data} <= mem[rp[AW-1:0]];
        rd_valid <= 1'b1;
        rp       <= rp + 1'b1;
      end else if (rd_ready) begin
        rd_valid <= 1'b0;
      end
      blocks <= blocks + ($bits(blocks))'(commit) - ($bits(blocks))'(rd_last_pop);
    end
  end
endmodule
