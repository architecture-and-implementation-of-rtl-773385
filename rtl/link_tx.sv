// link_tx: sends 32-bit packets over the 16-line LVDS data bus of a slot.
//
// A child passes data to its parent on sixteen LVDS pairs ("Data Out") with a
// "Slice Out" line that, in Scope mode, acts as a data-valid signal rather
// than a periodic frame clock. Each 32-bit packet goes out as two 16-bit
// words, upper half first, with slice high on both. The packets of one block
// leave back to back with slice held high; after the last packet of a block
// slice is low for at least one cycle, which is how the receiver finds block
// boundaries. A two-entry buffer (packet on the wire and next packet) lets a
// source that delivers one packet every two cycles keep the wire busy.
//
// Interface: in_valid/in_ready/in_data/in_last (valid-ready), link_en (the
// downstream can take a word this cycle; tie high on a backplane link),
// link_data[15:0], link_slice.
// Timing: a packet accepted at cycle t appears on the wire from t+1 at the
// earliest; 16 bits per cycle (1280 Mbit/s at 80 MHz).
// The bus width and the valid use of Slice follow the document; word order
// and the idle cycle between blocks are this design's own.
module link_tx (
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [31:0] in_data,
  input  logic        in_last,
  input  logic        link_en,
  output logic [15:0] link_data,
  output logic        link_slice
);
  logic        cur_v, cur_last, nxt_v, nxt_last, half, gap;
  logic [31:0] cur, nxt;
  logic        send, done_pkt, take;

  assign in_ready = !nxt_v;
  assign take     = in_valid && in_ready;
  assign send     = cur_v && link_en && !gap;
  assign done_pkt = send && half;

  always_ff @(posedge clk) begin
    if (rst) begin
      cur_v <= 1'b0; nxt_v <= 1'b0; half <= 1'b0; gap <= 1'b0;
      cur <= '0; nxt <= '0; cur_last <= 1'b0; nxt_last <= 1'b0;
      link_data <= '0; link_slice <= 1'b0;
    end else begin
      link_slice <= send;
      link_data  <= send ? (half ? cur[15:0] : cur[31:16]) : 16'h0000;
      if (send) half <= !half;
      gap <= done_pkt && cur_last;
      // move the next packet onto the wire, or take a new one
      if (!cur_v || done_pkt) begin
        if (nxt_v) begin
          cur <= nxt; cur_last <= nxt_last; cur_v <= 1'b1;
          nxt_v <= take;
          if (take) begin nxt <= in_data; nxt_last <= in_last; end
        end else if (take) begin
          cur <= in_data; cur_last <= in_last; cur_v <= 1'b1;
        end else begin
          cur_v <= 1'b0;
        end
      end else if (take) begin
        nxt <= in_data; nxt_last <= in_last; nxt_v <= 1'b1;
      end
    end
  end
endmodule
