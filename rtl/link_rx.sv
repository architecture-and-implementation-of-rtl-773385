// link_rx: receives 32-bit packets from a slot's 16-line LVDS data bus.
//
// Counterpart of link_tx. While the slice (valid) line is high, 16-bit words
// are paired into packets, upper half first. A finished packet is held for
// one cycle to see whether the valid run continues: if slice is still high it
// is passed on as an inner packet, if slice has dropped it is marked as the
// last packet of its block. A valid run that ends after an odd number of
// words leaves a half packet, which is discarded and counted in frame_err.
//
// Interface: link_data[15:0], link_slice -> out_valid/out_data/out_last (no
// back-pressure), frame_err (one-cycle pulse).
// Timing: a packet leaves one cycle after its second word arrived if the run
// continues, else on the first idle cycle; at most one packet every two cycles.
// Framing by the valid run is this design's own choice.
module link_rx (
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] link_data,
  input  logic        link_slice,
  output logic        out_valid,
  output logic [31:0] out_data,
  output logic        out_last,
  output logic        frame_err
);
  logic        half;
  logic [15:0] hi;
  logic        pend_v;
  logic [31:0] pend;

  always_ff @(posedge clk) begin
    if (rst) begin
      half <= 1'b0; hi <= '0; pend_v <= 1'b0; pend <= '0;
      out_valid <= 1'b0; out_data <= '0; out_last <= 1'b0; frame_err <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      frame_err <= 1'b0;
      if (pend_v) begin
        out_valid <= 1'b1;
        out_data  <= pend;
        out_last  <= !link_slice;
        pend_v    <= 1'b0;
      end
      if (link_slice) begin
        if (!half) begin
          hi   <= link_data;
          half <= 1'b1;
        end else begin
          pend   <= {hi, link_data};
          pend_v <= 1'b1;
          half   <= 1'b0;
        end
      end else if (half) begin
        half      <= 1'b0;
        frame_err <= 1'b1;
      end
    end
  end
endmodule
