// async_fifo: dual-clock FIFO between the data path and the USB clock.
//
// At the uppermost node the 16-bit data stream arrives at the main clock
// (80 MHz x 16 bit = 1280 Mbit/s) and leaves towards the QuickUSB module on
// the USB interface clock (typically 30 MHz, 480 Mbit/s). The FIFO uses the
// usual Gray-coded read and write pointers, each passed to the other clock
// domain through a two-flop synchronizer; full is computed in the write
// domain and empty in the read domain, both conservatively.
//
// Interface: write side wclk/wrst/wr_en/wr_data/full/almost_full, read side
// rclk/rrst/rd_en/rd_data/empty (first-word fall-through: rd_data is valid
// whenever empty is low; rd_en pops it).
// Timing: a written word becomes visible to the reader 2-3 read clocks later.
// The dual-clock FIFO at this place follows the document; depth and
// structure are this design's own.
module async_fifo #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 1024,   // power of two
  parameter int unsigned AFULL_MARGIN = 4
) (
  input  logic         wclk,
  input  logic         wrst,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  output logic         full,
  output logic         almost_full,
  input  logic         rclk,
  input  logic         rrst,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         empty
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wbin, wgray, rbin, rgray;
  logic [AW:0]  rgray_w1, rgray_w2, wgray_r1, wgray_r2;
  logic [AW:0]  wbin_n, rbin_n, wgray_n, rgray_n;

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    for (int i = AW; i >= 0; i--) b[i] = (i == int'(AW)) ? g[i] : (b[i+1] ^ g[i]);
    return b;
  endfunction

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write domain
  assign wbin_n  = wbin + ($bits(wbin))'(wr_en && !full);
  assign wgray_n = bin2gray(wbin_n);
  always_ff @(posedge wclk) begin
    if (wrst) begin
      wbin <= '0; wgray <= '0; full <= 1'b0; almost_full <= 1'b0;
      rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      if (wr_en && !full) mem[wbin[AW-1:0]] <= wr_data;
      wbin  <= wbin_n;
      wgray <= wgray_n;
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      full <= (wgray_n == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
      almost_full <= (wbin_n - gray2bin(rgray_w2)) >= (AW+1)'(DEPTH - AFULL_MARGIN);
    end
  end

  // read domain
  assign rbin_n  = rbin + ($bits(rbin))'(rd_en && !empty);
  assign rgray_n = bin2gray(rbin_n);
  always_ff @(posedge rclk) begin
    if (rrst) begin
      rbin <= '0; rgray <= '0; empty <= 1'b1;
      wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      rbin  <= rbin_n;
      rgray <= rgray_n;
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      empty <= (rgray_n == wgray_r2);
    end
  end
  assign rd_data = mem[rbin[AW-1:0]];
endmodule
