// ddio_rx: double-data-rate capture of source-synchronous ADC data.
//
// The Detector Board FPGA has no hardware SERDES, so the generic ADC
// interface takes each data line into fabric registers on both clock edges
// (the role of the vendor DDIO input cell). PINS lines are sampled on the
// rising edge (high half) and on the following falling edge (low half); on
// the next rising edge both halves are presented together as one word of
// 2*PINS bits, {rising-edge bits, falling-edge bits} interleaved per line:
// dout[2*i+1] is line i at the rising edge, dout[2*i] line i at the falling
// edge.
//
// Interface: clk (ADC data clock), din[PINS] -> dout[2*PINS].
// Timing: the bits captured at rising edge n and falling edge n appear on
// dout after rising edge n+1.
// Capture on both edges without an extra PLL follows the document; the bit
// ordering (MSB first on the rising edge of each line) is this design's own.
module ddio_rx #(
  parameter int unsigned PINS = 6
) (
  input  logic              clk,
  input  logic [PINS-1:0]   din,
  output logic [2*PINS-1:0] dout
);
  logic [PINS-1:0] rise_q, fall_q;

  always_ff @(posedge clk) rise_q <= din;
  always_ff @(negedge clk) fall_q <= din;

  always_ff @(posedge clk) begin
    for (int i = 0; i < int'(PINS); i++) begin
      dout[2*i+1] <= rise_q[i];
      dout[2*i]   <= fall_q[i];
    end
  end
endmodule
