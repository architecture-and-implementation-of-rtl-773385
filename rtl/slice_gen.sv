// slice_gen: frame ("Slice") clock generator of the uppermost node.
//
// OpenPET divides time into fixed slices of 8 or 16 cycles of the main CLK
// (10 MHz or 5 MHz at 80 MHz). This block counts CLK cycles and produces
// the Slice signal with a 50 % duty cycle, a one-cycle slice_start pulse on
// every rising edge of Slice, the position of the current cycle inside the
// slice (phase), and a one-cycle startup pulse on the first rising edge of
// Slice after reset, which the system uses as its synchronized start.
//
// Interface: clk, rst, div16 (0: CLK/8, 1: CLK/16) -> slice, slice_start,
// startup, phase. Timing: slice_start is high on the cycle where phase == 0;
// the first one follows reset release by one cycle. A change of div16 takes
// effect at the next slice boundary.
// The two ratios and the startup-pulse use of the rising edge follow the
// document; the 50 % duty cycle is this design's choice.
module slice_gen (
  input  logic       clk,
  input  logic       rst,
  input  logic       div16,
  output logic       slice,
  output logic       slice_start,
  output logic       startup,
  output logic [3:0] phase
);
  logic       div16_q;
  logic       started;
  logic [3:0] last_phase;

  assign last_phase = div16_q ? 4'd15 : 4'd7;

  always_ff @(posedge clk) begin
    if (rst) begin
      phase       <= '0;
      div16_q     <= div16;
      slice       <= 1'b0;
      slice_start <= 1'b0;
      startup     <= 1'b0;
      started     <= 1'b0;
    end else begin
      slice_start <= 1'b0;
      startup     <= 1'b0;
      if (!started || phase == last_phase) begin
        phase       <= '0;
        div16_q     <= div16;
        slice       <= 1'b1;
        slice_start <= 1'b1;
        startup     <= !started;
        started     <= 1'b1;
      end else begin
        phase <= phase + 1'b1;
        if (phase + 1'b1 == (div16_q ? 4'd8 : 4'd4)) slice <= 1'b0;
      end
    end
  end
endmodule
