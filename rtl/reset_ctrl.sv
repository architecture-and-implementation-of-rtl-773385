// reset_ctrl: board reset derived from the PLL lock indication.
//
// Every OpenPET node makes its reset depend on its PLL locking to the
// distributed CLK, so the same reset block is used on every board. The
// asynchronous pll_locked input is brought into the clock domain through a
// two-flop synchronizer; rst stays asserted while the PLL is unlocked and for
// HOLD_CYCLES clock cycles after lock is seen, then is released synchronously.
// Losing lock asserts rst again on the next clock edge after the synchronizer.
// The registers start from their configuration values (reset asserted), so
// rst is valid from the first clock.
//
// Interface: clk, pll_locked (async, active high) -> rst (sync, active high).
// Timing: rst falls on the (HOLD_CYCLES + 3)th rising clock edge after
// pll_locked rises.
// The dependence on PLL lock follows the document; the hold time and the
// synchronizer are this design's own choices.
module reset_ctrl #(
  parameter int unsigned HOLD_CYCLES = 16
) (
  input  logic clk,
  input  logic pll_locked,
  output logic rst
);
  localparam int unsigned CW = $clog2(HOLD_CYCLES + 1);

  // power-up values (FPGA configuration state): in reset, PLL not seen
  logic [1:0]    lock_sync = 2'b00;
  logic [CW-1:0] cnt       = '0;
  logic          rst_q     = 1'b1;
  assign rst = rst_q;

  always_ff @(posedge clk) begin
    lock_sync <= {lock_sync[0], pll_locked};
    if (!lock_sync[1]) begin
      cnt <= '0;
      rst_q <= 1'b1;
    end else if (cnt != CW'(HOLD_CYCLES)) begin
      cnt <= cnt + 1'b1;
      rst_q <= 1'b1;
    end else begin
      rst_q <= 1'b0;
    end
  end
endmodule
