// tb_openpet_top: end-to-end test of the Scope-mode system at reduced size.
//
// Two detector units of two 4-channel Detector Boards each, small block
// FIFOs and a small USB FIFO, short command sleep times. The test body (see
// tb_openpet_body.svh) configures the boards with broadcast commands,
// exercises every command outcome, fires triggers while the USB side reads
// slowly so that whole blocks are dropped, and checks every delivered block.
module tb_openpet_top;
  localparam int NUM_DU = 2, NUM_DB = 2, CH = 4, ADC_W = 12;
  localparam int SLEEP = 200, RETRIES = 60, N_BURSTS = 12;
  localparam int WATCHDOG = 400_000;
  localparam bit EXPECT_DROP = 1'b1;
`include "tb_openpet_body.svh"

  openpet_top #(
    .NUM_DU(NUM_DU), .NUM_DB(NUM_DB), .CH(CH), .ADC_W(ADC_W), .DEPTH(64),
    .FIFO_DEPTH(64), .USB_FIFO_DEPTH(64), .HALF_PERIOD(8),
    .RESPONSE_SLEEP(SLEEP), .RESPONSE_RETRIES(RETRIES)
  ) dut (.*);

`include "tb_openpet_body.svh"
endmodule
