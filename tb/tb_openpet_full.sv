// tb_openpet_full: end-to-end test of the full Standard System.
//
// openpet_top with every parameter at its default: eight detector units of
// eight 16-channel Detector Boards (1024 channels), full-depth buffers and
// the default command sleep (1 ms at 80 MHz) and retry count. The same
// test body as the reduced test (tb_openpet_body.svh) configures all boards
// by broadcast, exercises the command outcomes that exist in a fully
// populated system, fires a few trigger bursts on every board and checks
// every block that reaches the USB side. With every slot populated the
// empty-slot cases are skipped. The USB side reads slower than the boards
// send, so blocks are dropped here too, and each is accounted for.
module tb_openpet_full;
  localparam int NUM_DU = 8, NUM_DB = 8, CH = 16, ADC_W = 12;
  localparam int SLEEP = 80_000, RETRIES = 200, N_BURSTS = 3;
  localparam int WATCHDOG = 30_000_000;
  localparam bit EXPECT_DROP = 1'b1;
`include "tb_openpet_body.svh"

  openpet_top dut (.*);

`include "tb_openpet_body.svh"
endmodule
