// tb_spi_slave: checks the oversampling SPI slave against a model master.
//
// The model master runs SPI mode 0 with a serial-clock half period of HP
// system clocks, MSB first, reading MISO on rising edges. Checked: the
// slave delivers every 32-bit word exactly once with rx_valid, returns the
// word that was on tx_word when chip select fell (tx_taken marks that
// moment), drives MISO only while selected (give or take
// the synchronizer delay), and ignores a transfer that is
// not 32 bits long.
module tb_spi_slave;
  localparam int HP = 6;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic sclk = 1'b0, mosi = 1'b0, cs_n = 1'b1;
  logic miso, miso_oe, tx_taken, rx_valid;
  logic [31:0] tx_word = '0, rx_word;

  spi_slave dut (.clk, .rst, .sclk, .mosi, .cs_n, .miso, .miso_oe,
                 .tx_word, .tx_taken, .rx_valid, .rx_word);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_valid = 0, n_taken = 0, desel = 0;
  logic [31:0] last_rx = '0;
  always @(posedge clk) begin
    #1;
    if (rx_valid) begin n_valid++; last_rx = rx_word; end
    if (tx_taken) n_taken++;
    desel = cs_n ? desel + 1 : 0;
    // the chip select passes a three-stage synchronizer
    if (!rst && desel > 4) check(!miso_oe, "MISO released while deselected");
  end

  task automatic xfer(input logic [31:0] w, input int nbits, output logic [31:0] got);
    got = '0;
    @(negedge clk) cs_n = 1'b0; mosi = w[31];
    repeat (HP) @(negedge clk);
    for (int i = 0; i < nbits; i++) begin
      sclk = 1'b1; got = {got[30:0], miso};
      check(miso_oe, "MISO driven while selected");
      repeat (HP) @(negedge clk);
      sclk = 1'b0;
      if (i < 31) mosi = w[30 - i];
      repeat (HP) @(negedge clk);
    end
    cs_n = 1'b1;
    repeat (2 * HP) @(negedge clk);
  endtask

  initial begin
    logic [31:0] w, g, t;
    int v0, k0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int k = 0; k < 30; k++) begin
      t = $urandom; w = $urandom;
      tx_word = t;
      v0 = n_valid; k0 = n_taken;
      fork
        xfer(w, 32, g);
        begin       // change tx_word after the transfer has started
          repeat (4 * HP) @(negedge clk);
          tx_word = ~t;
        end
      join
      check(n_valid == v0 + 1, "one rx_valid per transfer");
      check(n_taken == k0 + 1, "one tx_taken per transfer");
      check(last_rx == w, $sformatf("received %h, sent %h", last_rx, w));
      check(g == t, $sformatf("returned %h, expected %h", g, t));
    end
    // short transfer is ignored
    v0 = n_valid;
    xfer(32'hDEADBEEF, 20, g);
    check(n_valid == v0, "short transfer dropped");
    // and the next full one still works
    tx_word = 32'h0F0F_1234;
    xfer(32'h8765_4321, 32, g);
    check(last_rx == 32'h8765_4321 && g == 32'h0F0F_1234, "recovered after short transfer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
