// tb_spi_master: checks the SPI master against a model slave.
//
// The model slave watches the selected chip-select line, samples MOSI on
// rising serial-clock edges and drives MISO (most significant bit first) from
// chip-select fall and after each falling edge. Checked for random words and
// slots: the word the slave receives, the word the master returns, that only
// the chosen chip select goes low, that the clock idles low outside a
// transaction, and the transaction length 65*HP + 1 clocks
// (start to done).
module tb_spi_master;
  localparam int SLOTS = 8, HP = 4;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic start = 1'b0;
  logic [2:0] slot_sel = '0;
  logic [31:0] tx_data = '0, rx_data;
  logic busy, done, sclk, mosi, miso;
  logic [SLOTS-1:0] cs_n;

  spi_master #(.SLOTS(SLOTS), .HALF_PERIOD(HP)) dut (
    .clk, .rst, .start, .slot_sel, .tx_data, .busy, .done, .rx_data,
    .sclk, .mosi, .cs_n, .miso
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model slave (any slot)
  logic [31:0] s_tx = '0, s_rx = '0, s_out = '0;
  int          s_bits = 0;
  assign miso = s_out[31];
  always @(negedge (&cs_n)) begin s_out = s_tx; s_bits = 0; end
  always @(posedge sclk) if (!(&cs_n)) begin s_rx = {s_rx[30:0], mosi}; s_bits++; end
  always @(negedge sclk) if (!(&cs_n)) s_out = {s_out[30:0], 1'b0};

  // clock idles low whenever no slot is selected
  always @(posedge clk) if (!rst && (&cs_n)) check(!sclk, "serial clock idle low");

  initial begin
    int cyc;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int t = 0; t < 40; t++) begin
      logic [2:0] sl;
      sl = 3'($urandom_range(0, SLOTS - 1));
      s_tx = $urandom;
      @(negedge clk);
      tx_data = $urandom; slot_sel = sl; start = 1'b1;
      @(negedge clk) start = 1'b0;
      cyc = 1;
      while (!done) begin
        check(cs_n == ~(SLOTS'(1) << sl), $sformatf("only slot %0d selected: %b", sl, cs_n));
        @(negedge clk); cyc++;
        if (cyc > 1000) break;
      end
      check(cyc == 65 * HP + 1, $sformatf("transaction length %0d", cyc));
      check(s_bits == 32, $sformatf("slave clocked %0d bits", s_bits));
      check(s_rx == tx_data, $sformatf("slave received %h, sent %h", s_rx, tx_data));
      check(rx_data == s_tx, $sformatf("master received %h, slave sent %h", rx_data, s_tx));
      check(&cs_n, "deselected after done");
      repeat ($urandom_range(0, 5)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
