// tb_db_node: checks a whole Detector Board through its external pins.
//
// The testbench acts as the parent Support Board: it sends 80-bit commands
// over SPI (two 32-bit writes, then polling reads as in the parent's write
// and read flows), drives every channel's ADC pins at double data rate with
// a known ramp, pulses comparator inputs and decodes the 16-bit data link.
// Checked: command echo, replies to PING (event count), the configuration
// commands and an unknown command; after Scope mode is started, a
// comparator pulse gives one block whose headers carry the board address,
// data format, hit flags and TDC value, and whose samples are the ramp
// values all channels had at the same instants, the trigger sample among
// them; a masked channel gives no block.
module tb_db_node;
  import openpet_pkg::*;
  localparam int CH = 4, ADC_W = 12, HP = 8;
  localparam int NS = 10, PRE = 3, TWIN = 2, FMT = 6;
  logic clk = 1'b0, pll_locked = 1'b0;
  always #5 clk = ~clk;

  logic [CH-1:0][ADC_W/2-1:0] adc_pins = '0;
  logic [CH-1:0]              hw_trig = '0;
  logic [CH-1:0][19:0]        tdc;
  logic sclk = 1'b0, mosi = 1'b0, cs_n = 1'b1, miso_v, miso_oe, miso, link_slice;
  logic [15:0] link_data, events;

  db_node #(.CH(CH), .ADC_W(ADC_W), .DEPTH(64), .SPI_TIMEOUT(5000), .EXEC_TIMEOUT(5000)) dut (
    .clk, .pll_locked, .db_addr(3'd5), .du_addr(3'd0), .mb_addr(3'd3),
    .adc_pins, .hw_trig, .tdc, .sclk, .mosi, .cs_n, .miso(miso_v), .miso_oe,
    .link_data, .link_slice, .events
  );
  assign miso = miso_oe ? miso_v : 1'b1;     // pull-up on the shared line

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ADC ramp: value of channel c at clock k
  int k = 0;
  function automatic logic [ADC_W-1:0] v(int kk, int c);
    return ADC_W'((kk * 3 + c * 1000) % 4096);
  endfunction
  // the high bits are set up for the rising edge, the low bits for the
  // falling edge that follows it
  always @(negedge clk) begin
    #1;
    for (int c = 0; c < CH; c++) for (int i = 0; i < ADC_W/2; i++) adc_pins[c][i] = v(k, c)[2*i+1];
  end
  always @(posedge clk) begin
    #1;
    for (int c = 0; c < CH; c++) for (int i = 0; i < ADC_W/2; i++) adc_pins[c][i] = v(k, c)[2*i];
    k++;
  end
  always_comb for (int c = 0; c < CH; c++) tdc[c] = 20'(k * 4 + c);

  // link decoder: blocks of 32-bit packets
  logic [31:0] blk [$];
  logic [31:0] blocks [$][$];
  int half = 0; logic [15:0] hi;
  always @(posedge clk) begin
    if (pll_locked && link_slice) begin
      if (half == 0) begin hi = link_data; half = 1; end
      else begin blk.push_back({hi, link_data}); half = 0; end
    end else if (blk.size() > 0) begin
      blocks.push_back(blk); blk = {};
    end
  end

  // parent side of the command protocol
  task automatic spi(input logic [31:0] w, output logic [31:0] got);
    got = '0;
    @(negedge clk) cs_n = 1'b0; mosi = w[31];
    repeat (HP) @(negedge clk);
    for (int i = 0; i < 32; i++) begin
      sclk = 1'b1; got = {got[30:0], miso};
      repeat (HP) @(negedge clk);
      sclk = 1'b0;
      if (i < 31) mosi = w[30 - i];
      repeat (HP) @(negedge clk);
    end
    cs_n = 1'b1;
    repeat (2 * HP) @(negedge clk);
  endtask
  task automatic command(input logic [15:0] c, input logic [31:0] p,
                         output logic [15:0] rc, output logic [31:0] rp);
    logic [31:0] g;
    spi({c, 16'h0005}, g);
    spi(p, g);
    check(g == {c, 16'h0005}, $sformatf("echo of %h: %h", c, g));
    rc = CMD_STDCMD_TIMEDOUT; rp = '0;
    for (int r = 0; r < 50; r++) begin
      repeat (100) @(negedge clk);
      spi(32'h0, g);
      if (g[31:16] == (c ^ 16'h8000)) begin rc = g[31:16]; spi(32'h0, rp); break; end
      if (g[31:16] == CMD_STDCMD_UNKNOWN) begin rc = g[31:16]; break; end
    end
  endtask
  task automatic set(input logic [14:0] id, input logic [31:0] p, input string tag);
    logic [15:0] rc; logic [31:0] rp;
    command({1'b0, id}, p, rc, rp);
    check(rc == {1'b1, id} && rp == p, $sformatf("%s reply %h %h", tag, rc, rp));
  endtask

  // check one block against the ramp
  task automatic check_block(input logic [31:0] b [$], input logic [CH-1:0] hits, input int t_trig);
    db_hdr_t dh; ch_hdr_t ch; int idx = 0; int base = -1;
    check(b.size() == 1 + CH * (1 + NS), $sformatf("block size %0d", b.size()));
    if (b.size() != 1 + CH * (1 + NS)) return;
    dh = b[idx++];
    check(dh.pid == PID_DB_HDR && dh.num_ch_hdr == CH && dh.db_addr == 5 && dh.mb_addr == 3 &&
          dh.data_format == FMT, $sformatf("board header %h", dh));
    for (int c = 0; c < CH; c++) begin
      ch = b[idx++];
      check(ch.pid == PID_CH_HDR && ch.ch_addr == c && ch.hw_hit == hits[c] && !ch.fw_hit,
            $sformatf("channel header %0d: %h", c, ch));
      if (hits[c]) check(ch.tdc[1:0] == 2'(c) && ch.tdc != 0, "TDC value latched");
      for (int s = 0; s < NS; s++) begin
        logic [31:0] w; int kk;
        w = b[idx++];
        kk = (int'(w[11:0]) - c * 1000 + 4096 * 3) % 4096;   // 3*sample clock
        check(w[31:28] == PID_SAMPLE, "sample packet id");
        if (base < 0) base = kk;
        check(kk == (base + 3 * s) % 4096, $sformatf("ch %0d sample %0d: ramp step %h kk=%0d base=%0d", c, s, w, kk, base));
      end
    end
    // sample PRE is the trigger instant, give or take the capture latency
    begin
      int d;
      d = (base + 3 * PRE - (3 * t_trig) % 4096 + 4096 + 2048) % 4096 - 2048;   // 3 x clocks
      check(d >= -18 && d <= 18, $sformatf("trigger sample %0d clocks from the pulse", d / 3));
    end
  endtask

  initial begin
    logic [15:0] rc; logic [31:0] rp; scope_cfg_t cfg; int t;
    repeat (5) @(posedge clk);
    pll_locked = 1'b1;
    repeat (40) @(posedge clk);

    command({1'b0, CMD_PING}, 32'h0, rc, rp);
    check(rc == {1'b1, CMD_PING} && rp == 0, $sformatf("ping %h %h", rc, rp));
    command(16'h0155, 32'h0, rc, rp);
    check(rc == CMD_STDCMD_UNKNOWN, $sformatf("unknown command %h", rc));
    cfg = '0; cfg.data_format = 4'(FMT); cfg.num_samples = 9'(NS); cfg.pre_samples = 4'(PRE);
    cfg.trig_window = 4'(TWIN);
    set(CMD_SET_SYS_DATA_MODE, 32'(MODE_SCOPE), "mode");
    set(CMD_SET_SYS_DATA_MODE_SETTINGS, 32'(cfg), "settings");
    set(CMD_SET_TRIGGER_MASK, 32'h0000_0007, "mask");      // channel 3 masked
    set(CMD_SET_FW_THRESHOLD, 32'h0000_0FFF, "threshold");
    set(CMD_SET_SYS_DATA_MODE_ACTION, 32'd1, "run");

    // masked channel alone
    @(negedge clk) hw_trig = 4'b1000; @(negedge clk) hw_trig = '0;
    repeat (500) @(negedge clk);
    check(blocks.size() == 0, "masked channel gives no block");

    // two events
    for (int e = 0; e < 2; e++) begin
      @(negedge clk) hw_trig = 4'b0100; t = k;
      @(negedge clk) hw_trig = '0;
      @(negedge clk) hw_trig = 4'b0001;
      @(negedge clk) hw_trig = '0;
      repeat (600) @(negedge clk);
      check(blocks.size() == e + 1, $sformatf("block %0d received", e));
      if (blocks.size() == e + 1) check_block(blocks[e], 4'b0101, t);
    end
    command({1'b0, CMD_PING}, 32'h0, rc, rp);
    check(rc == {1'b1, CMD_PING} && rp == 2 && events == 2, $sformatf("ping counts events %h %0d", rc, rp));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
