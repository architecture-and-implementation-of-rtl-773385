// tb_scope_acq: self-checking test of the Scope-mode acquisition block.
//
// Four channels are fed a known sample sequence f(n, c) that the testbench
// also keeps in a history array. Events are started by comparator pulses
// and by a firmware-threshold crossing; each block read out is checked
// packet by packet against the expected detector board header, channel
// headers (address, hit flags, TDC) and samples history[t - pre + k][c].
// Also checked: a masked channel does not trigger, hits inside and outside
// the trigger window, random back-pressure on the output, and that the
// read-out keeps up with the 16-bit link (one packet every two cycles).
module tb_scope_acq;
  import openpet_pkg::*;

  localparam int CH = 4, ADC_W = 12, DEPTH = 64;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic [3:0] mode; logic run; scope_cfg_t cfg;
  logic [CH-1:0] trig_mask, hw_trig;
  logic [ADC_W-1:0] fw_threshold;
  logic [CH-1:0][ADC_W-1:0] adc;
  logic [CH-1:0][19:0] tdc;
  logic out_valid, out_ready, out_last, busy;
  logic [31:0] out_data;
  logic [15:0] events;

  scope_acq #(.CH(CH), .ADC_W(ADC_W), .DEPTH(DEPTH)) dut (
    .clk, .rst, .mode, .run, .cfg, .trig_mask, .fw_threshold,
    .db_addr(3'd5), .du_addr(3'd2), .mb_addr(3'd6),
    .sample_valid(1'b1), .adc, .hw_trig, .tdc,
    .out_valid, .out_ready, .out_data, .out_last, .busy, .events
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // sample history and generator
  int n = 0;
  logic [ADC_W-1:0] hist [0:4095][CH];
  int spike_at = -1, spike_ch = 0;
  function automatic logic [ADC_W-1:0] f(int idx, int c);
    return ADC_W'((idx * 13 + c * 301) % 2048);
  endfunction
  always_comb begin
    for (int c = 0; c < CH; c++) begin
      adc[c] = (n == spike_at && c == spike_ch) ? 12'd4000 : f(n, c);
      tdc[c] = 20'(n * 16 + c);
    end
  end
  always @(posedge clk) begin
    for (int c = 0; c < CH; c++) hist[n][c] <= adc[c];
    n <= n + 1;
  end

  // output capture
  logic [31:0] got [$];
  int first_cyc = -1, last_cyc = -1, cyc = 0;
  bit rand_ready = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (out_valid && out_ready) begin
      if (got.size() == 0) first_cyc = cyc;
      got.push_back(out_data);
      if (out_last) last_cyc = cyc;
    end
  end
  always @(negedge clk) out_ready <= rand_ready ? ($urandom_range(0, 2) != 0) : 1'b1;

  // check one block: trigger sample t, expected hit flags
  task automatic check_block(input int t, input int pre, input int ns,
                             input logic [CH-1:0] hw_exp, input logic [CH-1:0] fw_exp,
                             input int tdc_n [CH], input string tag);
    db_hdr_t dh; ch_hdr_t chh;
    int idx = 0;
    check(got.size() == 1 + CH * (1 + ns), $sformatf("%s block length %0d", tag, got.size()));
    if (got.size() != 1 + CH * (1 + ns)) return;
    dh = got[idx++];
    check(dh.pid == PID_DB_HDR && dh.num_ch_hdr == CH && dh.db_addr == 5 &&
          dh.duc_addr == 2 && dh.mb_addr == 6 && dh.data_format == 5'(cfg.data_format),
          $sformatf("%s db header %h", tag, dh));
    for (int c = 0; c < CH; c++) begin
      chh = got[idx++];
      check(chh.pid == PID_CH_HDR && chh.ch_addr == 6'(c) &&
            chh.hw_hit == hw_exp[c] && chh.fw_hit == fw_exp[c] &&
            chh.tdc == ((hw_exp[c] || fw_exp[c]) ? 20'(tdc_n[c] * 16 + c) : 20'h0),
            $sformatf("%s ch header %0d = %h", tag, c, chh));
      for (int k = 0; k < ns; k++) begin
        logic [31:0] w;
        w = got[idx++];
        check(w[31:28] == PID_SAMPLE && w[27:0] == 28'(hist[t - pre + k][c]),
              $sformatf("%s ch %0d sample %0d: %h vs %h", tag, c, k, w, hist[t - pre + k][c]));
      end
    end
  endtask

  task automatic wait_block();
    int w = 0;
    while (last_cyc < 0 && w < 5000) begin @(posedge clk); w++; end
    check(last_cyc >= 0, "block finished");
    repeat (3) @(posedge clk);
  endtask

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t; int tdc_n [CH];
    mode = MODE_IDLE; run = 0; cfg = '0; trig_mask = '0; hw_trig = '0;
    fw_threshold = 12'd3000;
    repeat (4) @(posedge clk);
    rst = 0;
    // configure: 20 samples, 6 before trigger, window 4, format 3
    cfg.data_format = 4'd3; cfg.num_samples = 9'd20; cfg.pre_samples = 4'd6; cfg.trig_window = 4'd4;
    trig_mask = 4'b1011;          // channel 2 masked
    mode = MODE_SCOPE; run = 1;
    repeat (30) @(posedge clk);

    // 1) masked channel alone: no event
    @(negedge clk); hw_trig = 4'b0100; @(negedge clk); hw_trig = '0;
    repeat (100) @(posedge clk);
    check(got.size() == 0 && !busy, "masked channel does not trigger");

    // 2) channel 1 triggers, channel 3 inside window, channel 0 outside
    @(negedge clk); t = n; hw_trig = 4'b0010;
    @(negedge clk); hw_trig = '0;
    @(negedge clk); hw_trig = 4'b1000;
    @(negedge clk); hw_trig = '0;
    repeat (8) @(negedge clk);
    hw_trig = 4'b0001; @(negedge clk); hw_trig = '0;
    tdc_n = '{0, t, 0, t + 2};
    wait_block();
    check_block(t, 6, 20, 4'b1010, 4'b0000, tdc_n, "hw");
    check(last_cyc - first_cyc <= 2 * (got.size() - 1), "read-out keeps link rate");
    check(events == 1, "event count 1");
    got.delete(); last_cyc = -1;

    // 3) firmware threshold crossing on channel 3 with back-pressure
    rand_ready = 1;
    cfg.num_samples = 9'd33; cfg.pre_samples = 4'd15; cfg.trig_window = 4'd0; cfg.data_format = 4'd9;
    repeat (40) @(negedge clk);
    t = n + 2; spike_at = t; spike_ch = 3;
    repeat (6) @(negedge clk);
    tdc_n = '{0, 0, 0, t};
    wait_block();
    check_block(t, 15, 33, 4'b0000, 4'b1000, tdc_n, "fw");
    check(events == 2, "event count 2");
    got.delete(); last_cyc = -1; rand_ready = 0;

    // 4) no pre-trigger samples, stop afterwards
    cfg.num_samples = 9'd5; cfg.pre_samples = 4'd0; cfg.trig_window = 4'd2;
    repeat (5) @(negedge clk);
    t = n; hw_trig = 4'b0001; @(negedge clk); hw_trig = 4'b0010; @(negedge clk); hw_trig = '0;
    tdc_n = '{t, t + 1, 0, 0};
    wait_block();
    check_block(t, 0, 5, 4'b0011, 4'b0000, tdc_n, "pre0");
    got.delete(); last_cyc = -1;
    run = 0;
    repeat (5) @(negedge clk);
    hw_trig = 4'b0001; @(negedge clk); hw_trig = '0;
    repeat (200) @(posedge clk);
    check(got.size() == 0, "stopped: no event");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
