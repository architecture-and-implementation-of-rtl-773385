// tb_openpet_body.svh: end-to-end test body shared by the system testbenches.
//
// The including module defines the localparams NUM_DU, NUM_DB, CH, ADC_W,
// SLEEP, RETRIES, N_BURSTS and instantiates openpet_top as "dut" between
// the two halves of this file (TB_OPENPET_DECLS, then TB_OPENPET_RUN).
//
// What it does: after the PLLs lock, the host configures every Detector
// Board with broadcast commands (trigger mask, firmware threshold, Scope
// mode, settings, run), then sends single commands that reach a board, a
// detector unit controller, an empty slot and an empty unit, including a
// non-blocking command followed at once by a command that finds the unit
// busy. It then fires comparator pulses on many boards at once while the USB
// side reads slower than the data arrive, and parses the 16-bit USB stream
// back into blocks. Every block is checked: header fields, channel order,
// samples forming the ADC ramp of the right channel and the same window for
// all channels. Delivered plus dropped blocks must equal the events the
// boards sent. Every mechanism listed in the summary must have happened.

`ifndef TB_OPENPET_DECLS_DONE
`define TB_OPENPET_DECLS_DONE
  import openpet_pkg::*;

  logic clk = 1'b0, usb_clk = 1'b0;
  always #6 clk = ~clk;            // main clock
  always #17 usb_clk = ~usb_clk;   // slower USB interface clock

  logic pll_locked = 1'b0, div16 = 1'b0;
  logic host_valid = 1'b0, host_ready, host_resp_valid;
  cmd_pkt_t host_cmd;
  logic [15:0] host_resp_cmd;
  logic [31:0] host_resp_payload;
  logic [NUM_DU-1:0][NUM_DB-1:0][CH-1:0][ADC_W/2-1:0] adc_pins;
  logic [NUM_DU-1:0][NUM_DB-1:0][CH-1:0]              hw_trig;
  logic [NUM_DU-1:0][NUM_DB-1:0][CH-1:0][19:0]        tdc;
  logic [15:0] usb_data;
  logic usb_valid, usb_ready;
  logic slice, slice_start, startup;
  logic [NUM_DU-1:0][NUM_DB-1:0][15:0] db_events;
  logic [NUM_DU-1:0][15:0] dropped_du;
  logic [15:0] dropped_cu;
`else
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // mechanisms seen
  int m_bcast = 0, m_unicast = 0, m_unknown = 0, m_dead_db = 0, m_dead_du = 0;
  int m_local = 0, m_nonblock = 0, m_busy = 0, m_hw = 0, m_fw = 0, m_rr = 0;
  int m_drop = 0, m_backpressure = 0, m_startup = 0;

  // ---------------------------------------------------------- ADC drive
  // value of channel c of board (u,b) in clock n: a ramp with its own offset
  function automatic int base(int u, int b, int c);
    return (u * 977 + b * 131 + c * 37) % 4096;
  endfunction
  int n = 0;
  always @(posedge clk) n <= n + 1;
  always @(negedge clk) begin     // bits for the rising-edge capture
    for (int u = 0; u < NUM_DU; u++)
      for (int b = 0; b < NUM_DB; b++)
        for (int c = 0; c < CH; c++) begin
          logic [11:0] v;
          v = 12'((n * 7 + base(u, b, c)) % 4096);
          for (int i = 0; i < ADC_W / 2; i++) adc_pins[u][b][c][i] <= v[2*i+1];
        end
  end
  always @(posedge clk) begin     // bits for the falling-edge capture
    for (int u = 0; u < NUM_DU; u++)
      for (int b = 0; b < NUM_DB; b++)
        for (int c = 0; c < CH; c++) begin
          logic [11:0] v;
          v = 12'((n * 7 + base(u, b, c)) % 4096);
          for (int i = 0; i < ADC_W / 2; i++) adc_pins[u][b][c][i] <= v[2*i];
        end
  end
  initial begin
    hw_trig = '0;
    tdc = '0;
  end

  // ------------------------------------------------------------ host side
  task automatic host(input logic [14:0] id, input bit cr, input addr_t dst,
                      input logic [31:0] payload,
                      output logic [15:0] rcmd, output logic [31:0] rpay);
    int w = 0;
    @(negedge clk);
    while (!host_ready) @(negedge clk);
    host_cmd.cmd.cr = cr; host_cmd.cmd.id = id;
    host_cmd.src = '0; host_cmd.src.host_pc = 1'b1;
    host_cmd.dst = dst; host_cmd.payload = payload;
    host_valid = 1'b1;
    @(negedge clk);
    host_valid = 1'b0;
    while (!host_resp_valid && w < 40_000_000) begin @(negedge clk); w++; end
    rcmd = host_resp_cmd; rpay = host_resp_payload;
  endtask

  function automatic addr_t db_dst(int u, int b);
    addr_t a = '0;
    a.du = 3'(u); a.db = 3'(b);
    return a;
  endfunction
  function automatic addr_t bc_dst();
    addr_t a = '0;
    a.broadcast = 1'b1;
    return a;
  endfunction
  function automatic logic [31:0] mask_of(int k);
    return 32'((64'd1 << k) - 1);
  endfunction

  // ---------------------------------------------------------- USB side
  logic [15:0] words [$];
  int last_src = -1;
  always @(posedge usb_clk) begin
    usb_ready <= ($urandom_range(0, 3) != 0);
    // outputs are only meaningful once the PLLs have locked and reset has run
    if (pll_locked && usb_valid && usb_ready) words.push_back(usb_data);
  end
  always @(posedge clk) begin
    if (dut.fifo_afull) m_backpressure++;
    if (pll_locked && startup) m_startup++;
  end

  int blocks_ok = 0;
  task automatic parse_stream();
    int i = 0;
    while (i + 1 < words.size()) begin
      logic [31:0] p;
      db_hdr_t dh;
      int s0 [CH];
      int src, nsm;
      p = {words[i], words[i+1]};
      dh = p;
      check(dh.pid == PID_DB_HDR, $sformatf("block header id %h at word %0d", p, i));
      if (dh.pid != PID_DB_HDR) return;
      check(dh.num_ch_hdr == 6'(CH) && dh.mb_addr < NUM_DU && dh.db_addr < NUM_DB &&
            dh.data_format == 5'd1, $sformatf("db header fields %h", p));
      src = dh.mb_addr * 8 + dh.db_addr;
      if (last_src >= 0 && src != last_src) m_rr++;
      last_src = src;
      i += 2;
      nsm = 8;
      for (int c = 0; c < CH; c++) begin
        ch_hdr_t chh;
        chh = {words[i], words[i+1]};
        i += 2;
        check(chh.pid == PID_CH_HDR && chh.ch_addr == 6'(c), $sformatf("channel header %h", chh));
        if (chh.hw_hit) m_hw++;
        if (chh.fw_hit) m_fw++;
        for (int k = 0; k < nsm; k++) begin
          logic [31:0] sp;
          int v, e;
          sp = {words[i], words[i+1]};
          i += 2;
          v = int'(sp[11:0]);
          if (k == 0) s0[c] = (v - base(int'(dh.mb_addr), int'(dh.db_addr), c) + 4096) % 4096;
          e = (s0[c] + base(int'(dh.mb_addr), int'(dh.db_addr), c) + 7 * k) % 4096;
          if (k == 0 || k == nsm - 1)
            check(sp[31:28] == PID_SAMPLE && v == e, $sformatf("sample %0d of ch %0d: %h", k, c, sp));
          else if (!(sp[31:28] == PID_SAMPLE && v == e)) check(0, "sample ramp");
        end
        if (c > 0) check(s0[c] == s0[0], "same window on all channels");
      end
      blocks_ok++;
    end
    check(i == words.size(), "stream ends on a block boundary");
  endtask

  // --------------------------------------------------------------- test
  initial begin : watchdog
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] rc; logic [31:0] rp;
    scope_cfg_t cfg;
    addr_t a;
    int sent, dropped;
    repeat (10) @(negedge clk);
    pll_locked = 1'b1;
    repeat (40) @(negedge clk);

    // broadcast configuration
    host(CMD_SET_TRIGGER_MASK, 0, bc_dst(), 32'hFFFF_FFFF, rc, rp);
    check(rc == {1'b1, CMD_SET_TRIGGER_MASK} && rp == mask_of(NUM_DU),
          $sformatf("broadcast mask reply %h %h", rc, rp));
    m_bcast++;
    host(CMD_SET_FW_THRESHOLD, 0, bc_dst(), 32'hFFF, rc, rp);
    check(rc == {1'b1, CMD_SET_FW_THRESHOLD}, "broadcast threshold");
    host(CMD_SET_SYS_DATA_MODE, 0, bc_dst(), 32'h1, rc, rp);
    check(rc == {1'b1, CMD_SET_SYS_DATA_MODE}, "broadcast mode");
    cfg = '0; cfg.data_format = 4'd1; cfg.num_samples = 9'd8; cfg.pre_samples = 4'd2;
    cfg.trig_window = 4'd3;
    host(CMD_SET_SYS_DATA_MODE_SETTINGS, 0, bc_dst(), cfg, rc, rp);
    check(rc == {1'b1, CMD_SET_SYS_DATA_MODE_SETTINGS}, "broadcast settings");

    // single commands
    host(CMD_PING, 0, db_dst(NUM_DU - 1, NUM_DB - 1), 32'h0, rc, rp);
    check(rc == {1'b1, CMD_PING} && rp == 32'h0, $sformatf("ping board %h %h", rc, rp));
    m_unicast++;
    host(15'h2A5, 0, db_dst(0, 0), 32'h1234, rc, rp);
    check(rc == CMD_STDCMD_UNKNOWN, $sformatf("unknown command %h", rc));
    m_unknown++;
    if (NUM_DB < 8) begin
      host(CMD_PING, 0, db_dst(0, 7), 32'h0, rc, rp);
      // the unit controller answers TIMEDOUT; the read flow passes only the code upward
      check(rc == CMD_STDCMD_TIMEDOUT, $sformatf("empty board slot %h %h", rc, rp));
      m_dead_db++;
    end
    if (NUM_DU < 8) begin
      host(CMD_PING, 0, db_dst(7, 0), 32'h0, rc, rp);
      check(rc == CMD_STDCMD_TIMEDOUT && rp == 32'(WR_DEAD), $sformatf("empty unit slot %h %h", rc, rp));
      m_dead_du++;
    end
    a = db_dst(0, 0); a.duc = 1'b1;
    host(CMD_PING, 0, a, 32'h0, rc, rp);
    check(rc == {1'b1, CMD_PING} && rp == 32'h0, $sformatf("unit controller ping %h %h", rc, rp));
    m_local++;
    // non-blocking command to a board, then the unit is still busy with it
    host(CMD_SET_FW_THRESHOLD, 1, db_dst(0, 1 % NUM_DB), 32'd4000, rc, rp);
    check(rc == {1'b0, CMD_SET_FW_THRESHOLD}, $sformatf("non-blocking ack %h", rc));
    m_nonblock++;
    host(CMD_PING, 0, db_dst(0, 0), 32'h0, rc, rp);
    check(rc == CMD_STDCMD_TIMEDOUT && rp == 32'(WR_BUSY), $sformatf("busy unit %h %h", rc, rp));
    m_busy++;
    repeat (2 * SLEEP + 20000) @(negedge clk);

    // run
    host(CMD_SET_SYS_DATA_MODE_ACTION, 0, bc_dst(), 32'h1, rc, rp);
    check(rc == {1'b1, CMD_SET_SYS_DATA_MODE_ACTION}, "broadcast run");
    for (int k = 0; k < N_BURSTS; k++) begin
      @(negedge clk);
      for (int u = 0; u < NUM_DU; u++)
        for (int b = 0; b < NUM_DB; b++)
          hw_trig[u][b][(k + b) % CH] = 1'b1;
      @(negedge clk);
      hw_trig = '0;
      repeat (40 + CH * 20) @(negedge clk);
    end
    // stop, let everything drain
    host(CMD_SET_SYS_DATA_MODE_ACTION, 0, bc_dst(), 32'h0, rc, rp);
    check(rc == {1'b1, CMD_SET_SYS_DATA_MODE_ACTION}, "broadcast stop");
    begin
      int quiet = 0, last = 0;
      while (quiet < 20000) begin
        @(negedge clk);
        if (words.size() != last) begin last = words.size(); quiet = 0; end
        else quiet++;
      end
    end
    parse_stream();
    sent = 0; dropped = dropped_cu;
    for (int u = 0; u < NUM_DU; u++) begin
      dropped += dropped_du[u];
      for (int b = 0; b < NUM_DB; b++) begin
        sent += db_events[u][b];
        check(db_events[u][b] >= 1, $sformatf("board %0d.%0d sent events", u, b));
      end
    end
    m_drop = dropped;
    check(blocks_ok + dropped == sent,
          $sformatf("blocks delivered %0d + dropped %0d == sent %0d", blocks_ok, dropped, sent));

    $display("mechanisms: broadcast=%0d unicast=%0d unknown=%0d dead_board=%0d dead_unit=%0d local=%0d",
             m_bcast, m_unicast, m_unknown, m_dead_db, m_dead_du, m_local);
    $display("            nonblocking=%0d busy=%0d hw_hit=%0d fw_hit=%0d rr_switch=%0d drop=%0d backpressure=%0d startup=%0d",
             m_nonblock, m_busy, m_hw, m_fw, m_rr, m_drop, m_backpressure, m_startup);
    $display("blocks delivered %0d, words %0d, sent %0d", blocks_ok, words.size(), sent);
    check(m_bcast > 0 && m_unicast > 0 && m_unknown > 0 && m_local > 0, "command mechanisms");
    check(m_nonblock > 0 && m_busy > 0, "non-blocking and busy");
    check(NUM_DB == 8 || m_dead_db > 0, "dead board");
    check(NUM_DU == 8 || m_dead_du > 0, "dead unit");
    check(m_hw > 0, "hardware trigger hits");
    check(m_fw > 0, "firmware trigger hits");
    check(m_rr > 0, "round-robin switching");
    check(!EXPECT_DROP || m_drop > 0, "overflow drop");
    check(m_backpressure > 0, "USB back-pressure");
    check(m_startup == 1, "one startup pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
`endif
