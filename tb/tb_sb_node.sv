// tb_sb_node: checks a Support Board used as the uppermost unit controller.
//
// Eight child slots are modelled by the testbench. On the data side each
// child sends blocks over its 16-bit link (Slice high for two words per
// packet, low between blocks); on the command side slots 0-5 hold model
// children that echo a command, reply after one poll and return
// payload + slot, and slots 6-7 are empty. Checked on the uplink: every
// block arrives whole and in order per child, blocks never interleave, and
// delivered + dropped (the board's own count) equals sent, with the uplink
// throttled at random; commands: a local PING returns the drop count, a
// unicast command reaches the addressed slot only, an empty slot gives
// CMD_STDCMD_TIMEDOUT with write status 2 (dead), and a broadcast returns
// the mask of the slots that answered.
module tb_sb_node;
  import openpet_pkg::*;
  localparam int SLOTS = 8, HP = 4, SLEEP = 40, RETRIES = 4;
  logic clk = 1'b0, pll_locked = 1'b0;
  always #5 clk = ~clk;

  logic [SLOTS-1:0][15:0] child_data = '0;
  logic [SLOTS-1:0]       child_slice = '0;
  logic child_sclk, child_mosi, child_miso, out_slice, out_en = 1'b1;
  logic [SLOTS-1:0] child_cs_n;
  logic [15:0] out_data, dropped, host_resp_cmd;
  logic host_valid = 1'b0, host_ready, host_resp_valid;
  cmd_pkt_t host_cmd = '0;
  logic [31:0] host_resp_payload;

  sb_node #(.SLOTS(SLOTS), .SLOT_LSB(0), .LOCAL_BIT(9), .UPPERMOST(1'b1), .FIFO_DEPTH(64),
            .HALF_PERIOD(HP), .RESPONSE_SLEEP(SLEEP), .RESPONSE_RETRIES(RETRIES)) dut (
    .clk, .pll_locked, .child_data, .child_slice, .child_sclk, .child_mosi, .child_cs_n,
    .child_miso, .out_en, .out_data, .out_slice,
    .sclk(1'b0), .mosi(1'b0), .cs_n(1'b1), .miso(), .miso_oe(),
    .host_valid, .host_cmd, .host_ready, .host_resp_valid, .host_resp_cmd, .host_resp_payload,
    .dropped
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------- model children
  localparam int PRESENT = 6;
  logic [31:0] s_tx [SLOTS], s_out [SLOTS], s_rx [SLOTS], s_pay [SLOTS];
  int          phase [SLOTS], writes [SLOTS];
  logic [15:0] s_cmd [SLOTS], s_dst [SLOTS];
  logic [SLOTS-1:0] drive, bitv;
  always_comb for (int s = 0; s < SLOTS; s++) begin
    drive[s] = !child_cs_n[s] && s < PRESENT;
    bitv[s]  = s_out[s][31];
  end
  assign child_miso = &(~drive | bitv);
  for (genvar s = 0; s < SLOTS; s++) begin : g_child
    initial begin s_tx[s] = '1; s_out[s] = '1; s_rx[s] = '0; phase[s] = 0; writes[s] = 0; end
    always @(negedge child_cs_n[s]) begin s_out[s] = s_tx[s]; s_rx[s] = '0; end
    always @(posedge child_sclk) if (!child_cs_n[s]) s_rx[s] = {s_rx[s][30:0], child_mosi};
    always @(negedge child_sclk) if (!child_cs_n[s]) s_out[s] = {s_out[s][30:0], 1'b1};
    always @(posedge child_cs_n[s]) begin
      logic [31:0] w;
      w = s_rx[s];
      unique case (phase[s])
        0: if (w != 0) begin s_cmd[s] = w[31:16]; s_dst[s] = w[15:0]; s_tx[s] = w; phase[s] = 1; end
        1: begin s_pay[s] = w; phase[s] = 2; writes[s]++; end
        2: if (w == 0) begin s_tx[s] = {s_cmd[s] ^ 16'h8000, s_dst[s]}; phase[s] = 3; end
        3: if (w == 0) begin s_tx[s] = s_pay[s] + 32'(s); phase[s] = 4; end
        default: if (w == 0) phase[s] = 0;
      endcase
    end
  end

  // -------------------------------------------------------------- data side
  // packet = {slot[3:0], block[11:0], index[7:0], length[7:0]}
  int sent [SLOTS], delivered [SLOTS], next_blk [SLOTS];
  task automatic link_block(input int s, input int len);
    for (int i = 0; i < len; i++) begin
      logic [31:0] p;
      p = {4'(s), 12'(sent[s]), 8'(i), 8'(len)};
      @(negedge clk) child_slice[s] = 1'b1; child_data[s] = p[31:16];
      @(negedge clk) child_data[s] = p[15:0];
    end
    @(negedge clk) child_slice[s] = 1'b0; child_data[s] = '0;
    sent[s]++;
  endtask

  // uplink decoder
  int half = 0, cur = -1, cur_blk = 0, cur_idx = 0;
  logic [15:0] hi;
  always @(posedge clk) begin
    if (pll_locked && out_slice) begin
      if (half == 0) begin hi = out_data; half = 1; end
      else begin
        logic [31:0] p; int s, b, i, l;
        p = {hi, out_data}; half = 0;
        s = int'(p[31:28]); b = int'(p[27:16]); i = int'(p[15:8]); l = int'(p[7:0]);
        if (cur < 0) begin
          check(i == 0 && s < SLOTS && b >= next_blk[s], $sformatf("block start %h", p));
          cur = s; cur_blk = b; cur_idx = 0;
        end else begin
          check(s == cur && b == cur_blk && i == cur_idx + 1, $sformatf("no interleaving: %h", p));
          cur_idx = i;
        end
        if (i == l - 1) begin delivered[s]++; next_blk[s] = b + 1; cur = -1; end
      end
    end
  end

  task automatic host(input logic [15:0] c, input logic [15:0] d, input logic [31:0] p,
                      output logic [15:0] rc, output logic [31:0] rp);
    @(negedge clk);
    while (!host_ready) @(negedge clk);
    host_cmd = '{cmd: c, src: 16'h4000, dst: d, payload: p};
    host_valid = 1'b1;
    @(negedge clk) host_valid = 1'b0;
    while (!host_resp_valid) @(negedge clk);
    rc = host_resp_cmd; rp = host_resp_payload;
  endtask

  initial begin
    logic [15:0] rc; logic [31:0] rp; int tot_s, tot_d;
    repeat (5) @(posedge clk);
    pll_locked = 1'b1;
    repeat (40) @(posedge clk);

    // commands
    host({1'b0, CMD_PING}, 16'h0200, 32'h0, rc, rp);
    check(rc == {1'b1, CMD_PING} && rp == 32'(dropped), $sformatf("local ping %h %h", rc, rp));
    host(16'h0011, 16'h0002, 32'h100, rc, rp);
    check(rc == 16'h8011 && rp == 32'h102, $sformatf("unicast to slot 2 %h %h", rc, rp));
    check(writes[2] == 1 && writes[1] == 0 && writes[3] == 0, "only slot 2 written");
    host(16'h0011, 16'h0006, 32'h0, rc, rp);
    check(rc == CMD_STDCMD_TIMEDOUT && rp == 32'(WR_DEAD), $sformatf("empty slot %h %h", rc, rp));
    host(16'h0012, 16'h8000, 32'h7, rc, rp);
    check(rc == 16'h8012 && rp == 32'h3F,
          $sformatf("broadcast: mask of answering slots %h %h", rc, rp));

    // data: every child sends blocks, the uplink is throttled part of the time
    fork
      for (int s = 0; s < SLOTS; s++) begin
        automatic int ss = s;
        fork
          for (int b = 0; b < 15; b++) begin
            link_block(ss, $urandom_range(1, 10));
            repeat ($urandom_range(2, 60)) @(negedge clk);
          end
        join_none
      end
      repeat (3000) begin @(negedge clk); out_en = ($urandom_range(0, 3) == 0); end
    join
    wait fork;
    out_en = 1'b1;
    repeat (3000) @(posedge clk);
    tot_s = 0; tot_d = 0;
    for (int s = 0; s < SLOTS; s++) begin tot_s += sent[s]; tot_d += delivered[s]; end
    check(tot_d + int'(dropped) == tot_s,
          $sformatf("delivered %0d + dropped %0d == sent %0d", tot_d, dropped, tot_s));
    check(dropped > 0, "throttled uplink caused drops");
    check(tot_d > 8, "blocks delivered");
    host({1'b0, CMD_PING}, 16'h0200, 32'h0, rc, rp);
    check(rp == 32'(dropped), $sformatf("ping reports drops %0d", rp));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
