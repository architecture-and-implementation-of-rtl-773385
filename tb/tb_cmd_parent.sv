// tb_cmd_parent: checks the parent side of the command protocol.
//
// Four model children sit on the SPI bus (shared MISO, pulled up when no
// child drives it). Each model follows a script: a normal child echoes the
// first command word and puts its reply header up after a given number of
// reads, then the payload; a busy child answers the payload with an
// unrelated word; a dead slot never drives MISO; a silent child never
// replies; an "unknown" child replies CMD_STDCMD_UNKNOWN. Checked: the write
// status codes (0 ok, 1 busy, 2 dead), the reply, the number of reads before
// giving up (RETRIES + 1), the sleep before the first read, and broadcast
// handling (every slot written, replies gathered from the accepting ones,
// success mask as payload).
module tb_cmd_parent;
  import openpet_pkg::*;
  localparam int SLOTS = 4, HP = 4, SLEEP = 60, RETRIES = 5;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic       req_valid = 1'b0, req_ready, done;
  cmd_pkt_t   req = '0;
  wr_status_t status;
  logic [15:0] resp_cmd;
  logic [31:0] resp_payload;
  logic sclk, mosi, miso;
  logic [SLOTS-1:0] cs_n;

  cmd_parent #(.SLOTS(SLOTS), .SLOT_LSB(0), .HALF_PERIOD(HP),
               .RESPONSE_SLEEP(SLEEP), .RESPONSE_RETRIES(RETRIES)) dut (
    .clk, .rst, .req_valid, .req, .req_ready, .done, .status, .resp_cmd, .resp_payload,
    .sclk, .mosi, .cs_n, .miso
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

  // ---------------------------------------------------------- model children
  typedef enum int {NORMAL, BUSY, DEAD, SILENT, UNKNOWN} beh_t;
  beh_t        beh [SLOTS];
  int          delay [SLOTS];             // reads before the header is shown
  logic [31:0] s_tx [SLOTS], s_out [SLOTS], s_rx [SLOTS];
  int          phase [SLOTS], left [SLOTS], reads [SLOTS], writes [SLOTS];
  logic [15:0] s_cmd [SLOTS], s_dst [SLOTS];
  logic [31:0] s_pay [SLOTS];
  time         t_pay_end [SLOTS], t_first_read [SLOTS];

  logic [SLOTS-1:0] drive, bitv;
  always_comb for (int s = 0; s < SLOTS; s++) begin
    drive[s] = !cs_n[s] && beh[s] != DEAD;
    bitv[s]  = s_out[s][31];
  end
  assign miso = &(~drive | bitv);

  for (genvar s = 0; s < SLOTS; s++) begin : g_child
    always @(negedge cs_n[s]) begin s_out[s] = s_tx[s]; s_rx[s] = '0; end
    always @(posedge sclk) if (!cs_n[s]) s_rx[s] = {s_rx[s][30:0], mosi};
    always @(negedge sclk) if (!cs_n[s]) s_out[s] = {s_out[s][30:0], 1'b1};
    always @(posedge cs_n[s]) begin
      logic [31:0] w;
      w = s_rx[s];
      if (phase[s] == 0 && w != 0) begin
        s_cmd[s] = w[31:16]; s_dst[s] = w[15:0]; writes[s]++;
        s_tx[s] = (beh[s] == BUSY) ? 32'h0BAD_0BAD : w;
        phase[s] = 1;
      end else if (phase[s] == 1) begin
        s_pay[s] = w; phase[s] = 2; left[s] = delay[s]; t_pay_end[s] = $time;
        if (beh[s] == BUSY) phase[s] = 0;
      end else if (phase[s] == 2 && w == 0) begin
        if (reads[s] == 0) t_first_read[s] = $time;
        reads[s]++;
        if (beh[s] != SILENT) begin
          if (left[s] > 0) left[s]--;
          if (left[s] == 0) begin
            s_tx[s] = {(beh[s] == UNKNOWN) ? CMD_STDCMD_UNKNOWN : (s_cmd[s] ^ 16'h8000), s_dst[s]};
            phase[s] = 3;
          end
        end
      end else if (phase[s] == 3 && w == 0) begin
        reads[s]++;
        s_tx[s] = s_pay[s] + 32'(s);
        phase[s] = (beh[s] == UNKNOWN) ? 0 : 4;
      end else if (phase[s] == 4 && w == 0) begin
        reads[s]++;
        phase[s] = 0;
      end
    end
  end

  task automatic reset_models();
    for (int s = 0; s < SLOTS; s++) begin
      s_tx[s] = 32'hFFFF_FFFF; s_out[s] = '1; s_rx[s] = '0; phase[s] = 0; left[s] = 0;
      reads[s] = 0; writes[s] = 0; t_pay_end[s] = 0; t_first_read[s] = 0;
    end
  endtask

  task automatic command(input logic [15:0] c, input logic [15:0] d, input logic [31:0] p);
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    req = '{cmd: c, src: 16'h4000, dst: d, payload: p};
    req_valid = 1'b1;
    @(negedge clk) req_valid = 1'b0;
    while (!done) @(negedge clk);
  endtask

  initial begin
    for (int s = 0; s < SLOTS; s++) begin beh[s] = NORMAL; delay[s] = 2; end
    reset_models();
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;

    // 1) unicast to a normal child that answers on its third read
    delay[1] = 3;
    command(16'h0011, 16'h0001, 32'h100);
    check(status == WR_OK && resp_cmd == 16'h8011 && resp_payload == 32'h101,
          $sformatf("unicast reply %0d %h %h", status, resp_cmd, resp_payload));
    check(reads[1] == 5, $sformatf("three polls, header read and payload read: %0d", reads[1]));
    check(t_first_read[1] - t_pay_end[1] >= SLEEP * 10, "sleep before the first read");
    check(writes[0] == 0 && writes[2] == 0 && writes[3] == 0, "only slot 1 written");

    // 2) dead slot
    reset_models(); beh[3] = DEAD;
    command(16'h0011, 16'h0003, 32'h0);
    check(status == WR_DEAD, $sformatf("dead slot status %0d", status));

    // 3) busy child
    reset_models(); beh[2] = BUSY;
    command(16'h0011, 16'h0002, 32'h0);
    check(status == WR_BUSY, $sformatf("busy child status %0d", status));

    // 4) unknown command
    reset_models(); beh[0] = UNKNOWN; delay[0] = 1;
    command(16'h0077, 16'h0000, 32'h0);
    check(status == WR_OK && resp_cmd == CMD_STDCMD_UNKNOWN, $sformatf("unknown reply %h", resp_cmd));

    // 5) silent child: give up after RETRIES + 1 reads
    reset_models(); beh[1] = SILENT;
    command(16'h0011, 16'h0001, 32'h0);
    check(resp_cmd == CMD_STDCMD_TIMEDOUT, $sformatf("silent child gives TIMEDOUT %h", resp_cmd));
    check(reads[1] == RETRIES + 1, $sformatf("reads before giving up %0d", reads[1]));

    // 6) broadcast: slots 0 and 1 normal, 2 busy, 3 dead
    reset_models();
    beh[0] = NORMAL; beh[1] = NORMAL; beh[2] = BUSY; beh[3] = DEAD; delay[0] = 1; delay[1] = 2;
    command(16'h0012, 16'h8000, 32'h55);
    check(status == WR_OK && resp_cmd == 16'h8012 && resp_payload == 32'h3,
          $sformatf("broadcast reply %0d %h %h", status, resp_cmd, resp_payload));
    check(writes[0] == 1 && writes[1] == 1 && writes[2] == 1, "every slot written");
    check(reads[2] == 0, "busy slot not polled");

    // 7) broadcast where one accepting child stays silent
    reset_models();
    beh[0] = NORMAL; beh[1] = SILENT; beh[2] = NORMAL; beh[3] = DEAD;
    command(16'h0012, 16'h8000, 32'h66);
    check(resp_cmd == CMD_STDCMD_TIMEDOUT && resp_payload == 32'h5,
          $sformatf("broadcast with silent child %h %h", resp_cmd, resp_payload));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
