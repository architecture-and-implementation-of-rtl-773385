// tb_rr_mux: checks the round-robin block multiplexer.
//
// Packets carry their source and block number, so the checker needs no
// knowledge of the arbiter: each output block must be a whole block of one
// input, blocks of one input must come out in order (skipping only dropped
// ones), delivered + dropped must equal sent, blocks must never interleave,
// and a block leaves at one packet per clock while out_ready is high.
// Directed parts: with every input holding blocks, the service order is
// strictly cyclic; an input flooded while the output is stalled drops whole
// blocks.
module tb_rr_mux;
  localparam int N = 4, DEPTH = 32;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic [N-1:0]       in_valid = '0, in_last = '0;
  logic [N-1:0][31:0] in_data = '0;
  logic               out_ready = 1'b1, out_valid, out_last;
  logic [31:0]        out_data;
  logic [N-1:0]       drops;

  rr_mux #(.N(N), .DEPTH(DEPTH)) dut (.clk, .rst, .in_valid, .in_data, .in_last,
                                      .out_ready, .out_valid, .out_data, .out_last, .drops);

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

  // packet = {src[3:0], block[11:0], index[7:0], length[7:0]}
  function automatic logic [31:0] pkt(int s, int b, int i, int len);
    return {4'(s), 12'(b), 8'(i), 8'(len)};
  endfunction

  int sent [N], delivered [N], dropped [N], next_blk [N];
  int order [$];
  bit rand_ready = 0;

  // output checker
  int cur_src = -1, cur_blk, cur_idx, cur_len, stall = 0;
  always @(posedge clk) begin
    for (int i = 0; i < N; i++) if (drops[i]) dropped[i]++;
    if (out_valid && out_ready) begin
      int s, b, i, l;
      s = int'(out_data[31:28]); b = int'(out_data[27:16]); i = int'(out_data[15:8]); l = int'(out_data[7:0]);
      if (cur_src < 0) begin
        check(i == 0, $sformatf("block starts with packet 0 (src %0d blk %0d idx %0d)", s, b, i));
        check(b >= next_blk[s], $sformatf("in-order blocks of input %0d: %0d >= %0d", s, b, next_blk[s]));
        cur_src = s; cur_blk = b; cur_idx = 0; cur_len = l;
      end else begin
        check(s == cur_src && b == cur_blk && i == cur_idx + 1,
              $sformatf("no interleaving: %0d/%0d/%0d after %0d/%0d/%0d", s, b, i, cur_src, cur_blk, cur_idx));
        cur_idx = i;
      end
      check(out_last == (i == l - 1), "last flag on the final packet");
      if (out_last) begin
        next_blk[s] = b + 1; delivered[s]++; order.push_back(s); cur_src = -1;
      end
    end
    if (cur_src >= 0 && out_ready && !out_valid) stall++;
  end
  always @(negedge clk) out_ready <= rand_ready ? ($urandom_range(0, 3) != 0) : 1'b1;

  task automatic send(input int s, input int len);
    for (int i = 0; i < len; i++) begin
      @(negedge clk);
      in_valid[s] = 1'b1; in_data[s] = pkt(s, sent[s], i, len); in_last[s] = (i == len - 1);
    end
    @(negedge clk) in_valid[s] = 1'b0; in_last[s] = 1'b0;
    sent[s]++;
  endtask

  initial begin
    int tot_s, tot_d, d0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;

    // 1) all inputs busy with random back-pressure
    rand_ready = 1;
    fork
      for (int b = 0; b < 40; b++) begin send(0, $urandom_range(1, 8)); repeat ($urandom_range(0, 20)) @(negedge clk); end
      for (int b = 0; b < 40; b++) begin send(1, $urandom_range(1, 8)); repeat ($urandom_range(0, 20)) @(negedge clk); end
      for (int b = 0; b < 40; b++) begin send(2, $urandom_range(1, 8)); repeat ($urandom_range(0, 20)) @(negedge clk); end
      for (int b = 0; b < 40; b++) begin send(3, $urandom_range(1, 8)); repeat ($urandom_range(0, 20)) @(negedge clk); end
    join
    rand_ready = 0;
    repeat (300) @(posedge clk);
    for (int i = 0; i < N; i++)
      check(delivered[i] + dropped[i] == sent[i],
            $sformatf("input %0d: delivered %0d + dropped %0d == sent %0d", i, delivered[i], dropped[i], sent[i]));
    check(stall == 0, $sformatf("no pause inside a block (%0d)", stall));

    // 2) cyclic order: stall output, give every input two blocks, release
    @(negedge clk) rand_ready = 0; out_ready = 1'b0;
    #1 force out_ready = 1'b0;
    for (int r = 0; r < 2; r++) for (int s = 0; s < N; s++) send(s, 3);
    order.delete();
    repeat (5) @(posedge clk);
    release out_ready;
    repeat (100) @(posedge clk);
    check(order.size() == 2 * N, $sformatf("8 blocks out, got %0d", order.size()));
    for (int k = 1; k < order.size(); k++)
      check(order[k] == (order[k-1] + 1) % N, $sformatf("round-robin order at %0d: %0d after %0d", k, order[k], order[k-1]));

    // 3) overflow: output stalled, input 2 flooded with 6-packet blocks
    #1 force out_ready = 1'b0;
    d0 = dropped[2];
    for (int b = 0; b < 10; b++) send(2, 6);
    repeat (5) @(posedge clk);
    check(dropped[2] > d0, $sformatf("blocks dropped when full: %0d", dropped[2]));
    check(dropped[2] - d0 == 10 - DEPTH / 6, $sformatf("drop count %0d, expected %0d", dropped[2] - d0, 10 - DEPTH / 6));
    release out_ready;
    repeat (200) @(posedge clk);
    tot_s = 0; tot_d = 0;
    for (int i = 0; i < N; i++) begin
      tot_s += sent[i]; tot_d += delivered[i] + dropped[i];
    end
    check(tot_s == tot_d, $sformatf("conservation: %0d sent, %0d accounted", tot_s, tot_d));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
