// tb_ddio_rx: checks double-data-rate capture.
//
// A random word of 2*PINS bits is sent per clock period: the rising-edge
// half (odd bits) is driven around the rising edge and the falling-edge half
// (even bits) around the falling edge, each changing a quarter period away
// from the edge that samples it. Every word must come out whole one clock
// after its falling-edge half was sampled.
module tb_ddio_rx;
  localparam int PINS = 6;
  logic clk = 1'b0;
  logic [PINS-1:0] din = '0;
  logic [2*PINS-1:0] dout;

  ddio_rx #(.PINS(PINS)) dut (.clk, .din, .dout);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [2*PINS-1:0] words [0:299];
  initial begin
    for (int k = 0; k < 300; k++) words[k] = (2*PINS)'($urandom);
    for (int k = 0; k < 300; k++) begin
      for (int i = 0; i < PINS; i++) din[i] = words[k][2*i+1];
      #2 clk = 1'b1;                       // rising edge samples the high bits
      #3;
      for (int i = 0; i < PINS; i++) din[i] = words[k][2*i];
      #2 clk = 1'b0;                       // falling edge samples the low bits
      #3;
      // after the rising edge of period k, dout holds word k-1
      if (k >= 1) check(dout == words[k-1], $sformatf("word %0d: %h vs %h", k - 1, dout, words[k-1]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
