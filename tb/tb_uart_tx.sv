// tb_uart_tx: self-checking testbench for uart_tx. Random bytes are sent,
// sometimes back to back; an independent line sampler in the testbench finds
// each start edge, samples every bit in its middle and checks the data, the
// stop bit, the frame length (10 bit periods, measured from the start edge
// to the next time in_ready is high) and that the line idles high.
module tb_uart_tx;
  localparam int unsigned CPB = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [7:0] in_data = '0;
  logic       in_valid = 1'b0, in_ready, txd;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .in_data, .in_valid, .in_ready, .txd);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  byte sent[$];
  int  nrx = 0;

  // line sampler
  initial begin
    byte b, e;
    forever begin
      @(negedge txd);
      repeat (CPB / 2) @(posedge clk);
      check(txd == 1'b0, "start bit");
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        b[i] = txd;
      end
      repeat (CPB) @(posedge clk);
      check(txd == 1'b1, "stop bit");
      e = sent.pop_front();
      check(b == e, $sformatf("data %h expected %h", b, e));
      nrx++;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    check(txd == 1'b1 && in_ready, "idle after reset");
    for (int n = 0; n < 40; n++) begin
      @(negedge clk);
      in_data = 8'($urandom); in_valid = 1'b1;
      sent.push_back(in_data);
      @(posedge clk); t0 = 0;
      #1 in_valid = 1'b0;
      check(!in_ready, "busy during frame");
      while (!in_ready) begin @(posedge clk); t0++; #1; end
      check(t0 == 10 * CPB, $sformatf("frame length %0d", t0));
      if (n % 3 == 0) repeat ($urandom_range(30)) @(posedge clk);
    end
    repeat (2 * CPB) @(posedge clk);
    check(nrx == 40, $sformatf("received %0d frames", nrx));
    check(txd == 1'b1, "line idles high");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
