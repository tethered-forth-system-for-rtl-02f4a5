// tb_uart_rx: self-checking testbench for uart_rx. A line driver in the
// testbench sends random 8N1 frames, with a bit period a few percent off the
// nominal one and random idle gaps, plus frames with a low stop bit and
// short glitches on the idle line. Every good frame must come out once with
// its data, a bad frame must raise frame_err and give no byte, and a glitch
// must give nothing.
module tb_uart_rx;
  localparam int unsigned CPB = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       rxd = 1'b1;
  logic [7:0] out_data;
  logic       out_valid, frame_err;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .rxd, .out_data, .out_valid, .frame_err);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  byte exp_q[$];
  int  nerr = 0, nbytes = 0;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      nbytes++;
      if (exp_q.size() == 0) check(0, $sformatf("unexpected byte %h at %0t", out_data, $time));
      else check(out_data == exp_q.pop_front(), $sformatf("byte %h", out_data));
    end
    if (rst_n && frame_err) nerr++;
  end

  task automatic send(input byte b, input bit stop, input int cpb);
    rxd = 1'b0; repeat (cpb) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (cpb) @(posedge clk); end
    rxd = stop; repeat (cpb) @(posedge clk);
    rxd = 1'b1; repeat (cpb) @(posedge clk);
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte b;
    int  good;
    good = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    for (int n = 0; n < 60; n++) begin
      b = 8'($urandom);
      if (n % 10 == 7) begin
        send(b, 1'b0, CPB);            // framing error
      end else if (n % 10 == 3) begin
        rxd = 1'b0; repeat (3) @(posedge clk); rxd = 1'b1;   // glitch
        repeat (2 * CPB) @(posedge clk);
      end else begin
        exp_q.push_back(b); good++;
        send(b, 1'b1, (n % 2 == 1) ? CPB + 1 : CPB - 1);
      end
      repeat ($urandom_range(5)) @(posedge clk);
    end
    repeat (3 * CPB) @(posedge clk);
    check(nbytes == good, $sformatf("bytes %0d expected %0d", nbytes, good));
    check(exp_q.size() == 0, "all bytes received");
    check(nerr == 6, $sformatf("framing errors %0d expected 6", nerr));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
