// tb_link_tx: self-checking testbench for link_tx. Random messages with 0, 1
// and 2 payload bytes are offered at random times while the byte consumer
// accepts at random; the bytes that come out are compared with the record
// each message should produce (code, then payload high byte first), and
// msg_ready must be low while a record is being sent.
module tb_link_tx;
  import forth_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  msg_t       msg;
  logic       msg_valid = 1'b0, msg_ready;
  logic [7:0] out_data;
  logic       out_valid, out_ready;
  logic       rdy_en = 1'b1;
  assign out_ready = rdy_en;
  always @(negedge clk) rdy_en <= ($urandom_range(2) == 0);

  link_tx dut (.clk, .rst_n, .msg, .msg_valid, .msg_ready, .out_data, .out_valid, .out_ready);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  byte exp_q[$];
  int  nout = 0;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    nout++;
    if (exp_q.size() == 0) check(0, "unexpected byte");
    else check(out_data == exp_q.pop_front(), $sformatf("byte %h", out_data));
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total = 0;
    msg = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 100; n++) begin
      @(negedge clk);
      msg.code   = rsp_code_e'(8'($urandom_range(8'h81, 8'h86)));
      msg.nbytes = 2'($urandom_range(2));
      msg.arg    = 16'($urandom);
      msg_valid  = 1'b1;
      while (!msg_ready) @(negedge clk);
      exp_q.push_back(msg.code);
      if (msg.nbytes == 2'd2) exp_q.push_back(msg.arg[15:8]);
      if (msg.nbytes != 2'd0) exp_q.push_back(msg.arg[7:0]);
      total += 1 + msg.nbytes;
      @(negedge clk);
      msg_valid = 1'b0;
      check(!msg_ready, "msg_ready low while sending");
      repeat ($urandom_range(4)) @(negedge clk);
    end
    repeat (50) @(negedge clk);
    check(nout == total && exp_q.size() == 0, $sformatf("bytes %0d expected %0d", nout, total));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
