// tb_link_rx: self-checking testbench for link_rx. Random records of all
// four commands are fed byte by byte with random spacing and a randomly
// slow consumer; each decoded command is compared with the record sent.
// Also checked: a byte that is no command code is dropped; a record broken
// off for more than GAP_CYCLES is discarded and the next record decodes
// cleanly; a byte that arrives while a command is still held is dropped.
module tb_link_rx;
  import forth_pkg::*;
  localparam int unsigned GAP = 40;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [7:0] in_data = '0;
  logic       in_valid = 1'b0;
  cmd_t       cmd;
  logic       cmd_valid, cmd_ready, dropped;
  logic       cons_en = 1'b1;
  assign cmd_ready = cons_en;

  link_rx #(.GAP_CYCLES(GAP)) dut (.clk, .rst_n, .in_data, .in_valid, .cmd, .cmd_valid,
                                   .cmd_ready, .dropped);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  cmd_t exp_q[$];
  int   ndrop = 0, ncmd = 0;
  always @(posedge clk) if (rst_n) begin
    if (dropped) ndrop++;
    if (cmd_valid && cmd_ready) begin
      ncmd++;
      if (exp_q.size() == 0) check(0, "unexpected command");
      else check(cmd == exp_q.pop_front(), $sformatf("command %h", cmd));
    end
  end

  task automatic byte_in(input logic [7:0] b, input int space);
    @(negedge clk); in_data = b; in_valid = 1'b1;
    @(negedge clk); in_valid = 1'b0;
    repeat (space) @(negedge clk);
  endtask

  task automatic record(input cmd_t c, input bit expect_it = 1'b1);
    if (expect_it) exp_q.push_back(c);
    byte_in(c.code, $urandom_range(8));
    if (c.code != CMD_RESUME) begin
      byte_in(c.addr[15:8], $urandom_range(8));
      byte_in(c.addr[7:0], $urandom_range(8));
    end
    if (c.code == CMD_WRITE) begin
      byte_in(c.data[15:8], $urandom_range(8));
      byte_in(c.data[7:0], $urandom_range(8));
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cmd_t c;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 50; n++) begin
      c.code = cmd_code_e'(8'($urandom_range(1, 4)));
      c.addr = (c.code == CMD_RESUME) ? '0 : 16'($urandom);
      c.data = (c.code == CMD_WRITE) ? 16'($urandom) : '0;
      record(c);
      repeat (4) @(negedge clk);
    end
    check(ncmd == 50 && exp_q.size() == 0, $sformatf("decoded %0d of 50", ncmd));

    // a byte that is not a command code
    ndrop = 0;
    byte_in(8'h55, 3);
    check(ndrop == 1 && !cmd_valid, "unknown code dropped");

    // broken record, then gap timeout
    ndrop = 0;
    byte_in(CMD_WRITE, 2); byte_in(8'h12, 2);
    repeat (GAP + 5) @(negedge clk);
    check(ndrop == 1, "partial record dropped after the gap");
    c = '{code: CMD_READ, addr: 16'hBEEF, data: '0};
    record(c);
    repeat (4) @(negedge clk);
    check(exp_q.size() == 0, "record after timeout decoded");

    // held command: next byte is dropped, command stays
    cons_en = 1'b0; ndrop = 0;
    c = '{code: CMD_EXEC, addr: 16'h0400, data: '0};
    record(c);
    byte_in(CMD_RESUME, 2);
    check(cmd_valid && cmd == c && ndrop == 1, "command held, extra byte dropped");
    cons_en = 1'b1;
    repeat (3) @(negedge clk);
    check(!cmd_valid && exp_q.size() == 0, "held command consumed once");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
