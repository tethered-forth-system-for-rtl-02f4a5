// tb_forth_monitor: self-checking testbench for forth_monitor.
//
// The testbench stands in for link_rx (commands), link_tx (a message sink
// that accepts at random), the CPU (busy, done, EMIT and EXEC_PC requests and
// a stream of memory writes) and the RAM (an array with one cycle of read
// latency). Checks: READ answers with the RAM word; WRITE changes the RAM
// and is answered with ACK; EXEC starts the CPU with the address and is
// answered with ACK, or with BUSY and no start while the CPU runs; RESUME
// pulses hcall_resume and sends nothing; CPU events become DONE, EMIT and
// HOST messages with their arguments; the CPU's memory accesses reach the
// RAM, and are held off exactly in the cycles when the monitor accesses
// memory (counted as stolen cycles, which must occur).
module tb_forth_monitor;
  import forth_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  cmd_t        cmd = '0;
  logic        cmd_valid = 1'b0, cmd_ready;
  msg_t        msg;
  logic        msg_valid, msg_ready;
  logic        start;
  addr_t       start_addr;
  logic        busy = 1'b0;
  logic        done_valid = 1'b0, done_ready;
  cpu_status_e done_status = ST_OK;
  logic        emit_valid = 1'b0, emit_ready;
  logic [7:0]  emit_char = '0;
  logic        hcall_valid = 1'b0, hcall_ready, hcall_resume;
  word_t       hcall_id = '0;
  mem_req_t    cpu_mem_req = '0, ram_req;
  logic        cpu_mem_gnt;
  word_t       ram_rdata = '0;

  forth_monitor dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // RAM model
  word_t mem [8192];
  always @(posedge clk) if (ram_req.req) begin
    if (ram_req.we) mem[13'(ram_req.addr)] <= ram_req.wdata;
    else            ram_rdata <= mem[13'(ram_req.addr)];
  end

  // message sink
  logic sink_en = 1'b1;
  always @(negedge clk) sink_en <= ($urandom_range(3) != 0);
  assign msg_ready = sink_en;
  msg_t got[$];
  always @(posedge clk) if (rst_n && msg_valid && msg_ready) got.push_back(msg);

  // start and resume pulses
  int    nstart = 0, nresume = 0;
  addr_t last_start;
  always @(posedge clk) if (rst_n) begin
    if (start) begin nstart++; last_start = start_addr; end
    if (hcall_resume) nresume++;
  end

  // CPU memory traffic: writes of a counter to 0x1000.. while cpu_run
  bit   cpu_run = 1'b0;
  int   cpu_writes = 0, stolen = 0;
  always @(posedge clk) if (rst_n) begin
    if (cpu_mem_req.req && !cpu_mem_gnt) stolen++;
    if (cpu_mem_req.req && cpu_mem_gnt) begin
      check(ram_req == cpu_mem_req, "CPU request reaches RAM");
      cpu_writes++;
    end
    if (!cpu_mem_gnt) check(ram_req.req && !(ram_req == cpu_mem_req && cpu_mem_req.req),
                            "monitor owns the bus when the CPU is held");
  end
  always @(negedge clk) begin
    if (cpu_run)
      cpu_mem_req <= '{req: 1'b1, we: 1'b1, addr: 16'h1000 + 16'(cpu_writes % 16),
                       wdata: 16'(cpu_writes)};
    else cpu_mem_req <= '0;
  end

  task automatic send_cmd(input cmd_code_e c, input addr_t a, input word_t d);
    @(negedge clk);
    cmd = '{code: c, addr: a, data: d}; cmd_valid = 1'b1;
    #1;
    while (!cmd_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    cmd_valid = 1'b0;
  endtask

  task automatic wait_msg(output msg_t m);
    int t = 0;
    while (got.size() == 0 && t < 1000) begin @(negedge clk); t++; end
    if (got.size() == 0) begin check(0, "no message"); m = '0; end
    else m = got.pop_front();
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    msg_t  m;
    word_t v;
    for (int i = 0; i < 8192; i++) mem[i] = 16'(i * 3);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // READ / WRITE, idle CPU
    for (int n = 0; n < 20; n++) begin
      addr_t a;
      a = 16'($urandom_range(0, 4095));
      v = 16'($urandom);
      send_cmd(CMD_WRITE, a, v);
      wait_msg(m);
      check(m.code == RSP_ACK && m.nbytes == 0, "WRITE answered with ACK");
      check(mem[13'(a)] == v, "WRITE reached RAM");
      send_cmd(CMD_READ, a, '0);
      wait_msg(m);
      check(m.code == RSP_DATA && m.nbytes == 2 && m.arg == v, $sformatf("READ %h", m.arg));
    end

    // EXEC while idle, then while busy
    send_cmd(CMD_EXEC, 16'h0321, '0);
    wait_msg(m);
    check(m.code == RSP_ACK && nstart == 1 && last_start == 16'h0321, "EXEC starts the CPU");
    busy = 1'b1;
    send_cmd(CMD_EXEC, 16'h0400, '0);
    wait_msg(m);
    check(m.code == RSP_BUSY && nstart == 1, "EXEC refused while busy");

    // memory access while the CPU uses the bus
    cpu_run = 1'b1;
    repeat (10) @(negedge clk);
    for (int n = 0; n < 10; n++) begin
      send_cmd(CMD_READ, 16'(n), '0);
      wait_msg(m);
      check(m.code == RSP_DATA && m.arg == mem[n], "READ while CPU runs");
    end
    cpu_run = 1'b0;
    check(stolen > 0, $sformatf("monitor took %0d bus cycles from the CPU", stolen));
    check(cpu_writes > 20, "CPU kept using the bus");

    // CPU events
    emit_char = 8'h41; emit_valid = 1'b1;
    #1;
    while (!emit_ready) begin @(negedge clk); #1; end
    @(negedge clk); emit_valid = 1'b0;
    wait_msg(m);
    check(m.code == RSP_EMIT && m.nbytes == 1 && m.arg[7:0] == 8'h41, "EMIT forwarded");

    hcall_id = 16'hCAFE; hcall_valid = 1'b1;
    #1;
    while (!hcall_ready) begin @(negedge clk); #1; end
    @(negedge clk); hcall_valid = 1'b0;
    wait_msg(m);
    check(m.code == RSP_HOST && m.nbytes == 2 && m.arg == 16'hCAFE, $sformatf("EXEC_PC forwarded %p", m));
    send_cmd(CMD_RESUME, '0, '0);
    repeat (20) @(negedge clk);
    check(nresume == 1 && got.size() == 0, "RESUME pulses resume and sends nothing");

    // two events at once: DONE goes first
    done_status = ST_BAD_OP; done_valid = 1'b1; emit_char = 8'h42; emit_valid = 1'b1;
    #1;
    while (!done_ready) begin @(negedge clk); #1; end
    check(!emit_ready, "DONE before EMIT");
    @(negedge clk); done_valid = 1'b0; busy = 1'b0;
    #1;
    while (!emit_ready) begin @(negedge clk); #1; end
    @(negedge clk); emit_valid = 1'b0;
    wait_msg(m);
    check(m.code == RSP_DONE && m.arg[7:0] == ST_BAD_OP, "DONE forwarded with status");
    wait_msg(m);
    check(m.code == RSP_EMIT && m.arg[7:0] == 8'h42, "EMIT after DONE");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
