// tb_forth_target: end-to-end testbench of the target at its default
// parameters (50 MHz clock, 115200 baud, 8192-word RAM).
//
// The testbench is the host terminal: it drives and samples the UART lines
// at the bit level and speaks the record protocol. One session:
//  1. loads a small dictionary with WRITE records: the DUP and SWAP words
//     written with POPD/MOV/PUSHD, a main word that calls them, multiplies,
//     drives the LEDs, prints with EMIT and calls back into the host with
//     EXEC_PC, ROT (written with the return stack as scratch), a long
//     counting loop, and a word with an undefined opcode;
//  2. reads the dictionary back (the check a host makes when it resumes a
//     session);
//  3. runs the main word, answers its host call with RESUME and checks the
//     EMIT characters, the data stack contents and the LEDs; runs ROT;
//  4. starts the counting loop, is refused a second EXEC (BUSY), reads the
//     loop variable while the CPU runs (the monitor takes bus cycles from
//     the CPU), then disconnects: holds the line low (framing error),
//     sends a broken record and goes silent past the record gap timeout;
//  5. reconnects, verifies the dictionary is unchanged, waits for DONE and
//     checks the final loop count;
//  6. runs the word with the undefined opcode and expects status 1.
// Every mechanism (bus stall, BUSY refusal, host call, EMIT, framing error,
// dropped record, bad opcode, LED write) is counted and must occur.
module tb_forth_target;
  import forth_pkg::*;

  localparam int unsigned CPB   = 50_000_000 / 115_200;
  localparam addr_t       DBASE = 16'd4096;
  localparam addr_t       VAR   = 16'h0F00;
  localparam int unsigned NLOOP = 60000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #10 clk = ~clk;   // 50 MHz

  logic       rxd = 1'b1;
  logic       txd;
  logic [7:0] led;
  cpu_regs_t  regs;
  logic       cpu_busy, link_err;

  forth_target dut (.clk, .rst_n, .rxd, .txd, .led, .regs, .cpu_busy, .link_err);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- mechanism counters ----------------
  int n_stall = 0, n_busy = 0, n_hcall = 0, n_emit = 0, n_ferr = 0, n_drop = 0,
      n_badop = 0, n_led = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.cpu_mem_req.req && !dut.cpu_mem_gnt) n_stall++;
    if (dut.u_uart_rx.frame_err) n_ferr++;
    if (dut.u_link_rx.dropped) n_drop++;
  end

  // ---------------- host UART ----------------
  task automatic uart_send(input logic [7:0] b);
    rxd = 1'b0; repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (CPB) @(posedge clk); end
    rxd = 1'b1; repeat (CPB) @(posedge clk);
  endtask

  logic [7:0] rxq[$];
  initial begin
    logic [7:0] b;
    forever begin
      @(negedge txd);
      repeat (CPB / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin repeat (CPB) @(posedge clk); b[i] = txd; end
      repeat (CPB) @(posedge clk);
      if (txd !== 1'b1) check(0, "stop bit from target");
      rxq.push_back(b);
    end
  end

  task automatic get_byte(output logic [7:0] b);
    int t = 0;
    while (rxq.size() == 0 && t < 4_000_000) begin @(posedge clk); t++; end
    if (rxq.size() == 0) begin check(0, "no byte from target"); b = '0; end
    else b = rxq.pop_front();
  endtask

  // receive one record; returns code and argument
  task automatic get_msg(output logic [7:0] code, output word_t arg);
    logic [7:0] h, l;
    get_byte(code);
    arg = '0;
    case (code)
      RSP_DATA, RSP_HOST: begin get_byte(h); get_byte(l); arg = {h, l}; end
      RSP_DONE, RSP_EMIT: begin get_byte(l); arg = {8'h00, l}; end
      RSP_ACK, RSP_BUSY: ;
      default: check(0, $sformatf("unknown record code %h", code));
    endcase
  endtask

  word_t done_seen[$];

  task automatic host_write(input addr_t a, input word_t d);
    logic [7:0] c; word_t x;
    uart_send(CMD_WRITE); uart_send(a[15:8]); uart_send(a[7:0]);
    uart_send(d[15:8]); uart_send(d[7:0]);
    get_msg(c, x);
    check(c == RSP_ACK, $sformatf("WRITE %h acknowledged (%h)", a, c));
  endtask

  task automatic host_read(input addr_t a, output word_t d);
    logic [7:0] c;
    uart_send(CMD_READ); uart_send(a[15:8]); uart_send(a[7:0]);
    get_msg(c, d);
    while (c == RSP_DONE) begin   // a word that ended meanwhile
      done_seen.push_back(d);
      get_msg(c, d);
    end
    check(c == RSP_DATA, $sformatf("READ %h answered (%h)", a, c));
  endtask

  task automatic host_exec(input addr_t a, output logic [7:0] c);
    word_t x;
    uart_send(CMD_EXEC); uart_send(a[15:8]); uart_send(a[7:0]);
    get_msg(c, x);
  endtask

  // ---------------- host-side assembler and dictionary image ----------------
  word_t img [int];     // address -> word, what the host believes the target holds
  addr_t ap;
  task automatic org(input addr_t a); ap = a; endtask
  task automatic w(input word_t v); img[int'(ap)] = v; ap++; endtask
  task automatic op(input opcode_e o); w({8'h00, o}); endtask
  task automatic op2(input opcode_e o, input word_t v); w({8'h00, o}); w(v); endtask
  task automatic mov(input regsel_e dst, input regsel_e src);
    w({8'h00, OP_MOV}); w({14'd0, src}); w({14'd0, dst});
  endtask

  localparam addr_t A_DUP = 16'h0010, A_SWAP = 16'h0018, A_MAIN = 16'h0030,
                    A_LOOP = 16'h0060, A_BAD = 16'h0090, A_ROT = 16'h00A0,
                    A_ROTT = 16'h00C0;

  task automatic build_dictionary();
    org(A_DUP);
    op(OP_POPD); mov(REG_GX, REG_FX); op(OP_PUSHD); op(OP_PUSHD); op(OP_RET);
    org(A_SWAP);
    op(OP_POPD); mov(REG_GX, REG_FX); op(OP_POPD); op(OP_PUSHD); mov(REG_GX, REG_FX);
    op(OP_PUSHD); op(OP_RET);
    org(A_MAIN);
    op2(OP_LOADI, 16'd5); op(OP_PUSHD); op2(OP_LOADI, 16'd6); op(OP_PUSHD);
    op2(OP_CALL, A_SWAP); op2(OP_CALL, A_DUP);        // 6 5 5
    op(OP_POPD); mov(REG_GX, REG_FX); op(OP_POPD); op(OP_MUL); op(OP_PUSHD);   // 6 25
    op(OP_LEDIO);
    op2(OP_LOADI, 16'h0041); op(OP_EMIT);
    op2(OP_LOADI, 16'h0077); op(OP_EXEC_PC);
    op2(OP_LOADI, 16'h0042); op(OP_EMIT);
    op(OP_RET);
    org(A_LOOP);
    op2(OP_LOADI, 16'(NLOOP)); op(OP_PUSHD);
    begin
      addr_t l, fix;
      l = ap;
      op(OP_POPD); mov(REG_GX, REG_FX);
      op(OP_JMP0); fix = ap; w(16'h0000);
      mov(REG_ADX, REG_FX); op2(OP_LOADI, 16'd1); mov(REG_FX, REG_GX); mov(REG_GX, REG_ADX);
      op(OP_SUB); op(OP_PUSHD);
      op2(OP_LOADI, VAR); mov(REG_ADX, REG_GX); op(OP_LOAD); op(OP_ADD); op(OP_STORE);
      op2(OP_LOADI, 16'd0); op2(OP_JMP0, l);
      img[int'(fix)] = ap;
      op(OP_RET);
    end
    // ROT ( a b c -- b c a ), the return stack serving as scratch
    org(A_ROT);
    op(OP_POPD); mov(REG_ADX, REG_FX); op(OP_PUSHR);
    op(OP_POPD); mov(REG_ADX, REG_FX); op(OP_PUSHR);
    op(OP_POPD); mov(REG_GX, REG_FX);
    op(OP_POPR); mov(REG_FX, REG_GX); mov(REG_GX, REG_ADX); op(OP_PUSHD);
    op(OP_POPR); mov(REG_GX, REG_ADX); op(OP_PUSHD);
    mov(REG_GX, REG_FX); op(OP_PUSHD); op(OP_RET);
    org(A_ROTT);
    op2(OP_LOADI, 16'd1); op(OP_PUSHD); op2(OP_LOADI, 16'd2); op(OP_PUSHD);
    op2(OP_LOADI, 16'd3); op(OP_PUSHD); op2(OP_CALL, A_ROT); op(OP_RET);
    org(A_BAD);
    op2(OP_LOADI, 16'd1); w(16'h00EE); op(OP_RET);
  endtask

  task automatic verify_dictionary(input string when);
    word_t d;
    int bad = 0;
    foreach (img[a]) begin
      host_read(addr_t'(a), d);
      if (d != img[a]) bad++;
    end
    check(bad == 0, $sformatf("dictionary intact %s (%0d words differ)", when, bad));
  endtask

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] c;
    word_t      d, v_mid;
    int         t;

    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (20) @(posedge clk);

    // 1. load the dictionary and clear the loop variable
    build_dictionary();
    foreach (img[a]) host_write(addr_t'(a), img[a]);
    host_write(VAR, 16'h0000);
    // 2. read it back
    verify_dictionary("after loading");

    // 3. main word
    host_exec(A_MAIN, c);
    check(c == RSP_ACK, "EXEC main acknowledged");
    get_msg(c, d);
    check(c == RSP_EMIT && d == 16'h0041, "first EMIT 'A'");
    if (c == RSP_EMIT) n_emit++;
    get_msg(c, d);
    check(c == RSP_HOST && d == 16'h0077, "EXEC_PC host call 0x77");
    if (c == RSP_HOST) n_hcall++;
    repeat (5000) @(posedge clk);
    check(cpu_busy && rxq.size() == 0, "CPU waits for the host");
    uart_send(CMD_RESUME);
    get_msg(c, d);
    check(c == RSP_EMIT && d == 16'h0042, "second EMIT 'B' after resume");
    if (c == RSP_EMIT) n_emit++;
    get_msg(c, d);
    check(c == RSP_DONE && d == 16'h0000, "main word done, status OK");
    check(led == 8'd25, $sformatf("LEDs show 25 (%0d)", led));
    if (led == 8'd25) n_led++;
    host_read(DBASE, d);
    check(d == 16'd6, "data stack bottom 6");
    host_read(DBASE + 16'd1, d);
    check(d == 16'd25, "data stack top 25");
    check(regs.sp == DBASE + 16'd1 && regs.rp == 16'd8192, "stack pointers after main");

    // ROT
    host_exec(A_ROTT, c);
    check(c == RSP_ACK, "EXEC ROT test acknowledged");
    get_msg(c, d);
    check(c == RSP_DONE && d == 16'h0000, "ROT test done");
    host_read(DBASE + 16'd2, d); check(d == 16'd2, $sformatf("ROT result 2 (%0d)", d));
    host_read(DBASE + 16'd3, d); check(d == 16'd3, $sformatf("ROT result 3 (%0d)", d));
    host_read(DBASE + 16'd4, d); check(d == 16'd1, $sformatf("ROT result 1 (%0d)", d));
    check(regs.sp == DBASE + 16'd4 && regs.rp == 16'd8192, "stack pointers after ROT");

    // 4. long loop, BUSY, read while running, disconnect
    host_exec(A_LOOP, c);
    check(c == RSP_ACK, "EXEC loop acknowledged");
    host_exec(A_MAIN, c);
    check(c == RSP_BUSY, "second EXEC refused while running");
    if (c == RSP_BUSY) n_busy++;
    host_read(VAR, v_mid);
    check(v_mid > 0 && v_mid < 16'(NLOOP), $sformatf("loop variable mid-run %0d", v_mid));
    check(cpu_busy, "loop still running");
    rxd = 1'b0; repeat (30 * CPB) @(posedge clk); rxd = 1'b1;   // unplugged: line low
    repeat (3 * CPB) @(posedge clk);
    uart_send(CMD_WRITE); uart_send(8'h00);                     // broken record
    repeat (60_000) @(posedge clk);                             // longer than the gap
    // 5. reconnect
    verify_dictionary("after reconnecting");
    if (done_seen.size() > 0) begin
      c = RSP_DONE; d = done_seen.pop_front();
    end else begin
      t = 0;
      while (rxq.size() == 0 && t < 4_000_000) begin @(posedge clk); t++; end
      get_msg(c, d);
    end
    check(c == RSP_DONE && d == 16'h0000, "loop done, status OK");
    host_read(VAR, d);
    check(d == 16'(NLOOP), $sformatf("loop count %0d", d));
    check(regs.sp == DBASE + 16'd4, "loop leaves the data stack as it found it");

    // 6. undefined opcode
    host_exec(A_BAD, c);
    check(c == RSP_ACK, "EXEC bad word acknowledged");
    get_msg(c, d);
    check(c == RSP_DONE && d == 16'(ST_BAD_OP), "undefined opcode reported");
    if (c == RSP_DONE && d == 16'(ST_BAD_OP)) n_badop++;

    $display("mechanisms: stall=%0d busy=%0d hostcall=%0d emit=%0d frame_err=%0d drop=%0d badop=%0d led=%0d",
             n_stall, n_busy, n_hcall, n_emit, n_ferr, n_drop, n_badop, n_led);
    check(n_stall > 0, "bus stall happened");
    check(n_busy > 0, "BUSY refusal happened");
    check(n_hcall > 0, "host call happened");
    check(n_emit > 0, "EMIT happened");
    check(n_ferr > 0, "framing error happened");
    check(n_drop > 0, "record drop happened");
    check(n_badop > 0, "bad opcode happened");
    check(n_led > 0, "LED write happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
