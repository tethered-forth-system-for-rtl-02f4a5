// tb_forth_cpu: self-checking testbench for forth_cpu.
//
// The testbench plays both the RAM (a 16-bit word array with one cycle of
// read latency and a grant that can be withheld at random) and the monitor
// (start, done, EMIT and EXEC_PC handshakes). Programs are assembled into
// the array by small tasks. Checks:
//  - the DUP and SWAP words built from POPD/MOV/PUSHD, reached by CALL;
//  - a counting loop built from JMP0, SUB and MOV, printing with EMIT;
//  - EXEC_PC: the CPU offers the identifier and waits for resume;
//  - an undefined opcode ends the word with ST_BAD_OP;
//  - random straight-line programs compared with an instruction-level
//    reference model written here (registers, stacks and scratch memory),
//    with the cycle count checked against the per-instruction cycle table
//    when the memory grant is always given, then repeated with random grants.
module tb_forth_cpu;
  import forth_pkg::*;

  localparam int unsigned MEMW  = 8192;
  localparam addr_t       DBASE = 16'd4096;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        start = 1'b0;
  addr_t       start_addr = '0;
  logic        busy, done_valid, done_ready;
  cpu_status_e done_status;
  logic        emit_valid, emit_ready;
  logic [7:0]  emit_char;
  logic        hcall_valid, hcall_ready, hcall_resume;
  word_t       hcall_id;
  mem_req_t    mem_req;
  logic        mem_gnt;
  word_t       mem_rdata;
  logic [7:0]  led;
  cpu_regs_t   regs;

  forth_cpu dut (
    .clk, .rst_n, .start, .start_addr, .busy,
    .done_valid, .done_status, .done_ready,
    .emit_valid, .emit_char, .emit_ready,
    .hcall_valid, .hcall_id, .hcall_ready, .hcall_resume,
    .mem_req, .mem_gnt, .mem_rdata, .led, .regs
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- memory model ----------------
  word_t mem [MEMW];
  int    gnt_pct = 100;
  always_comb mem_gnt = gnt_ok;
  logic gnt_ok = 1'b1;
  always @(negedge clk) gnt_ok <= ($urandom_range(99) < gnt_pct);
  always @(posedge clk) begin
    if (mem_req.req && mem_gnt) begin
      if (mem_req.we) mem[mem_req.addr[12:0]] <= mem_req.wdata;
      else            mem_rdata <= mem[mem_req.addr[12:0]];
    end
  end

  // ---------------- monitor side model ----------------
  bit   auto_done = 1'b1;
  logic emit_en = 1'b1, hc_en = 1'b1, resume_p = 1'b0;
  assign done_ready   = done_valid && auto_done;
  assign emit_ready   = emit_valid && emit_en;
  assign hcall_ready  = hcall_valid && hc_en;
  assign hcall_resume = resume_p;
  byte  emitted[$];
  always @(posedge clk) if (emit_valid && emit_ready) emitted.push_back(emit_char);

  // ---------------- assembler ----------------
  addr_t ap;
  task automatic org(input addr_t a); ap = a; endtask
  task automatic w(input word_t v); mem[13'(ap)] = v; ap++; endtask
  task automatic op(input opcode_e o); w({8'h00, o}); endtask
  task automatic op2(input opcode_e o, input word_t v); w({8'h00, o}); w(v); endtask
  task automatic mov(input regsel_e dst, input regsel_e src);
    w({8'h00, OP_MOV}); w({14'd0, src}); w({14'd0, dst});
  endtask

  // run a word, return the number of cycles from start to done_valid
  task automatic run(input addr_t a, output int cyc, input int limit = 100000);
    @(negedge clk);
    start = 1'b1; start_addr = a;
    @(negedge clk);
    start = 1'b0;
    cyc = 0;
    while (!done_valid && cyc < limit) begin @(negedge clk); cyc++; end
    if (cyc >= limit) check(0, "word did not finish");
    @(negedge clk);
  endtask

  // ---------------- reference model ----------------
  word_t mm [MEMW];
  word_t m_gx, m_fx, m_adx;
  addr_t m_pc, m_sp, m_rp;
  byte   m_led;

  function automatic int model_step();  // returns cycles, -1 when the word ends
    word_t ins, a1, a2, v;
    ins = mm[13'(m_pc)]; m_pc++;
    case (ins[7:0])
      8'h01: begin m_sp++; mm[13'(m_sp)] = m_gx; return 3; end
      8'h02: begin m_rp--; mm[13'(m_rp)] = m_adx; return 3; end
      8'h03: begin m_fx = mm[13'(m_sp)]; m_sp--; return 4; end
      8'h04: begin m_adx = mm[13'(m_rp)]; m_rp++; return 4; end
      8'h06: begin
        if (m_rp == 16'(MEMW)) return -1;
        m_pc = mm[13'(m_rp)]; m_rp++; return 4;
      end
      8'h05: begin
        a1 = mm[13'(m_pc)]; m_pc++; m_adx = a1; m_rp--; mm[13'(m_rp)] = m_pc; m_pc = a1;
        return 5;
      end
      8'h07: begin m_gx = mm[13'(m_pc)]; m_pc++; return 4; end
      8'h08: begin
        a1 = mm[13'(m_pc)]; m_pc++; a2 = mm[13'(m_pc)]; m_pc++;
        case (a1[1:0]) 0: v = m_gx; 1: v = m_fx; 2: v = m_adx; default: v = 0; endcase
        case (a2[1:0]) 0: m_gx = v; 1: m_fx = v; 2: m_adx = v; default: ; endcase
        return 6;
      end
      8'h09: begin m_gx = m_gx + m_fx; return 3; end
      8'h0A: begin m_gx = m_gx - m_fx; return 3; end
      8'h0B: begin m_gx = m_gx * m_fx; return 3; end
      8'h0C: begin m_gx = (m_gx == 0) ? 16'hFFFF : 16'h0; return 3; end
      8'h0D: begin mm[13'(m_adx)] = m_gx; return 3; end
      8'h0E: begin m_gx = mm[13'(m_adx)]; return 4; end
      8'h0F: begin v = mm[13'(m_sp - 16'd1)]; m_sp++; mm[13'(m_sp)] = v; return 5; end
      8'h10: begin a1 = mm[13'(m_pc)]; m_pc++; if (m_gx == 0) m_pc = a1; return 4; end
      8'h13: begin m_gx = ($signed(m_gx) > $signed(m_fx)) ? 16'hFFFF : 16'h0; return 3; end
      8'h14: begin m_led = m_gx[7:0]; return 3; end
      default: return -2;
    endcase
  endfunction

  // random straight-line program generator
  task automatic gen_random(input addr_t a, input int n);
    int depth = 0, rdepth = 0, k;
    org(a);
    for (int i = 0; i < n; i++) begin
      k = $urandom_range(15);
      case (k)
        0: begin op(OP_PUSHD); depth++; end
        1: if (depth > 0) begin op(OP_POPD); depth--; end
        2: begin op(OP_PUSHR); rdepth++; end
        3: if (rdepth > 0) begin op(OP_POPR); rdepth--; end
        4: op2(OP_LOADI, word_t'($urandom));
        5: mov(regsel_e'($urandom_range(3)), regsel_e'($urandom_range(3)));
        6: op(OP_ADD);
        7: op(OP_SUB);
        8: op(OP_MUL);
        9: op(OP_EQ);
        10: op(OP_GT);
        11: begin  // STORE into the scratch area 0x0800..0x08FF
          op2(OP_LOADI, 16'h0800 + 16'($urandom_range(255))); mov(REG_ADX, REG_GX);
          op2(OP_LOADI, word_t'($urandom)); op(OP_STORE);
        end
        12: begin
          op2(OP_LOADI, 16'h0800 + 16'($urandom_range(255))); mov(REG_ADX, REG_GX); op(OP_LOAD);
        end
        13: if (depth >= 2) begin op(OP_OVER); depth++; end
        14: op(OP_LEDIO);
        default: op2(OP_JMP0, ap + 16'd2);  // both ways lead to the next instruction
      endcase
    end
    while (rdepth > 0) begin op(OP_POPR); rdepth--; end
    op(OP_RET);
  endtask

  int cyc, exp_cyc, r;

  task automatic random_test(input int seed_n, input int pct);
    gnt_pct = pct;
    gen_random(16'h0300, 60);
    for (int i = 0; i < MEMW; i++) mm[i] = mem[i];
    m_gx = regs.gx; m_fx = regs.fx; m_adx = regs.adx; m_sp = regs.sp; m_rp = regs.rp;
    m_pc = 16'h0300; m_led = led; exp_cyc = 0;
    forever begin
      r = model_step();
      if (r == -1) begin exp_cyc += 3; break; end
      if (r < 0) begin check(0, "generator produced an undefined opcode"); break; end
      exp_cyc += r;
    end
    run(16'h0300, cyc);
    check(done_status == ST_OK, $sformatf("random %0d status", seed_n));
    check(regs.gx == m_gx && regs.fx == m_fx && regs.adx == m_adx,
          $sformatf("random %0d regs gx=%h/%h fx=%h/%h adx=%h/%h", seed_n,
                    regs.gx, m_gx, regs.fx, m_fx, regs.adx, m_adx));
    check(regs.sp == m_sp && regs.rp == m_rp, $sformatf("random %0d stack pointers", seed_n));
    check(led == m_led, $sformatf("random %0d led", seed_n));
    begin
      int bad = 0;
      for (int i = 0; i < MEMW; i++) if (mem[i] != mm[i]) bad++;
      check(bad == 0, $sformatf("random %0d memory differs in %0d words", seed_n, bad));
    end
    if (pct == 100)
      check(cyc == exp_cyc, $sformatf("random %0d cycles %0d expected %0d", seed_n, cyc, exp_cyc));
  endtask

  // watchdog
  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < MEMW; i++) mem[i] = '0;
    mem_rdata = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check(regs.sp == DBASE - 16'd1 && regs.rp == 16'(MEMW) && !busy, "reset state");

    // ---- SWAP and DUP words, reached by CALL ----
    org(16'h0200);                        // SWAP
    op(OP_POPD); mov(REG_GX, REG_FX); op(OP_POPD); op(OP_PUSHD); mov(REG_GX, REG_FX);
    op(OP_PUSHD); op(OP_RET);
    org(16'h0210);                        // DUP
    op(OP_POPD); mov(REG_GX, REG_FX); op(OP_PUSHD); op(OP_PUSHD); op(OP_RET);
    org(16'h0100);
    op2(OP_LOADI, 16'd7); op(OP_PUSHD); op2(OP_LOADI, 16'd9); op(OP_PUSHD);
    op2(OP_CALL, 16'h0200); op2(OP_CALL, 16'h0210); op(OP_RET);
    run(16'h0100, cyc);
    check(done_status == ST_OK, "SWAP/DUP status");
    check(regs.sp == DBASE + 16'd2, $sformatf("SWAP/DUP depth sp=%h", regs.sp));
    check(mem[DBASE] == 16'd9 && mem[DBASE+1] == 16'd7 && mem[DBASE+2] == 16'd7,
          $sformatf("SWAP/DUP stack %0d %0d %0d", mem[DBASE], mem[DBASE+1], mem[DBASE+2]));
    check(regs.rp == 16'(MEMW), "return stack empty after CALL/RET");
    check(regs.adx == 16'h0210, "CALL leaves its target in ADX");

    // ---- OVER, GT, EQ, LEDIO ----
    org(16'h0120);
    op(OP_OVER);                          // 9 7 7 -> 9 7 7 7
    op2(OP_LOADI, 16'hFFFE); mov(REG_FX, REG_GX); op2(OP_LOADI, 16'd3); op(OP_GT); // 3 > -2
    op(OP_LEDIO); op(OP_EQ); op(OP_RET);
    run(16'h0120, cyc);
    check(mem[DBASE+3] == 16'd7 && regs.sp == DBASE + 16'd3, "OVER copies second item");
    check(led == 8'hFF, "GT signed true, LEDIO");
    check(regs.gx == 16'h0000, "EQ of nonzero is false");

    // ---- counting loop with JMP0 and EMIT ----
    emitted.delete();
    org(16'h0140);
    op2(OP_LOADI, 16'd3); op(OP_PUSHD);
    // L = 0x0143
    op(OP_POPD); mov(REG_GX, REG_FX); op2(OP_JMP0, 16'h0160);
    mov(REG_ADX, REG_FX); op2(OP_LOADI, 16'd1); mov(REG_FX, REG_GX); mov(REG_GX, REG_ADX);
    op(OP_SUB); op(OP_PUSHD); op(OP_EMIT); op2(OP_LOADI, 16'd0); op2(OP_JMP0, 16'h0143);
    org(16'h0160); op(OP_RET);
    emit_en = 1'b0;
    fork
      begin repeat (40) @(negedge clk); emit_en = 1'b1; end
    join_none
    run(16'h0140, cyc);
    check(emitted.size() == 3 && emitted[0] == 8'd2 && emitted[1] == 8'd1 && emitted[2] == 8'd0,
          $sformatf("loop EMIT sequence (%0d chars)", emitted.size()));
    check(regs.sp == DBASE + 16'd3, "loop leaves data stack balanced");

    // ---- EXEC_PC waits for resume ----
    org(16'h0180);
    op2(OP_LOADI, 16'h1234); op(OP_EXEC_PC); op2(OP_LOADI, 16'h5555); op(OP_RET);
    hc_en = 1'b0;
    @(negedge clk); start = 1'b1; start_addr = 16'h0180; @(negedge clk); start = 1'b0;
    while (!hcall_valid) @(negedge clk);
    check(hcall_id == 16'h1234, "EXEC_PC identifier");
    repeat (5) @(negedge clk);
    check(hcall_valid, "EXEC_PC holds request until taken");
    hc_en = 1'b1; @(negedge clk); hc_en = 1'b0;
    repeat (20) @(negedge clk);
    check(busy && regs.gx == 16'h1234 && !done_valid, "CPU waits for resume");
    resume_p = 1'b1; @(negedge clk); resume_p = 1'b0;
    while (!done_valid) @(negedge clk);
    check(regs.gx == 16'h5555, "CPU continues after resume");
    @(negedge clk);
    hc_en = 1'b1;

    // ---- undefined opcode ----
    org(16'h01A0); w(16'h0000);
    run(16'h01A0, cyc);
    check(done_status == ST_BAD_OP, "undefined opcode halts with ST_BAD_OP");

    // ---- done handshake is held ----
    auto_done = 1'b0;
    org(16'h01B0); op(OP_RET);
    @(negedge clk); start = 1'b1; start_addr = 16'h01B0; @(negedge clk); start = 1'b0;
    repeat (10) @(negedge clk);
    check(done_valid && busy, "done held until done_ready");
    auto_done = 1'b1; @(negedge clk); @(negedge clk);
    check(!busy, "idle after done_ready");

    // ---- random programs against the reference model ----
    for (int t = 0; t < 20; t++) random_test(t, 100);
    for (int t = 20; t < 40; t++) random_test(t, 60);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
