// forth_cpu: the 16-bit MISC processor that executes compiled Forth words in
// the target.
//
// Registers: GX (accumulator, first ALU operand and result, STORE data),
// FX (second ALU operand), ADX (address register), PC, SP (address of the
// top of the data stack) and RP (address of the top of the return stack).
// Both stacks live in the shared RAM: the data stack grows upwards from
// DSTACK_BASE, the return stack downwards from RSTACK_TOP. The data stack
// has two pointers, SP and SPN = SP + 1 (the next free slot), so that pushes
// and pops need no address adder in the access cycle.
//
// There is no pipeline. Every instruction runs FETCH (one memory read of
// the opcode word at PC), DECODE (the opcode is latched from the read data)
// and EXECUTE (one or more cycles; each further memory access takes one
// more cycle, plus one to take read data). With the memory always granted,
// one-word ALU and register instructions take 3 cycles, PUSHD/PUSHR/STORE
// 3, POPD/POPR/LOAD/LOADI/JMP0/RET 4, CALL 5, OVER 5 and MOV 6.
//
// Interface: a one-cycle start pulse with start_addr begins execution of
// a word (busy goes high). The word ends with the RET that finds the return
// stack empty; the CPU then offers done_valid with done_status until
// done_ready and returns to idle. EMIT offers the low byte of GX on
// emit_valid/emit_char until emit_ready. EXEC_PC offers GX as the host word
// identifier on hcall_valid/hcall_id until hcall_ready, then waits for a
// hcall_resume pulse. The memory port is a request (mem_req) that is
// performed in a cycle when mem_gnt is high; read data arrives on
// mem_rdata on the following cycle. LEDIO copies GX to the led outputs.
//
// From the instruction table: opcodes, operand word counts, the registers
// each instruction uses, and the stack directions. This design's own
// choices: opcode in bits [7:0] of the word; CALL/LOADI/JMP0 take the
// following word as address or value, CALL loading it into ADX; MOV's
// second word selects the source and its third word the destination
// register (bits [1:0]: GX, FX, ADX); SUB computes GX - FX; EQ and GT write
// -1 (true) or 0 to GX, GT comparing signed; POPR pops the return stack;
// OVER pushes a copy of the second data stack item; undefined opcodes halt
// with status ST_BAD_OP. There is no stack overflow check.
module forth_cpu
  import forth_pkg::*;
#(
  parameter addr_t       DSTACK_BASE = 16'd4096,
  parameter logic [16:0] RSTACK_TOP  = 17'd8192,  // RP value of an empty return stack
  parameter int unsigned LED_W       = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  // control from the monitor
  input  logic             start,
  input  addr_t            start_addr,
  output logic             busy,
  output logic             done_valid,
  output cpu_status_e      done_status,
  input  logic             done_ready,
  // EMIT
  output logic             emit_valid,
  output logic [7:0]       emit_char,
  input  logic             emit_ready,
  // EXEC_PC
  output logic             hcall_valid,
  output word_t            hcall_id,
  input  logic             hcall_ready,
  input  logic             hcall_resume,
  // memory
  output mem_req_t         mem_req,
  input  logic             mem_gnt,
  input  word_t            mem_rdata,
  // LEDIO
  output logic [LED_W-1:0] led,
  // observation
  output cpu_regs_t        regs
);

  typedef enum logic [2:0] {S_IDLE, S_FETCH, S_DECODE, S_EXEC, S_DONE} state_e;

  localparam addr_t RP_EMPTY = addr_t'(RSTACK_TOP);

  state_e      state;
  logic [7:0]  ir;
  logic [1:0]  step;
  word_t       gx, fx, adx, tmp;
  addr_t       pc, sp, spn, rp;
  cpu_status_e status;

  logic rs_empty;
  logic acc_ok;   // the memory access requested this cycle (if any) is performed

  assign rs_empty = (rp == RP_EMPTY);
  assign acc_ok   = !mem_req.req || mem_gnt;

  assign busy        = (state != S_IDLE);
  assign done_valid  = (state == S_DONE);
  assign done_status = status;
  assign emit_valid  = (state == S_EXEC) && (ir == OP_EMIT);
  assign emit_char   = gx[7:0];
  assign hcall_valid = (state == S_EXEC) && (ir == OP_EXEC_PC) && (step == 2'd0);
  assign hcall_id    = gx;
  assign regs        = '{gx: gx, fx: fx, adx: adx, pc: pc, sp: sp, rp: rp};

  function automatic word_t reg_read(input logic [1:0] sel, input word_t g, input word_t f,
                                     input word_t a);
    case (regsel_e'(sel))
      REG_GX:  return g;
      REG_FX:  return f;
      REG_ADX: return a;
      default: return '0;
    endcase
  endfunction

  // memory request of the current cycle
  always_comb begin
    mem_req = '{req: 1'b0, we: 1'b0, addr: pc, wdata: gx};
    unique case (state)
      S_FETCH: mem_req.req = 1'b1;
      S_EXEC: begin
        unique case (ir)
          OP_PUSHD: mem_req = '{req: 1'b1, we: 1'b1, addr: spn, wdata: gx};
          OP_PUSHR: mem_req = '{req: 1'b1, we: 1'b1, addr: rp - addr_t'(1), wdata: adx};
          OP_POPD:  if (step == 2'd0) mem_req = '{req: 1'b1, we: 1'b0, addr: sp, wdata: gx};
          OP_POPR:  if (step == 2'd0) mem_req = '{req: 1'b1, we: 1'b0, addr: rp, wdata: gx};
          OP_RET:   if (step == 2'd0 && !rs_empty)
                      mem_req = '{req: 1'b1, we: 1'b0, addr: rp, wdata: gx};
          OP_CALL:  if (step == 2'd0) mem_req.req = 1'b1;
                    else if (step == 2'd2)
                      mem_req = '{req: 1'b1, we: 1'b1, addr: rp - addr_t'(1), wdata: pc};
          OP_LOADI, OP_JMP0: if (step == 2'd0) mem_req.req = 1'b1;
          OP_MOV:   if (step == 2'd0 || step == 2'd2) mem_req.req = 1'b1;
          OP_STORE: mem_req = '{req: 1'b1, we: 1'b1, addr: adx, wdata: gx};
          OP_LOAD:  if (step == 2'd0) mem_req = '{req: 1'b1, we: 1'b0, addr: adx, wdata: gx};
          OP_OVER:  if (step == 2'd0) mem_req = '{req: 1'b1, we: 1'b0, addr: sp - addr_t'(1), wdata: gx};
                    else if (step == 2'd2) mem_req = '{req: 1'b1, we: 1'b1, addr: spn, wdata: tmp};
          default: ;
        endcase
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      ir     <= '0;
      step   <= '0;
      gx     <= '0;
      fx     <= '0;
      adx    <= '0;
      tmp    <= '0;
      pc     <= '0;
      sp     <= DSTACK_BASE - addr_t'(1);
      spn    <= DSTACK_BASE;
      rp     <= RP_EMPTY;
      status <= ST_OK;
      led    <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          pc    <= start_addr;
          state <= S_FETCH;
        end
        S_FETCH: if (mem_gnt) begin
          pc    <= pc + addr_t'(1);
          state <= S_DECODE;
        end
        S_DECODE: begin
          ir    <= mem_rdata[7:0];
          step  <= '0;
          state <= S_EXEC;
        end
        S_EXEC: if (acc_ok) begin
          step <= step + 2'd1;
          unique case (ir)
            OP_PUSHD: begin
              sp    <= spn;
              spn   <= spn + addr_t'(1);
              state <= S_FETCH;
            end
            OP_PUSHR: begin
              rp    <= rp - addr_t'(1);
              state <= S_FETCH;
            end
            OP_POPD: if (step == 2'd1) begin
              fx    <= mem_rdata;
              spn   <= sp;
              sp    <= sp - addr_t'(1);
              state <= S_FETCH;
            end
            OP_POPR: if (step == 2'd1) begin
              adx   <= mem_rdata;
              rp    <= rp + addr_t'(1);
              state <= S_FETCH;
            end
            OP_RET: if (rs_empty) begin
              status <= ST_OK;
              state  <= S_DONE;
            end else if (step == 2'd1) begin
              pc    <= mem_rdata;
              rp    <= rp + addr_t'(1);
              state <= S_FETCH;
            end
            OP_CALL: begin
              if (step == 2'd0) pc <= pc + addr_t'(1);       // pc now holds the return address
              if (step == 2'd1) adx <= mem_rdata;
              if (step == 2'd2) begin
                rp    <= rp - addr_t'(1);
                pc    <= adx;
                state <= S_FETCH;
              end
            end
            OP_LOADI: begin
              if (step == 2'd0) pc <= pc + addr_t'(1);
              if (step == 2'd1) begin
                gx    <= mem_rdata;
                state <= S_FETCH;
              end
            end
            OP_JMP0: begin
              if (step == 2'd0) pc <= pc + addr_t'(1);
              if (step == 2'd1) begin
                if (gx == '0) pc <= mem_rdata;
                state <= S_FETCH;
              end
            end
            OP_MOV: begin
              if (step == 2'd0 || step == 2'd2) pc <= pc + addr_t'(1);
              if (step == 2'd1) tmp <= reg_read(mem_rdata[1:0], gx, fx, adx);
              if (step == 2'd3) begin
                unique case (regsel_e'(mem_rdata[1:0]))
                  REG_GX:  gx  <= tmp;
                  REG_FX:  fx  <= tmp;
                  REG_ADX: adx <= tmp;
                  default: ;
                endcase
                state <= S_FETCH;
              end
            end
            OP_ADD: begin gx <= gx + fx; state <= S_FETCH; end
            OP_SUB: begin gx <= gx - fx; state <= S_FETCH; end
            OP_MUL: begin gx <= word_t'(gx * fx); state <= S_FETCH; end
            OP_EQ:  begin gx <= (gx == '0) ? FORTH_TRUE : FORTH_FALSE; state <= S_FETCH; end
            OP_GT:  begin
              gx    <= ($signed(gx) > $signed(fx)) ? FORTH_TRUE : FORTH_FALSE;
              state <= S_FETCH;
            end
            OP_STORE: state <= S_FETCH;
            OP_LOAD: if (step == 2'd1) begin
              gx    <= mem_rdata;
              state <= S_FETCH;
            end
            OP_OVER: begin
              if (step == 2'd1) tmp <= mem_rdata;
              if (step == 2'd2) begin
                sp    <= spn;
                spn   <= spn + addr_t'(1);
                state <= S_FETCH;
              end
            end
            OP_EMIT: begin
              step <= step;
              if (emit_ready) state <= S_FETCH;
            end
            OP_EXEC_PC: begin
              step <= step;
              if (step == 2'd0 && hcall_ready) step <= 2'd1;
              if (step == 2'd1 && hcall_resume) state <= S_FETCH;
            end
            OP_LEDIO: begin led <= gx[LED_W-1:0]; state <= S_FETCH; end
            default: begin
              status <= ST_BAD_OP;
              state  <= S_DONE;
            end
          endcase
        end
        S_DONE: if (done_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // requests to the monitor are held until they are taken
  a_emit_hold: assert property (@(posedge clk) disable iff (!rst_n)
    emit_valid && !emit_ready |=> emit_valid && $stable(emit_char));
  a_hcall_hold: assert property (@(posedge clk) disable iff (!rst_n)
    hcall_valid && !hcall_ready |=> hcall_valid && $stable(hcall_id));
  a_done_hold: assert property (@(posedge clk) disable iff (!rst_n)
    done_valid && !done_ready |=> done_valid);

endmodule
