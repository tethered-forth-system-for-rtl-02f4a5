// forth_pkg: types and constants shared by the target part of the tethered
// Forth system.
//
// The opcode values are the byte codes of the CPU's instruction table. An
// instruction word holds the opcode in bits [7:0]; bits [15:8] are ignored.
// Operand words (LOADI, CALL, JMP0, MOV) follow the opcode word in memory.
// The link record codes, the memory request struct, the monitor command
// struct and the message struct are this design's own choices: the
// instruction set fixes only the opcodes.
package forth_pkg;

  localparam int unsigned WORD_W = 16;
  localparam int unsigned ADDR_W = 16;

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [ADDR_W-1:0] addr_t;

  // Instruction opcodes (byte codes of the instruction table)
  typedef enum logic [7:0] {
    OP_PUSHD   = 8'h01,
    OP_PUSHR   = 8'h02,
    OP_POPD    = 8'h03,
    OP_POPR    = 8'h04,
    OP_CALL    = 8'h05,
    OP_RET     = 8'h06,
    OP_LOADI   = 8'h07,
    OP_MOV     = 8'h08,
    OP_ADD     = 8'h09,
    OP_SUB     = 8'h0A,
    OP_MUL     = 8'h0B,
    OP_EQ      = 8'h0C,
    OP_STORE   = 8'h0D,
    OP_LOAD    = 8'h0E,
    OP_OVER    = 8'h0F,
    OP_JMP0    = 8'h10,
    OP_EMIT    = 8'h11,
    OP_EXEC_PC = 8'h12,
    OP_GT      = 8'h13,
    OP_LEDIO   = 8'h14
  } opcode_e;

  // Register selectors used by the operand words of MOV (bits [1:0])
  typedef enum logic [1:0] {
    REG_GX  = 2'd0,
    REG_FX  = 2'd1,
    REG_ADX = 2'd2,
    REG_NONE = 2'd3
  } regsel_e;

  // Forth flag values produced by EQ and GT
  localparam word_t FORTH_TRUE  = 16'hFFFF;
  localparam word_t FORTH_FALSE = 16'h0000;

  // Completion status of a word started by the monitor
  typedef enum logic [7:0] {
    ST_OK     = 8'h00,   // outermost RET reached
    ST_BAD_OP = 8'h01    // undefined opcode fetched, CPU halted
  } cpu_status_e;

  // One memory access. Reads return data on the cycle after the grant.
  typedef struct packed {
    logic  req;
    logic  we;
    addr_t addr;
    word_t wdata;
  } mem_req_t;

  // CPU registers, brought out for observation
  typedef struct packed {
    word_t gx;
    word_t fx;
    word_t adx;
    addr_t pc;
    addr_t sp;
    addr_t rp;
  } cpu_regs_t;

  // Host -> target record codes (first byte of a record)
  typedef enum logic [7:0] {
    CMD_READ   = 8'h01,  // + addr_hi addr_lo            -> RSP_DATA
    CMD_WRITE  = 8'h02,  // + addr_hi addr_lo data_hi data_lo -> RSP_ACK
    CMD_EXEC   = 8'h03,  // + addr_hi addr_lo            -> RSP_ACK or RSP_BUSY
    CMD_RESUME = 8'h04   // no payload: ends a host call made by EXEC_PC
  } cmd_code_e;

  // Target -> host record codes
  typedef enum logic [7:0] {
    RSP_DATA = 8'h81,    // + data_hi data_lo
    RSP_ACK  = 8'h82,    // no payload
    RSP_BUSY = 8'h83,    // no payload: EXEC refused, CPU running
    RSP_DONE = 8'h84,    // + status byte: started word has returned
    RSP_EMIT = 8'h85,    // + character
    RSP_HOST = 8'h86     // + id_hi id_lo: execute host word (EXEC_PC)
  } rsp_code_e;

  // Decoded host command
  typedef struct packed {
    cmd_code_e code;
    addr_t     addr;
    word_t     data;
  } cmd_t;

  // Message to the host: code byte followed by nbytes (0..2) of arg.
  // With one payload byte arg[7:0] is sent; with two, arg[15:8] first.
  typedef struct packed {
    rsp_code_e  code;
    logic [1:0] nbytes;
    word_t      arg;
  } msg_t;

endpackage
