// forth_monitor: the state machine that serves the host over the
// communication link and controls the CPU.
//
// It takes one decoded host command at a time. READ and WRITE access the
// RAM directly: the monitor owns the memory bus for that cycle and the CPU,
// if it is running, is held off (mem_gnt low) for one cycle, so memory can
// be inspected and changed while a word is executing. EXEC starts the CPU at
// the given address if it is idle and is answered with ACK, or with BUSY if
// the CPU is still running. RESUME ends a host call the CPU made with
// EXEC_PC. When no command is pending, the monitor forwards the CPU's events
// to the host: the end of a started word (DONE with its status), a
// character from EMIT and a host call from EXEC_PC; the CPU is released
// (ready) when its event has been taken. Host commands take precedence over
// CPU events; among events the order is DONE, EMIT, host call.
//
// Every answer or event becomes one message to link_tx, held with
// msg_valid until msg_ready. A READ is answered two cycles after the command
// is accepted with the message offered on the third; a WRITE likewise.
// The command set and its encoding are this design's choices; reading,
// writing and starting execution are the monitor's duties as given.
module forth_monitor
  import forth_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // decoded host commands
  input  cmd_t        cmd,
  input  logic        cmd_valid,
  output logic        cmd_ready,
  // messages to the host
  output msg_t        msg,
  output logic        msg_valid,
  input  logic        msg_ready,
  // CPU control
  output logic        start,
  output addr_t       start_addr,
  input  logic        busy,
  input  logic        done_valid,
  input  cpu_status_e done_status,
  output logic        done_ready,
  input  logic        emit_valid,
  input  logic [7:0]  emit_char,
  output logic        emit_ready,
  input  logic        hcall_valid,
  input  word_t       hcall_id,
  output logic        hcall_ready,
  output logic        hcall_resume,
  // memory bus: CPU side and RAM side
  input  mem_req_t    cpu_mem_req,
  output logic        cpu_mem_gnt,
  output mem_req_t    ram_req,
  input  word_t       ram_rdata
);

  typedef enum logic [1:0] {M_IDLE, M_ACCESS, M_READ_DATA, M_SEND} mstate_e;

  mstate_e  state;
  cmd_t     cur;
  msg_t     msg_r;
  mem_req_t mon_req;

  // memory arbitration: the monitor has priority
  assign mon_req     = '{req: (state == M_ACCESS), we: (cur.code == CMD_WRITE),
                         addr: cur.addr, wdata: cur.data};
  assign ram_req     = mon_req.req ? mon_req : cpu_mem_req;
  assign cpu_mem_gnt = !mon_req.req;

  assign cmd_ready    = (state == M_IDLE);
  assign start        = (state == M_IDLE) && cmd_valid && (cmd.code == CMD_EXEC) && !busy;
  assign start_addr   = cmd.addr;
  assign hcall_resume = (state == M_IDLE) && cmd_valid && (cmd.code == CMD_RESUME);
  assign done_ready   = (state == M_IDLE) && !cmd_valid && done_valid;
  assign emit_ready   = (state == M_IDLE) && !cmd_valid && !done_valid && emit_valid;
  assign hcall_ready  = (state == M_IDLE) && !cmd_valid && !done_valid && !emit_valid
                        && hcall_valid;

  assign msg       = msg_r;
  assign msg_valid = (state == M_SEND);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= M_IDLE;
      cur   <= '0;
      msg_r <= '{code: RSP_ACK, nbytes: 2'd0, arg: '0};
    end else begin
      unique case (state)
        M_IDLE: begin
          if (cmd_valid) begin
            cur <= cmd;
            unique case (cmd.code)
              CMD_READ, CMD_WRITE: state <= M_ACCESS;
              CMD_EXEC: begin
                msg_r <= '{code: busy ? RSP_BUSY : RSP_ACK, nbytes: 2'd0, arg: '0};
                state <= M_SEND;
              end
              default: ;   // RESUME: no answer
            endcase
          end else if (done_valid) begin
            msg_r <= '{code: RSP_DONE, nbytes: 2'd1, arg: {8'h00, done_status}};
            state <= M_SEND;
          end else if (emit_valid) begin
            msg_r <= '{code: RSP_EMIT, nbytes: 2'd1, arg: {8'h00, emit_char}};
            state <= M_SEND;
          end else if (hcall_valid) begin
            msg_r <= '{code: RSP_HOST, nbytes: 2'd2, arg: hcall_id};
            state <= M_SEND;
          end
        end
        M_ACCESS: begin
          if (cur.code == CMD_WRITE) begin
            msg_r <= '{code: RSP_ACK, nbytes: 2'd0, arg: '0};
            state <= M_SEND;
          end else begin
            state <= M_READ_DATA;
          end
        end
        M_READ_DATA: begin
          msg_r <= '{code: RSP_DATA, nbytes: 2'd2, arg: ram_rdata};
          state <= M_SEND;
        end
        M_SEND: if (msg_ready) state <= M_IDLE;
        default: state <= M_IDLE;
      endcase
    end
  end

  // a message, once offered, is held unchanged until it is taken
  a_msg_hold: assert property (@(posedge clk) disable iff (!rst_n)
    msg_valid && !msg_ready |=> msg_valid && $stable(msg));
  // the CPU is never held off while the monitor leaves the bus free
  a_gnt: assert property (@(posedge clk) disable iff (!rst_n)
    !cpu_mem_gnt |-> ram_req.req);

endmodule
